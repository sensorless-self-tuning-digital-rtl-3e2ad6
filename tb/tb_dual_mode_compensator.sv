// tb_dual_mode_compensator: error formation e = Vref - vout, the PI mode
// against an integer model, a hand-over to the transient mode on an output
// voltage drop (PI held while active, then preset to the estimated current sum), and no
// hand-over while the transient mode is disabled.
// The mode hand-over follows the document; the preset from the estimate
// sum and the threshold tested are this design's own choices.
module tb_dual_mode_compensator;
  import cpm_pkg::*;
  logic clk = 0, rst_n = 0, upd = 0, vsmp = 0, en = 0;
  vout_t vref = 8'd112, vout = 8'd112;
  vin_t vin = 12'd3000;
  cap_t cap = cap_t'(12800 * 256);
  ind_t leq = ind_t'(16 * 256);
  err_t e;
  cur_t itot;
  logic act, fen, fval, eu, ed;
  int checks = 0, failures = 0, clk_n = 0;
  longint acc_m = 0;

  dual_mode_compensator dut (.clk, .rst_n, .upd, .vsmp, .en_transient(en), .vref, .vout, .vin, .cap, .leq, .isum(cur_t'(31000)),
                             .e, .itot, .active(act), .force_en(fen), .force_val(fval), .evt_up(eu), .evt_down(ed));
  always #1 clk = ~clk;
  always @(posedge clk) begin
    clk_n <= clk_n + 1;
    vsmp <= ((clk_n % 32) == 31);
    upd  <= ((clk_n % 256) == 128);
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    // PI mode: a steady error of +2 codes
    vout = 8'd110;
    repeat (40) @(posedge clk);
    chk(e == err_t'(2), $sformatf("error %0d", e));
    for (int n = 0; n < 20; n++) begin
      longint s;
      @(posedge clk iff upd);
      s = (4096 * 2 + acc_m) >>> 4;
      acc_m += 128 * 2;
      @(posedge clk);
      chk(itot == cur_t'(s), $sformatf("PI itot %0d exp %0d", itot, s));
    end
    // disabled transient mode: a step changes nothing but the PI
    vout = 8'd106;
    repeat (600) @(posedge clk);
    chk(!act, "disabled");
    vout = 8'd112; repeat (3000) @(posedge clk);
    // enabled: drop of 3 codes within one sample
    en = 1;
    begin
      cur_t i_before;
      int held;
      @(posedge clk iff vsmp);
      vout = 8'd109;
      @(posedge clk iff act);
      i_before = itot;
      held = 1;
      while (act) begin
        @(posedge clk);
        if (itot != i_before) held = 0;
      end
      repeat (2) @(posedge clk);
      chk(held == 1, "PI held in transient mode");
      chk(itot == cur_t'(31000), $sformatf("preset %0d from %0d", itot, i_before));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
