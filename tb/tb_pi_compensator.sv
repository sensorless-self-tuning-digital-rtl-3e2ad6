// tb_pi_compensator: random voltage errors into the PI voltage compensator,
// i_tot compared with an integer model; checks the limits, hold (output
// and accumulator frozen) and preset.
// A PI voltage loop follows the document; its gains, limits and the hold
// and preset behaviour are this design's own.
module tb_pi_compensator;
  import cpm_pkg::*;
  localparam int KP = 4096, KI = 128, SH = 4, IMAX = 60000;
  logic clk = 0, rst_n = 0, upd = 0, hold = 0, preset = 0;
  cur_t pval, itot;
  err_t e;
  int checks = 0, failures = 0;
  longint acc_m;

  pi_compensator #(.KP(KP), .KI(KI), .SH(SH), .IMAX(IMAX)) dut (.clk, .rst_n, .upd, .hold, .preset, .preset_val(pval), .e, .itot);
  always #1 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic step(input int ev);
    longint s, a, ex;
    e = err_t'(ev);
    s = (KP * longint'(ev) + acc_m) >>> SH;
    ex = (s < -IMAX) ? -IMAX : (s > IMAX) ? IMAX : s;
    if (hold) ex = longint'(itot);
    if (!hold) begin
      a = acc_m + KI * longint'(ev);
      acc_m = (a < -(longint'(IMAX) << SH)) ? -(longint'(IMAX) << SH) : (a > (longint'(IMAX) << SH)) ? (longint'(IMAX) << SH) : a;
    end
    @(posedge clk); upd <= 1; @(posedge clk); upd <= 0; @(posedge clk);
    chk(itot == cur_t'(ex), $sformatf("itot %0d exp %0d", itot, ex));
  endtask

  initial begin
    acc_m = 0; e = '0; pval = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (100) step(int'($urandom_range(0, 12)) - 3);
    repeat (50) step(int'($urandom_range(0, 8)) - 4);
    // preset loads the accumulator
    pval = cur_t'(12345);
    @(posedge clk); preset <= 1; @(posedge clk); preset <= 0; @(posedge clk);
    chk(itot == cur_t'(12345), "preset output");
    acc_m = 12345 << SH;
    step(0);
    step(2);
    hold = 1;
    repeat (5) step(5);
    hold = 0;
    repeat (200) step(60);
    chk(itot == cur_t'(IMAX), "upper limit");
    repeat (400) step(-60);
    chk(itot == -cur_t'(IMAX), "lower limit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
