// tb_current_compensator: random references and estimates into the two
// per-phase PI current loops, outputs compared with an integer model of
// duty = clamp((KP*di + acc) >> SH), acc += KI*di (clamped); also checks
// that hold freezes the loops and that saturation and anti-windup work.
// The loop structure follows the document; the gains and the model's
// fixed-point details are this design's own.
module tb_current_compensator;
  import cpm_pkg::*;
  localparam int KP = 20, KI = 2, SH = 12, DMAX = 240;
  logic clk = 0, rst_n = 0, upd = 0, hold = 0;
  cur_t iref [2], iest [2];
  duty_t duty [2];
  int checks = 0, failures = 0;
  longint acc_m [2];

  current_compensator #(.N(2), .KP(KP), .KI(KI), .SH(SH), .DMAX(DMAX)) dut (.clk, .rst_n, .upd, .hold, .iref, .iest, .duty);
  always #1 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic step(input int spread);
    longint di, a, s, dexp [2];
    for (int k = 0; k < 2; k++) begin
      iref[k] = cur_t'(5000 + $signed($urandom_range(0, 2 * spread)) - spread);
      iest[k] = cur_t'(5000 + $signed($urandom_range(0, 2 * spread)) - spread);
      di = longint'(iref[k]) - longint'(iest[k]);
      s = (KP * di + acc_m[k]) >>> SH;
      dexp[k] = (s < 0) ? 0 : (s > DMAX) ? DMAX : s;
      if (!hold) begin
        a = acc_m[k] + KI * di;
        if (a < 0) a = 0;
        if (a > (longint'(DMAX) << SH)) a = longint'(DMAX) << SH;
        acc_m[k] = a;
      end
    end
    @(posedge clk); upd <= 1; @(posedge clk); upd <= 0; @(posedge clk);
    for (int k = 0; k < 2; k++) begin
      if (!hold) chk(duty[k] == duty_t'(dexp[k]), $sformatf("duty %0d = %0d exp %0d", k, duty[k], dexp[k]));
    end
  endtask

  initial begin
    acc_m = '{0, 0};
    iref = '{cur_t'(0), cur_t'(0)}; iest = '{cur_t'(0), cur_t'(0)};
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (200) step(2000);
    // large positive error drives the duty to DMAX and the integrator to its limit
    repeat (100) begin
      iref = '{cur_t'(30000), cur_t'(30000)}; iest = '{cur_t'(0), cur_t'(0)};
      @(posedge clk); upd <= 1; @(posedge clk); upd <= 0;
    end
    @(posedge clk);
    chk(duty[0] == DMAX && duty[1] == DMAX, "saturation");
    // a small negative error must bring it off the limit at once (anti-windup)
    iref = '{cur_t'(0), cur_t'(0)}; iest = '{cur_t'(1000), cur_t'(1000)};
    @(posedge clk); upd <= 1; @(posedge clk); upd <= 0; @(posedge clk);
    chk(duty[0] == duty_t'((DMAX * (1 << SH) - KP * 1000) >> SH), $sformatf("anti-windup %0d", duty[0]));
    // hold: no change
    hold = 1;
    begin
      duty_t d0;
      d0 = duty[0];
      iref = '{cur_t'(20000), cur_t'(20000)}; iest = '{cur_t'(0), cur_t'(0)};
      repeat (5) begin @(posedge clk); upd <= 1; @(posedge clk); upd <= 0; end
      @(posedge clk);
      chk(duty[0] == d0, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
