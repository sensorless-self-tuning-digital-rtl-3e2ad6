// tb_transient_compensator: load steps seen as jumps of the error slope.
// The dead-beat on/off time and the charge-balance pulse are compared with
// the physical formulas evaluated in floating point for C = 200 uF,
// Leq = 0.5 uH, vin = 12 V, vout = 1.792 V:
//   dI = C*de*16mV/250ns, t_db = Leq*dI/(vin-vout) or Leq*dI/vout,
//   dIp = sqrt(2*C*dv*(vin-vout)*vout/(Leq*vin)), t_on = Leq*dIp/(vin-vout),
//   t_off = Leq*dIp/vout,
// and the PI preset with the estimated current sum isum. Both step directions are tested.
// The dead-beat and charge-balance formulas follow the document; the
// component values and step sizes are this test's choice.
module tb_transient_compensator;
  import cpm_pkg::*;
  localparam real TCLK = 7.8125e-9, CF = 200e-6, LH = 0.5e-6, VIN = 12.0, VO = 1.792;
  logic clk = 0, rst_n = 0, en = 1, vsmp = 0;
  err_t e;
  vin_t vin = 12'd3000;
  vout_t vout = 8'd112;
  cap_t cap;
  ind_t leq;
  cur_t itot = cur_t'(10000), pval;
  logic act, fen, fval, pre, eu, ed;
  int checks = 0, failures = 0;
  int seg_len [4];
  logic seg_val [4];
  int nseg, clk_n, t_pre, t_trig;

  transient_compensator dut (.clk, .rst_n, .en, .vsmp, .e, .vin, .vout, .cap, .leq, .isum(itot),
                             .active(act), .force_en(fen), .force_val(fval), .preset(pre),
                             .preset_val(pval), .evt_up(eu), .evt_down(ed));
  always #1 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // 8*fsw sample strobe and forced-segment recorder
  logic fen_d, fval_d;
  always @(posedge clk) begin
    clk_n <= clk_n + 1;
    vsmp <= ((clk_n % 32) == 31);
    fen_d <= fen; fval_d <= fval;
    if (fen && (!fen_d || fval != fval_d)) begin
      seg_val[nseg] = fval; seg_len[nseg] = 0; nseg = nseg + 1;
    end
    if (fen && nseg > 0) seg_len[nseg - 1] = seg_len[nseg - 1] + 1;
    if (pre) t_pre = clk_n;
    if (eu || ed) t_trig = clk_n;
  end

  function automatic bit near(input real a, input real b, input real tol);
    return (a - b) <= tol && (b - a) <= tol;
  endfunction

  task automatic run_step(input int e0, input int e1, input int e2);
    real di, tdb, dv, dip, ton, toff;
    nseg = 0; t_pre = -1; t_trig = -1;
    e = err_t'(e0);
    repeat (400) @(posedge clk);
    @(posedge clk iff vsmp); e = err_t'(e1);
    // the deviation sampled at the end of cycle 1
    @(posedge clk iff (eu || ed));
    repeat (200) @(posedge clk);
    e = err_t'(e2);
    @(posedge clk iff pre);
    repeat (3) @(posedge clk);
    di  = CF * real'(e1 - e0) * 16e-3 / 250e-9;
    tdb = (di > 0) ? LH * di / (VIN - VO) : -LH * di / VO;
    dv  = real'(e2) * 16e-3;
    dip = $sqrt(2.0 * CF * (dv < 0 ? -dv : dv) * (VIN - VO) * VO / (LH * VIN));
    ton = LH * dip / (VIN - VO);
    toff = LH * dip / VO;
    chk(nseg == 3, $sformatf("segments %0d", nseg));
    chk(seg_val[0] == (di > 0), "dead-beat direction");
    chk(near(real'(seg_len[0]), tdb / TCLK, 3.0 + 0.02 * tdb / TCLK),
        $sformatf("t_db %0d clk exp %f", seg_len[0], tdb / TCLK));
    chk(seg_val[1] == (e2 > 0) && seg_val[2] == (e2 < 0), "charge-balance order");
    chk(near(real'(seg_len[1]), ((e2 > 0) ? ton : toff) / TCLK, 3.0 + 0.03 * ((e2 > 0) ? ton : toff) / TCLK),
        $sformatf("cb seg1 %0d exp %f", seg_len[1], ((e2 > 0) ? ton : toff) / TCLK));
    chk(near(real'(seg_len[2]), ((e2 > 0) ? toff : ton) / TCLK, 3.0 + 0.03 * ((e2 > 0) ? toff : ton) / TCLK),
        $sformatf("cb seg2 %0d exp %f", seg_len[2], ((e2 > 0) ? toff : ton) / TCLK));
    chk(pval == itot, $sformatf("preset %0d exp %0d", pval, itot));
    // cycle 1 (256 clocks, or t_db after the 65-clock division if longer),
    // arithmetic (about 230 clocks) and the recovery pulse
    chk(t_pre - t_trig <= ((66 + int'(tdb / TCLK) > 256) ? 66 + int'(tdb / TCLK) : 256)
                          + 240 + int'((ton + toff) / TCLK) + 8,
        $sformatf("duration %0d clocks", t_pre - t_trig));
    chk(!act, "released");
  endtask

  initial begin
    clk_n = 0; nseg = 0;
    e = '0;
    cap = cap_t'(int'(CF / 15.625e-9) * 256);
    leq = ind_t'(int'(LH / 31.25e-9) * 256);
    repeat (3) @(posedge clk); rst_n = 1;
    run_step(0, 3, 5);      // light to heavy, voltage low at end of cycle 1
    repeat (3000) @(posedge clk);
    run_step(5, 1, -3);     // heavy to light, voltage high
    repeat (3000) @(posedge clk);
    // no trigger below the threshold or when disabled
    begin
      int n0;
      n0 = nseg;
      // one-code steps (|de| = 1) back to zero and up to 1
      while (e != '0) begin
        e = (e < 0) ? e + 1'b1 : e - 1'b1;
        repeat (300) @(posedge clk);
      end
      e = err_t'(1); repeat (300) @(posedge clk);
      en = 0; e = err_t'(8); repeat (300) @(posedge clk);
      chk(nseg == n0 && !act, "no false trigger");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
