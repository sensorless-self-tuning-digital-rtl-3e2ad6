// tb_estimator_tuning: the self-tuning sequence against a scripted
// converter. Each phase's estimate is modelled as
//   iest = (G/G_true)*(I0 + sink*ITEST) + offset*(1 or 2 at 2*fsw) - ioff,
// with an extra undershoot U while the output voltage rises to its peak
// after the sink turns off. The output voltage follows a fixed profile
// with a plateau. Expected results are worked out in floating point from
// the document's equations: G = G_true (eq. (5)), Req = 1/G, eq. (6) in its
// original form for tau, c2 = 1/(1+2*tau), L = tau*Req (eq. (8)),
// C = ITEST*dTpeak/(2*dVpeak) (eq. (11)), ioff = offset (eq. (20)) and
// Leq = L1*L2/(L1+L2). Also checks the freezing and the phase order.
module tb_estimator_tuning;
  import cpm_pkg::*;
  localparam int ITEST = 4000, U = 800;
  localparam real TAU0 = 50.0;
  logic clk = 0, rst_n = 0, cal = 0, tick = 0, vsmp = 0;
  err_t e = '0;
  vout_t vout;
  cur_t iest [2];
  est_param_t prm [2];
  tau_t tau [2];
  req_t req [2];
  ind_t ind [2], leq;
  cap_t cap;
  logic rv, sink, frz, busy, cdone;
  logic [1:0] hf;
  logic [0:0] cph;
  logic [3:0] evt;
  int checks = 0, failures = 0;
  int clk_n = 0, m = 0;
  logic sink_d = 0, after_off = 0;
  real gtrue [2] = '{320.0, 250.0};
  int  ofs [2] = '{300, -200};
  int  i0 [2] = '{6000, 5000};
  int  n_evt [4] = '{0, 0, 0, 0};
  bit  frz_ok = 1;

  estimator_tuning #(.N(2), .ITEST(ITEST), .T_AB(64), .T_SET(32)) dut (
    .clk, .rst_n, .cal_start(cal), .abort(1'b0), .tick, .vsmp, .e, .vout, .iest, .prm, .tau, .req, .ind, .leq,
    .cap, .req_valid(rv), .sink_en(sink), .hf_mode(hf), .freeze(frz), .cal_phase(cph), .busy,
    .cal_done(cdone), .evt);
  always #1 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  function automatic bit near(input real a, input real b, input real rel);
    real d;
    d = (a > b) ? a - b : b - a;
    return d <= rel * ((b < 0) ? -b : b) + 1.0;
  endfunction

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // vout profile after the sink turns off (m = samples since turn-off):
  // 112 until m=3, 113 until m=10, 114 (peak plateau) for m=11..20, 113 for
  // m=21..24 (within the peak hysteresis), then 112
  function automatic vout_t prof(input int mm);
    if (mm <= 3) return 8'd112;
    if (mm <= 10) return 8'd113;
    if (mm <= 20) return 8'd114;
    if (mm <= 24) return 8'd113;
    return 8'd112;
  endfunction

  always @(posedge clk) begin
    clk_n <= clk_n + 1;
    tick <= ((clk_n % 256) == 255);
    vsmp <= ((clk_n % 32) == 31);
    sink_d <= sink;
    if (sink && !sink_d) after_off <= 0;
    if (sink_d && !sink) begin m <= 0; after_off <= 1; end
    else if (vsmp) m <= m + 1;
    for (int k = 0; k < 2; k++) begin
      real r;
      int extra;
      extra = (!sink && m < 22 && int'(cph) == k && busy && after_off) ? U : 0;
      r = real'(prm[k].g) / 1024.0 / gtrue[k] *
          real'(i0[k] + ((sink && int'(cph) == k) ? ITEST : 0) - extra);
      iest[k] <= cur_t'($rtoi(r) + ofs[k] * (hf[k] ? 2 : 1) - int'(prm[k].ioff));
    end
    for (int k = 0; k < 4; k++) if (rst_n && evt[k]) n_evt[k]++;
    if (rst_n && sink && !frz) frz_ok = 0;
  end
  assign vout = after_off ? prof(m) : 8'd112;

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (600) @(posedge clk);
    cal = 1; @(posedge clk); cal = 0;
    @(posedge clk iff cdone);
    repeat (3) @(posedge clk);
    begin
      real gexp, reqexp, dts, tauexp, c2exp, lexp [2], cexp;
      // dTpeak: middle of samples 11..20, in samples of Ts/8
      dts = 15.0;
      for (int k = 0; k < 2; k++) begin
        gexp = gtrue[k];
        chk(near(real'(prm[k].g) / 1024.0, gexp, 0.003), $sformatf("G%0d %f exp %f", k, real'(prm[k].g) / 1024.0, gexp));
        reqexp = 1.0 / gexp * 1048576.0;
        chk(near(real'(req[k]), reqexp, 0.004), $sformatf("Req%0d %0d exp %f", k, req[k], reqexp));
        tauexp = TAU0 * (1.0 + (real'(U) / real'(ITEST)) / (1.0 - (dts / 8.0) / (2.0 * TAU0)));
        chk(near(real'(tau[k]) / 256.0, tauexp, 0.01), $sformatf("tau%0d %f exp %f", k, real'(tau[k]) / 256.0, tauexp));
        c2exp = 1.0 / (1.0 + 2.0 * real'(tau[k]) / 256.0) * 65536.0;
        chk(near(real'(prm[k].c2), c2exp, 0.002), $sformatf("c2%0d %0d exp %f", k, prm[k].c2, c2exp));
        // L = tau*Ts*Req in units of (clock * 4 mV / mA) / 256
        lexp[k] = (real'(tau[k]) / 256.0) * 256.0 * (real'(req[k]) / 1048576.0) * 256.0;
        chk(near(real'(ind[k]), lexp[k], 0.005), $sformatf("L%0d %0d exp %f", k, ind[k], lexp[k]));
        chk(near(real'(prm[k].ioff), real'(ofs[k]), 0.0), $sformatf("ioff%0d %0d exp %0d", k, prm[k].ioff, ofs[k]));
      end
      cexp = real'(ITEST) * dts / (2.0 * 2.0) * 256.0;
      chk(near(real'(cap), cexp, 0.07), $sformatf("C %0d exp %f", cap, cexp));
      chk(near(real'(leq), lexp[0] * lexp[1] / (lexp[0] + lexp[1]), 0.005), $sformatf("Leq %0d", leq));
      chk(n_evt[1] == 2 && n_evt[2] == 2 && n_evt[3] == 2 && n_evt[0] == 2,
          $sformatf("steps %0d %0d %0d %0d", n_evt[0], n_evt[1], n_evt[2], n_evt[3]));
      chk(frz_ok && !frz && !busy && !sink && hf == '0, "freeze and release");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
