// tb_cpm_controller: end-to-end test of the controller at its default
// parameters, closed around a behavioural two-phase 12 V to 1.792 V buck
// converter (1.0/1.1 uH, 10/14 mOhm, 200 uF, 4 A test sink, 500 kHz).
// Sequence: start-up and regulation; self-calibration of both phases
// (gain, time constant, L and C, dual-frequency offset); the resulting
// estimates against the plant; loss-equalizing current sharing; light-to-
// heavy and heavy-to-light load steps in transient mode; over-temperature
// shutdown after the plant's resistance rises and a new calibration;
// overcurrent shutdown. Every mechanism is counted and a failure is counted
// for any that never happened.
// The converter values follow the two-phase prototype; the load steps, the
// heating profile, the tolerances and the check sequence are this test's own
// choices. Tolerances: G 10%, tau/L/C/Leq 40%, estimates 6%, sharing 8%,
// deviation 0.25 V and recovery within 100 periods after a load step.
module tb_cpm_controller;
  import cpm_pkg::*;
  localparam real TCLK = 7.8125e-9;
  logic clk = 0, rst_n = 0, cal = 0, fclr = 0;
  vout_t vout_code, vref = 8'd112;
  vin_t vin_code;
  logic vsmp, ismp, sink, cal_busy, cal_done, share_busy, tact, ot, oc, sd;
  logic [1:0] hf, hf_d = '0;
  logic [1:0] gate;
  cur_t iest [2], iref [2], itot;
  req_t req [2];
  ind_t ind [2], leq;
  cap_t cap;
  tau_t tau [2];
  logic [16:0] weight [2];
  logic [7:0] temp [2];
  logic [5:0] evt;
  real iload = 20.0, vout;
  real lval [2] = '{1.0e-6, 1.1e-6};
  real rval [2] = '{0.010, 0.014};
  real il [2];
  int checks = 0, failures = 0;
  longint clk_n = 0;
  int n_evt [6] = '{0, 0, 0, 0, 0, 0};
  int n_hf = 0, n_sink = 0, n_share = 0, n_sd = 0, gate_in_sd = 0;
  bit cal_ph_seen [2] = '{0, 0};

  cpm_controller dut (
    .clk, .rst_n, .vout_code, .vin_code, .vref, .vout_smp(vsmp), .vin_smp(ismp), .gate,
    .sink_en(sink), .cal_start(cal), .fault_clear(fclr), .iest, .iref, .itot, .req, .ind, .leq,
    .cap, .tau, .weight, .temp, .cal_busy, .cal_done, .share_busy, .hf_mode(hf),
    .transient_active(tact), .ot_flag(ot), .oc_flag(oc), .shutdown(sd), .evt);

  buck_plant #(.N(2)) plant (.clk, .gate, .sink_en(sink), .iload, .lval, .rval,
                             .vout_code, .vin_code, .vout, .il);

  always #1 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  function automatic bit near(input real a, input real b, input real rel);
    real d;
    d = (a > b) ? a - b : b - a;
    return d <= rel * ((b < 0) ? -b : b);
  endfunction

  // watchdog: 20 M clocks (156 ms of converter time)
  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // period averages of the plant's inductor currents
  real iavg [2], iacc [2];
  logic sink_d = 0, sh_d = 0, sd_d = 0;
  always @(posedge clk) begin
    clk_n <= clk_n + 1;
    for (int k = 0; k < 2; k++) iacc[k] += il[k];
    if (clk_n % 256 == 0) begin
      for (int k = 0; k < 2; k++) begin iavg[k] = iacc[k] / 256.0; iacc[k] = 0.0; end
    end
    for (int k = 0; k < 6; k++) if (evt[k]) n_evt[k]++;
    sink_d <= sink; hf_d <= hf; sh_d <= share_busy; sd_d <= sd;
    if (sink && !sink_d) begin n_sink++; cal_ph_seen[int'(dut.cal_phase)] = 1; end
    if (hf != '0 && hf_d == '0) n_hf++;
    if (share_busy && !sh_d) n_share++;
    if (sd && !sd_d) n_sd++;
    if (sd && sd_d && gate != '0) gate_in_sd++;
  end

  task automatic periods(input int n);
    repeat (n * 256) @(posedge clk);
  endtask

  task automatic show(input string tag);
    $display("INFO %s t=%0d us vout=%f il=%f,%f iest=%0d,%0d iref=%0d,%0d itot=%0d",
             tag, clk_n / 128, vout, iavg[0], iavg[1], iest[0], iest[1], iref[0], iref[1], itot);
  endtask

  // worst output deviation and last time outside +-2 codes over n periods
  task automatic watch(input int n, output real dev, output int last_out);
    dev = 0.0; last_out = 0;
    for (int p = 0; p < n; p++) begin
      for (int c = 0; c < 256; c++) begin
        real d;
        @(posedge clk);
        d = (vout > 1.792) ? vout - 1.792 : 1.792 - vout;
        if (d > dev) dev = d;
        if (d > 0.032) last_out = p;
      end
    end
  endtask

  // reset the controller, put the plant back at the operating point with
  // the given phase resistances and load, and let it settle
  task automatic restart(input real ra, input real rb, input real ild);
    rst_n = 0;
    iload = ild; rval = '{ra, rb}; plant.esr = 3e-3;
    plant.vc = 1.792; plant.il = '{ild / 2.0, ild / 2.0};
    repeat (5) @(posedge clk); rst_n = 1;
    periods(600); show("restart");
  endtask

  task automatic calibrate();
    @(posedge clk); cal <= 1; @(posedge clk); cal <= 0;
    periods(2);
    while (cal_busy) periods(10);
  endtask

  initial begin
    real g_true, tau_true, l_true, c_true, dev, r0, r1, lr0, lr1;
    int last, ev0;
    iacc = '{0.0, 0.0}; iavg = '{0.0, 0.0};
    repeat (5) @(posedge clk); rst_n = 1;

    // ---- start-up and regulation with the initial (untuned) estimator ----
    periods(400); show("startup");
    chk(near(vout, 1.792, 0.03), "regulation after start-up");
    chk(!sd && !ot && !oc, "no protection at start-up");

    // ---- self-calibration of both phases ----
    calibrate();
    $display("INFO G=%0d,%0d req=%0d,%0d tau=%0d,%0d L=%0d,%0d leq=%0d C=%0d ioff=%0d,%0d w=%0d,%0d temp=%0d,%0d",
      dut.prm[0].g, dut.prm[1].g, req[0], req[1], tau[0], tau[1], ind[0], ind[1], leq, cap,
      dut.prm[0].ioff, dut.prm[1].ioff, weight[0], weight[1], temp[0], temp[1]);
    chk(cal_ph_seen[0] && cal_ph_seen[1], "both phases calibrated");
    for (int k = 0; k < 2; k++) begin
      g_true   = 0.004 / rval[k] * 1000.0 * 1024.0;
      tau_true = lval[k] / rval[k] / 2.0e-6 * 256.0;
      l_true   = lval[k] / (4.0 * TCLK) * 256.0;
      chk(near(real'(dut.prm[k].g), g_true, 0.10), $sformatf("G[%0d]=%0d vs %f", k, dut.prm[k].g, g_true));
      chk(near(real'(tau[k]), tau_true, 0.40), $sformatf("tau[%0d]=%0d vs %f", k, tau[k], tau_true));
      chk(near(real'(ind[k]), l_true, 0.40), $sformatf("L[%0d]=%0d vs %f", k, ind[k], l_true));
      chk(dut.prm[k].ioff != '0, $sformatf("offset[%0d] identified", k));
    end
    c_true = 200e-6 * 0.016 / (1.0e-3 * 32.0 * TCLK) * 256.0;
    chk(near(real'(cap), c_true, 0.40), $sformatf("C=%0d vs %f", cap, c_true));
    l_true = 1.0 / (1.0 / (lval[0] / (4.0 * TCLK)) + 1.0 / (lval[1] / (4.0 * TCLK))) * 256.0;
    chk(near(real'(leq), l_true, 0.40), $sformatf("Leq=%0d vs %f", leq, l_true));

    // ---- estimates and loss-equalizing sharing after calibration ----
    periods(400); show("tuned");
    chk(near(vout, 1.792, 0.03), "regulation after calibration");
    for (int k = 0; k < 2; k++)
      chk(near(real'(iest[k]) / 1000.0, iavg[k], 0.06),
          $sformatf("estimate %0d: %0d mA vs %f A", k, iest[k], iavg[k]));
    r0 = iavg[0]; r1 = iavg[1];
    chk(near(r0 / r1, $sqrt(rval[1] / rval[0]), 0.08), $sformatf("current ratio %f", r0 / r1));
    lr0 = rval[0] * r0 * r0; lr1 = rval[1] * r1 * r1;
    chk(near(lr0, lr1, 0.15), $sformatf("conduction losses %f W / %f W", lr0, lr1));
    chk(near(r0 + r1, 20.0, 0.05), "phase currents add up to the load");

    // ---- load steps in transient mode ----
    // eq. (22) takes the output capacitor as ideal, so the steps are applied
    // with the ESR removed (a 3 mOhm ESR would add 4 codes to de)
    plant.esr = 0.0;
    periods(50);
    ev0 = n_evt[4];
    iload = 45.0;
    watch(300, dev, last);
    show("step up");
    $display("INFO step up: max deviation %f V, last outside +-32 mV at period %0d", dev, last);
    chk(n_evt[4] > ev0, "light-to-heavy transient detected");
    chk(dev < 0.25, "deviation after step up");
    chk(last < 100, "recovery after step up");
    chk(near(vout, 1.792, 0.03), "regulation at 45 A");
    chk(near(iavg[0] + iavg[1], 45.0, 0.05), "phase currents carry 45 A");
    ev0 = n_evt[5];
    iload = 20.0;
    watch(300, dev, last);
    show("step down");
    $display("INFO step down: max deviation %f V, last outside +-32 mV at period %0d", dev, last);
    chk(n_evt[5] > ev0, "heavy-to-light transient detected");
    chk(dev < 0.25, "deviation after step down");
    chk(last < 100, "recovery after step down");
    chk(near(vout, 1.792, 0.03), "regulation back at 20 A");

    // ---- overcurrent: 90 A load, more than 40 A per phase ----
    restart(0.010, 0.014, 20.0);
    chk(!sd && near(vout, 1.792, 0.03), "regulation after restart");
    iload = 90.0;
    periods(300); show("overload");
    chk(oc && sd, "overcurrent shutdown");
    chk(gate_in_sd == 0, "gates off during shutdown");
    @(posedge clk); fclr <= 1; @(posedge clk); fclr <= 0;
    @(posedge clk);
    chk(!oc && !sd, "fault clear releases the shutdown");

    // ---- over-temperature: the stage heats up, recalibrated at each step ----
    restart(0.010, 0.014, 20.0);
    chk(!sd, "converter runs after restart");
    calibrate();
    // 30/31 mOhm is about 60/70 degC on the default table
    for (int h = 1; h <= 3; h++) begin
      rval = '{0.010 + 0.020 * h / 3.0, 0.014 + 0.017 * h / 3.0};
      periods(100);
      calibrate();
      periods(20);
      $display("INFO heating %0d: req=%0d,%0d tau=%0d,%0d temp=%0d,%0d ot=%0d sd=%0d", h, req[0], req[1], tau[0], tau[1],
               temp[0], temp[1], ot, sd);
    end
    chk(!ot && !sd, "no over-temperature when warm");
    chk(temp[0] >= 50 && temp[0] <= 72, $sformatf("temperature %0d degC", temp[0]));
    chk(temp[1] >= 58 && temp[1] <= 80, $sformatf("temperature %0d degC", temp[1]));
    // hot: 36/37 mOhm, above the 34 mOhm (100 degC) limit
    rval = '{0.036, 0.037};
    periods(100);
    calibrate();
    periods(20);
    $display("INFO hot: req=%0d,%0d ot=%0d sd=%0d", req[0], req[1], ot, sd);
    chk(ot && sd, "over-temperature shutdown");
    chk(gate_in_sd == 0, "gates off during shutdown");

    // ---- every mechanism must have happened ----
    chk(n_evt[1] >= 2, "gain calibration (eq. 5)");
    chk(n_evt[0] >= 2, "peak measurement");
    chk(n_evt[2] >= 2, "time-constant calibration (eq. 6)");
    chk(n_evt[3] >= 2, "dual-frequency offset calibration");
    chk(n_hf >= 2, "2*fsw operation");
    chk(n_sink >= 2, "test current sink");
    chk(n_share >= 1, "current-sharing weights");
    chk(n_evt[4] >= 1, "transient up");
    chk(n_evt[5] >= 1, "transient down");
    chk(n_sd >= 2, "protection shutdowns");
    $display("INFO counts: peak=%0d gain=%0d tau=%0d off=%0d up=%0d down=%0d hf=%0d sink=%0d share=%0d sd=%0d",
      n_evt[0], n_evt[1], n_evt[2], n_evt[3], n_evt[4], n_evt[5], n_hf, n_sink, n_share, n_sd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
