// cpm_controller: sensorless self-tuning average current-programmed mode
// controller for an N-phase synchronous buck converter.
//
// Signal flow, once per switching period (cycle_tick of the DPWM):
//   ADC codes -> current_estimator (average inductor current of every phase
//   from d*vin - vout, no current sensor) -> current loops
//   (current_compensator) -> DPWM duty codes.
// The voltage loop (dual_mode_compensator) turns the output error into the
// total current itot; current_sharing splits it so that the phases' losses
// Req_k*I_k^2 are equal. estimator_tuning calibrates the estimator with the
// test current sink (gain/Req, time constant, L, C, offset with the 2*fsw
// mode), phase by phase, on cal_start; its L and C feed the transient mode,
// its Req the current sharing and thermal_monitor (temperature, protection).
// The input ADC is read at fsw/8 and the output ADC at 8*fsw; the block
// presents conversion strobes and takes the codes one clock later or any
// time before the next strobe. Clock: 2**DPWM_BITS per switching period
// (128 MHz for 500 kHz). The analog parts (ADCs, sink, power stage, gate
// drivers) are outside; the block only drives their digital signals.
// The block partition, the ADC rates, the 8-bit DPWM, the test current and the
// calibration order follow the document. Two details are this design's own:
// the estimator gets the sum of the period's eight output samples (the 16 mV
// step is coarse next to Req*ITEST, and the ripple dithers it), and after a
// period with forced transient pulses each phase's measured on-time corrects
// the duty the estimator uses, since the duty code did not describe them.
// Known limit: with the estimated tau low, the estimate overshoots after the
// forced pulses and the output takes longer to settle than the two-cycle
// response the document aims at.
module cpm_controller
  import cpm_pkg::*;
#(
  parameter int unsigned N     = N_PHASES,
  parameter int          ITEST = 4000
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // ADC codes and reference
  input  vout_t                 vout_code,   // 16 mV per LSB
  input  vin_t                  vin_code,    // 4 mV per LSB
  input  vout_t                 vref,
  output logic                  vout_smp,    // output ADC conversion strobe
  output logic                  vin_smp,     // input ADC conversion strobe
  // power stage
  output logic [N-1:0]          gate,        // main switch of each phase
  output logic                  sink_en,     // test current sink
  // commands
  input  logic                  cal_start,
  input  logic                  fault_clear,
  // status
  output cur_t                  iest [N],
  output cur_t                  iref [N],
  output cur_t                  itot,
  output req_t                  req [N],
  output ind_t                  ind [N],
  output ind_t                  leq,
  output cap_t                  cap,
  output tau_t                  tau [N],     // filter time constants
  output logic [16:0]           weight [N],  // current-sharing weights, 1.0 = 2**16
  output logic [7:0]            temp [N],
  output logic                  cal_busy,
  output logic                  cal_done,
  output logic                  share_busy,
  output logic [N-1:0]          hf_mode,
  output logic                  transient_active,
  output logic                  ot_flag,
  output logic                  oc_flag,
  output logic                  shutdown,
  output logic [5:0]            evt        // {trans down, trans up, offset, tau, gain, peak}
);
  localparam int unsigned KW = (N > 1) ? $clog2(N) : 1;

  logic        cycle_tick, est_done, force_en, force_val, freeze, req_valid;
  logic        ev_up, ev_dn;
  logic [3:0]  tevt;
  logic [KW-1:0] cal_phase;
  vout_t       vout_r;
  logic [VOUT_W+2:0] vacc, vout_sum;
  logic [DPWM_BITS:0] on_cnt [N];
  duty_t       d_meas [N], d_est [N];
  logic        forced, use_meas;
  vin_t        vin_r;
  duty_t       duty [N];
  est_param_t  prm [N];
  err_t        e;

  // ADC registers: output ADC at 8*fsw, input ADC at fsw/8. The eight
  // output samples of a switching period are also summed for the estimator;
  // the sample taken with cycle_tick closes the sum.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vout_r   <= '0;
      vin_r    <= '0;
      vacc     <= '0;
      vout_sum <= '0;
    end else begin
      if (vout_smp) vout_r <= vout_code;
      if (vin_smp)  vin_r  <= vin_code;
      if (cycle_tick) begin
        vout_sum <= vacc + (VOUT_W+3)'(vout_code);
        vacc     <= '0;
      end else if (vout_smp) begin
        vacc <= vacc + (VOUT_W+3)'(vout_code);
      end
    end
  end

  // Gate on-time of every phase over the last switching period. The
  // estimator normally takes the duty code of the period that starts. After
  // a period in which the transient mode forced the switches, the code it
  // was given for that period is replaced by the measured on-time: the next
  // code is corrected by (measured - used), so no volt-second is lost or
  // counted twice.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin on_cnt[i] <= '0; d_meas[i] <= '0; end
      forced   <= 1'b0;
      use_meas <= 1'b0;
    end else begin
      if (cycle_tick) begin
        use_meas <= forced || force_en;
        forced   <= force_en;
      end else if (force_en) begin
        forced <= 1'b1;
      end
      for (int i = 0; i < N; i++) begin
        if (cycle_tick) begin
          d_meas[i] <= (on_cnt[i] > (DPWM_BITS+1)'(255)) ? 8'd255 : duty_t'(on_cnt[i]);
          on_cnt[i] <= (DPWM_BITS+1)'(gate[i]);
        end else begin
          on_cnt[i] <= on_cnt[i] + (DPWM_BITS+1)'(gate[i]);
        end
      end
    end
  end

  // duty given to the estimator for the period that just ended (d_used)
  duty_t d_used [N];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i < N; i++) d_used[i] <= '0;
    else if (est_done) d_used <= d_est;
  end
  always_comb
    for (int i = 0; i < N; i++) begin
      logic signed [DPWM_BITS+2:0] dc;
      dc = (DPWM_BITS+3)'(duty[i]) + (DPWM_BITS+3)'(d_meas[i]) - (DPWM_BITS+3)'(d_used[i]);
      if (!use_meas)  d_est[i] = duty[i];
      else if (dc < 0) d_est[i] = '0;
      else if (dc > (DPWM_BITS+3)'(255)) d_est[i] = '1;
      else d_est[i] = duty_t'(dc);
    end

  // total estimated current, the preset of the voltage loop after a transient
  cur_t isum;
  always_comb begin
    logic signed [I_W+7:0] acc;
    acc = '0;
    for (int i = 0; i < N; i++) acc += (I_W+8)'(iest[i]);
    isum = sat_cur(48'(acc));
  end

  dpwm #(.N(N)) u_dpwm (
    .clk, .rst_n, .en(!shutdown), .hf_mode, .duty, .force_en, .force_val,
    .gate, .cycle_tick, .vout_smp, .vin_smp);

  current_estimator #(.N(N)) u_est (
    .clk, .rst_n, .start(cycle_tick), .duty(d_est), .vin(vin_r), .vout_sum,
    .prm, .iest, .done(est_done));

  // The voltage loop is preset when the transient mode ends, but the phase
  // references follow one update later; the current loops stay held for
  // that update so they never see the old references against the new
  // currents.
  logic hold_ext;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                hold_ext <= 1'b0;
    else if (transient_active) hold_ext <= 1'b1;
    else if (est_done)         hold_ext <= 1'b0;
  end

  current_compensator #(.N(N)) u_icomp (
    .clk, .rst_n, .upd(est_done), .hold(transient_active || hold_ext), .iref, .iest, .duty);

  dual_mode_compensator u_vcomp (
    .clk, .rst_n, .upd(est_done), .vsmp(vout_smp),
    .en_transient(!cal_busy && cap != '0 && leq != '0),
    .vref, .vout(vout_r), .vin(vin_r), .cap, .leq, .isum, .e, .itot,
    .active(transient_active), .force_en, .force_val, .evt_up(ev_up), .evt_down(ev_dn));

  current_sharing #(.N(N)) u_share (
    .clk, .rst_n, .upd(est_done), .itot, .req, .req_valid, .freeze, .cal_phase,
    .iref, .weight, .busy(share_busy));

  estimator_tuning #(.N(N), .ITEST(ITEST)) u_tune (
    .clk, .rst_n, .cal_start, .abort(shutdown), .tick(est_done), .vsmp(vout_smp), .e, .vout(vout_r),
    .iest, .prm, .tau, .req, .ind, .leq, .cap, .req_valid, .sink_en, .hf_mode,
    .freeze, .cal_phase, .busy(cal_busy), .cal_done, .evt(tevt));

  thermal_monitor #(.N(N)) u_therm (
    .clk, .rst_n, .upd(est_done), .req_valid, .clear(fault_clear), .req, .iest,
    .temp, .ot_flag, .oc_flag, .shutdown);

  assign evt = {ev_dn, ev_up, tevt};
endmodule
