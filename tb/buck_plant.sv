// buck_plant: behavioural model (not synthesizable) of an N-phase
// synchronous buck power stage with its test current sink and two ADCs,
// for closed-loop testbenches of the controller.
//
// Integrated once per controller clock (Euler, dt = TCLK):
//   L_k diL_k/dt = vsw_k - vout - R_k*iL_k,  vsw_k = vin while the switch is on
//   C dvc/dt     = icap = sum(iL_k) - iload - sink_en*ISINK,
//   vout         = vc + esr*icap  (the capacitor ESR gives the output ripple;
//                  esr starts at ESR and may be changed at run time).
// Each switch turn-off is delayed by DLY clocks, so the effective duty ratio
// is larger than the commanded one (the offset the dual-frequency
// calibration removes). R_k stands for all conduction losses of a phase.
// Outputs the ADC codes: vout with a 16 mV step and NOISE LSB of uniform
// noise (as a real converter's noise and ripple dither the code), vin with a
// 4 mV step.
// The power-stage values are those of the two-phase prototype the controller
// was designed for; the delay, ESR and noise model are this design's choice.
module buck_plant #(
  parameter int  N     = 2,
  parameter real TCLK  = 7.8125e-9,
  parameter real VIN   = 12.0,
  parameter real COUT  = 200e-6,
  parameter real ISINK = 4.0,
  parameter int  DLY   = 1,
  parameter real ESR   = 3e-3,
  parameter real NOISE = 0.0
) (
  input  logic             clk,
  input  logic [N-1:0]     gate,
  input  logic             sink_en,
  input  real              iload,
  input  real              lval [N],
  input  real              rval [N],
  output logic [7:0]       vout_code,
  output logic [11:0]      vin_code,
  output real              vout,
  output real              il [N]
);
  int offcnt [N];
  real vo_n, vc;
  real esr = ESR;   // may be changed by the testbench

  initial begin
    vout = 1.792;
    vc   = 1.792;
    for (int k = 0; k < N; k++) begin il[k] = 0.0; offcnt[k] = 0; end
  end

  always @(posedge clk) begin
    real isum;
    isum = 0.0;
    for (int k = 0; k < N; k++) begin
      real vsw;
      vsw = (gate[k] || offcnt[k] > 0) ? VIN : 0.0;
      if (gate[k]) offcnt[k] = DLY;
      else if (offcnt[k] > 0) offcnt[k] = offcnt[k] - 1;
      il[k] = il[k] + (vsw - vout - rval[k] * il[k]) * TCLK / lval[k];
      isum += il[k];
    end
    vo_n = vc + (isum - iload - (sink_en ? ISINK : 0.0)) * TCLK / COUT;
    vc   = (vo_n < 0.0) ? 0.0 : vo_n;
    vout = vc + esr * (isum - iload - (sink_en ? ISINK : 0.0));
    if (vout < 0.0) vout = 0.0;
  end

  // output ADC with NOISE LSB (peak-to-peak, uniform) of input noise
  always @(posedge clk) begin
    int vq;
    real nz;
    nz = NOISE * (real'($urandom % 1024) / 1024.0 - 0.5);
    vq = $rtoi(vout / 0.016 + 0.5 + nz);
    vout_code <= (vq > 255) ? 8'd255 : (vq < 0) ? 8'd0 : 8'(vq);
    vin_code  <= 12'($rtoi(VIN / 0.004 + 0.5));
  end
endmodule
