// current_compensator: the N per-phase current loops of the average CPM
// controller.
//
// Each phase compares its reference iref[k] with the estimated average
// inductor current iest[k] and a PI law turns the difference into the duty
// code of that phase:
//   acc[k] += KI*di,  duty[k] = clamp((KP*di + acc[k]) >> SH, 0, DMAX).
// The accumulator is clamped to the duty range (anti-windup). Updates happen
// on upd (one pulse per switching period, after the estimates are ready);
// hold freezes the loops, accumulators and duty codes alike (used while the transient-mode
// controller drives the switches). The document names these loops but does
// not give their law or gains: PI with power-of-two scaling is this design's
// choice, with gains set for a 12 V input, 1 uH phase and 8-bit DPWM.
module current_compensator
  import cpm_pkg::*;
#(
  parameter int unsigned N    = N_PHASES,
  parameter int          KP   = 20,
  parameter int          KI   = 2,
  parameter int unsigned SH   = 12,
  parameter int unsigned DMAX = 240
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  upd,
  input  logic  hold,
  input  cur_t  iref [N],
  input  cur_t  iest [N],
  output duty_t duty [N]
);
  localparam logic signed [39:0] ACC_MAX = 40'(DMAX) <<< SH;

  logic signed [39:0] acc [N];

  for (genvar k = 0; k < N; k++) begin : g_ph
    logic signed [39:0] di, acc_n, sum;
    always_comb begin
      di    = 40'(iref[k]) - 40'(iest[k]);
      acc_n = acc[k] + 40'(KI) * di;
      if (acc_n < 0)       acc_n = '0;
      if (acc_n > ACC_MAX) acc_n = ACC_MAX;
      sum = (40'(KP) * di + acc[k]) >>> SH;
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        acc[k]  <= '0;
        duty[k] <= '0;
      end else if (upd && !hold) begin
        acc[k] <= acc_n;
        if (sum < 0)                 duty[k] <= '0;
        else if (sum > 40'(DMAX))    duty[k] <= duty_t'(DMAX);
        else                         duty[k] <= duty_t'(sum);
      end
    end
  end
endmodule
