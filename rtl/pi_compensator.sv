// pi_compensator: steady-state part of the dual-mode voltage compensator.
//
// Once per switching period (upd) the output-voltage error e[n] (16 mV
// codes, e = Vref - vout) is turned into i_tot[n], the total current all
// phases must carry:
//   acc += KI*e,  itot = (KP*e + acc) >> SH,
// with accumulator and output clamped to -IMAX..IMAX (a synchronous buck
// can also sink current, and the estimator offsets seen during calibration
// can call for a negative total). hold freezes the accumulator and the output;
// preset loads it so that itot restarts at preset_val (the transient-mode
// controller hands the new load current over this way). The document calls
// this block a proportional-integral compensator; the gains and scaling are
// this design's choice.
module pi_compensator
  import cpm_pkg::*;
#(
  parameter int          KP   = 4096,
  parameter int          KI   = 128,
  parameter int unsigned SH   = 4,
  parameter int          IMAX = 100000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic upd,
  input  logic hold,
  input  logic preset,
  input  cur_t preset_val,
  input  err_t e,
  output cur_t itot
);
  localparam logic signed [39:0] ACC_MAX = 40'(IMAX) <<< SH;
  logic signed [39:0] acc, acc_n, sum;

  always_comb begin
    acc_n = acc + 40'(KI) * 40'(e);
    if (acc_n < -ACC_MAX) acc_n = -ACC_MAX;
    if (acc_n > ACC_MAX)  acc_n = ACC_MAX;
    sum = (40'(KP) * 40'(e) + acc) >>> SH;
    if (sum < -40'(IMAX))   sum = -40'(IMAX);
    if (sum > 40'(IMAX))    sum = 40'(IMAX);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      itot <= '0;
    end else if (preset) begin
      acc  <= 40'(preset_val) <<< SH;
      itot <= preset_val;
    end else if (upd && !hold) begin
      acc  <= acc_n;
      itot <= cur_t'(sum);
    end
  end
endmodule
