// dpwm: N-phase interleaved counter-comparator DPWM with a 2*fsw mode.
//
// A DPWM_BITS-bit counter runs at 2**DPWM_BITS clocks per switching period
// (128 MHz clock for 500 kHz with the 8-bit resolution of the prototype).
// Phase k is shifted by k/N of a period; its gate is high while its shifted
// count is below its duty code, so d = duty/2**DPWM_BITS. Duty codes are
// latched at the start of each phase's own period.
// With hf_mode[k] set the period of phase k is halved (2*fsw, used by the
// dual-frequency offset calibration of the estimator) while its duty code
// keeps its meaning.
// force_en overrides all gates with force_val (transient-mode dead-beat and
// charge-balance pulses); en low turns every gate off (protection).
// Strobes: cycle_tick once per nominal switching period (the control update
// n, unaffected by hf_mode), vout_smp at 8*fsw and vin_smp at fsw/8, the
// ADC sampling rates of the prototype.
// The counter-comparator structure, the phase shift and the strobe timing
// are this design's choices; the document gives the resolution and rates.
module dpwm
  import cpm_pkg::*;
#(
  parameter int unsigned N    = N_PHASES,
  parameter int unsigned BITS = DPWM_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [N-1:0]         hf_mode,
  input  logic [BITS-1:0]      duty [N],
  input  logic                 force_en,
  input  logic                 force_val,
  output logic [N-1:0]         gate,
  output logic                 cycle_tick,
  output logic                 vout_smp,
  output logic                 vin_smp
);
  logic [BITS-1:0] cnt;
  logic [2:0]      per_cnt;
  logic [BITS-1:0] dl [N];
  logic [N-1:0]    pwm;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      per_cnt <= '0;
    end else begin
      cnt <= cnt + 1'b1;
      if (cnt == '1) per_cnt <= per_cnt + 1'b1;
    end
  end

  always_comb begin
    cycle_tick = (cnt == '0);
    vout_smp   = (cnt[BITS-4:0] == '0);
    vin_smp    = (cnt == '0) && (per_cnt == '0);
  end

  for (genvar k = 0; k < N; k++) begin : g_ph
    localparam logic [BITS-1:0] OFS = BITS'((k * (1 << BITS)) / N);
    logic [BITS-1:0] pc, pcmp;
    logic [BITS:0]   h2;
    always_comb begin
      pc   = cnt - OFS;
      // in 2*fsw mode the shifted count sweeps twice per period
      pcmp = hf_mode[k] ? {pc[BITS-2:0], 1'b0} : pc;
      // 2*fsw on-times: ceil(d/2) in the first half, floor(d/2) in the
      // second, so the on-time per nominal period stays equal to d
      h2   = pc[BITS-1] ? {1'b0, dl[k][BITS-1:1], 1'b0}
                        : ({1'b0, dl[k]} + 1'b1) & ~(BITS+1)'(1);
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) dl[k] <= '0;
      else if (pcmp == '0) dl[k] <= duty[k];
    end
    always_comb pwm[k] = hf_mode[k] ? ({1'b0, pcmp} < h2) : (pcmp < dl[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) gate <= '0;
    else if (!en) gate <= '0;
    else if (force_en) gate <= {N{force_val}};
    else gate <= pwm;
  end
endmodule
