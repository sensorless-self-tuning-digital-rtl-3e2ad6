// dual_mode_compensator: the voltage loop of the controller, a PI
// compensator for steady state and a transient-mode controller that takes
// over on large load steps.
//
// e = Vref - vout (16 mV codes) is formed from the output ADC code on every
// output sample. In steady state pi_compensator turns e[n] into the total
// current reference itot once per switching period (upd). When the
// transient controller detects a load step it drives the switches directly
// (force_en/force_val to the DPWM), raises active (which holds the PI and
// the current loops) and, when done, presets the PI with the sum of the
// phase current estimates (the new operating point). en_transient disables the transient mode (during calibration the
// test current sink makes steps of its own). The split into the two modes
// follows the document; the wiring is this design's.
module dual_mode_compensator
  import cpm_pkg::*;
#(
  parameter int KP    = 4096,
  parameter int KI    = 128,
  parameter int SH    = 4,
  parameter int DE_TH = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  upd,
  input  logic  vsmp,
  input  logic  en_transient,
  input  vout_t vref,
  input  vout_t vout,
  input  vin_t  vin,
  input  cap_t  cap,
  input  ind_t  leq,
  input  cur_t  isum,    // sum of the phase current estimates
  output err_t  e,
  output cur_t  itot,
  output logic  active,
  output logic  force_en,
  output logic  force_val,
  output logic  evt_up,
  output logic  evt_down
);
  logic preset;
  cur_t preset_val;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) e <= '0;
    else if (vsmp) e <= err_t'($signed({1'b0, vref}) - $signed({1'b0, vout}));
  end

  pi_compensator #(.KP(KP), .KI(KI), .SH(SH)) u_pi (
    .clk, .rst_n, .upd, .hold(active), .preset, .preset_val, .e, .itot);

  transient_compensator #(.DE_TH(DE_TH)) u_tr (
    .clk, .rst_n, .en(en_transient), .vsmp, .e, .vin, .vout, .cap, .leq,
    .isum, .active, .force_en, .force_val, .preset, .preset_val,
    .evt_up, .evt_down);
endmodule
