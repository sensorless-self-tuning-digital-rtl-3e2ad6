// cpm_pkg: number formats shared by the sensorless average current-programmed
// mode (CPM) controller.
//
// All blocks work on integer codes with fixed units so that the estimated
// parameters can be passed between blocks without rescaling:
//   voltage  : input-voltage ADC code, 4 mV per LSB. The output-voltage ADC has
//              a 16 mV LSB and is multiplied by VOUT_TO_V (=4) before it is
//              combined with the input voltage.
//   current  : signed, 1 mA per LSB (I_W bits).
//   duty     : unsigned DPWM code, d = code / 2**DPWM_BITS.
//   G        : estimator gain 1/Req in mA per 4 mV, unsigned with G_FRAC
//              fractional bits.
//   Req      : equivalent phase resistance, 4 ohm * 2**-REQ_FRAC per LSB
//              (about 3.8 micro-ohm); Req = 2**(G_FRAC+REQ_FRAC) / G.
//   tau      : filter time constant in switching periods, TAU_FRAC fraction bits.
//   c2       : filter coefficient of eq. (4), unsigned 0.C2_W fraction.
//   L        : inductance in (clock period * 4 mV / 1 mA) units with L_FRAC
//              fraction bits, so that an on-time in clocks is L*dI/V directly.
//   C        : capacitance in (1 mA * output-sample period / 16 mV) units with
//              C_FRAC fraction bits, so that a load step in mA is C * de,
//              de being the change of the error code between two samples.
// The 4 mV / 16 mV steps, the 8-bit DPWM and the 500 kHz switching frequency
// are the values of the two-phase prototype; the remaining widths are this
// design's choice.
package cpm_pkg;

  localparam int unsigned N_PHASES  = 2;
  localparam int unsigned DPWM_BITS = 8;     // 256 clocks per switching period
  localparam int unsigned VIN_W     = 12;    // 4 mV LSB, 16.4 V full scale
  localparam int unsigned VOUT_W    = 8;     // 16 mV LSB, 4.1 V full scale
  localparam int unsigned VOUT_TO_V = 4;     // 16 mV / 4 mV
  localparam int unsigned I_W       = 18;    // +-131 A at 1 mA
  localparam int unsigned G_W       = 20;
  localparam int unsigned G_FRAC    = 10;
  localparam int unsigned REQ_W     = 16;
  localparam int unsigned REQ_FRAC  = 20;
  localparam int unsigned TAU_W     = 20;
  localparam int unsigned TAU_FRAC  = 8;
  localparam int unsigned C2_W      = 16;
  localparam int unsigned L_W       = 24;
  localparam int unsigned L_FRAC    = 8;
  localparam int unsigned C_W       = 24;
  localparam int unsigned C_FRAC    = 8;
  localparam int unsigned E_W       = 9;     // signed voltage error, 16 mV LSB

  typedef logic        [DPWM_BITS-1:0] duty_t;
  typedef logic        [VIN_W-1:0]     vin_t;
  typedef logic        [VOUT_W-1:0]    vout_t;
  typedef logic signed [I_W-1:0]       cur_t;
  typedef logic signed [E_W-1:0]       err_t;
  typedef logic        [G_W-1:0]       gain_t;
  typedef logic        [REQ_W-1:0]     req_t;
  typedef logic        [TAU_W-1:0]     tau_t;
  typedef logic        [C2_W-1:0]      c2_t;
  typedef logic        [L_W-1:0]       ind_t;
  typedef logic        [C_W-1:0]       cap_t;

  // Parameters of one phase identified by the self-tuning estimator.
  typedef struct packed {
    gain_t g;     // 1/Req
    c2_t   c2;    // filter coefficient, c1 = 1 - 2*c2
    cur_t  ioff;  // offset removed from the estimate
  } est_param_t;

  // c2 = 1/(1 + 2*tau) for a time constant tau (TAU_FRAC fraction bits).
  function automatic c2_t c2_of_tau(input tau_t tau);
    logic [47:0] num, den;
    num = 48'(1) << (C2_W + TAU_FRAC);
    den = (48'(1) << TAU_FRAC) + (48'(tau) << 1);
    return c2_t'(num / den);
  endfunction

  // Saturate a wide signed value to the current format.
  function automatic cur_t sat_cur(input logic signed [47:0] v);
    if (v > 48'sd131071)       return cur_t'(18'sd131071);
    else if (v < -48'sd131072) return cur_t'(-18'sd131072);
    else                       return cur_t'(v);
  endfunction

endpackage
