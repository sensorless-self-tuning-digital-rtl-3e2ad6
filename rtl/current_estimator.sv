// current_estimator: sensorless average inductor current estimator for N
// phases (tunable IIR filter with time-multiplexed arithmetic).
//
// Once per switching period (start) the average inductor voltage of every
// phase is reconstructed from the duty code, the input-voltage ADC value and
// the sum of the eight output-voltage samples taken during the last period
// (vout_sum = 8 * average vout, so ripple dithers the 16 mV ADC step),
//   vL[n] = d[n]*vin[n] - vout[n]                          (eq. (12)),
// and filtered by the bilinear-transformed R-C observer of eqs. (2)-(4),
//   s[n] = c1*s[n-1] + c2*(vL[n] + vL[n-1]),  c1 = 1 - 2*c2,
//   iest[n] = G*s[n] - ioff,
// written as s += c2*(vL[n] + vL[n-1] - 2*s[n-1]) so only c2 is stored.
// G = 1/Req, c2 and ioff come per phase from the tuning logic. Following
// the multiphase estimator, one multiplier is shared by all phases through
// multiplexers: each phase takes two clocks (filter update, gain), so all
// estimates are ready 2*N+1 clocks after start, marked by done.
// s keeps 24 fraction bits below the 4 mV voltage unit; vL carries the 8
// fraction bits of the duty product. Formats are this design's choice.
module current_estimator
  import cpm_pkg::*;
#(
  parameter int unsigned N = N_PHASES
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  duty_t      duty [N],
  input  vin_t       vin,
  input  logic [VOUT_W+2:0] vout_sum,   // sum of 8 vout codes
  input  est_param_t prm [N],
  output cur_t       iest [N],
  output logic       done
);
  localparam int unsigned KW = (N > 1) ? $clog2(N) : 1;
  typedef enum logic [1:0] {IDLE, FILT, GAIN} st_t;

  st_t                 st;
  logic [KW-1:0]       k;
  logic signed [47:0]  s   [N];   // filter state, 24 fraction bits
  logic signed [23:0]  vlp [N];   // vL[n-1], 8 fraction bits
  logic signed [23:0]  vl;        // vL[n] of phase k
  logic signed [63:0]  ma, mb, prod;
  logic signed [47:0]  diff;

  // vL = d*vin - vout, both with 8 fraction bits in 4 mV units
  always_comb begin
    vl = 24'($signed({1'b0, duty[k]}) * $signed({1'b0, vin}))
       - $signed({6'b0, vout_sum, 7'b0});
    diff = ((48'(vl) + 48'(vlp[k])) <<< 16) - (s[k] <<< 1);
  end

  // the shared multiplier
  always_comb begin
    if (st == FILT) begin
      ma = 64'($signed({1'b0, prm[k].c2}));
      mb = 64'(diff);
    end else begin
      ma = 64'($signed({1'b0, prm[k].g}));
      mb = 64'(s[k]);
    end
    prod = ma * mb;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= IDLE;
      k    <= '0;
      done <= 1'b0;
      for (int i = 0; i < N; i++) begin
        s[i] <= '0; vlp[i] <= '0; iest[i] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (st)
        IDLE: if (start) begin
          st <= FILT;
          k  <= '0;
        end
        FILT: begin
          s[k]   <= s[k] + 48'(prod >>> C2_W);
          vlp[k] <= vl;
          st     <= GAIN;
        end
        GAIN: begin
          iest[k] <= sat_cur(48'(prod >>> (G_FRAC + 24)) - 48'(prm[k].ioff));
          if (k == KW'(N - 1)) begin
            st   <= IDLE;
            done <= 1'b1;
          end else begin
            k  <= k + 1'b1;
            st <= FILT;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
