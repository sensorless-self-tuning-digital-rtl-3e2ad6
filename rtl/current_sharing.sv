// current_sharing: current references of the N phases that equalize their
// conduction losses, and therefore their temperatures, without sensors.
//
// The losses are equal when Req1*I1^2 = ... = ReqN*IN^2 (eq. (21)), i.e.
// when I_k is proportional to 1/sqrt(Req_k). Whenever new resistances are
// announced (req_valid), a small sequencer recomputes the weights
//   q_k = sqrt(2**38 / Req_k),  w_k = 2**16 * q_k / sum(q)
// with one shared divider and one square-root unit (about 70 clocks per
// phase); until the first estimate the load is shared equally. On every upd
// the references iref_k = itot*w_k / 2**16 are refreshed.
// While freeze is high (phase-by-phase calibration) only the phase under
// calibration, cal_phase, follows the load: the others keep their
// pre-calibration references and phase cal_phase gets itot minus their sum.
// The loss-equalizing rule and the freezing follow the document; the
// arithmetic and its sequencing are this design's choice.
module current_sharing
  import cpm_pkg::*;
#(
  parameter int unsigned N = N_PHASES
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          upd,
  input  cur_t                          itot,
  input  req_t                          req [N],
  input  logic                          req_valid,
  input  logic                          freeze,
  input  logic [(N>1?$clog2(N):1)-1:0]  cal_phase,
  output cur_t                          iref [N],
  output logic [16:0]                   weight [N],
  output logic                          busy
);
  localparam int unsigned KW = (N > 1) ? $clog2(N) : 1;
  typedef enum logic [2:0] {IDLE, DIVR, SQRT, DIVW, WAITW} st_t;

  st_t           st;
  logic [KW-1:0] k;
  logic [19:0]   q [N];
  logic [23:0]   qsum;
  logic          div_start, div_done, div_busy, sq_start, sq_done, sq_busy;
  logic [47:0]   div_num, div_den, div_quo;
  logic [19:0]   sq_root;

  seq_div  #(.W(48)) u_div (.clk, .rst_n, .start(div_start), .num(div_num), .den(div_den),
                            .busy(div_busy), .done(div_done), .quo(div_quo));
  seq_sqrt #(.W(40)) u_sqrt (.clk, .rst_n, .start(sq_start), .x(div_quo[39:0]),
                             .busy(sq_busy), .done(sq_done), .root(sq_root));

  always_comb begin
    div_num = (st == DIVR) ? (48'(1) << 38) : (48'(q[k]) << 16);
    div_den = (st == DIVR) ? ((req[k] == '0) ? 48'(1) : 48'(req[k])) : 48'(qsum);
  end

  assign busy = (st != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; k <= '0; qsum <= '0; div_start <= 1'b0; sq_start <= 1'b0;
      for (int i = 0; i < N; i++) begin
        q[i] <= '0;
        weight[i] <= 17'((1 << 16) / N);
      end
    end else begin
      div_start <= 1'b0;
      sq_start  <= 1'b0;
      unique case (st)
        IDLE: if (req_valid) begin
          st <= DIVR; k <= '0; qsum <= '0; div_start <= 1'b1;
        end
        DIVR: if (div_done) begin
          st <= SQRT; sq_start <= 1'b1;
        end
        SQRT: if (sq_done) begin
          q[k] <= sq_root;
          qsum <= qsum + 24'(sq_root);
          if (k == KW'(N - 1)) begin
            k <= '0; st <= DIVW;
          end else begin
            k <= k + 1'b1; st <= DIVR; div_start <= 1'b1;
          end
        end
        DIVW: begin
          div_start <= 1'b1; st <= WAITW;
        end
        WAITW: if (div_done) begin
          weight[k] <= 17'(div_quo);
          if (k == KW'(N - 1)) st <= IDLE;
          else begin
            k <= k + 1'b1; st <= DIVW;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end

  // references
  logic signed [47:0] share [N];
  logic signed [47:0] others;
  always_comb begin
    others = '0;
    for (int i = 0; i < N; i++) begin
      share[i] = (48'(itot) * $signed({31'b0, weight[i]})) >>> 16;
      if (KW'(i) != cal_phase) others = others + 48'(iref[i]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) iref[i] <= '0;
    end else if (upd) begin
      for (int i = 0; i < N; i++) begin
        if (!freeze)                 iref[i] <= sat_cur(share[i]);
        else if (KW'(i) == cal_phase) iref[i] <= sat_cur(48'(itot) - others);
      end
    end
  end
endmodule
