// thermal_monitor: sensorless temperature monitoring and protection.
//
// The equivalent resistance Req of each phase, identified by the estimator
// tuning, rises with the temperature of the power-stage components. A
// 32-entry table of resistance breakpoints at 0, 5, ..., 155 degC maps it
// back to a temperature, with linear interpolation between breakpoints
// (one sequential division per phase, started by req_valid). The table
// stands for the manufacturer's resistance-temperature data; by default it
// is filled from Req(T) = REQ_25*(1 + ALPHA_PPM*1e-6*(T - 25)).
// Protection, checked every period (upd):
//   over-temperature when any Req exceeds REQ_MAX,
//   overcurrent when any estimated phase current exceeds I_MAX.
// Either latches shutdown (which turns the DPWM off) until clear.
// Defaults: REQ_MAX is 34 mOhm (the 100 degC limit of the document's
// prototype, 8913 codes of 4 ohm/2**20). The document's 7 A overcurrent
// limit belongs to its single-phase prototype; the default I_MAX of 40 A per
// phase suits the two-phase 80 W configuration and is this design's choice,
// as are REQ_25 and ALPHA_PPM.
module thermal_monitor
  import cpm_pkg::*;
#(
  parameter int unsigned N         = N_PHASES,
  parameter int unsigned REQ_25    = 6894,   // 26.3 mOhm
  parameter int unsigned ALPHA_PPM = 3900,
  parameter int unsigned REQ_MAX   = 8913,   // 34 mOhm
  parameter int          I_MAX     = 40000   // mA
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       upd,
  input  logic       req_valid,
  input  logic       clear,
  input  req_t       req [N],
  input  cur_t       iest [N],
  output logic [7:0] temp [N],
  output logic       ot_flag,
  output logic       oc_flag,
  output logic       shutdown
);
  localparam int unsigned KW = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned NT = 32;
  localparam int unsigned TSTEP = 5;

  function automatic req_t bp(input int unsigned i);
    longint r;
    r = longint'(REQ_25) + (longint'(REQ_25) * longint'(ALPHA_PPM) * (longint'(TSTEP * i) - 25)) / 1000000;
    return req_t'(r);
  endfunction

  req_t tbl [NT];
  always_comb for (int i = 0; i < NT; i++) tbl[i] = bp(i);

  // ---- temperature by table lookup and interpolation ----
  typedef enum logic [1:0] {IDLE, SEARCH, DIV} st_t;
  st_t           st;
  logic [KW-1:0] k;
  logic [4:0]    seg;
  logic          dv_start, dv_done, dv_busy;
  logic [31:0]   dv_num, dv_den, dv_quo;
  seq_div #(.W(32)) u_div (.clk, .rst_n, .start(dv_start), .num(dv_num), .den(dv_den),
                           .busy(dv_busy), .done(dv_done), .quo(dv_quo));

  // segment of req[k]: last breakpoint not above it
  logic [4:0] seg_c;
  always_comb begin
    seg_c = '0;
    for (int i = 1; i < NT - 1; i++) if (req[k] >= tbl[i]) seg_c = 5'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; k <= '0; seg <= '0; dv_start <= 1'b0; dv_num <= '0; dv_den <= 32'd1;
      for (int i = 0; i < N; i++) temp[i] <= 8'd25;
    end else begin
      dv_start <= 1'b0;
      unique case (st)
        IDLE: if (req_valid) begin
          k <= '0; st <= SEARCH;
        end
        SEARCH: begin
          seg <= seg_c;
          if (req[k] <= tbl[0]) begin
            temp[k] <= '0;
            if (k == KW'(N - 1)) st <= IDLE; else k <= k + 1'b1;
          end else begin
            dv_num <= 32'(req[k] - tbl[seg_c]) * TSTEP;
            dv_den <= 32'(tbl[seg_c + 1'b1] - tbl[seg_c]);
            dv_start <= 1'b1; st <= DIV;
          end
        end
        DIV: if (dv_done) begin
          temp[k] <= (32'(seg) * TSTEP + dv_quo > 32'd255) ? 8'd255 : 8'(32'(seg) * TSTEP + dv_quo);
          if (k == KW'(N - 1)) st <= IDLE;
          else begin
            k <= k + 1'b1; st <= SEARCH;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end

  // ---- protection ----
  logic ot_now, oc_now;
  always_comb begin
    ot_now = 1'b0;
    oc_now = 1'b0;
    for (int i = 0; i < N; i++) begin
      if (32'(req[i]) > REQ_MAX)       ot_now = 1'b1;
      if (iest[i] > cur_t'(I_MAX))     oc_now = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ot_flag <= 1'b0; oc_flag <= 1'b0; shutdown <= 1'b0;
    end else if (clear) begin
      ot_flag <= 1'b0; oc_flag <= 1'b0; shutdown <= 1'b0;
    end else if (upd) begin
      if (ot_now) ot_flag <= 1'b1;
      if (oc_now) oc_flag <= 1'b1;
      if (ot_now || oc_now) shutdown <= 1'b1;
    end
  end
endmodule
