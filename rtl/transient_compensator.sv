// transient_compensator: two-cycle minimum-deviation transient controller.
//
// On every output-voltage sample (vsmp, 8*fsw) the change of the error,
// de = e[n] - e[n-1], gives the load step through the identified output
// capacitance, dIload = C*de (eq. (22); C is kept in units that make this a
// plain product). When |de| reaches DE_TH and the block is enabled, it takes
// over from the PI compensator:
//  cycle 1 (dead-beat): all switches are forced ON for
//     t_db1 = Leq*dIload/(vin - vout)   (light to heavy, eq. (23)) or OFF for
//     t_db2 = Leq*|dIload|/vout         (heavy to light, eq. (24)),
//     so that the inductor currents sum to the new load current; for the
//     rest of the period the DPWM runs with the held duty codes.
//  cycle 2 (charge balance): PER clocks after the trigger the voltage
//     deviation is sampled and the lost charge dQ = C*e is put back with a
//     triangular current pulse: peak dIp = sqrt(2*dQ*(vin-vout)*vout/(Leq*vin)),
//     ON for Leq*dIp/(vin-vout) then OFF for Leq*dIp/vout (a voltage that is
//     too high uses the mirror sequence, OFF first).
// It then presets the PI accumulator to isum, the sum of the phase current
// estimates at that moment, and returns control: the current references
// restart from the operating point the two cycles reached, so the loops see
// no step (dIload itself is only used for t_db).
// Times are in clocks (2**DPWM_BITS per period); vout is in 16 mV codes.
// One divider and one square root are shared, so t_db is applied about 70
// clocks after the trigger and the recovery pulse about 230 clocks after the
// end of cycle 1. The detection, eqs. (22)-(24) and the two-cycle sequence
// follow the document; the pulse shape of cycle 2, the threshold and the
// hold-off of HOLDOFF samples after each event and the preset from isum are
// this design's choices.
module transient_compensator
  import cpm_pkg::*;
#(
  parameter int          DE_TH   = 2,
  parameter int unsigned PER     = 1 << DPWM_BITS,
  parameter int unsigned HOLDOFF = 64
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  vsmp,
  input  err_t  e,
  input  vin_t  vin,
  input  vout_t vout,
  input  cap_t  cap,
  input  ind_t  leq,
  input  cur_t  isum,
  output logic  active,
  output logic  force_en,
  output logic  force_val,
  output logic  preset,
  output cur_t  preset_val,
  output logic  evt_up,     // pulse: light-to-heavy event detected
  output logic  evt_down    // pulse: heavy-to-light event detected
);
  typedef enum logic [3:0] {
    IDLE, DB_DIV, DB_RUN, C1_END, Q_DIV, Q_SQRT, T1_DIV, T2_DIV, CB_RUN1, CB_RUN2, DONE
  } st_t;

  st_t                st;
  err_t               e_prev;
  logic signed [47:0] dil;
  logic [15:0]        clk_cnt;     // clocks since trigger
  logic [31:0]        tcnt, t_db, t_1, t_2;
  logic               up;          // direction of the load step
  logic               vlow;        // cycle-2 voltage is below reference
  logic [15:0]        hold_cnt;
  logic [12:0]        v_o, v_d;    // vout and vin - vout in 4 mV codes

  // shared divider and square root
  logic        dv_start, dv_done, dv_busy, sq_start, sq_done, sq_busy;
  logic [63:0] dv_num, dv_den, dv_quo;
  logic [31:0] sq_root;
  seq_div  #(.W(64)) u_div  (.clk, .rst_n, .start(dv_start), .num(dv_num), .den(dv_den),
                             .busy(dv_busy), .done(dv_done), .quo(dv_quo));
  seq_sqrt #(.W(64)) u_sqrt (.clk, .rst_n, .start(sq_start), .x(dv_quo),
                             .busy(sq_busy), .done(sq_done), .root(sq_root));

  logic signed [E_W:0] de;
  always_comb begin
    de   = (E_W+1)'(e) - (E_W+1)'(e_prev);
    dil  = (48'($signed({1'b0, cap})) * 48'(de)) >>> C_FRAC;
    v_o  = 13'(vout) * 13'(VOUT_TO_V);
    v_d  = (13'(vin) > v_o) ? (13'(vin) - v_o) : 13'd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; e_prev <= '0; clk_cnt <= '0; tcnt <= '0;
      t_db <= '0; t_1 <= '0; t_2 <= '0; up <= 1'b0; vlow <= 1'b0; hold_cnt <= '0;
      dv_start <= 1'b0; sq_start <= 1'b0; dv_num <= '0; dv_den <= 64'd1;
      active <= 1'b0; force_en <= 1'b0; force_val <= 1'b0;
      preset <= 1'b0; preset_val <= '0; evt_up <= 1'b0; evt_down <= 1'b0;
    end else begin
      dv_start <= 1'b0;
      sq_start <= 1'b0;
      preset   <= 1'b0;
      evt_up   <= 1'b0;
      evt_down <= 1'b0;
      if (vsmp) e_prev <= e;
      if (st != IDLE) clk_cnt <= clk_cnt + 1'b1;
      unique case (st)
        IDLE: begin
          if (hold_cnt != '0) begin
            if (vsmp) hold_cnt <= hold_cnt - 1'b1;
          end else if (en && vsmp && (de >= (E_W+1)'(DE_TH) || de <= -(E_W+1)'(DE_TH))) begin
            active  <= 1'b1;
            clk_cnt <= '0;
            up      <= (de > 0);
            evt_up   <= (de > 0);
            evt_down <= (de < 0);
            // t_db = Leq*|dI| / V, V = vin - vout (ON) or vout (OFF)
            dv_num <= 64'(leq) * 64'(unsigned'((dil < 0) ? -dil : dil));
            dv_den <= (de > 0) ? 64'(v_d) : 64'((v_o == '0) ? 13'd1 : v_o);
            dv_start <= 1'b1;
            st <= DB_DIV;
          end
        end
        DB_DIV: if (dv_done) begin
          t_db <= 32'(dv_quo >> L_FRAC);
          tcnt <= '0;
          force_en <= 1'b1; force_val <= up;
          st <= DB_RUN;
        end
        DB_RUN: begin
          tcnt <= tcnt + 1'b1;
          if (tcnt >= t_db) begin
            force_en <= 1'b0;
            st <= C1_END;
          end
        end
        C1_END: if (clk_cnt >= 16'(PER)) begin
          // end of cycle 1: sample the deviation, dQ = C*e
          vlow <= (e > 0);
          if (e == '0) st <= DONE;
          else begin
            // dIp^2 = 64*C*|e|*(vin-vout)*vout / (Leq*vin)   [mA^2]
            dv_num <= 64'(cap) * 64'(unsigned'((e < 0) ? -(E_W+1)'(e) : (E_W+1)'(e)))
                      * 64'(v_d) * 64'(v_o) * 64'(1 << (DPWM_BITS - 3 + 1 + L_FRAC - C_FRAC));
            dv_den <= ((leq == '0) ? 64'd1 : 64'(leq)) * 64'((vin == '0) ? 12'd1 : vin);
            dv_start <= 1'b1;
            st <= Q_DIV;
          end
        end
        Q_DIV: if (dv_done) begin
          sq_start <= 1'b1; st <= Q_SQRT;
        end
        Q_SQRT: if (sq_done) begin
          dv_num <= 64'(leq) * 64'(sq_root);
          dv_den <= 64'(v_d);
          dv_start <= 1'b1; st <= T1_DIV;
        end
        T1_DIV: if (dv_done) begin
          t_1 <= 32'(dv_quo >> L_FRAC);
          dv_num <= 64'(leq) * 64'(sq_root);
          dv_den <= 64'((v_o == '0) ? 13'd1 : v_o);
          dv_start <= 1'b1; st <= T2_DIV;
        end
        T2_DIV: if (dv_done) begin
          t_2 <= 32'(dv_quo >> L_FRAC);
          tcnt <= '0;
          force_en <= 1'b1; force_val <= vlow;
          st <= CB_RUN1;
        end
        // first segment: ON for t_1 (voltage low) or OFF for t_2 (voltage high)
        CB_RUN1: begin
          tcnt <= tcnt + 1'b1;
          if (tcnt >= (vlow ? t_1 : t_2)) begin
            tcnt <= '0; force_val <= !vlow; st <= CB_RUN2;
          end
        end
        CB_RUN2: begin
          tcnt <= tcnt + 1'b1;
          if (tcnt >= (vlow ? t_2 : t_1)) begin
            force_en <= 1'b0; st <= DONE;
          end
        end
        DONE: begin
          force_en   <= 1'b0;
          active     <= 1'b0;
          preset     <= 1'b1;
          preset_val <= isum;
          hold_cnt   <= 16'(HOLDOFF);
          st <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
