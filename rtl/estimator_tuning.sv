// estimator_tuning: self-tuning logic of the multiparameter estimator.
//
// On cal_start the block calibrates the phases one after another. For
// phase k it raises freeze (the other phases keep their current references,
// so the whole test current flows in phase k) and runs three steps:
//  1. Gain: when e[n] has stayed within E_TOL for STEADY_N periods, the
//     estimate is averaged (point A), the test current sink is switched on,
//     and after T_AB periods averaged again (point B). With the measured
//     increase dIm: G = G_initial * ITEST / dIm (eq. (5)); Req = 1/G.
//  2. Time constant: the estimate is averaged once more (point C) and the
//     sink is switched off. The output voltage is followed on every vout
//     sample; its peak (point D) gives dTpeak (from C), dVpeak and the
//     estimate there. With dIpeak = (iC - iD) - ITEST, eq. (6) is evaluated
//     in the exact form
//        tau = tau0 + 2*tau0^2*dIpeak / (ITEST*(2*tau0 - dTpeak)),
//     then c2 = 1/(1 + 2*tau) (eq. (4)), L = tau*Req (eq. (8)) and
//     C = ITEST*dTpeak / (2*dVpeak) (eq. (11)).
//  3. Offset: the estimate is averaged at fsw and, with hf_mode[k] raised
//     (phase k alone switches at 2*fsw, the others keep their loops and
//     frozen references, so phase k's true current does not move), at 2*fsw; the difference is the residual offset (eq. (20)), which is
//     added to the offset the estimator subtracts.
// Between two phases the freeze is released for T_SET periods, so that
// every phase starts its calibration from the load-sharing operating point.
// abort (protection shutdown) ends a calibration at once and releases the
// sink, the 2*fsw mode and the freeze.
// At the end the parallel inductance Leq = 1/sum(1/L_k) is formed and
// req_valid announces the new resistances to the current sharing logic.
// Periods are counted on tick (one per switching period, estimates valid);
// vout samples arrive on vsmp (8*fsw). A plateau of the quantized voltage
// is handled by taking D at the middle of the samples at the maximum; the
// search ends when the voltage has dropped PEAK_HYST codes below it.
// All divisions share one sequential divider. The procedure and equations
// are the document's; averaging over 2**AVGL periods, the plateau rule and PEAK_HYST, the
// skip of an update whose measurement is unusable (non-positive dIm or
// 2*tau0 <= dTpeak), the limit of one tau update to a factor of two (a
// noisy peak must not make the estimator filter much faster than the
// current loops tolerate) and all formats are this design's choices.
module estimator_tuning
  import cpm_pkg::*;
#(
  parameter int unsigned N        = N_PHASES,
  parameter int          ITEST    = 4000,     // test current step, mA
  parameter int unsigned G_INIT   = 400 << G_FRAC,
  parameter int unsigned TAU_INIT = 50 << TAU_FRAC,
  parameter int unsigned STEADY_N = 4,
  parameter int          E_TOL    = 0,
  parameter int unsigned AVGL     = 6,
  parameter int unsigned T_AB     = 512,
  parameter int unsigned T_SET    = 256,
  parameter int unsigned PEAK_MAX = 4000,
  parameter int unsigned PEAK_HYST = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cal_start,
  input  logic          abort,
  input  logic          tick,
  input  logic          vsmp,
  input  err_t          e,
  input  vout_t         vout,
  input  cur_t          iest [N],
  output est_param_t    prm [N],
  output tau_t          tau [N],
  output req_t          req [N],
  output ind_t          ind [N],
  output ind_t          leq,
  output cap_t          cap,
  output logic          req_valid,
  output logic          sink_en,
  output logic [N-1:0]  hf_mode,
  output logic          freeze,
  output logic [(N>1?$clog2(N):1)-1:0] cal_phase,
  output logic          busy,
  output logic          cal_done,
  output logic [3:0]    evt        // pulses: {offset, tau, gain, peak found}
);
  localparam int unsigned KW = (N > 1) ? $clog2(N) : 1;

  typedef enum logic [4:0] {
    IDLE, SS_WAIT, WAITT, AVG, DIVW,
    A_DONE, B_START, GAIN_UPD, G_DONE, REQ_DONE, C_WAIT, C_START, C_DONE,
    PEAK, PEAK_CALC, TAU_UPD, C2_UPD, CAP_UPD, F_START, F_DONE, HF_START,
    HF_DONE, PH_START, LEQ_DIV, LEQ_UPD
  } st_t;

  st_t                st, ret;
  logic [KW-1:0]      k;
  logic [15:0]        cnt, wlen;
  logic signed [31:0] acc;
  cur_t               avg_res, i_a, i_c, i_f;
  logic [15:0]        scnt, tfirst, tlast;
  cur_t               ifirst, ilast;
  vout_t              v_c, vmax;
  logic               dneg;
  logic [63:0]        inv_sum;

  // shared divider
  logic        dv_start, dv_done, dv_busy;
  logic [63:0] dv_num, dv_den, dv_quo;
  seq_div #(.W(64)) u_div (.clk, .rst_n, .start(dv_start), .num(dv_num), .den(dv_den),
                           .busy(dv_busy), .done(dv_done), .quo(dv_quo));

  // quantities of the time-constant step
  logic [15:0]        dt_pk;
  logic signed [31:0] di_pk;
  logic signed [63:0] tden;
  logic [63:0]        tnum, tau2, lprod, t_new;
  always_comb begin
    dt_pk = 16'((32'(tfirst) + 32'(tlast)) >> 1);
    di_pk = 32'(i_c) - ((32'(ifirst) + 32'(ilast)) >>> 1) - 32'(ITEST);
    // dTpeak is counted in eighths of a period
    tden  = 64'(ITEST) * ((64'(tau[k]) << 1) - (64'(dt_pk) << (TAU_FRAC - 3)));
    tau2  = 64'(tau[k]) * 64'(tau[k]);
    tnum  = (tau2 << 1) * 64'(unsigned'((di_pk < 0) ? -di_pk : di_pk));
    lprod = (64'(tau[k]) * 64'(req[k])) >> (TAU_FRAC + REQ_FRAC - 8 - L_FRAC);
    // one update changes tau by at most a factor of two
    if (dneg) t_new = 64'(tau[k]) - ((dv_quo > 64'(tau[k] >> 1)) ? 64'(tau[k] >> 1) : dv_quo);
    else      t_new = 64'(tau[k]) + ((dv_quo > 64'(tau[k])) ? 64'(tau[k]) : dv_quo);
    if (t_new > 64'((1 << TAU_W) - 1)) t_new = 64'((1 << TAU_W) - 1);
  end

  assign busy      = (st != IDLE);
  assign cal_phase = k;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; ret <= IDLE; k <= '0; cnt <= '0; wlen <= '0; acc <= '0;
      avg_res <= '0; i_a <= '0; i_c <= '0; i_f <= '0;
      scnt <= '0; tfirst <= '0; tlast <= '0; ifirst <= '0; ilast <= '0;
      v_c <= '0; vmax <= '0; dneg <= 1'b0; inv_sum <= '0;
      dv_start <= 1'b0; dv_num <= '0; dv_den <= 64'd1;
      leq <= '0; cap <= '0;
      req_valid <= 1'b0; sink_en <= 1'b0; hf_mode <= '0; freeze <= 1'b0;
      cal_done <= 1'b0; evt <= '0;
      for (int i = 0; i < N; i++) begin
        prm[i].g    <= gain_t'(G_INIT);
        prm[i].c2   <= c2_of_tau(tau_t'(TAU_INIT));
        prm[i].ioff <= '0;
        tau[i]      <= tau_t'(TAU_INIT);
        req[i]      <= req_t'((64'(1) << (G_FRAC + REQ_FRAC)) / 64'(G_INIT));
        ind[i]      <= '0;
      end
    end else begin
      dv_start  <= 1'b0;
      req_valid <= 1'b0;
      cal_done  <= 1'b0;
      evt       <= '0;
      unique case (st)
        IDLE: if (cal_start) begin
          k <= '0; cnt <= '0; freeze <= 1'b1; st <= SS_WAIT;
        end
        // point A needs a settled voltage loop
        SS_WAIT: if (tick) begin
          if (e <= err_t'(E_TOL) && e >= -err_t'(E_TOL)) begin
            if (cnt == 16'(STEADY_N - 1)) begin
              cnt <= '0; acc <= '0; ret <= A_DONE; st <= AVG;
            end else cnt <= cnt + 1'b1;
          end else cnt <= '0;
        end
        // common steps: wait wlen periods / average 2**AVGL estimates / divide
        WAITT: if (tick) begin
          if (cnt == wlen - 1'b1) begin
            cnt <= '0; acc <= '0; st <= ret;
          end else cnt <= cnt + 1'b1;
        end
        AVG: if (tick) begin
          if (cnt == 16'((1 << AVGL) - 1)) begin
            avg_res <= cur_t'((acc + 32'(iest[k])) >>> AVGL);
            cnt <= '0; acc <= '0; st <= ret;
          end else begin
            acc <= acc + 32'(iest[k]);
            cnt <= cnt + 1'b1;
          end
        end
        DIVW: if (dv_done) st <= ret;
        // ---- 1. gain: sink on at A, measure at B ----
        A_DONE: begin
          i_a <= avg_res; sink_en <= 1'b1;
          wlen <= 16'(T_AB); ret <= B_START; st <= WAITT;
        end
        B_START: begin
          ret <= GAIN_UPD; st <= AVG;
        end
        GAIN_UPD: begin
          if (avg_res > i_a) begin
            dv_num <= 64'(prm[k].g) * 64'(ITEST);
            dv_den <= 64'(32'(avg_res) - 32'(i_a));
            dv_start <= 1'b1; ret <= G_DONE; st <= DIVW;
          end else begin
            st <= C_WAIT;
          end
        end
        G_DONE: begin
          prm[k].g <= (dv_quo > 64'((1 << G_W) - 1)) ? '1 : gain_t'(dv_quo);
          evt[1]   <= 1'b1;
          dv_num   <= 64'(1) << (G_FRAC + REQ_FRAC);
          dv_den   <= (dv_quo == '0) ? 64'd1 : dv_quo;
          dv_start <= 1'b1; ret <= REQ_DONE; st <= DIVW;
        end
        REQ_DONE: begin
          req[k] <= (dv_quo > 64'((1 << REQ_W) - 1)) ? '1 : req_t'(dv_quo);
          st <= C_WAIT;
        end
        // ---- 2. time constant and capacitance: sink off at C, peak D ----
        C_WAIT: begin
          // let the new gain reach the estimate first
          wlen <= 16'd2; ret <= C_START; st <= WAITT;
        end
        C_START: begin
          ret <= C_DONE; st <= AVG;
        end
        C_DONE: begin
          i_c <= avg_res; sink_en <= 1'b0; v_c <= vout; vmax <= vout;
          scnt <= '0; tfirst <= '0; tlast <= '0; ifirst <= avg_res; ilast <= avg_res;
          st <= PEAK;
        end
        PEAK: if (vsmp) begin
          scnt <= scnt + 1'b1;
          if (vout > vmax) begin
            vmax <= vout; tfirst <= scnt + 1'b1; tlast <= scnt + 1'b1;
            ifirst <= iest[k]; ilast <= iest[k];
          end else if (vout == vmax) begin
            if (vmax > v_c) begin
              tlast <= scnt + 1'b1; ilast <= iest[k];
            end
          end else if (vmax > v_c && 10'(vout) + 10'(PEAK_HYST) <= 10'(vmax)) begin
            // past the peak only once the voltage has fallen PEAK_HYST codes,
            // so that switching ripple does not end the search early
            st <= PEAK_CALC; evt[0] <= 1'b1;
          end
          if (scnt == 16'(PEAK_MAX)) st <= PEAK_CALC;
        end
        PEAK_CALC: begin
          if (tden > 0 && di_pk != 0 && vmax > v_c) begin
            dneg   <= (di_pk < 0);
            dv_num <= tnum;
            dv_den <= 64'(tden);
            dv_start <= 1'b1; ret <= TAU_UPD; st <= DIVW;
          end else begin
            dv_num <= 64'(1) << (C2_W + TAU_FRAC);
            dv_den <= (64'(1) << TAU_FRAC) + (64'(tau[k]) << 1);
            dv_start <= 1'b1; ret <= C2_UPD; st <= DIVW;
          end
        end
        TAU_UPD: begin
          tau[k] <= tau_t'(t_new);
          evt[2] <= 1'b1;
          dv_num <= 64'(1) << (C2_W + TAU_FRAC);
          dv_den <= (64'(1) << TAU_FRAC) + (t_new << 1);
          dv_start <= 1'b1; ret <= C2_UPD; st <= DIVW;
        end
        C2_UPD: begin
          prm[k].c2 <= (dv_quo > 64'((1 << C2_W) - 1)) ? '1 : c2_t'(dv_quo);
          ind[k]    <= (lprod > 64'((1 << L_W) - 1)) ? '1 : ind_t'(lprod);
          // C = ITEST*dTpeak/(2*dVpeak)
          dv_num    <= 64'(ITEST) * 64'(dt_pk) * 64'(1 << (C_FRAC - 1));
          dv_den    <= (vmax > v_c) ? 64'(vmax - v_c) : 64'd1;
          dv_start  <= 1'b1; ret <= CAP_UPD; st <= DIVW;
        end
        CAP_UPD: begin
          cap  <= (dv_quo > 64'((1 << C_W) - 1)) ? '1 : cap_t'(dv_quo);
          wlen <= 16'(T_SET); ret <= F_START; st <= WAITT;
        end
        // ---- 3. offset: estimate at fsw, then at 2*fsw ----
        F_START: begin
          ret <= F_DONE; st <= AVG;
        end
        F_DONE: begin
          i_f <= avg_res; hf_mode <= N'(1) << k;
          wlen <= 16'(T_SET); ret <= HF_START; st <= WAITT;
        end
        HF_START: begin
          ret <= HF_DONE; st <= AVG;
        end
        HF_DONE: begin
          // i_L_offset = i_2fsw - i_fsw, removed from the estimate
          prm[k].ioff <= sat_cur(48'(prm[k].ioff) + 48'(avg_res) - 48'(i_f));
          hf_mode <= '0;
          evt[3]  <= 1'b1;
          if (k == KW'(N - 1)) begin
            k <= '0; inv_sum <= '0;
            dv_num <= 64'(1) << 40;
            dv_den <= (ind[0] == '0) ? 64'd1 : 64'(ind[0]);
            dv_start <= 1'b1; ret <= LEQ_DIV; st <= DIVW;
          end else begin
            // release all phases for T_SET periods before the next one
            k <= k + 1'b1; freeze <= 1'b0;
            wlen <= 16'(T_SET); ret <= PH_START; st <= WAITT;
          end
        end
        PH_START: begin
          freeze <= 1'b1; cnt <= '0; st <= SS_WAIT;
        end
        // ---- Leq = 1 / sum(1/L_k) ----
        LEQ_DIV: begin
          inv_sum <= inv_sum + dv_quo;
          dv_num  <= 64'(1) << 40;
          if (k == KW'(N - 1)) begin
            dv_den <= ((inv_sum + dv_quo) == '0) ? 64'd1 : (inv_sum + dv_quo);
            ret <= LEQ_UPD;
          end else begin
            k <= k + 1'b1;
            dv_den <= (ind[k + 1'b1] == '0) ? 64'd1 : 64'(ind[k + 1'b1]);
            ret <= LEQ_DIV;
          end
          dv_start <= 1'b1; st <= DIVW;
        end
        LEQ_UPD: begin
          leq <= (dv_quo > 64'((1 << L_W) - 1)) ? '1 : ind_t'(dv_quo);
          k <= '0; freeze <= 1'b0; req_valid <= 1'b1; cal_done <= 1'b1;
          st <= IDLE;
        end
        default: st <= IDLE;
      endcase
      // a protection shutdown ends a calibration in progress
      if (abort && st != IDLE) begin
        st <= IDLE; k <= '0; sink_en <= 1'b0; hf_mode <= '0; freeze <= 1'b0;
      end
    end
  end
endmodule
