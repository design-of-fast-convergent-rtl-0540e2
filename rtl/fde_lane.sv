// fde_lane: one of the eight subcarrier datapaths of the LS-LMS equalizer.
//
// Training stage (least squares, divider free). Over the N_TRAIN training
// subblocks the lane sums R_k into S_k (SISO_1 in the shared register file).
// In the last training subblock it computes, for each subcarrier,
//   W_k = U_k / (S_k / 6) = 6 * conj(S_k) * U_k / |S_k|^2
// with no divider: |S|^2 is looked up as (1/SB) * 2^-dn in inv_lut and
// applied by one scalar multiply and a shift. Pipeline of the last block:
//   cycle 0: S = stored sum + R                 (adder)
//   cycle 1: P = conj(S') U   (cmul_conj)       |S''|^2 (shared_cmul, 2 mults)
//   cycle 2: inverse table lookup of the 14-bit power scalar, P -> 11 bits
//   cycle 3: W = sat15((6 * P * inv) >> (dn + SH_LS))   (shared_cmul, 2 mults)
// so ls_w appears 3 cycles after the row entered; the caller writes it back
// into the row of the register file (SISO_2).
// Data stage. One-tap equalizer: Y = sat13((W * R) >> SH_Y), registered, so
// y appears 1 cycle after the row (shared_cmul, all 4 mults). LMS: when the
// error E_k of an earlier subblock comes back,
//   W_k <- sat15(W_k + ((conj(R_k) * E_k) >> SH_MU))
// combinationally from the register file's second read port; the caller
// writes lms_w back in the same cycle. R_k here is the 10-bit copy of R that
// waited in the delay buffer (rl_out when it was equalized, rl_in now).
// The equations, the operand sizes and the multiplier sharing follow the
// reference design; the shift constants and rounding (round half up) are own choice.
module fde_lane
  import fde_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // row presented this cycle
  input  cpx_r_t                r,
  input  cpx_u_t                u,
  input  logic [RF_W-1:0]       rd0,       // S (training) or W (data) of row
  input  logic                  tr_first,
  input  logic                  tr_last,
  input  logic                  eq_go,
  output logic [RF_W-1:0]       acc_data,  // new S to store
  output logic [2*RL_W-1:0]     rl_out,    // 10-bit R for the delay buffer
  // LS result, 3 cycles after tr_last
  output logic                  ls_valid,
  output cpx_w_t                ls_w,
  // one-tap equalizer output, 1 cycle after eq_go
  output cpx_y_t                y,
  // LMS update of an earlier row
  input  logic                  lms_go,
  input  cpx_e_t                e,
  input  logic [2*RL_W-1:0]     rl_in,
  input  logic [RF_W-1:0]       rd1,       // W of the error's row
  output cpx_w_t                lms_w
);
  localparam int unsigned PA_W = MA_W + MB_W + 1;   // cmul_conj product
  localparam int unsigned PB_W = R_W + W_W + 1;     // shared_cmul product

  // ---------------- stage 0: accumulate -----------------------------------
  cpx_s_t s_old, s_new;
  always_comb begin
    s_old = cpx_s_t'(rd0);
    if (tr_first) begin
      s_new.re = S_W'(r.re);
      s_new.im = S_W'(r.im);
    end else begin
      s_new.re = s_old.re + S_W'(r.re);
      s_new.im = s_old.im + S_W'(r.im);
    end
    acc_data = RF_W'(s_new);
    rl_out[2*RL_W-1:RL_W] = RL_W'(sat(rsh(64'(r.re), SH_RL), RL_W));
    rl_out[RL_W-1:0]      = RL_W'(sat(rsh(64'(r.im), SH_RL), RL_W));
  end

  // ---------------- LS pipeline registers ---------------------------------
  logic   v1, v2, v3;
  cpx_s_t s1;
  cpx_u_t u1;
  logic signed [PA_W-1:0] p2_re, p2_im;
  logic        [PIN_W*2:0] pw2;
  logic signed [P_W-1:0]  p3_re, p3_im;
  logic [INV_W-1:0]       inv3;
  logic [DN_W-1:0]        dn3;

  // ---------------- shared multipliers ------------------------------------
  logic signed [MA_W-1:0] a_re, a_im;
  logic signed [MB_W-1:0] b_re, b_im;
  logic signed [PA_W-1:0] pa_re, pa_im;

  logic signed [PIN_W-1:0] s13_re, s13_im;
  logic signed [PB_W-1:0]  pb_re, pb_im;
  logic        [PB_W-1:0]  pb_pwr;
  logic signed [PB_W-2:0]  pb_scl_re, pb_scl_im;
  cpx_w_t w_eq, w_lms_old;
  cpx_e_t e_in;
  logic signed [RL_W-1:0] rl_re, rl_im;

  always_comb begin
    w_eq      = cpx_w_t'(rd0[2*W_W-1:0]);
    w_lms_old = cpx_w_t'(rd1[2*W_W-1:0]);
    e_in      = e;
    rl_re     = rl_in[2*RL_W-1:RL_W];
    rl_im     = rl_in[RL_W-1:0];
    // cmul_conj: LS computes conj(S)*U in cycle 1, otherwise LMS conj(R)*E
    if (v1) begin
      a_re = MA_W'(sat(rsh(64'(s1.re), SH_SA), MA_W));
      a_im = MA_W'(sat(rsh(64'(s1.im), SH_SA), MA_W));
      b_re = MB_W'(u1.re);
      b_im = MB_W'(u1.im);
    end else begin
      a_re = MA_W'(rl_re);
      a_im = MA_W'(rl_im);
      b_re = MB_W'(e_in.re);
      b_im = MB_W'(e_in.im);
    end
    s13_re = PIN_W'(sat(rsh(64'(s1.re), SH_SP), PIN_W));
    s13_im = PIN_W'(sat(rsh(64'(s1.im), SH_SP), PIN_W));
  end

  cmul_conj #(.A_W(MA_W), .B_W(MB_W)) u_cmul_conj (
    .a_re(a_re), .a_im(a_im), .b_re(b_re), .b_im(b_im),
    .p_re(pa_re), .p_im(pa_im)
  );

  shared_cmul #(.X_W(R_W), .K_W(W_W), .S_IN_W(PIN_W), .P_IN_W(P_W), .I_IN_W(INV_W))
  u_shared_cmul (
    .mode_ls(v1 | v3),
    .x_re(r.re), .x_im(r.im), .w_re(w_eq.re), .w_im(w_eq.im),
    .s_re(s13_re), .s_im(s13_im),
    .p_re(p3_re), .p_im(p3_im), .inv(inv3),
    .prod_re(pb_re), .prod_im(pb_im), .pwr(pb_pwr),
    .scl_re(pb_scl_re), .scl_im(pb_scl_im)
  );

  // ---------------- cycle 2: inverse lookup -------------------------------
  logic [SCAL_W-1:0] scalar2;
  logic [INV_W-1:0]  inv2;
  logic [DN_W-1:0]   dn2;
  always_comb begin
    logic [PIN_W*2:0] sh;
    sh = pw2 >> SH_PW;
    scalar2 = (sh > (PIN_W*2+1)'((1 << SCAL_W) - 1)) ? SCAL_W'((1 << SCAL_W) - 1)
                                                   : SCAL_W'(sh);
  end

  inv_lut #(.SCAL_W(SCAL_W), .SB_W(SB_W), .INV_W(INV_W), .DN_W(DN_W)) u_inv_lut (
    .scalar(scalar2), .inv(inv2), .dn(dn2)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0;
      s1 <= '0; u1 <= '0;
      p2_re <= '0; p2_im <= '0; pw2 <= '0;
      p3_re <= '0; p3_im <= '0; inv3 <= '0; dn3 <= '0;
      y <= '0;
    end else begin
      v1 <= tr_last;
      if (tr_last) begin
        s1 <= s_new;
        u1 <= u;
      end
      v2 <= v1;
      if (v1) begin
        p2_re <= pa_re;
        p2_im <= pa_im;
        pw2   <= pb_pwr[PIN_W*2:0];
      end
      v3 <= v2;
      if (v2) begin
        p3_re <= P_W'(sat(rsh(64'(p2_re), SH_PS), P_W));
        p3_im <= P_W'(sat(rsh(64'(p2_im), SH_PS), P_W));
        inv3  <= inv2;
        dn3   <= dn2;
      end
      if (eq_go) begin
        y.re <= Y_W'(sat(rsh(64'(pb_re), SH_Y), Y_W));
        y.im <= Y_W'(sat(rsh(64'(pb_im), SH_Y), Y_W));
      end
    end
  end

  // ---------------- cycle 3: scaled LS coefficient ------------------------
  always_comb begin
    logic signed [63:0] t_re, t_im;
    t_re = 64'(pb_scl_re) * 64'sd6;
    t_im = 64'(pb_scl_im) * 64'sd6;
    ls_valid = v3;
    ls_w.re = W_W'(sat(rsh(t_re, int'(dn3) + SH_LS), W_W));
    ls_w.im = W_W'(sat(rsh(t_im, int'(dn3) + SH_LS), W_W));
  end

  // ---------------- LMS update --------------------------------------------
  always_comb begin
    logic signed [63:0] d_re, d_im;
    d_re = rsh(64'(pa_re), SH_MU);
    d_im = rsh(64'(pa_im), SH_MU);
    lms_w.re = W_W'(sat(64'(w_lms_old.re) + d_re, W_W));
    lms_w.im = W_W'(sat(64'(w_lms_old.im) + d_im, W_W));
  end

  // The LMS multiplier is busy with the LS pipeline in cycle 1 of a row.
  assert property (@(posedge clk) disable iff (!rst_n) !(lms_go && v1))
    else $error("fde_lane: LMS update during LS computation");
  // The one-tap multiplier is lent to the LS in its cycles 1 and 3.
  assert property (@(posedge clk) disable iff (!rst_n) !(eq_go && (v1 || v3)))
    else $error("fde_lane: equalization during LS computation");
endmodule
