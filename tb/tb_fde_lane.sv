// tb_fde_lane: one lane (subcarriers k = 8r, r = 0..63) through a whole
// training and data stage, with the register file modelled in the testbench.
// Training: R = A * H_k * U_k + noise for six subblocks; checks each stored
// running sum, the LS coefficient 3 cycles after each row of the last
// subblock (bit exact against the reference arithmetic, and within 25% of the
// ideal 2^19 / (A H_k) where |U_k| is not small). Data: checks Y one cycle
// after each row, the 10-bit LMS copy of R, and LMS updates of W.
module tb_fde_lane;
  import fde_pkg::*;
  import tb_fde_model_pkg::*;
  localparam real AMP = 128.0;
  logic clk = 0, rst_n = 0;
  cpx_r_t r;
  cpx_u_t u;
  logic [RF_W-1:0] rd0, rd1, acc_data;
  logic tr_first, tr_last, eq_go, lms_go, ls_valid;
  logic [2*RL_W-1:0] rl_out, rl_in;
  cpx_w_t ls_w, lms_w;
  cpx_y_t y;
  cpx_e_t e;
  int checks = 0, failures = 0, cycles = 0;

  fde_lane dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d exp %0d", what, got, exp); end
  endtask

  real ur [], ui [], hr [64], hi [64];
  longint uq_re [64], uq_im [64];
  longint s_re [64], s_im [64], w_re [64], w_im [64], rl_re [64], rl_im [64];
  cpx_s_t sv;

  initial begin
    real xr [], xi [];
    xr = new[512]; xi = new[512];
    for (int n = 0; n < 512; n++) begin xr[n] = real'(u512_chip(n)); xi[n] = 0.0; end
    dft(xr, xi, -1, ur, ui);
    for (int rr = 0; rr < 64; rr++) begin
      real ph;
      ph = 6.2831853 * rr / 64.0 * 3.0;
      hr[rr] = (1.0 + 0.4 * $cos(ph)) * $cos(0.5 * rr);
      hi[rr] = (1.0 + 0.4 * $cos(ph)) * $sin(0.5 * rr);
      uq_re[rr] = rnd(4.0 * ur[8*rr]); uq_im[rr] = rnd(4.0 * ui[8*rr]);
    end
    r = '0; u = '0; rd0 = '0; rd1 = '0; tr_first = 0; tr_last = 0; eq_go = 0;
    lms_go = 0; e = '0; rl_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---------------- training ----------------
    for (int b = 0; b < N_TRAIN; b++) begin
      for (int rr = 0; rr < 64; rr++) begin
        longint xr_i, xi_i;
        @(negedge clk);
        xr_i = rnd(AMP * (hr[rr] * ur[8*rr] - hi[rr] * ui[8*rr]) + 20.0 * grand());
        xi_i = rnd(AMP * (hr[rr] * ui[8*rr] + hi[rr] * ur[8*rr]) + 20.0 * grand());
        r.re = R_W'(xr_i); r.im = R_W'(xi_i);
        u.re = U_W'(uq_re[rr]); u.im = U_W'(uq_im[rr]);
        sv.re = S_W'(s_re[rr]); sv.im = S_W'(s_im[rr]);
        rd0 = RF_W'(sv);
        tr_first = (b == 0); tr_last = (b == N_TRAIN - 1);
        if (b == 0) begin s_re[rr] = xr_i; s_im[rr] = xi_i; end
        else begin s_re[rr] += xr_i; s_im[rr] += xi_i; end
        #1;
        if (!tr_last) begin
          sv = cpx_s_t'(acc_data);
          chk("sum re", sv.re, s_re[rr]);
          chk("sum im", sv.im, s_im[rr]);
        end
        if (b == N_TRAIN - 1 && rr >= 3) check_ls(rr - 3);
      end
    end
    for (int rr = 61; rr < 64; rr++) begin
      @(negedge clk);
      tr_last = 0; tr_first = 0;
      #1 check_ls(rr);
    end
    @(negedge clk);
    #1 chk("ls idle", ls_valid, 0);
    repeat (4) @(negedge clk);
    // ---------------- data: equalize ----------------
    for (int rr = 0; rr < 64; rr++) begin
      longint xr_i, xi_i, yr, yi;
      @(negedge clk);
      xr_i = longint'($signed(16'($urandom())));
      xi_i = longint'($signed(16'($urandom())));
      r.re = R_W'(xr_i); r.im = R_W'(xi_i);
      rd0 = RF_W'(cpx_w_t'({W_W'(w_re[rr]), W_W'(w_im[rr])}));
      eq_go = 1;
      #1;
      rl_re[rr] = m_rl(xr_i); rl_im[rr] = m_rl(xi_i);
      chk("rl re", longint'($signed(rl_out[19:10])), rl_re[rr]);
      chk("rl im", longint'($signed(rl_out[9:0])), rl_im[rr]);
      m_eq(w_re[rr], w_im[rr], xr_i, xi_i, yr, yi);
      @(posedge clk); #1;
      chk("y re", y.re, yr);
      chk("y im", y.im, yi);
    end
    @(negedge clk);
    eq_go = 0;
    // ---------------- data: LMS ----------------
    for (int it = 0; it < 3; it++)
      for (int rr = 0; rr < 64; rr++) begin
        longint er, ei, nr, ni;
        @(negedge clk);
        er = longint'($signed(7'($urandom()))); ei = longint'($signed(7'($urandom())));
        e.re = E_W'(er); e.im = E_W'(ei);
        rl_in = {RL_W'(rl_re[rr]), RL_W'(rl_im[rr])};
        rd1 = RF_W'(cpx_w_t'({W_W'(w_re[rr]), W_W'(w_im[rr])}));
        lms_go = 1;
        #1;
        m_lms(w_re[rr], w_im[rr], rl_re[rr], rl_im[rr], er, ei, nr, ni);
        chk("lms re", lms_w.re, nr);
        chk("lms im", lms_w.im, ni);
        w_re[rr] = nr; w_im[rr] = ni;
      end
    @(negedge clk);
    lms_go = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_ls(int rr);
    longint er, ei;
    real ideal_re, ideal_im, d, mag;
    m_ls_coef(s_re[rr], s_im[rr], uq_re[rr], uq_im[rr], er, ei);
    chk("ls valid", ls_valid, 1);
    chk("ls re", ls_w.re, er);
    chk("ls im", ls_w.im, ei);
    w_re[rr] = ls_w.re; w_im[rr] = ls_w.im;
    // ideal 1/(A H) in W units
    mag = hr[rr] * hr[rr] + hi[rr] * hi[rr];
    ideal_re = 524288.0 * hr[rr] / mag / AMP;
    ideal_im = -524288.0 * hi[rr] / mag / AMP;
    if (ur[8*rr] * ur[8*rr] + ui[8*rr] * ui[8*rr] > 100.0) begin
      d = (real'(ls_w.re) - ideal_re) ** 2 + (real'(ls_w.im) - ideal_im) ** 2;
      checks++;
      if (d > 0.0625 * (ideal_re ** 2 + ideal_im ** 2)) begin
        failures++;
        $display("row %0d: LS W (%0d,%0d) far from ideal (%f,%f)", rr, ls_w.re, ls_w.im, ideal_re, ideal_im);
      end
    end
  endtask
endmodule
