// tb_fde_core: the 8-lane equalizer core end to end in the frequency domain.
// A frame: train_start, six training subblocks R = A H_k U_k + noise (rows
// with random gaps), data subblocks of random R, and error rows E coming
// back two subblocks late. Every output row Y is compared, bit exact, with a
// reference model that runs LS, the one-tap equalizer and LMS on its own copy
// of the coefficients; y_valid must follow r_valid by exactly one cycle and
// a subblock must take 64 cycles when rows come back to back. A second
// training is started in the middle of the data stage (re-estimation), and
// the LMS is switched off for part of the run.
module tb_fde_core;
  import fde_pkg::*;
  import tb_fde_model_pkg::*;
  localparam real AMP = 128.0;
  localparam int LAG = 2 * ROWS + 16;   // error latency in cycles
  logic clk = 0, rst_n = 0;
  logic train_start, lms_en, r_valid, y_valid, e_valid, ls_done, rb_overflow;
  cpx_r_t r [LANES];
  cpx_y_t y [LANES];
  cpx_e_t e [LANES];
  stage_e stage;
  int checks = 0, failures = 0, cycles = 0;
  int n_ls_done = 0, n_lms_rows = 0, n_y_rows = 0, n_retrain = 0;

  fde_core dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 400000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 20) $display("cycle %0d %s: got %0d exp %0d", cycles, what, got, exp); end
  endtask

  real ur [], ui [];
  real hr [512], hi [512];
  longint uq_re [512], uq_im [512], s_re [512], s_im [512], w_re [512], w_im [512];
  // expected outputs of the previous cycle, and the error pipeline
  longint exp_y_re [LANES], exp_y_im [LANES];
  bit     exp_y_valid = 0;
  typedef struct { longint rl_re [LANES]; longint rl_im [LANES]; int row; int due; } pend_t;
  pend_t pend [$];
  int data_row = 0;

  task automatic set_channel(real rot);
    for (int k = 0; k < 512; k++) begin
      real g, p;
      g = 1.0 + 0.5 * $cos(6.2831853 * k / 512.0 * 4.0);
      p = 0.02 * k + rot;
      hr[k] = g * $cos(p); hi[k] = g * $sin(p);
    end
  endtask

  // one clock cycle: drive inputs, check last cycle's output, update model
  task automatic cycle(bit ts, bit rv, int kind, int row, bit le);
    // kind: 0 training row of block b (row), 1 data row
    longint xr [LANES], xi [LANES];
    bit ev;
    @(negedge clk);
    // check outputs registered at the last edge
    chk("y_valid", y_valid, exp_y_valid);
    if (exp_y_valid) for (int l = 0; l < LANES; l++) begin
      chk("y re", y[l].re, exp_y_re[l]);
      chk("y im", y[l].im, exp_y_im[l]);
    end
    exp_y_valid = 0;
    train_start = ts; r_valid = rv; lms_en = le;
    for (int l = 0; l < LANES; l++) begin
      int k;
      k = row * LANES + l;
      if (kind == 0) begin
        xr[l] = rnd(AMP * (hr[k] * ur[k] - hi[k] * ui[k]) + 10.0 * grand());
        xi[l] = rnd(AMP * (hr[k] * ui[k] + hi[k] * ur[k]) + 10.0 * grand());
      end else begin
        xr[l] = longint'($signed(16'($urandom())));
        xi[l] = longint'($signed(16'($urandom())));
      end
      r[l].re = R_W'(xr[l]); r[l].im = R_W'(xi[l]);
    end
    // error row due now?
    ev = (pend.size() > 0 && pend[0].due <= cycles && stage_model == ST_DATA);
    e_valid = ev;
    if (ev) for (int l = 0; l < LANES; l++) begin
      e[l].re = E_W'($urandom()); e[l].im = E_W'($urandom());
    end
    // model: equalize with the current coefficients
    if (rv && kind == 1 && stage_model == ST_DATA) begin
      pend_t p;
      for (int l = 0; l < LANES; l++) begin
        int k;
        k = row * LANES + l;
        m_eq(w_re[k], w_im[k], xr[l], xi[l], exp_y_re[l], exp_y_im[l]);
        p.rl_re[l] = m_rl(xr[l]); p.rl_im[l] = m_rl(xi[l]);
      end
      exp_y_valid = 1;
      p.row = row; p.due = cycles + LAG;
      pend.push_back(p);
      n_y_rows++;
    end
    // model: LMS
    if (ev) begin
      pend_t p;
      p = pend.pop_front();
      if (le) begin
        n_lms_rows++;
        for (int l = 0; l < LANES; l++) begin
          int k;
          k = p.row * LANES + l;
          m_lms(w_re[k], w_im[k], p.rl_re[l], p.rl_im[l], longint'(e[l].re), longint'(e[l].im),
                w_re[k], w_im[k]);
        end
      end
    end
    // model: training
    if (rv && kind == 0) begin
      for (int l = 0; l < LANES; l++) begin
        int k;
        k = row * LANES + l;
        if (tblk == 0) begin s_re[k] = xr[l]; s_im[k] = xi[l]; end
        else begin s_re[k] += xr[l]; s_im[k] += xi[l]; end
        if (tblk == N_TRAIN - 1) m_ls_coef(s_re[k], s_im[k], uq_re[k], uq_im[k], w_re[k], w_im[k]);
      end
    end
    #1;
  endtask

  stage_e stage_model = ST_IDLE;
  int tblk = 0;

  task automatic train(bit gaps);
    stage_model = ST_TRAIN;
    pend.delete();
    for (int b = 0; b < N_TRAIN; b++) begin
      tblk = b;
      for (int rr = 0; rr < ROWS; rr++) begin
        while (gaps && ($urandom() % 5 == 0)) cycle(0, 0, 0, 0, 1);
        cycle(b == 0 && rr == 0, 1, 0, rr, 1);
      end
      repeat (8) cycle(0, 0, 0, 0, 1);   // pilot word / cyclic prefix gap
    end
    stage_model = ST_DATA;
  endtask

  task automatic data_blocks(int n, bit le);
    for (int b = 0; b < n; b++) begin
      int t0;
      t0 = cycles;
      for (int rr = 0; rr < ROWS; rr++) cycle(0, 1, 1, rr, le);
      chk("64 cycles per subblock", cycles - t0, ROWS);
      repeat (8) cycle(0, 0, 0, 0, le);
    end
  endtask

  always @(posedge clk) if (rst_n && ls_done) n_ls_done++;

  initial begin
    real xr0 [], xi0 [];
    xr0 = new[512]; xi0 = new[512];
    for (int n = 0; n < 512; n++) begin xr0[n] = real'(u512_chip(n)); xi0[n] = 0.0; end
    dft(xr0, xi0, -1, ur, ui);
    for (int k = 0; k < 512; k++) begin uq_re[k] = rnd(4.0 * ur[k]); uq_im[k] = rnd(4.0 * ui[k]); end
    train_start = 0; lms_en = 1; r_valid = 0; e_valid = 0;
    for (int l = 0; l < LANES; l++) begin r[l] = '0; e[l] = '0; end
    set_channel(0.0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) cycle(0, 1, 1, 0, 1);     // rows before any training: ignored
    train(1);
    chk("stage after training", stage, ST_DATA);
    data_blocks(4, 1);
    data_blocks(2, 0);                    // LMS off
    // re-estimation on a changed channel
    set_channel(0.7);
    n_retrain++;
    train(0);
    data_blocks(4, 1);
    repeat (LAG + 10) cycle(0, 0, 0, 0, 1);   // drain the errors
    chk("LS completions", n_ls_done, 2);
    chk("no buffer overflow", rb_overflow, 0);
    checks++; if (n_lms_rows < 5 * ROWS) begin failures++; $display("too few LMS rows %0d", n_lms_rows); end
    checks++; if (n_retrain != 1) failures++;
    $display("rows equalized %0d, LMS rows %0d", n_y_rows, n_lms_rows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
