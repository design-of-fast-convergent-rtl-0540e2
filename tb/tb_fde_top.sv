// tb_fde_top: whole receiver loop at the default configuration (8 lanes,
// 512 subcarriers, 6 training subblocks). The testbench plays the parts that
// are outside the design: the channel, the FFT in front of the equalizer,
// the IFFT behind it and the FFT of the decision error (exact real-valued
// DFTs, quantized to the design's word lengths).
// Channel: a 5-tap multipath impulse response (inside the 64-sample cyclic
// prefix) whose phase drifts from subblock to subblock, plus white noise.
// Frame 1: training, then pi/2-QPSK and pi/2-BPSK data with LMS tracking.
// Frame 2: re-training in the middle of the data stage (periodic channel
// re-estimation), then the same drifting channel with LMS switched off.
// Checks: no bit errors while LMS tracks, lower decision-error power with
// LMS than without, y and bits latencies of one cycle, and that each
// mechanism (LS training, one-tap EQ, LMS update, re-training, BPSK, QPSK,
// LMS off) happened.
module tb_fde_top;
  import fde_pkg::*;
  import tb_fde_model_pkg::*;
  localparam real AMP = 128.0;        // received symbol amplitude at the FFT input
  localparam real NOISE = 0.03;       // noise std per real dimension, time domain
  localparam real DRIFT = 0.02;       // channel phase change per subblock, rad
  localparam int  DEC = 1024;         // demapper decision amplitude (default)
  localparam int  N = 512;

  logic clk = 0, rst_n = 0;
  logic train_start, lms_en, r_valid, y_valid, t_valid, bits_valid, e_valid;
  logic ls_done, rb_overflow;
  mod_e mod;
  cpx_r_t r [LANES];
  cpx_y_t y [LANES];
  cpx_t_t t [LANES];
  logic [1:0] bits [LANES];
  cpx_err_t err [LANES];
  cpx_e_t e [LANES];
  stage_e stage;

  fde_top dut (.*);

  int checks = 0, failures = 0, cycles = 0;
  int n_train = 0, n_eq_rows = 0, n_lms_rows = 0, n_retrain = 0, n_bpsk = 0, n_qpsk = 0,
      n_lms_off = 0, bit_errors = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  always @(posedge clk) if (rst_n && ls_done) n_train++;
  initial begin
    wait (cycles == 2000000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 20) $display("cycle %0d %s: got %0d exp %0d", cycles, what, got, exp); end
  endtask

  real ur [], ui [];          // spectrum of u512
  real hr [], hi [];          // channel frequency response
  real phase = 0.0;

  task automatic make_channel();
    real tr [], ti [];
    real amp [5] = '{1.0, 0.45, 0.3, 0.2, 0.1};
    int  dly [5] = '{0, 3, 7, 15, 30};
    tr = new[N]; ti = new[N];
    for (int n = 0; n < N; n++) begin tr[n] = 0.0; ti[n] = 0.0; end
    for (int i = 0; i < 5; i++) begin
      tr[dly[i]] = amp[i] * $cos(1.3 * i + phase);
      ti[dly[i]] = amp[i] * $sin(1.3 * i + phase);
    end
    dft(tr, ti, -1, hr, hi);
  endtask

  // send one received subblock R = A H X + noise and collect Y
  task automatic send_r(real xr [], real xi [], output longint yr [], output longint yi []);
    int got;
    stage_e st0;
    st0 = stage;
    yr = new[N]; yi = new[N];
    got = 0;
    for (int rr = 0; rr <= ROWS; rr++) begin
      @(negedge clk);
      // Y of the previous row
      if (y_valid) begin
        for (int l = 0; l < LANES; l++) begin
          yr[(rr-1)*LANES+l] = longint'(y[l].re); yi[(rr-1)*LANES+l] = longint'(y[l].im);
        end
        got++;
      end
      train_start = 0;
      r_valid = (rr < ROWS);
      if (rr < ROWS) for (int l = 0; l < LANES; l++) begin
        int k;
        real vr, vi, sg;
        k = rr * LANES + l;
        sg = NOISE * AMP * $sqrt(real'(N));
        vr = AMP * (hr[k] * xr[k] - hi[k] * xi[k]) + sg * grand();
        vi = AMP * (hr[k] * xi[k] + hi[k] * xr[k]) + sg * grand();
        r[l].re = R_W'(m_sat(rnd(vr), R_W)); r[l].im = R_W'(m_sat(rnd(vi), R_W));
      end
    end
    @(negedge clk);
    r_valid = 0;
    if (st0 == ST_DATA) begin
      chk("Y rows one cycle after R rows", got, ROWS);
      n_eq_rows += got;
    end
  endtask

  task automatic training(bit mid_data);
    longint yr [], yi [];
    if (mid_data) n_retrain++;
    @(negedge clk);
    train_start = 1;               // pulse one cycle before the first row
    @(negedge clk);
    train_start = 0;
    for (int b = 0; b < N_TRAIN; b++) begin
      send_r(ur, ui, yr, yi);
      repeat (8) @(negedge clk);
    end
    chk("stage data after training", stage, ST_DATA);
  endtask

  // one data subblock around the whole loop; returns decision-error power
  task automatic data_block(mod_e m, bit le, output real epow);
    real zr [], zi [], xr [], xi [], tyr [], tyi [], ter [], tei [], er [], ei [];
    real yrr [], yri [];
    longint yr [], yi [];
    int sb0 [], sb1 [];
    zr = new[N]; zi = new[N]; sb0 = new[N]; sb1 = new[N];
    if (m == MOD_BPSK) n_bpsk++; else n_qpsk++;
    if (!le) n_lms_off++;
    mod = m; lms_en = le;
    for (int n = 0; n < N; n++) begin
      real sr, si;
      sb0[n] = $urandom() % 2; sb1[n] = $urandom() % 2;
      sr = sb0[n] ? 1.0 : -1.0;
      si = (m == MOD_QPSK) ? (sb1[n] ? 1.0 : -1.0) : 0.0;
      case (n % 4)     // z = j^n s
        0: begin zr[n] = sr;  zi[n] = si;  end
        1: begin zr[n] = -si; zi[n] = sr;  end
        2: begin zr[n] = -sr; zi[n] = -si; end
        default: begin zr[n] = si; zi[n] = -sr; end
      endcase
    end
    dft(zr, zi, -1, xr, xi);
    send_r(xr, xi, yr, yi);
    // IFFT: 1/N inverse, then scaled so a unit symbol is DEC LSBs
    yrr = new[N]; yri = new[N];
    for (int k = 0; k < N; k++) begin yrr[k] = real'(yr[k]); yri[k] = real'(yi[k]); end
    dft(yrr, yri, 1, tyr, tyi);
    ter = new[N]; tei = new[N];
    // time domain through the demapper
    for (int rr = 0; rr <= ROWS; rr++) begin
      @(negedge clk);
      if (rr > 0) begin
        chk("bits one cycle after t", bits_valid, 1);
        for (int l = 0; l < LANES; l++) begin
          int n;
          n = (rr - 1) * LANES + l;
          if (bits[l][0] != 1'(sb0[n])) bit_errors++;
          if (m == MOD_QPSK && bits[l][1] != 1'(sb1[n])) bit_errors++;
          ter[n] = real'(err[l].re); tei[n] = real'(err[l].im);
        end
      end
      t_valid = (rr < ROWS);
      if (rr < ROWS) for (int l = 0; l < LANES; l++) begin
        int n;
        n = rr * LANES + l;
        t[l].re = T_W'(m_sat(rnd(tyr[n] / N * DEC / 32.0), T_W));
        t[l].im = T_W'(m_sat(rnd(tyi[n] / N * DEC / 32.0), T_W));
      end
    end
    @(negedge clk);
    t_valid = 0;
    epow = 0.0;
    for (int n = 0; n < N; n++) epow += (ter[n] * ter[n] + tei[n] * tei[n]) / (real'(DEC) * DEC);
    epow /= N;
    // FFT of the error, scaled to the LMS error format (16 LSBs per unit)
    dft(ter, tei, -1, er, ei);
    for (int rr = 0; rr < ROWS; rr++) begin
      @(negedge clk);
      e_valid = 1;
      for (int l = 0; l < LANES; l++) begin
        int k;
        k = rr * LANES + l;
        e[l].re = E_W'(m_sat(rnd(er[k] / 64.0), E_W));
        e[l].im = E_W'(m_sat(rnd(ei[k] / 64.0), E_W));
      end
      if (le) n_lms_rows++;
    end
    @(negedge clk);
    e_valid = 0;
    repeat (4) @(negedge clk);
    // channel drifts before the next subblock
    phase += DRIFT;
    make_channel();
  endtask

  initial begin
    real xr0 [], xi0 [], p, p_on, p_off;
    int be0;
    xr0 = new[N]; xi0 = new[N];
    for (int n = 0; n < N; n++) begin xr0[n] = real'(u512_chip(n)); xi0[n] = 0.0; end
    dft(xr0, xi0, -1, ur, ui);
    train_start = 0; lms_en = 1; r_valid = 0; t_valid = 0; e_valid = 0; mod = MOD_QPSK;
    for (int l = 0; l < LANES; l++) begin r[l] = '0; t[l] = '0; e[l] = '0; end
    make_channel();
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- frame 1: LS training, then tracking with LMS ----
    training(0);
    for (int b = 0; b < 14; b++) begin
      data_block((b % 4 == 3) ? MOD_BPSK : MOD_QPSK, 1, p);
      if (b == 0) $display("first data subblock error power %f", p);
    end
    data_block(MOD_QPSK, 1, p_on);
    chk("no bit errors with LMS tracking", bit_errors, 0);
    $display("error power after 15 subblocks with LMS: %f", p_on);
    // ---- frame 2: re-training mid data, then no LMS ----
    be0 = bit_errors;
    training(1);
    for (int b = 0; b < 14; b++) data_block(MOD_QPSK, 0, p);
    data_block(MOD_QPSK, 0, p_off);
    $display("error power after 15 subblocks without LMS: %f", p_off);
    checks++;
    if (!(p_on < 0.5 * p_off)) begin failures++; $display("LMS does not track: %f vs %f", p_on, p_off); end
    chk("LS trainings", n_train, 2);
    chk("no delay-buffer overflow", rb_overflow, 0);
    checks++; if (n_eq_rows == 0)  begin failures++; $display("no EQ rows"); end
    checks++; if (n_lms_rows == 0) begin failures++; $display("no LMS rows"); end
    checks++; if (n_retrain == 0)  begin failures++; $display("no re-training"); end
    checks++; if (n_bpsk == 0)     begin failures++; $display("no BPSK"); end
    checks++; if (n_qpsk == 0)     begin failures++; $display("no QPSK"); end
    checks++; if (n_lms_off == 0)  begin failures++; $display("no LMS-off block"); end
    $display("trainings %0d, EQ rows %0d, LMS rows %0d, re-trainings %0d, BPSK %0d, QPSK %0d, LMS-off %0d, bit errors without LMS %0d",
             n_train, n_eq_rows, n_lms_rows, n_retrain, n_bpsk, n_qpsk, n_lms_off, bit_errors - be0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
