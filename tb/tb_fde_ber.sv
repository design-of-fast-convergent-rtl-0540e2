// tb_fde_ber: bit-error-rate workload for the whole receiver loop (fde_top at
// its default parameters). pi/2-QPSK at Eb/N0 = 10 dB over an indoor
// multipath channel: a line-of-sight tap K_DB above 64 complex Gaussian
// scattered taps (inside the 64-sample cyclic prefix) with an exponential
// power profile of time constant 22 samples (12.7 ns at 1728 MS/s),
// normalized to unit power and fixed for the run. The channel is this
// testbench's own choice, not the standard's channel model.
// The testbench models the parts outside the design as in tb_fde_top: exact
// DFTs for the FFT, the IFFT and the error FFT, quantized to the design's
// word lengths. One training (6 subblocks) is followed by NBLK data
// subblocks with LMS tracking on.
// Reference: the same received samples equalized in floating point with the
// true channel (ideal zero-forcing FDE). Checks: every subblock returns 64
// Y rows and 64 bit rows; the hardware BER stays within
// 1.5 x ideal + 0.002; no delay-buffer overflow. Prints both BERs.
module tb_fde_ber;
  import fde_pkg::*;
  import tb_fde_model_pkg::*;
  localparam real AMP = 128.0;        // received symbol amplitude at the FFT input
  localparam real EBN0_DB = 10.0;
  localparam int  NBLK = 100;         // data subblocks (102400 bits)
  localparam int  NTAP = 64;
  localparam real TAU = 22.0;         // RMS delay spread in samples
  localparam real K_DB = 10.0;        // power of the line-of-sight tap over the scattered taps
  localparam int  DEC = 1024;
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
  longint n_bits = 0, hw_errors = 0, ideal_errors = 0;
  real sigma;                         // noise std per real dimension, time domain

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 5000000);
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

  task automatic make_channel();
    real tr [], ti [], pw, tot;
    tr = new[N]; ti = new[N];
    for (int n = 0; n < N; n++) begin tr[n] = 0.0; ti[n] = 0.0; end
    tot = 0.0;
    for (int i = 0; i < NTAP; i++) begin
      pw = $exp(-real'(i) / TAU);
      tr[i] = $sqrt(pw / 2.0) * grand();
      ti[i] = $sqrt(pw / 2.0) * grand();
      tot += tr[i] * tr[i] + ti[i] * ti[i];
    end
    for (int i = 0; i < NTAP; i++) begin tr[i] /= $sqrt(tot); ti[i] /= $sqrt(tot); end
    tr[0] += $sqrt($pow(10.0, K_DB / 10.0));         // line-of-sight path
    tot = 0.0;
    for (int i = 0; i < NTAP; i++) tot += tr[i] * tr[i] + ti[i] * ti[i];
    for (int i = 0; i < NTAP; i++) begin tr[i] /= $sqrt(tot); ti[i] /= $sqrt(tot); end
    dft(tr, ti, -1, hr, hi);
  endtask

  // one received subblock R = A H X + noise; returns Y and the unquantized R
  task automatic send_r(real xr [], real xi [], output longint yr [], output longint yi [],
                        output real rr_re [], output real rr_im []);
    int got;
    stage_e st0;
    st0 = stage;
    yr = new[N]; yi = new[N]; rr_re = new[N]; rr_im = new[N];
    got = 0;
    for (int rr = 0; rr <= ROWS; rr++) begin
      @(negedge clk);
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
        real sg;
        k = rr * LANES + l;
        sg = sigma * AMP * $sqrt(real'(N));
        rr_re[k] = AMP * (hr[k] * xr[k] - hi[k] * xi[k]) + sg * grand();
        rr_im[k] = AMP * (hr[k] * xi[k] + hi[k] * xr[k]) + sg * grand();
        r[l].re = R_W'(m_sat(rnd(rr_re[k]), R_W)); r[l].im = R_W'(m_sat(rnd(rr_im[k]), R_W));
      end
    end
    @(negedge clk);
    r_valid = 0;
    if (st0 == ST_DATA) chk("Y rows per subblock", got, ROWS);
  endtask

  // pi/2 derotation z = j^n s  ->  s = (-j)^n z
  function automatic void derot(int n, real zr, real zi, output real sr, output real si);
    case (n % 4)
      0: begin sr = zr;  si = zi;  end
      1: begin sr = zi;  si = -zr; end
      2: begin sr = -zr; si = -zi; end
      default: begin sr = -zi; si = zr; end
    endcase
  endfunction

  task automatic data_block();
    real zr [], zi [], xr [], xi [], tyr [], tyi [], ter [], tei [], er [], ei [];
    real yrr [], yri [], rr_re [], rr_im [], qr [], qi [], dr [], di [];
    longint yr [], yi [];
    int sb0 [], sb1 [], got;
    zr = new[N]; zi = new[N]; sb0 = new[N]; sb1 = new[N];
    mod = MOD_QPSK; lms_en = 1;
    for (int n = 0; n < N; n++) begin
      real sr, si;
      sb0[n] = $urandom() % 2; sb1[n] = $urandom() % 2;
      sr = sb0[n] ? 1.0 : -1.0;
      si = sb1[n] ? 1.0 : -1.0;
      case (n % 4)
        0: begin zr[n] = sr;  zi[n] = si;  end
        1: begin zr[n] = -si; zi[n] = sr;  end
        2: begin zr[n] = -sr; zi[n] = -si; end
        default: begin zr[n] = si; zi[n] = -sr; end
      endcase
    end
    dft(zr, zi, -1, xr, xi);
    send_r(xr, xi, yr, yi, rr_re, rr_im);
    // ideal zero-forcing reference on the same samples
    qr = new[N]; qi = new[N];
    for (int k = 0; k < N; k++) begin
      real m2;
      m2 = AMP * (hr[k] * hr[k] + hi[k] * hi[k]);
      qr[k] = (rr_re[k] * hr[k] + rr_im[k] * hi[k]) / m2;
      qi[k] = (rr_im[k] * hr[k] - rr_re[k] * hi[k]) / m2;
    end
    dft(qr, qi, 1, dr, di);
    for (int n = 0; n < N; n++) begin
      real sr, si;
      derot(n, dr[n] / N, di[n] / N, sr, si);
      if ((sr > 0.0) != (sb0[n] == 1)) ideal_errors++;
      if ((si > 0.0) != (sb1[n] == 1)) ideal_errors++;
    end
    // hardware path: IFFT model, demapper, error FFT model
    yrr = new[N]; yri = new[N];
    for (int k = 0; k < N; k++) begin yrr[k] = real'(yr[k]); yri[k] = real'(yi[k]); end
    dft(yrr, yri, 1, tyr, tyi);
    ter = new[N]; tei = new[N];
    got = 0;
    for (int rr = 0; rr <= ROWS; rr++) begin
      @(negedge clk);
      if (rr > 0 && bits_valid) begin
        got++;
        for (int l = 0; l < LANES; l++) begin
          int n;
          n = (rr - 1) * LANES + l;
          if (bits[l][0] != 1'(sb0[n])) hw_errors++;
          if (bits[l][1] != 1'(sb1[n])) hw_errors++;
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
    chk("bit rows per subblock", got, ROWS);
    n_bits += 2 * N;
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
    end
    @(negedge clk);
    e_valid = 0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    real xr0 [], xi0 [], ber_hw, ber_id;
    longint yr [], yi [];
    real d0 [], d1 [];
    xr0 = new[N]; xi0 = new[N];
    for (int n = 0; n < N; n++) begin xr0[n] = real'(u512_chip(n)); xi0[n] = 0.0; end
    dft(xr0, xi0, -1, ur, ui);
    // Eb = 1 per bit (each QPSK axis +-1); N0 = Eb / 10^(EbN0/10); sigma^2 = N0/2
    sigma = $sqrt(0.5 * $pow(10.0, -EBN0_DB / 10.0));
    train_start = 0; lms_en = 1; r_valid = 0; t_valid = 0; e_valid = 0; mod = MOD_QPSK;
    for (int l = 0; l < LANES; l++) begin r[l] = '0; t[l] = '0; e[l] = '0; end
    make_channel();
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    train_start = 1;
    @(negedge clk);
    train_start = 0;
    for (int b = 0; b < N_TRAIN; b++) begin
      send_r(ur, ui, yr, yi, d0, d1);
      repeat (8) @(negedge clk);
    end
    chk("stage data after training", stage, ST_DATA);
    for (int b = 0; b < NBLK; b++) data_block();
    ber_hw = real'(hw_errors) / real'(n_bits);
    ber_id = real'(ideal_errors) / real'(n_bits);
    $display("Eb/N0 %0.1f dB, %0d bits: BER hardware %e (%0d errors), ideal ZF %e (%0d errors)",
             EBN0_DB, n_bits, ber_hw, hw_errors, ber_id, ideal_errors);
    checks++;
    if (!(ber_hw <= 1.5 * ber_id + 0.002)) begin
      failures++; $display("hardware BER too far above the ideal equalizer");
    end
    chk("no delay-buffer overflow", rb_overflow, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
