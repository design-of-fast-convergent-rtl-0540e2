// pi2_demapper: slicer and pi/2-BPSK / pi/2-QPSK demapper on the equalized
// time-domain samples (IFFT output), 8 samples per clock.
//
// A pi/2 modulated sample is z_n = j^n * s_n. Following the reference design's revised
// demapper, the decision is taken directly on the received (still rotated)
// sample, so the decision can feed the LMS error without rotating it back:
//   QPSK : decision = (sgn(re), sgn(im)) * DEC_AMP  (the rotation keeps the
//          QPSK decision regions)
//   BPSK : the symbol lies on the real axis at even n and on the imaginary
//          axis at odd n, so only that axis is sliced; the other is 0.
// Only the (exact) decision is rotated back by (-j)^n to recover the bits.
// Sample n of a subblock is lane n % 8 and 512 is a multiple of 4, so the
// rotation of lane l is fixed: (-j)^(l % 4).
// Bit mapping (own choice; the mapping equation is not reproduced here):
//   BPSK s = 2 b0 - 1;  QPSK s = (2 b0 - 1) + j (2 b1 - 1);  sgn(0) = +1.
// err = decision - sample, the time-domain error whose FFT drives the LMS.
//
// One cycle latency: t_valid/t in, out_valid/bits/dec/err out one clock later.
module pi2_demapper
  import fde_pkg::*;
#(
  parameter int DEC_AMP = 1024  // decision amplitude per axis, IFFT LSBs
) (
  input  logic       clk,
  input  logic       rst_n,
  input  mod_e       mod,
  input  logic       t_valid,
  input  cpx_t_t     t [LANES],
  output logic       out_valid,
  output logic [1:0] bits [LANES],
  output cpx_t_t     dec [LANES],
  output cpx_err_t   err [LANES]
);
  localparam logic signed [T_W-1:0] AMP = T_W'(DEC_AMP);

  logic [1:0] bits_c [LANES];
  cpx_t_t     dec_c  [LANES];
  cpx_err_t   err_c  [LANES];

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      logic pos_re, pos_im, b_even;
      logic [1:0] q;
      q      = 2'(l % 4);
      pos_re = !t[l].re[T_W-1];
      pos_im = !t[l].im[T_W-1];
      if (mod == MOD_BPSK) begin
        if (!q[0]) begin
          dec_c[l].re = pos_re ? AMP : -AMP;
          dec_c[l].im = '0;
          b_even      = pos_re;
        end else begin
          dec_c[l].re = '0;
          dec_c[l].im = pos_im ? AMP : -AMP;
          b_even      = pos_im;
        end
        // q = 0: s = re, 1: s = im, 2: s = -re, 3: s = -im
        bits_c[l] = {1'b0, q[1] ? !b_even : b_even};
      end else begin
        dec_c[l].re = pos_re ? AMP : -AMP;
        dec_c[l].im = pos_im ? AMP : -AMP;
        // rotate the decision back by (-j)^q and read the signs
        unique case (q)
          2'd0: bits_c[l] = {pos_im,  pos_re};
          2'd1: bits_c[l] = {!pos_re, pos_im};
          2'd2: bits_c[l] = {!pos_im, !pos_re};
          default: bits_c[l] = {pos_re, !pos_im};
        endcase
      end
      err_c[l].re = ERR_W'(dec_c[l].re) - ERR_W'(t[l].re);
      err_c[l].im = ERR_W'(dec_c[l].im) - ERR_W'(t[l].im);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int l = 0; l < LANES; l++) begin
        bits[l] <= '0;
        dec[l]  <= '0;
        err[l]  <= '0;
      end
    end else begin
      out_valid <= t_valid;
      if (t_valid)
        for (int l = 0; l < LANES; l++) begin
          bits[l] <= bits_c[l];
          dec[l]  <= dec_c[l];
          err[l]  <= err_c[l];
        end
    end
  end
endmodule
