// fde_pkg: shared constants, word lengths and types of the LS-LMS
// frequency-domain equalizer (FDE).
//
// The equalizer works on 512-subcarrier subblocks delivered 8 subcarriers per
// clock (8-way parallel at 216 MHz gives the 1728 MS/s sample rate). Subcarrier
// k of a subblock sits in row k/8, lane k%8, so a subblock is 64 rows.
//
// Word lengths that follow the reference design: FFT output R 21 bits, equalizer
// coefficient W 15 bits, IFFT input/output 13 bits, LMS operands 10 x 7 bits,
// LS operands 19 x 16, power measurement 13 x 13, divider scalar multiply
// 11 x 13, 14-bit power scalar, 4 significant bits and 13-bit inverse table.
// The fixed-point scaling (the shift constants below) is this design's own
// choice; see the README for the number formats.
package fde_pkg;

  // ---- structure ------------------------------------------------------
  localparam int unsigned LANES   = 8;     // parallel subcarriers per clock
  localparam int unsigned N_FFT   = 512;   // subcarriers per subblock
  localparam int unsigned ROWS    = N_FFT / LANES;  // 64 rows per subblock
  localparam int unsigned ROW_W   = $clog2(ROWS);
  localparam int unsigned N_TRAIN = 6;     // u512 copies in the CMS CES field

  // ---- word lengths ---------------------------------------------------
  localparam int unsigned R_W    = 21;  // FFT output (equalizer input)
  localparam int unsigned W_W    = 15;  // equalizer coefficient
  localparam int unsigned Y_W    = 13;  // equalizer output (IFFT input)
  localparam int unsigned T_W    = 13;  // IFFT output (time domain)
  localparam int unsigned ERR_W  = T_W + 1;  // time-domain decision error
  localparam int unsigned E_W    = 7;   // frequency-domain error for LMS
  localparam int unsigned RL_W   = 10;  // R as seen by the LMS multiplier
  localparam int unsigned U_W    = 9;   // stored training spectrum
  localparam int unsigned S_W    = 24;  // sum of six R (SISO_1)
  localparam int unsigned MA_W   = 19;  // wide operand of cmul_conj
  localparam int unsigned MB_W   = 16;  // narrow operand of cmul_conj
  localparam int unsigned PIN_W  = 13;  // power measurement operand
  localparam int unsigned SCAL_W = 14;  // power scalar fed to the table
  localparam int unsigned SB_W   = 4;   // significant bits of the scalar
  localparam int unsigned INV_W  = 13;  // inverse table entry (unsigned)
  localparam int unsigned DN_W   = 4;   // shift amount, 0..SCAL_W-SB_W
  localparam int unsigned P_W    = 11;  // U*conj(S) entering the scalar mult
  localparam int unsigned RF_W   = 2 * S_W;  // shared register file entry

  // ---- fixed-point scaling (own choice) -------------------------------
  localparam int unsigned W_FRAC = 19;  // fractional bits of W
  localparam int unsigned U_FRAC = 2;   // fractional bits of the U table
  localparam int unsigned Y_FRAC = 5;   // fractional bits of Y (U units)
  localparam int unsigned SH_RL  = 4;   // R   -> 10-bit LMS operand
  localparam int unsigned SH_SA  = 1;   // S   -> 19-bit LS operand
  localparam int unsigned SH_SP  = 4;   // S   -> 13-bit power operand
  localparam int unsigned SH_PW  = 12;  // 26-bit power -> 14-bit scalar
  localparam int unsigned SH_PS  = 12;  // U*conj(S) -> 11 bits
  localparam int unsigned SH_LS  = 6;   // final LS shift (besides dn)
  localparam int unsigned SH_Y   = W_FRAC - Y_FRAC;  // W*R -> Y
  localparam int unsigned SH_MU  = 7;   // LMS step size mu = 2^-SH_MU

  // ---- types ----------------------------------------------------------
  typedef struct packed { logic signed [R_W-1:0]   re, im; } cpx_r_t;
  typedef struct packed { logic signed [W_W-1:0]   re, im; } cpx_w_t;
  typedef struct packed { logic signed [Y_W-1:0]   re, im; } cpx_y_t;
  typedef struct packed { logic signed [T_W-1:0]   re, im; } cpx_t_t;
  typedef struct packed { logic signed [ERR_W-1:0] re, im; } cpx_err_t;
  typedef struct packed { logic signed [E_W-1:0]   re, im; } cpx_e_t;
  typedef struct packed { logic signed [U_W-1:0]   re, im; } cpx_u_t;
  typedef struct packed { logic signed [S_W-1:0]   re, im; } cpx_s_t;

  // Stages in execution order: LS during training, EQ+LMS on data.
  typedef enum logic [1:0] {ST_IDLE = 2'd0, ST_TRAIN = 2'd1, ST_DATA = 2'd2} stage_e;

  // Modulations the design supports (pi/2 BPSK and pi/2 QPSK).
  typedef enum logic {MOD_BPSK = 1'b0, MOD_QPSK = 1'b1} mod_e;

  // Signed saturation of a wide value to OUT_W bits (returned sign-extended
  // in 64 bits; callers take the low OUT_W bits).
  function automatic logic signed [63:0] sat(input logic signed [63:0] v,
                                             input int unsigned out_w);
    logic signed [63:0] hi, lo;
    hi = (64'sd1 <<< (out_w - 1)) - 64'sd1;
    lo = -(64'sd1 <<< (out_w - 1));
    if (v > hi)      return hi;
    else if (v < lo) return lo;
    else             return v;
  endfunction

  // Arithmetic right shift by sh with rounding half up (sh = 0: no change).
  function automatic logic signed [63:0] rsh(input logic signed [63:0] v,
                                             input int unsigned sh);
    if (sh == 0) return v;
    return (v + (64'sd1 <<< (sh - 1))) >>> sh;
  endfunction

endpackage
