// fde_top: LS-LMS adaptive frequency-domain equalizer of a single-carrier
// block-transmission receiver (IEEE 802.15.3c SC mode, 1728 MS/s), 8-way
// parallel at 216 MHz.
//
// The loop of the receiver:
//   FFT --r--> fde_core --y--> IFFT --t--> pi2_demapper --bits-->
//                 ^                             | err
//                 +------- e <--- FFT <---------+
// The 512-point FFT/IFFT are outside this design (their ports are the r, y,
// t, err and e buses). fde_core does the LS channel estimation in training
// and one-tap equalization plus LMS tracking on data; pi2_demapper slices
// the equalized time-domain samples, demaps pi/2-BPSK or pi/2-QPSK and
// returns the decision error.
//
// All buses carry 8 samples per clock with a valid strobe; latencies: y one
// cycle after r, bits/err one cycle after t. The error e may come back at any
// latency up to four subblocks.
module fde_top
  import fde_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // control
  input  logic       train_start,   // next 6 subblocks are training
  input  logic       lms_en,        // enable LMS tracking in the data stage
  input  mod_e       mod,           // pi/2-BPSK or pi/2-QPSK
  // from the FFT
  input  logic       r_valid,
  input  cpx_r_t     r [LANES],
  // to the IFFT
  output logic       y_valid,
  output cpx_y_t     y [LANES],
  // from the IFFT
  input  logic       t_valid,
  input  cpx_t_t     t [LANES],
  // demapped bits
  output logic       bits_valid,
  output logic [1:0] bits [LANES],
  // decision error, to the error FFT
  output cpx_err_t   err [LANES],
  // from the error FFT
  input  logic       e_valid,
  input  cpx_e_t     e [LANES],
  // status
  output stage_e     stage,
  output logic       ls_done,
  output logic       rb_overflow
);
  cpx_t_t dec [LANES];

  fde_core u_core (
    .clk, .rst_n, .train_start, .lms_en,
    .r_valid, .r, .y_valid, .y, .e_valid, .e,
    .stage, .ls_done, .rb_overflow
  );

  pi2_demapper u_demap (
    .clk, .rst_n, .mod, .t_valid, .t,
    .out_valid(bits_valid), .bits, .dec, .err
  );
endmodule
