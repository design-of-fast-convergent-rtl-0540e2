// fde_core: 8-way parallel LS-LMS adaptive frequency-domain equalizer.
//
// Input: the FFT of each received 512-sample subblock (cyclic prefix already
// removed), 8 subcarriers per clock, 64 rows per subblock, r_valid high for
// each row (gaps between rows are allowed). At 216 MHz one row per clock is
// the 1728 MS/s sample rate.
// Output: the equalized spectrum Y = W * R for the IFFT, one row per clock,
// 1 cycle after the row entered (y_valid).
// Error input: the spectrum E of the decision error of the data subblocks,
// from the FFT that follows the slicer, in the same row order as Y, at any
// latency up to RB_BLOCKS subblocks.
//
// Operation (follows the reference design):
//  * train_start, then N_TRAIN (6) training subblocks: least-squares channel
//    estimation. SISO_1 (the shared register file) accumulates R; during the
//    last training subblock each lane computes W = 6 conj(S) U / |S|^2 with
//    the divider-free method and writes it over the sum (SISO_2). U comes
//    from train_rom. No output is produced in training.
//  * data subblocks: every row is equalized with the stored W; every error
//    row updates the W of its row with one LMS step (if lms_en).
// The row delay buffer for LMS, the handshake (valid strobes, no
// back-pressure) and the reset values are this design's choices.
//
// Rules of use (checked by assertions): after the last training row at least
// 3 cycles pass before the first data row, and errors only come back for
// rows that were equalized.
module fde_core
  import fde_pkg::*;
#(
  parameter int unsigned NTRAIN    = N_TRAIN,
  parameter int unsigned RB_BLOCKS = 4          // LMS delay buffer, subblocks
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       train_start,
  input  logic       lms_en,
  input  logic       r_valid,
  input  cpx_r_t     r [LANES],
  output logic       y_valid,
  output cpx_y_t     y [LANES],
  input  logic       e_valid,
  input  cpx_e_t     e [LANES],
  output stage_e     stage,
  output logic       ls_done,     // pulse: coefficients of a training written
  output logic       rb_overflow  // sticky: error latency beyond the buffer
);
  stage_e            st;
  logic [ROW_W-1:0]  row;
  logic              tr_first, tr_acc, tr_last, eq_go, lms_go, e_pop, data_enter;

  fde_ctrl #(.NTRAIN(NTRAIN)) u_ctrl (
    .clk, .rst_n, .train_start, .r_valid, .e_valid, .lms_en,
    .stage(st), .row, .tr_first, .tr_acc, .tr_last, .eq_go, .lms_go, .e_pop,
    .data_enter
  );
  assign stage = st;

  // ---------------- storage -----------------------------------------------
  logic [RF_W-1:0] rd0 [LANES], rd1 [LANES], wr_data [LANES];
  logic [RF_W-1:0] acc_data [LANES];
  logic [ROW_W-1:0] rd1_addr, wr_addr;
  logic             wr_en;
  cpx_u_t           u [LANES];

  coef_regfile #(.ROWS(ROWS), .LANES(LANES), .DW(RF_W)) u_rf (
    .clk,
    .rd0_addr(row), .rd0_data(rd0),
    .rd1_addr(rd1_addr), .rd1_data(rd1),
    .wr_en, .wr_addr, .wr_data
  );

  train_rom u_rom (.addr(row), .u(u));

  localparam int unsigned RB_DEPTH = RB_BLOCKS * ROWS;
  logic [2*RL_W-1:0] rl_out [LANES], rl_in [LANES];
  logic [$clog2(RB_DEPTH)-1:0] rb_rd_ptr;

  rdelay_buf #(.DEPTH(RB_DEPTH), .LANES(LANES), .DW(2*RL_W)) u_rbuf (
    .clk, .rst_n, .clear(data_enter), .push(eq_go), .wr_data(rl_out),
    .pop(e_pop), .rd_data(rl_in), .rd_ptr(rb_rd_ptr), .overflow(rb_overflow)
  );
  assign rd1_addr = rb_rd_ptr[ROW_W-1:0];

  // ---------------- lanes -------------------------------------------------
  logic   ls_valid [LANES];
  cpx_w_t ls_w [LANES], lms_w [LANES];

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    fde_lane u_lane (
      .clk, .rst_n,
      .r(r[l]), .u(u[l]), .rd0(rd0[l]),
      .tr_first, .tr_last, .eq_go,
      .acc_data(acc_data[l]), .rl_out(rl_out[l]),
      .ls_valid(ls_valid[l]), .ls_w(ls_w[l]),
      .y(y[l]),
      .lms_go, .e(e[l]), .rl_in(rl_in[l]), .rd1(rd1[l]), .lms_w(lms_w[l])
    );
  end

  // Row address of the LS result, 3 cycles behind the input row.
  logic [ROW_W-1:0] row_d [3];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) row_d[i] <= '0;
      y_valid <= 1'b0;
      ls_done <= 1'b0;
    end else begin
      row_d[0] <= row;
      row_d[1] <= row_d[0];
      row_d[2] <= row_d[1];
      y_valid  <= eq_go;
      ls_done  <= ls_valid[0] && row_d[2] == ROW_W'(ROWS - 1);
    end
  end

  // ---------------- register file write port ------------------------------
  always_comb begin
    wr_en   = 1'b0;
    wr_addr = row;
    for (int l = 0; l < LANES; l++) wr_data[l] = acc_data[l];
    if (ls_valid[0]) begin                // SISO_2 <- LS coefficient
      wr_en   = 1'b1;
      wr_addr = row_d[2];
      for (int l = 0; l < LANES; l++) wr_data[l] = RF_W'(ls_w[l]);
    end else if (tr_acc) begin            // SISO_1 <- running sum
      wr_en = 1'b1;
    end else if (lms_go) begin            // SISO_2 <- LMS update
      wr_en   = 1'b1;
      wr_addr = rd1_addr;
      for (int l = 0; l < LANES; l++) wr_data[l] = RF_W'(lms_w[l]);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(ls_valid[0] && (tr_acc || lms_go)))
    else $error("fde_core: register file write conflict");
  assert property (@(posedge clk) disable iff (!rst_n) !rb_overflow)
    else $error("fde_core: LMS delay buffer overflow");
endmodule
