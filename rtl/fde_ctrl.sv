// fde_ctrl: stage controller of the equalizer.
//
// The receiver first sees N_TRAIN training subblocks (the six u512 copies of
// the channel-estimation field) and then the data subblocks. Training and
// data never overlap, which is what lets the LS and the LMS/one-tap
// equalizer share multipliers and storage:
//   ST_IDLE  : after reset, until the first train_start
//   ST_TRAIN : LS stage; block 0 stores R, blocks 1..N_TRAIN-2 accumulate,
//              block N_TRAIN-1 adds its R and computes the coefficients
//   ST_DATA  : one-tap equalization of every row, LMS on every error row
// train_start (a pulse on or before the first training row) starts a new
// training from any stage, e.g. for a periodic channel-estimation sequence.
// The stage sequence follows the reference design; the pulse interface is own choice.
//
// Rows are counted on r_valid (64 rows make a subblock); the decoded outputs
// describe the row presented in the same cycle (combinational), the counters
// advance at the clock edge.
module fde_ctrl
  import fde_pkg::*;
#(
  parameter int unsigned NTRAIN = N_TRAIN
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             train_start,
  input  logic             r_valid,
  input  logic             e_valid,
  input  logic             lms_en,
  output stage_e           stage,       // stage of the current row
  output logic [ROW_W-1:0] row,         // row index of the current R row
  output logic             tr_first,    // training row of block 0
  output logic             tr_acc,      // training row to be stored
  output logic             tr_last,     // training row of the last block
  output logic             eq_go,       // data row to equalize
  output logic             lms_go,      // error row to use for LMS
  output logic             e_pop,       // error row accepted (data stage)
  output logic             data_enter   // pulse: training just completed
);
  localparam int unsigned BLK_W = (NTRAIN > 1) ? $clog2(NTRAIN) : 1;

  stage_e            stage_q;
  logic [ROW_W-1:0]  row_q;
  logic [BLK_W-1:0]  blk_q, blk;

  initial assert (NTRAIN >= 2) else $error("fde_ctrl: NTRAIN must be at least 2");

  always_comb begin
    stage = train_start ? ST_TRAIN : stage_q;
    row   = train_start ? '0 : row_q;
    blk   = train_start ? '0 : blk_q;
    tr_first = r_valid && stage == ST_TRAIN && blk == '0;
    tr_last  = r_valid && stage == ST_TRAIN && blk == BLK_W'(NTRAIN - 1);
    tr_acc   = r_valid && stage == ST_TRAIN && !tr_last;
    eq_go    = r_valid && stage == ST_DATA;
    e_pop    = e_valid && stage == ST_DATA;
    lms_go   = e_pop && lms_en;
    data_enter = tr_last && row == ROW_W'(ROWS - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage_q <= ST_IDLE;
      row_q   <= '0;
      blk_q   <= '0;
    end else begin
      stage_q <= stage;
      row_q   <= row;
      blk_q   <= blk;
      if (r_valid && stage != ST_IDLE) begin
        row_q <= row + 1'b1;   // wraps after ROWS-1 (ROWS is 2^ROW_W)
        if (stage == ST_TRAIN && row == ROW_W'(ROWS - 1)) begin
          if (blk == BLK_W'(NTRAIN - 1)) begin
            blk_q   <= '0;
            stage_q <= ST_DATA;
          end else begin
            blk_q <= blk + 1'b1;
          end
        end
      end
    end
  end
endmodule
