// coef_regfile: the register file shared by SISO_1 and SISO_2.
//
// SISO_1 holds the running sum of the received training subblocks, SISO_2 the
// equalizer coefficients. They are never live at the same time (training
// comes first, then data), so one register file serves both, as the
// reference design proposes. A row holds one entry per lane; ROWS rows cover one
// 512-subcarrier subblock.
//
// Two asynchronous read ports (the one-tap equalizer and the LMS update both
// fetch coefficients, which is why the reference design prefers a register file to a
// RAM) and one synchronous write port that writes all lanes of a row.
// A read of the row being written returns the old value. The array has no
// reset: every row is written in the first training subblock before it is
// read, and coefficients are only read after the last one (own choice).
module coef_regfile #(
  parameter int unsigned ROWS  = 64,
  parameter int unsigned LANES = 8,
  parameter int unsigned DW    = 48
) (
  input  logic                     clk,
  input  logic [$clog2(ROWS)-1:0]  rd0_addr,
  output logic [DW-1:0]            rd0_data [LANES],
  input  logic [$clog2(ROWS)-1:0]  rd1_addr,
  output logic [DW-1:0]            rd1_data [LANES],
  input  logic                     wr_en,
  input  logic [$clog2(ROWS)-1:0]  wr_addr,
  input  logic [DW-1:0]            wr_data [LANES]
);
  logic [LANES*DW-1:0] mem [ROWS];
  logic [LANES*DW-1:0] wr_row, rd0_row, rd1_row;

  always_comb begin
    for (int l = 0; l < LANES; l++) wr_row[l*DW +: DW] = wr_data[l];
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_row;
  end

  assign rd0_row = mem[rd0_addr];
  assign rd1_row = mem[rd1_addr];

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      rd0_data[l] = rd0_row[l*DW +: DW];
      rd1_data[l] = rd1_row[l*DW +: DW];
    end
  end
endmodule
