// rdelay_buf: holds the LMS copy of the received spectrum R until the
// frequency-domain error E of the same subcarriers comes back.
//
// In the data stage the error of a subblock is only known after the
// equalized subblock has gone through the IFFT, the slicer and the error FFT,
// which takes more than one subblock time. The LMS update of row r needs
// R and E of the same row, so the 10-bit LMS operand of every equalized row
// is pushed here and popped when that row's error arrives. A circular buffer
// of DEPTH rows (default four subblocks) with write and read pointers; rows
// come back in the order they went in. The reference design does not describe this
// alignment; it is this design's choice.
//
// clear empties the buffer (start of a data stage). overflow is sticky and
// flags a push into a full buffer (error latency above DEPTH rows) or a pop
// from an empty one. rd_data is valid in the cycle of pop (asynchronous).
module rdelay_buf #(
  parameter int unsigned DEPTH = 256,  // rows, a power of two
  parameter int unsigned LANES = 8,
  parameter int unsigned DW    = 20
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     push,
  input  logic [DW-1:0]            wr_data [LANES],
  input  logic                     pop,
  output logic [DW-1:0]            rd_data [LANES],
  output logic [$clog2(DEPTH)-1:0] rd_ptr,
  output logic                     overflow
);
  localparam int unsigned PW = $clog2(DEPTH);

  logic [DW-1:0] mem [DEPTH][LANES];
  logic [PW-1:0] wr_ptr;
  logic [PW:0]   count;

  always_ff @(posedge clk) begin
    if (push)
      for (int l = 0; l < LANES; l++) mem[wr_ptr][l] <= wr_data[l];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else if (clear) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= wr_ptr + 1'b1;
      if (pop)  rd_ptr <= rd_ptr + 1'b1;
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
      if ((push && !pop && count == (PW+1)'(DEPTH)) || (pop && !push && count == '0))
        overflow <= 1'b1;
    end
  end

  always_comb begin
    for (int l = 0; l < LANES; l++) rd_data[l] = mem[rd_ptr][l];
  end
endmodule
