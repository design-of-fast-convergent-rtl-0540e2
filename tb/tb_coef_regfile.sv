// tb_coef_regfile: random writes and dual reads of the 64-row x 8-lane
// register file against a model; fills every row first (the array has no
// reset), then checks read-old-value on a
// simultaneous write of the same row, and that a write changes only its row.
module tb_coef_regfile;
  localparam int ROWS = 64, LANES = 8, DW = 48;
  logic clk = 0, rst_n = 0;
  logic [5:0] rd0_addr, rd1_addr, wr_addr;
  logic [DW-1:0] rd0_data [LANES], rd1_data [LANES], wr_data [LANES];
  logic wr_en;
  logic [DW-1:0] model [ROWS][LANES];
  int checks = 0, failures = 0, cycles = 0;

  coef_regfile #(.ROWS(ROWS), .LANES(LANES), .DW(DW)) dut (
    .clk, .rd0_addr, .rd0_data, .rd1_addr, .rd1_data, .wr_en, .wr_addr, .wr_data);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int l = 0; l < LANES; l++) begin
      checks += 2;
      if (rd0_data[l] !== model[rd0_addr][l]) begin failures++; $display("rd0 row %0d lane %0d", rd0_addr, l); end
      if (rd1_data[l] !== model[rd1_addr][l]) begin failures++; $display("rd1 row %0d lane %0d", rd1_addr, l); end
    end
  endtask

  initial begin
    wr_en = 0; wr_addr = 0; rd0_addr = 0; rd1_addr = 0;
    for (int l = 0; l < LANES; l++) wr_data[l] = '0;
    for (int r = 0; r < ROWS; r++) for (int l = 0; l < LANES; l++) model[r][l] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 6'(r);
      for (int l = 0; l < LANES; l++) wr_data[l] = {16'($urandom()), $urandom()};
      @(posedge clk);
      for (int l = 0; l < LANES; l++) model[r][l] = wr_data[l];
    end
    @(negedge clk);
    wr_en = 0;
    for (int r = 0; r < ROWS; r++) begin rd0_addr = 6'(r); rd1_addr = 6'(63 - r); #1 compare(); end
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      wr_en = 1'($urandom());
      wr_addr = 6'($urandom());
      rd0_addr = (i % 5 == 0) ? wr_addr : 6'($urandom());
      rd1_addr = 6'($urandom());
      for (int l = 0; l < LANES; l++) wr_data[l] = {16'($urandom()), $urandom()};
      #1 compare();          // before the edge: old contents
      @(posedge clk);
      if (wr_en) for (int l = 0; l < LANES; l++) model[wr_addr][l] = wr_data[l];
    end
    @(negedge clk);
    wr_en = 0;
    for (int r = 0; r < ROWS; r++) begin rd0_addr = 6'(r); rd1_addr = 6'(r); #1 compare(); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
