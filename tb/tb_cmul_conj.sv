// tb_cmul_conj: random and corner operands of the conjugating complex
// multiplier at its 19 x 16 size, checked against integer arithmetic.
module tb_cmul_conj;
  localparam int A_W = 19, B_W = 16;
  logic signed [A_W-1:0] a_re, a_im;
  logic signed [B_W-1:0] b_re, b_im;
  logic signed [A_W+B_W:0] p_re, p_im;
  int checks = 0, failures = 0;
  logic clk = 0;
  int cycles = 0;

  cmul_conj #(.A_W(A_W), .B_W(B_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(longint ar, longint ai, longint br, longint bi);
    longint er, ei;
    a_re = A_W'(ar); a_im = A_W'(ai); b_re = B_W'(br); b_im = B_W'(bi);
    @(posedge clk);
    er = ar * br + ai * bi;
    ei = ar * bi - ai * br;
    checks += 2;
    if (longint'(p_re) != er) begin failures++; $display("re mismatch %0d %0d", p_re, er); end
    if (longint'(p_im) != ei) begin failures++; $display("im mismatch %0d %0d", p_im, ei); end
  endtask

  initial begin
    check(3, 4, 5, 6);       // conj(3+4j)(5+6j) = 39 - 2j
    check(-262144, -262144, -32768, -32768);
    check(262143, -262144, 32767, -32768);
    for (int i = 0; i < 3000; i++)
      check(longint'($signed(A_W'($urandom()))), longint'($signed(A_W'($urandom()))),
            longint'($signed(B_W'($urandom()))), longint'($signed(B_W'($urandom()))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
