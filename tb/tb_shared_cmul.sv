// tb_shared_cmul: the shared multiplier in both modes. Equalizer mode: full
// complex product of a 21-bit R and a 15-bit W. LS mode: power of a 13-bit
// complex value and the product of an 11-bit complex value with a 13-bit
// unsigned inverse, all in the same cycle.
module tb_shared_cmul;
  logic mode_ls;
  logic signed [20:0] x_re, x_im;
  logic signed [14:0] w_re, w_im;
  logic signed [12:0] s_re, s_im;
  logic signed [10:0] p_re, p_im;
  logic        [12:0] inv;
  logic signed [36:0] prod_re, prod_im;
  logic        [36:0] pwr;
  logic signed [35:0] scl_re, scl_im;
  int checks = 0, failures = 0;
  logic clk = 0;
  int cycles = 0;

  shared_cmul dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin
      longint xr, xi, wr, wi, sr, si, pr, pi, iv;
      xr = longint'($signed(21'($urandom()))); xi = longint'($signed(21'($urandom())));
      wr = longint'($signed(15'($urandom()))); wi = longint'($signed(15'($urandom())));
      sr = longint'($signed(13'($urandom()))); si = longint'($signed(13'($urandom())));
      pr = longint'($signed(11'($urandom()))); pi = longint'($signed(11'($urandom())));
      iv = longint'(13'($urandom()));
      x_re = 21'(xr); x_im = 21'(xi); w_re = 15'(wr); w_im = 15'(wi);
      s_re = 13'(sr); s_im = 13'(si); p_re = 11'(pr); p_im = 11'(pi); inv = 13'(iv);
      mode_ls = 1'b0;
      @(posedge clk);
      chk("eq re", longint'(prod_re), xr * wr - xi * wi);
      chk("eq im", longint'(prod_im), xr * wi + xi * wr);
      mode_ls = 1'b1;
      @(posedge clk);
      chk("pwr", longint'(pwr), sr * sr + si * si);
      chk("scl re", longint'(scl_re), pr * iv);
      chk("scl im", longint'(scl_im), pi * iv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
