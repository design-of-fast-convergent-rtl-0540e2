// tb_train_rom: computes the 512-point DFT of u512 = [a128 ~b128 ~a128 ~b128]
// from the Golay sequences and checks every stored entry is round(4 * U_k).
module tb_train_rom;
  import fde_pkg::*;
  import tb_fde_model_pkg::*;
  logic [5:0] addr;
  cpx_u_t u [LANES];
  int checks = 0, failures = 0, cycles = 0;
  logic clk = 0;
  real xr [], xi [], yr [], yi [];

  train_rom dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    xr = new[512]; xi = new[512];
    for (int n = 0; n < 512; n++) begin xr[n] = real'(u512_chip(n)); xi[n] = 0.0; end
    dft(xr, xi, -1, yr, yi);
    for (int r = 0; r < 64; r++) begin
      addr = 6'(r);
      @(posedge clk);
      for (int l = 0; l < LANES; l++) begin
        longint er, ei;
        er = rnd(4.0 * yr[8*r+l]);
        ei = rnd(4.0 * yi[8*r+l]);
        checks += 2;
        if (longint'(u[l].re) != er) begin failures++; $display("k=%0d re %0d exp %0d", 8*r+l, u[l].re, er); end
        if (longint'(u[l].im) != ei) begin failures++; $display("k=%0d im %0d exp %0d", 8*r+l, u[l].im, ei); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
