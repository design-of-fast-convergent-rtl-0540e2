// tb_pi2_demapper: random noisy pi/2-BPSK and pi/2-QPSK symbols through the
// demapper. Transmit z_n = j^n s_n with n = lane (mod 4); checks recovered
// bits, the decision point and err = decision - sample, plus the one-cycle
// latency of out_valid.
module tb_pi2_demapper;
  import fde_pkg::*;
  localparam int AMP = 1024;
  logic clk = 0, rst_n = 0;
  mod_e mod;
  logic t_valid, out_valid;
  cpx_t_t t [LANES];
  logic [1:0] bits [LANES];
  cpx_t_t dec [LANES];
  cpx_err_t err [LANES];
  int checks = 0, failures = 0, cycles = 0;

  pi2_demapper #(.DEC_AMP(AMP)) dut (.*);

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
    if (got != exp) begin failures++; $display("%s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    t_valid = 0; mod = MOD_BPSK;
    for (int l = 0; l < LANES; l++) t[l] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      int b0 [LANES], b1 [LANES];
      longint sr [LANES], si [LANES], zr [LANES], zi [LANES], dr, di;
      @(negedge clk);
      mod = (it % 2 == 0) ? MOD_BPSK : MOD_QPSK;
      t_valid = 1;
      for (int l = 0; l < LANES; l++) begin
        longint tr, ti;
        b0[l] = $urandom() % 2; b1[l] = $urandom() % 2;
        sr[l] = b0[l] ? 1 : -1;
        si[l] = (mod == MOD_QPSK) ? (b1[l] ? 1 : -1) : 0;
        // z = j^l * s
        case (l % 4)
          0: begin zr[l] = sr[l];  zi[l] = si[l];  end
          1: begin zr[l] = -si[l]; zi[l] = sr[l];  end
          2: begin zr[l] = -sr[l]; zi[l] = -si[l]; end
          default: begin zr[l] = si[l]; zi[l] = -sr[l]; end
        endcase
        tr = zr[l] * AMP + ($signed(32'($urandom() % 1400)) - 700);
        ti = zi[l] * AMP + ($signed(32'($urandom() % 1400)) - 700);
        t[l].re = T_W'(tr); t[l].im = T_W'(ti);
      end
      @(posedge clk); #1;
      chk("valid", out_valid, 1);
      for (int l = 0; l < LANES; l++) begin
        chk("b0", bits[l][0], b0[l]);
        if (mod == MOD_QPSK) chk("b1", bits[l][1], b1[l]);
        else chk("b1 bpsk", bits[l][1], 0);
        dr = zr[l] * AMP; di = zi[l] * AMP;
        chk("dec re", dec[l].re, dr);
        chk("dec im", dec[l].im, di);
        chk("err re", err[l].re, dr - longint'(t[l].re));
        chk("err im", err[l].im, di - longint'(t[l].im));
      end
      @(negedge clk);
      t_valid = 0;
      @(posedge clk); #1;
      chk("valid low", out_valid, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
