// tb_inv_lut: every 14-bit power scalar. Checks the decomposition
// scalar = sb * 2^dn + (dropped bits) with a 4-bit sb starting at the leading
// one, the table entry min(8191, floor(65535 / sb)), and that
// inv * 2^-(16 + dn) approximates 1/scalar from above within 12.6% for scalars >= 8
// (the dropped bits below sb make 1/(sb 2^dn) the larger one).
module tb_inv_lut;
  logic [13:0] scalar;
  logic [12:0] inv;
  logic [3:0]  dn;
  int checks = 0, failures = 0;
  logic clk = 0;
  int cycles = 0;

  inv_lut dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 16384; s++) begin
      int lead, edn, esb, einv;
      real approx, rel;
      scalar = 14'(s);
      @(posedge clk);
      lead = (s == 0) ? 0 : $clog2(s + 1) - 1;
      edn  = (lead >= 3) ? lead - 3 : 0;
      esb  = s / (1 << edn);
      einv = (esb == 0) ? 8191 : ((65535 / esb > 8191) ? 8191 : 65535 / esb);
      checks += 2;
      if (int'(dn) != edn)   begin failures++; $display("s=%0d dn %0d exp %0d", s, dn, edn); end
      if (int'(inv) != einv) begin failures++; $display("s=%0d inv %0d exp %0d", s, inv, einv); end
      if (s >= 8) begin
        approx = real'(inv) / real'(64'd1 << (16 + int'(dn)));
        rel = approx * s - 1.0;
        checks++;
        if (rel > 0.126 || rel < -0.01) begin
          failures++;
          $display("s=%0d relative error %f", s, rel);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
