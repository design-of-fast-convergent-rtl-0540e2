// train_rom: spectrum of the training subblock u512, U_k, for the LS method.
//
// u512 = [a128, ~b128, ~a128, ~b128] is built from the Golay sequences of the
// channel-estimation field (bit 1 -> +1, bit 0 -> -1):
//   a128 = C059950CC0596AF33FA66AF3C0596AF3 (hex, first chip is the MSB)
//   b128 = 30A965FC30A99A03CF569A0330A99A03
// The table holds U_k = sum_n u_n exp(-j 2 pi k n / 512), k = 0..511, in
// 9-bit signed re/im with 2 fractional bits: entry = round(4 * U_k). It is
// computed at elaboration by constant functions, so synthesis sees a
// constant table (a ROM) and no data file is needed.
// Organisation: 64 rows of 8 lanes x 18 bits = 64 x 144 bits, the ROM size of
// the reference design's synthesis result; lane l of row r is subcarrier 8r + l and
// sits in bits [18l +: 18] as {re, im}.
//
// Asynchronous read: addr in, the row's 8 values out in the same cycle.
module train_rom
  import fde_pkg::*;
(
  input  logic [ROW_W-1:0] addr,
  output cpx_u_t           u [LANES]
);
  localparam logic [127:0] A128 = 128'hC059950CC0596AF33FA66AF3C0596AF3;
  localparam logic [127:0] B128 = 128'h30A965FC30A99A03CF569A0330A99A03;
  localparam real PI = 3.14159265358979323846;

  // round(4 U_k) as {re, im}. With u = [a, -b, -a, -b] (chips as +-1) the four
  // quarters fold into one 128-term sum: odd k: U_k = 2 A_k; even k:
  // U_k = -2 (-j)^k B_k, where A_k, B_k are the sums of a, b over n < 128
  // with twiddle exp(-j 2 pi k n / 512).
  function automatic logic [2*U_W-1:0] entry(int k);
    real sr, si, ang, c, vr, vi;
    logic [127:0] seq;
    seq = (k % 2 == 1) ? A128 : B128;
    sr = 0.0; si = 0.0;
    for (int n = 0; n < 128; n++) begin
      ang = 2.0 * PI * real'((k * n) % 512) / 512.0;
      c = seq[127 - n] ? 1.0 : -1.0;
      sr += c * $cos(ang);
      si -= c * $sin(ang);
    end
    if (k % 2 == 1) begin
      vr = 2.0 * sr; vi = 2.0 * si;
    end else begin
      case (k % 4)            // -2 (-j)^k
        0: begin vr = -2.0 * sr; vi = -2.0 * si; end
        default: begin vr = 2.0 * sr; vi = 2.0 * si; end
      endcase
    end
    vr = 4.0 * vr; vi = 4.0 * vi;
    return {U_W'($rtoi($floor(vr + 0.5))), U_W'($rtoi($floor(vi + 0.5)))};
  endfunction

  function automatic logic [LANES*2*U_W-1:0] row_val(int row);
    logic [LANES*2*U_W-1:0] v;
    for (int l = 0; l < LANES; l++) v[l*2*U_W +: 2*U_W] = entry(row * LANES + l);
    return v;
  endfunction

  typedef logic [LANES*2*U_W-1:0] rom_t [ROWS];
  function automatic rom_t build();
    rom_t tab;
    for (int r = 0; r < ROWS; r++) tab[r] = row_val(r);
    return tab;
  endfunction
  localparam rom_t ROM = build();

  always_comb begin
    for (int l = 0; l < LANES; l++) u[l] = ROM[addr][l*2*U_W +: 2*U_W];
  end
endmodule
