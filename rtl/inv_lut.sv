// inv_lut: table front end of the divider-free LS method.
//
// The LS coefficient needs 1/|S|^2. Instead of a divider, the positive power
// scalar is written as SB * 2^dn, where SB are the 4 significant bits that
// start at its leading one, and 1/scalar = (1/SB) * 2^-dn. Only the 16
// inverses of SB are stored; the 2^-dn right shift is applied by the caller
// after the scalar multiply, so that the shift costs no precision.
// This structure (leading-one, 4 significant bits, 16 x 13-bit table, right
// shift) is the reference design's. Table contents (own choice, a formula, not data):
//   INV(sb) = min(2^13 - 1, floor((2^16 - 1) / sb)),  INV(0) = 2^13 - 1
// so that inv * 2^-(16 + dn) ~ 1/scalar. For scalars below 8 (leading one in
// bits 0..2) sb is the scalar itself and dn = 0.
//
// Combinational: scalar in, inv and dn out in the same cycle.
module inv_lut #(
  parameter int unsigned SCAL_W = 14,  // width of the power scalar
  parameter int unsigned SB_W   = 4,   // significant bits used for lookup
  parameter int unsigned INV_W  = 13,  // width of a table entry
  parameter int unsigned DN_W   = 4    // width of the shift amount
) (
  input  logic [SCAL_W-1:0] scalar,
  output logic [INV_W-1:0]  inv,
  output logic [DN_W-1:0]   dn
);
  localparam int unsigned ENTRIES = 2 ** SB_W;

  typedef logic [INV_W-1:0] table_t [ENTRIES];

  function automatic table_t make_table();
    table_t t;
    for (int unsigned sb = 0; sb < ENTRIES; sb++) begin
      longint unsigned v;
      v = (sb == 0) ? 64'((1 << INV_W) - 1)
                    : 64'(((1 << (INV_W + 3)) - 1) / sb);
      if (v > 64'((1 << INV_W) - 1)) v = 64'((1 << INV_W) - 1);
      t[sb] = INV_W'(v);
    end
    return t;
  endfunction

  localparam table_t INV_TABLE = make_table();

  logic [SB_W-1:0] sb;

  always_comb begin
    int unsigned lead;
    lead = 0;
    for (int unsigned i = 0; i < SCAL_W; i++)
      if (scalar[i]) lead = i;
    if (lead >= SB_W - 1) begin
      dn = DN_W'(lead - (SB_W - 1));
      sb = SB_W'(scalar >> (lead - (SB_W - 1)));
    end else begin
      dn = '0;
      sb = scalar[SB_W-1:0];
    end
    inv = INV_TABLE[sb];
  end
endmodule
