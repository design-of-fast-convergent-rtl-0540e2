// cmul_conj: complex multiplier with one conjugated input, p = conj(a) * b.
//
// Four real multipliers and two adders, as in the reference design's multiplier with
// one conjugated input. The equalizer uses one instance per lane and shares it
// between the two stages: in training it forms conj(S) * U for the
// least-squares (LS) coefficient, in the data stage conj(R) * E for the LMS
// update. Its operand sizes (19 x 16 bits) are the reference design's: the LMS
// operands (10 x 7) fit inside the LS ones. The reference design writes the LMS term
// as R * conj(E); this unit conjugates R instead, see the README.
//
// Purely combinational: a whole multiplier is done inside one 216 MHz cycle,
// as the reference design chooses.
module cmul_conj #(
  parameter int unsigned A_W = 19,  // width of the conjugated operand a
  parameter int unsigned B_W = 16   // width of operand b
) (
  input  logic signed [A_W-1:0]     a_re, a_im,
  input  logic signed [B_W-1:0]     b_re, b_im,
  output logic signed [A_W+B_W:0]   p_re, p_im
);
  logic signed [A_W+B_W-1:0] m_rr, m_ii, m_ri, m_ir;

  always_comb begin
    m_rr = a_re * b_re;
    m_ii = a_im * b_im;
    m_ri = a_re * b_im;
    m_ir = a_im * b_re;
    // (ar - j ai)(br + j bi) = (ar br + ai bi) + j (ar bi - ai br)
    p_re = (A_W+B_W+1)'(m_rr) + (A_W+B_W+1)'(m_ii);
    p_im = (A_W+B_W+1)'(m_ri) - (A_W+B_W+1)'(m_ir);
  end
endmodule
