// shared_cmul: the one-tap equalizer's complex multiplier, whose four real
// multipliers are lent to the LS channel estimation during training.
//
// mode_ls = 0 (data stage): prod = x * w, the one-tap equalization W*R
//   (21-bit R times 15-bit W, as in the reference design's operation table).
// mode_ls = 1 (training stage): the same four multipliers compute
//   pwr = s_re^2 + s_im^2       (complex power measurement, 13 x 13 bits)
//   scl = p * inv               (scalar multiply of the modified divider,
//                                11-bit complex p times 13-bit unsigned inv)
// The power and scalar products belong to different pipeline stages of the
// LS computation; they only share this block's multipliers, not a row.
// Sharing these multipliers between the two stages follows the reference design;
// the operand multiplexing is this design's.
//
// Purely combinational.
module shared_cmul #(
  parameter int unsigned X_W = 21,  // equalizer input R
  parameter int unsigned K_W = 15,  // coefficient W (also holds inv + sign)
  parameter int unsigned S_IN_W = 13,  // power operand
  parameter int unsigned P_IN_W = 11,  // scalar-multiply complex operand
  parameter int unsigned I_IN_W = 13   // unsigned inverse
) (
  input  logic                        mode_ls,
  input  logic signed [X_W-1:0]       x_re, x_im,
  input  logic signed [K_W-1:0]       w_re, w_im,
  input  logic signed [S_IN_W-1:0]    s_re, s_im,
  input  logic signed [P_IN_W-1:0]    p_re, p_im,
  input  logic        [I_IN_W-1:0]    inv,
  output logic signed [X_W+K_W:0]     prod_re, prod_im,
  output logic        [X_W+K_W:0]     pwr,
  output logic signed [X_W+K_W-1:0]   scl_re, scl_im
);
  // Operands of the four real multipliers.
  logic signed [X_W-1:0] op_a [4];
  logic signed [K_W-1:0] op_b [4];
  logic signed [X_W+K_W-1:0] m [4];

  initial begin
    assert (S_IN_W <= X_W && S_IN_W <= K_W && P_IN_W <= X_W && I_IN_W < K_W)
      else $error("shared_cmul: LS operands must fit the equalizer multipliers");
  end

  always_comb begin
    if (mode_ls) begin
      op_a[0] = X_W'(s_re);  op_b[0] = K_W'(s_re);
      op_a[1] = X_W'(s_im);  op_b[1] = K_W'(s_im);
      op_a[2] = X_W'(p_re);  op_b[2] = K_W'({1'b0, inv});
      op_a[3] = X_W'(p_im);  op_b[3] = K_W'({1'b0, inv});
    end else begin
      op_a[0] = x_re;  op_b[0] = w_re;
      op_a[1] = x_im;  op_b[1] = w_im;
      op_a[2] = x_re;  op_b[2] = w_im;
      op_a[3] = x_im;  op_b[3] = w_re;
    end
    for (int i = 0; i < 4; i++) m[i] = op_a[i] * op_b[i];
    prod_re = (X_W+K_W+1)'(m[0]) - (X_W+K_W+1)'(m[1]);
    prod_im = (X_W+K_W+1)'(m[2]) + (X_W+K_W+1)'(m[3]);
    pwr     = (X_W+K_W+1)'(m[0]) + (X_W+K_W+1)'(m[1]);
    scl_re  = m[2];
    scl_im  = m[3];
  end
endmodule
