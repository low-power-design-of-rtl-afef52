// sign_mult_cell: one-bit signed multiplication cell.
//
// Multiplies two one-bit sign-magnitude operands, X with sign SIGN(X) and Y
// with sign SIGN(Y). It gives the magnitude product X*Y and the sign of the
// product SIGN(X*Y). The cell is built, like the circuit it models, from
// transfer gates only: every output is a two-way selection between signals
// that already exist, never a pull-up or pull-down network. The logic is
// written here as those selections.
//   X*Y       : X selects Y when 1 and passes its own 0 when 0 (an AND).
//   sign_diff : SIGN(X) selects SIGN(Y) or its complement (an XOR).
//   SIGN(X*Y) : the product selects sign_diff when 1 and passes its own 0
//               when 0, so a zero product is never reported as negative.
// The magnitude/sign split and the feeding of X*Y into the sign stage follow
// the cell's schematic; the rule that a zero product has a positive sign is
// this design's reading of that connection.
// Purely combinational, no clock.
module sign_mult_cell (
  input  logic x,        // magnitude bit of X
  input  logic y,        // magnitude bit of Y
  input  logic sign_x,   // SIGN(X), 1 = negative
  input  logic sign_y,   // SIGN(Y), 1 = negative
  output logic xy,       // X*Y
  output logic sign_xy   // SIGN(X*Y), 1 = negative
);

  logic sign_diff;

  always_comb begin
    xy        = x ? y : x;
    sign_diff = sign_x ? ~sign_y : sign_y;
    sign_xy   = xy ? sign_diff : xy;
  end

endmodule
