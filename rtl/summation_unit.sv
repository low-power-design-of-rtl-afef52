// summation_unit: the summing junction of one neuroprocessor.
//
// Forms U = sum_i x_i * w_i + 1 * w_bias for N ternary inputs x_i and N+1
// sign-magnitude weights; w[N] is the weight of the neuron's constant input
// 1 (its bias). Each product comes from a signed_weight_mult (a row of
// signed multiplication cells); its magnitude is zero-extended to SW bits
// and, when the product is negative, inverted with a carry in of 1, which
// adds its two's complement. The N+1 products are added one after another
// by a chain of ripple_adder stages made of full adders, so the unit is
// built only from the two arithmetic cells of the neuroprocessor.
// SW is wide enough that the sum never overflows. U is two's complement.
// Purely combinational: U settles one adder chain after the inputs change.
// The structure (multipliers and adders forming the summation unit, the
// constant input 1 with its own weight) follows the neuroprocessor's block
// diagram; the chained ripple adders and the number formats are this
// design's own choice.
module summation_unit #(
  parameter int unsigned N  = 4,
  parameter int unsigned W  = neuro_pkg::WEIGHT_MAG_W,
  parameter int unsigned SW = neuro_pkg::sum_width(W, N + 1)
) (
  input  neuro_pkg::bip_t [N-1:0]   x,   // inputs
  input  logic [N:0][W:0]           w,   // weights; w[N] = bias weight
  output logic signed [SW-1:0]      u    // weighted sum
);

  import neuro_pkg::*;

  localparam int unsigned NT = N + 1;   // terms, bias included

  bip_t [NT-1:0]          term_x;
  logic [NT-1:0][W-1:0]   prod_mag;
  logic [NT-1:0]          prod_neg;
  logic [NT-1:0][SW-1:0]  addend;
  logic [NT:0][SW-1:0]    acc;

  assign term_x = {bip_t'{neg: 1'b0, nz: 1'b1}, x};
  assign acc[0] = '0;

  for (genvar k = 0; k < NT; k++) begin : g_term
    signed_weight_mult #(.W(W)) u_mult (
      .x  (term_x[k]),
      .w  (w[k]),
      .mag(prod_mag[k]),
      .neg(prod_neg[k])
    );

    assign addend[k] = SW'(prod_mag[k]) ^ {SW{prod_neg[k]}};

    ripple_adder #(.WIDTH(SW)) u_add (
      .a   (acc[k]),
      .b   (addend[k]),
      .cin (prod_neg[k]),
      .sum (acc[k+1]),
      .cout()
    );
  end

  assign u = signed'(acc[NT]);

endmodule
