// signed_weight_mult: product of a ternary input and a sign-magnitude weight.
//
// One sign_mult_cell per weight bit: each cell multiplies the input's
// magnitude bit with one magnitude bit of the weight, so the product's
// magnitude is the weight's magnitude when the input is nonzero and 0
// otherwise. Every cell also forms the product sign, which it only reports
// as negative when its own product bit is 1; the word's sign is the OR of
// the cells' signs, so the product is negative exactly when it is nonzero
// and the signs differ. This is the "change the sign of the weight when the
// input is negative" step of the summing junction.
// Purely combinational.
module signed_weight_mult #(
  parameter int unsigned W = neuro_pkg::WEIGHT_MAG_W
) (
  input  neuro_pkg::bip_t x,      // ternary input
  input  logic [W:0]      w,      // weight: w[W] sign, w[W-1:0] magnitude
  output logic [W-1:0]    mag,    // magnitude of the product
  output logic            neg     // 1 = product negative (never for 0)
);

  logic [W-1:0] cell_sign;

  for (genvar j = 0; j < W; j++) begin : g_cell
    sign_mult_cell u_cell (
      .x      (x.nz),
      .y      (w[j]),
      .sign_x (x.neg),
      .sign_y (w[W]),
      .xy     (mag[j]),
      .sign_xy(cell_sign[j])
    );
  end

  assign neg = |cell_sign;

endmodule
