// neuron: one neuroprocessor, the hardware of a single perceptron neuron.
//
// N ternary inputs (-1, 0, +1) and the constant input 1 are weighted and
// summed by the summation unit; the hard limiter takes the sign of the sum
// and the output latch presents it on the next rising clock edge.
//   y = 1 (+1) if w_bias + sum_i x_i*w_i >= 0, else 0 (-1)
// Weights: w[i] for input i and w[N] for the constant input, each a
// sign-magnitude word (w[k][W] sign). Latency: one clock edge from stable
// inputs to y. The three stages follow the neuroprocessor's block diagram;
// formats, reset and the tie rule are this design's own choices.
module neuron #(
  parameter int unsigned N = 4,
  parameter int unsigned W = neuro_pkg::WEIGHT_MAG_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  neuro_pkg::bip_t [N-1:0] x,
  input  logic [N:0][W:0]         w,
  output logic                    y
);

  localparam int unsigned SW = neuro_pkg::sum_width(W, N + 1);

  logic signed [SW-1:0] u;

  summation_unit #(.N(N), .W(W), .SW(SW)) u_sum (
    .x(x),
    .w(w),
    .u(u)
  );

  activation_latch #(.SW(SW)) u_act (
    .clk  (clk),
    .rst_n(rst_n),
    .u    (u),
    .y    (y)
  );

endmodule
