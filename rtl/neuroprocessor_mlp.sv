// neuroprocessor_mlp: a feed-forward multilayer perceptron of neuroprocessors.
//
// Three fully connected layers: N_IN inputs -> N_H1 neurons -> N_H2 neurons
// -> N_OUT output neurons (defaults 4-6-4-3, the network of the reference
// architecture drawing). Every neuron is a neuroprocessor (summation unit of
// signed multiplication cells and full adders, hard limiter, output latch),
// and each neuron sends its result only to the neurons of the next layer.
// A hard limiter output enters the next layer as a ternary input of
// magnitude 1 and the sign of the decision.
// Interface: x = network inputs (ternary, sign-magnitude), w1/w2/w3 = weight
// rows of the three layers (row j of a layer: one sign-magnitude weight per
// input, then the weight of the constant input 1), y = output decisions
// (1 = +1, 0 = -1). Timing: each layer latches on the rising edge, so the
// network is a three-stage pipeline: y reflects the x present three edges
// earlier, and a new x can be applied every cycle while the weights are held.
// Layer sizes follow the drawing; weight format, reset and the pipelined
// timing that results from the per-neuron latches are this design's reading.
module neuroprocessor_mlp #(
  parameter int unsigned N_IN  = 4,
  parameter int unsigned N_H1  = 6,
  parameter int unsigned N_H2  = 4,
  parameter int unsigned N_OUT = 3,
  parameter int unsigned W     = neuro_pkg::WEIGHT_MAG_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  neuro_pkg::bip_t [N_IN-1:0]    x,
  input  logic [N_H1-1:0][N_IN:0][W:0]  w1,
  input  logic [N_H2-1:0][N_H1:0][W:0]  w2,
  input  logic [N_OUT-1:0][N_H2:0][W:0] w3,
  output logic [N_OUT-1:0]              y
);

  import neuro_pkg::*;

  logic [N_H1-1:0] y1;
  logic [N_H2-1:0] y2;
  bip_t [N_H1-1:0] x2;
  bip_t [N_H2-1:0] x3;

  always_comb begin
    for (int i = 0; i < N_H1; i++) x2[i] = from_limiter(y1[i]);
    for (int i = 0; i < N_H2; i++) x3[i] = from_limiter(y2[i]);
  end

  neuron_layer #(.N(N_IN), .M(N_H1), .W(W)) u_hidden1 (
    .clk(clk), .rst_n(rst_n), .x(x), .w(w1), .y(y1)
  );

  neuron_layer #(.N(N_H1), .M(N_H2), .W(W)) u_hidden2 (
    .clk(clk), .rst_n(rst_n), .x(x2), .w(w2), .y(y2)
  );

  neuron_layer #(.N(N_H2), .M(N_OUT), .W(W)) u_output (
    .clk(clk), .rst_n(rst_n), .x(x3), .w(w3), .y(y)
  );

endmodule
