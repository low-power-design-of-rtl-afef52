// neuron_layer: one fully connected layer of neuroprocessors.
//
// M neurons share the same N inputs; neuron j has its own weight row
// w[j] (N input weights and the weight of its constant input at w[j][N]).
// All neurons evaluate in parallel and latch their outputs on the same
// rising clock edge, so the layer has a latency of one edge. Replacing each
// neuron of a perceptron layer by a neuroprocessor follows the multilayer
// perceptron architecture; the flat weight ports are this design's choice.
module neuron_layer #(
  parameter int unsigned N = 4,
  parameter int unsigned M = 6,
  parameter int unsigned W = neuro_pkg::WEIGHT_MAG_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  neuro_pkg::bip_t [N-1:0] x,
  input  logic [M-1:0][N:0][W:0]  w,
  output logic [M-1:0]            y    // 1 = +1, 0 = -1
);

  for (genvar j = 0; j < M; j++) begin : g_neuron
    neuron #(.N(N), .W(W)) u_neuron (
      .clk  (clk),
      .rst_n(rst_n),
      .x    (x),
      .w    (w[j]),
      .y    (y[j])
    );
  end

endmodule
