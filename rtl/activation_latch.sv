// activation_latch: hard-limiting activation and output latch of a neuron.
//
// The hard limiter takes the sign of the weighted sum U: y = 1 (+1) when U
// is zero or positive and y = 0 (-1) when U is negative. The latch holds
// that value and passes a new one to the output on each rising clock edge,
// so y is the limiter's decision on the U present just before the edge.
// Interface: clk, rst_n (asynchronous, active low), U in two's complement,
// y registered. Latency one clock edge.
// Taking the sign and updating the output on the rising edge follow the
// neuroprocessor's description; the treatment of U = 0 as positive, the
// reset and its value (+1) are this design's own choices.
module activation_latch #(
  parameter int unsigned SW = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [SW-1:0] u,
  output logic                 y
);

  logic limit;

  always_comb limit = (u >= 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= 1'b1;
    else        y <= limit;
  end

endmodule
