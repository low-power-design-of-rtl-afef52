// tb_neuron_layer: checks a layer of M neuroprocessors sharing N inputs.
// Each neuron has its own random weight row; after one rising edge every
// output must be the sign of that neuron's integer weighted sum.
module tb_neuron_layer;
  import neuro_pkg::*;
  import tb_util_pkg::*;

  localparam int unsigned N = 4;
  localparam int unsigned M = 6;
  localparam int unsigned W = WEIGHT_MAG_W;

  logic clk = 1'b0, rst_n = 1'b0;
  bip_t [N-1:0]         x;
  logic [M-1:0][N:0][W:0] w;
  logic [M-1:0] y;
  int checks = 0, failures = 0;

  neuron_layer #(.N(N), .M(M), .W(W)) dut (.clk(clk), .rst_n(rst_n), .x(x), .w(w), .y(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0;
    w = '0;
    #12 rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      logic [M-1:0] want;
      int unsigned max_mag;
      max_mag = (t % 2 == 1) ? 3 : (1 << W) - 1;
      @(negedge clk);
      for (int i = 0; i < N; i++) x[i] = random_input();
      for (int j = 0; j < M; j++) begin
        int sum;
        for (int k = 0; k <= N; k++) w[j][k] = (W+1)'(random_weight(W, max_mag));
        sum = weight_value(32'(w[j][N]), W);
        for (int i = 0; i < N; i++) sum += input_value(x[i]) * weight_value(32'(w[j][i]), W);
        want[j] = (sum >= 0);
      end
      @(posedge clk);
      #1;
      checks++;
      if (y !== want) begin
        failures++;
        if (failures <= 20) $display("FAIL: y=%b expected %b", y, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
