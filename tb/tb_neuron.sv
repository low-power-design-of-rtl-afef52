// tb_neuron: checks one neuroprocessor end to end.
// Random ternary inputs and weights are applied one vector per clock; the
// expected output is the sign of the integer weighted sum plus bias (zero
// counts as +1), and it must appear after exactly one rising edge. Small
// weights are mixed in so that sums of exactly zero occur.
module tb_neuron;
  import neuro_pkg::*;
  import tb_util_pkg::*;

  localparam int unsigned N = 4;
  localparam int unsigned W = WEIGHT_MAG_W;

  logic clk = 1'b0, rst_n = 1'b0;
  bip_t [N-1:0]    x;
  logic [N:0][W:0] w;
  logic y;
  int checks = 0, failures = 0, ties = 0, pos = 0, neg = 0;

  neuron #(.N(N), .W(W)) dut (.clk(clk), .rst_n(rst_n), .x(x), .w(w), .y(y));

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
    for (int t = 0; t < 3000; t++) begin
      int sum;
      logic want;
      int unsigned max_mag;
      max_mag = (t % 2 == 1) ? 3 : (1 << W) - 1;
      @(negedge clk);
      for (int i = 0; i < N; i++) x[i] = random_input();
      for (int k = 0; k <= N; k++) w[k] = (W+1)'(random_weight(W, max_mag));
      sum = weight_value(32'(w[N]), W);
      for (int i = 0; i < N; i++) sum += input_value(x[i]) * weight_value(32'(w[i]), W);
      want = (sum >= 0);
      if (sum == 0) ties++;
      else if (sum > 0) pos++;
      else neg++;
      @(posedge clk);
      #1;
      checks++;
      if (y !== want) begin
        failures++;
        if (failures <= 20) $display("FAIL: y=%0d expected %0d (sum %0d)", y, want, sum);
      end
    end
    checks++;
    if (ties == 0 || pos == 0 || neg == 0) begin
      failures++;
      if (failures <= 20) $display("FAIL: coverage ties=%0d pos=%0d neg=%0d", ties, pos, neg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
