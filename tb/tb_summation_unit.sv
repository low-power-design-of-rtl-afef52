// tb_summation_unit: random and corner checks of the summing junction.
// For each vector the expected sum w_bias + sum_i x_i*w_i is computed with
// integers and compared with U. Corner vectors use all-maximum weights with
// all inputs agreeing in sign (largest positive and negative sums), zero
// inputs, and negative zero weights (sign set, magnitude 0).
module tb_summation_unit;
  import neuro_pkg::*;
  import tb_util_pkg::*;

  localparam int unsigned N  = 6;
  localparam int unsigned W  = WEIGHT_MAG_W;
  localparam int unsigned SW = sum_width(W, N + 1);

  bip_t [N-1:0]         x;
  logic [N:0][W:0]      w;
  logic signed [SW-1:0] u;
  int checks = 0, failures = 0;

  summation_unit #(.N(N), .W(W)) dut (.x(x), .w(w), .u(u));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int expected;
    #1;
    expected = weight_value(32'(w[N]), W);
    for (int i = 0; i < N; i++) expected += input_value(x[i]) * weight_value(32'(w[i]), W);
    checks++;
    if (int'(u) !== expected) begin
      failures++;
      if (failures <= 20) $display("FAIL: U=%0d expected %0d", u, expected);
    end
  endtask

  initial begin
    // Largest positive and negative sums.
    for (int s = 0; s < 2; s++) begin
      for (int i = 0; i < N; i++) x[i] = '{neg: 1'(s), nz: 1'b1};
      for (int k = 0; k <= N; k++) w[k] = {1'b0, {W{1'b1}}};
      w[N][W] = 1'(s);
      check();
    end
    // All inputs zero: only the bias weight counts.
    for (int i = 0; i < N; i++) x[i] = '{neg: 1'b1, nz: 1'b0};
    check();
    // Negative zero weights.
    for (int i = 0; i < N; i++) x[i] = '{neg: 1'b1, nz: 1'b1};
    for (int k = 0; k <= N; k++) w[k] = {1'b1, {W{1'b0}}};
    check();
    // Random vectors.
    for (int t = 0; t < 5000; t++) begin
      for (int i = 0; i < N; i++) x[i] = random_input();
      for (int k = 0; k <= N; k++) w[k] = (W+1)'(random_weight(W, (1 << W) - 1));
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
