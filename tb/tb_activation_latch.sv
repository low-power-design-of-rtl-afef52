// tb_activation_latch: checks the hard limiter and the output latch.
// U is driven with random values, zero and the extremes. After each rising
// edge y must equal 1 when the U present before the edge was >= 0 and 0
// when it was negative. Between edges U is changed again and y must hold.
// The asynchronous reset must force y to 1 without a clock edge.
module tb_activation_latch;
  localparam int unsigned SW = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [SW-1:0] u = '0;
  logic y;
  int checks = 0, failures = 0;

  activation_latch #(.SW(SW)) dut (.clk(clk), .rst_n(rst_n), .u(u), .y(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_y(logic want, string what);
    checks++;
    if (y !== want) begin
      failures++;
      if (failures <= 20) $display("FAIL %s: y=%0d expected %0d (t=%0t)", what, y, want, $time);
    end
  endtask

  initial begin
    logic signed [SW-1:0] vals[$];
    u = -SW'(5);
    #12;
    expect_y(1'b1, "reset value");
    rst_n = 1'b1;
    vals = '{0, -1, 1, {1'b1, {(SW-1){1'b0}}}, {1'b0, {(SW-1){1'b1}}}};
    for (int t = 0; t < 2000; t++) vals.push_back(SW'($urandom));
    foreach (vals[i]) begin
      logic want;
      @(negedge clk);
      u = vals[i];
      want = (vals[i] >= 0);
      @(posedge clk);
      #1;
      expect_y(want, "after edge");
      u = ~vals[i];          // opposite sign, must not reach y before the next edge
      #2;
      expect_y(want, "hold between edges");
    end
    // Asynchronous reset while y = 0.
    @(negedge clk);
    u = -SW'(1);
    @(posedge clk);
    #1;
    expect_y(1'b0, "negative before reset");
    #1 rst_n = 1'b0;
    #1;
    expect_y(1'b1, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
