// tb_neuroprocessor_mlp: end-to-end test of the multilayer perceptron at its
// default size (4-6-4-3 neurons, 8-bit weight magnitudes).
// Weights are drawn at random in batches and held for a batch of cycles; a
// new random ternary input vector is applied every cycle. A reference model
// in plain integer arithmetic keeps its own copy of the three layers of
// output latches and updates them at every rising edge; the network's
// outputs are compared with it after every edge. A second, independent check
// evaluates the whole network at once for the input applied three edges
// earlier (weights unchanged since) and compares: this fixes the latency at
// three edges and the throughput at one vector per cycle.
// Counted and required at least once: negative inputs (weight sign changed),
// zero inputs, negative products, weighted sums of exactly zero in every
// layer, +1 and -1 decisions in every layer, the asynchronous reset
// mid-run, and a weight change while vectors stream through.
module tb_neuroprocessor_mlp;
  import neuro_pkg::*;
  import tb_util_pkg::*;

  localparam int unsigned N_IN  = 4;
  localparam int unsigned N_H1  = 6;
  localparam int unsigned N_H2  = 4;
  localparam int unsigned N_OUT = 3;
  localparam int unsigned W     = WEIGHT_MAG_W;
  localparam int unsigned LATENCY = 3;
  localparam int unsigned BATCHES = 60;
  localparam int unsigned BATCH_LEN = 50;

  logic clk = 1'b0, rst_n = 1'b0;
  bip_t [N_IN-1:0]              x;
  logic [N_H1-1:0][N_IN:0][W:0]  w1;
  logic [N_H2-1:0][N_H1:0][W:0]  w2;
  logic [N_OUT-1:0][N_H2:0][W:0] w3;
  logic [N_OUT-1:0]             y;

  neuroprocessor_mlp dut (
    .clk(clk), .rst_n(rst_n), .x(x), .w1(w1), .w2(w2), .w3(w3), .y(y)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // Mechanism counters.
  int n_neg_input = 0, n_zero_input = 0, n_neg_product = 0;
  int n_tie[3] = '{0, 0, 0};
  int n_pos[3] = '{0, 0, 0};
  int n_negdec[3] = '{0, 0, 0};
  int n_reset = 0, n_weight_change = 0, n_latency_checks = 0;

  initial begin : watchdog
    repeat (BATCHES * BATCH_LEN + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model: one neuron decision (1 = +1) from integer arithmetic.
  // layer selects which counters to update; count = 0 evaluates silently.
  function automatic logic ref_neuron(int vals[], logic [31:0] wrow[], int layer, bit count);
    int sum;
    sum = weight_value(wrow[vals.size()], W);
    foreach (vals[i]) begin
      int p;
      p = vals[i] * weight_value(wrow[i], W);
      if (count && p < 0) n_neg_product++;
      sum += p;
    end
    if (count) begin
      if (sum == 0) n_tie[layer]++;
      if (sum >= 0) n_pos[layer]++;
      else          n_negdec[layer]++;
    end
    return sum >= 0;
  endfunction

  function automatic int dec_value(logic d);
    return d ? 1 : -1;
  endfunction

  function automatic logic [N_H1-1:0] ref_layer1(bip_t [N_IN-1:0] xv, bit count);
    logic [N_H1-1:0] r;
    int vals[] = new[N_IN];
    logic [31:0] wrow[] = new[N_IN + 1];
    foreach (vals[i]) vals[i] = input_value(xv[i]);
    for (int j = 0; j < N_H1; j++) begin
      for (int k = 0; k <= N_IN; k++) wrow[k] = 32'(w1[j][k]);
      r[j] = ref_neuron(vals, wrow, 0, count);
    end
    return r;
  endfunction

  function automatic logic [N_H2-1:0] ref_layer2(logic [N_H1-1:0] h, bit count);
    logic [N_H2-1:0] r;
    int vals[] = new[N_H1];
    logic [31:0] wrow[] = new[N_H1 + 1];
    foreach (vals[i]) vals[i] = dec_value(h[i]);
    for (int j = 0; j < N_H2; j++) begin
      for (int k = 0; k <= N_H1; k++) wrow[k] = 32'(w2[j][k]);
      r[j] = ref_neuron(vals, wrow, 1, count);
    end
    return r;
  endfunction

  function automatic logic [N_OUT-1:0] ref_layer3(logic [N_H2-1:0] h, bit count);
    logic [N_OUT-1:0] r;
    int vals[] = new[N_H2];
    logic [31:0] wrow[] = new[N_H2 + 1];
    foreach (vals[i]) vals[i] = dec_value(h[i]);
    for (int j = 0; j < N_OUT; j++) begin
      for (int k = 0; k <= N_H2; k++) wrow[k] = 32'(w3[j][k]);
      r[j] = ref_neuron(vals, wrow, 2, count);
    end
    return r;
  endfunction

  task automatic new_weights(int unsigned max_mag);
    for (int j = 0; j < N_H1; j++)
      for (int k = 0; k <= N_IN; k++) w1[j][k] = (W+1)'(random_weight(W, max_mag));
    for (int j = 0; j < N_H2; j++)
      for (int k = 0; k <= N_H1; k++) w2[j][k] = (W+1)'(random_weight(W, max_mag));
    for (int j = 0; j < N_OUT; j++)
      for (int k = 0; k <= N_H2; k++) w3[j][k] = (W+1)'(random_weight(W, max_mag));
  endtask

  // Reference copies of the three layers of output latches.
  logic [N_H1-1:0]  m1;
  logic [N_H2-1:0]  m2;
  logic [N_OUT-1:0] m3;
  // Inputs applied before the last edges, and cycles since the weights changed.
  bip_t [N_IN-1:0] x_hist[$];
  int since_change;

  task automatic model_reset();
    m1 = '1;
    m2 = '1;
    m3 = '1;
    x_hist.delete();
  endtask

  initial begin
    x = '0;
    new_weights(3);
    model_reset();
    since_change = 0;
    #12 rst_n = 1'b1;
    for (int b = 0; b < BATCHES; b++) begin
      int unsigned max_mag;
      max_mag = (b % 3 == 2) ? (1 << W) - 1 : 3;
      for (int t = 0; t < BATCH_LEN; t++) begin
        logic [N_H1-1:0]  n1;
        logic [N_H2-1:0]  n2;
        logic [N_OUT-1:0] n3;
        @(negedge clk);
        if (t == 0 && b > 0) begin
          new_weights(max_mag);
          n_weight_change++;
          since_change = 0;
        end
        // Mid-run asynchronous reset in batch 7.
        if (b == 7 && t == 20) begin
          rst_n = 1'b0;
          #1;
          model_reset();
          checks++;
          if (y !== '1) begin
            failures++;
            $display("FAIL: outputs not +1 during reset: %b", y);
          end
          n_reset++;
          #1 rst_n = 1'b1;
        end
        for (int i = 0; i < N_IN; i++) begin
          x[i] = random_input();
          if (x[i].nz && x[i].neg) n_neg_input++;
          if (!x[i].nz) n_zero_input++;
        end
        // Reference latches take their next values at the coming edge.
        n1 = ref_layer1(x, 1'b1);
        n2 = ref_layer2(m1, 1'b1);
        n3 = ref_layer3(m2, 1'b1);
        @(posedge clk);
        m1 = n1;
        m2 = n2;
        m3 = n3;
        since_change++;
        x_hist.push_back(x);
        if (x_hist.size() > LATENCY) void'(x_hist.pop_front());
        #1;
        checks++;
        if (y !== m3) begin
          failures++;
          if (failures <= 20) $display("FAIL batch %0d cycle %0d: y=%b expected %b", b, t, y, m3);
        end
        // Whole-network evaluation of the input applied LATENCY edges ago.
        if (x_hist.size() == LATENCY && since_change >= LATENCY) begin
          logic [N_OUT-1:0] direct;
          direct = ref_layer3(ref_layer2(ref_layer1(x_hist[0], 1'b0), 1'b0), 1'b0);
          checks++;
          n_latency_checks++;
          if (y !== direct) begin
            failures++;
            if (failures <= 20) $display("FAIL latency: y=%b, network of input %0d edges earlier gives %b",
                     y, LATENCY, direct);
          end
        end
      end
    end

    $display("mechanisms: neg_input=%0d zero_input=%0d neg_product=%0d reset=%0d weight_change=%0d latency_checks=%0d",
             n_neg_input, n_zero_input, n_neg_product, n_reset, n_weight_change, n_latency_checks);
    for (int l = 0; l < 3; l++)
      $display("layer %0d: zero sums=%0d +1=%0d -1=%0d", l + 1, n_tie[l], n_pos[l], n_negdec[l]);
    checks++;
    if (n_neg_input == 0 || n_zero_input == 0 || n_neg_product == 0 || n_reset == 0 ||
        n_weight_change == 0 || n_latency_checks == 0) begin
      failures++;
      $display("FAIL: a mechanism never happened");
    end
    for (int l = 0; l < 3; l++) begin
      checks++;
      if (n_tie[l] == 0 || n_pos[l] == 0 || n_negdec[l] == 0) begin
        failures++;
        $display("FAIL: layer %0d lacks a zero sum, a +1 or a -1 decision", l + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
