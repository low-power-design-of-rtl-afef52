// tb_full_adder: exhaustive check of the one-bit full adder against the
// integer sum a + b + cin.
module tb_full_adder;
  logic a, b, cin, sum, cout;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, cin} = 3'(v);
      #1;
      total = int'(a) + int'(b) + int'(cin);
      checks++;
      if ({cout, sum} !== 2'(total)) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d: got cout=%0d sum=%0d", a, b, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
