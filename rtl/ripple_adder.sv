// ripple_adder: WIDTH-bit adder made of a chain of full_adder cells.
//
// sum = a + b + cin modulo 2**WIDTH; the carry ripples from bit 0 upward
// through one full_adder per bit, and the last carry comes out as cout.
// Used by the summation unit to add the signed products one after another.
// Purely combinational.
module ripple_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] carry;

  assign carry[0] = cin;
  assign cout     = carry[WIDTH];

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .sum (sum[i]),
      .cout(carry[i+1])
    );
  end

endmodule
