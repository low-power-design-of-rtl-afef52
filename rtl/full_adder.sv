// full_adder: one-bit full adder in the transfer-gate style.
//
// Adds A, B and the carry in. Like the low-power adder it models, it is
// built around the propagate signal A xor B, made by a transfer-gate XOR,
// which then steers two further selections:
//   SUM  = propagate ? ~Cin : Cin
//   Cout = propagate ?  Cin : A
// (when A and B are equal the carry out is A itself). There is no pull-up or
// pull-down network; each output passes one of the existing signals. The
// port names follow the adder's schematic; the selection equations are the
// standard ones for this family of adders.
// Purely combinational, no clock.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic propagate;

  always_comb begin
    propagate = a ? ~b : b;
    sum       = propagate ? ~cin : cin;
    cout      = propagate ? cin : a;
  end

endmodule
