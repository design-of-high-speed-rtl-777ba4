// half_adder: one-bit half adder, sum = a ^ b, carry = a & b.
// Purely combinational. Two of these, with four AND gates, make the 2x2
// Vedic multiplier.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
