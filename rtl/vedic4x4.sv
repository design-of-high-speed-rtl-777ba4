// vedic4x4: 4x4-bit Vedic multiplier built from four 2x2 multipliers and
// three 4-bit ripple carry adders.
//
// With A = {AH, AL} and B = {BH, BL} (2-bit halves), the four 2x2 blocks form
// q0 = AL*BL, q1 = AH*BL, q2 = AL*BH, q3 = AH*BH at the same time. Then
//   adder 1: q1 + q2                          -> s1, c1  (crosswise terms)
//   adder 2: s1 + {2'b00, q0[3:2]}            -> s2, c2
//   adder 3: q3 + {1'b0, c1 | c2, s2[3:2]}    -> p[7:4]
//   p[3:0] = {s2[1:0], q0[1:0]}
// The two lower carries are ORed before the third adder; they can never both
// be 1. The third adder's carry out is always 0 and is left unused.
// Purely combinational. Follows the described arrangement; the exact
// placement of the zero inputs is this design's reading of it.
module vedic4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] q0, q1, q2, q3;
  logic [3:0] s1, s2;
  logic       c1, c2;

  vedic2x2 u_m0 (.a(a[1:0]), .b(b[1:0]), .p(q0));
  vedic2x2 u_m1 (.a(a[3:2]), .b(b[1:0]), .p(q1));
  vedic2x2 u_m2 (.a(a[1:0]), .b(b[3:2]), .p(q2));
  vedic2x2 u_m3 (.a(a[3:2]), .b(b[3:2]), .p(q3));

  rca #(.WIDTH(4)) u_add1 (
    .a(q1), .b(q2), .cin(1'b0), .sum(s1), .cout(c1)
  );

  rca #(.WIDTH(4)) u_add2 (
    .a(s1), .b({2'b00, q0[3:2]}), .cin(1'b0), .sum(s2), .cout(c2)
  );

  logic c3_unused;
  rca #(.WIDTH(4)) u_add3 (
    .a(q3), .b({1'b0, c1 | c2, s2[3:2]}), .cin(1'b0), .sum(p[7:4]), .cout(c3_unused)
  );

  assign p[3:0] = {s2[1:0], q0[1:0]};
endmodule
