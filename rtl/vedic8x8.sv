// vedic8x8: 8x8-bit Vedic multiplier built from four 4x4 multipliers and
// three 8-bit latch-based carry select adders.
//
// With A = {AH, AL} and B = {BH, BL} (4-bit halves), the four 4x4 blocks form
// q0 = AL*BL, q1 = AH*BL, q2 = AL*BH, q3 = AH*BH in parallel. Then
//   adder 1: q1 + q2                          -> s1, c1  (crosswise terms)
//   adder 2: s1 + {4'h0, q0[7:4]}             -> s2, c2
//   adder 3: q3 + {3'b000, c1 | c2, s2[7:4]}  -> p[15:8]
//   p[7:0] = {s2[3:0], q0[3:0]}
// c1 and c2 are never both 1, so their OR is the carry of the middle sum.
//
// Timing: the 4x4 blocks are combinational, the adders are csla_dlatch
// instances clocked by clk. Hold a and b stable from before a rising edge;
// p is correct from the falling edge of the third clock cycle on
// (vedic_pkg::VEDIC8_LATENCY, one cycle per adder on the chain 1-2-3) and
// stays so while a and b are unchanged. The arrangement follows the
// described structure; the placement of the zero inputs is this design's
// reading of it.
module vedic8x8 (
  input  logic        clk,
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [7:0] q0, q1, q2, q3;
  logic [7:0] s1, s2;
  logic       c1, c2, c3_unused;

  vedic4x4 u_m0 (.a(a[3:0]), .b(b[3:0]), .p(q0));
  vedic4x4 u_m1 (.a(a[7:4]), .b(b[3:0]), .p(q1));
  vedic4x4 u_m2 (.a(a[3:0]), .b(b[7:4]), .p(q2));
  vedic4x4 u_m3 (.a(a[7:4]), .b(b[7:4]), .p(q3));

  csla_dlatch #(.WIDTH(8)) u_add1 (
    .clk(clk), .a(q1), .b(q2), .cin(1'b0), .sum(s1), .cout(c1)
  );

  csla_dlatch #(.WIDTH(8)) u_add2 (
    .clk(clk), .a(s1), .b({4'h0, q0[7:4]}), .cin(1'b0), .sum(s2), .cout(c2)
  );

  csla_dlatch #(.WIDTH(8)) u_add3 (
    .clk(clk), .a(q3), .b({3'b000, c1 | c2, s2[7:4]}), .cin(1'b0),
    .sum(p[15:8]), .cout(c3_unused)
  );

  assign p[7:0] = {s2[3:0], q0[3:0]};
endmodule
