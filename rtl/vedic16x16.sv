// vedic16x16: 16x16-bit Vedic (Urdhva-Tiryakbhyam) multiplier with
// latch-based carry select adders. Top of the design.
//
// The operands are split into bytes, A = {AH, AL}, B = {BH, BL}. Four 8x8
// Vedic multipliers form the vertical and crosswise partial products
// q0 = AL*BL, q1 = AH*BL, q2 = AL*BH, q3 = AH*BH in parallel, and three 16-bit
// carry select adders, each with a single ripple carry adder and D latches
// per group (csla_dlatch), add them:
//   adder 1: q1 + q2                             -> s1, c1
//   adder 2: s1 + {8'h00, q0[15:8]}              -> s2, c2
//   adder 3: q3 + {7'h00, c1 | c2, s2[15:8]}     -> p[31:16]
//   p[15:0] = {s2[7:0], q0[7:0]}
// The OR of the two lower carries is the carry of the middle sum (they are
// never both 1).
//
// Interface and timing: unsigned a and b in, unsigned 32-bit product p out;
// clk drives the latches and the carry-in of every upper adder group. Apply
// a and b before a rising edge and hold them; p is correct from the falling
// edge of the sixth clock cycle on (vedic_pkg::VEDIC16_LATENCY: three adder
// levels inside each 8x8 block and three here, one cycle each) and stays
// correct until the operands change. There is no reset and no handshake.
// The multiplier structure follows the described design; the latency and
// the output latch in each adder that produces it are this design's choice.
module vedic16x16 (
  input  logic        clk,
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] p
);
  logic [15:0] q0, q1, q2, q3;
  logic [15:0] s1, s2;
  logic        c1, c2, c3_unused;

  vedic8x8 u_m0 (.clk(clk), .a(a[7:0]),  .b(b[7:0]),  .p(q0));
  vedic8x8 u_m1 (.clk(clk), .a(a[15:8]), .b(b[7:0]),  .p(q1));
  vedic8x8 u_m2 (.clk(clk), .a(a[7:0]),  .b(b[15:8]), .p(q2));
  vedic8x8 u_m3 (.clk(clk), .a(a[15:8]), .b(b[15:8]), .p(q3));

  csla_dlatch #(.WIDTH(16)) u_add1 (
    .clk(clk), .a(q1), .b(q2), .cin(1'b0), .sum(s1), .cout(c1)
  );

  csla_dlatch #(.WIDTH(16)) u_add2 (
    .clk(clk), .a(s1), .b({8'h00, q0[15:8]}), .cin(1'b0), .sum(s2), .cout(c2)
  );

  csla_dlatch #(.WIDTH(16)) u_add3 (
    .clk(clk), .a(q3), .b({7'h00, c1 | c2, s2[15:8]}), .cin(1'b0),
    .sum(p[31:16]), .cout(c3_unused)
  );

  assign p[15:0] = {s2[7:0], q0[7:0]};
endmodule
