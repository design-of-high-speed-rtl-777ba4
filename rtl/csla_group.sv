// csla_group: one upper group of the latch-based carry select adder.
//
// A regular carry select group holds two ripple carry adders, one for carry
// in 0 and one for carry in 1. This group holds a single WIDTH-bit RCA whose
// carry in is the clock, and 2*WIDTH+1 D latches (five for a 2-bit group):
//   clk = 1: the RCA adds with carry in 1; the sum latches enabled by clk and
//            the carry latch take that sum and carry.
//   clk = 0: the RCA adds with carry in 0; the sum latches enabled by ~clk
//            take that sum, while the carry-in-1 latches hold.
// The carry-in-0 carry is not latched; it comes live from the RCA. During the
// low phase a bank of 2:1 multiplexers (a 6:3 multiplexer for a 2-bit group)
// passes the carry-in-1 sum and carry when sel, the real carry out of the
// group below, is 1, and the carry-in-0 ones when it is 0. So sum and cout
// are valid in the low phase of a clock cycle whose both phases saw stable a
// and b; in the high phase they must not be used.
// The structure and latch count follow the adder's description; the use of
// behavioural latches and multiplexers is this design's choice.
module csla_group #(
  parameter int unsigned WIDTH = 2
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             sel,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH-1:0] s_live;   // RCA output: carry in = clk
  logic             c_live;
  logic [WIDTH-1:0] s_one;    // latched carry-in-1 sum
  logic             c_one;    // latched carry-in-1 carry
  logic [WIDTH-1:0] s_zero;   // latched carry-in-0 sum
  logic             clk_n;

  rca #(.WIDTH(WIDTH)) u_rca (
    .a   (a),
    .b   (b),
    .cin (clk),
    .sum (s_live),
    .cout(c_live)
  );

  // Carry-in-1 sum and carry, captured while clk is high.
  d_latch #(.WIDTH(WIDTH + 1)) u_lat_one (
    .en(clk),
    .d ({c_live, s_live}),
    .q ({c_one, s_one})
  );

  // Carry-in-0 sum, captured while clk is low.
  assign clk_n = ~clk;
  d_latch #(.WIDTH(WIDTH)) u_lat_zero (
    .en(clk_n),
    .d (s_live),
    .q (s_zero)
  );

  assign {cout, sum} = sel ? {c_one, s_one} : {c_live, s_zero};
endmodule
