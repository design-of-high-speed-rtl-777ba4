// rca: WIDTH-bit ripple carry adder.
//
// A chain of full adders, the carry of bit i feeding bit i+1. Purely
// combinational: {cout, sum} = a + b + cin, with a delay that grows linearly
// with WIDTH. The 4x4 multiplier uses three 4-bit instances; every group of
// the latch-based carry select adder holds one. The full-adder cell is the
// textbook one, a choice of this design.
module rca #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .s   (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[WIDTH];
endmodule
