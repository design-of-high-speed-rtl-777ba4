// csla_dlatch: WIDTH-bit carry select adder with one adder and D latches per
// group.
//
// The least significant group (2 bits) is a plain ripple carry adder fed by
// cin. Every group above it is a csla_group: one ripple carry adder that
// computes the carry-in-1 sum during the high clock phase and stores it in D
// latches, then the carry-in-0 sum during the low phase, with the real carry
// from the group below picking one of the two. For WIDTH = 16 the groups are
// 2, 2, 3, 4 and 5 bits (see vedic_pkg for other widths).
//
// Timing. The group results are valid only in the low phase of a cycle
// whose high phase already saw the present operands. Because adders are
// chained inside the multiplier, the next adder must see a stable input in
// both phases, so the selected result passes through an output latch that is
// transparent while clk is low and holds while clk is high. With a and b
// stable from before a rising edge, {cout, sum} is correct from the falling
// edge of that cycle on and stays correct while a and b do not change: a
// latency of one clock cycle per adder. The output latch is this design's
// addition; the groups themselves follow the adder's description.
module csla_dlatch
  import vedic_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned NG = csla_num_groups(WIDTH);

  logic [WIDTH-1:0] s_sel;   // selected sum, valid in the low phase
  logic [NG:0]      c;       // c[k] = real carry into group k

  assign c[0] = cin;

  // Least significant group: plain ripple carry adder.
  localparam int unsigned W0 = csla_group_size(WIDTH, 0);
  rca #(.WIDTH(W0)) u_lsb (
    .a   (a[W0-1:0]),
    .b   (b[W0-1:0]),
    .cin (c[0]),
    .sum (s_sel[W0-1:0]),
    .cout(c[1])
  );

  for (genvar k = 1; k < NG; k++) begin : g_grp
    localparam int unsigned LSB = csla_group_lsb(WIDTH, k);
    localparam int unsigned W   = csla_group_size(WIDTH, k);
    csla_group #(.WIDTH(W)) u_grp (
      .clk (clk),
      .a   (a[LSB+W-1:LSB]),
      .b   (b[LSB+W-1:LSB]),
      .sel (c[k]),
      .sum (s_sel[LSB+W-1:LSB]),
      .cout(c[k+1])
    );
  end

  // Output latch: transparent in the low phase, holds in the high phase.
  logic clk_n;
  assign clk_n = ~clk;

  d_latch #(.WIDTH(WIDTH + 1)) u_hold (
    .en(clk_n),
    .d ({c[NG], s_sel}),
    .q ({cout, sum})
  );
endmodule
