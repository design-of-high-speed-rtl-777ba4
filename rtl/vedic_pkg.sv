// vedic_pkg: constants and elaboration-time helpers shared by the Vedic
// multiplier and its latch-based carry select adder.
//
// The carry select adder is cut into groups. The lowest group is a plain
// 2-bit ripple carry adder; the groups above grow by one bit each after the
// second (2, 2, 3, 4, 5 ... bits), which for 16 bits gives the five groups
// 2+2+3+4+5. When the bits left over could not fill the next, larger group,
// the current group takes all that is left (8 bits: 2, 2, 4). The 16-bit
// split follows the adder's description (a 2-bit LSB adder, a 2-bit second
// group, five groups in all); the sizes of the three upper groups and the
// rule for other widths are this design's choice.
package vedic_pkg;

  // Nominal size of group k before the remainder rule: 2, 2, 3, 4, 5, ...
  function automatic int unsigned csla_nominal_size(int unsigned k);
    return (k == 0) ? 2 : k + 1;
  endfunction

  // Size of group k of a WIDTH-bit adder (0 past the last group).
  function automatic int unsigned csla_group_size(int unsigned width, int unsigned k);
    int unsigned rem;
    int unsigned s;
    rem = width;
    for (int unsigned i = 0; i <= k; i++) begin
      if (rem == 0) return 0;
      s = csla_nominal_size(i);
      if (s >= rem || rem - s < csla_nominal_size(i + 1)) s = rem;
      if (i == k) return s;
      rem -= s;
    end
    return 0;
  endfunction

  // Index of the least significant bit of group k.
  function automatic int unsigned csla_group_lsb(int unsigned width, int unsigned k);
    int unsigned lsb;
    lsb = 0;
    for (int unsigned i = 0; i < k; i++) lsb += csla_group_size(width, i);
    return lsb;
  endfunction

  // Number of groups of a WIDTH-bit adder.
  function automatic int unsigned csla_num_groups(int unsigned width);
    int unsigned n;
    n = 0;
    while (csla_group_size(width, n) != 0) n++;
    return n;
  endfunction

  // Clock cycles from a change of the operands until every latch-based adder
  // on the longest chain has settled: one per adder level. The 8x8 multiplier
  // has three levels of adders, the 16x16 multiplier three more on top.
  localparam int unsigned VEDIC8_LATENCY  = 3;
  localparam int unsigned VEDIC16_LATENCY = 6;

endpackage
