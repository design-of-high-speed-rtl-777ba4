// vedic2x2: 2x2-bit Urdhva-Tiryakbhyam ("vertically and crosswise")
// multiplier, the leaf cell of the Vedic multiplier tree.
//
//   s0     = a0 b0                 (vertical, LSBs)
//   c1 s1  = a1 b0 + a0 b1         (crosswise, half adder)
//   c2 s2  = c1 + a1 b1            (vertical, MSBs, half adder)
//   p      = c2 s2 s1 s0
//
// Four AND gates and two half adders, as the structure is described.
// Purely combinational.
module vedic2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic c1;

  assign p[0] = a[0] & b[0];

  half_adder u_ha_cross (
    .a(a[1] & b[0]),
    .b(a[0] & b[1]),
    .s(p[1]),
    .c(c1)
  );

  half_adder u_ha_msb (
    .a(c1),
    .b(a[1] & b[1]),
    .s(p[2]),
    .c(p[3])
  );
endmodule
