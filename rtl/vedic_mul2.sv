// 2x2-bit Vedic multiplier cell (Urdhva-Tiryakbhyam, "vertically and
// crosswise").
//
// The four partial products AiBj are single AND gates. Following the
// original 2x2 architecture:
//   S0      = A0B0                  (vertical, right column)
//   C1 S1   = A1B0 + A0B1           (crosswise, first half adder)
//   C2 S2   = C1   + A1B1           (vertical, left column, second half adder)
//   s       = {C2, S2, S1, S0}
// Purely combinational, no clock. This is the leaf of vedic_mul's recursion.
module vedic_mul2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] s
);

  logic c1;

  assign s[0] = a[0] & b[0];

  half_adder u_ha_cross (
    .a (a[1] & b[0]),
    .b (a[0] & b[1]),
    .s (s[1]),
    .c (c1)
  );

  half_adder u_ha_high (
    .a (a[1] & b[1]),
    .b (c1),
    .s (s[2]),
    .c (s[3])
  );

endmodule
