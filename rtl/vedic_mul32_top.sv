// The two proposed 32x32 Vedic multipliers, side by side on one pair of
// operands.
//
// Multiplier-1 adds its partial products with Kogge-Stone adders at every
// level of the recursion, multiplier-2 with ripple carry adders; otherwise
// the two are the same structure (see vedic_mul). Both must give the same
// product; the two are brought out separately so either can be used or their
// delay compared. The port names a, b, c follow the original simulation
// waveform; splitting c into c1 and c2 is this design's choice.
//
// Purely combinational: no clock, no reset. c1 and c2 are valid one
// combinational delay after a and b change (the original reports 0.95 ns for
// multiplier-1 and 1.43 ns for multiplier-2 in a 45 nm process).
//
// Ports: a, b (N bits, unsigned) -> c1, c2 (2N bits) = a*b.
module vedic_mul32_top
  import vedic_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] c1,
  output logic [2*N-1:0] c2
);

  // proposed multiplier-1: Kogge-Stone partial-product adders
  vedic_mul #(.N(N), .ADDER(ADDER_KSA)) u_mul1_ksa (
    .a (a),
    .b (b),
    .s (c1)
  );

  // proposed multiplier-2: ripple carry partial-product adders
  vedic_mul #(.N(N), .ADDER(ADDER_RCA)) u_mul2_rca (
    .a (a),
    .b (b),
    .s (c2)
  );

endmodule
