// One-bit half adder.
//
// Adds two bits: s = a XOR b, c = a AND b. Two of these form the 2x2
// Vedic cell (vedic_mul2). Purely combinational. The gate-level form is the
// textbook half adder; the original design only names the cell.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);

  assign s = a ^ b;
  assign c = a & b;

endmodule
