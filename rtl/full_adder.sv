// One-bit full adder, the stage of the ripple carry adder (rca_adder).
//
// s = a XOR b XOR cin, cout = majority(a, b, cin), written as
// a&b | cin&(a^b). Purely combinational. The original design only names the
// cell; the gate form is the textbook one.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);

  logic p;

  assign p    = a ^ b;
  assign s    = p ^ cin;
  assign cout = (a & b) | (cin & p);

endmodule
