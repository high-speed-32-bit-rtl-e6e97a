// W-bit ripple carry adder with carry out.
//
// A chain of W full adders; the carry out of stage i is the carry in of
// stage i+1, so the top sum bit and cout settle only after the carry has
// rippled through all W stages (delay linear in W). The carry into stage 0
// is 0: the multiplier never needs a carry in, and leaving the port out keeps
// the interface the same as ksa_adder (this design's choice). Purely
// combinational. Used by multiplier-2.
//
// Ports: a, b (W bits) -> sum (W bits), cout.
module rca_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         cout
);

  // c[i] is the carry into stage i
  logic [W:0] c;

  assign c[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_stage
    full_adder u_fa (
      .a    (a[i]),
      .b    (b[i]),
      .cin  (c[i]),
      .s    (sum[i]),
      .cout (c[i+1])
    );
  end

  assign cout = c[W];

endmodule
