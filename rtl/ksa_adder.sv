// W-bit Kogge-Stone parallel-prefix adder with carry out.
//
// Three stages, as in the original design:
//   1. Pre-processing: per bit, G_i = a_i AND b_i, P_i = a_i XOR b_i.
//   2. Look-ahead carry generation: LEVELS = ceil(log2 W) rows of prefix
//      ("black") cells. In row l (span d = 2^l) every bit i >= d combines its
//      group (G, P) with the group of bit i-d:
//          G' = G_i OR (P_i AND G_{i-d}),   P' = P_i AND P_{i-d}
//      and bits i < d pass straight down. After the last row G[i] is the
//      generate of bits i..0, i.e. the carry out of bit i. Every cell
//      computes both G' and P' (the original shows only this one cell type).
//   3. Post-processing: sum_i = P_i XOR carry_{i-1}, carry_{-1} = 0.
// cout is the group generate of all W bits. There is no carry in (this
// design's choice: none of the multiplier's adders uses one). Purely
// combinational, carry depth O(log W). Used by multiplier-1.
//
// Ports: a, b (W bits) -> sum (W bits), cout.
module ksa_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned LEVELS = $clog2(W);

  if (W < 2) begin : g_bad_width
    $error("ksa_adder: W must be at least 2");
  end

  // gen[l] / prop[l]: group generate / propagate entering prefix row l;
  // row 0 is the pre-processing output, row LEVELS the finished carries.
  logic [W-1:0] gen  [LEVELS+1];
  logic [W-1:0] prop [LEVELS+1];

  // 1. pre-processing
  assign gen[0]  = a & b;
  assign prop[0] = a ^ b;

  // 2. look-ahead carry generation
  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned D = 1 << l;
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (i >= D) begin : g_black
        assign gen[l+1][i]  = gen[l][i] | (prop[l][i] & gen[l][i-D]);
        assign prop[l+1][i] = prop[l][i] & prop[l][i-D];
      end else begin : g_pass
        assign gen[l+1][i]  = gen[l][i];
        assign prop[l+1][i] = prop[l][i];
      end
    end
  end

  // 3. post-processing
  assign sum  = prop[0] ^ {gen[LEVELS][W-2:0], 1'b0};
  assign cout = gen[LEVELS][W-1];

endmodule
