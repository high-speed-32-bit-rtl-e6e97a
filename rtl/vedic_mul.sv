// NxN unsigned Vedic multiplier (Urdhva-Tiryakbhyam), built recursively.
//
// Each operand is split into halves of H = N/2 bits: A = {AH, AL},
// B = {BH, BL}. Four HxH Vedic multipliers form the vertical and crosswise
// products in parallel:
//   PLL = AL*BL,  PLH = AL*BH,  PHL = AH*BL,  PHH = AH*BH   (N bits each)
// and three N-bit adders of type ADDER combine them:
//   adder 1: X       = PLH + PHL                 carry out ca1
//   adder 2: Y       = X + {0, PLL[N-1:H]}       carry out ca2
//   adder 3: S[2N-1:N] = PHH + {0, ca1|ca2, Y[N-1:H]}
//   S[N-1:H] = Y[H-1:0],  S[H-1:0] = PLL[H-1:0]
// The original 32x32 architecture draws only ca1 into adder 3. Adder 2 can
// carry out as well (A = FFFFFFFF, B = 0002FFFF is one case), so this design
// adds ca2. ca1 and ca2 are never both 1, because
// PLH + PHL + PLL[N-1:H] < 2^(N+1), so one OR gate merges them into the
// single carry bit that adder 3 takes.
//
// The recursion goes N -> N/2 -> ... -> 2, where the 2x2 cell vedic_mul2
// ends it; every level uses the same adder type. ADDER = ADDER_KSA is
// multiplier-1 (Kogge-Stone), ADDER_RCA is multiplier-2 (ripple carry). N
// must be a power of two, at least 2. Purely combinational: no clock, no
// registers, the product is valid one combinational delay after a and b.
//
// Ports: a, b (N bits, unsigned) -> s (2N bits) = a*b.
//
// Lint note: when Verilator lints this module as its own top level it does
// not follow the self-instantiation, and reports p_ll..p_hh as undriven and
// a, b as unused. Linted or simulated under any parent (vedic_mul32_top, the
// testbenches), the recursion is elaborated and both warnings are absent.
module vedic_mul
  import vedic_pkg::*;
#(
  parameter int unsigned N     = 32,
  parameter adder_e      ADDER = ADDER_KSA
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] s
);

  if (N < 2 || (N & (N - 1)) != 0) begin : g_bad_width
    $error("vedic_mul: N must be a power of two, at least 2");
  end

  if (N == 2) begin : g_leaf

    vedic_mul2 u_cell (
      .a (a),
      .b (b),
      .s (s)
    );

  end else begin : g_split

    localparam int unsigned H = N / 2;

    // the four vertical and crosswise products
    logic [N-1:0] p_ll, p_lh, p_hl, p_hh;

    vedic_mul #(.N(H), .ADDER(ADDER)) u_mul_ll (.a(a[H-1:0]), .b(b[H-1:0]), .s(p_ll));
    vedic_mul #(.N(H), .ADDER(ADDER)) u_mul_lh (.a(a[H-1:0]), .b(b[N-1:H]), .s(p_lh));
    vedic_mul #(.N(H), .ADDER(ADDER)) u_mul_hl (.a(a[N-1:H]), .b(b[H-1:0]), .s(p_hl));
    vedic_mul #(.N(H), .ADDER(ADDER)) u_mul_hh (.a(a[N-1:H]), .b(b[N-1:H]), .s(p_hh));

    // operands and results of the three adders, index 0..2 = adder 1..3
    logic [N-1:0] add_a [3];
    logic [N-1:0] add_b [3];
    logic [N-1:0] add_s [3];
    logic [2:0]   add_c;
    logic         ca1, ca2;  // carries out of adders 1 and 2

    assign ca1 = add_c[0];
    assign ca2 = add_c[1];

    assign add_a[0] = p_lh;
    assign add_b[0] = p_hl;
    assign add_a[1] = add_s[0];
    assign add_b[1] = {{H{1'b0}}, p_ll[N-1:H]};
    assign add_a[2] = p_hh;
    assign add_b[2] = {{(H-1){1'b0}}, ca1 | ca2, add_s[1][N-1:H]};

    for (genvar k = 0; k < 3; k++) begin : g_adder
      if (ADDER == ADDER_KSA) begin : g_ksa
        ksa_adder #(.W(N)) u_add (
          .a    (add_a[k]),
          .b    (add_b[k]),
          .sum  (add_s[k]),
          .cout (add_c[k])
        );
      end else begin : g_rca
        rca_adder #(.W(N)) u_add (
          .a    (add_a[k]),
          .b    (add_b[k]),
          .sum  (add_s[k]),
          .cout (add_c[k])
        );
      end
    end

    assign s = {add_s[2], add_s[1][H-1:0], p_ll[H-1:0]};

    // The product fits in 2N bits, so adder 3 never carries out, and the
    // carries of adders 1 and 2 are exclusive (see the header).
    always_comb begin
      a_no_cout3 : assert (add_c[2] == 1'b0)
        else $error("vedic_mul: adder 3 carried out");
      a_excl_carry : assert (!(ca1 && ca2))
        else $error("vedic_mul: carries of adders 1 and 2 both set");
    end

  end

endmodule
