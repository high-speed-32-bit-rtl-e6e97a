// Shared types of the Vedic multiplier.
//
// adder_e selects which adder adds the partial products inside every level
// of the recursive multiplier: the Kogge-Stone parallel-prefix adder
// (multiplier-1, the faster one) or the ripple carry adder (multiplier-2).
// Both variants are defined by the original design; the enum encoding is
// this implementation's choice.
package vedic_pkg;

  typedef enum logic {
    ADDER_KSA = 1'b0,  // Kogge-Stone adder, log2(W) prefix levels
    ADDER_RCA = 1'b1   // ripple carry adder, chain of W full adders
  } adder_e;

endpackage
