// vedic_pkg: types shared by the Vedic multiplier modules.
//
// Every multiplier level combines four partial products with three adders.
// Those adders are either ripple-carry adders or Kogge-Stone parallel-prefix
// adders; adder_kind_e selects which, and is a parameter of every multiplier
// module so that both variants are built from the same source.
package vedic_pkg;

  typedef enum logic {
    ADDER_RCA = 1'b0,  // ripple carry adder (chain of 1-bit full adders)
    ADDER_KSA = 1'b1   // Kogge-Stone parallel prefix adder
  } adder_kind_e;

endpackage
