// vedic_pkg: types shared by the Vedic multiplier modules.
//
// The 16x16 stage sums its four 8x8 partial products with three 16-bit
// adders. The architecture calls for carry look-ahead adders at that stage,
// while the lower stages (and the alternative netlist of the 16x16 stage)
// use ripple-carry adders. adder_kind_e selects between the two so that the
// same multiplier can be built either way; the look-ahead form is the
// default.
package vedic_pkg;

  typedef enum logic {
    ADDER_RIPPLE = 1'b0,  // chain of full adders
    ADDER_CLA    = 1'b1   // two-level carry look-ahead
  } adder_kind_e;

endpackage
