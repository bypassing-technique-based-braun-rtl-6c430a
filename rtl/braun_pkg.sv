// Shared types for the bypassing Braun multipliers.
//
// final_adder_e selects the carry-propagate adder that merges the carry-save
// output of the array (the "last stage"): a ripple carry adder, which is the
// smaller and slower choice, or a Kogge-Stone prefix adder, the faster one.
package braun_pkg;

  typedef enum logic [0:0] {
    ADDER_RCA = 1'b0,
    ADDER_KSA = 1'b1
  } final_adder_e;

endpackage
