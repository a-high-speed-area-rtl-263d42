// Shared types for the reverse carry propagate adder (RCPA) family.
//
// An RCPA row lets its carry run from the most significant bit towards the
// least significant one. Each cell needs a "forecast" F_i of the carry entering
// its bit from below. How that forecast is made is the only difference between
// the adder variants:
//   FC_EXACT : F_i is the true carry into bit i (exact result, a forward carry
//              chain is needed to make it).
//   FC_I     : F_{i+1} = A_i          (RCPFA-I)
//   FC_II    : F_{i+1} = A_i & B_i    (RCPFA-II)
//   FC_III   : F_{i+1} = A_i | B_i    (RCPFA-III)
// The three approximate forecasts are the ones whose carry statistics match the
// conditional error probabilities given for RCPFA-I/II/III; F_0 is always the
// carry-in. The exact forecast is this design's addition, used where an exact
// product is required.
package rcpa_pkg;

  typedef enum logic [1:0] {
    FC_EXACT = 2'd0,
    FC_I     = 2'd1,
    FC_II    = 2'd2,
    FC_III   = 2'd3
  } forecast_e;

endpackage
