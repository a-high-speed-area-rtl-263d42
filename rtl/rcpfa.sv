// Reverse carry propagate full-adder cell (RCPFA).
//
// The cell at bit i receives the carry C_{i+1} from the cell above it and
// produces the carry C_i for the cell below it: C_i is the carry this bit
// assumes will come from below, C_{i+1} the carry the bit above has already
// counted. The cell aims at
//     S_i - C_i = A_i + B_i - 2*C_{i+1}.
// When A_i = B_i = C_{i+1} the choice of C_i is free and the forecast F_i
// decides it; when A_i != B_i the carry passes straight through. The two
// remaining input patterns cannot be met and produce an error of one unit at
// weight 2^i.
//
// Gate-level form, with X_i = C_{i+1} & ~(A_i & B_i), Y_i = C_{i+1} | (~A_i & ~B_i):
//     S_i = F_i & ~X_i | ~Y_i
//     C_i = F_i &  Y_i |  X_i
// This is the published optimised two-level structure.
//
// The cell also makes the forecast F_{i+1} for the cell above, by the rule
// FORECAST (see rcpa_pkg): A_i (RCPFA-I), A_i & B_i (RCPFA-II), A_i | B_i
// (RCPFA-III), or the true carry out of bit i (FC_EXACT, this design's
// addition, which chains through f). Purely combinational.
module rcpfa
  import rcpa_pkg::*;
#(
  parameter forecast_e FORECAST = FC_II
) (
  input  logic a,     // A_i
  input  logic b,     // B_i
  input  logic c_hi,  // C_{i+1}, from the more significant cell
  input  logic f,     // F_i, forecast of the carry into bit i
  output logic s,     // S_i
  output logic c_lo,  // C_i, to the less significant cell
  output logic f_hi   // F_{i+1}, forecast for the more significant cell
);

  logic x, y;

  always_comb begin
    x    = c_hi & ~(a & b);
    y    = c_hi | (~a & ~b);
    s    = (f & ~x) | ~y;
    c_lo = (f & y) | x;
    unique case (FORECAST)
      FC_EXACT: f_hi = (a & b) | ((a ^ b) & f);
      FC_I:     f_hi = a;
      FC_II:    f_hi = a & b;
      default:  f_hi = a | b;
    endcase
  end

endmodule
