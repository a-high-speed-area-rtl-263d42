// Three-operand adder with an RCPA final stage.
//
//     {cout, sum} ~= a + b + c + cin        (WIDTH-bit operands)
//
// A row of ordinary full adders reduces the three operands to a partial-sum
// vector and a carry vector (carry-save form). The carry vector, shifted one
// place up, and the partial sum are then added by a WIDTH+1-bit reverse carry
// propagate adder, whose forecast input F_0 takes cin. The result has WIDTH+2
// bits. With FORECAST = FC_EXACT the result is exact; the approximate
// forecasts trade accuracy for a shorter, simpler carry path.
//
// Purely combinational. The 16-bit operands and the carry input follow the
// published description of its three-operand test; the carry-save front end
// (the structure of the carry-save three-operand adder it compares with) and
// the default RCPFA-II forecast are this design's choices. With RCPFA-II the
// forecast into the top bit is always 0 (the partial-sum vector has no bit
// there), so cout stays 0 and sums of 2^(WIDTH+1) or more come out too small.
module rcpa_three_operand_adder
  import rcpa_pkg::*;
#(
  parameter int        WIDTH    = 16,
  parameter forecast_e FORECAST = FC_II
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  input  logic             cin,
  output logic [WIDTH:0]   sum,
  output logic             cout
);

  logic [WIDTH-1:0] ps;   // partial sums
  logic [WIDTH-1:0] sc;   // saved carries, weight 2^(i+1)

  always_comb begin
    ps = a ^ b ^ c;
    sc = (a & b) | (a & c) | (b & c);
  end

  rcpa #(.WIDTH(WIDTH + 1), .FORECAST(FORECAST)) u_final (
    .a    ({1'b0, ps}),
    .b    ({sc, 1'b0}),
    .cin  (cin),
    .sum  (sum),
    .cout (cout),
    .c_lsb()
  );

endmodule
