// WIDTH-bit reverse carry propagate adder (RCPA).
//
// A row of RCPFA cells whose carry chain runs from the MSB down to the LSB.
// Each bit gets a forecast F_i of the carry into it; F_0 is the carry-in and
// F_{i+1} for i >= 0 is made by the cell of bit i with the forecast rule
// FORECAST (see rcpa_pkg), so forecasts travel upwards while carries travel
// downwards. The most significant cell's carry input C_WIDTH is tied to the
// forecast F_WIDTH, which is also the carry-out, so the result is
// {cout, sum}, an approximation of a + b + cin. With FC_EXACT the forecasts are
// the true carries and the result is exact.
//
// c_lsb is C_0, the carry the least significant cell assumed from below.
// {cout, sum} = a + b + c_lsb + (sum of the cells' +-2^i errors), so a c_lsb
// that differs from cin adds c_lsb - cin to the error.
//
// Purely combinational. The critical path runs from the MSB forecast down the
// carry chain to S_0. Default WIDTH 8 follows the published 8-bit adder;
// the default forecast RCPFA-II is the variant with the lowest power and
// energy-delay product in its comparison.
module rcpa
  import rcpa_pkg::*;
#(
  parameter int        WIDTH    = 8,
  parameter forecast_e FORECAST = FC_II
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic             c_lsb
);

  logic [WIDTH:0] f;   // f[i] = F_i
  logic [WIDTH:0] c;   // c[i] = C_i

  assign f[0]     = cin;
  assign c[WIDTH] = f[WIDTH];

  for (genvar i = 0; i < WIDTH; i++) begin : g_cell
    rcpfa #(.FORECAST(FORECAST)) u_cell (
      .a   (a[i]),
      .b   (b[i]),
      .c_hi(c[i+1]),
      .f   (f[i]),
      .s   (sum[i]),
      .c_lo(c[i]),
      .f_hi(f[i+1])
    );
  end

  assign cout  = c[WIDTH];
  assign c_lsb = c[0];

endmodule
