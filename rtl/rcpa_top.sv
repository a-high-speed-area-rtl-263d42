// Top level: the RCPA FIR filter and the RCPA three-operand adder.
//
// The two units share no signals and stand side by side, each with its own
// ports. The filter (rcpa_fir) is a four-tap direct-form FIR whose taps use
// pipelined RCPA shift-and-add multipliers and whose products are summed with
// RCPA adders; the three-operand adder (rcpa_three_operand_adder) adds three
// 16-bit words and a carry. See those modules for timing: the filter delivers
// y(n) MUL_STAGES + 1 = 9 clocks after x(n) at the defaults, the adder is
// combinational. All parameters default to the values used by the sub-blocks.
module rcpa_top
  import rcpa_pkg::*;
#(
  parameter int        TAPS         = 4,
  parameter int        DATA_W       = 8,
  parameter forecast_e MUL_FORECAST = FC_EXACT,
  parameter forecast_e ADD_FORECAST = FC_II,
  parameter int        OUT_W        = 2 * DATA_W + $clog2(TAPS),
  parameter int        TOA_WIDTH    = 16,
  parameter forecast_e TOA_FORECAST = FC_II
) (
  input  logic                 clk,
  input  logic                 rst,
  // FIR filter
  input  logic                 fir_in_valid,
  input  logic [DATA_W-1:0]    fir_x,
  input  logic [DATA_W-1:0]    fir_h [TAPS],
  output logic                 fir_out_valid,
  output logic [OUT_W-1:0]     fir_y,
  // three-operand adder
  input  logic [TOA_WIDTH-1:0] toa_a,
  input  logic [TOA_WIDTH-1:0] toa_b,
  input  logic [TOA_WIDTH-1:0] toa_c,
  input  logic                 toa_cin,
  output logic [TOA_WIDTH:0]   toa_sum,
  output logic                 toa_cout
);

  rcpa_fir #(
    .TAPS        (TAPS),
    .DATA_W      (DATA_W),
    .MUL_FORECAST(MUL_FORECAST),
    .ADD_FORECAST(ADD_FORECAST),
    .OUT_W       (OUT_W)
  ) u_fir (
    .clk      (clk),
    .rst      (rst),
    .in_valid (fir_in_valid),
    .x        (fir_x),
    .h        (fir_h),
    .out_valid(fir_out_valid),
    .y        (fir_y)
  );

  rcpa_three_operand_adder #(
    .WIDTH   (TOA_WIDTH),
    .FORECAST(TOA_FORECAST)
  ) u_toa (
    .a   (toa_a),
    .b   (toa_b),
    .c   (toa_c),
    .cin (toa_cin),
    .sum (toa_sum),
    .cout(toa_cout)
  );

endmodule
