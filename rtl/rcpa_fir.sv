// Direct-form FIR filter built from RCPA multipliers and RCPA adders.
//
//     y(n) = sum_{i=0}^{TAPS-1} x(n-i) * h(i)
//
// A delay line of TAPS-1 registers holds x(n-1) .. x(n-TAPS+1); x(n) itself
// feeds tap 0. Every tap has its own pipelined shift-and-add multiplier
// (rcpa_multiplier), and the TAPS products are summed by a chain of OUT_W-bit
// RCPA adders, as in the tapped-delay-line structure with one adder per tap.
// Data and coefficients are unsigned.
//
// Timing: one sample per clock at most. A sample accepted with in_valid = 1
// shifts the delay line; its output y(n) appears with out_valid exactly
// MUL_STAGES + 1 clocks later (multiplier pipeline plus the output register).
// Coefficients h are plain inputs and must be held steady while samples that
// use them are in flight. rst is synchronous, active high, and clears the
// delay line, so the filter starts from x = 0 history.
//
// Four taps follow the published filter drawing and 8-bit data and
// coefficients its multiplier; OUT_W is wide enough for the exact sum.
// Sample handshake, reset behaviour, unsigned arithmetic and the forecast
// choices (exact in the multipliers, RCPFA-II in the summing adders) are this
// design's choices.
module rcpa_fir
  import rcpa_pkg::*;
#(
  parameter int        TAPS         = 4,
  parameter int        DATA_W       = 8,
  parameter forecast_e MUL_FORECAST = FC_EXACT,
  parameter forecast_e ADD_FORECAST = FC_II,
  parameter int        OUT_W        = 2 * DATA_W + $clog2(TAPS)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] x,
  input  logic [DATA_W-1:0] h [TAPS],
  output logic              out_valid,
  output logic [OUT_W-1:0]  y
);

  localparam int PROD_W = 2 * DATA_W;

  // Tapped delay line: xt[i] = x(n-i).
  logic [DATA_W-1:0] xt [TAPS];
  assign xt[0] = x;

  for (genvar i = 1; i < TAPS; i++) begin : g_delay
    always_ff @(posedge clk) begin
      if (rst)           xt[i] <= '0;
      else if (in_valid) xt[i] <= xt[i-1];
    end
  end

  // One multiplier per tap; all have the same latency.
  logic [PROD_W-1:0] prod  [TAPS];
  logic              pvalid[TAPS];

  for (genvar i = 0; i < TAPS; i++) begin : g_tap
    rcpa_multiplier #(.WIDTH(DATA_W), .LEVELS(1), .FORECAST(MUL_FORECAST)) u_mul (
      .clk      (clk),
      .rst      (rst),
      .in_valid (in_valid),
      .a        (xt[i]),
      .b        (h[i]),
      .out_valid(pvalid[i]),
      .y        (prod[i])
    );
  end

  // Adder chain: partial[i] = sum of products 0..i.
  logic [OUT_W-1:0] partial [TAPS];
  assign partial[0] = OUT_W'(prod[0]);

  for (genvar i = 1; i < TAPS; i++) begin : g_sum
    logic [OUT_W-1:0] s;
    rcpa #(.WIDTH(OUT_W), .FORECAST(ADD_FORECAST)) u_add (
      .a    (partial[i-1]),
      .b    (OUT_W'(prod[i])),
      .cin  (1'b0),
      .sum  (s),
      .cout (),
      .c_lsb()
    );
    assign partial[i] = s;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      y         <= partial[TAPS-1];
      out_valid <= pvalid[0];
    end
  end

endmodule
