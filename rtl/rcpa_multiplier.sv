// Pipelined unsigned shift-and-add multiplier built on RCPA adders.
//
// y = a * b, WIDTH x WIDTH -> 2*WIDTH bits. Multiplier bit k selects the
// partial product b & {WIDTH{a[k]}} ("anded"), which an RCPA adds to the
// running upper half ("added", WIDTH+1 bits). The least significant bit of
// that sum is final and is stored at bit k of the lower product half
// ("lsbed"); the remaining WIDTH bits, shifted down by one, are the new upper
// half ("regadd"). LEVELS partial products are handled per pipeline stage, so
// there are STAGES = WIDTH/LEVELS stages, each ending in a register; a and b
// travel along the pipeline ("aregs", "bregs"). The first stage starts from
// zero ("addszero", "lsbszero").
//
// Timing: a new operand pair may enter on every clock (in_valid). Its product
// appears on y with out_valid exactly STAGES clocks later. rst is synchronous
// and active high and clears the valid pipeline and all data registers.
//
// The signal names and WIDTH = 8, STAGES = 8, LEVELS = 1 are those of the
// published simulation of this unit. The valid handshake, the reset style and
// the exact-forecast default (FORECAST = FC_EXACT, which reproduces the exact
// product shown there) are this design's choices; an approximate RCPA
// forecast can be selected.
module rcpa_multiplier
  import rcpa_pkg::*;
#(
  parameter int        WIDTH    = 8,
  parameter int        LEVELS   = 1,
  parameter forecast_e FORECAST = FC_EXACT
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic               out_valid,
  output logic [2*WIDTH-1:0] y
);

  localparam int STAGES = WIDTH / LEVELS;

  // Pipeline registers; index s holds the state after stage s.
  logic [WIDTH-1:0] aregs  [STAGES];
  logic [WIDTH-1:0] bregs  [STAGES];
  logic [WIDTH-1:0] regadd [STAGES];
  logic [WIDTH-1:0] reglsb [STAGES];
  logic             vregs  [STAGES];

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    // Stage inputs: primary inputs for stage 0, previous registers after.
    logic [WIDTH-1:0] a_in, b_in, add_in, lsb_in;
    logic             v_in;

    if (s == 0) begin : g_first
      assign a_in   = a;
      assign b_in   = b;
      assign add_in = '0;   // addszero
      assign lsb_in = '0;   // lsbszero
      assign v_in   = in_valid;
    end else begin : g_next
      assign a_in   = aregs[s-1];
      assign b_in   = bregs[s-1];
      assign add_in = regadd[s-1];
      assign lsb_in = reglsb[s-1];
      assign v_in   = vregs[s-1];
    end

    // LEVELS partial products in a combinational chain.
    logic [WIDTH-1:0] anded [LEVELS];
    logic [WIDTH:0]   added [LEVELS];
    logic [WIDTH-1:0] acc   [LEVELS+1];
    logic [WIDTH-1:0] lsbed [LEVELS+1];

    assign acc[0]   = add_in;
    assign lsbed[0] = lsb_in;

    for (genvar l = 0; l < LEVELS; l++) begin : g_level
      localparam int K = s * LEVELS + l;   // multiplier bit handled here

      assign anded[l] = b_in & {WIDTH{a_in[K]}};

      rcpa #(.WIDTH(WIDTH), .FORECAST(FORECAST)) u_add (
        .a    (acc[l]),
        .b    (anded[l]),
        .cin  (1'b0),
        .sum  (added[l][WIDTH-1:0]),
        .cout (added[l][WIDTH]),
        .c_lsb()
      );

      assign acc[l+1] = added[l][WIDTH:1];
      // Bit K of lsbed[l] is still zero, so OR-ing places the new bit.
      assign lsbed[l+1] = lsbed[l] | (WIDTH'(added[l][0]) << K);
    end

    always_ff @(posedge clk) begin
      if (rst) begin
        aregs[s]  <= '0;
        bregs[s]  <= '0;
        regadd[s] <= '0;
        reglsb[s] <= '0;
        vregs[s]  <= 1'b0;
      end else begin
        aregs[s]  <= a_in;
        bregs[s]  <= b_in;
        regadd[s] <= acc[LEVELS];
        reglsb[s] <= lsbed[LEVELS];
        vregs[s]  <= v_in;
      end
    end
  end

  assign y         = {regadd[STAGES-1], reglsb[STAGES-1]};
  assign out_valid = vregs[STAGES-1];

  initial begin
    assert (WIDTH % LEVELS == 0)
      else $error("rcpa_multiplier: WIDTH must be a multiple of LEVELS");
  end

endmodule
