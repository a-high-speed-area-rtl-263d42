// Test of the RCPA FIR filter, y(n) = sum_i x(n-i) h(i).
//  * Default instance (4 taps, 8-bit data, exact multipliers, RCPFA-II summing
//    adders): every output is compared with the same sum formed by the
//    reference RCPA model, and must arrive 9 clocks after its sample.
//  * Instance with exact summing adders: every output must equal the exact
//    convolution.
// Samples come back to back and with gaps; two coefficient sets are used, with
// a reset between them that must clear the delay line.
module tb_rcpa_fir;
  import rcpa_pkg::*;
  import rcpa_ref_pkg::*;

  localparam int TAPS = 4, DW = 8, OW = 2 * DW + 2, LAT = 9;
  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  logic [DW-1:0] x = '0;
  logic [DW-1:0] h [TAPS];
  logic [OW-1:0] y0, y1;
  logic v0, v1;
  int checks = 0, failures = 0;
  longint cycle = 0;
  longint unsigned hist [TAPS];

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  rcpa_fir dut0 (.clk(clk), .rst(rst), .in_valid(in_valid), .x(x), .h(h), .out_valid(v0), .y(y0));
  rcpa_fir #(.ADD_FORECAST(FC_EXACT)) dut1 (.clk(clk), .rst(rst), .in_valid(in_valid), .x(x), .h(h), .out_valid(v1), .y(y1));

  typedef struct {
    longint unsigned exact;
    longint unsigned approx;
    longint          issued;
  } exp_t;
  exp_t q[$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic clear_history();
    foreach (hist[i]) hist[i] = 0;
  endtask

  task automatic send(input logic [DW-1:0] xs);
    exp_t e;
    bit unused;
    longint unsigned p;
    for (int i = TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = longint'(xs);
    e.exact  = 0;
    e.approx = 0;
    for (int i = 0; i < TAPS; i++) begin
      p = hist[i] * longint'(h[i]);
      e.exact += p;
      if (i == 0) e.approx = p;
      else        e.approx = ref_add(e.approx, p, 1'b0, OW, FC_II, unused) & ((64'd1 << OW) - 1);
    end
    x = xs; in_valid = 1'b1;
    e.issued = cycle;
    q.push_back(e);
    @(posedge clk);
    #1 in_valid = 1'b0;
  endtask

  always @(negedge clk) begin
    exp_t e;
    if (!rst && v0) begin
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        e = q.pop_front();
        if (y0 != OW'(e.approx) || cycle - e.issued != LAT) begin
          failures++;
          $display("FAIL approx y=%0d want %0d latency %0d", y0, e.approx, cycle - e.issued);
        end
        checks++;
        if (!v1 || y1 != OW'(e.exact)) begin
          failures++;
          $display("FAIL exact y=%0d want %0d", y1, e.exact);
        end
      end
    end
  end

  task automatic run(input int n);
    for (int k = 0; k < n; k++) begin
      send(DW'($urandom));
      if ($urandom_range(0, 3) == 0) begin
        repeat ($urandom_range(1, 4)) @(posedge clk);
        #1;
      end
    end
    repeat (LAT + 2) @(posedge clk);
    #1;
  endtask

  initial begin
    clear_history();
    h[0] = 8'd3; h[1] = 8'd250; h[2] = 8'd17; h[3] = 8'd128;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    run(500);
    // New coefficients, after a reset that clears the delay line.
    rst = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
    clear_history();
    foreach (h[i]) h[i] = DW'($urandom);
    run(500);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL outputs missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
