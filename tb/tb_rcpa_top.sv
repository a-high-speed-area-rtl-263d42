// End-to-end test of rcpa_top with every parameter at its default.
//
// FIR filter: first the single product 20 * 122 = 2440 (x = 20 against
// h = {122, 0, 0, 0}), then a random sample stream with bursts and gaps, a
// reset in the middle and two coefficient sets. Each output is compared with
// the reference model (exact products, RCPFA-II sums) and must arrive 9 clocks
// after its sample. Three-operand adder: random words compared with the
// reference model, in parallel with the filter traffic.
//
// Counted mechanisms (each must occur at least once): back-to-back samples,
// gaps in the sample stream, a full multiplier pipeline (8 samples in flight),
// a reset with samples in flight, filter outputs where the approximate sum
// differs from the exact convolution and ones where it is exact, adder
// results with carry-in set, and adder results with and without
// approximation error.
module tb_rcpa_top;
  import rcpa_pkg::*;
  import rcpa_ref_pkg::*;

  localparam int TAPS = 4, DW = 8, OW = 18, LAT = 9, TW = 16;
  logic clk = 1'b0, rst = 1'b1;
  logic fir_in_valid = 1'b0;
  logic [DW-1:0] fir_x = '0;
  logic [DW-1:0] fir_h [TAPS];
  logic fir_out_valid;
  logic [OW-1:0] fir_y;
  logic [TW-1:0] toa_a = '0, toa_b = '0, toa_c = '0;
  logic toa_cin = 1'b0;
  logic [TW:0] toa_sum;
  logic toa_cout;

  int checks = 0, failures = 0;
  longint cycle = 0;
  longint unsigned hist [TAPS];
  int n_b2b = 0, n_gap = 0, n_full = 0, n_reset_inflight = 0;
  int n_fir_err = 0, n_fir_exact = 0, n_toa_cin = 0, n_toa_err = 0, n_toa_exact = 0;
  bit prev_valid = 1'b0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  rcpa_top dut (
    .clk(clk), .rst(rst),
    .fir_in_valid(fir_in_valid), .fir_x(fir_x), .fir_h(fir_h),
    .fir_out_valid(fir_out_valid), .fir_y(fir_y),
    .toa_a(toa_a), .toa_b(toa_b), .toa_c(toa_c), .toa_cin(toa_cin),
    .toa_sum(toa_sum), .toa_cout(toa_cout)
  );

  typedef struct {
    longint unsigned exact;
    longint unsigned approx;
    longint          issued;
  } exp_t;
  exp_t q[$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Three-operand adder, checked once per cycle alongside the filter.
  task automatic check_toa();
    longint unsigned exact, ps, sc2, want;
    bit unused;
    exact = longint'(toa_a) + longint'(toa_b) + longint'(toa_c) + longint'(toa_cin);
    ps    = longint'(toa_a ^ toa_b ^ toa_c);
    sc2   = longint'(toa_a) + longint'(toa_b) + longint'(toa_c) - ps;
    want  = ref_add(ps, sc2, toa_cin, TW + 1, FC_II, unused);
    checks++;
    if ({toa_cout, toa_sum} != (TW + 2)'(want)) begin
      failures++;
      $display("FAIL toa a=%0h b=%0h c=%0h cin=%0d: %0d want %0d",
               toa_a, toa_b, toa_c, toa_cin, {toa_cout, toa_sum}, want);
    end
    if (toa_cin) n_toa_cin++;
    if (want == exact) n_toa_exact++;
    else               n_toa_err++;
  endtask

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
      p = hist[i] * longint'(fir_h[i]);
      e.exact += p;
      if (i == 0) e.approx = p;
      else        e.approx = ref_add(e.approx, p, 1'b0, OW, FC_II, unused) & ((64'd1 << OW) - 1);
    end
    fir_x = xs; fir_in_valid = 1'b1;
    e.issued = cycle;
    q.push_back(e);
    if (prev_valid) n_b2b++;
    if (q.size() >= 8) n_full++;
    @(posedge clk);
    #1 fir_in_valid = 1'b0;
  endtask

  // Sampling half a clock after each edge.
  always @(negedge clk) begin
    exp_t e;
    prev_valid <= fir_in_valid;
    if (!rst) begin
      check_toa();
      toa_a   <= TW'($urandom);
      toa_b   <= TW'($urandom);
      toa_c   <= TW'($urandom);
      toa_cin <= 1'($urandom);
      if (fir_out_valid) begin
        checks++;
        if (q.size() == 0) begin failures++; $display("FAIL unexpected filter output"); end
        else begin
          e = q.pop_front();
          if (fir_y != OW'(e.approx) || cycle - e.issued != LAT) begin
            failures++;
            $display("FAIL fir y=%0d want %0d latency %0d", fir_y, e.approx, cycle - e.issued);
          end
          if (e.approx == e.exact) n_fir_exact++;
          else                     n_fir_err++;
        end
      end
    end
  end

  task automatic gap(input int n);
    n_gap++;
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic do_reset();
    if (q.size() != 0) n_reset_inflight++;
    rst = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
    q.delete();
    clear_history();
  endtask

  initial begin
    clear_history();
    fir_h[0] = 8'd122; fir_h[1] = 8'd0; fir_h[2] = 8'd0; fir_h[3] = 8'd0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // The 20 * 122 product, alone in the filter.
    send(8'd20);
    gap(LAT + 1);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL first product missing"); end

    foreach (fir_h[i]) fir_h[i] = DW'($urandom);
    for (int k = 0; k < 300; k++) begin
      send(DW'($urandom));
      if ($urandom_range(0, 4) == 0) gap($urandom_range(1, 3));
    end
    // Reset with samples still in the pipeline, then a new coefficient set.
    do_reset();
    foreach (fir_h[i]) fir_h[i] = DW'($urandom);
    for (int k = 0; k < 300; k++) begin
      send(DW'($urandom));
      if ($urandom_range(0, 4) == 0) gap($urandom_range(1, 3));
    end
    gap(LAT + 2);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL filter outputs missing"); end

    $display("back-to-back samples %0d, gaps %0d, full pipeline %0d, reset in flight %0d",
             n_b2b, n_gap, n_full, n_reset_inflight);
    $display("filter outputs exact %0d, approximate %0d; adder carry-in %0d, exact %0d, approximate %0d",
             n_fir_exact, n_fir_err, n_toa_cin, n_toa_exact, n_toa_err);
    if (n_b2b == 0)            begin failures++; $display("FAIL no back-to-back samples"); end
    if (n_gap == 0)            begin failures++; $display("FAIL no gaps"); end
    if (n_full == 0)           begin failures++; $display("FAIL pipeline never full"); end
    if (n_reset_inflight == 0) begin failures++; $display("FAIL no reset in flight"); end
    if (n_fir_exact == 0)      begin failures++; $display("FAIL no exact filter output"); end
    if (n_fir_err == 0)        begin failures++; $display("FAIL no approximate filter output"); end
    if (n_toa_cin == 0)        begin failures++; $display("FAIL adder carry-in never set"); end
    if (n_toa_exact == 0)      begin failures++; $display("FAIL no exact adder result"); end
    if (n_toa_err == 0)        begin failures++; $display("FAIL no approximate adder result"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
