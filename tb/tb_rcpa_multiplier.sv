// Test of the pipelined RCPA shift-and-add multiplier.
//  * Default instance (8x8, one partial product per stage, exact forecast):
//    20 * 122 = 2440 first, then 2000 random operand pairs issued back to back
//    and with random gaps; every product must equal a*b and arrive exactly
//    8 clocks after its operands.
//  * LEVELS = 2 instance: same products, 4 clocks of latency.
//  * RCPFA-II instance: products must match the shift-and-add reference built
//    on the reference RCPA model.
module tb_rcpa_multiplier;
  import rcpa_pkg::*;
  import rcpa_ref_pkg::*;

  localparam int W = 8;
  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  logic [W-1:0] a = '0, b = '0;
  logic [2*W-1:0] y0, y1, y2;
  logic v0, v1, v2;
  int checks = 0, failures = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  rcpa_multiplier dut0 (.clk(clk), .rst(rst), .in_valid(in_valid), .a(a), .b(b), .out_valid(v0), .y(y0));
  rcpa_multiplier #(.WIDTH(W), .LEVELS(2)) dut1 (.clk(clk), .rst(rst), .in_valid(in_valid), .a(a), .b(b), .out_valid(v1), .y(y1));
  rcpa_multiplier #(.WIDTH(W), .LEVELS(1), .FORECAST(FC_II)) dut2 (.clk(clk), .rst(rst), .in_valid(in_valid), .a(a), .b(b), .out_valid(v2), .y(y2));

  typedef struct {
    longint unsigned exact;
    longint unsigned approx;
    longint          issued;
  } exp_t;
  exp_t q0[$], q1[$], q2[$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Drive operands after each rising edge; record what was issued.
  task automatic issue(input logic [W-1:0] ia, input logic [W-1:0] ib);
    exp_t e;
    a = ia; b = ib; in_valid = 1'b1;
    e.issued = cycle;   // the clock cycle in which the operands are presented
    @(posedge clk);
    #1 in_valid = 1'b0;
    e.exact  = longint'(ia) * longint'(ib);
    e.approx = ref_mul(longint'(ia), longint'(ib), W, FC_II);
    q0.push_back(e); q1.push_back(e); q2.push_back(e);
  endtask

  // Outputs are sampled half a clock after the edge that registered them.
  always @(negedge clk) begin
    exp_t e;
    if (!rst) begin
      if (v0) begin
        checks++;
        if (q0.size() == 0) begin failures++; $display("FAIL dut0 unexpected output"); end
        else begin
          e = q0.pop_front();
          if (y0 != 16'(e.exact) || cycle - e.issued != 8) begin
            failures++;
            $display("FAIL dut0 y=%0d want %0d latency %0d", y0, e.exact, cycle - e.issued);
          end
        end
      end
      if (v1) begin
        checks++;
        if (q1.size() == 0) begin failures++; $display("FAIL dut1 unexpected output"); end
        else begin
          e = q1.pop_front();
          if (y1 != 16'(e.exact) || cycle - e.issued != 4) begin
            failures++;
            $display("FAIL dut1 y=%0d want %0d latency %0d", y1, e.exact, cycle - e.issued);
          end
        end
      end
      if (v2) begin
        checks++;
        if (q2.size() == 0) begin failures++; $display("FAIL dut2 unexpected output"); end
        else begin
          e = q2.pop_front();
          if (y2 != 16'(e.approx) || cycle - e.issued != 8) begin
            failures++;
            $display("FAIL dut2 y=%0d want %0d", y2, e.approx);
          end
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    issue(8'd20, 8'd122);
    issue(8'd255, 8'd255);
    issue(8'd0, 8'd255);
    for (int n = 0; n < 2000; n++) begin
      issue(W'($urandom), W'($urandom));
      if ($urandom_range(0, 3) == 0) begin repeat ($urandom_range(1, 5)) @(posedge clk); #1; end
    end
    repeat (12) @(posedge clk);
    checks++;
    if (q0.size() != 0 || q1.size() != 0 || q2.size() != 0) begin
      failures++;
      $display("FAIL products missing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
