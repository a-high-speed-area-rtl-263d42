// Test of the 16-bit three-operand RCPA adder.
//  * Exact-forecast instance: {cout, sum} must equal a + b + c + cin.
//  * Default instance (RCPFA-II): must equal the reference RCPA applied to the
//    carry-save form, where the partial sum and carry vectors are taken from
//    the integer identity a + b + c = (a ^ b ^ c) + 2 * carries.
// Corner cases first, then random operands.
module tb_rcpa_three_operand_adder;
  import rcpa_pkg::*;
  import rcpa_ref_pkg::*;

  localparam int W = 16;
  logic [W-1:0] a, b, c;
  logic         cin;
  logic [W:0]   s0, s1;
  logic         co0, co1;
  int checks = 0, failures = 0;

  rcpa_three_operand_adder dut0 (.a(a), .b(b), .c(c), .cin(cin), .sum(s0), .cout(co0));
  rcpa_three_operand_adder #(.WIDTH(W), .FORECAST(FC_EXACT)) dut1 (.a(a), .b(b), .c(c), .cin(cin), .sum(s1), .cout(co1));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint unsigned exact, ps, sc2, want;
    bit unused;
    #1;
    exact = longint'(a) + longint'(b) + longint'(c) + longint'(cin);
    ps    = longint'(a ^ b ^ c);
    sc2   = longint'(a) + longint'(b) + longint'(c) - ps;   // = 2 * carries
    want  = ref_add(ps, sc2, cin, W + 1, FC_II, unused);
    checks++;
    if ({co1, s1} != (W + 2)'(exact)) begin
      failures++;
      $display("FAIL exact a=%0h b=%0h c=%0h cin=%0d: %0d want %0d", a, b, c, cin, {co1, s1}, exact);
    end
    checks++;
    if ({co0, s0} != (W + 2)'(want)) begin
      failures++;
      $display("FAIL approx a=%0h b=%0h c=%0h cin=%0d: %0d want %0d", a, b, c, cin, {co0, s0}, want);
    end
  endtask

  initial begin
    a = '0; b = '0; c = '0; cin = 1'b0; check();
    a = '1; b = '1; c = '1; cin = 1'b1; check();
    a = '1; b = '0; c = '0; cin = 1'b1; check();
    a = 16'h8000; b = 16'h8000; c = 16'h8000; cin = 1'b0; check();
    for (int n = 0; n < 50000; n++) begin
      a = W'($urandom); b = W'($urandom); c = W'($urandom); cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
