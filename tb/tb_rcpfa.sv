// Exhaustive test of the RCPFA cell against the reverse-carry rule
// S_i - C_i = A_i + B_i - 2*C_{i+1}: where the rule leaves C_i free the
// forecast must decide it, where it cannot be met the cell must give the
// nearest value (S=1,C=0 for A=B=1,C_{i+1}=0; S=0,C=1 for A=B=0,C_{i+1}=1).
// The forecast output of every rule is checked too: A, A&B, A|B and the true
// carry out of A + B + F.
module tb_rcpfa;
  import rcpa_pkg::*;
  logic a, b, c_hi, f, s, c_lo;
  logic s_x [4];
  logic c_x [4];
  logic fh  [4];
  int checks = 0, failures = 0;

  rcpfa dut (.a(a), .b(b), .c_hi(c_hi), .f(f), .s(s), .c_lo(c_lo), .f_hi(fh[2]));
  rcpfa #(.FORECAST(FC_EXACT)) dut0 (.a(a), .b(b), .c_hi(c_hi), .f(f), .s(s_x[0]), .c_lo(c_x[0]), .f_hi(fh[0]));
  rcpfa #(.FORECAST(FC_I))     dut1 (.a(a), .b(b), .c_hi(c_hi), .f(f), .s(s_x[1]), .c_lo(c_x[1]), .f_hi(fh[1]));
  rcpfa #(.FORECAST(FC_III))   dut3 (.a(a), .b(b), .c_hi(c_hi), .f(f), .s(s_x[3]), .c_lo(c_x[3]), .f_hi(fh[3]));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want, got;
    bit exp_s, exp_c;
    for (int v = 0; v < 16; v++) begin
      {a, b, c_hi, f} = 4'(v);
      #1;
      want = int'(a) + int'(b) - 2 * int'(c_hi);
      if (a == b && b == c_hi) begin
        exp_c = f;                          // free choice: forecast decides
        exp_s = bit'(want + int'(f));
      end else if (a == b) begin
        exp_c = c_hi;                       // unreachable target
        exp_s = ~c_hi;
      end else begin
        exp_c = c_hi;                       // propagate
        exp_s = bit'(want + int'(c_hi));
      end
      got = int'(s) - int'(c_lo);
      checks++;
      if (s !== exp_s || c_lo !== exp_c) begin
        failures++;
        $display("FAIL a=%0d b=%0d c_hi=%0d f=%0d: s=%0d c_lo=%0d, want s=%0d c_lo=%0d",
                 a, b, c_hi, f, s, c_lo, exp_s, exp_c);
      end
      // Sum and carry do not depend on the forecast rule.
      checks++;
      if (s_x[0] !== exp_s || s_x[1] !== exp_s || s_x[3] !== exp_s ||
          c_x[0] !== exp_c || c_x[1] !== exp_c || c_x[3] !== exp_c) begin
        failures++;
        $display("FAIL variant sum/carry a=%0d b=%0d c_hi=%0d f=%0d", a, b, c_hi, f);
      end
      checks++;
      if (fh[0] !== bit'((int'(a) + int'(b) + int'(f)) / 2) || fh[1] !== a ||
          fh[2] !== (a & b) || fh[3] !== (a | b)) begin
        failures++;
        $display("FAIL forecast a=%0d b=%0d f=%0d: %0d %0d %0d %0d", a, b, f, fh[0], fh[1], fh[2], fh[3]);
      end
      // Where the target is reachable, the cell must meet it.
      if (!(a == b && a != c_hi)) begin
        checks++;
        if (got != want) begin
          failures++;
          $display("FAIL rule a=%0d b=%0d c_hi=%0d f=%0d", a, b, c_hi, f);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
