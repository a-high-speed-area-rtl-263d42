// Exhaustive test of the 8-bit RCPA with all four forecast rules.
//  * Every {cout, sum} and C_0 is compared with the reference model.
//  * The exact-forecast adder must equal a + b + cin.
//  * With cin = 0, the total error over all 2^16 operand pairs, minus the
//    C_0 contribution, must equal the closed form of the mean error:
//    per bit i the error probabilities are (4^(n-1) - 4^i)/(3*4^(n-1)) for
//    RCPFA-I (both directions), twice that for the A_i=B_i=1 case of
//    RCPFA-II and for the A_i=B_i=0 case of RCPFA-III.
module tb_rcpa;
  import rcpa_pkg::*;
  import rcpa_ref_pkg::*;

  localparam int W = 8;
  logic [W-1:0] a, b;
  logic         cin;
  logic [W-1:0] sum   [4];
  logic         cout  [4];
  logic         c_lsb [4];
  int checks = 0, failures = 0;

  rcpa #(.WIDTH(W), .FORECAST(FC_EXACT)) dut0 (.a(a), .b(b), .cin(cin), .sum(sum[0]), .cout(cout[0]), .c_lsb(c_lsb[0]));
  rcpa #(.WIDTH(W), .FORECAST(FC_I))     dut1 (.a(a), .b(b), .cin(cin), .sum(sum[1]), .cout(cout[1]), .c_lsb(c_lsb[1]));
  rcpa #(.WIDTH(W), .FORECAST(FC_II))    dut2 (.a(a), .b(b), .cin(cin), .sum(sum[2]), .cout(cout[2]), .c_lsb(c_lsb[2]));
  rcpa #(.WIDTH(W), .FORECAST(FC_III))   dut3 (.a(a), .b(b), .cin(cin), .sum(sum[3]), .cout(cout[3]), .c_lsb(c_lsb[3]));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic forecast_e fc_of(int k);
    case (k)
      0: return FC_EXACT;
      1: return FC_I;
      2: return FC_II;
      default: return FC_III;
    endcase
  endfunction

  initial begin
    longint err_total [4];
    real    red_total [4];   // sum of |error| / exact sum, for the MRED figure
    longint expected_err [4];
    longint unsigned want, got;
    longint base;
    bit rc0;
    int ci;

    foreach (err_total[k]) begin
      err_total[k] = 0;
      red_total[k] = 0.0;
    end
    for (int v = 0; v < (1 << (2 * W + 1)); v++) begin
      {cin, a, b} = (2 * W + 1)'(v);
      #1;
      ci = int'(cin);
      for (int k = 0; k < 4; k++) begin
        want = ref_add(longint'(a), longint'(b), cin, W, fc_of(k), rc0);
        got  = {cout[k], sum[k]};
        checks++;
        if (got != want || c_lsb[k] != rc0) begin
          failures++;
          if (failures < 10)
            $display("FAIL fc=%0d a=%0d b=%0d cin=%0d: got %0d c0=%0d, want %0d c0=%0d",
                     k, a, b, cin, got, c_lsb[k], want, rc0);
        end
        if (cin == 1'b0) begin
          err_total[k] += longint'(got) - longint'(a) - longint'(b) - longint'(c_lsb[k]);
          if (a + b != 0)
            red_total[k] += ((longint'(got) > longint'(a) + longint'(b)) ?
                             real'(longint'(got) - longint'(a) - longint'(b)) :
                             real'(longint'(a) + longint'(b) - longint'(got))) / real'(longint'(a) + longint'(b));
        end
      end
      checks++;
      if ({cout[0], sum[0]} != (W + 1)'(a + b + ci)) begin
        failures++;
        $display("FAIL exact a=%0d b=%0d cin=%0d", a, b, cin);
      end
    end

    base = 0;
    for (int i = 0; i < W; i++) base += (longint'(1) << i) * ((longint'(1) << (2 * (W - 1))) - (longint'(1) << (2 * i))) / 3;
    expected_err[0] = 0;
    expected_err[1] = 0;
    expected_err[2] = -2 * base;
    expected_err[3] = 2 * base;
    for (int k = 0; k < 4; k++) begin
      checks++;
      $display("forecast %0d: total error over all operand pairs %0d (closed form %0d), MRED %f",
               k, err_total[k], expected_err[k], red_total[k] / real'(1 << (2 * W)));
      if (err_total[k] != expected_err[k]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
