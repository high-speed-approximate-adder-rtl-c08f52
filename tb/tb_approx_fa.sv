// tb_approx_fa -- exhaustive self-checking test of the approximate full
// adder. All eight input patterns are applied and compared with the
// published truth table (held in haa_ref_pkg). It also checks the error
// profile: exactly two patterns deviate from an exact full adder, one by +1
// and one by -1.
module tb_approx_fa;
  import haa_ref_pkg::*;

  logic clk = 1'b0;
  logic a, b, c, sum, carry;
  int   checks = 0, failures = 0;
  int   err_plus = 0, err_minus = 0;

  always #5 clk = ~clk;

  approx_fa dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [1:0] exp_sc;
      int approx_val, exact_val;
      {a, b, c} = 3'(v);
      @(posedge clk);
      exp_sc = afa(a, b, c);
      checks++;
      if ({sum, carry} !== exp_sc) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b: sum=%0b carry=%0b, expected sum=%0b carry=%0b",
                 a, b, c, sum, carry, exp_sc[1], exp_sc[0]);
      end
      approx_val = 2 * int'(carry) + int'(sum);
      exact_val  = int'(a) + int'(b) + int'(c);
      if (approx_val - exact_val == 1)  err_plus++;
      if (approx_val - exact_val == -1) err_minus++;
      if (approx_val - exact_val > 1 || approx_val - exact_val < -1) begin
        checks++;
        failures++;
        $display("FAIL error distance %0d for a=%0b b=%0b c=%0b", approx_val - exact_val, a, b, c);
      end
    end
    checks++;
    if (err_plus != 1 || err_minus != 1) begin
      failures++;
      $display("FAIL error profile: %0d patterns at +1, %0d at -1 (expected 1 and 1)",
               err_plus, err_minus);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
