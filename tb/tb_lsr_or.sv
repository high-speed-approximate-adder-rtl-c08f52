// tb_lsr_or -- self-checking test of the OR-based approximate region. The
// 3-bit instance is checked exhaustively, a 7-bit instance with random
// operands; each expected sum bit is 1 when either operand bit is 1.
module tb_lsr_or;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  logic [2:0] a3, b3, s3;
  logic [6:0] a7, b7, s7;

  always #5 clk = ~clk;

  lsr_or #(.P(3)) dut3 (.a(a3), .b(b3), .sum(s3));
  lsr_or #(.P(7)) dut7 (.a(a7), .b(b7), .sum(s7));

  function automatic logic [6:0] ref_or(logic [6:0] x, logic [6:0] y);
    logic [6:0] r;
    for (int i = 0; i < 7; i++) r[i] = (x[i] == 1'b1) || (y[i] == 1'b1);
    return r;
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {a3, b3} = 6'(v);
      a7 = 7'($urandom);
      b7 = 7'($urandom);
      @(posedge clk);
      checks += 2;
      if (s3 != 3'(ref_or(7'(a3), 7'(b3)))) begin
        failures++;
        $display("FAIL P=3 a=%b b=%b sum=%b", a3, b3, s3);
      end
      if (s7 != ref_or(a7, b7)) begin
        failures++;
        $display("FAIL P=7 a=%b b=%b sum=%b", a7, b7, s7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
