// tb_msr_adder -- self-checking test of the approximate MSR chain. The
// 3-bit instance (16-bit adder) is checked exhaustively with both carry
// inputs, a 7-bit instance (32-bit adder) with random operands. Expected
// values come from the truth-table model in haa_ref_pkg. It also checks
// that the chain's carry out is the top a bit, the value the ASR uses.
module tb_msr_adder;
  import haa_ref_pkg::*;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  logic [2:0] a3, b3, s3;
  logic       ci3, co3;
  logic [6:0] a7, b7, s7;
  logic       ci7, co7;

  always #5 clk = ~clk;

  msr_adder #(.P(3)) dut3 (.a(a3), .b(b3), .cin(ci3), .sum(s3), .cout(co3));
  msr_adder #(.P(7)) dut7 (.a(a7), .b(b7), .cin(ci7), .sum(s7), .cout(co7));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned e;
    for (int v = 0; v < 128; v++) begin
      {ci3, a3, b3} = 7'(v);
      @(posedge clk);
      e = msr(3, 64'(a3), 64'(b3), ci3);
      checks++;
      if ({co3, s3} != 4'(e)) begin
        failures++;
        $display("FAIL P=3 a=%b b=%b cin=%b: got %b expected %b", a3, b3, ci3, {co3, s3}, 4'(e));
      end
      checks++;
      if (co3 != a3[2]) begin
        failures++;
        $display("FAIL P=3 carry out %b is not a[2]=%b", co3, a3[2]);
      end
    end
    for (int v = 0; v < 20000; v++) begin
      a7  = 7'($urandom);
      b7  = 7'($urandom);
      ci7 = 1'($urandom);
      @(posedge clk);
      e = msr(7, 64'(a7), 64'(b7), ci7);
      checks++;
      if ({co7, s7} != 8'(e)) begin
        failures++;
        if (failures < 10)
          $display("FAIL P=7 a=%b b=%b cin=%b: got %b expected %b", a7, b7, ci7, {co7, s7}, 8'(e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
