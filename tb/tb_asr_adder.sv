// tb_asr_adder -- self-checking test of the exact ASR adder. The 7-bit
// instance (the 16-bit adder's ASR) is checked exhaustively, all operand
// pairs with both carry inputs; an 11-bit instance (the 32-bit adder's ASR)
// is checked with random operands. Expected values are a + b + cin.
module tb_asr_adder;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  logic [6:0]  a7, b7, s7;
  logic        ci7, co7;
  logic [10:0] a11, b11, s11;
  logic        ci11, co11;

  always #5 clk = ~clk;

  asr_adder #(.W(7))  dut7  (.a(a7),  .b(b7),  .cin(ci7),  .sum(s7),  .cout(co7));
  asr_adder #(.W(11)) dut11 (.a(a11), .b(b11), .cin(ci11), .sum(s11), .cout(co11));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a11 = '0; b11 = '0; ci11 = 1'b0;
    for (int v = 0; v < (1 << 15); v++) begin
      for (int ci = 0; ci < 2; ci++) begin
        a7  = v[6:0];
        b7  = v[13:7];
        ci7 = 1'(ci);
        if (v[14]) begin
          a11  = 11'($urandom);
          b11  = 11'($urandom);
          ci11 = 1'($urandom);
        end
        @(posedge clk);
        checks++;
        if ({co7, s7} != 8'(int'(a7) + int'(b7) + ci)) begin
          failures++;
          if (failures < 10)
            $display("FAIL W=7 %0d+%0d+%0d gave %0d", a7, b7, ci, {co7, s7});
        end
        if (v[14]) begin
          checks++;
          if ({co11, s11} != 12'(int'(a11) + int'(b11) + int'(ci11))) begin
            failures++;
            if (failures < 10)
              $display("FAIL W=11 %0d+%0d+%0d gave %0d", a11, b11, ci11, {co11, s11});
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
