// tb_haa_adder -- end-to-end test of the 16-bit hybrid approximate adder at
// its default parameters (N = 16, correction constant 3).
//
// Applies directed corner cases and one million random operand pairs, one
// addition per clock, and compares {cout, sum} with the truth-table
// reference model in haa_ref_pkg. It counts how often each approximation
// mechanism is exercised (constant region, carry dropped in the OR region,
// +1 and -1 cell errors in the MSR, ASR carry input set, carry out set) and
// fails if one never occurs. It also measures the error statistics (mean
// error, NMED, MRED) against the exact sum and checks that NMED and MRED lie
// near the published 16-bit figures (0.69e-3 and 1.9e-3).
module tb_haa_adder;
  import haa_ref_pkg::*;

  localparam int unsigned N       = 16;
  localparam int unsigned CORR    = 3;
  localparam int unsigned P       = N / 4 - 1;
  localparam int          NRANDOM = 1000000;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  logic [N-1:0] a, b, sum;
  logic         cout;

  // Mechanism counters.
  int n_cr_fixed = 0, n_lsr_drop = 0, n_msr_plus = 0, n_msr_minus = 0;
  int n_asr_cin = 0, n_cout = 0, n_exact = 0;

  // Error statistics.
  real sum_ed = 0.0, sum_abs_ed = 0.0, sum_red = 0.0;
  int  n_ops = 0, n_red = 0;

  always #5 clk = ~clk;

  haa_adder dut (.a(a), .b(b), .sum(sum), .cout(cout));

  initial begin : watchdog
    repeat (NRANDOM + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N-1:0] x, input logic [N-1:0] y);
    longint unsigned exp_v, exact_v, got_v;
    a = x;
    b = y;
    @(posedge clk);
    got_v   = 64'({cout, sum});
    exp_v   = haa(N, CORR, 64'(x), 64'(y));
    exact_v = 64'(x) + 64'(y);
    checks++;
    if (got_v != exp_v) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h + %h: got %h expected %h", x, y, got_v, exp_v);
    end
    // Mechanisms.
    if (P'(x[P-1:0] + y[P-1:0]) != P'(CORR)) n_cr_fixed++;
    if ((x[2*P-1:P] & y[2*P-1:P]) != 0) n_lsr_drop++;
    for (int i = 0; i < P; i++) begin
      logic pa, pb, pc;
      pa = y[2*P+i];
      pb = x[2*P+i];
      pc = (i == 0) ? 1'b0 : x[2*P+i-1];
      if ({pa, pb, pc} == 3'b010) n_msr_plus++;
      if ({pa, pb, pc} == 3'b101) n_msr_minus++;
    end
    if (x[3*P-1]) n_asr_cin++;
    if (cout) n_cout++;
    if (got_v == exact_v) n_exact++;
    // Error statistics, error distance = exact - approximate.
    n_ops++;
    sum_ed     += real'(exact_v) - real'(got_v);
    sum_abs_ed += (exact_v > got_v) ? real'(exact_v - got_v) : real'(got_v - exact_v);
    if (exact_v != 0) begin
      n_red++;
      sum_red += ((exact_v > got_v) ? real'(exact_v - got_v) : real'(got_v - exact_v))
                 / real'(exact_v);
    end
  endtask

  task automatic need(input string what, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("  %-34s %0d", what, count);
    end
  endtask

  initial begin
    real nmed, mred, avg;
    // Directed corners.
    apply('0, '0);
    apply('1, '1);
    apply('1, 16'd1);
    apply(16'h8000, 16'h8000);
    apply(16'h01FF, 16'h0001);   // carries that the approximation drops
    apply(16'h0100, 16'h0000);   // a[8] set: ASR carry input
    apply(16'h0038, 16'h0038);   // LSR both ones
    for (int i = 0; i < NRANDOM; i++) apply(N'($urandom), N'($urandom));

    nmed = sum_abs_ed / real'(n_ops) / real'((2 ** (N + 1)) - 2);
    mred = sum_red / real'(n_red);
    avg  = sum_ed / real'(n_ops);
    $display("HAA N=%0d correction=%0d over %0d additions:", N, CORR, n_ops);
    $display("  mean error (exact - approx) %f", avg);
    $display("  NMED %f e-3, MRED %f e-3", nmed * 1e3, mred * 1e3);
    $display("Mechanisms exercised:");
    need("constant region differs from exact", n_cr_fixed);
    need("OR region drops a carry", n_lsr_drop);
    need("MSR cell error +1", n_msr_plus);
    need("MSR cell error -1", n_msr_minus);
    need("ASR carry input set (a[3P-1])", n_asr_cin);
    need("carry out set", n_cout);
    need("result exact", n_exact);
    checks++;
    if (nmed < 0.55e-3 || nmed > 0.85e-3) begin
      failures++;
      $display("FAIL NMED %f e-3 far from the published 0.69e-3", nmed * 1e3);
    end
    checks++;
    if (mred < 1.6e-3 || mred > 2.2e-3) begin
      failures++;
      $display("FAIL MRED %f e-3 far from the published 1.9e-3", mred * 1e3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
