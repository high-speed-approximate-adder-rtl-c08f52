// tb_haa_error_analysis -- error analysis of the hybrid approximate adder
// over random operands, for the 16-bit and 32-bit sizes and for both the
// plain variant (HAA1, constant region 0) and the corrected one (HAA2,
// constant region 3).
//
// Each configuration receives the same two million uniformly random operand
// pairs, one per clock. Every result is compared with the truth-table
// reference model, and the mean error (exact - approximate), NMED (mean
// absolute error over the largest exact sum, 2^(N+1) - 2) and MRED (mean
// of |error| / exact sum) are printed next to the published values. For
// the 16-bit sizes the test also fails if NMED or MRED leaves a window
// around the published figures; the 32-bit figures are only reported.
module tb_haa_error_analysis;
  import haa_ref_pkg::*;

  localparam int NVEC = 2000000;
  localparam int NCFG = 4;
  localparam int unsigned CFG_N    [NCFG] = '{16, 16, 32, 32};
  localparam int unsigned CFG_CORR [NCFG] = '{0, 3, 0, 3};
  // Published NMED and MRED (x 1e-3) for the four configurations.
  localparam real PUB_NMED [NCFG] = '{0.6, 0.69, 0.002, 0.002};
  localparam real PUB_MRED [NCFG] = '{1.9, 1.9, 0.004, 0.005};
  localparam real PUB_AVG  [NCFG] = '{5.07, 1.87, 65.32, 58.32};

  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  logic [31:0] a, b;
  logic [15:0] s16 [2];
  logic [31:0] s32 [2];
  logic        c16 [2];
  logic        c32 [2];

  real sum_ed [NCFG], sum_abs [NCFG], sum_red [NCFG];
  int  n_red [NCFG];

  always #5 clk = ~clk;

  haa_adder #(.N(16), .CORRECTION(0)) u_haa1_16 (.a(a[15:0]), .b(b[15:0]), .sum(s16[0]), .cout(c16[0]));
  haa_adder #(.N(16), .CORRECTION(3)) u_haa2_16 (.a(a[15:0]), .b(b[15:0]), .sum(s16[1]), .cout(c16[1]));
  haa_adder #(.N(32), .CORRECTION(0)) u_haa1_32 (.a(a),       .b(b),       .sum(s32[0]), .cout(c32[0]));
  haa_adder #(.N(32), .CORRECTION(3)) u_haa2_32 (.a(a),       .b(b),       .sum(s32[1]), .cout(c32[1]));

  initial begin : watchdog
    repeat (NVEC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned result(int k);
    case (k)
      0: return 64'({c16[0], s16[0]});
      1: return 64'({c16[1], s16[1]});
      2: return 64'({c32[0], s32[0]});
      default: return 64'({c32[1], s32[1]});
    endcase
  endfunction

  initial begin
    for (int k = 0; k < NCFG; k++) begin
      sum_ed[k] = 0.0; sum_abs[k] = 0.0; sum_red[k] = 0.0; n_red[k] = 0;
    end
    for (int v = 0; v < NVEC; v++) begin
      a = $urandom;
      b = $urandom;
      @(posedge clk);
      for (int k = 0; k < NCFG; k++) begin
        longint unsigned mask, xa, xb, got, expv, ex;
        real ad;
        mask = (64'd1 << CFG_N[k]) - 1;
        xa   = 64'(a) & mask;
        xb   = 64'(b) & mask;
        got  = result(k);
        expv = haa(CFG_N[k], CFG_CORR[k], xa, xb);
        ex   = xa + xb;
        checks++;
        if (got != expv) begin
          failures++;
          if (failures < 10)
            $display("FAIL N=%0d corr=%0d %h+%h: got %h expected %h",
                     CFG_N[k], CFG_CORR[k], xa, xb, got, expv);
        end
        ad = (ex > got) ? real'(ex - got) : real'(got - ex);
        sum_ed[k]  += real'(ex) - real'(got);
        sum_abs[k] += ad;
        if (ex != 0) begin
          sum_red[k] += ad / real'(ex);
          n_red[k]++;
        end
      end
    end
    $display("config        mean error (pub)        NMED e-3 (pub)        MRED e-3 (pub)");
    for (int k = 0; k < NCFG; k++) begin
      real nmed, mred, avg;
      avg  = sum_ed[k] / real'(NVEC);
      nmed = sum_abs[k] / real'(NVEC) / (2.0 ** (CFG_N[k] + 1) - 2.0) * 1e3;
      mred = sum_red[k] / real'(n_red[k]) * 1e3;
      $display("HAA%0d N=%0d   %10.3f (%8.2f)   %10.5f (%6.3f)   %10.5f (%6.3f)",
               (CFG_CORR[k] == 0) ? 1 : 2, CFG_N[k], avg, PUB_AVG[k],
               nmed, PUB_NMED[k], mred, PUB_MRED[k]);
      if (CFG_N[k] == 16) begin
        checks += 2;
        if (nmed < 0.55 || nmed > 0.85) begin
          failures++;
          $display("FAIL NMED out of the expected window");
        end
        if (mred < 1.6 || mred > 2.2) begin
          failures++;
          $display("FAIL MRED out of the expected window");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
