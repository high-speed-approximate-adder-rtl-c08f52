// tb_sharpen -- image-sharpening workload for the 16-bit hybrid approximate
// adder.
//
// Sharpening computes O = 2Z - W for every pixel, where W is the 5x5
// Gaussian blur sum(K .* window) / 273 with
//   K = [1 4 7 4 1; 4 16 26 16 4; 7 26 41 26 7; 4 16 26 16 4; 1 4 7 4 1].
// The 25 weighted pixels are accumulated by 24 additions through the
// approximate adder (default parameters: N = 16, correction 3), one addition
// per clock; the weighting itself and the rounded division by 273 are
// exact. The same filter with exact additions gives the reference image,
// and the test prints the PSNR of the approximate image against it.
//
// The image is generated here: 256x256, the size of common grey-scale test
// images, made of a gradient, two discs and pseudo-random texture. Borders
// are handled by clamping coordinates.
// Pixels are limited to 0..220 so that the weighted sum, at most
// 273 * 220 = 60060 plus the adder's error, stays inside 16 bits; a carry
// out during accumulation counts as a failure. Every adder result is
// compared with the truth-table reference model, and the PSNR must reach
// 30 dB.
module tb_sharpen;
  import haa_ref_pkg::*;

  localparam int W = 256;
  localparam int H = 256;
  localparam int PMAX = 220;
  localparam int K [5][5] = '{'{1, 4, 7, 4, 1}, '{4, 16, 26, 16, 4}, '{7, 26, 41, 26, 7},
                              '{4, 16, 26, 16, 4}, '{1, 4, 7, 4, 1}};

  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  logic [15:0] a, b, sum;
  logic        cout;

  int img [H][W];
  int n_overflow = 0;

  always #5 clk = ~clk;

  haa_adder dut (.a(a), .b(b), .sum(sum), .cout(cout));

  initial begin : watchdog
    repeat (W * H * 25 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic int pix(int y, int x);
    return img[clampi(y, 0, H - 1)][clampi(x, 0, W - 1)];
  endfunction

  // Sharpened pixel from a weighted sum.
  function automatic int sharpen(int z, int wsum);
    int w;
    w = (wsum + 136) / 273;  // rounded division by the kernel sum
    return clampi(2 * z - w, 0, 255);
  endfunction

  initial begin
    real se, psnr;
    int  maxdiff;
    se = 0.0;
    maxdiff = 0;
    // Test image.
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int v;
        v = 30 + x / 2 + y / 4;
        if ((x - 80) * (x - 80) + (y - 88) * (y - 88) < 1900) v = 200;
        if ((x - 180) * (x - 180) + (y - 160) * (y - 160) < 1300) v = 15;
        v += int'($urandom_range(0, 24)) - 12;
        img[y][x] = clampi(v, 0, PMAX);
      end
    // Filter.
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int acc_exact, acc_apx, o_exact, o_apx, d;
        acc_exact = K[0][0] * pix(y - 2, x - 2);
        acc_apx   = acc_exact;
        for (int t = 1; t < 25; t++) begin
          int r, c, term;
          longint unsigned expv;
          r = t / 5;
          c = t % 5;
          term = K[r][c] * pix(y + r - 2, x + c - 2);
          acc_exact += term;
          a = 16'(acc_apx);
          b = 16'(term);
          @(posedge clk);
          expv = haa(16, 3, 64'(acc_apx), 64'(term));
          checks++;
          if (64'({cout, sum}) != expv) begin
            failures++;
            if (failures < 10)
              $display("FAIL %0d + %0d: got %0d expected %0d", acc_apx, term, {cout, sum}, expv);
          end
          if (cout) n_overflow++;
          acc_apx = int'(sum);
        end
        o_exact = sharpen(img[y][x], acc_exact);
        o_apx   = sharpen(img[y][x], acc_apx);
        d = o_exact - o_apx;
        se += real'(d * d);
        if (d > maxdiff) maxdiff = d;
        if (-d > maxdiff) maxdiff = -d;
      end
    psnr = (se == 0.0) ? 99.0 : 10.0 * $log10(255.0 * 255.0 / (se / real'(W * H)));
    $display("sharpening %0dx%0d: PSNR %f dB against exact additions, max pixel difference %0d",
             W, H, psnr, maxdiff);
    checks++;
    if (n_overflow != 0) begin
      failures++;
      $display("FAIL accumulation overflowed 16 bits %0d times", n_overflow);
    end
    checks++;
    if (psnr < 30.0) begin
      failures++;
      $display("FAIL PSNR below 30 dB");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
