// haa_adder -- N-bit hybrid approximate adder (HAA) for error-tolerant
// workloads such as image filtering.
//
// The operands are split into four regions (P = N/4 - 1):
//   bits [P-1:0]     CR  : no hardware; the sum bits are the constant
//                          CORRECTION (3 = binary 011 for the corrected
//                          variant HAA2, 0 for the plain variant HAA1).
//   bits [2P-1:P]    LSR : sum bit = a | b, carries are dropped (lsr_or).
//   bits [3P-1:2P]   MSR : chain of approximate full adders whose carry
//                          output is a wire (msr_adder); carry in is 0.
//   bits [N-1:3P]    ASR : exact (N-3P)-bit adder (asr_adder) whose carry
//                          input is a[3P-1], the carry out of the MSR.
// For N = 16: CR = [2:0], LSR = [5:3], MSR = [8:6], ASR = [15:9], and the
// ASR carry input is a[8]. The longest path is the ASR carry chain; the
// lower 3P bits settle after a few gate levels whatever N is.
//
// Interface: a, b (N bits) in; sum (N bits) and cout out, approximating
// {cout, sum} = a + b. Purely combinational: one addition per evaluation,
// no clock and no latency. The region split, the cell equations, the ASR
// carry input and the correction constant 3 follow the published design.
// This design's own choices: the MSR receives no carry from below (the
// LSR produces none), the carry input drawn at the constant region of the
// generic diagram is not brought out because that region's sum is a
// constant and could not use it, and the correction value is a parameter.
// a[P-1:0] and b[P-1:0] are deliberately unused: the constant region does
// not look at its operand bits, so lint reports them as unused.
module haa_adder
  import haa_pkg::*;
#(
  parameter int unsigned N          = 16,
  parameter int unsigned CORRECTION = 3
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] sum,
  output logic         cout
);

  localparam int unsigned P  = region_width(N);
  localparam int unsigned WA = asr_width(N);

  localparam logic [P-1:0] CR_SUM = P'(CORRECTION);

  logic msr_cout;

  // Constant region: no logic, the sum bits are the correction constant.
  assign sum[P-1:0] = CR_SUM;

  lsr_or #(.P(P)) u_lsr (
    .a  (a[2*P-1:P]),
    .b  (b[2*P-1:P]),
    .sum(sum[2*P-1:P])
  );

  msr_adder #(.P(P)) u_msr (
    .a   (a[3*P-1:2*P]),
    .b   (b[3*P-1:2*P]),
    .cin (1'b0),
    .sum (sum[3*P-1:2*P]),
    .cout(msr_cout)
  );

  asr_adder #(.W(WA)) u_asr (
    .a   (a[N-1:3*P]),
    .b   (b[N-1:3*P]),
    .cin (msr_cout),
    .sum (sum[N-1:3*P]),
    .cout(cout)
  );

  initial begin
    assert (N % 4 == 0 && N >= 8)
      else $error("haa_adder: N must be a multiple of 4 and at least 8");
    assert (CORRECTION < (1 << P))
      else $error("haa_adder: CORRECTION does not fit in the %0d-bit constant region", P);
  end

endmodule
