// asr_adder -- accurate significant region (ASR) of the hybrid approximate
// adder: a W-bit exact adder.
//
// The ASR adds the most significant W = N - 3P operand bits exactly, so the
// high-order part of every result is correct apart from the carry it
// receives from the approximate regions below. It is a ripple chain of
// exact full adders, as the published design specifies precise full adders;
// a faster exact structure could be substituted without changing the
// function. sum and cout are combinational functions of a, b and cin:
// {cout, sum} = a + b + cin.
module asr_adder #(
  parameter int unsigned W = 7
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    exact_fa u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[W];

  initial begin
    assert (W >= 1) else $error("asr_adder: W must be at least 1");
  end

endmodule
