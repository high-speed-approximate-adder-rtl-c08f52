// msr_adder -- moderately significant region (MSR) of the hybrid
// approximate adder: a P-bit chain of approximate full adders (approx_fa).
//
// Cell i receives operand bit b[i] on its A pin, operand bit a[i] on its B
// pin and the previous cell's carry on its C pin. Because the cell's carry
// output is its B pin, the carry into bit i+1 is just a[i]; there is no
// carry propagation, and cout equals a[P-1]. That is the operand bit the
// published 16-bit diagram feeds into the ASR as its carry input (A8 for
// P = 3). Which operand goes to which cell pin is this design's reading of
// that diagram: with this assignment the carry out of the chain is exactly
// the A bit shown there, and the error statistics of the whole adder match
// the published ones. cin is the carry into cell 0; the adder ties it to 0.
// Combinational; no clock.
module msr_adder #(
  parameter int unsigned P = 3
) (
  input  logic [P-1:0] a,
  input  logic [P-1:0] b,
  input  logic         cin,
  output logic [P-1:0] sum,
  output logic         cout
);

  logic [P:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < P; i++) begin : g_bit
    approx_fa u_afa (
      .a    (b[i]),
      .b    (a[i]),
      .c    (c[i]),
      .sum  (sum[i]),
      .carry(c[i+1])
    );
  end

  assign cout = c[P];

  initial begin
    assert (P >= 1) else $error("msr_adder: P must be at least 1");
  end

endmodule
