// exact_fa -- conventional (exact) 1-bit full adder.
//
// sum = a ^ b ^ cin, cout = majority(a, b, cin). Used as the cell of the
// ripple-carry accurate significant region (ASR) of the hybrid approximate
// adder. Combinational; no clock.
module exact_fa (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  assign sum  = a ^ b ^ cin;
  assign cout = (a & b) | (cin & (a ^ b));

endmodule
