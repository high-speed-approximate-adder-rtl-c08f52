// approx_fa -- approximate 1-bit full adder used in the MSR of the hybrid
// approximate adder.
//
// The carry output is simply the B input, and the sum is
//     sum = a & (c | ~b) | c & ~b
// Compared with an exact full adder, two of the eight input patterns are
// wrong: (a,b,c) = (0,1,0) gives carry=1,sum=0 (value 2 instead of 1, error
// +1) and (1,0,1) gives carry=0,sum=1 (value 1 instead of 2, error -1). The
// other six patterns are exact. Dropping the carry logic takes the carry
// path off the critical path: carry is a wire.
//
// Interface: a, b, c (c is the carry input) in; sum, carry out. Purely
// combinational, no clock. The equations and the gate structure (two ANDs,
// two ORs and an inverter on b) are the published ones.
module approx_fa (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  logic b_n;

  assign b_n   = ~b;
  assign sum   = (a & (c | b_n)) | (c & b_n);
  assign carry = b;

endmodule
