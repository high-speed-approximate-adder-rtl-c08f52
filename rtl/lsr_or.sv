// lsr_or -- approximate region (LSR/AR) of the hybrid approximate adder.
//
// Each of the P sum bits is the OR of the two operand bits; no carry is
// produced or consumed. The result is exact except where both operand bits
// are 1, where the carry is lost. Combinational; no clock. The OR-gate
// region is the published design.
module lsr_or #(
  parameter int unsigned P = 3
) (
  input  logic [P-1:0] a,
  input  logic [P-1:0] b,
  output logic [P-1:0] sum
);

  assign sum = a | b;

endmodule
