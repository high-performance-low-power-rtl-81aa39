// modified_half_adder: exact half adder written as AND/OR cells instead of an XOR.
//
// The sum is formed from two AND terms (sum0_i, sum0_i_0) merged by an OR, and the
// carry by a single AND, the same cell count (three ANDs, one OR) as the reference
// schematic of this adder. Which inputs of the AND terms are inverted is this
// implementation's choice, made so that sum = a ^ b and carry = a & b.
// Purely combinational.
module modified_half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);

  logic sum0_i, sum0_i_0;

  always_comb begin
    sum0_i   = a & ~b;
    sum0_i_0 = ~a & b;
    sum      = sum0_i | sum0_i_0;
    carry    = a & b;
  end

endmodule
