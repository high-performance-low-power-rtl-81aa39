// final_adder: accurate carry-propagate adder for the last two partial-product rows.
//
// A ripple-carry adder: bit 0 is a modified half adder, every higher bit a modified
// full adder taking the carry of the bit below. It returns the W-bit sum and the
// carry out of the top bit.
// Purely combinational.
module final_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:1] carry;

  modified_half_adder u_ha (
    .a    (x[0]),
    .b    (y[0]),
    .sum  (sum[0]),
    .carry(carry[1])
  );

  for (genvar i = 1; i < W; i++) begin : g_bit
    modified_full_adder u_fa (
      .a    (x[i]),
      .b    (y[i]),
      .c    (carry[i]),
      .sum  (sum[i]),
      .carry(carry[i+1])
    );
  end

  assign cout     = carry[W];

endmodule
