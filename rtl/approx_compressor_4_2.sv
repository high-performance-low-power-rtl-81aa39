// approx_compressor_4_2: high-accuracy approximate 4-2 compressor.
//
// Four bits of the same column weight (x1..x4) are reduced to a sum bit of that weight
// and a carry bit of twice that weight, with no carry in or carry out. The carry is
// always exact; only the all-ones input is wrong (3 instead of 4, error distance 1).
// Internal signals follow the compressor's gate-level description:
//   W1 = x1 & x2, W2 = x1 | x2, W3 = x3 & x4, W4 = x3 | x4,
//   W5 = W1 | W3 (detects a pair of ones), W6 = W2 & W4 (one of each pair),
//   carry = W5 | W6, sum = W5 ^ W2 ^ W4.
// Purely combinational.
module approx_compressor_4_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  output logic sum,
  output logic carry
);

  logic w1, w2, w3, w4, w5, w6;

  always_comb begin
    w1    = x1 & x2;
    w2    = x1 | x2;
    w3    = x3 & x4;
    w4    = x3 | x4;
    w5    = w1 | w3;
    w6    = w2 & w4;
    carry = w5 | w6;
    sum   = w5 ^ w2 ^ w4;
  end

endmodule
