// partial_product_gen: AND array that forms the modified partial products.
//
// Row i of ppd is the (truncated, compensated) multiplicand a gated by bit i of the
// multiplier b: ppd[i][j] = a[j] & b[i]. rows[i] is the same row shifted left by i
// into a 2N-bit word, ready for column-wise compression.
// Purely combinational.
module partial_product_gen
  import amul_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT
) (
  input  logic [N-1:0]          a,
  input  logic [N-1:0]          b,
  output logic [N-1:0][N-1:0]   ppd,
  output logic [2*N-1:0]        rows [N]
);

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      ppd[i]  = a & {N{b[i]}};
      rows[i] = {{N{1'b0}}, ppd[i]} << i;
    end
  end

endmodule
