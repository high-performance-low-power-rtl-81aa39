// pp_compress_level: one level of the approximate partial-product reduction tree.
//
// The ROWS input rows (all W bits wide and aligned to the same column weights) are
// taken four at a time. In every column each group of four bits feeds one approximate
// 4-2 compressor: its sum goes to the group's first output row in the same column and
// its carry to the group's second output row one column higher. ROWS rows become ROWS/2
// rows. A carry out of the top column is dropped; in the multiplier the rows never hold
// a value of 2^W or more, and the compressors never produce more than their inputs, so
// that carry is always 0 there.
// Purely combinational. ROWS must be a multiple of 4.
module pp_compress_level #(
  parameter int unsigned ROWS = 8,
  parameter int unsigned W    = 16
) (
  input  logic [W-1:0] rows_in  [ROWS],
  output logic [W-1:0] rows_out [ROWS/2]
);

  localparam int unsigned GROUPS = ROWS / 4;

  initial begin
    assert (ROWS % 4 == 0 && ROWS >= 4)
      else $fatal(1, "pp_compress_level: ROWS must be a positive multiple of 4");
  end

  for (genvar g = 0; g < GROUPS; g++) begin : g_group
    logic [W-1:0] s;
    logic [W-1:0] c;
    for (genvar col = 0; col < W; col++) begin : g_col
      approx_compressor_4_2 u_cmp (
        .x1   (rows_in[4*g][col]),
        .x2   (rows_in[4*g+1][col]),
        .x3   (rows_in[4*g+2][col]),
        .x4   (rows_in[4*g+3][col]),
        .sum  (s[col]),
        .carry(c[col])
      );
    end
    assign rows_out[2*g]   = s;
    assign rows_out[2*g+1] = {c[W-2:0], 1'b0};
  end

endmodule
