// tb_pp_compress_level: random check of one reduction level with 8 rows of 16 bits.
// The reference counts the ones of each column in each group of four rows: the sum
// bit must be 1 for one, three or four ones, the carry bit (one column up) for two or
// more. The value of the two output rows of a group must equal the value of its four
// input rows less 2^col for each column that held four ones.
module tb_pp_compress_level;
  localparam int ROWS = 8, W = 16;
  logic [W-1:0] rows_in  [ROWS];
  logic [W-1:0] rows_out [ROWS/2];
  int checks = 0, failures = 0;
  int four_ones_seen = 0;

  pp_compress_level #(.ROWS(ROWS), .W(W)) dut (.rows_in(rows_in), .rows_out(rows_out));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 20000; it++) begin
      for (int r = 0; r < ROWS; r++) begin
        // keep the top two columns empty so no carry leaves the word; bias some
        // iterations towards dense rows to reach four-ones columns often
        rows_in[r] = W'($urandom) & 16'h3fff;
        if (it % 2 == 1) rows_in[r] = rows_in[r] | W'($urandom) & 16'h3fff;
      end
      #1;
      for (int g = 0; g < ROWS / 4; g++) begin
        longint in_val, out_val, loss;
        bit ok;
        in_val = 0;
        loss = 0;
        ok = 1;
        for (int k = 0; k < 4; k++) in_val += longint'(rows_in[4*g+k]);
        for (int col = 0; col < W; col++) begin
          int cnt;
          cnt = int'(rows_in[4*g][col]) + int'(rows_in[4*g+1][col]) +
                int'(rows_in[4*g+2][col]) + int'(rows_in[4*g+3][col]);
          if (cnt == 4) begin
            loss += longint'(1) << col;
            four_ones_seen++;
          end
          if (rows_out[2*g][col] != (cnt == 1 || cnt >= 3)) ok = 0;
          if (col + 1 < W && rows_out[2*g+1][col+1] != (cnt >= 2)) ok = 0;
        end
        if (rows_out[2*g+1][0] != 1'b0) ok = 0;
        out_val = longint'(rows_out[2*g]) + longint'(rows_out[2*g+1]);
        checks++;
        if (!ok || out_val != in_val - loss) begin
          failures++;
          if (failures < 10) $display("FAIL group %0d: in %0d out %0d loss %0d", g, in_val, out_val, loss);
        end
      end
    end
    checks++;
    if (four_ones_seen == 0) begin
      failures++;
      $display("FAIL no column with four ones was exercised");
    end
    $display("four-ones columns exercised: %0d", four_ones_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
