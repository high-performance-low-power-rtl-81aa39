// tb_approx_compressor_4_2: exhaustive check of the approximate 4-2 compressor.
// For every one of the 16 inputs the value 2*carry + sum must equal the number of ones,
// except for the all-ones input, which must give 3 (error distance 1). Separately the
// carry is checked to be exact: 1 exactly when at least two inputs are 1.
module tb_approx_compressor_4_2;
  logic [3:0] x;
  logic sum, carry;
  int checks = 0, failures = 0;

  approx_compressor_4_2 dut (.x1(x[0]), .x2(x[1]), .x3(x[2]), .x4(x[3]), .sum(sum), .carry(carry));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int ones, expect_val;
      x = 4'(v);
      #1;
      ones = $countones(x);
      expect_val = (ones == 4) ? 3 : ones;
      checks++;
      if (2 * int'(carry) + int'(sum) != expect_val) begin
        failures++;
        $display("FAIL x=%b sum=%0d carry=%0d expected value %0d", x, sum, carry, expect_val);
      end
      checks++;
      if (carry != (ones >= 2)) begin
        failures++;
        $display("FAIL x=%b carry=%0d not exact", x, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
