// tb_modified_half_adder: exhaustive check of the AND/OR half adder against integer
// addition of its two input bits.
module tb_modified_half_adder;
  logic a, b, sum, carry;
  int checks = 0, failures = 0;

  modified_half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({carry, sum} != 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%0d b=%0d -> carry=%0d sum=%0d", a, b, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
