// tb_dynamic_input_truncation: exhaustive check for 8-bit operands and every 4-bit
// control value. The expected truncated operand is (x >> t) << t with t clamped to 8,
// and dropped_nz must say whether x changed.
module tb_dynamic_input_truncation;
  localparam int N = 8, TW = 4;
  logic [N-1:0]  x, x_trunc;
  logic [TW-1:0] t;
  logic          dropped_nz;
  int checks = 0, failures = 0;

  dynamic_input_truncation #(.N(N), .TW(TW)) dut (.x(x), .t(t), .x_trunc(x_trunc), .dropped_nz(dropped_nz));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int tv = 0; tv < 16; tv++) begin
      for (int xv = 0; xv < 256; xv++) begin
        int te, expect_x;
        x = N'(xv);
        t = TW'(tv);
        #1;
        te = (tv > N) ? N : tv;
        expect_x = (xv >> te) << te;
        checks++;
        if (int'(x_trunc) != expect_x || dropped_nz != (expect_x != xv)) begin
          failures++;
          if (failures < 10)
            $display("FAIL x=%h t=%0d -> %h nz=%0d, expected %h", x, t, x_trunc, dropped_nz, expect_x);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
