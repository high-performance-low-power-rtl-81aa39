// tb_error_compensation: exhaustive check for 8-bit operands and every 4-bit control
// value. The input is built as a properly truncated operand ((x >> t) << t) with the
// matching dropped_nz flag; the expected output adds 2^(t-1) (t clamped to 8) when the
// flag is set and t > 0, and is the input otherwise.
module tb_error_compensation;
  localparam int N = 8, TW = 4;
  logic [N-1:0]  x_trunc, x_comp;
  logic [TW-1:0] t;
  logic          dropped_nz;
  int checks = 0, failures = 0;
  int comp_applied = 0;

  error_compensation #(.N(N), .TW(TW)) dut (.x_trunc(x_trunc), .dropped_nz(dropped_nz), .t(t), .x_comp(x_comp));

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
        int te, xt, expect_x;
        te = (tv > N) ? N : tv;
        xt = (xv >> te) << te;
        x_trunc    = N'(xt);
        dropped_nz = (xt != xv);
        t          = TW'(tv);
        #1;
        expect_x = (dropped_nz && te > 0) ? xt + (1 << (te - 1)) : xt;
        if (expect_x != xt) comp_applied++;
        checks++;
        if (int'(x_comp) != expect_x) begin
          failures++;
          if (failures < 10)
            $display("FAIL x_trunc=%h nz=%0d t=%0d -> %h expected %h", x_trunc, dropped_nz, t, x_comp, expect_x);
        end
      end
    end
    checks++;
    if (comp_applied == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
