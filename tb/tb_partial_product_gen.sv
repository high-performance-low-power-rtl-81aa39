// tb_partial_product_gen: exhaustive check of the 8x8 AND array. Every ppd row must be
// a or 0 according to the matching bit of b, every shifted row must be that row times
// 2^i, and the rows must add up to the exact product a*b.
module tb_partial_product_gen;
  localparam int N = 8;
  logic [N-1:0]        a, b;
  logic [N-1:0][N-1:0] ppd;
  logic [2*N-1:0]      rows [N];
  int checks = 0, failures = 0;

  partial_product_gen #(.N(N)) dut (.a(a), .b(b), .ppd(ppd), .rows(rows));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int av = 0; av < 256; av++) begin
      for (int bv = 0; bv < 256; bv++) begin
        int total;
        bit ok;
        a = N'(av);
        b = N'(bv);
        #1;
        total = 0;
        ok = 1;
        for (int i = 0; i < N; i++) begin
          int row_expect;
          row_expect = (((bv >> i) & 1) != 0) ? av : 0;
          if (int'(ppd[i]) != row_expect) ok = 0;
          if (int'(rows[i]) != (row_expect << i)) ok = 0;
          total += int'(rows[i]);
        end
        checks++;
        if (!ok || total != av * bv) begin
          failures++;
          if (failures < 10) $display("FAIL a=%h b=%h sum of rows %h", a, b, total);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
