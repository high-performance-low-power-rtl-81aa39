// tb_final_adder: check of the 16-bit ripple adder against integer addition, with
// corner cases (all ones plus one, full carry ripple) and random operands.
module tb_final_adder;
  localparam int W = 16;
  logic [W-1:0] x, y, sum;
  logic         cout;
  int checks = 0, failures = 0;

  final_adder #(.W(W)) dut (.x(x), .y(y), .sum(sum), .cout(cout));

  task automatic check(input logic [W-1:0] xv, input logic [W-1:0] yv);
    int expect_v;
    x = xv;
    y = yv;
    #1;
    expect_v = int'(xv) + int'(yv);
    checks++;
    if ({cout, sum} != 17'(expect_v)) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h = %h (cout %0d)", xv, yv, sum, cout);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h0000, 16'h0000);
    check(16'hffff, 16'h0001);
    check(16'hffff, 16'hffff);
    check(16'h7fff, 16'h0001);
    check(16'haaaa, 16'h5555);
    for (int i = 0; i < 50000; i++) check(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
