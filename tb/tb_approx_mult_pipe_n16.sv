// tb_approx_mult_pipe_n16: the pipelined approximate multiplier at N = 16 (three
// compressor levels instead of two), random operands and control values.
//
// A behavioural reference (integer truncation and compensation, partial-product rows,
// compressor levels modelled by counting ones per column and group of four rows) gives
// every expected product. Each product must arrive exactly 3 cycles after its operands,
// with random bubbles in between. A quarter of the operands are all-ones-heavy so that
// four-ones compressor columns occur; the test fails if none did.
module tb_approx_mult_pipe_n16;
  import amul_pkg::*;

  localparam int N = 16, TW = 4, W = 32;

  logic          clk = 0;
  logic          rst;
  logic          in_valid;
  logic [N-1:0]  a, b;
  logic [TW-1:0] trunc;
  logic          out_valid;
  logic [W-1:0]  product;

  approx_mult_pipe #(.N(N), .TW(TW)) dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .a(a), .b(b), .trunc(trunc),
    .out_valid(out_valid), .product(product)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_four_ones = 0, n_trunc = 0;
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic longint ref_operand(input longint x, input int t);
    int te;
    longint xt;
    te = (t > N) ? N : t;
    xt = (x >> te) << te;
    if (xt != x && te > 0) xt += longint'(1) << (te - 1);
    return xt;
  endfunction

  function automatic longint ref_product(input longint av, input longint bv, input int t,
                                         output int four_ones);
    longint rows [N];
    longint am, bm;
    int nrows;
    am = ref_operand(av, t);
    bm = ref_operand(bv, t);
    four_ones = 0;
    for (int i = 0; i < N; i++) rows[i] = (((bm >> i) & 1) != 0) ? (am << i) : 0;
    nrows = N;
    while (nrows > 2) begin
      longint nxt [N];
      for (int g = 0; g < nrows / 4; g++) begin
        longint s, c;
        s = 0;
        c = 0;
        for (int col = 0; col < W; col++) begin
          int cnt;
          longint v;
          cnt = 0;
          for (int k = 0; k < 4; k++) cnt += int'((rows[4*g+k] >> col) & 1);
          if (cnt == 4) four_ones++;
          v = (cnt > 3) ? 64'd3 : longint'(cnt);
          s |= (v & 1) << col;
          c |= ((v >> 1) & 1) << (col + 1);
        end
        nxt[2*g]   = s & 64'hffff_ffff;
        nxt[2*g+1] = c & 64'hffff_ffff;
      end
      nrows = nrows / 2;
      for (int r = 0; r < nrows; r++) rows[r] = nxt[r];
    end
    return (rows[0] + rows[1]) & 64'hffff_ffff;
  endfunction

  typedef struct {
    longint          expect_p;
    longint unsigned due;
  } pending_t;
  pending_t q[$];

  always @(posedge clk) begin
    if (out_valid) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected product %h", product);
      end else begin
        pending_t p;
        p = q.pop_front();
        if (longint'(product) != p.expect_p || cycle != p.due) begin
          failures++;
          if (failures < 20)
            $display("FAIL product %h expected %h, cycle %0d due %0d", product, p.expect_p, cycle, p.due);
        end
      end
    end
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1;
    in_valid = 0;
    a = 0;
    b = 0;
    trunc = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int it = 0; it < 200000; it++) begin
      longint av, bv, e;
      int t, f;
      av = longint'({48'd0, 16'($urandom)});
      bv = longint'({48'd0, 16'($urandom)});
      if (it % 4 == 0) begin
        av = av | longint'({48'd0, 16'($urandom)});
        bv = bv | longint'({48'd0, 16'($urandom)}) | longint'({48'd0, 16'($urandom)});
      end
      t = (it % 2 == 0) ? 0 : int'($urandom % 16);
      e = ref_product(av, bv, t, f);
      if (f > 0) n_four_ones++;
      if (t > 0) n_trunc++;
      @(negedge clk);
      if ($urandom % 16 == 0) begin
        in_valid = 0;
        @(negedge clk);
      end
      in_valid = 1;
      a = N'(av);
      b = N'(bv);
      trunc = TW'(t);
      q.push_back('{expect_p: e, due: cycle + longint'(PIPE_LATENCY)});
      @(posedge clk);
      #1 in_valid = 0;
    end
    repeat (PIPE_LATENCY + 2) @(posedge clk);
    checks++;
    if (q.size() != 0 || n_four_ones == 0 || n_trunc == 0) begin
      failures++;
      $display("FAIL pending %0d, four-ones ops %0d, truncated ops %0d", q.size(), n_four_ones, n_trunc);
    end
    $display("operations with a four-ones column: %0d, truncated: %0d", n_four_ones, n_trunc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
