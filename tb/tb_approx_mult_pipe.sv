// tb_approx_mult_pipe: end-to-end test of the pipelined approximate multiplier at its
// default size (8-bit operands, 4-bit truncation control).
//
// A behavioural reference computes every product independently: operand truncation and
// compensation with integer shifts, the partial-product rows, and each compressor level
// by counting the ones per column and group of four rows (value min(count, 3)). The
// test drives every (a, b) pair for every control value 0..15 in a random order of
// valid cycles and bubbles, then a burst with a reset in the middle, and checks:
//   - every product against the reference, bit for bit;
//   - that each product leaves exactly PIPE_LATENCY (3) cycles after it entered and that
//     back-to-back inputs give back-to-back outputs (one product per cycle);
//   - the example 0x67 * 0x60 with trunc = 0 gives the exact 0x26a0, and three
//     truncated examples give their hand-computed products;
//   - that out_valid drops after reset and no stale product appears.
// It counts the mechanisms of the design (truncation dropping ones, compensation,
// a four-ones compressor column, pipeline bubbles, reset while busy) and fails if any
// never happened. It also prints the mean relative error distance (MRED) against the
// exact product for each control value over all 65536 operand pairs.
module tb_approx_mult_pipe;
  import amul_pkg::*;

  localparam int N = 8, TW = 4, W = 16;

  logic          clk = 0;
  logic          rst;
  logic          in_valid;
  logic [N-1:0]  a, b;
  logic [TW-1:0] trunc;
  logic          out_valid;
  logic [W-1:0]  product;

  approx_mult_pipe dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .a(a), .b(b), .trunc(trunc),
    .out_valid(out_valid), .product(product)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int n_trunc_drop = 0, n_comp = 0, n_four_ones = 0, n_bubble = 0, n_reset_busy = 0;
  int n_approx_diff = 0;

  // ---------------------------------------------------------------- reference model
  function automatic int ref_operand(input int x, input int t, output bit dropped);
    int te, xt;
    te = (t > N) ? N : t;
    xt = (x >> te) << te;
    dropped = (xt != x);
    if (dropped && te > 0) xt += 1 << (te - 1);
    return xt;
  endfunction

  function automatic int ref_product(input int av, input int bv, input int t, output int four_ones);
    int rows [N];
    int nrows, am, bm;
    bit da, db;
    am = ref_operand(av, t, da);
    bm = ref_operand(bv, t, db);
    four_ones = 0;
    for (int i = 0; i < N; i++) rows[i] = (((bm >> i) & 1) != 0) ? (am << i) : 0;
    nrows = N;
    while (nrows > 2) begin
      int nxt [N];
      for (int g = 0; g < nrows / 4; g++) begin
        int s, c;
        s = 0;
        c = 0;
        for (int col = 0; col < W; col++) begin
          int cnt, v;
          cnt = 0;
          for (int k = 0; k < 4; k++) cnt += (rows[4*g+k] >> col) & 1;
          if (cnt == 4) four_ones++;
          v = (cnt > 3) ? 3 : cnt;
          s |= (v & 1) << col;
          c |= ((v >> 1) & 1) << (col + 1);
        end
        nxt[2*g]   = s & 32'hffff;
        nxt[2*g+1] = c & 32'hffff;
      end
      nrows = nrows / 2;
      for (int r = 0; r < nrows; r++) rows[r] = nxt[r];
    end
    return (rows[0] + rows[1]) & 32'hffff;
  endfunction

  // ---------------------------------------------------------------- scoreboard
  typedef struct {
    int               expect_p;
    longint unsigned  due;
  } pending_t;
  pending_t q[$];

  real   red_sum [16];
  int    red_cnt [16];

  always @(posedge clk) begin
    if (out_valid) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected product %h at cycle %0d", product, cycle);
      end else begin
        pending_t p;
        p = q.pop_front();
        if (int'(product) != p.expect_p || cycle != p.due) begin
          failures++;
          if (failures < 20)
            $display("FAIL product %h expected %h, cycle %0d due %0d", product, p.expect_p, cycle, p.due);
        end
      end
    end
  end

  task automatic drive(input int av, input int bv, input int t);
    int e, f;
    bit da, db;
    e = ref_product(av, bv, t, f);
    void'(ref_operand(av, t, da));
    void'(ref_operand(bv, t, db));
    if (da || db) n_trunc_drop++;
    if ((da || db) && t > 1) n_comp++;
    if (f > 0) n_four_ones++;
    if (e != av * bv) n_approx_diff++;
    if (av * bv != 0) begin
      red_sum[t] += real'((e > av * bv) ? e - av * bv : av * bv - e) / real'(av * bv);
      red_cnt[t]++;
    end
    @(negedge clk);
    in_valid = 1;
    a = N'(av);
    b = N'(bv);
    trunc = TW'(t);
    // sampled at the next rising edge (cycle c); product registered PIPE_LATENCY edges later
    q.push_back('{expect_p: e, due: cycle + longint'(PIPE_LATENCY)});
    @(posedge clk);
    #1;
    in_valid = 0;
  endtask

  // watchdog
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int f;
    rst = 1;
    in_valid = 0;
    a = 0;
    b = 0;
    trunc = 0;
    for (int t = 0; t < 16; t++) begin
      red_sum[t] = 0.0;
      red_cnt[t] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst = 0;

    // waveform example: 0x67 * 0x60 with no truncation is exact
    checks++;
    if (ref_product('h67, 'h60, 0, f) != 'h26a0) failures++;
    drive('h67, 'h60, 0);
    // the same vectors with truncation, worked out by hand from the truncation rule
    // (0x67 -> 0x64 at t=3; 0x47 -> 0x48 at t=4; 0xa8, 0x92 -> 0xa0 at t=6)
    checks++;
    if (ref_product('h67, 'h60, 3, f) != 'h2580) failures++;
    checks++;
    if (ref_product('h47, 'h68, 4, f) != 'h1d40) failures++;
    checks++;
    if (ref_product('ha8, 'h92, 6, f) != 'h6400) failures++;
    drive('h67, 'h60, 3);
    drive('h47, 'h68, 4);
    drive('ha8, 'h92, 6);

    // every operand pair for every control value; occasional bubbles
    for (int t = 0; t < 16; t++) begin
      for (int av = 0; av < 256; av++) begin
        for (int bv = 0; bv < 256; bv++) begin
          if (($urandom % 64) == 0) begin
            @(negedge clk);
            in_valid = 0;
            a = N'($urandom);
            b = N'($urandom);
            n_bubble++;
          end
          drive(av, bv, t);
        end
      end
    end

    // reset while the pipeline is full: in-flight results must be discarded
    repeat (PIPE_LATENCY + 2) @(posedge clk);
    drive(200, 201, 0);
    drive(17, 99, 3);
    @(negedge clk);
    rst = 1;
    n_reset_busy++;
    q.delete();
    @(negedge clk);
    rst = 0;
    checks++;
    if (out_valid) begin
      failures++;
      $display("FAIL out_valid high right after reset");
    end
    repeat (5) begin
      @(posedge clk);
      #1;
      checks++;
      if (out_valid) begin
        failures++;
        $display("FAIL stale product after reset");
      end
    end
    drive(255, 255, 0);
    repeat (PIPE_LATENCY + 2) @(posedge clk);

    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d products never came out", q.size());
    end

    for (int t = 0; t < 16; t++)
      if (red_cnt[t] > 0)
        $display("trunc=%0d  MRED=%0.3f %%  (%0d nonzero exact products)", t,
                 100.0 * red_sum[t] / real'(red_cnt[t]), red_cnt[t]);
    $display("mechanisms: truncation dropped ones %0d, compensation %0d, four-ones compressor columns %0d, approximate results %0d, bubbles %0d, reset while busy %0d",
             n_trunc_drop, n_comp, n_four_ones, n_approx_diff, n_bubble, n_reset_busy);
    checks++;
    if (n_trunc_drop == 0 || n_comp == 0 || n_four_ones == 0 || n_bubble == 0 ||
        n_reset_busy == 0 || n_approx_diff == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
