// approx_mult_pipe: pipelined approximate N x N multiplier with dynamic truncation.
//
// Data flow, one operation per clock:
//   stage 1  input register: a, b and the truncation control are registered.
//            Both operands then pass through dynamic input truncation (the `trunc` low
//            bits are dropped) and error compensation (the highest dropped bit is set
//            when any dropped bit was 1). The AND array forms N partial-product rows
//            and the first level of approximate 4-2 compressors halves them to N/2 rows.
//   stage 2  accumulation register: the N/2 rows are registered. The remaining
//            compressor levels reduce them to two rows, which the accurate ripple adder
//            of modified half/full adders adds.
//   stage 3  output register: the 2N-bit product and its valid flag.
// Latency is 3 clock cycles (amul_pkg::PIPE_LATENCY), throughput one product per
// cycle. trunc = 0 gives exact operands; the compressors are still approximate, so a
// column holding four ones counts them as three.
//
// Interface: clk, synchronous active-high rst (clears the valid flags and the product),
// in_valid/a/b/trunc in, out_valid/product out. There is no back-pressure.
// The stage boundaries, the valid flags and the reset behaviour are this
// implementation's choices; the input register and a register inside the
// partial-product accumulation follow the pipelined flow of the design.
// N must be a power of two and at least 4. The AND array's unshifted rows (ppd) are
// formed for observation in simulation and are not used further.
module approx_mult_pipe
  import amul_pkg::*;
#(
  parameter int unsigned N  = N_DEFAULT,
  parameter int unsigned TW = TW_DEFAULT
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            in_valid,
  input  logic [N-1:0]    a,
  input  logic [N-1:0]    b,
  input  logic [TW-1:0]   trunc,
  output logic            out_valid,
  output logic [2*N-1:0]  product
);

  localparam int unsigned W      = 2 * N;
  localparam int unsigned LEVELS = $clog2(N) - 1;  // 4-2 levels from N rows to 2

  initial begin
    assert (N >= 4 && (N & (N - 1)) == 0)
      else $fatal(1, "approx_mult_pipe: N must be a power of two, at least 4");
  end

  // ---------------------------------------------------------------- stage 1
  logic            s1_valid;
  logic [N-1:0]    s1_a, s1_b;
  logic [TW-1:0]   s1_trunc;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_valid <= 1'b0;
      s1_a     <= '0;
      s1_b     <= '0;
      s1_trunc <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_a     <= a;
      s1_b     <= b;
      s1_trunc <= trunc;
    end
  end

  logic [N-1:0] a_trunc, b_trunc, a_mod, b_mod;
  logic         a_drop_nz, b_drop_nz;

  dynamic_input_truncation #(.N(N), .TW(TW)) u_trunc_a (
    .x(s1_a), .t(s1_trunc), .x_trunc(a_trunc), .dropped_nz(a_drop_nz)
  );
  dynamic_input_truncation #(.N(N), .TW(TW)) u_trunc_b (
    .x(s1_b), .t(s1_trunc), .x_trunc(b_trunc), .dropped_nz(b_drop_nz)
  );
  error_compensation #(.N(N), .TW(TW)) u_comp_a (
    .x_trunc(a_trunc), .dropped_nz(a_drop_nz), .t(s1_trunc), .x_comp(a_mod)
  );
  error_compensation #(.N(N), .TW(TW)) u_comp_b (
    .x_trunc(b_trunc), .dropped_nz(b_drop_nz), .t(s1_trunc), .x_comp(b_mod)
  );

  logic [N-1:0][N-1:0] ppd;
  logic [W-1:0]        pp_rows [N];

  partial_product_gen #(.N(N)) u_ppgen (
    .a(a_mod), .b(b_mod), .ppd(ppd), .rows(pp_rows)
  );

  logic [W-1:0] l1_rows [N/2];

  pp_compress_level #(.ROWS(N), .W(W)) u_level1 (
    .rows_in(pp_rows), .rows_out(l1_rows)
  );

  // ---------------------------------------------------------------- stage 2
  logic         s2_valid;
  logic [W-1:0] s2_rows [N/2];

  always_ff @(posedge clk) begin
    if (rst) begin
      s2_valid <= 1'b0;
      for (int unsigned r = 0; r < N / 2; r++) s2_rows[r] <= '0;
    end else begin
      s2_valid <= s1_valid;
      s2_rows  <= l1_rows;
    end
  end

  // Remaining compressor levels: level k (k = 1 .. LEVELS-1) turns N>>k rows into
  // N>>(k+1) rows.
  for (genvar k = 1; k <= LEVELS; k++) begin : g_lvl
    logic [W-1:0] rows [N >> k];
    if (k == 1) begin : g_first
      assign rows = s2_rows;
    end else begin : g_next
      pp_compress_level #(.ROWS(N >> (k - 1)), .W(W)) u_level (
        .rows_in(g_lvl[k-1].rows), .rows_out(rows)
      );
    end
  end

  logic [W-1:0] sum_final;
  logic         cout_final;

  final_adder #(.W(W)) u_final (
    .x(g_lvl[LEVELS].rows[0]), .y(g_lvl[LEVELS].rows[1]),
    .sum(sum_final), .cout(cout_final)
  );

  // ---------------------------------------------------------------- stage 3
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      product   <= '0;
    end else begin
      out_valid <= s2_valid;
      product   <= sum_final;
    end
  end

  // The approximate rows never sum to more than the exact product, so the final
  // addition cannot overflow 2N bits.
  always_ff @(posedge clk) begin
    if (!rst && s2_valid) assert (!cout_final)
      else $error("approx_mult_pipe: final adder overflow");
  end

endmodule
