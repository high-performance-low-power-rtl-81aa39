// dynamic_input_truncation: run-time truncation of an operand's least significant bits.
//
// The control value t selects how many low bits of the operand x are dropped (forced to
// zero); values above N drop the whole operand. t = 0 passes the operand unchanged, so
// the multiplier built on it can be switched between exact-input and truncated modes on
// every clock. Besides the truncated operand the block reports whether any dropped bit
// was 1 (dropped_nz), which the error compensation uses.
// Purely combinational. N and TW default to the 8-bit operands and 4-bit control.
module dynamic_input_truncation
  import amul_pkg::*;
#(
  parameter int unsigned N  = N_DEFAULT,
  parameter int unsigned TW = TW_DEFAULT
) (
  input  logic [N-1:0]  x,
  input  logic [TW-1:0] t,
  output logic [N-1:0]  x_trunc,
  output logic          dropped_nz
);

  logic [N-1:0] drop_mask;

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      drop_mask[i] = (i < trunc_eff(int'(t), N));
    end
    x_trunc    = x & ~drop_mask;
    dropped_nz = |(x & drop_mask);
  end

endmodule
