// error_compensation: unbiasing of a truncated operand.
//
// When the truncation dropped at least one 1 bit (dropped_nz), the highest dropped bit
// position (t-1, with t clamped to N) is set to 1, so the truncated operand stands for
// the middle of the range of values it replaced instead of its lower end. This roughly
// halves the average error distance of truncation and keeps the error centred on zero.
// An operand whose dropped bits were all 0 is left exact, and t = 0 changes nothing.
// This particular compensation rule is the implementation's own choice.
// Purely combinational.
module error_compensation
  import amul_pkg::*;
#(
  parameter int unsigned N  = N_DEFAULT,
  parameter int unsigned TW = TW_DEFAULT
) (
  input  logic [N-1:0]  x_trunc,
  input  logic          dropped_nz,
  input  logic [TW-1:0] t,
  output logic [N-1:0]  x_comp
);

  always_comb begin
    x_comp = x_trunc;
    for (int unsigned i = 0; i < N; i++) begin
      if (dropped_nz && (i + 1 == trunc_eff(int'(t), N))) x_comp[i] = 1'b1;
    end
  end

endmodule
