// amul_pkg: constants and helper functions shared by the approximate multiplier.
//
// The default operand width (8 bits) and truncation-control width (4 bits) are the
// sizes of the a/b, Trunc and Product signals of the reference waveform of the design.
// The pipeline latency of three clock cycles (input register, accumulation register,
// output register) is this implementation's choice.
package amul_pkg;

  localparam int unsigned N_DEFAULT    = 8;  // operand width
  localparam int unsigned TW_DEFAULT   = 4;  // width of the truncation control
  localparam int unsigned PIPE_LATENCY = 3;  // clock edges from input to product

  // Effective number of truncated bits: the control value clamped to the operand width.
  function automatic int unsigned trunc_eff(input int unsigned t, input int unsigned n);
    return (t > n) ? n : t;
  endfunction

endpackage
