// modified_full_adder: exact full adder built from two 4:1 multiplexers.
//
// The operand bits a and b drive the select lines of both multiplexers; the carry-in c
// and constants are the data inputs. The sum multiplexer passes c, ~c, ~c, c and the
// carry multiplexer passes 0, c, c, 1 for selects {a,b} = 00, 01, 10, 11. The result is
// the same as a conventional full adder (sum = a^b^c, carry = majority). The order of
// the select bits is this implementation's choice; the function is symmetric in a and b.
// Purely combinational.
module modified_full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  logic [1:0] sel;
  assign sel = {a, b};

  // Sum multiplexer.
  always_comb begin
    unique case (sel)
      2'b00:   sum = c;
      2'b01:   sum = ~c;
      2'b10:   sum = ~c;
      default: sum = c;
    endcase
  end

  // Carry multiplexer.
  always_comb begin
    unique case (sel)
      2'b00:   carry = 1'b0;
      2'b01:   carry = c;
      2'b10:   carry = c;
      default: carry = 1'b1;
    endcase
  end

endmodule
