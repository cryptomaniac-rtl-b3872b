// cm_logic_unit: the {tiny} logical unit of a combining functional unit.
//
// Computes XOR, AND or a sign extension of its first input in a fraction of a
// cycle, so that a tiny operation can be chained before or after a short one
// inside a single clock. T_NOP passes the first input through, which is how an
// unused position of the operation chain is bypassed.
// Interface: op selects the operation, a and b are the operands, y the result.
// Timing: purely combinational.
// The operation set (xor, and, signext) follows the instruction set; what
// signext extends is not specified, and this unit sign-extends the low byte.
module cm_logic_unit
  import cm_pkg::*;
(
  input  tiny_e op,
  input  word_t a,
  input  word_t b,
  output word_t y
);
  always_comb begin
    unique case (op)
      T_XOR:   y = a ^ b;
      T_AND:   y = a & b;
      T_SEXT:  y = {{(XLEN-8){a[7]}}, a[7:0]};
      default: y = a;
    endcase
  end
endmodule
