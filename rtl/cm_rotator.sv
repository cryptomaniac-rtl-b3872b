// cm_rotator: the 32-bit rotator of the {short} group of a combining
// functional unit.
//
// Rotates a left (S_ROL) or right (S_ROR) by the amount in b[4:0]; the upper
// bits of b are ignored. Left rotation by n is built from a 64-bit
// concatenation shifted by n; right rotation uses the amount 32 - n.
// Interface: op, a (data), b (amount), y (result). Timing: combinational.
// Rotates by a register amount come from the instruction set; supporting both
// directions follows the rotate extensions the design lists (ROL and ROR).
module cm_rotator
  import cm_pkg::*;
(
  input  short_e op,
  input  word_t  a,
  input  word_t  b,
  output word_t  y
);
  logic [4:0]          amt;
  logic [2*XLEN-1:0]   dbl;
  always_comb begin
    amt = (op == S_ROR) ? 5'(6'd32 - {1'b0, b[4:0]}) : b[4:0];
    dbl = {a, a} << amt;
    y   = dbl[2*XLEN-1:XLEN];
  end
endmodule
