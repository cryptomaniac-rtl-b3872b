// cm_adder: the 32-bit adder of the {short} group of a combining functional unit.
//
// Performs add, add-with-increment (a + b + 1) and subtract with one carry
// chain: subtraction is a + ~b + 1, add-increment is a + b with carry-in set.
// Interface: op (S_ADD, S_ADDINC or S_SUB), a, b; y is the 32-bit result
// (carry out is dropped, arithmetic is modulo 2^32).
// Timing: purely combinational.
// The operations follow the instruction set; the shared carry chain is this
// design's choice.
module cm_adder
  import cm_pkg::*;
(
  input  short_e op,
  input  word_t  a,
  input  word_t  b,
  output word_t  y
);
  word_t bx;
  logic  cin;
  always_comb begin
    bx  = (op == S_SUB) ? ~b : b;
    cin = (op == S_SUB) || (op == S_ADDINC);
    y   = a + bx + word_t'(cin);
  end
endmodule
