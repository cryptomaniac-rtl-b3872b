// cm_multiplier: the pipelined 32-bit multiplier, the {long} unit of a
// combining functional unit.
//
// MUL returns the low 32 bits of a * b. MULMOD returns the product of the low
// 16 bits of a and b modulo 0x10001, with the value 0 standing for 2^16 (the
// convention of IDEA's multiplication), zero-extended to 32 bits. The first
// stage forms the 32 x 32 product and the two MULMOD special cases and
// registers them; the second stage reduces the product modulo 2^16 + 1 using
// 2^16 = -1: lo - hi, plus 1 if that borrows.
// Interface: en advances the pipeline (held during processor stalls); op, a, b
// enter in stage 1; y is the result of the operation that entered one
// enabled cycle earlier.
// Timing: two stages; the result is valid in the cycle after the operands
// are captured. There is no reset: the output is only used one cycle after a
// valid operation enters.
// The pipelined multiplier and the MULMOD modulus come from the design; the
// two-stage split and the IDEA zero convention are this implementation's
// choices.
module cm_multiplier
  import cm_pkg::*;
(
  input  logic   clk,
  input  logic   en,
  input  long_e  op,
  input  word_t  a,
  input  word_t  b,
  output word_t  y
);
  logic [2*XLEN-1:0] prod_q;
  long_e             op_q;
  logic              az_q, bz_q;
  logic [15:0]       a16_q, b16_q;

  always_ff @(posedge clk) begin
    if (en) begin
      op_q   <= op;
      az_q   <= (a[15:0] == 16'd0);
      bz_q   <= (b[15:0] == 16'd0);
      a16_q  <= a[15:0];
      b16_q  <= b[15:0];
      prod_q <= (op == L_MULMOD) ? {32'd0, 16'd0, a[15:0]} * {32'd0, 16'd0, b[15:0]}
                                 : {32'd0, a} * {32'd0, b};
    end
  end

  logic [15:0] lo, hi, mm;
  always_comb begin
    lo = prod_q[15:0];
    hi = prod_q[31:16];
    if (az_q)      mm = 16'd1 - b16_q;       // 2^16 * b = -b (mod 2^16 + 1)
    else if (bz_q) mm = 16'd1 - a16_q;
    else           mm = lo - hi + ((lo < hi) ? 16'd1 : 16'd0);
    y = (op_q == L_MULMOD) ? {16'd0, mm} : prod_q[XLEN-1:0];
  end
endmodule
