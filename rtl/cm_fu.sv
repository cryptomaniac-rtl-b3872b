// cm_fu: the combining functional unit of one VLIW slot.
//
// The unit chains a logical unit {tiny}, a short unit {short} and a second
// logical unit {tiny}, so that one triadic instruction evaluates an operation
// pair (R1 op_a R2) op_b R3 in a single cycle: short-tiny, tiny-short or
// tiny-tiny. A stage whose operation is a nop passes its first input through.
// The first active stage takes R1 and R2; the next one takes the chain value
// and R3. The short group holds a 32-bit adder, a 32-bit rotator and a 1 KB
// S-box cache, of which the operation selects one. Beside the chain sits the
// pipelined 32-bit multiplier {long}, fed straight from R1 and R2, whose
// result leaves through the output mux one cycle later.
// Interface: inst is the slot instruction, valid marks a live instruction, en
// advances the multiplier pipeline; r1..r3 are the resolved operands.
// y_chain is the combinational pair result; y_long the multiplier result of
// the instruction that was in this slot one advance earlier. sbox_* are the
// S-box cache miss and refill signals of this slot.
// Timing: the chain is combinational; the long unit has a latency of one cycle
// beyond the execute stage.
// The structure (tiny, short, tiny, separate long unit) follows the design;
// the operand routing rule is this implementation's reading of it.
module cm_fu
  import cm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        valid,
  input  inst_t       inst,
  input  word_t       r1,
  input  word_t       r2,
  input  word_t       r3,
  output word_t       y_chain,
  output word_t       y_long,
  // S-box cache refill
  output logic        sbox_miss,
  output logic [21:0] sbox_miss_tag,
  input  logic        fill_we,
  input  logic [7:0]  fill_addr,
  input  word_t       fill_data,
  input  logic        fill_done,
  input  logic [21:0] fill_tag,
  input  logic        sbox_invalidate
);
  word_t  x1, x2, b2, b3, add_y, rot_y, sbox_y;
  tiny_e  t1, t2;
  short_e sh;
  logic   is_pair, is_sbox;

  always_comb begin
    is_pair = valid && inst.kind == K_PAIR;
    t1      = is_pair ? inst.t1 : T_NOP;
    sh      = is_pair ? inst.sh : S_NOP;
    t2      = is_pair ? inst.t2 : T_NOP;
    is_sbox = sh inside {S_SBOX0, S_SBOX1, S_SBOX2, S_SBOX3};
    b2      = (t1 != T_NOP) ? r3 : r2;
    b3      = (t1 != T_NOP || sh != S_NOP) ? r3 : r2;
  end

  cm_logic_unit u_tiny1 (.op(t1), .a(r1), .b(r2), .y(x1));

  cm_adder   u_add (.op(sh), .a(x1), .b(b2), .y(add_y));
  cm_rotator u_rot (.op(sh), .a(x1), .b(b2), .y(rot_y));
  cm_sbox_cache u_sbox (
    .clk, .rst_n,
    .lookup(is_sbox), .op(sh), .idx(x1), .tbl(b2),
    .miss(sbox_miss), .data(sbox_y), .miss_tag(sbox_miss_tag),
    .fill_we, .fill_addr, .fill_data, .fill_done, .fill_tag,
    .invalidate(sbox_invalidate)
  );

  always_comb begin
    unique case (sh)
      S_ADD, S_ADDINC, S_SUB:             x2 = add_y;
      S_ROL, S_ROR:                       x2 = rot_y;
      S_SBOX0, S_SBOX1, S_SBOX2, S_SBOX3: x2 = sbox_y;
      default:                            x2 = x1;
    endcase
  end

  cm_logic_unit u_tiny2 (.op(t2), .a(x2), .b(b3), .y(y_chain));

  cm_multiplier u_mul (
    .clk, .en, .op(inst.lg), .a(r1), .b(r2), .y(y_long)
  );

  // The instruction set only has operation pairs: never all three stages.
  always_comb begin
    if (rst_n && is_pair) assert (t1 == T_NOP || sh == S_NOP || t2 == T_NOP)
      else $error("cm_fu: three chained operations in one instruction");
  end
endmodule
