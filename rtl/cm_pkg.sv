// cm_pkg: types and constants shared by the CryptoManiac processing element
// and the system around it.
//
// A CryptoManiac processing element is a 4-wide, 32-bit VLIW machine. A bundle
// holds four instructions, one per functional-unit slot. Every instruction
// names an operation pair, a destination and three source registers; the
// combining functional unit evaluates (R1 op_a R2) op_b R3 in one cycle. The
// operation classes (tiny, short, long) and their members come from the
// instruction set of the design. The binary encoding, the register count, the
// immediate field and the memory, branch and queue instructions that fill in
// the rest of the instruction set are this implementation's own choices.
package cm_pkg;

  localparam int unsigned XLEN      = 32;  // datapath width
  localparam int unsigned WIDTH     = 4;   // instructions per bundle (4-wide VLIW)
  localparam int unsigned NREGS     = 32;  // architectural registers (own choice)
  localparam int unsigned RIDX      = $clog2(NREGS);
  localparam int unsigned IMM_W     = 16;
  localparam int unsigned SBOX_ENTRIES = 256;  // 1 KB table of 32-bit words

  typedef logic [XLEN-1:0] word_t;
  typedef logic [RIDX-1:0] ridx_t;

  // Kind of a slot instruction. K_PAIR and K_LONG are the operation-pair
  // instructions executed by the combining functional unit; the others are
  // memory, control and queue operations of this implementation.
  typedef enum logic [3:0] {
    K_NOP      = 4'd0,
    K_PAIR     = 4'd1,   // tiny -> short -> tiny chain (any two of them)
    K_LONG     = 4'd2,   // <long><nop>: MUL or MULMOD
    K_LOAD     = 4'd3,   // rd <- mem[R1] (keystore when address bit 31 is set)
    K_STORE    = 4'd4,   // mem[R1] <- R2
    K_LDI      = 4'd5,   // rd <- zero-extended immediate
    K_BEQ      = 4'd6,   // if R1 == R2 goto imm
    K_BNE      = 4'd7,   // if R1 != R2 goto imm
    K_RECV     = 4'd8,   // rd <- pop processor input queue
    K_SEND     = 4'd9,   // push R1 to the output queue
    K_SENDL    = 4'd10,  // push R1 to the output queue, last word of a result
    K_SBOXSYNC = 4'd11   // make stores to S-box tables visible to SBOX
  } kind_e;

  // {tiny} operations: the logical units before and after the short unit.
  typedef enum logic [1:0] {
    T_NOP  = 2'd0,
    T_XOR  = 2'd1,
    T_AND  = 2'd2,
    T_SEXT = 2'd3   // sign-extend the low byte of the first input
  } tiny_e;

  // {short} operations: adder, rotator and S-box cache.
  typedef enum logic [3:0] {
    S_NOP    = 4'd0,
    S_ADD    = 4'd1,
    S_ADDINC = 4'd2,  // a + b + 1
    S_SUB    = 4'd3,
    S_ROL    = 4'd4,
    S_ROR    = 4'd5,
    S_SBOX0  = 4'd6,  // look up byte 0 (bits 7:0) of the index
    S_SBOX1  = 4'd7,
    S_SBOX2  = 4'd8,
    S_SBOX3  = 4'd9
  } short_e;

  // {long} operations: the pipelined multiplier.
  typedef enum logic {
    L_MUL    = 1'b0,  // low 32 bits of a * b
    L_MULMOD = 1'b1   // a * b modulo 0x10001 on 16-bit values, 0 standing for 2^16
  } long_e;

  typedef struct packed {
    kind_e              kind;
    tiny_e              t1;    // first logical unit
    short_e             sh;    // short unit
    tiny_e              t2;    // second logical unit
    long_e              lg;    // long unit operation
    ridx_t              rd;
    ridx_t              rs1;
    ridx_t              rs2;
    ridx_t              rs3;
    logic [IMM_W-1:0]   imm;
  } inst_t;

  typedef inst_t [WIDTH-1:0] bundle_t;


  // Does this slot instruction write its destination register?
  function automatic logic writes_rd(inst_t i);
    return i.kind inside {K_PAIR, K_LONG, K_LOAD, K_LDI, K_RECV};
  endfunction

  // Encoding helpers, used by programs written in SystemVerilog.
  function automatic inst_t mk_pair(tiny_e t1, short_e sh, tiny_e t2,
                                    ridx_t rd, ridx_t r1, ridx_t r2, ridx_t r3);
    inst_t i = '0;
    i.kind = K_PAIR; i.t1 = t1; i.sh = sh; i.t2 = t2;
    i.rd = rd; i.rs1 = r1; i.rs2 = r2; i.rs3 = r3;
    return i;
  endfunction

  function automatic inst_t mk_op(kind_e k, ridx_t rd, ridx_t r1, ridx_t r2,
                                  logic [IMM_W-1:0] imm);
    inst_t i = '0;
    i.kind = k; i.rd = rd; i.rs1 = r1; i.rs2 = r2; i.imm = imm;
    return i;
  endfunction

  function automatic inst_t mk_long(long_e lg, ridx_t rd, ridx_t r1, ridx_t r2);
    inst_t i = '0;
    i.kind = K_LONG; i.lg = lg; i.rd = rd; i.rs1 = r1; i.rs2 = r2;
    return i;
  endfunction

  // Request header word, as placed in the input queue and handed to a
  // processing element: id | session | action | number of data words.
  typedef struct packed {
    logic [7:0] id;
    logic [7:0] session;
    logic [7:0] action;
    logic [7:0] len;
  } req_hdr_t;

endpackage
