// cm_sbox_cache: the 1 KB S-box cache of one combining functional unit.
//
// An SBOX instruction forms a byte address without an adder: the table base
// supplies bits 31:10 (tables are aligned to 1 KB), one byte of the index,
// chosen by the opcode, supplies bits 9:2, and bits 1:0 are zero. The cache
// holds one such 256 x 32-bit table, tagged with its base bits 31:10. A lookup
// whose tag matches a valid table hits and returns the word combinationally;
// otherwise miss is raised and the processing element refills the whole table
// from data memory through the fill port, one word per cycle, then sets the
// tag with fill_done. Stores to data memory never update the cache, and
// invalidate (SBOXSYNC) empties it, so a store to a table becomes visible to
// SBOX only after SBOXSYNC.
// Interface: lookup side (valid, op, idx, tbl -> miss, data), fill side
// (fill_we, fill_addr, fill_data, fill_done, fill_tag), invalidate.
// Timing: lookup is combinational; fill writes and tag updates take effect at
// the next rising clock edge. Reset empties the cache.
// The address formation, the 1 KB size and the SBOXSYNC rule follow the
// design; the whole-table refill on a miss is this implementation's choice.
module cm_sbox_cache
  import cm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // lookup
  input  logic        lookup,      // an SBOX operation is being evaluated
  input  short_e      op,          // S_SBOX0..S_SBOX3 select the index byte
  input  word_t       idx,
  input  word_t       tbl,
  output logic        miss,
  output word_t       data,
  output logic [21:0] miss_tag,    // table base bits 31:10 of the lookup
  // refill
  input  logic        fill_we,
  input  logic [7:0]  fill_addr,
  input  word_t       fill_data,
  input  logic        fill_done,
  input  logic [21:0] fill_tag,
  input  logic        invalidate
);
  word_t       mem [SBOX_ENTRIES];
  logic [21:0] tag_q;
  logic        valid_q;
  logic [7:0]  entry;

  always_comb begin
    unique case (op)
      S_SBOX1: entry = idx[15:8];
      S_SBOX2: entry = idx[23:16];
      S_SBOX3: entry = idx[31:24];
      default: entry = idx[7:0];
    endcase
    miss_tag = tbl[31:10];
    miss     = lookup && !(valid_q && tag_q == tbl[31:10]);
    data     = mem[entry];
  end

  always_ff @(posedge clk) begin
    if (fill_we) mem[fill_addr] <= fill_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      tag_q   <= '0;
    end else if (invalidate) begin
      valid_q <= 1'b0;
    end else if (fill_done) begin
      valid_q <= 1'b1;
      tag_q   <= fill_tag;
    end
  end
endmodule
