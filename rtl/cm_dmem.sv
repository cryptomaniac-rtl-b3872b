// cm_dmem: data memory of a processing element.
//
// WORDS 32-bit words with one synchronous read/write port, addressed by byte
// address (bits 1:0 ignored, upper bits beyond the array ignored). It holds
// the kernel's data and its S-box tables. A read returns data in the cycle
// after the address is presented. A second, write-only port lets a loader
// fill the memory while the processor is stopped.
// Interface: en, we, addr, wdata -> rdata; ld_we, ld_addr, ld_wdata.
// Timing: one cycle read latency; writes at the rising edge.
// The memory follows the design; its size is this implementation's choice.
module cm_dmem
  import cm_pkg::*;
#(
  parameter int unsigned WORDS = 4096,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic  clk,
  input  logic  en,
  input  logic  we,
  input  word_t addr,
  input  word_t wdata,
  output word_t rdata,
  input  logic  ld_we,
  input  word_t ld_addr,
  input  word_t ld_wdata
);
  word_t mem [WORDS];
  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr[AW+1:2]] <= wdata;
      else    rdata <= mem[addr[AW+1:2]];
    end
    if (ld_we) mem[ld_addr[AW+1:2]] <= ld_wdata;
  end
endmodule
