// cm_imem: instruction memory of a processing element.
//
// DEPTH VLIW bundles of four slot instructions each. The fetch stage reads the
// bundle at pc combinationally; a loader writes bundles through the write
// port before the processor is started. There is no instruction cache: the
// whole kernel lives in this memory.
// Interface: pc -> bundle; we, waddr, wdata. Timing: write at the rising edge.
// Contents are not reset; they must be loaded before use.
// The memory follows the design; its depth is this implementation's choice.
module cm_imem
  import cm_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic    clk,
  input  logic [AW-1:0] pc,
  output bundle_t bundle,
  input  logic    we,
  input  logic [AW-1:0] waddr,
  input  bundle_t wdata
);
  bundle_t mem [DEPTH];
  assign bundle = mem[pc];
  always_ff @(posedge clk) if (we) mem[waddr] <= wdata;
endmodule
