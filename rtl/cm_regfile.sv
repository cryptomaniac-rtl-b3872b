// cm_regfile: the register file of a processing element.
//
// NREGS 32-bit registers with NRD combinational read ports (three per VLIW
// slot) and NWR write ports (one per slot). A read of a register being written
// in the same cycle returns the new value (write-through), which covers the
// distance-two bypass from write-back to decode. If several ports write the
// same register in one cycle, the highest-numbered port wins.
// Interface: raddr/rdata arrays; we/waddr/wdata arrays. Timing: writes at the
// rising edge; reads combinational. Reset clears every register.
// The register count and port arrangement are this implementation's choices.
module cm_regfile
  import cm_pkg::*;
#(
  parameter int unsigned NRD = 3 * WIDTH,
  parameter int unsigned NWR = WIDTH
) (
  input  logic  clk,
  input  logic  rst_n,
  input  ridx_t raddr [NRD],
  output word_t rdata [NRD],
  input  logic  we    [NWR],
  input  ridx_t waddr [NWR],
  input  word_t wdata [NWR]
);
  word_t regs [NREGS];

  always_comb begin
    for (int r = 0; r < NRD; r++) begin
      rdata[r] = regs[raddr[r]];
      for (int w = 0; w < NWR; w++)
        if (we[w] && waddr[w] == raddr[r]) rdata[r] = wdata[w];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else begin
      for (int w = 0; w < NWR; w++)
        if (we[w]) regs[waddr[w]] <= wdata[w];
    end
  end
endmodule
