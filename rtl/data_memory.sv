// data_memory: data memory of the SMP core with read ports Rd 0..3 and write
// ports Wr 0..3.
//
// Reads are synchronous: an address presented in pipe 2 (from the memory access
// processor) returns its word registered at the end of pipe 2, ready for the
// pipe-3 resources.  A read port that is not used keeps its last word (no power
// spent).  Writes happen at the end of pipe 4; if two write ports hit the same
// word in one cycle the higher-numbered port wins.  A read and a write of the same
// word in one cycle return the old word.  From the document: four read ports,
// four write ports, read ports carry only addresses, write ports address and data.
// Own choices: depth (4096 words), port timing and write priority.
module data_memory
  import smp_pkg::*;
#(
  parameter int unsigned DEPTH = MEM_DEPTH,
  parameter int unsigned NR    = NRD,
  parameter int unsigned NW    = NWR,
  localparam int unsigned A    = $clog2(DEPTH)
) (
  input  logic                   clk,
  input  logic [NR-1:0]          re,
  input  logic [NR-1:0][A-1:0]   raddr,
  output logic [NR-1:0][DW-1:0]  rdata,
  input  logic [NW-1:0]          we,
  input  logic [NW-1:0][A-1:0]   waddr,
  input  logic [NW-1:0][DW-1:0]  wdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int r = 0; r < NR; r++)
      if (re[r]) rdata[r] <= mem[raddr[r]];
    for (int w = 0; w < NW; w++)
      if (we[w]) mem[waddr[w]] <= wdata[w];
  end
endmodule
