// local_instr_proc: local instruction processor of one instructed resource.
//
// Holds one local instruction per process state of the owning process (a small
// memory of NS words) and, while the resource's use bit is set, outputs the word
// selected by the owning process's index; otherwise it outputs zero.  This is what
// replaces one wide VLIW instruction memory: each resource stores only its own
// field for each state of its own process.  Read is combinational (in the pipe
// where the resource sits); writes through cfg_we / cfg_addr / cfg_data.
// From the document: local instructions generated from the owning process's index,
// one per process state (Fig. 3).  Own choices: the depth and the zero output when
// unused.
module local_instr_proc #(
  parameter int unsigned W  = 24,
  parameter int unsigned NS = 32,
  localparam int unsigned IXW = $clog2(NS)
) (
  input  logic            clk,
  input  logic            cfg_we,
  input  logic [IXW-1:0]  cfg_addr,
  input  logic [W-1:0]    cfg_data,
  input  logic            use_bit,
  input  logic [IXW-1:0]  idx,
  output logic [W-1:0]    instr
);
  logic [W-1:0] imem [NS];

  always_ff @(posedge clk)
    if (cfg_we) imem[cfg_addr] <= cfg_data;

  assign instr = use_bit ? imem[idx] : '0;
endmodule
