// usage_vector_calc: overall usage vector calculator and process direction (pipe 1).
//
// Every instructed resource is owned by exactly one process for the duration of a
// task.  For each resource r this block takes the owning process's issue (valid,
// process index, usage vector) and produces use_vec[r] (the resource works on this
// wave front and its power is on) and res_idx[r] (the index its local instruction
// processor decodes).  A usage bit raised by a process that does not own the
// resource is a program error: it is ignored and reported in viol.
// Combinational.  From the document: per-process usage vectors combined into one
// use vector (Fig. 6), one owning process per resource.  Own choice: ownership as
// a per-resource owner number held outside this block.
module usage_vector_calc
  import smp_pkg::*;
#(
  parameter int unsigned NP  = NPROC,
  parameter int unsigned NR  = NRES,
  parameter int unsigned IXW = $clog2(NSTATES),
  localparam int unsigned OW = $clog2(NP)
) (
  input  logic [NP-1:0]            valid,
  input  logic [NP-1:0][IXW-1:0]   idx,
  input  logic [NP-1:0][NR-1:0]    usage,
  input  logic [NR-1:0][OW-1:0]    owner,
  output logic [NR-1:0]            use_vec,
  output logic [NR-1:0][IXW-1:0]   res_idx,
  output logic [NR-1:0]            viol
);
  always_comb begin
    for (int r = 0; r < NR; r++) begin
      use_vec[r] = valid[owner[r]] && usage[owner[r]][r];
      res_idx[r] = idx[owner[r]];
      viol[r]    = 1'b0;
      for (int p = 0; p < NP; p++)
        if (OW'(p) != owner[r] && valid[p] && usage[p][r]) viol[r] = 1'b1;
    end
  end
endmodule
