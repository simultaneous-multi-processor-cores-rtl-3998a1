// feedback_port: feedback port k of the SMP core, i.e. Fout k with its queues
// k,0..NQ-1 (read in pipe 2) and the matching feedback input Fin k (pipe 4).
//
// Feedback never passes through the arithmetic: a result chosen by Fin k is
// pushed into one queue of the port, and the queue's fill level then triggers
// whichever process state consumes it.  This is how products reach the
// accumulating process and how first-level sums reach the second level.  Fin
// pushes one result per cycle into queue fin_q.  Fout presents the three oldest
// entries of queue fout_q to the pipe-2 operand bus; every queue pops the count
// given in pop_n (the reservations made for this wave front two cycles earlier).
// From the document: Fout k holding queues k,0..Nq and Fin k, status-triggered
// consumption and several queues in one port for hierarchical accumulation.
// Own choices: NQ = 8 queues of 8 entries, one push per cycle per port.
module feedback_port #(
  parameter int unsigned DW    = 32,
  parameter int unsigned NQ    = 8,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned CW   = $clog2(DEPTH + 1),
  localparam int unsigned QW   = $clog2(NQ)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // Fin k (pipe 4)
  input  logic                    fin_push,
  input  logic [QW-1:0]           fin_q,
  input  logic [DW-1:0]           fin_data,
  // reservations (pipe 0) and pops (pipe 2) per queue
  input  logic [NQ-1:0][1:0]      rsv_n,
  input  logic [NQ-1:0][1:0]      pop_n,
  // Fout k (pipe 2)
  input  logic [QW-1:0]           fout_q,
  output logic [2:0][DW-1:0]      fout_head,
  // status
  output logic [NQ-1:0][CW-1:0]   avail,
  output logic [NQ-1:0]           overflow
);
  logic [NQ-1:0][2:0][DW-1:0] heads;
  logic [NQ-1:0][CW-1:0]      cnt;
  logic [NQ-1:0]              full;

  for (genvar q = 0; q < NQ; q++) begin : g_q
    smp_queue #(.DW(DW), .DEPTH(DEPTH)) u_q (
      .clk, .rst_n,
      .push      (fin_push && fin_q == QW'(q)),
      .push_data (fin_data),
      .rsv_n     (rsv_n[q]),
      .pop_n     (pop_n[q]),
      .head      (heads[q]),
      .count     (cnt[q]),
      .avail     (avail[q]),
      .full      (full[q]),
      .overflow  (overflow[q])
    );
  end

  assign fout_head = heads[fout_q];
endmodule
