// smp_queue: input queue or feedback queue of the SMP core.
//
// A circular buffer whose fill level is the status that triggers process states.
// Because a process state is chosen in pipe 0 but reads its operands in pipe 2,
// the state calculator reserves the entries it will consume (rsv_n, 0..3) in the
// cycle it issues, and the wave front pops the same number (pop_n) two cycles
// later.  avail = count - outstanding reservations is what triggers compare
// against, so an entry is never promised to two wave fronts.  The three oldest
// entries are visible at head[0..2] so that one wave front can feed a three-operand
// C-adder.  One entry may be pushed per cycle (from an input stream or a feedback
// input Fin k); a push into a full queue is dropped and sets the sticky overflow
// flag.  The document gives the queues, their status triggering, and three-entry
// consumption; depth, the reservation scheme and overflow handling are this
// design's own.
module smp_queue #(
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned CW   = $clog2(DEPTH + 1),
  localparam int unsigned PTRW = $clog2(DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 push,
  input  logic [DW-1:0]        push_data,
  input  logic [1:0]           rsv_n,     // entries reserved this cycle (pipe 0)
  input  logic [1:0]           pop_n,     // entries consumed this cycle (pipe 2)
  output logic [2:0][DW-1:0]   head,      // oldest three entries
  output logic [CW-1:0]        count,     // entries held
  output logic [CW-1:0]        avail,     // entries held and not reserved
  output logic                 full,
  output logic                 overflow   // sticky: push while full
);
  logic [DW-1:0]   mem [DEPTH];
  logic [PTRW-1:0] rd_ptr, wr_ptr;
  logic [CW-1:0]   resv;                  // reserved, not yet popped

  function automatic logic [PTRW-1:0] wrap(input logic [PTRW-1:0] p, input int unsigned n);
    int unsigned s;
    s = (int'(p) + n) % DEPTH;
    return PTRW'(s);
  endfunction

  assign full  = (count == CW'(DEPTH));
  assign avail = count - resv;

  always_comb
    for (int j = 0; j < 3; j++) head[j] = mem[wrap(rd_ptr, j)];

  logic do_push;
  assign do_push = push && (!full || pop_n != 2'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr   <= '0;
      wr_ptr   <= '0;
      count    <= '0;
      resv     <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_push) begin
        wr_ptr <= wrap(wr_ptr, 1);
      end
      rd_ptr <= wrap(rd_ptr, int'(pop_n));
      count  <= count + CW'(do_push) - CW'(pop_n);
      resv   <= resv + CW'(rsv_n) - CW'(pop_n);
      if (push && !do_push) overflow <= 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (do_push) mem[wr_ptr] <= push_data;

  // The state calculator must never reserve more than is available, and a
  // wave front pops only what was reserved for it.
  a_rsv: assert property (@(posedge clk) disable iff (!rst_n) CW'(rsv_n) <= avail);
  a_pop: assert property (@(posedge clk) disable iff (!rst_n) CW'(pop_n) <= resv);
endmodule
