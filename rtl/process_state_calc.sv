// process_state_calc: process state calculator of one simultaneous process (pipe 0).
//
// A process is a list of process states.  Each state names how many entries
// (0..3) it needs in each queue of the core (its trigger) and which instructed
// resources it uses (its usage vector).  Every cycle, while run is high, the
// calculator picks among the enabled states whose trigger is met the one with
// the highest state number, the highest number having the highest priority (a
// program lists its rarest states at the top), reserves the queue entries that
// state will consume, and issues the state's number as the process index
// together with its usage vector.  When no state triggers, nothing is issued and
// the usage vector is zero, so all of the process's resources stay unpowered for
// that wave front.  Timing: the choice and the reservation are made
// combinationally in the issue cycle; valid, idx and usage are registered and
// belong to pipe 1 of the wave front.  The state table is written through
// cfg_we / cfg_state / cfg_entry and should be written while run is low.
// From the document: priority-ordered process states triggered by queue status,
// the process index, the usage vector.  Own choices: the trigger as per-queue
// minimum counts, the reservation, the table format.
module process_state_calc
  import smp_pkg::*;
#(
  parameter int unsigned NS  = NSTATES,
  parameter int unsigned NQS = NQT,
  parameter int unsigned NR  = NRES,
  parameter int unsigned CW  = QCW,
  localparam int unsigned IXW = $clog2(NS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    run,
  input  logic [NQS-1:0][CW-1:0]  avail,      // queue status
  // table programming
  input  logic                    cfg_we,
  input  logic [IXW-1:0]          cfg_state,
  input  logic                    cfg_en,
  input  logic [NQS-1:0][1:0]     cfg_req,
  input  logic [NR-1:0]           cfg_usage,
  // reservation, issue cycle
  output logic [NQS-1:0][1:0]     rsv_n,
  // process direction, pipe 1
  output logic                    valid,
  output logic [IXW-1:0]          idx,
  output logic [NR-1:0]           usage
);
  logic [NS-1:0]               st_en;
  logic [NS-1:0][NQS-1:0][1:0] st_req;
  logic [NR-1:0]               st_use [NS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st_en <= '0;
    else if (cfg_we) st_en[cfg_state] <= cfg_en;
  end

  always_ff @(posedge clk) begin
    if (cfg_we) begin
      st_req[cfg_state] <= cfg_req;
      st_use[cfg_state] <= cfg_usage;
    end
  end

  logic [NS-1:0]  trig;
  logic           hit;
  logic [IXW-1:0] pick;

  always_comb begin
    for (int s = 0; s < NS; s++) begin
      trig[s] = st_en[s];
      for (int q = 0; q < NQS; q++)
        if (avail[q] < CW'(st_req[s][q])) trig[s] = 1'b0;
    end
    hit  = 1'b0;
    pick = '0;
    for (int s = 0; s < NS; s++)
      if (trig[s]) begin
        hit  = 1'b1;
        pick = IXW'(s);
      end
    rsv_n = (run && hit) ? st_req[pick] : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      idx   <= '0;
      usage <= '0;
    end else begin
      valid <= run && hit;
      idx   <= pick;
      usage <= (run && hit) ? st_use[pick] : '0;
    end
  end
endmodule
