// smp_core: simultaneous multi-processor (SMP) core.
//
// Up to NPROC processes run at once, each owning a disjoint set of instructed
// resources.  There is no program counter and no wide instruction word: each
// cycle every process state calculator may issue one process index, and every
// resource turns the index of its owning process into its own local instruction.
// All issued indexes start one execution wave front, which moves through five
// instruction pipes, one cycle each:
//   pipe 0  process state calculators 0..3: pick a state, reserve queue entries
//   pipe 1  overall usage vector; memory access processor forms Rd/Wr addresses
//   pipe 2  Rd 0..3 read the data memory (the word may also be queued in the
//           port's read queue Q0 or Q1); input queues, read queues and Fout k
//           present their oldest entries and pop what was reserved; all of it
//           is registered
//   pipe 3  multiplier, C-adder 0, C-adder 1 and pass forward 0..7 take operands
//           from the pipe-2 bus; results are registered
//   pipe 4  Wr 0..3 write the data memory, Fin k push results into feedback
//           queues, the output portal emits one result
// Each pipe only takes inputs from the outputs of the pipe before it.  Feedback
// goes through queues outside the arithmetic; a queue's fill level triggers the
// consuming state, so a multiplier-fed process and an accumulating process run
// side by side without stalling each other.  A resource whose use bit is low on
// a wave front keeps its registers and has its power gate off.
//
// Interface: the program is written while run is low through cfg_* (cfg_target
// selects the state table of process cfg_proc, the local instruction memory of
// resource cfg_res, the owner of resource cfg_res, or address generator
// cfg_res).  Data enter through NIN ready/valid input streams and leave through
// the output portal (out_valid/out_data, four cycles after issue).
//
// From the document: the five pipes and their resources, four processes,
// process indexes and usage vectors, local instructions, queue-status
// triggering, feedback ports, three-operand C-adders, the power gate per
// resource, the read queues Q0/Q1 of each read port.  Own choices: one cycle
// per pipe, read queues showing one entry each, queue reservation at issue, the
// operand buses, instruction layouts, configuration port and all sizes marked
// as such in smp_pkg.  Not built: Rcp/Rsq, range clamp and the loop outputs,
// which the document only names.
module smp_core
  import smp_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         run,
  // configuration
  input  logic                         cfg_we,
  input  logic [1:0]                   cfg_target,   // 0 state, 1 instr, 2 owner, 3 addr gen
  input  logic [PW-1:0]                cfg_proc,
  input  logic [$clog2(NRES)-1:0]      cfg_res,
  input  logic [SW-1:0]                cfg_state,
  input  state_entry_t                 cfg_entry,
  input  logic [IW-1:0]                cfg_instr,
  input  logic [PW-1:0]                cfg_owner,
  input  logic [AW-1:0]                cfg_ag_base,
  input  logic [AW:0]                  cfg_ag_len,
  input  logic [3:0]                   cfg_ag_lg,
  // input streams
  input  logic [NIN-1:0]               in_valid,
  input  logic [NIN-1:0][DW-1:0]       in_data,
  output logic [NIN-1:0]               in_ready,
  // output portal
  output logic                         out_valid,
  output logic [DW-1:0]                out_data,
  // monitoring
  output logic [NPROC-1:0]             issue_valid,  // pipe 1 process direction
  output logic [NPROC-1:0][SW-1:0]     issue_idx,
  output logic [NRES-1:0]              use_vec,      // pipe 1 use vector
  output logic [NRES-1:0]              res_power,    // gated power per resource
  output logic [NQT-1:0]               q_overflow,
  output logic                         own_error     // sticky ownership violation
);
  localparam int unsigned RW = $clog2(NRES);
  localparam int unsigned QW = $clog2(NQ);

  function automatic logic [DW-1:0] sel2(input logic [NS2-1:0][DW-1:0] bus, input logic [5:0] s);
    return (int'(s) < NS2) ? bus[s] : '0;
  endfunction
  function automatic logic [DW-1:0] sel3(input logic [NS3-1:0][DW-1:0] bus, input logic [5:0] s);
    return (int'(s) < NS3) ? bus[s] : '0;
  endfunction

  // ------------------------------------------------------------- ownership
  logic [NRES-1:0][PW-1:0] owner;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) owner <= '0;
    else if (cfg_we && cfg_target == 2'd2) owner[cfg_res] <= cfg_owner;
  end

  // ---------------------------------------------------------------- pipe 0
  logic [NQT-1:0][QCW-1:0]        avail;
  logic [NPROC-1:0][NQT-1:0][1:0] rsv_p;
  logic [NQT-1:0][1:0]            rsv, rsv_d1, pop;
  logic [NPROC-1:0][NRES-1:0]     usage1;

  for (genvar p = 0; p < NPROC; p++) begin : g_psc
    process_state_calc u_psc (
      .clk, .rst_n, .run,
      .avail     (avail),
      .cfg_we    (cfg_we && cfg_target == 2'd0 && cfg_proc == PW'(p)),
      .cfg_state (cfg_state),
      .cfg_en    (cfg_entry.en),
      .cfg_req   (cfg_entry.req),
      .cfg_usage (cfg_entry.usage),
      .rsv_n     (rsv_p[p]),
      .valid     (issue_valid[p]),
      .idx       (issue_idx[p]),
      .usage     (usage1[p])
    );
  end

  always_comb begin
    rsv = '0;
    for (int p = 0; p < NPROC; p++)
      for (int q = 0; q < NQT; q++) rsv[q] = rsv[q] | rsv_p[p][q];
  end

  // pops happen in pipe 2, two cycles after the reservation
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsv_d1 <= '0;
      pop    <= '0;
    end else begin
      rsv_d1 <= rsv;
      pop    <= rsv_d1;
    end
  end

  // ---------------------------------------------------------------- pipe 1
  logic [NRES-1:0]          viol;
  logic [4:1][NRES-1:0]     use_st;
  logic [4:1][NRES-1:0][SW-1:0] idx_st;

  usage_vector_calc u_uvc (
    .valid   (issue_valid),
    .idx     (issue_idx),
    .usage   (usage1),
    .owner   (owner),
    .use_vec (use_st[1]),
    .res_idx (idx_st[1]),
    .viol    (viol)
  );
  assign use_vec = use_st[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      use_st[4:2] <= '0;
      idx_st[4:2] <= '0;
      own_error   <= 1'b0;
    end else begin
      use_st[2] <= use_st[1];  idx_st[2] <= idx_st[1];
      use_st[3] <= use_st[2];  idx_st[3] <= idx_st[2];
      use_st[4] <= use_st[3];  idx_st[4] <= idx_st[3];
      if (|viol) own_error <= 1'b1;
    end
  end

  // stage at which each resource acts, and its local instruction there
  function automatic int unsigned res_stage(input int unsigned r);
    if (r < R_FOUT0) return 1;
    if (r < R_MUL)   return 2;
    if (r < R_FIN0)  return 3;
    return 4;
  endfunction

  logic [NRES-1:0][IW-1:0] linstr;
  logic [NRES-1:0]         ruse;
  for (genvar r = 0; r < NRES; r++) begin : g_lip
    localparam int unsigned ST = res_stage(r);
    assign ruse[r] = use_st[ST][r];
    local_instr_proc #(.W(IW), .NS(NSTATES)) u_lip (
      .clk,
      .cfg_we   (cfg_we && cfg_target == 2'd1 && cfg_res == RW'(r)),
      .cfg_addr (cfg_state),
      .cfg_data (cfg_instr),
      .use_bit  (use_st[ST][r]),
      .idx      (idx_st[ST][r]),
      .instr    (linstr[r])
    );
    power_gate u_pg (
      .power       (1'b1),
      .use_bit     (use_st[ST][r]),
      .gated_power (res_power[r])
    );
  end

  // memory access processor: Rd 0..3 then Wr 0..3
  ag_instr_t [NRD+NWR-1:0]         ag_instr;
  logic [NRD+NWR-1:0][AW-1:0]      ag_addr;
  logic [NRD+NWR-1:0]              ag_vld, ag_rolled;
  always_comb
    for (int p = 0; p < NRD + NWR; p++) ag_instr[p] = ag_instr_t'(linstr[R_RD0 + p]);

  mem_access_proc u_map (
    .clk, .rst_n,
    .cfg_we   (cfg_we && cfg_target == 2'd3),
    .cfg_port ($clog2(NRD+NWR)'(cfg_res)),
    .cfg_base (cfg_ag_base),
    .cfg_len  (cfg_ag_len),
    .cfg_lg   (cfg_ag_lg),
    .use_bit  (ruse[R_WR0+NWR-1:R_RD0]),
    .instr    (ag_instr),
    .addr     (ag_addr),
    .addr_vld (ag_vld),
    .rolled   (ag_rolled)
  );

  // Wr k data source travels with the wave front from pipe 1 to pipe 4
  ag_instr_t [NWR-1:0] wr_i2, wr_i3, wr_i4;
  logic [NWR-1:0][AW-1:0] wa3, wa4;
  always_ff @(posedge clk) begin
    for (int k = 0; k < NWR; k++) begin
      wr_i2[k] <= ag_instr[NRD + k];
      wa3[k]   <= ag_addr[NRD + k];
    end
    wr_i3 <= wr_i2;
    wr_i4 <= wr_i3;
    wa4   <= wa3;
  end

  // ---------------------------------------------------------------- pipe 2
  logic [NRD-1:0][DW-1:0]   rdata;
  logic [NWR-1:0]           wr_en;
  logic [NWR-1:0][DW-1:0]   wr_data;
  logic [NS3-1:0][DW-1:0]   r4;                 // pipe-3 results, read in pipe 4

  data_memory u_mem (
    .clk,
    .re    (ag_vld[NRD-1:0]),
    .raddr (ag_addr[NRD-1:0]),
    .rdata (rdata),
    .we    (wr_en),
    .waddr (wa4),
    .wdata (wr_data)
  );

  // Rd k read queues Q0/Q1: a read with rqen set pushes its word (registered
  // at the end of pipe 2) into the chosen queue one cycle later, where its
  // status can trigger a later state that takes it in that state's pipe 2.
  logic [NRD-1:0] rq_en2, rq_sel2, rq_en3, rq_sel3;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rq_en2 <= '0; rq_sel2 <= '0; rq_en3 <= '0; rq_sel3 <= '0;
    end else begin
      for (int k = 0; k < NRD; k++) begin
        rq_en2[k]  <= ruse[R_RD0 + k] && ag_instr[k].rqen;
        rq_sel2[k] <= ag_instr[k].rqsel;
      end
      rq_en3  <= rq_en2;
      rq_sel3 <= rq_sel2;
    end
  end

  logic [NRD-1:0][NRQ-1:0][DW-1:0] rdq_head;
  for (genvar k = 0; k < NRD; k++) begin : g_rdq
    for (genvar j = 0; j < NRQ; j++) begin : g_q
      localparam int unsigned QI = Q_RD0 + NRQ * k + j;
      logic [2:0][DW-1:0] h;
      logic [QCW-1:0] cnt;
      logic full;
      smp_queue #(.DW(DW), .DEPTH(QDEPTH)) u_q (
        .clk, .rst_n,
        .push      (rq_en3[k] && rq_sel3[k] == 1'(j)),
        .push_data (rdata[k]),
        .rsv_n     (rsv[QI]),
        .pop_n     (pop[QI]),
        .head      (h),
        .count     (cnt),
        .avail     (avail[QI]),
        .full      (full),
        .overflow  (q_overflow[QI])
      );
      assign rdq_head[k][j] = h[0];
    end
  end

  logic [NIN-1:0][2:0][DW-1:0] in_head;
  logic [NIN-1:0]              in_full;
  for (genvar k = 0; k < NIN; k++) begin : g_inq
    logic [QCW-1:0] cnt;
    smp_queue #(.DW(DW), .DEPTH(QDEPTH)) u_q (
      .clk, .rst_n,
      .push      (in_valid[k] && in_ready[k]),
      .push_data (in_data[k]),
      .rsv_n     (rsv[k]),
      .pop_n     (pop[k]),
      .head      (in_head[k]),
      .count     (cnt),
      .avail     (avail[k]),
      .full      (in_full[k]),
      .overflow  (q_overflow[k])
    );
    assign in_ready[k] = !in_full[k];
  end

  logic [NFB-1:0][2:0][DW-1:0] fout_head;
  for (genvar k = 0; k < NFB; k++) begin : g_fb
    fin_instr_t fi;
    sel_instr_t fo;
    assign fi = fin_instr_t'(linstr[R_FIN0 + k]);
    assign fo = sel_instr_t'(linstr[R_FOUT0 + k]);
    feedback_port #(.DW(DW), .NQ(NQ), .DEPTH(QDEPTH)) u_fb (
      .clk, .rst_n,
      .fin_push  (ruse[R_FIN0 + k]),
      .fin_q     (QW'(fi.q)),
      .fin_data  (sel3(r4, fi.src)),
      .rsv_n     (rsv[Q_FB0 + k*NQ +: NQ]),
      .pop_n     (pop[Q_FB0 + k*NQ +: NQ]),
      .fout_q    (QW'(fo.src)),
      .fout_head (fout_head[k]),
      .avail     (avail[Q_FB0 + k*NQ +: NQ]),
      .overflow  (q_overflow[Q_FB0 + k*NQ +: NQ])
    );
  end

  // pipe-2 operand bus, registered at the end of pipe 2 (read data is
  // registered inside the data memory)
  logic [NS2-1:0][DW-1:0] op3;
  logic [NIN-1:0][2:0][DW-1:0] in_r;
  logic [NFB-1:0][2:0][DW-1:0] fout_r;
  logic [NRD-1:0][NRQ-1:0][DW-1:0] rdq_r;
  always_ff @(posedge clk) begin
    for (int k = 0; k < NRD; k++)
      for (int j = 0; j < NRQ; j++)
        if (pop[Q_RD0 + NRQ*k + j] != 2'd0) rdq_r[k][j] <= rdq_head[k][j];
    for (int k = 0; k < NIN; k++)
      if (pop[k] != 2'd0) in_r[k] <= in_head[k];
    for (int k = 0; k < NFB; k++)
      if (ruse[R_FOUT0 + k]) fout_r[k] <= fout_head[k];
  end
  always_comb begin
    for (int k = 0; k < NIN; k++)
      for (int j = 0; j < 3; j++) op3[S2_IN0 + 3*k + j] = in_r[k][j];
    for (int k = 0; k < NRD; k++) op3[S2_RD0 + k] = rdata[k];
    for (int k = 0; k < NFB; k++)
      for (int j = 0; j < 3; j++) op3[S2_FOUT0 + 3*k + j] = fout_r[k][j];
    for (int k = 0; k < NRD; k++)
      for (int j = 0; j < NRQ; j++) op3[S2_RDQ0 + NRQ*k + j] = rdq_r[k][j];
    op3[S2_ZERO] = '0;
    op3[S2_ONE]  = FP_ONE;
  end

  // ---------------------------------------------------------------- pipe 3
  mul_instr_t mi;
  logic [DW-1:0] mul_p;
  assign mi = mul_instr_t'(linstr[R_MUL]);
  fp32_mul u_mul (.a(sel2(op3, mi.a)), .b(sel2(op3, mi.b)), .neg(mi.neg), .p(mul_p));

  logic [1:0][DW-1:0] ca_res;
  logic [1:0][1:0]    ca_idx;
  for (genvar c = 0; c < 2; c++) begin : g_cadd
    cadd_instr_t ci;
    assign ci = cadd_instr_t'(linstr[R_CADD0 + c]);
    cadder u_cadd (
      .opd  ({sel2(op3, ci.c), sel2(op3, ci.b), sel2(op3, ci.a)}),
      .open (ci.open),
      .neg  (ci.neg),
      .op   (ci.op),
      .res  (ca_res[c]),
      .idx  (ca_idx[c])
    );
  end

  sel_instr_t [NPF-1:0] pf_i;
  always_comb
    for (int k = 0; k < NPF; k++) pf_i[k] = sel_instr_t'(linstr[R_PF0 + k]);

  always_ff @(posedge clk) begin
    if (ruse[R_MUL]) r4[S3_MUL] <= mul_p;
    if (ruse[R_CADD0]) begin
      r4[S3_C0]   <= ca_res[0];
      r4[S3_C0IX] <= DW'(ca_idx[0]);
    end
    if (ruse[R_CADD0 + 1]) begin
      r4[S3_C1]   <= ca_res[1];
      r4[S3_C1IX] <= DW'(ca_idx[1]);
    end
    for (int k = 0; k < NPF; k++)
      if (ruse[R_PF0 + k]) r4[S3_PF0 + k] <= sel2(op3, pf_i[k].src);
  end

  // ---------------------------------------------------------------- pipe 4
  sel_instr_t out_i;
  assign out_i = sel_instr_t'(linstr[R_OUT]);

  always_comb
    for (int k = 0; k < NWR; k++) begin
      wr_en[k]   = use_st[4][R_WR0 + k];
      wr_data[k] = sel3(r4, wr_i4[k].wsrc);
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= ruse[R_OUT];
      if (ruse[R_OUT]) out_data <= sel3(r4, out_i.src);
    end
  end

  // One queue is fed by one process: two processes may not reserve it together.
  for (genvar q = 0; q < NQT; q++) begin : g_chk
    logic [NPROC-1:0] rq;
    for (genvar p = 0; p < NPROC; p++) begin : g_p
      assign rq[p] = rsv_p[p][q] != 2'd0;
    end
    a_one_owner: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(rq));
  end
endmodule
