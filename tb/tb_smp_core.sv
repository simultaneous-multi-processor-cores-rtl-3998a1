// tb_smp_core: end-to-end test of the SMP core with four simultaneous processes.
//
//   P0  dot-product input process: one state; takes A[i] and B[i] from input
//       queues 0 and 1, multiplies them and feeds the product back into
//       feedback queue 0,0 through Fin 0.
//   P1  dot-product accumulation process: state 0 adds three products from
//       queue 0,0 in C-adder 0 and feeds the sum into queue 1,0; state l adds
//       three level-l sums from queue 1,l-1; the top state sends the total to
//       the output portal.  Higher levels have higher priority.
//   P2  maximum process: state 0 compares three entries of input queue 2 in
//       C-adder 1, upper states compare three level results from feedback port
//       2; the top state writes the maximum to data memory through Wr 0.
//   P3  FFT-style input process: state 0 passes each word of input queue 3
//       through pass forward 0 to Wr 1 at a bit-flipped address; state 1,
//       triggered by tokens in input queue 4, reads the buffer in linear order
//       through Rd 0 into its read queue Q0, the read pointer rolling over;
//       state 2, triggered by a word in that read queue, copies it through
//       pass forward 1 and Wr 2.
//
// The vectors have N = 729 = 3^6 elements, the length the dot-product and
// maximum examples use, so each accumulation runs through six levels.  Dot-product inputs are small integers,
// so the sum is exact; the maximum is exact by nature.  The maximum vector
// arrives three words in five cycles, so its levels compete for the process.  Checked: results, one
// product per cycle (the multiplier never waits), and that each mechanism
// happened: simultaneous issue, waiting on a trigger, pre-emption by a
// higher-priority state, three-entry feedback accumulation, bit-flipped and
// rolled-over addressing, read-queue triggering, resources powered off while
// others run.
module tb_smp_core;
  import smp_pkg::*;
  import tb_fp_pkg::*;

  localparam int L = 6;                 // accumulation levels
  localparam int N = 3 ** L;            // 729-element vectors

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic cfg_we = 1'b0;
  logic [1:0] cfg_target = '0;
  logic [PW-1:0] cfg_proc = '0;
  logic [$clog2(NRES)-1:0] cfg_res = '0;
  logic [SW-1:0] cfg_state = '0;
  state_entry_t cfg_entry = '0;
  logic [IW-1:0] cfg_instr = '0;
  logic [PW-1:0] cfg_owner = '0;
  logic [AW-1:0] cfg_ag_base = '0;
  logic [AW:0] cfg_ag_len = '0;
  logic [3:0] cfg_ag_lg = '0;
  logic [NIN-1:0] in_valid = '0;
  logic [NIN-1:0][DW-1:0] in_data = '0;
  logic [NIN-1:0] in_ready;
  logic out_valid;
  logic [DW-1:0] out_data;
  logic [NPROC-1:0] issue_valid;
  logic [NPROC-1:0][SW-1:0] issue_idx;
  logic [NRES-1:0] use_vec, res_power;
  logic [NQT-1:0] q_overflow;
  logic own_error;

  always #5 clk = ~clk;

  smp_core dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ programming
  function automatic int fbq(input int k, input int q);
    return NIN + NQ * k + q;
  endfunction

  task automatic w_state(input int p, input int s, input state_entry_t e);
    @(negedge clk);
    cfg_we = 1; cfg_target = 2'd0; cfg_proc = PW'(p); cfg_state = SW'(s); cfg_entry = e;
    @(negedge clk) cfg_we = 0;
  endtask
  task automatic w_instr(input int r, input int s, input logic [IW-1:0] w);
    @(negedge clk);
    cfg_we = 1; cfg_target = 2'd1; cfg_res = $clog2(NRES)'(r); cfg_state = SW'(s); cfg_instr = w;
    @(negedge clk) cfg_we = 0;
  endtask
  task automatic w_owner(input int r, input int p);
    @(negedge clk);
    cfg_we = 1; cfg_target = 2'd2; cfg_res = $clog2(NRES)'(r); cfg_owner = PW'(p);
    @(negedge clk) cfg_we = 0;
  endtask
  task automatic w_ag(input int port, input int base, input int len, input int lg);
    @(negedge clk);
    cfg_we = 1; cfg_target = 2'd3; cfg_res = $clog2(NRES)'(port);
    cfg_ag_base = AW'(base); cfg_ag_len = (AW+1)'(len); cfg_ag_lg = 4'(lg);
    @(negedge clk) cfg_we = 0;
  endtask

  function automatic state_entry_t st(input int q0, input int n0, input int q1, input int n1,
                                      input logic [NRES-1:0] u);
    state_entry_t e;
    e = '0;
    e.en = 1'b1;
    if (q0 >= 0) e.req[q0] = 2'(n0);
    if (q1 >= 0) e.req[q1] = 2'(n1);
    e.usage = u;
    return e;
  endfunction
  function automatic logic [NRES-1:0] rb(input int a, input int b = -1, input int c = -1,
                                        input int d = -1);
    logic [NRES-1:0] u;
    u = '0;
    u[a] = 1'b1;
    if (b >= 0) u[b] = 1'b1;
    if (c >= 0) u[c] = 1'b1;
    if (d >= 0) u[d] = 1'b1;
    return u;
  endfunction
  function automatic logic [IW-1:0] i_cadd(input int a, input int b, input int c, input cop_e op);
    cadd_instr_t i;
    i = '0; i.a = 6'(a); i.b = 6'(b); i.c = 6'(c); i.open = 3'b111; i.op = op;
    return IW'(i);
  endfunction
  function automatic logic [IW-1:0] i_fin(input int src, input int q);
    fin_instr_t i;
    i = '0; i.src = 6'(src); i.q = 4'(q);
    return IW'(i);
  endfunction
  function automatic logic [IW-1:0] i_sel(input int src);
    sel_instr_t i;
    i = '0; i.src = 6'(src);
    return IW'(i);
  endfunction
  function automatic logic [IW-1:0] i_ag(input amode_e m, input int step, input int wsrc,
                                         input bit rqen = 0, input bit rqsel = 0);
    ag_instr_t i;
    i = '0; i.mode = m; i.step = 8'(step); i.wsrc = 6'(wsrc); i.rqen = rqen; i.rqsel = rqsel;
    return IW'(i);
  endfunction

  task automatic program_core();
    mul_instr_t mi;
    // ownership
    w_owner(R_MUL, 0); w_owner(R_FIN0, 0);
    w_owner(R_FOUT0, 1); w_owner(R_FOUT0 + 1, 1); w_owner(R_CADD0, 1);
    w_owner(R_FIN0 + 1, 1); w_owner(R_OUT, 1);
    w_owner(R_CADD0 + 1, 2); w_owner(R_FOUT0 + 2, 2); w_owner(R_FIN0 + 2, 2); w_owner(R_WR0, 2);
    w_owner(R_PF0, 3); w_owner(R_PF0 + 1, 3); w_owner(R_WR0 + 1, 3); w_owner(R_WR0 + 2, 3);
    w_owner(R_RD0, 3);
    // P0: dot-product input process
    w_state(0, 0, st(0, 1, 1, 1, rb(R_MUL, R_FIN0)));
    mi = '0; mi.a = 6'(S2_IN0 + 0); mi.b = 6'(S2_IN0 + 3);
    w_instr(R_MUL, 0, IW'(mi));
    w_instr(R_FIN0, 0, i_fin(S3_MUL, 0));
    // P1: dot-product accumulation process
    w_state(1, 0, st(fbq(0, 0), 3, -1, 0, rb(R_FOUT0, R_CADD0, R_FIN0 + 1)));
    w_instr(R_FOUT0, 0, i_sel(0));
    w_instr(R_CADD0, 0, i_cadd(S2_FOUT0, S2_FOUT0 + 1, S2_FOUT0 + 2, CA_ADD));
    w_instr(R_FIN0 + 1, 0, i_fin(S3_C0, 0));
    for (int l = 1; l < L; l++) begin
      w_state(1, l, st(fbq(1, l - 1), 3, -1, 0,
                       rb(R_FOUT0 + 1, R_CADD0, (l < L - 1) ? R_FIN0 + 1 : R_OUT)));
      w_instr(R_FOUT0 + 1, l, i_sel(l - 1));
      w_instr(R_CADD0, l, i_cadd(S2_FOUT0 + 3, S2_FOUT0 + 4, S2_FOUT0 + 5, CA_ADD));
      if (l < L - 1) w_instr(R_FIN0 + 1, l, i_fin(S3_C0, l));
      else           w_instr(R_OUT, l, i_sel(S3_C0));
    end
    // P2: maximum of a vector
    w_state(2, 0, st(2, 3, -1, 0, rb(R_CADD0 + 1, R_FIN0 + 2)));
    w_instr(R_CADD0 + 1, 0, i_cadd(S2_IN0 + 6, S2_IN0 + 7, S2_IN0 + 8, CA_MAX));
    w_instr(R_FIN0 + 2, 0, i_fin(S3_C1, 0));
    for (int l = 1; l < L; l++) begin
      w_state(2, l, st(fbq(2, l - 1), 3, -1, 0,
                       rb(R_FOUT0 + 2, R_CADD0 + 1, (l < L - 1) ? R_FIN0 + 2 : R_WR0)));
      w_instr(R_FOUT0 + 2, l, i_sel(l - 1));
      w_instr(R_CADD0 + 1, l, i_cadd(S2_FOUT0 + 6, S2_FOUT0 + 7, S2_FOUT0 + 8, CA_MAX));
      if (l < L - 1) w_instr(R_FIN0 + 2, l, i_fin(S3_C1, l));
      else           w_instr(R_WR0, l, i_ag(AM_HOLD, 0, S3_C1));
    end
    w_ag(NRD + 0, 2000, 1, 0);
    // P3: bit-flipped store, then linear copy
    w_state(3, 0, st(3, 1, -1, 0, rb(R_PF0, R_WR0 + 1)));
    w_instr(R_PF0, 0, i_sel(S2_IN0 + 9));
    w_instr(R_WR0 + 1, 0, i_ag(AM_REV, 1, S3_PF0));
    w_ag(NRD + 1, 512, 8, 3);
    w_state(3, 1, st(4, 1, -1, 0, rb(R_RD0)));
    w_instr(R_RD0, 1, i_ag(AM_LIN, 1, 0, 1, 0));
    w_state(3, 2, st(Q_RD0, 1, -1, 0, rb(R_PF0 + 1, R_WR0 + 2)));
    w_instr(R_PF0 + 1, 2, i_sel(S2_RDQ0));
    w_instr(R_WR0 + 2, 2, i_ag(AM_LIN, 1, S3_PF0 + 1));
    w_ag(0, 512, 8, 0);
    w_ag(NRD + 2, 1024, 8, 0);
  endtask

  // ------------------------------------------------------------------ data
  logic [31:0] va[N], vb[N], vm[N], vf[8];
  real dot_ref, max_ref;
  int  ia = 0, ib = 0, im = 0, i_fft = 0, itok = 0;
  bit  feed_copy = 0;
  // The maximum vector arrives three words in every five cycles, so a level-0
  // comparison issues every five cycles, exactly the time a comparison result
  // takes to come back: every third level-0 wave front meets a triggered level 1.
  logic [0:0] gap = 1'b1;
  int gcyc = 0;
  always @(negedge clk) begin
    gcyc++;
    gap <= 1'(gcyc % 5 < 3);
  end

  always_ff @(posedge clk) begin
    if (run) begin
      if (in_valid[0] && in_ready[0]) ia <= ia + 1;
      if (in_valid[1] && in_ready[1]) ib <= ib + 1;
      if (in_valid[2] && in_ready[2]) im <= im + 1;
      if (in_valid[3] && in_ready[3]) i_fft <= i_fft + 1;
      if (in_valid[4] && in_ready[4]) itok <= itok + 1;
    end
  end
  always_comb begin
    in_valid = '0;
    in_data  = '0;
    if (run) begin
      in_valid[0] = ia < N;  in_data[0] = va[ia % N];
      in_valid[1] = ib < N;  in_data[1] = vb[ib % N];
      in_valid[2] = im < N && gap[0];  in_data[2] = vm[im % N];
      in_valid[3] = i_fft < 8; in_data[3] = vf[i_fft % 8];
      in_valid[4] = feed_copy && itok < 8;
      in_data[4]  = 32'h0;
    end
  end

  // ------------------------------------------------------------ monitoring
  int n_multi = 0, n_wait = 0, n_preempt = 0, n_gated = 0, n_mul = 0;
  int first_mul = -1, last_mul = -1, n_lvl[2][L], n_rev = 0, n_roll = 0, cyc = 0;
  int n_out = 0, n_rdq = 0, n_rdq_pop = 0;
  logic [31:0] dot_out;

  always @(posedge clk) if (rst_n && run) begin
    cyc++;
    if ($countones(issue_valid) >= 2) n_multi++;
    if (issue_valid[0]) begin
      n_mul++;
      if (first_mul < 0) first_mul = cyc;
      last_mul = cyc;
    end
    for (int p = 1; p <= 2; p++)
      if (issue_valid[p]) n_lvl[p-1][issue_idx[p]]++;
    // P1 waits while fewer than three products are queued
    if (!issue_valid[1] && n_mul > 0 && n_out == 0) n_wait++;
    // a higher level pre-empts a triggered level 0
    if (dut.rsv_p[1][fbq(1, 0)] != 0 && dut.avail[fbq(0, 0)] >= 3) n_preempt++;
    if (dut.rsv_p[2][fbq(2, 0)] != 0 && dut.avail[2] >= 3) n_preempt++;
    if (use_vec != '0 && !(&res_power)) n_gated++;
    if (dut.use_st[1][R_WR0 + 1]) n_rev++;
    if (dut.u_map.rolled[0]) n_roll++;
    if (dut.g_rdq[0].g_q[0].u_q.push) n_rdq++;
    if (issue_valid[3] && issue_idx[3] == 2) n_rdq_pop++;
    if (out_valid) begin
      n_out++;
      dot_out = out_data;
    end
  end

  function automatic int rev3(input int i);
    return ((i & 1) << 2) | (i & 2) | ((i >> 2) & 1);
  endfunction

  initial begin
    dot_ref = 0.0;
    for (int i = 0; i < N; i++) begin
      int a, b;
      a = (i % 7) - 3;
      b = ((i * 5) % 11) - 5;
      va[i] = r2f(real'(a));
      vb[i] = r2f(real'(b));
      dot_ref += real'(a * b);
      vm[i] = rnd_f(120, 135);
      if (i == 0 || f2r(vm[i]) > max_ref) max_ref = f2r(vm[i]);
    end
    for (int i = 0; i < 8; i++) vf[i] = 32'h4100_0000 + 32'(i);
    repeat (3) @(posedge clk);
    rst_n = 1;
    program_core();
    @(negedge clk) run = 1;
    wait (n_out > 0 && n_lvl[1][L-1] > 0);
    repeat (10) @(posedge clk);
    feed_copy = 1;
    wait (itok == 8 && n_rdq_pop == 8);
    repeat (10) @(posedge clk);
    // ------------------------------------------------------------ checks
    chk(n_out == 1, "one dot-product result");
    chk(dot_out == r2f(dot_ref), $sformatf("dot product %h want %h", dot_out, r2f(dot_ref)));
    chk(dut.u_mem.mem[2000] == r2f(max_ref), "maximum of the vector");
    for (int i = 0; i < 8; i++) begin
      chk(dut.u_mem.mem[512 + rev3(i)] == vf[i], $sformatf("bit-flipped store %0d", i));
      chk(dut.u_mem.mem[1024 + i] == dut.u_mem.mem[512 + i], $sformatf("copy %0d", i));
    end
    chk(n_mul == N, "one multiplication per element");
    chk(last_mul - first_mul == N - 1, $sformatf("multiplier stalled: %0d cycles for %0d products",
                                                 last_mul - first_mul + 1, N));
    for (int l = 0; l < L; l++) begin
      chk(n_lvl[0][l] == N / (3 ** (l + 1)), $sformatf("dot level %0d wave fronts %0d", l, n_lvl[0][l]));
      chk(n_lvl[1][l] == N / (3 ** (l + 1)), $sformatf("max level %0d wave fronts %0d", l, n_lvl[1][l]));
    end
    chk(q_overflow == '0, "no queue overflow");
    chk(!own_error, "no ownership violation");
    chk(n_multi > 0, "simultaneous issue");
    chk(n_wait > 0, "trigger wait");
    chk(n_preempt > 0, "pre-emption by a higher state");
    chk(n_gated > 0, "power gated resources");
    chk(n_rev == 8, "bit-flipped writes");
    chk(n_roll == 1, "read pointer roll-over");
    chk(n_rdq == 8 && n_rdq_pop == 8, $sformatf("read queue pushes %0d, triggered copies %0d",
                                                n_rdq, n_rdq_pop));
    $display("simultaneous=%0d wait=%0d preempt=%0d gated=%0d rev=%0d roll=%0d rdq=%0d mul=%0d (%0d cycles)",
             n_multi, n_wait, n_preempt, n_gated, n_rev, n_roll, n_rdq, n_mul,
             last_mul - first_mul + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
