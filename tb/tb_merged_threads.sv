// tb_merged_threads: threads merged into single processes at program time.
//
// The same dot product (two 729-element streams) and maximum (a 729-element
// stream) as tb_smp_core, plus an eight-word bit-flipped store, but with the
// processes of different threads merged, so that fewer processes run:
//   P0  merged input process: the dot-product input state (multiplier, Fin 0)
//       and the store state (pass forward 0, Wr 1 with a bit-flipped address)
//       in one state list, the rarer store state on top.
//   P1  merged accumulation process: the six dot-product levels and the six
//       maximum levels in one list, interleaved from the top of each thread's
//       list downwards with the dot product first in each pair, both threads
//       using the same C-adder 0; it owns the union of the two threads'
//       resources (Fout 0-2, Fin 1-2, output portal, Wr 0).
// Nothing in the hardware changes: only the state tables and ownership do.
// Checked: both results, the store, the wave-front count of every level, that
// C-adder 0 served both threads, and that while the dot-product and store
// streams both offer a word every cycle the merged input process cannot keep
// up (an input queue fills and holds its stream back).  The maximum vector is
// offered every other cycle: with both threads at full rate the merged
// accumulation process would need a state every cycle, fall behind, and its
// product queue would overflow.
module tb_merged_threads;
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
    $display("watchdog expired: out=%0d lvl=%p mul=%0d store=%0d ovf=%h", n_out, n_lvl, n_mul, n_store, q_overflow);
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
  function automatic logic [IW-1:0] i_ag(input amode_e m, input int step, input int wsrc);
    ag_instr_t i;
    i = '0; i.mode = m; i.step = 8'(step); i.wsrc = 6'(wsrc);
    return IW'(i);
  endfunction

  task automatic program_core();
    mul_instr_t mi;
    w_owner(R_MUL, 0); w_owner(R_FIN0, 0); w_owner(R_PF0, 0); w_owner(R_WR0 + 1, 0);
    w_owner(R_FOUT0, 1); w_owner(R_FOUT0 + 1, 1); w_owner(R_FOUT0 + 2, 1); w_owner(R_CADD0, 1);
    w_owner(R_FIN0 + 1, 1); w_owner(R_FIN0 + 2, 1); w_owner(R_OUT, 1); w_owner(R_WR0, 1);
    // P0: state 0 dot-product input, state 1 bit-flipped store (rarer, on top)
    w_state(0, 0, st(0, 1, 1, 1, rb(R_MUL, R_FIN0)));
    mi = '0; mi.a = 6'(S2_IN0 + 0); mi.b = 6'(S2_IN0 + 3);
    w_instr(R_MUL, 0, IW'(mi));
    w_instr(R_FIN0, 0, i_fin(S3_MUL, 0));
    w_state(0, 1, st(3, 1, -1, 0, rb(R_PF0, R_WR0 + 1)));
    w_instr(R_PF0, 1, i_sel(S2_IN0 + 9));
    w_instr(R_WR0 + 1, 1, i_ag(AM_REV, 1, S3_PF0));
    w_ag(NRD + 1, 512, 8, 3);
    // P1: dot level l at state 2l+1, maximum level l at state 2l, so that
    // going down from the top the list reads dot 5, max 5, dot 4, max 4, ...
    for (int l = 0; l < L; l++) begin
      int sd, sm;
      sd = 2 * l + 1;
      sm = 2 * l;
      // dot product
      if (l == 0) begin
        w_state(1, sd, st(fbq(0, 0), 3, -1, 0, rb(R_FOUT0, R_CADD0, R_FIN0 + 1)));
        w_instr(R_FOUT0, sd, i_sel(0));
        w_instr(R_CADD0, sd, i_cadd(S2_FOUT0, S2_FOUT0 + 1, S2_FOUT0 + 2, CA_ADD));
      end else begin
        w_state(1, sd, st(fbq(1, l - 1), 3, -1, 0,
                          rb(R_FOUT0 + 1, R_CADD0, (l < L - 1) ? R_FIN0 + 1 : R_OUT)));
        w_instr(R_FOUT0 + 1, sd, i_sel(l - 1));
        w_instr(R_CADD0, sd, i_cadd(S2_FOUT0 + 3, S2_FOUT0 + 4, S2_FOUT0 + 5, CA_ADD));
      end
      if (l < L - 1) w_instr(R_FIN0 + 1, sd, i_fin(S3_C0, l));
      else           w_instr(R_OUT, sd, i_sel(S3_C0));
      // maximum
      if (l == 0) begin
        w_state(1, sm, st(2, 3, -1, 0, rb(R_CADD0, R_FIN0 + 2)));
        w_instr(R_CADD0, sm, i_cadd(S2_IN0 + 6, S2_IN0 + 7, S2_IN0 + 8, CA_MAX));
      end else begin
        w_state(1, sm, st(fbq(2, l - 1), 3, -1, 0,
                          rb(R_FOUT0 + 2, R_CADD0, (l < L - 1) ? R_FIN0 + 2 : R_WR0)));
        w_instr(R_FOUT0 + 2, sm, i_sel(l - 1));
        w_instr(R_CADD0, sm, i_cadd(S2_FOUT0 + 6, S2_FOUT0 + 7, S2_FOUT0 + 8, CA_MAX));
      end
      if (l < L - 1) w_instr(R_FIN0 + 2, sm, i_fin(S3_C0, l));
      else           w_instr(R_WR0, sm, i_ag(AM_HOLD, 0, S3_C0));
    end
    w_ag(NRD + 0, 2000, 1, 0);
  endtask

  // ------------------------------------------------------------------ data
  logic [31:0] va[N], vb[N], vm[N], vf[8];
  real dot_ref, max_ref;
  int  ia = 0, ib = 0, im = 0, i_fft = 0, itok = 0;
  bit  feed_copy = 0;
  // The merged accumulation process issues at most one state per cycle.  A full
  // rate dot product needs about 1/2 of its cycles (1/3 + 1/9 + ...), so the
  // maximum vector is offered every other cycle (another 1/4): together 3/4.
  logic half = 1'b0;
  always @(negedge clk) half <= ~half;
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
      in_valid[2] = im < N && half;  in_data[2] = vm[im % N];
      in_valid[3] = i_fft < 8; in_data[3] = vf[i_fft % 8];
      in_valid[4] = feed_copy && itok < 8;
      in_data[4]  = 32'h0;
    end
  end

  // ------------------------------------------------------------ monitoring
  int n_dot_add = 0, n_max_cmp = 0, n_held = 0, n_store = 0, n_mul = 0, n_out = 0;
  int n_lvl[2][L], n_both0 = 0;
  logic [31:0] dot_out;

  always @(posedge clk) if (rst_n && run) begin
    if (issue_valid[0]) begin
      if (issue_idx[0] == 0) n_mul++;
      else n_store++;
    end
    if (issue_valid[1]) begin
      n_lvl[1 - issue_idx[1] % 2][issue_idx[1] / 2]++;
      if (issue_idx[1] % 2 == 1) n_dot_add++;
      else n_max_cmp++;
    end
    // both threads of P1 had a triggered state in the same cycle
    if (dut.avail[fbq(0, 0)] >= 3 && dut.avail[2] >= 3) n_both0++;
    if ((in_valid & ~in_ready) != '0) n_held++;
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
    wait (n_out > 0 && n_lvl[1][L-1] > 0 && i_fft == 8);
    repeat (10) @(posedge clk);
    chk(n_out == 1, "one dot-product result");
    chk(dot_out == r2f(dot_ref), $sformatf("dot product %h want %h", dot_out, r2f(dot_ref)));
    chk(dut.u_mem.mem[2000] == r2f(max_ref), "maximum of the vector");
    for (int i = 0; i < 8; i++)
      chk(dut.u_mem.mem[512 + rev3(i)] == vf[i], $sformatf("bit-flipped store %0d", i));
    chk(n_mul == N, "one multiplication per element");
    chk(n_store == 8, "eight stores");
    for (int l = 0; l < L; l++) begin
      chk(n_lvl[0][l] == N / (3 ** (l + 1)), $sformatf("dot level %0d wave fronts %0d", l, n_lvl[0][l]));
      chk(n_lvl[1][l] == N / (3 ** (l + 1)), $sformatf("max level %0d wave fronts %0d", l, n_lvl[1][l]));
    end
    chk(n_dot_add > 0 && n_max_cmp > 0, "C-adder 0 served both merged threads");
    chk(n_both0 > 0, "both merged threads triggered together");
    chk(n_held > 0, "merged input process could not keep up with every-cycle inputs");
    chk(q_overflow == '0, "no queue overflow");
    chk(!own_error, "no ownership violation");
    $display("dot adds=%0d max compares=%0d both ready=%0d held=%0d", n_dot_add, n_max_cmp, n_both0, n_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
