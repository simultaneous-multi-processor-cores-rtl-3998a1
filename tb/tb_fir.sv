// tb_fir: a 27-tap FIR filter on the SMP core, with the taps and a sliding
// window of samples held in the data memory.
//
//   out[i] = sum over t = 0..26 of a[t] * B[i+t]
//
// Four processes run side by side:
//   P3  tap loader: each word of input queue 2 goes through pass forward 1 to
//       Wr 1, which writes the 27 taps in a circular region.
//   P0  FIR input process, two states.  The sample state (top) takes a sample
//       from input queue 0 and writes it through pass forward 0 and Wr 0 into
//       a 27-word circular window; its Rd 1 also advances the window read
//       pointer by one.  The tap-read state, triggered by a request token in
//       input queue 1, reads one tap through Rd 0 and one window word through
//       Rd 1 into their read queues Q0.  Both read pointers roll over at 27.
//   P1  FIR product process: when both read queues hold a word, multiplies
//       them and feeds the product into feedback queue 0,0.
//   P2  FIR accumulation process: three levels of three-operand sums (27 = 3^3
//       products per output); the top level sends each output to the output
//       portal.
// The read pointers end one output's 27 reads where they started, and the
// extra window advance made with each sample moves the window by one sample,
// so no pointer arithmetic is needed per output.  The tokens stand in for a
// loop counter: the stimulus offers 27 of them for every sample from the 27th
// on.  Taps and samples are small integers, so every output is exact.
// Checked: every output, their count and order, 27 products per output, the
// multiplier issuing every cycle through each burst of 27, read-queue
// triggering, pointer roll-over, and no queue overflow.
module tb_fir;
  import smp_pkg::*;
  import tb_fp_pkg::*;

  localparam int NT = 27;               // taps
  localparam int NS = 60;               // samples
  localparam int NO = NS - NT + 1;      // outputs

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
    repeat (20000) @(posedge clk);
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
    w_owner(R_RD0, 0); w_owner(R_RD0 + 1, 0); w_owner(R_PF0, 0); w_owner(R_WR0, 0);
    w_owner(R_MUL, 1); w_owner(R_FIN0, 1);
    w_owner(R_FOUT0, 2); w_owner(R_FOUT0 + 1, 2); w_owner(R_CADD0, 2);
    w_owner(R_FIN0 + 1, 2); w_owner(R_OUT, 2);
    w_owner(R_PF0 + 1, 3); w_owner(R_WR0 + 1, 3);
    // P3: taps into words 0..26
    w_state(3, 0, st(2, 1, -1, 0, rb(R_PF0 + 1, R_WR0 + 1)));
    w_instr(R_PF0 + 1, 0, i_sel(S2_IN0 + 6));
    w_instr(R_WR0 + 1, 0, i_ag(AM_LIN, 1, S3_PF0 + 1));
    w_ag(NRD + 1, 0, NT, 0);
    // P0 state 1: sample into the window at 64..90, window read pointer + 1
    w_state(0, 1, st(0, 1, -1, 0, rb(R_PF0, R_WR0, R_RD0 + 1)));
    w_instr(R_PF0, 1, i_sel(S2_IN0 + 0));
    w_instr(R_WR0, 1, i_ag(AM_LIN, 1, S3_PF0));
    w_instr(R_RD0 + 1, 1, i_ag(AM_LIN, 1, 0));
    w_ag(NRD + 0, 64, NT, 0);
    // P0 state 0: tap and window word into the read queues
    w_state(0, 0, st(1, 1, -1, 0, rb(R_RD0, R_RD0 + 1)));
    w_instr(R_RD0, 0, i_ag(AM_LIN, 1, 0, 1, 0));
    w_instr(R_RD0 + 1, 0, i_ag(AM_LIN, 1, 0, 1, 0));
    w_ag(0, 0, NT, 0);
    w_ag(1, 64, NT, 0);
    // P1: product of the two read-queue heads
    w_state(1, 0, st(Q_RD0 + 0, 1, Q_RD0 + NRQ, 1, rb(R_MUL, R_FIN0)));
    mi = '0; mi.a = 6'(S2_RDQ0 + 0); mi.b = 6'(S2_RDQ0 + NRQ);
    w_instr(R_MUL, 0, IW'(mi));
    w_instr(R_FIN0, 0, i_fin(S3_MUL, 0));
    // P2: three accumulation levels
    w_state(2, 0, st(fbq(0, 0), 3, -1, 0, rb(R_FOUT0, R_CADD0, R_FIN0 + 1)));
    w_instr(R_FOUT0, 0, i_sel(0));
    w_instr(R_CADD0, 0, i_cadd(S2_FOUT0, S2_FOUT0 + 1, S2_FOUT0 + 2, CA_ADD));
    w_instr(R_FIN0 + 1, 0, i_fin(S3_C0, 0));
    for (int l = 1; l < 3; l++) begin
      w_state(2, l, st(fbq(1, l - 1), 3, -1, 0,
                       rb(R_FOUT0 + 1, R_CADD0, (l < 2) ? R_FIN0 + 1 : R_OUT)));
      w_instr(R_FOUT0 + 1, l, i_sel(l - 1));
      w_instr(R_CADD0, l, i_cadd(S2_FOUT0 + 3, S2_FOUT0 + 4, S2_FOUT0 + 5, CA_ADD));
      if (l < 2) w_instr(R_FIN0 + 1, l, i_fin(S3_C0, l));
      else       w_instr(R_OUT, l, i_sel(S3_C0));
    end
  endtask

  // ------------------------------------------------------------------ data
  int  tap[NT], smp[NS];
  logic [31:0] want[NO];
  int  n_tap_in = 0, n_smp_in = 0, n_tok_in = 0;
  bit  tap_go = 0, smp_go = 0, tok_go = 0;

  always_ff @(posedge clk) begin
    if (in_valid[2] && in_ready[2]) n_tap_in <= n_tap_in + 1;
    if (in_valid[0] && in_ready[0]) n_smp_in <= n_smp_in + 1;
    if (in_valid[1] && in_ready[1]) n_tok_in <= n_tok_in + 1;
  end
  always_comb begin
    in_valid = '0;
    in_data  = '0;
    in_valid[2] = tap_go && n_tap_in < NT;
    in_data[2]  = r2f(real'(tap[n_tap_in % NT]));
    in_valid[0] = smp_go;
    in_data[0]  = r2f(real'(smp[n_smp_in % NS]));
    in_valid[1] = tok_go;
  end

  // ------------------------------------------------------------ monitoring
  int n_mul = 0, n_rd = 0, n_wr = 0, n_roll = 0, n_out = 0, n_bad = 0;
  int run_len = 0, min_run = 1000, n_rdq = 0;
  logic [31:0] outs[NO];

  always @(posedge clk) if (rst_n && run) begin
    if (issue_valid[1]) begin
      n_mul++;
      run_len++;
    end else if (run_len > 0) begin
      if (run_len < min_run) min_run = run_len;
      run_len = 0;
    end
    if (issue_valid[0] && issue_idx[0] == 0) n_rd++;
    if (issue_valid[0] && issue_idx[0] == 1) n_wr++;
    if (dut.u_map.rolled[0]) n_roll++;
    if (dut.g_rdq[0].g_q[0].u_q.push) n_rdq++;
    if (out_valid) begin
      if (n_out < NO) outs[n_out] = out_data;
      n_out++;
    end
  end

  initial begin
    for (int t = 0; t < NT; t++) tap[t] = int'($urandom_range(8)) - 4;
    for (int j = 0; j < NS; j++) smp[j] = int'($urandom_range(16)) - 8;
    for (int i = 0; i < NO; i++) begin
      int acc;
      acc = 0;
      for (int t = 0; t < NT; t++) acc += tap[t] * smp[i + t];
      want[i] = r2f(real'(acc));
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    program_core();
    @(negedge clk) run = 1;
    tap_go = 1;
    wait (n_tap_in == NT);
    repeat (8) @(posedge clk);
    // one sample at a time; from the 27th on, 27 read requests follow it
    for (int j = 0; j < NS; j++) begin
      int w0;
      w0 = n_wr;
      @(negedge clk) smp_go = 1;
      @(negedge clk) smp_go = 0;
      wait (n_wr == w0 + 1);
      if (j >= NT - 1) begin
        int r0;
        r0 = n_rd;
        @(negedge clk) tok_go = 1;
        repeat (NT) @(negedge clk);
        tok_go = 0;
        wait (n_rd == r0 + NT);
      end
    end
    wait (n_out == NO);
    repeat (20) @(posedge clk);
    // ------------------------------------------------------------ checks
    for (int i = 0; i < NO; i++)
      chk(outs[i] == want[i], $sformatf("output %0d: %h want %h", i, outs[i], want[i]));
    chk(n_out == NO, $sformatf("%0d outputs", n_out));
    chk(n_mul == NT * NO, $sformatf("%0d products", n_mul));
    chk(min_run >= NT, $sformatf("shortest run of back-to-back products %0d", min_run));
    chk(n_rdq == NT * NO, $sformatf("%0d tap read-queue pushes", n_rdq));
    chk(n_roll == NO, $sformatf("%0d tap pointer roll-overs", n_roll));
    chk(q_overflow == '0, "no queue overflow");
    chk(!own_error, "no ownership violation");
    $display("outputs=%0d products=%0d shortest product run=%0d roll-overs=%0d",
             n_out, n_mul, min_run, n_roll);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
