// tb_fft_step: the first radix-4 step of a 16-point complex FFT on the SMP
// core: four 4-point DFTs, X[k] = sum over n of x[n] * (-j)^(n*k), with the
// data and the coefficients held in the data memory.
//
// Each output component is a real dot product: the real and imaginary part of
// every input meet two coefficients, one from the real row and one from the
// imaginary row of the complex product.  A block occupies nine words,
// re0 im0 re1 im1 re2 im2 re3 im3 0, so each output takes nine products,
// summed in two levels of three.  The coefficient table has one nine-word row
// per output component (8 rows, 72 words).
//   P3  loader: data words from input queue 2 through pass forward 1 to Wr 1
//       (36 words), coefficients from input queue 3 through pass forward 2 to
//       Wr 2 (72 words).
//   P0  read process, two states.  The read state, triggered by a request
//       token in input queue 1, reads one data word through Rd 0 and one
//       coefficient through Rd 1 into their read queues Q0.  The rewind state
//       (top), triggered by a token in input queue 0, steps the data read
//       pointer by 27 modulo 36, back to the start of the block, so the same
//       block is read for all eight output components.
//   P1  product process: multiplies the two read-queue heads into feedback
//       queue 0,0.
//   P2  accumulation process: two levels of three-operand sums; the top level
//       sends each output component to the output portal.
// The tokens stand in for a loop counter.  All values are small integers and
// the coefficients are 0 and +-1, so every output is exact.
// Checked: the 32 output components against a direct DFT, 9 products each,
// the rewinds, roll-over of both read pointers, and no queue overflow.
module tb_fft_step;
  import smp_pkg::*;
  import tb_fp_pkg::*;

  localparam int NB = 4;                // blocks (4-point DFTs)
  localparam int BW = 9;                // words per block
  localparam int NO = NB * 8;           // output components

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
    w_owner(R_RD0, 0); w_owner(R_RD0 + 1, 0);
    w_owner(R_MUL, 1); w_owner(R_FIN0, 1);
    w_owner(R_FOUT0, 2); w_owner(R_FOUT0 + 1, 2); w_owner(R_CADD0, 2); w_owner(R_FIN0 + 1, 2);
    w_owner(R_OUT, 2);
    w_owner(R_PF0 + 1, 3); w_owner(R_WR0 + 1, 3); w_owner(R_PF0 + 2, 3); w_owner(R_WR0 + 2, 3);
    // P3: data into 0..35, coefficients into 100..171
    w_state(3, 0, st(2, 1, -1, 0, rb(R_PF0 + 1, R_WR0 + 1)));
    w_instr(R_PF0 + 1, 0, i_sel(S2_IN0 + 6));
    w_instr(R_WR0 + 1, 0, i_ag(AM_LIN, 1, S3_PF0 + 1));
    w_ag(NRD + 1, 0, NB * BW, 0);
    w_state(3, 1, st(3, 1, -1, 0, rb(R_PF0 + 2, R_WR0 + 2)));
    w_instr(R_PF0 + 2, 1, i_sel(S2_IN0 + 9));
    w_instr(R_WR0 + 2, 1, i_ag(AM_LIN, 1, S3_PF0 + 2));
    w_ag(NRD + 2, 100, 8 * BW, 0);
    // P0: read state and rewind state
    w_state(0, 0, st(1, 1, -1, 0, rb(R_RD0, R_RD0 + 1)));
    w_instr(R_RD0, 0, i_ag(AM_LIN, 1, 0, 1, 0));
    w_instr(R_RD0 + 1, 0, i_ag(AM_LIN, 1, 0, 1, 0));
    w_state(0, 1, st(0, 1, -1, 0, rb(R_RD0)));
    w_instr(R_RD0, 1, i_ag(AM_LIN, NB * BW - BW, 0));
    w_ag(0, 0, NB * BW, 0);
    w_ag(1, 100, 8 * BW, 0);
    // P1: products
    w_state(1, 0, st(Q_RD0 + 0, 1, Q_RD0 + NRQ, 1, rb(R_MUL, R_FIN0)));
    mi = '0; mi.a = 6'(S2_RDQ0 + 0); mi.b = 6'(S2_RDQ0 + NRQ);
    w_instr(R_MUL, 0, IW'(mi));
    w_instr(R_FIN0, 0, i_fin(S3_MUL, 0));
    // P2: two accumulation levels
    w_state(2, 0, st(fbq(0, 0), 3, -1, 0, rb(R_FOUT0, R_CADD0, R_FIN0 + 1)));
    w_instr(R_FOUT0, 0, i_sel(0));
    w_instr(R_CADD0, 0, i_cadd(S2_FOUT0, S2_FOUT0 + 1, S2_FOUT0 + 2, CA_ADD));
    w_instr(R_FIN0 + 1, 0, i_fin(S3_C0, 0));
    w_state(2, 1, st(fbq(1, 0), 3, -1, 0, rb(R_FOUT0 + 1, R_CADD0, R_OUT)));
    w_instr(R_FOUT0 + 1, 1, i_sel(0));
    w_instr(R_CADD0, 1, i_cadd(S2_FOUT0 + 3, S2_FOUT0 + 4, S2_FOUT0 + 5, CA_ADD));
    w_instr(R_OUT, 1, i_sel(S3_C0));
  endtask

  // ------------------------------------------------------------------ data
  int  xr[NB][4], xi[NB][4], dat[NB * BW], cof[8 * BW], want[NO];
  int  n_dat_in = 0, n_cof_in = 0;
  bit  load_go = 0, rd_go = 0, rw_go = 0;

  always_ff @(posedge clk) begin
    if (in_valid[2] && in_ready[2]) n_dat_in <= n_dat_in + 1;
    if (in_valid[3] && in_ready[3]) n_cof_in <= n_cof_in + 1;
  end
  always_comb begin
    in_valid = '0;
    in_data  = '0;
    in_valid[2] = load_go && n_dat_in < NB * BW;
    in_data[2]  = r2f(real'(dat[n_dat_in % (NB * BW)]));
    in_valid[3] = load_go && n_cof_in < 8 * BW;
    in_data[3]  = r2f(real'(cof[n_cof_in % (8 * BW)]));
    in_valid[1] = rd_go;
    in_valid[0] = rw_go;
  end

  // (-j)^m as (re, im)
  function automatic int wr_(input int m);
    case (m % 4) 0: return 1; 2: return -1; default: return 0; endcase
  endfunction
  function automatic int wi_(input int m);
    case (m % 4) 1: return -1; 3: return 1; default: return 0; endcase
  endfunction

  // ------------------------------------------------------------ monitoring
  int n_mul = 0, n_rd = 0, n_rw = 0, n_roll0 = 0, n_roll1 = 0, n_out = 0;
  logic [31:0] outs[NO];

  always @(posedge clk) if (rst_n && run) begin
    if (issue_valid[1]) n_mul++;
    if (issue_valid[0] && issue_idx[0] == 0) n_rd++;
    if (issue_valid[0] && issue_idx[0] == 1) n_rw++;
    if (dut.u_map.rolled[0]) n_roll0++;
    if (dut.u_map.rolled[1]) n_roll1++;
    if (out_valid) begin
      if (n_out < NO) outs[n_out] = out_data;
      n_out++;
    end
  end

  initial begin
    for (int b = 0; b < NB; b++) begin
      for (int n = 0; n < 4; n++) begin
        xr[b][n] = int'($urandom_range(20)) - 10;
        xi[b][n] = int'($urandom_range(20)) - 10;
        dat[BW * b + 2 * n]     = xr[b][n];
        dat[BW * b + 2 * n + 1] = xi[b][n];
      end
      dat[BW * b + 8] = 0;
      for (int k = 0; k < 4; k++) begin
        int sr, si;
        sr = 0; si = 0;
        for (int n = 0; n < 4; n++) begin
          sr += xr[b][n] * wr_(n * k) - xi[b][n] * wi_(n * k);
          si += xr[b][n] * wi_(n * k) + xi[b][n] * wr_(n * k);
        end
        want[8 * b + 2 * k]     = sr;
        want[8 * b + 2 * k + 1] = si;
      end
    end
    // row 2k: real part of X[k]; row 2k+1: imaginary part
    for (int k = 0; k < 4; k++) begin
      for (int n = 0; n < 4; n++) begin
        cof[BW * (2 * k) + 2 * n]         = wr_(n * k);
        cof[BW * (2 * k) + 2 * n + 1]     = -wi_(n * k);
        cof[BW * (2 * k + 1) + 2 * n]     = wi_(n * k);
        cof[BW * (2 * k + 1) + 2 * n + 1] = wr_(n * k);
      end
      cof[BW * (2 * k) + 8] = 0;
      cof[BW * (2 * k + 1) + 8] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    program_core();
    @(negedge clk) run = 1;
    load_go = 1;
    wait (n_dat_in == NB * BW && n_cof_in == 8 * BW);
    repeat (8) @(posedge clk);
    // per block: eight rows of nine reads, rewinding between rows
    for (int b = 0; b < NB; b++)
      for (int r = 0; r < 8; r++) begin
        int r0;
        r0 = n_rd;
        @(negedge clk) rd_go = 1;
        repeat (BW) @(negedge clk);
        rd_go = 0;
        wait (n_rd == r0 + BW);
        if (r < 7) begin
          int w0;
          w0 = n_rw;
          @(negedge clk) rw_go = 1;
          @(negedge clk) rw_go = 0;
          wait (n_rw == w0 + 1);
        end
      end
    wait (n_out == NO);
    repeat (20) @(posedge clk);
    // ------------------------------------------------------------ checks
    for (int i = 0; i < NO; i++)
      chk(outs[i] == r2f(real'(want[i])), $sformatf("block %0d X[%0d].%s: %h want %0d", i / 8,
          (i % 8) / 2, (i % 2) ? "im" : "re", outs[i], want[i]));
    chk(n_out == NO, $sformatf("%0d outputs", n_out));
    chk(n_mul == BW * NO, $sformatf("%0d products", n_mul));
    chk(n_rw == NB * 7, $sformatf("%0d rewinds", n_rw));
    chk(n_roll1 == NB, $sformatf("%0d coefficient pointer roll-overs", n_roll1));
    chk(n_roll0 > 0, "data pointer roll-over");
    chk(q_overflow == '0, "no queue overflow");
    chk(!own_error, "no ownership violation");
    $display("outputs=%0d products=%0d rewinds=%0d roll-overs=%0d/%0d",
             n_out, n_mul, n_rw, n_roll0, n_roll1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
