// tb_mem_access_proc: self-checking test of the memory access processor.
// Port 0 walks a 27-entry circular buffer (FIR taps) with step 1 and must roll
// over at 27; port 1 steps by 5 through a window of 27 (modulo); port 2 produces
// bit-flipped addresses for a 1024-point pass (lg = 10) offset by a base; port 3
// holds its pointer; port 4 restarts with clr.  Addresses are compared with a
// reference computed in the testbench, one cycle after the use bit.
module tb_mem_access_proc;
  import smp_pkg::*;
  localparam int NP = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we;
  logic [2:0] cfg_port;
  logic [AW-1:0] cfg_base;
  logic [AW:0] cfg_len;
  logic [3:0] cfg_lg;
  logic [NP-1:0] use_bit;
  ag_instr_t [NP-1:0] instr;
  logic [NP-1:0][AW-1:0] addr;
  logic [NP-1:0] addr_vld, rolled;
  int checks = 0, failures = 0, n_roll = 0, n_rev = 0;
  always #5 clk = ~clk;

  mem_access_proc #(.NP(NP), .A(AW)) dut (.*);

  int base[NP], len[NP], lg[NP], ptr[NP];

  function automatic int rev(input int p, input int w);
    int r;
    r = p & ~((1 << w) - 1);
    for (int i = 0; i < w; i++) if (p & (1 << i)) r |= 1 << (w - 1 - i);
    return r;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg(input int p, input int b, input int l, input int g);
    @(negedge clk);
    cfg_we = 1; cfg_port = 3'(p); cfg_base = AW'(b); cfg_len = (AW+1)'(l); cfg_lg = 4'(g);
    base[p] = b; len[p] = l; lg[p] = g; ptr[p] = 0;
  endtask

  initial begin
    int exp_a[NP];
    bit exp_v[NP];
    cfg_we = 0; cfg_port = 0; cfg_base = 0; cfg_len = 0; cfg_lg = 0; use_bit = '0; instr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    cfg(0, 100, 27, 0);
    cfg(1, 200, 27, 0);
    cfg(2, 1024, 1024, 10);
    cfg(3, 7, 16, 0);
    cfg(4, 0, 64, 0);
    for (int p = 5; p < NP; p++) cfg(p, 0, 4096, 0);
    @(negedge clk) cfg_we = 0;
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        int cur;
        use_bit[p] = (p == 0) ? 1'b1 : 1'($urandom);
        instr[p] = '0;
        instr[p].mode = (p == 2) ? AM_REV : (p == 3) ? AM_HOLD : AM_LIN;
        instr[p].step = (p == 1) ? 8'd5 : 8'd1;
        instr[p].clr  = (p == 4) && (t % 10 == 0);
        exp_v[p] = use_bit[p];
        if (use_bit[p]) begin
          cur = instr[p].clr ? 0 : ptr[p];
          exp_a[p] = (base[p] + ((p == 2) ? rev(cur, lg[p]) : cur)) % 4096;
          if (p != 3) ptr[p] = (cur + int'(instr[p].step)) % len[p];
        end
      end
      @(posedge clk); #1;
      for (int p = 0; p < NP; p++) begin
        checks++;
        if (addr_vld[p] !== exp_v[p] || (exp_v[p] && int'(addr[p]) != exp_a[p])) begin
          failures++;
          $display("FAIL port %0d t %0d: %0d want %0d", p, t, addr[p], exp_a[p]);
        end
      end
      if (rolled[0]) n_roll++;
      if (use_bit[2] && int'(addr[2]) != 1024 + (t % 1024)) n_rev++;
    end
    checks += 2;
    if (n_roll != 1500 / 27) begin failures++; $display("FAIL roll count %0d", n_roll); end
    if (n_rev == 0) begin failures++; $display("FAIL no bit flip"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
