// tb_process_state_calc: self-checking test of one process state calculator.
// A program of 12 states with random triggers (0..3 entries needed in random
// queues) and usage vectors, some states disabled, is loaded.  Random queue
// status is applied each cycle and the issued index, usage vector and
// reservation are compared with a reference search for the highest-numbered
// enabled state whose trigger is met.  Also checks that nothing issues while
// run is low, and that a higher state pre-empts a lower one.
module tb_process_state_calc;
  import smp_pkg::*;
  localparam int NS = 16, NQS = 6, NR = 10;
  logic clk = 1'b0, rst_n = 1'b0, run;
  logic [NQS-1:0][3:0] avail;
  logic cfg_we, cfg_en;
  logic [3:0] cfg_state;
  logic [NQS-1:0][1:0] cfg_req;
  logic [NR-1:0] cfg_usage;
  logic [NQS-1:0][1:0] rsv_n;
  logic valid;
  logic [3:0] idx;
  logic [NR-1:0] usage;
  int checks = 0, failures = 0, n_preempt = 0, n_idle = 0;
  always #5 clk = ~clk;

  process_state_calc #(.NS(NS), .NQS(NQS), .NR(NR), .CW(4)) dut (.*);

  bit               m_en[NS];
  logic [1:0]       m_req[NS][NQS];
  logic [NR-1:0]    m_use[NS];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int exp_s, prev_s;
    bit exp_v;
    run = 0; avail = '0; cfg_we = 0; cfg_en = 0; cfg_state = 0; cfg_req = '0; cfg_usage = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < NS; s++) begin
      m_en[s] = (s < 12) && (s != 5);
      for (int q = 0; q < NQS; q++) m_req[s][q] = ($urandom % 3 == 0) ? 2'($urandom) : 2'd0;
      if (s >= 8) m_req[s][s % NQS] = 2'd3;   // rare, high-priority states
      m_use[s] = NR'($urandom);
      @(negedge clk);
      cfg_we = 1; cfg_state = 4'(s); cfg_en = m_en[s];
      for (int q = 0; q < NQS; q++) cfg_req[q] = m_req[s][q];
      cfg_usage = m_use[s];
    end
    @(negedge clk) cfg_we = 0;
    prev_s = -1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      run = (cyc % 50) != 7;
      for (int q = 0; q < NQS; q++) avail[q] = 4'($urandom % 5);
      exp_v = 0; exp_s = 0;
      for (int s = 0; s < NS; s++) begin
        bit t;
        t = m_en[s];
        for (int q = 0; q < NQS; q++) if (int'(avail[q]) < int'(m_req[s][q])) t = 0;
        if (t) begin exp_v = 1; exp_s = s; end
      end
      exp_v = exp_v && run;
      #1;
      for (int q = 0; q < NQS; q++)
        chk(rsv_n[q] == (exp_v ? m_req[exp_s][q] : 2'd0), "reservation");
      @(posedge clk); #1;
      chk(valid == exp_v, "valid");
      if (exp_v) begin
        chk(idx == 4'(exp_s), "index");
        chk(usage == m_use[exp_s], "usage vector");
        if (prev_s >= 0 && exp_s > prev_s) n_preempt++;
        prev_s = exp_s;
      end else begin
        chk(usage == '0, "usage off when idle");
        n_idle++;
      end
    end
    chk(n_preempt > 0 && n_idle > 0, "pre-emption and idle both seen");
    $display("preempt=%0d idle=%0d", n_preempt, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
