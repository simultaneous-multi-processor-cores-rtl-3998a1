// tb_feedback_port: self-checking test of feedback port k (Fout k / Fin k).
// Fin pushes results into randomly chosen queues; a reference model of all the
// port's queues checks every queue's avail count, and the three heads that Fout
// presents for a selected queue, while entries are reserved and popped three at
// a time as the accumulation of a dot product does.
module tb_feedback_port;
  localparam int NQ = 8, DEPTH = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic fin_push;
  logic [2:0] fin_q, fout_q;
  logic [31:0] fin_data;
  logic [NQ-1:0][1:0] rsv_n, pop_n, rsv_d1;
  logic [2:0][31:0] fout_head;
  logic [NQ-1:0][3:0] avail;
  logic [NQ-1:0] overflow;
  int checks = 0, failures = 0;
  int n_pop3 = 0;
  always #5 clk = ~clk;

  feedback_port #(.DW(32), .NQ(NQ), .DEPTH(DEPTH)) dut (.*);

  logic [31:0] model[NQ][$];
  int resv[NQ];

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
    int q;
    fin_push = 0; fin_q = 0; fout_q = 0; fin_data = 0; rsv_n = '0; pop_n = '0; rsv_d1 = '0;
    foreach (resv[i]) resv[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < NQ; i++) begin
        chk(avail[i] == 4'(model[i].size() - resv[i]), $sformatf("avail q%0d", i));
        chk(!overflow[i], "overflow");
      end
      fout_q = 3'($urandom);
      #1;
      for (int j = 0; j < 3; j++)
        if (j < model[fout_q].size()) chk(fout_head[j] == model[fout_q][j], "fout head");
      pop_n = rsv_d1;
      rsv_d1 = rsv_n;
      // reserve three from one queue that holds three (accumulation level)
      rsv_n = '0;
      q = int'($urandom % NQ);
      if (model[q].size() - resv[q] >= 3) rsv_n[q] = 2'd3;
      fin_q = 3'($urandom);
      fin_push = (model[fin_q].size() < DEPTH) && ($urandom % 4 != 0);
      fin_data = $urandom;
      @(posedge clk);
      for (int i = 0; i < NQ; i++) begin
        if (pop_n[i] == 2'd3) n_pop3++;
        for (int j = 0; j < int'(pop_n[i]); j++) void'(model[i].pop_front());
        resv[i] = resv[i] + int'(rsv_n[i]) - int'(pop_n[i]);
      end
      if (fin_push) model[fin_q].push_back(fin_data);
    end
    chk(n_pop3 > 10, "three-entry pops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
