// tb_smp_queue: self-checking test of the status-triggered queue.
// A reference model (a SystemVerilog queue of words plus a reservation count)
// runs beside the DUT under random push / reserve / pop traffic with the same
// two-cycle gap between reservation and pop as in the core.  Every cycle the
// three head entries (where held), count, avail and full are compared; a push
// into a full queue must set the sticky overflow flag.
module tb_smp_queue;
  localparam int DEPTH = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic push;
  logic [31:0] push_data;
  logic [1:0] rsv_n, pop_n, rsv_d1;
  logic [2:0][31:0] head;
  logic [3:0] count, avail;
  logic full, overflow;
  int checks = 0, failures = 0;
  int n_full = 0, n_pop3 = 0;
  always #5 clk = ~clk;

  smp_queue #(.DW(32), .DEPTH(DEPTH)) dut (.*);

  logic [31:0] model[$];
  int resv;
  bit exp_ovf;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int a;
    push = 0; push_data = 0; rsv_n = 0; pop_n = 0; rsv_d1 = 0;
    resv = 0; exp_ovf = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // compare state
      chk(count == 4'(model.size()), "count");
      chk(avail == 4'(model.size() - resv), "avail");
      chk(full == (model.size() == DEPTH), "full");
      chk(overflow == exp_ovf, "overflow");
      for (int j = 0; j < 3; j++)
        if (j < model.size()) chk(head[j] == model[j], $sformatf("head%0d", j));
      if (full) n_full++;
      // drive next cycle: pops follow reservations made two cycles before
      pop_n = rsv_d1;
      rsv_d1 = rsv_n;
      a = model.size() - resv;
      rsv_n = ((cyc / 200) % 2 == 0) ? 2'($urandom % 2) : 2'($urandom % 4);
      if (int'(rsv_n) > a) rsv_n = 2'(a);
      push = ((cyc / 200) % 2 == 0) ? ($urandom % 4 != 0) : ($urandom % 3 == 0);
      push_data = $urandom;
      @(posedge clk);
      // model update
      if (pop_n == 2'd3) n_pop3++;
      for (int j = 0; j < int'(pop_n); j++) void'(model.pop_front());
      resv = resv + int'(rsv_n) - int'(pop_n);
      if (push) begin
        if (model.size() < DEPTH) model.push_back(push_data);
        else exp_ovf = 1;
      end
    end
    chk(n_full > 0, "queue never filled");
    chk(n_pop3 > 0, "never popped three entries at once");
    chk(exp_ovf, "overflow never exercised");
    $display("full cycles=%0d pop3=%0d", n_full, n_pop3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
