// tb_local_instr_proc: self-checking test of a local instruction processor.
// Writes a distinct instruction for each of the 32 process states, then reads
// them back by process index in random order with the use bit on (the stored
// word) and off (zero).
module tb_local_instr_proc;
  logic clk = 1'b0;
  logic cfg_we, use_bit;
  logic [4:0] cfg_addr, idx;
  logic [23:0] cfg_data, instr;
  logic [23:0] model[32];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  local_instr_proc #(.W(24), .NS(32)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    use_bit = 0; idx = 0; cfg_we = 0; cfg_addr = 0; cfg_data = 0;
    for (int s = 0; s < 32; s++) begin
      @(negedge clk);
      model[s] = 24'($urandom) | 24'h1;
      cfg_we = 1; cfg_addr = 5'(s); cfg_data = model[s];
    end
    @(negedge clk) cfg_we = 0;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      idx = 5'($urandom);
      use_bit = (t % 5 != 0);
      #1;
      checks++;
      if (instr !== (use_bit ? model[idx] : 24'h0)) begin
        failures++;
        $display("FAIL idx %0d use %0d: %h", idx, use_bit, instr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
