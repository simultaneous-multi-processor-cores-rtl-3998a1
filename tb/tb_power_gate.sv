// tb_power_gate: self-checking test of the power gate model.
// The gated rail must follow power AND use bit, after T_ON when switching on
// and T_OFF when switching off, and stay off whenever the supply is off.
module tb_power_gate;
  logic clk = 1'b0;
  logic power, use_bit, gated_power;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  power_gate #(.T_ON(2), .T_OFF(1)) dut (.*);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic p, input logic u, input logic exp_before, input int settle, input logic exp_after);
    @(negedge clk);
    power = p; use_bit = u;
    #0.5;
    checks++;
    if (gated_power !== exp_before) begin failures++; $display("FAIL before settle p=%0d u=%0d", p, u); end
    #(settle);
    checks++;
    if (gated_power !== exp_after) begin failures++; $display("FAIL after settle p=%0d u=%0d", p, u); end
  endtask

  initial begin
    power = 1'b1; use_bit = 1'b0;
    @(negedge clk);
    step(1, 1, 0, 2, 1);   // use bit on: rail up after T_ON
    step(1, 0, 1, 1, 0);   // use bit off: rail down after T_OFF
    step(0, 1, 0, 2, 0);   // no supply
    step(1, 1, 0, 2, 1);
    for (int i = 0; i < 50; i++) begin
      logic u;
      u = 1'($urandom);
      step(1, u, gated_power, 3, u);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
