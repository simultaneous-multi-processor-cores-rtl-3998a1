// tb_data_memory: self-checking test of the 4-read, 4-write data memory.
// Random reads and writes on all ports against a reference array: read data
// appears one cycle after the address, an unused read port keeps its word, a
// read and a write of one word in one cycle return the old word, and of two
// writes to one word the higher port wins.
module tb_data_memory;
  localparam int DEPTH = 256;
  logic clk = 1'b0;
  logic [3:0] re, we;
  logic [3:0][7:0] raddr, waddr;
  logic [3:0][31:0] rdata, wdata;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  data_memory #(.DEPTH(DEPTH), .NR(4), .NW(4)) dut (.*);

  logic [31:0] model[DEPTH];
  logic [3:0][31:0] exp_rd;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    re = '0; we = '0; raddr = '0; waddr = '0; wdata = '0;
    // initialise the whole memory through port 0
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 4'b0001; waddr[0] = 8'(i); wdata[0] = $urandom; model[i] = wdata[0];
    end
    @(negedge clk) we = '0;
    exp_rd = '0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      re = 4'($urandom); we = 4'($urandom);
      for (int k = 0; k < 4; k++) begin
        raddr[k] = 8'($urandom % 16);       // small range: frequent collisions
        waddr[k] = 8'($urandom % 16);
        wdata[k] = $urandom;
        if (re[k]) exp_rd[k] = model[raddr[k]];
      end
      @(posedge clk);
      for (int k = 0; k < 4; k++) if (we[k]) model[waddr[k]] = wdata[k];
      #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (rdata[k] !== exp_rd[k]) begin failures++; $display("FAIL rd%0d t%0d", k, t); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
