// tb_usage_vector_calc: self-checking test of the overall usage vector
// calculator.  Random ownership, per-process valid bits, indexes and usage
// vectors; checks each resource's use bit and routed index against its owner,
// and that a usage bit from a non-owner is flagged and ignored.
module tb_usage_vector_calc;
  import smp_pkg::*;
  logic clk = 1'b0;
  logic [NPROC-1:0] valid;
  logic [NPROC-1:0][SW-1:0] idx;
  logic [NPROC-1:0][NRES-1:0] usage;
  logic [NRES-1:0][PW-1:0] owner;
  logic [NRES-1:0] use_vec, viol;
  logic [NRES-1:0][SW-1:0] res_idx;
  int checks = 0, failures = 0, n_viol = 0;
  always #5 clk = ~clk;

  usage_vector_calc dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      valid = NPROC'($urandom);
      for (int p = 0; p < NPROC; p++) begin
        idx[p] = SW'($urandom);
        usage[p] = NRES'($urandom);
      end
      for (int r = 0; r < NRES; r++) owner[r] = PW'($urandom);
      // most of the time the program respects ownership
      if (t % 4 != 0)
        for (int p = 0; p < NPROC; p++)
          for (int r = 0; r < NRES; r++) if (owner[r] != PW'(p)) usage[p][r] = 1'b0;
      @(posedge clk);
      for (int r = 0; r < NRES; r++) begin
        bit v;
        v = 0;
        for (int p = 0; p < NPROC; p++) if (PW'(p) != owner[r] && valid[p] && usage[p][r]) v = 1;
        checks += 3;
        if (use_vec[r] !== (valid[owner[r]] && usage[owner[r]][r])) begin failures++; $display("FAIL use r%0d", r); end
        if (res_idx[r] !== idx[owner[r]]) begin failures++; $display("FAIL idx r%0d", r); end
        if (viol[r] !== v) begin failures++; $display("FAIL viol r%0d", r); end
        if (v) n_viol++;
      end
    end
    checks++;
    if (n_viol == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
