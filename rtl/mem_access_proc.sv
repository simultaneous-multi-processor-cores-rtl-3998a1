// mem_access_proc: memory access processor of the SMP core (pipe 1).
//
// One address generator per memory port (Rd 0..3 and Wr 0..3).  Each generator
// holds a base, a length and a bit-flip width written by configuration, and a
// pointer.  When its port is used on a wave front it applies the port's local
// instruction: optionally restart the pointer at 0 (clr), form the address, then
// advance the pointer by step with roll-over at len.  Modes:
//   AM_LIN  addr = base + ptr                 (FIR tap and window pointers)
//   AM_REV  addr = base + bitflip(ptr, lg)    (FFT first pass)
//   AM_HOLD addr = base + ptr, pointer held
// bitflip reverses the low lg pointer bits: the top bit swaps with the bottom
// bit, the next with the next, and so on.  The address is registered and used
// by the port in pipe 2; addr_vld marks a used port.  From the document: the
// memory processors do pointer roll-over and bit-flipped addressing so that the
// program does not.  Own choices: the register set, instruction fields and the
// one-cycle timing.
module mem_access_proc
  import smp_pkg::*;
#(
  parameter int unsigned NP = NRD + NWR,
  parameter int unsigned A  = AW
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cfg_we,
  input  logic [$clog2(NP)-1:0] cfg_port,
  input  logic [A-1:0]          cfg_base,
  input  logic [A:0]            cfg_len,   // roll-over length, 1..2^A
  input  logic [3:0]            cfg_lg,    // bit-flip width
  input  logic [NP-1:0]         use_bit,
  input  ag_instr_t [NP-1:0]    instr,
  output logic [NP-1:0][A-1:0]  addr,
  output logic [NP-1:0]         addr_vld,
  output logic [NP-1:0]         rolled     // pulse: pointer wrapped at len
);
  logic [NP-1:0][A-1:0] base;
  logic [NP-1:0][A:0]   len;
  logic [NP-1:0][3:0]   lg;
  logic [NP-1:0][A-1:0] ptr;

  function automatic logic [A-1:0] flip(input logic [A-1:0] p, input logic [3:0] w);
    logic [A-1:0] r;
    r = p;
    for (int i = 0; i < A; i++)
      if (i < int'(w)) r[i] = p[int'(w) - 1 - i];
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base     <= '0;
      len      <= '0;
      lg       <= '0;
      ptr      <= '0;
      addr     <= '0;
      addr_vld <= '0;
      rolled   <= '0;
    end else begin
      for (int p = 0; p < NP; p++) begin
        logic [A-1:0] cur;
        logic [A:0]   nxt;
        addr_vld[p] <= use_bit[p];
        rolled[p]   <= 1'b0;
        if (cfg_we && cfg_port == $clog2(NP)'(p)) begin
          base[p] <= cfg_base;
          len[p]  <= cfg_len;
          lg[p]   <= cfg_lg;
          ptr[p]  <= '0;
        end else if (use_bit[p]) begin
          cur = instr[p].clr ? '0 : ptr[p];
          addr[p] <= base[p] + ((instr[p].mode == AM_REV) ? flip(cur, lg[p]) : cur);
          if (instr[p].mode != AM_HOLD) begin
            nxt = {1'b0, cur} + (A+1)'(instr[p].step);
            if (nxt >= len[p]) begin
              nxt = nxt - len[p];
              rolled[p] <= 1'b1;
            end
            ptr[p] <= A'(nxt);
          end else begin
            ptr[p] <= cur;
          end
        end
      end
    end
  end
endmodule
