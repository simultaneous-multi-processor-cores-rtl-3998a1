// smp_pkg: constants and types shared by the SMP (simultaneous multi-processor) core.
//
// The core runs up to NPROC simultaneous processes.  Each process owns a set of
// instructed resources; every cycle the process state calculator of a process may
// issue one process index, and each owned resource turns that index into its own
// local instruction through a small local instruction memory.  This package fixes
// the resource numbering (which is also the bit order of the usage vector), the
// operand-bus numbering of pipes 2 and 3, and the layout of each local instruction.
//
// From the document: 4 simultaneous processes, 4 read ports (Rd 0-3), 4 write
// ports (Wr 0-3), 8 pass-forward registers, one multiplier, two C-adders, feedback
// ports Fout k / Fin k, an output portal, single-precision floating point data.
// Each read port also has two read queues Q0 and Q1.
// Own choices: 32 process states per process, 8 input queues, 4 feedback ports of
// 8 queues each, 8-entry queues, a 4096-word data memory, 32-bit local
// instructions and every field layout below.
package smp_pkg;

  localparam int unsigned NPROC    = 4;   // simultaneous processes per core
  localparam int unsigned NSTATES  = 32;  // process states per process
  localparam int unsigned SW       = $clog2(NSTATES);
  localparam int unsigned PW       = $clog2(NPROC);
  localparam int unsigned DW       = 32;  // IEEE-754 single precision words
  localparam int unsigned NIN      = 8;   // input queues
  localparam int unsigned NFB      = 4;   // feedback ports (Fout k / Fin k)
  localparam int unsigned NQ       = 8;   // queues per feedback port
  localparam int unsigned QDEPTH   = 8;   // entries per queue
  localparam int unsigned QCW      = $clog2(QDEPTH + 1);
  localparam int unsigned NRD      = 4;   // memory read ports Rd 0-3
  localparam int unsigned NRQ      = 2;   // read queues per read port (Q0, Q1)
  localparam int unsigned Q_FB0    = NIN;                 // first feedback queue
  localparam int unsigned Q_RD0    = NIN + NFB * NQ;      // first read queue
  localparam int unsigned NQT      = Q_RD0 + NRD * NRQ;   // queues visible to triggers
  localparam int unsigned NWR      = 4;   // memory write ports Wr 0-3
  localparam int unsigned NPF      = 8;   // pass forward 0-7
  localparam int unsigned MEM_DEPTH = 4096;
  localparam int unsigned AW       = $clog2(MEM_DEPTH);
  localparam int unsigned IW       = 32;  // local instruction width

  // ---------------------------------------------------------------- resources
  // Bit positions in the usage vector.
  localparam int unsigned R_RD0   = 0;               // Rd 0..3 (address + read)
  localparam int unsigned R_WR0   = R_RD0 + NRD;     // Wr 0..3 (address + write)
  localparam int unsigned R_FOUT0 = R_WR0 + NWR;     // Fout 0..NFB-1
  localparam int unsigned R_MUL   = R_FOUT0 + NFB;
  localparam int unsigned R_CADD0 = R_MUL + 1;       // C-adder 0, 1
  localparam int unsigned R_PF0   = R_CADD0 + 2;     // pass forward 0..7
  localparam int unsigned R_FIN0  = R_PF0 + NPF;     // Fin 0..NFB-1
  localparam int unsigned R_OUT   = R_FIN0 + NFB;    // output portal
  localparam int unsigned NRES    = R_OUT + 1;

  // ------------------------------------------------------- pipe-2 operand bus
  // Sources a pipe-3 resource can select (registered at the end of pipe 2).
  localparam int unsigned S2_IN0   = 0;               // input queue k heads 0..2 at S2_IN0+3k+j
  localparam int unsigned S2_RD0   = S2_IN0 + 3 * NIN; // read data of Rd k
  localparam int unsigned S2_FOUT0 = S2_RD0 + NRD;    // Fout k heads 0..2 at S2_FOUT0+3k+j
  localparam int unsigned S2_RDQ0  = S2_FOUT0 + 3 * NFB; // head of Rd k Qj at S2_RDQ0+2k+j
  localparam int unsigned S2_ZERO  = S2_RDQ0 + NRD * NRQ;
  localparam int unsigned S2_ONE   = S2_ZERO + 1;
  localparam int unsigned NS2      = S2_ONE + 1;

  // ------------------------------------------------------ pipe-3 result bus
  localparam int unsigned S3_MUL   = 0;
  localparam int unsigned S3_C0    = 1;  // C-adder 0 result
  localparam int unsigned S3_C0IX  = 2;  // C-adder 0 winner index (integer)
  localparam int unsigned S3_C1    = 3;
  localparam int unsigned S3_C1IX  = 4;
  localparam int unsigned S3_PF0   = 5;  // pass forward 0..7
  localparam int unsigned NS3      = S3_PF0 + NPF;

  localparam logic [DW-1:0] FP_ONE = 32'h3F80_0000;

  // ------------------------------------------------ process state table entry
  typedef struct packed {
    logic                       en;     // state is part of the program
    logic [NQT-1:0][1:0]        req;    // entries needed (0..3) in each queue
    logic [NRES-1:0]            usage;  // resources used by this state
  } state_entry_t;

  // ---------------------------------------------------- local instructions
  typedef enum logic [1:0] {
    AM_LIN  = 2'd0,   // addr = base + ptr, ptr = (ptr + step) mod len
    AM_REV  = 2'd1,   // addr = base + bitflip(ptr, lg), ptr advances as AM_LIN
    AM_HOLD = 2'd2    // addr = base + ptr, pointer unchanged
  } amode_e;

  typedef struct packed {   // Rd k and Wr k
    logic [IW-20:0] pad;
    logic           rqsel;  // Rd k: read queue Q0 or Q1
    logic           rqen;   // Rd k: also push the word into that read queue
    logic [5:0]     wsrc;   // Wr k: pipe-3 bus source of the write data
    logic           clr;    // restart pointer at 0 before use
    logic [7:0]     step;
    amode_e         mode;
  } ag_instr_t;

  typedef enum logic [1:0] {
    CA_ADD = 2'd0,
    CA_MAX = 2'd1,
    CA_MIN = 2'd2
  } cop_e;

  typedef struct packed {   // C-adder 0, 1
    logic [IW-27:0] pad;
    logic [2:0]     neg;    // negate operand c,b,a
    cop_e           op;
    logic [2:0]     open;   // operand enables c,b,a
    logic [5:0]     c;
    logic [5:0]     b;
    logic [5:0]     a;
  } cadd_instr_t;

  typedef struct packed {   // multiplier
    logic [IW-14:0] pad;
    logic           neg;
    logic [5:0]     b;
    logic [5:0]     a;
  } mul_instr_t;

  typedef struct packed {   // Fin k: push a pipe-3 result into queue k,q
    logic [IW-11:0] pad;
    logic [3:0]     q;
    logic [5:0]     src;
  } fin_instr_t;

  typedef struct packed {   // pass forward k, output portal, Fout k (src = queue)
    logic [IW-7:0]  pad;
    logic [5:0]     src;
  } sel_instr_t;

  // bit-flipped address: reverses the low lg bits of p (FFT first pass)
  function automatic logic [AW-1:0] bitflip(input logic [AW-1:0] p, input logic [3:0] lg);
    logic [AW-1:0] r;
    r = p;
    for (int i = 0; i < AW; i++)
      if (i < int'(lg)) r[i] = p[int'(lg) - 1 - i];
    return r;
  endfunction

endpackage
