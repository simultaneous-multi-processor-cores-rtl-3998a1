# SMP core: simultaneous processes instead of one instruction stream

This is synthesizable SystemVerilog for a *simultaneous multi-processor* (SMP) core.
This kind of core gets the throughput of a VLIW or superscalar machine without a wide
instruction memory, an instruction cache or run-time scheduling hardware.

The idea is to split a program into a few **processes** that run at the same time,
for example:

- a process that feeds a multiplier every cycle;
- a process that accumulates what the multiplier produces.

Each process **owns** some of the core's datapath resources: the multiplier, an adder,
memory ports, queues, pass-forward registers. Every cycle, each process picks one of
its **process states** and sends that state's number, the **process index**, to the
resources it owns. Each resource turns the index into its own small **local
instruction**. Resources store instructions only for their owner's states. Take two
processes of eight states each: the resources hold 8 + 8 local instructions, where a
single VLIW memory covering every combination would need 8 × 8 = 64 wide words.

Which state a process picks depends on **queue status**. Results that must come back
(products, partial sums, partial maxima) are written into feedback queues, never
round the arithmetic. A state fires when the queues it needs hold enough entries.
A multiplier process and an accumulation process therefore never stall each other.
A resource that no process uses in a cycle has its power switched off for that cycle.

The whole core is `smp_core` (`rtl/smp_core.sv`). It has four processes, a
single-precision multiplier, two three-operand "C-adders", eight pass-forward
registers, a 4096-word data memory with four read and four write ports (each read
port with two read queues), eight input streams, four feedback ports of eight queues
each, and an output portal.

## The execution wave front: five pipes

All process indexes issued in one cycle start one **execution wave front**, which
moves through five pipes, one clock each:

| pipe | resources | what happens |
|------|-----------|--------------|
| 0 | process state calculators 0–3 | each picks a triggered state and reserves the queue entries it will consume |
| 1 | usage vector calculator, memory access processor | the use vector and each resource's process index are formed; Rd/Wr addresses are generated |
| 2 | Rd 0–3 with read queues Q0/Q1, input queues, Fout 0–3 | memory is read; queue heads are presented and popped; everything is registered onto the *pipe-2 operand bus* |
| 3 | multiplier, C-adder 0, C-adder 1, pass forward 0–7 | operands are selected from the pipe-2 bus; results are registered onto the *pipe-3 result bus* |
| 4 | Wr 0–3, Fin 0–3, output portal | results are written to memory, pushed into feedback queues, or sent out |

A pipe takes its inputs only from the pipe before it. A wave front that takes data
from an input queue in pipe 2 can have its product in a feedback queue at the end of
pipe 4, and a state that uses it can issue in the next cycle. That is five cycles
around the feedback loop.

Each resource keeps its registers unchanged in a wave front where its use bit is low.

## Processes, states and triggers (`process_state_calc`)

Each process has a table of 32 states. A state holds:

- **enable**;
- **trigger**: for each of the 48 queues (8 input, 4 × 8 feedback and 4 × 2 read queues),
  how many entries, 0 to 3, the state needs;
- **usage vector**: one bit for each of the 28 instructed resources.

Every cycle, among the enabled states whose trigger is met, the one with the
**highest number wins**. Programs put rare states at the top, so the rarest get
served first. In the dot-product example, a level-2 sum beats a level-1 sum, which
beats a level-0 sum. A state that needs no entries fires every cycle, unless a
higher state fires.

A state is chosen in pipe 0 but reads its queue entries in pipe 2. To stop a second
wave front being promised the same entries, the calculator **reserves** them when it
issues. The queue then reports `avail = count - reserved` to the triggers, and the
same number of entries is popped two cycles later.

A process that issues nothing raises no usage bits, so nothing it owns is powered.

## Ownership, local instructions and power

- Ownership is a table with one owner number per resource, written when the program
  is loaded. `usage_vector_calc` gives each resource its owner's use bit and process
  index. A usage bit from a process that does not own the resource is ignored and
  sets `own_error`. Two processes reserving the same queue in one cycle breaks an
  assertion.
- Each resource has its own `local_instr_proc`: 32 words of 32 bits, read with the
  owner's index in the pipe where the resource acts. It outputs zero when the
  resource is unused.
- Each resource has a `power_gate`: a behavioural model of a header switch that
  drives `res_power[r]` from the supply and the use bit. In the synthesizable logic
  the same use bit acts as a register enable, which is the clock-gating form of the
  same control.

## Feedback ports and hierarchical accumulation

This is the part that replaces multiply-accumulate.

A floating-point adder with more than one pipeline stage cannot add one product per
cycle into a running sum. Here nothing is fed back into an adder directly:

1. The multiplier process multiplies `A[i]·B[i]` once per cycle. Fin 0 pushes each
   product into feedback queue 0,0.
2. The accumulation process has one state per level:
   - state 0 fires when queue 0,0 holds three products; C-adder 0 adds them and
     Fin 1 pushes the sum into queue 1,0;
   - state *l* fires when queue 1,*l*−1 holds three level-*l* sums, adds them and
     pushes into queue 1,*l*;
   - the top state sends the total to the output portal.
3. For 729 = 3⁶ elements there are six levels. The multiplier runs at one product
   per cycle from the first element to the last. Each level rounds once, so the
   rounding error grows with log₃ N rather than with N.

The maximum of a vector works the same way, with the C-adder in max mode and
three-way comparisons at each level.

`feedback_port` is one Fout/Fin pair holding eight `smp_queue`s:

- Fin *k* pushes one pipe-3 result per cycle into the queue its local instruction
  names.
- Fout *k* presents the three oldest entries of the queue its local instruction
  names.

A push into a full queue is dropped and sets a sticky `q_overflow` bit. The program
must size its flow so this does not happen.

Each read port Rd *k* also has two read queues, Q0 and Q1. When a read's local
instruction sets `rqen`, the word read is pushed into the queue chosen by `rqsel`
one cycle after the read. Like every other queue, a read queue's status can trigger
a state, and that state takes the oldest entry in its own pipe 2. One process can
therefore fetch from memory ahead of the process or state that uses the data. The
word read still goes straight onto the operand bus as well. Only the oldest entry of
a read queue is visible, so a state takes one entry from it per wave front.

## C-adder (`cadder`) and multiplier (`fp32_mul`)

Both work on IEEE-754 single precision.

The C-adder takes three operands, each with an enable and a negate bit. It does one
of two things:

- **add**: returns the sum with **one** rounding, to nearest even;
- **max or min**: returns the winning operand, and its position 0–2 on a separate
  result-bus entry. On a tie the first operand wins.

How the sum is formed:

- operand pairs that cancel exactly are dropped first;
- the rest are aligned to the largest exponent with 52 guard bits and a sticky bit.

The result is correctly rounded except when two operands nearly cancel while the
third lies more than about 50 binary places below them.

Number handling in both units:

- subnormal inputs count as zero, and results below the normal range flush to zero;
- overflow gives infinity;
- in the multiplier, an infinity times zero, or a NaN input, gives a quiet NaN.

## Memory access processor and data memory

`mem_access_proc` holds one address generator for each of Rd 0–3 and Wr 0–3. Each
generator has a configured base, a roll-over length and a bit-flip width, and a
pointer. Its local instruction chooses:

- `AM_LIN`: address = base + ptr, then ptr = (ptr + step) mod length. This gives
  circular buffers, such as FIR taps and windows.
- `AM_REV`: address = base + bitflip(ptr, width), then advance as above. The top
  pointer bit swaps with the bottom one, the next with the next, and so on, as the
  first pass of an FFT needs.
- `AM_HOLD`: address = base + ptr, pointer unchanged.

A `clr` bit restarts the pointer at 0.

Addresses are registered at the end of pipe 1. `data_memory` reads in pipe 2 and
registers the word for pipe 3. Writes happen at the end of pipe 4: the Wr address
and the source of its write data travel with the wave front. If two write ports hit
the same word, the higher-numbered port wins. A read and a write of the same word in
one cycle return the old word. Ordering reads against writes is up to the program.

## Programming the core

Load the program while `run` is low, through the `cfg_*` port (`cfg_we` with
`cfg_target`):

| `cfg_target` | writes |
|---|---|
| 0 | state `cfg_state` of process `cfg_proc`: `cfg_entry` (`state_entry_t`: `en`, `req[48]`, `usage[28]`) |
| 1 | local instruction `cfg_state` of resource `cfg_res`: `cfg_instr` |
| 2 | owner of resource `cfg_res`: `cfg_owner` |
| 3 | address generator `cfg_res` (0–3 Rd, 4–7 Wr): base, length (1–4096), bit-flip width; resets its pointer |

Numbering is in `rtl/smp_pkg.sv`:

- **Resources**, which are the usage-vector bits: Rd 0–3, Wr 0–3, Fout 0–3,
  multiplier, C-adder 0–1, pass forward 0–7, Fin 0–3, output portal.
- **Queues**, in trigger order: input queues 0–7; then feedback queue *k*,*q* at
  8 + 8*k* + *q*; then read queue Q*j* of Rd *k* at 40 + 2*k* + *j*.
- **Pipe-2 operand bus**: input queue *k* head *j* at 3*k*+*j*; Rd *k* at 24+*k*;
  Fout *k* head *j* at 28+3*k*+*j*; Rd *k* Q*j* at 40+2*k*+*j*; constant 0.0 at 48;
  constant 1.0 at 49.
- **Pipe-3 result bus**: multiplier 0, C-adder 0 result 1 and index 2, C-adder 1
  result 3 and index 4, pass forward *k* at 5+*k*.

The instruction formats are the packed structs `ag_instr_t`, `mul_instr_t`,
`cadd_instr_t`, `fin_instr_t` and `sel_instr_t`. A complete program is
`program_core` in `tb/tb_smp_core.sv`: dot product, maximum and bit-flipped copy as
four processes.

Data enter through ready/valid streams `in_*`, one per input queue. Results leave
through `out_valid`/`out_data`, which have no back-pressure. `issue_valid`,
`issue_idx`, `use_vec` and `res_power` show what each process is doing.

Merging threads costs no hardware. Two processes that use the same kind of
resources without sharing queues can be combined into one process: merge their
state lists by priority and own the union of their resources. With 32 states per
process, the combined input processes of the dot product, FIR and FFT (25 states)
fit, and so do their accumulation processes plus the maximum (22 states).
`tb/tb_merged_threads.sv` runs such merges; see Verification.

## Sizes

| parameter | value | origin |
|---|---|---|
| processes | 4 | from the source design |
| pipes | 5, one clock each | five from the source; one clock each is this design's choice |
| Rd / Wr ports | 4 / 4 | from the source |
| pass-forward registers | 8 | from the source |
| C-adders | 2 | from the source |
| data width | 32-bit IEEE single | from the source |
| states per process | 32 | own choice: holds a 25-state merged process |
| input queues | 8 | own choice |
| feedback ports × queues × depth | 4 × 8 × 8 | own choice |
| data memory | 4096 words | own choice: a 1K complex FFT with twiddles |
| local instruction width | 32 | own choice |

## Not built, and other departures

- **Reciprocal / reciprocal square root unit and range clamp.** The block diagram
  shows their outputs in pipe 2 and inputs in pipe 4, but nothing more is known of
  them.
- **Trace of each wave front.** The ports show, per cycle, which processes issued,
  their states, the use vector and the power rails. Instructions, operands and
  addresses in each pipe are visible only inside a simulation. There is no trace
  port.
- **Loop outputs of the process state calculators.** There are four per process, but
  how they count and who uses them is not defined. Without them, a program that
  must repeat a state a fixed number of times needs one trigger per repetition.
  The FIR and FFT tests supply these as tokens in an input queue.

Everything else marked "own choice" in the file headers is a choice made for this
RTL, not taken from a specification:

- the reservation scheme;
- the trigger encoding;
- the instruction layouts;
- the configuration port;
- reset only on control state;
- the one-clock pipes;
- one visible entry per read queue;
- the flush-to-zero arithmetic.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | checks |
|---|---|
| `tb_fp32_mul` | 5000 random products, bit-exact against double-precision products rounded to single (`tb_fp_pkg`); zero, overflow, underflow, NaN |
| `tb_cadder` | random three-operand sums within 1 ulp of the double-precision sum, exact cases, max/min value and index |
| `tb_smp_queue`, `tb_feedback_port` | against a queue model under random push/reserve/pop; heads, avail, full, overflow |
| `tb_process_state_calc` | random triggers and queue status against a reference priority search; reservations; pre-emption |
| `tb_usage_vector_calc`, `tb_local_instr_proc` | ownership routing, violations, instruction read-back |
| `tb_mem_access_proc` | roll-over at 27, stride 5, 1024-point bit flip, hold, restart |
| `tb_data_memory` | four read and four write ports with collisions |
| `tb_power_gate` | rail follows supply and use bit with its delays |
| `tb_smp_core` | whole core, default sizes (see below) |
| `tb_merged_threads` | two threads merged into one process, twice (see below) |
| `tb_fir` | 27-tap FIR filter from data memory (see below) |
| `tb_fft_step` | first radix-4 step of a 16-point complex FFT (see below) |

`tb_smp_core` runs three jobs at once on the full-size core:

- the dot product of two 729-element vectors of small integers, whose sum is exact;
- the maximum of a 729-element random vector;
- an eight-word bit-flipped store, then a linear copy. One state reads the buffer
  into read queue Q0 of Rd 0. A second state, triggered by that queue, writes each
  word to the copy.

It checks the results, and that the 729 products issue in 729 consecutive cycles.
It also counts, and requires at least once each:

- simultaneous issue by several processes;
- a process waiting on its trigger;
- pre-emption by a higher state;
- power gating;
- bit-flipped writes;
- pointer roll-over;
- read-queue pushes and the copies they trigger.

It also checks that no queue overflows and that no ownership violation occurs.

`tb_merged_threads` runs the thread merging described above on the same core:

- Process 0 holds the dot-product input state and the bit-flipped store state.
- Process 1 holds the six dot-product levels and the six maximum levels, sharing
  C-adder 0.

It checks the dot product, the maximum and the stored words. It also requires both
threads of a merged process to be triggered at once, and the lower state to be held
back.

`tb_fir` runs a 27-tap FIR filter, out[*i*] = Σ*t* a[*t*]·B[*i*+*t*]:

- The taps are loaded through a write port.
- Each sample is written into a 27-word circular window. The same wave front moves
  the window's read pointer on by one.
- A read state fetches one tap and one window word into the read queues Q0 of Rd 0
  and Rd 1. Both pointers roll over at 27, so one output's 27 reads end where they
  began.
- A product process fires on those two queues.
- A three-level accumulation (27 = 3³) sends each output to the output portal.

The core has no loop counter, so the stimulus supplies 27 request tokens per
output in an input queue. The test checks 34 outputs exactly and requires the
multiplier to issue on every cycle of each burst of 27.

`tb_fft_step` computes four 4-point DFTs, the first radix-4 step of a 16-point
complex FFT. It treats each output component as a real dot product: the real and
imaginary part of each input meet one coefficient from the real row and one from
the imaginary row.

- A block is stored as nine words: four complex inputs and a zero. Each component
  is therefore nine products, summed in two levels of three.
- After each row, a second state steps the data pointer by 27 modulo 36. This takes
  it back to the start of the block, so the block is reused for all eight rows.
- All 32 components are checked exactly against a direct DFT.

The full 1024-point transform and its twiddle factors are not simulated.

Running a testbench with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/smp_pkg.sv tb/tb_fp_pkg.sv tb/tb_smp_core.sv --top-module tb_smp_core
./obj_dir/Vtb_smp_core
```

Use the same pattern for the other testbenches. `tb_fp_pkg.sv` is needed only by
those that import it.

None of this has been checked against another implementation of the same
architecture. The tests show that the RTL does what is described here.
