# ALTHEA: a 32-bit processor built as a pipeline of handshaking blocks

ALTHEA runs a compact 16-bit instruction set on 32-bit data. It is
organised as a chain of self-timed blocks. No global clock paces the blocks.
Each block talks to its neighbours over request/acknowledge channels, and an
instruction moves on as soon as the next block can take it. The whole
throughput then depends on the slowest block. The main idea of this
microarchitecture is therefore to **rebalance the pipeline**. Each slow
block is cut up or restructured until the block latencies are close:

* **A CISC split stage (ID).** Multi-register PUSH/POP are cut into
  single-register micro-ops in a stage of their own. The decoder therefore
  needs no multi-cycle state machine.
* **A decoder split in two (DE1/DE2).** DE1 decodes and sends the register
  request. DE2 collects the register values and builds the operands. The
  register file works for one instruction while DE2 is still busy with the
  previous one.
* **A register file of 25 separate registers**, each with its own lock bit.
  All reads of an instruction arrive on one merged request channel. There
  are three write channels. Registers that do not depend on each other never
  wait for each other.
* **On-demand operand channels.** The decoder drives only the operand
  channels an instruction uses. It does not send all four with a valid bit.

This repository is a synthesizable SystemVerilog model of that pipeline.
Every handshake channel is modelled as a **clocked valid/ready channel**.
The block structure, channel structure, ordering rules and hazard handling
are kept. The asynchronous timing is not. Cycle counts measured on this
model describe the model, not the self-timed original.

```
            +--------------------------- redirect (branch, JAL) ----------------+
            |                     +----- redirect (JR) -------------------+     |
            v                     |                                       |     |
 imem <-> [ IF: prefetch+predecode -> LERI folder -> instr queue(4) ] -> [ID] -> [DE1] --ctl--> [DE2] -> [EX] -> [ME] <-> dmem
                                                                                  |   ^          ^       |  |     |
                                                                        rd/lock req   |   rd resp|       |  cp   | 3 write channels
                                                                                  v   |          |       |       v
                                                                                 [        RF: 25 registers + locks        ]
                                                                                      +---- status (NZCV) from EX --------+
```

## Instruction set

The 16-bit encoding is this design's own. The original instruction set is
not reproduced. Three things are kept from it: the LERI prefix format, the
13 instruction groups tagged by the predecoder, and the register set.
R0–R15 are general registers. Indices 16–24 are the special registers:

| index | 16 | 17 | 18 | 19 | 20 | 21 | 22 | 23 | 24 |
|---|---|---|---|---|---|---|---|---|---|
| name | SR | LR | ML | MH | SP | SSP | USP | CR | ER |

| bits 15..12 | format | operation |
|---|---|---|
| `11` + imm14 | LERI | extend the immediate of the next instruction |
| `0000` | MISC `f=[11:8]` | 0 NOP, 1 HALT, 2 CPW cr,rs, 3 CPR rd,cr (cr = [3:0]) |
| `0000` | f rd ra | f 4 LDB, 5 LDH rd,[ra+ER]; f 6 STB, 7 STH rd,[ra+ER]. ER is 0 with no LERI in front. Loads zero-extend |
| `0001` | rd rs func | rd = rd op rs. func: 0 ADD, 1 SUB, 2 AND, 3 OR, 4 XOR, 5 CMP |
| `0010` | rd func imm4 | rd = rd op imm. func 6 = LDI (rd = imm) |
| `0011` | rd src func | func 0/1/2 = LSL/LSR/ASR by rs. func 4/5/6 = the same by the immediate in src |
| `0100` | ra rb func | func 0 MUL: {MH,ML} = ra*rb. func 1 MAC: {MH,ML} += ra*rb (unsigned) |
| `0101` | rd rs func | func 0 MOV rd,rs. func 1 MFS rd,S[rs]. func 2 MTS S[rd],rs (S[n] = register 16+n) |
| `0110` / `0111` | rd ra imm4 | LOAD rd = mem[ra+off] / STORE mem[ra+off] = rd |
| `1000` / `1001` | mask12 | PUSH / POP of the registers R0–R11 selected by the mask |
| `1010` | cond disp8 | branch if cond to pc+2+2·disp |
| `1011` | func … | func 0 JAL disp8 (link in LR). func 1 JR rs |

The immediates work as follows:

* With no LERI in front, imm4 is zero-extended and disp8 is sign-extended.
* One to three LERIs in front of an instruction build the extension
  register ER. The first LERI loads its 14 bits sign-extended. Each later
  LERI shifts ER left by 14 and inserts its bits. The instruction's
  immediate is then `{ER, field}`.
* A load/store offset is imm4·4 without LERI, and `{ER, imm4}` with it.
* JAL always uses its sign-extended 8-bit field, so it reaches ±128
  instructions. A farther call loads the target into a register and uses
  JR.
* Branch conditions on the NZCV flags:
  - 0 always, 1 EQ, 2 NE
  - 3 CS, 4 CC, 5 MI, 6 PL, 7 VS, 8 VC
  - 9 HI, 10 LS, 11 GE, 12 LT, 13 GT, 14 LE
  - 15 never
* ADD/SUB/logic/CMP and shifts set the flags. C is the carry out of ADD, and
  "no borrow" for SUB/CMP.

## Fetch: prefetch, predecode, LERI folding, queue (`if_stage`)

Each 32-bit fetch brings two instructions, with the lower halfword at the
lower address.

* The `prefetcher` keeps one fetch in flight. It buffers up to four
  halfwords. It tags each halfword with its address and its group, using
  the `predecode` function in `althea_pkg`.
* The `leri_folder` absorbs LERIs into ER and attaches ER to the next
  instruction. No stage after IF ever sees a LERI, and a prefixed
  instruction costs no extra pipeline slot.
* The four-entry `instr_queue` lets fetching run ahead of decoding.
* A redirect flushes all three units. It also discards a fetch still in
  flight, and skips the lower halfword when the target is an upper one.

## ID: cutting PUSH/POP into micro-ops (`id_stage`)

A PUSH or POP with n registers becomes n micro-ops, one per register, in
ascending register order. Each micro-op carries first/last tags, its index
k and the count n. Other instructions **bypass** the stage. When the stage
is empty they go to DE1 in the cycle they arrive, and they are registered
only if DE1 stalls.

The stack-pointer unit in ME places micro-op k using SP, the value before
the instruction:

* PUSH writes at `SP − 4(k+1)`.
* POP reads from `SP + 4(n−1−k)`.

Only the last micro-op writes the new SP (`SP ∓ 4n`) on write channel 2. A
POP with the same mask therefore restores exactly what the PUSH saved.

## Register locks and the merged read channel (`reg_file`, `de1_stage`, `de2_stage`)

This is the part of the design that replaces pipeline timing. A self-timed
register file cannot know when a result "should" arrive. Each register
therefore has a lock bit instead, and the lock bit alone decides whether its
value is current.

1. **DE1** decodes an instruction. It then sends one request on the merged
   read channel. The request holds up to four source addresses (one per
   read port) and a 25-bit mask of the destinations the instruction will
   write. Instructions that need no register send no request.
2. **RF** holds the request until every source *and* every destination is
   unlocked. While it waits, `lock_stall` is high and no later instruction
   gets past DE1. Waiting on destinations avoids two writes in flight to one
   register; this is this design's choice. RF then reads the sources onto
   the four response ports and sets the destination locks in the same
   cycle. The response appears one cycle after the request is accepted at
   the earliest.
3. **DE2** pairs the response with the control word DE1 sent it. Operand n
   is either the immediate or response port n. Only the operands the
   instruction uses are marked valid. The other channels keep their old
   values, so they do not toggle (on-demand channels).
4. **ME** writes results back on up to three channels at once:
   - port 0: the result or the loaded word;
   - port 1: the high product word;
   - port 2: the stack pointer.

   Each register has its own small arbiter. A write clears the lock at the
   edge where it lands.

Since hazards are handled only by locks, there is no forwarding. A
dependent instruction waits in RF until its producer has written back. This
is the main source of stall cycles. It is visible in the `ev_lock_stall`
strobe.

MAC reads four registers (ra, rb, ML, MH) and writes two (ML, MH). A store
uses three operand channels: base, offset and data.

## Branches and the status channel (`de1_stage`, `ex_stage`)

Branches are resolved in DE1. EX owns the NZCV status register. After every
flag-setting instruction, EX returns the new flags to DE1 on a status
channel. DE1 counts flag-setting instructions that it has issued but whose
status has not yet come back. A conditional branch waits in DE1 until that
count is zero (`ev_status_stall`). It is then decided on DE1's copy of the
flags. Unconditional branches and JAL never wait.

A taken branch or JAL redirects fetch in the cycle DE1 accepts it, and
flushes IF and ID. JAL also sends the return address (pc+2) through the
EX bypass into LR. JR needs a register value, so it is resolved in DE2. DE1
accepts nothing after a JR until DE2 has redirected fetch. There is no
branch prediction and no delay slot. A return is `MFS Rn, LR` followed by
`JR Rn`.

HALT stops DE1 and fetching. The `halted` output rises once everything
older has written back.

## Execution and memory (`ex_stage`, `me_stage`)

EX has these units: a bypass (MOVE, link), an ALU, a barrel shifter, a
single-cycle 32×32→64 multiplier with accumulate, an address adder, and the
coprocessor port. Only the unit chosen by DE1 produces the result.

* A coprocessor write (CPW) completes when its request is accepted.
* A coprocessor read (CPR) waits for the coprocessor's response.
* Instructions with no register write and no memory operation end in EX.

ME's data-align unit handles sub-word accesses, little-endian:

* Word accesses ignore the two low address bits.
* A byte or halfword store drives the byte enables of its lanes and repeats
  its data across the word.
* A byte or halfword load picks its lanes out of the returned word and
  zero-extends them.
* Halfword accesses use address bit 1 only.

ME's output register is the write-back stage.

## Top level (`althea_core`)

Parameters:

* `RESET_PC` (default 0).
* `IQ_DEPTH` (default 4).

Ports:

* Clock and reset: `clk`, `rst_n` (asynchronous, active low).
* **Instruction memory:** `imem_req_valid/ready/addr`,
  `imem_rsp_valid/data`. Word-addressed by byte address. The response comes
  one or more cycles after the request, with one fetch in flight.
* **Data memory:** `dmem_req_valid/ready/we/be/addr/wdata`,
  `dmem_rsp_valid/data`. `be` holds the byte enables of a
  write. A read's response comes later; a write needs none.
* **Coprocessor:** `cp_req_valid/ready` with `cp_req` (read flag, register
  number, data), and `cp_rsp_valid/data`. The coprocessor itself is not part
  of this RTL.
* `halted`.
* Event strobes for profiling:
  - `ev_leri_folded`, `ev_queue_full`;
  - `ev_segment`, `ev_id_bypass`;
  - `ev_lock_stall`, `ev_status_stall`, `ev_redirect`.

All types are in `rtl/althea_pkg.sv`.

## Where this model departs from the original design

* **Clocked handshakes.** Each four-phase bundled-data channel is a
  valid/ready pair sampled on a clock. Latencies are counted in cycles. The
  original's data-dependent stage delays are not modelled.
* **Own instruction encoding**, as above. Programs for the original
  instruction set do not run here.
* **Data memory:** there are no sign-extending byte or halfword loads and
  no misaligned-access handling. The sub-word forms have no offset field of
  their own.
* **Flags are not readable.** The NZCV flags live only in EX's status
  register and DE1's copy of it. SR in the register file is an ordinary
  special register, and MFS from SR does not return the flags.
* **No coprocessor.** Only its channels exist. Its registers and functions
  are not defined, and the testbench stands in for it with a 16-entry
  register file.
* **ID→DE2 channels.** The original adds two channels from ID directly to
  DE2. Here everything DE2 needs travels in DE1's control word.
* **Design choices of this model:**
  - JR is resolved in DE2;
  - RF waits for locked destinations;
  - the status counter in DE1;
  - ER sign extension;
  - the micro-op address formula;
  - the multiplier is unsigned.
* Only the enhanced pipeline is built. The earlier, unbalanced organisation
  (one decode block, one shared register array, fetch queue between folder
  and predecoder) is not built.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/althea_pkg.sv tb/tb_althea_core.sv --top-module tb_althea_core -o sim
./obj_dir/sim
```

Replace `tb_althea_core` with any other testbench name. These testbenches
take the whole core, at its default parameters, through complete programs:

* **`tb_althea_core`** runs one program at the default parameters. The
  program uses:
  - LERI-built constants;
  - ALU, shifter, MUL and four-operand MAC instructions;
  - loads and stores;
  - nested PUSH/POP;
  - taken and not-taken branches, JAL and JR;
  - coprocessor reads and writes.

  The memories answer with random delays. The testbench compares the final
  registers and memory with expected values. It also counts each mechanism
  and fails if one never occurs: LERI folding, queue full, segmentation, ID
  bypass, lock stall, status stall, redirect, four-operand transfer, write
  ports 1 and 2.
* **`tb_althea_kernels`** assembles and runs small integer kernels with
  random data:
  - a bit count;
  - a bubble sort called as a subroutine that saves its registers with
    PUSH/POP;
  - a linear search;
  - a multiply-accumulate sum of squares.

  It checks every result. A typical run decodes about 2,400 instructions in
  about 8,000 cycles with randomly stalling memories.
* Four more programs follow typical embedded benchmarks. Each is assembled
  in its testbench, runs on random data and is checked against a reference
  computed in the testbench:

  | testbench | program | typical run |
  |---|---|---|
  | `tb_althea_qsort` | recursive quicksort of 16 signed words; each level saves LR and its bounds with PUSH, calls itself twice with JAL and returns with POP and JR | ~800 instructions, ~2,700 cycles |
  | `tb_althea_strsearch` | naive substring search of byte strings (LDB), 3-character pattern in a 48-character text, six texts one after another; marks the match with STB and stores the index with STH | ~2,600 instructions, ~9,400 cycles |
  | `tb_althea_dijkstra` | shortest paths from node 0 in an 8-node weighted graph; checked against Floyd–Warshall | ~1,700 instructions, ~7,400 cycles |
  | `tb_althea_sha` | SHA-1 compression of one 512-bit block: schedule expansion and 80 rounds | ~3,200 instructions, ~12,000 cycles |

  About one instruction in 3.5 cycles is typical. Most of the loss comes
  from lock stalls on back-to-back dependent instructions, from redirects,
  and from the random memory stalls.

* **`tb_althea_random`** checks the core against an instruction-set model
  written in the testbench. That model executes the program one
  instruction at a time, with no notion of the pipeline. The test generates
  24 random programs of about 250 instructions each. Together they cover:
  - every ALU, shift and multiply form;
  - LERI immediates;
  - moves to and from special registers;
  - word, byte and halfword memory accesses;
  - PUSH/POP of random lists;
  - conditional branches, JAL and JR over short runs.

  Neighbouring instructions depend on each other densely. After each
  program, all general registers, LR, ML, MH, SP and the whole data memory must
  match the model.

The unit testbenches drive each block with random traffic, or with
directed cases for the decoder, and compare against a reference model
written in the testbench. Each of them has been shown to
fail on a deliberately broken copy of its block.

## How far to trust it

All blocks pass their testbenches under Verilator. They are lint-clean
enough for Verilator and slang, with no suppressed warnings. The
assertions check the handshake rules:

* no instruction queue overflow;
* the prefetch buffer stays within its four entries;
* a DE2 response carries exactly the ports requested;
* RF grants a request only when none of its destinations is locked.

The random-program comparison makes the instruction semantics of the
whole pipeline the best-tested part. The tests cover random and directed
sequences but are not exhaustive. The
likely weak spots are unusual interleavings around redirects during a
PUSH/POP sequence and coprocessor back-pressure. The core synthesises
with Yosys to about 1,800 generic cells and 2,000 flip-flop bits. It has not
been mapped to a cell library or timed. As a clocked model, it says nothing about
the power or latency of a self-timed implementation.
