# Fred: a decoupled processor built from elastic FIFOs

Fred is a pipelined RISC processor whose parts never wait on a global
schedule. Instruction dispatch, the register file and five functional units
are independent processes. They are joined only by FIFO queues that use a
request/acknowledge handshake. Each unit runs at its own, data-dependent
speed. A long divide simply holds its unit while later, shorter instructions
finish around it. The result is a machine that:

- issues instructions **in program order** and lets them **complete out of
  order**;
- turns memory latency into queue occupancy. Loads and other results can be
  queued in advance in the **R1 Queue**, a FIFO that is read through register
  `r1`;
- splits every branch into two halves. A branch instruction *computes* the
  target early. A later `doit` *uses* it. In between, instruction fetch runs
  ahead safely and never speculates;
- keeps **functionally precise exceptions**. When something faults, the
  hardware hands the handler a *set* of instructions: those that faulted plus
  those not yet issued. Everything else is already complete.

This RTL is a synthesizable, single-clock SystemVerilog model of that
organisation. The self-timed channels are modelled as clocked two-phase
handshakes (see next section). The instruction set follows the Fred list
(derived from the Motorola 88100). The binary encoding, the queue depths, the
unit latencies and the exception record are choices made for this
implementation. They are listed in [Departures and limits](#departures-and-limits).

## Channels: two-phase handshakes in a clocked model

Every path between two blocks is a *channel*: a `req` wire, an `ack` wire and
a bundled data word.

- The sender may offer a word when `req == ack`. It places the data and
  toggles `req`.
- While `req != ack` the word is pending, and the data must not change. The
  micropipeline FIFO asserts this rule.
- The receiver takes the word by toggling `ack`.

Only transitions carry meaning; there are no levels and no return-to-zero.
This is the transition signalling of Sutherland-style micropipelines. Here
every `req`/`ack` is a flip-flop, so an event costs one clock, and a
single-hop handshake moves at most one word every two clocks. Nothing in the
logic depends on how many clocks a hop takes. Any unit can be slowed down or
any FIFO made deeper without changing results, which is the property the
self-timed design relies on.

`micropipeline.sv` is the FIFO used for every queue. Each stage is a
C-element (`c_element.sv`, a register that loads when its two inputs agree)
plus a latch. The C-element inputs are the request from the stage before and
the inverted acknowledge from the stage after. When a stage's C-element
changes, its latch captures the previous stage's word. Two properties follow:

- a stalled pipeline of `DEPTH` stages holds `DEPTH` words;
- a streaming pipeline carries one word every two clocks, with a word in
  every other stage, as a real micropipeline does.

A word entering an empty FIFO reaches the output after one clock per stage.

## Organisation

```
            +------------------------------ Dispatch ------------------------------+
 imem <---->| PC, fetch, Instruction Window (8 slots), scoreboard, doit, exceptions |
            +--------------------------------------------------------------------------+
               | operand requests (FIFO)          | issued instr (FIFO)    ^ status x5   ^ Branch Queue
               v                                  v                        |             |
        Register File --operands (FIFO)--> Distributor --> Logic & Bitfield unit ---+      |
          ^  ^   |  ^                           +--> Arithmetic unit ---------------+      |
          |  |   |  |                           +--> Memory unit <-> dmem ----------+      |
   results x5|   |  |                           +--> Branch unit ---(target)--------+------+
             |   v  |                           +--> Control unit (control regs) ---+
             |  R1 Queue
             +----------- r1 results pushed by the Register File, popped per r1 source
```

| Block | File | Role |
|---|---|---|
| Dispatch | `dispatch.sv` | PC, fetch, Instruction Window, in-order issue, completion tracking, `doit`, `rte`, deadlock detection, exceptions |
| Scoreboard | `scoreboard.sv` | one busy bit per register, held inside Dispatch |
| Register File | `register_file.sv` | 32 registers; ordered operand reads; one write channel per unit; pushes and pops the R1 Queue |
| Distributor | `distributor.sv` | pairs each instruction with its operands and routes it to its unit |
| Logic & Bitfield unit | `logic_unit.sv` | `and mask or xor clr set ext extu mak rot ff0 ff1` |
| Arithmetic unit | `arith_unit.sv` | `add addu sub subu cmp mul div divu` |
| Memory unit | `memory_unit.sv` | `ld st xmem` |
| Branch unit | `branch_unit.sv` | `blt ble bne beq bge bgt bb0 bb1 br mvpc`; fills the Branch Queue |
| Control unit | `control_unit.sv` | `getcr putcr trap sync`; holds the exception record |
| R1 Queue, Branch Queue, path FIFOs | `micropipeline.sv` | elastic FIFOs |
| Top | `fred_top.sv` | wires the above together |
| Shared types | `fred_pkg.sv` | opcodes, structs, encoder/decoder |

The five units do not share a result bus. Each has its own result channel
into the Register File and its own status channel back to Dispatch.

## The life of an instruction

1. **Fetch.** Dispatch sends the PC on the instruction-memory request
   channel and waits for the word. It has one fetch outstanding at a time. If
   the Instruction Window (IW) has a free slot, the instruction goes into it.
   Fetching continues while there is room, so the IW also acts as the
   prefetch buffer.
2. **Issue.** Issue takes the oldest unissued slot, strictly in program
   order. The instruction waits until the scoreboard shows none of its source
   registers busy and its destination not busy; this covers RAW and WAW
   hazards. At issue, Dispatch does three things:
   - sets the destination's busy bit;
   - sends an operand request to the Register File;
   - sends the instruction to the Distributor.

   The instruction carries a *tag*, which is its IW slot number. Both
   messages travel through FIFOs.
3. **Operands.** The Register File answers requests in arrival order. So the
   Distributor pairs the head of the instruction FIFO with the head of the
   operand FIFO without any matching.
4. **Execute.** The unit works for as long as it needs:

   | Instructions | Clocks |
   |---|---|
   | add, sub, cmp | 1 |
   | mul | `MUL_CYCLES` |
   | div | 32 |
   | ld, st, xmem | the memory's own latency |
5. **Write back.** The unit sends its result to the Register File, which
   writes the register and clears the busy bit. A result for `r1` goes into
   the R1 Queue instead, and a result for `r0` is dropped.
6. **Complete.** Instructions that can fault report a status by tag: `add`,
   `sub`, `div`, `divu`, loads and stores, `trap`. So do `sync`, `putcr` and
   any writer of `r1`. All other instructions are marked complete as they
   issue. A slot is freed once its instruction is complete and every older
   slot has been freed.

Because step 4 takes data-dependent time, statuses arrive out of order. The
end-to-end test sees an `addu` complete while an older `divu` is still
running.

## The R1 Queue

`r1` is not a register. Writing `r1` pushes a word into the R1 Queue, and
every use of `r1` as a source pops one word. A single instruction pops in
the order `rs1`, `rs2`, then the store-data register. For example, with
queue contents A, B, C, `st r1,r1,r1` stores C at address A+B. Loads aimed
at `r1` let a program fetch data ahead of use. Each read gets a fresh value,
so the queue also renames registers.

Ordering rules:

- At most one writer of `r1` may be in flight. That writer holds `r1`'s
  scoreboard bit, so R1 Queue writes happen in program order.
- A reader of `r1` issues only after the writer has reported completion.

## Decoupled branches: branch, then `doit`

- A branch instruction runs in the Branch unit like any other instruction.
  It pushes `{taken, target}` into the Branch Queue. Conditional branches
  compare `rs1` with zero (`bb0`/`bb1` test bit `rd` of `rs1`). The target
  is `pc + 4*imm` (relative) or the value of `rs2` (absolute).
- The taken target also appears for one clock on `pf_valid`/`pf_addr`. This
  is a prefetch hint for an instruction cache, and it is never wrong.
- A later `doit` changes the PC. `doit` never occupies a window slot or
  reaches a unit. Dispatch stops fetching at the `doit` until the Branch
  Queue has an entry, then pops it and either jumps or falls through.
- Any instruction with the `d` bit set carries an implicit `doit` right
  after it (`addu.d` in the loop below).

Any number of instructions may sit between a branch and its `doit`. They run
whichever way the branch goes. Several branches may be queued before their
`doit`s. The loop below is the canonical example, and the end-to-end test
runs this shape:

```
Loop: subu   r10,r10,1
      bgt    r10,Loop        ; target computed here
      addu   r11,r11,5       ; executes either way
      xor    r12,r11,r10
      addu.d r13,r11,0       ; implicit doit: jump (or not) here
```

## Exceptions

When a unit reports a fault, Dispatch stops issuing and fetching. It waits
until no issued instruction is still in flight, then takes the exception:

- The **exception set** is recorded. It holds the faulted instructions and
  the fetched-but-unissued ones, oldest first. Instructions that already
  completed out of order are not in it.
- The record goes into the Control unit's registers (read with `getcr`):

  | CR | Contents |
  |---|---|
  | 0 `ECAUSE` | cause: 1 overflow, 2 divide by zero, 3 misaligned, 4 trap, 5 R1 deadlock, 6 Branch Queue deadlock, 7 illegal opcode |
  | 1 `EPC` | address of the oldest faulted instruction |
  | 2 `ERESUME` | where `rte` continues; writable with `putcr` |
  | 3 `ECOUNT` | size of the set |
  | 16.. `ESET` | one word per set member: `{pc[31:2], faulted, valid}` |

- Dispatch then clears the IW, releases the faulted destinations in the
  scoreboard, and jumps to `HANDLER_PC` (0x100).

`rte` waits until the window is empty. It then re-fetches the *unissued*
members of the set, in order, and continues at `ERESUME`. Faulted
instructions are not re-executed: the handler sees them in `ESET` and decides
what to do (emulate, fix, or skip). Issue is in order, so every completed
instruction is older than every unissued one. Replaying the unissued members
therefore never repeats completed work. Implicit `doit`s on replayed
instructions are not repeated, because they already took effect at fetch.

**Deadlock detection.** An R1 Queue or Branch Queue can be read by an
instruction that no producer will ever satisfy. Dispatch keeps two counts at
fetch time:

- Branch Queue entries that fetched branches will provide;
- R1 Queue words that fetched producers will provide.

A `doit`, or an `r1` reader, that would wait forever raises an exception
*before* it enters the window. So does an `r1` writer that would leave more
words waiting than the R1 path can hold. That limit is `R1Q_DEPTH + 2`: the
queue, the Register File's push register and one unit's output register.
Past it, the writer could never deliver its word. Its readers wait behind it
on the `r1` scoreboard bit, so the machine would hang.

For these exceptions found at fetch, `EPC` is the address of the offending
instruction and `ERESUME` points at it. A handler that wants to skip it
writes `EPC+4` to `ERESUME`. The handler in the end-to-end test does exactly
this for causes 5 to 7.

**Handler rules in this implementation.** A handler must not leave Branch
Queue entries or R1 Queue words behind, and must not take an exception
itself. Branches that it resolves with its own `doit` are fine.

## Instruction encoding

```
 31      26 25 24  20 19  15 14 13                 0
+----------+--+------+------+--+---------------------+
|  opcode  |d |  rd  | rs1  |i | imm14 (sign-ext.)   |   i = 1
+----------+--+------+------+--+---------------+-----+
|  opcode  |d |  rd  | rs1  |0 |       0       | rs2 |   i = 0
```

Opcodes are the `op_e` values in `fred_pkg.sv`, and `fred_pkg::enc()`
assembles a word.

- Bit-field instructions take the width in `b[9:5]` (0 means 32) and the
  offset in `b[4:0]`.
- `ff0`/`ff1` return the bit number of the most significant 0 or 1, or 32 if
  there is none.
- `cmp` returns the 88100 condition string: bit 2 eq, 3 ne, 4 gt, 5 le,
  6 lt, 7 ge, 8 hi, 9 ls, 10 lo, 11 hs.
- `st rd,rs1,b` stores `rd` at `rs1+b`. `xmem` swaps `rd` with memory.
- `mvpc rd,imm` writes `pc+4*imm`.

## External interfaces

All interfaces are two-phase channels.

| Ports | Use |
|---|---|
| `if_req/if_ack/if_addr` | fetch request (byte address) |
| `ir_req/ir_ack/ir_data` | fetched word |
| `dm_req/dm_ack/dm_data` | data request: `dmem_req_t` = read / write / swap, address, write data |
| `dr_req/dr_ack/dr_data` | data response; one word per request, writes included |
| `pf_valid/pf_addr` | prefetch hint, a one-clock pulse |

Reset (`rst_n`, asynchronous, active low) clears every register, queue and
handshake wire. Fetch starts at `RESET_PC`.

## Parameters (`fred_top`)

| Parameter | Default | Meaning |
|---|---|---|
| `IW_DEPTH` | 8 | Instruction Window slots; also the largest exception set. Tags are 4 bits, so at most 16 |
| `FIFO_DEPTH` | 2 | stages in the instruction, operand-request and operand FIFOs |
| `R1Q_DEPTH` | 8 | R1 Queue stages; Dispatch allows `R1Q_DEPTH + 2` outstanding R1 words |
| `BQ_DEPTH` | 4 | Branch Queue stages |
| `MUL_CYCLES` | 4 | multiply latency |
| `RESET_PC` | 0 | first fetch address |
| `HANDLER_PC` | 0x100 | exception handler address |

The architecture fixes 32 registers, the five units and the instruction
list. Every other number above is this implementation's choice.

## Simulating

Each module is in `rtl/<name>.sv`. `fred_pkg.sv` must be read first. Every
testbench in `tb/` is self-checking and ends with
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fred_pkg.sv tb/tb_fred_top.sv --top-module tb_fred_top -o sim
./obj_dir/sim
```

`tb_fred_top` runs a hand-assembled program with behavioural memories
(`tb/fred_imem_model.sv`, `tb/fred_dmem_model.sv`) at the default
parameters, in about 1,250 clocks. The program covers:

- RAW stalls and out-of-order completion;
- the R1 Queue, including `st r1,r1,r1`;
- the loop above, an explicit `doit`, and a `br` skipping an instruction;
- `trap`, a `doit` with no branch, an `r1` read with no producer, an R1
  Queue that would overfill, a signed overflow and an illegal opcode, all
  through a real handler;
- `sync`, `xmem`, `mvpc` and `getcr`.

It checks final registers and memory. It also counts each mechanism (stalls,
out-of-order completions, taken and fall-through `doit`s, implicit `doit`s,
queue traffic, exceptions, replays, prefetch hints, a full window) and fails
if any count is zero.

`tb_fred_loop` runs the decoupled loop alone, also at the default
parameters, for six iterations. It checks the registers against a model of
the loop. It also checks that each new iteration is fetched while the
previous iteration's `mul` and `addu.d` are still waiting in the window, and
that every taken loop branch sends one prefetch hint.

The unit testbenches (`tb_<module>`) compare each block with an independent
reference model on random and corner-case inputs. They also check the stated
latencies: mul, div and add in the arithmetic unit, and the fill latency,
capacity and streaming rate of the micropipeline.

## Departures and limits

- **Clocked, not self-timed.** The handshakes and the elasticity are real.
  Delays are whole clocks, and there are no delay elements or
  completion-detection circuits.
- **`doit` occupies no window slot.** It blocks fetch instead, which gives
  the same prefetch behaviour. In the original organisation a `doit` can sit
  in the window until its target arrives.
- **Exception details are this implementation's.** The architecture leaves
  the mechanism open. The replay scheme, the control-register map, the
  handler address and the handler rules above all belong to this design.
  Nested exceptions are not supported. A faulted instruction that popped R1
  Queue words cannot be replayed with the same values.
- **Deadlock detection is partial.** It covers a queue with no producer
  left and an R1 Queue that would overfill. A full Branch Queue is not
  checked. Dispatch consumes `doit`s at fetch, so a full Branch Queue only
  hangs when more than a window's worth of instructions sits between the
  branches and their `doit`s.
- **No forwarding** between units. Results always go through the Register
  File or the R1 Queue.
- **Memories are outside the design.** One data access and one fetch are
  outstanding at a time.
- **The Distributor delivers in order.** An instruction whose unit is busy
  also holds back later instructions bound for other units.
