# Monadic dataflow processor element

A dataflow processor of the Explicit Token Store (ETS) kind wastes ALU
slots. Each dyadic instruction (an instruction with two operands) is
reached by two tokens. The first one finds its rendezvous slot empty. It
parks its value in the activation frame and stops, and the ALU gets a
no-op (a *bubble*) in that cycle. If a program were made only of dyadic
instructions, half of all ALU slots would be bubbles. Real programs reach
about 70 % utilisation, because many of their instructions are monadic.

The Monadic processor element fills those slots. It keeps tokens bound
for monadic instructions in a queue of their own. When the pipeline finds
that a dyadic instruction cannot proceed, it takes a monadic token from
that queue. A second fetch stage, IF1, fetches the token's instruction and
feeds the ALU in the slot that would otherwise be a bubble.

This repository is synthesizable SystemVerilog for that processor element:

- the five-stage circular pipeline;
- two LIFO token queues;
- the presence-bit, frame and code memories;
- counters that measure ALU utilisation.

Each block has a self-checking testbench. Two testbenches run dataflow
programs on the whole processor.

## The pipeline

```
          +-------------------------------------------------------------+
          |                                                             |
   dyadic queue (LIFO, high priority)   monadic queue (LIFO, low priority)
          |            \                     /          |               |
          |             +--- token_select --+           | sync-non-     |
          |                   |                         | achieved pop  |
          v                   v                         v               |
        IF  instruction fetch  <---- code memory ---->  IF1 (latch token)|
          |                                             |               |
        SC  sync check  <-> presence bits               |               |
          |      \__ sync-non-achieved ________________/                |
          v                                             v               |
        OM  operand matching <-> frame memory          IF1 fetch        |
          |                                             |               |
          +-------------------- OR ---------------------+               |
                                 |                                      |
                    FTA   ALU  ||  form-tag                             |
                                 |                                      |
                    FT    form-token --> token_router ------------------+
                                            (S=1: dyadic, S=0: monadic)
```

All stages take one clock each and register their outputs. A token popped
at clock edge *k* moves as follows:

| edge | register loaded | work done in the cycle before it |
|------|-----------------|----------------------------------|
| k    | IF → SC (token leaves its queue) | `token_select` picks the token; code memory read at its `s` |
| k+1  | SC → OM         | presence bit at `c+r` read and written back; sync-non-achieved decided (and, if so, a monadic token leaves its queue into the IF1 latch) |
| k+2  | OM/IF1 → FTA    | frame memory read or written; IF1 fetches its instruction |
| k+3  | ALU and form-tag outputs | `v' = op(v_l, v_r)`; destination tags |
| k+4  | queues          | form-token builds 0, 1 or 2 tokens; `token_router` pushes them |

A token accepted from the host at edge *e* reaches the output of an OUT
instruction in the cycle after edge *e+4*. IF takes one token in every
cycle in which a queue holds one. The only exception: IF1 has just taken
the last monadic token and the dyadic queue is empty. The pipeline never
stalls. Any instruction can be followed in the next cycle by another that
uses the same rendezvous slot. This works because each memory is read and
written inside a single stage:

- SC reads and writes back the presence bit within its cycle.
- OM reads and writes the frame memory within its cycle.

## Sync-non-achieved and the IF1 fill-in

This path is the point of the design.

1. In cycle *t*, SC holds a dyadic instruction whose presence bit at `c+r`
   is clear. SC sets the bit and drives `sna` (sync-non-achieved)
   combinationally.
2. In the same cycle, `token_select` sees `sna`. If the monadic queue is
   not empty, it pops the queue's top token into the IF1 input latch at
   the end of cycle *t*. SC also registers `sna` together with the token
   for OM.
3. In cycle *t+1*, OM writes the token's value into the frame memory and
   emits nothing. In parallel, IF1 reads the latched token's instruction
   from the code memory's second read port. IF1 then registers an operand
   packet: the token value as `v_l` and the instruction's immediate as
   `v_r`.
4. In cycle *t+2*, the ALU and form-tag stage receive IF1's packet
   instead of a bubble. OM and IF1 can never both deliver in the same
   cycle. An assertion in `monadic_pe` checks this.

If the monadic queue is empty at step 2, the slot is lost: this is a
bubble.

In one cycle, IF may also want a token from the monadic queue, because the
dyadic queue is empty. Then the queue gives two tokens:

- IF1 gets the top token.
- IF gets the one below it.

If only one monadic token is left, IF1 gets it and IF idles for that
cycle. The monadic queue therefore has two pop ports. It also has two push
ports, because form-token can produce two monadic tokens in one cycle.

## Tokens and instructions (`monadic_pkg`)

A token `<c.s_p, v>` has these fields:

| field | width | meaning |
|-------|-------|---------|
| `ctx` (c) | 8 | activation frame base; also the width of the frame and presence addresses |
| `ip` (s) | 8 | instruction address |
| `port` (p) | 1 | 0 = left operand, 1 = right operand |
| `value` (v) | 32 | data |

An instruction (`instr_t`) has these fields:

- `op`: the opcode.
- `mf`: the matching function, monadic or dyadic.
- `r`: the frame offset. The rendezvous slot is at `c + r` modulo 256.
- `imm`: a 16-bit immediate, sign-extended. It is the second operand of a
  monadic instruction, which makes "instruction with a constant input"
  possible.
- Two destinations `d1`/`d2`, each with an address and a port.
- Valid bits `d1v`/`d2v` for the two destinations.
- S bits `s1`/`s2`. An S bit is 1 when its destination is a dyadic
  instruction, which sends the new token to the dyadic queue.

All new tokens keep the context of the instruction that produced them.

The matching function is the basic ETS one:

- A dyadic instruction toggles its presence bit.
- Empty → full means *not yet*. The token's value is parked in the frame.
- Full → empty means *go*. The parked value is read back, and the operands
  are ordered by the arriving token's port.
- A monadic instruction touches neither memory.

Opcodes (`op_t`):

- Arithmetic and logic: `ID`, `ADD`, `SUB`, `MUL`, `AND`, `OR`, `XOR`.
- Comparisons, signed, with a 0/1 result: `LT`, `GT`, `EQ`.
- `STEER`: passes `v_l` to destination 1 if `v_r != 0`, otherwise to
  destination 2. This is a dataflow switch, needed for loops.
- `OUT`: sends `v_l` and the context to the host output instead of
  forming a token.

The form-tag stage handles the routing of `STEER` and `OUT`, using `v_r`,
which it sees at the same time as the ALU.

## Token queues

Both queues are instances of `token_lifo`. It is a register-array stack
with:

- 0–2 pushes and 0–2 pops per cycle. Pops are applied first, then pushes
  in order.
- `top` and `next` outputs.
- An occupancy count.

LIFO order makes execution run depth-first: the most recently produced
token is served first. Giving the dyadic queue priority means a dyadic
instruction that is ready to go interrupts a run of monadic work.

A push into a full queue is dropped and sets the sticky `overflow` flag.
The pipeline is non-blocking by design, so it has no back-pressure on
form-token. Host tokens are the only input that can wait: `in_ready` is
low when form-token already sends two tokens to the same queue in that
cycle. Size the queues for the program's parallelism; both default to
32 entries.

## Utilisation counters

`monadic_pe` counts three things:

- `ops_executed`: ALU slots used plus bubbles.
- `bubbles`: a dyadic instruction could not proceed and the monadic queue
  was empty.
- `if1_fills`: monadic tokens issued to IF1.

ALU utilisation is `(ops_executed - bubbles) / ops_executed`. Every
sync-non-achieved event ends in either a fill or a bubble. A plain ETS
pipeline would have lost every one of these slots.

## Host interface of `monadic_pe`

| port | use |
|------|-----|
| `cm_we`, `cm_waddr`, `cm_wdata` | write one instruction into the code memory |
| `in_valid`, `in_tok`, `in_s`, `in_ready` | inject a token; `in_s` = 1 if it is bound for a dyadic instruction |
| `out_valid`, `out_ctx`, `out_value` | one-cycle pulse for each OUT instruction executed |
| `busy` | tokens queued or in flight; low means the program has finished |
| `ops_executed`, `bubbles`, `if1_fills` | counters, cleared by reset |
| `m_overflow`, `d_overflow` | sticky queue-overflow flags |

Reset is synchronous and active low. It empties the queues, clears all
presence bits, the stage valid bits and the counters. It does not clear
the code memory, so a loaded program survives reset.

Parameters: `MQ_DEPTH` and `DQ_DEPTH`, the queue depths, both 32 by
default. Widths are set in `monadic_pkg`.

## Writing programs: the factorial example

Both system testbenches use this iterative factorial graph. One activation
uses four frame slots (`r` = 0..3):

```
0 FORKN ID  (monadic)        n   -> 1 CMP, 2 STN.l
1 CMP   GT n,#0 (monadic)    c   -> 2 STN.r, 3 STA.r
2 STN   STEER (dyadic, r=0)  n   -> 4 FORK2 if c, else dropped
3 STA   STEER (dyadic, r=1)  acc -> 6 MUL.l if c, else 7 OUT
4 FORK2 ID  (monadic)        n   -> 6 MUL.r, 5 DEC
5 DEC   SUB n,#1 (monadic)       -> 8 GATE.l
6 MUL   MUL (dyadic, r=2)    acc*n -> 3 STA.l, 8 GATE.r
7 OUT   OUT (monadic)
8 GATE  ID  (dyadic, r=3)    n-1 -> 0 FORKN
```

Start an activation in context `c` by injecting two tokens:

- `<c.3_0, 1>` with `in_s = 1`;
- `<c.0_0, n>` with `in_s = 0`.

GATE makes iteration *i+1* wait for the product of iteration *i*.
Without it, a fast iteration could send two tokens to the same port of a
slot, and a single presence bit cannot tell them apart.

To run several activations in parallel, give each its own context with
non-overlapping slots, for example `c = 4k`.

## Files

| file | block |
|------|-------|
| `rtl/monadic_pkg.sv` | widths, token/instruction/stage types |
| `rtl/monadic_pe.sv` | top: the processor element |
| `rtl/token_lifo.sv` | LIFO token queue (monadic and dyadic) |
| `rtl/token_select.sv` | queue priority and the IF/IF1 split |
| `rtl/code_memory.sv` | instruction memory, two read ports |
| `rtl/if_stage.sv` | instruction fetch |
| `rtl/sc_stage.sv` | sync check |
| `rtl/presence_memory.sv` | presence bits |
| `rtl/om_stage.sv` | operand matching |
| `rtl/frame_memory.sv` | frame (operand) memory |
| `rtl/if1_stage.sv` | extra instruction fetch |
| `rtl/alu.sv` | ALU |
| `rtl/form_tag.sv` | destination tags, STEER/OUT routing |
| `rtl/form_token.sv` | new tokens and host output |
| `rtl/token_router.sv` | writes new and host tokens into the queues |

Each file has a testbench `tb/tb_<name>.sv`. The system-level testbenches
are:

- `tb/tb_monadic_pe.sv`: latency check, then eight factorials in parallel
  at the default sizes. It checks every result and the rate of one token
  per cycle into IF. It also checks that each mechanism occurs: a
  sync-non-achieved, an IF1 fill, a bubble, the dyadic queue winning over
  a non-empty monadic queue, two monadic pops in one cycle, and two
  pushes into one queue.
- `tb/tb_workload_factorial.sv`: factorial at N = 2, 8, 32 and 128, with
  counters.
- `tb/tb_random_graphs.sv`: twelve random acyclic dataflow graphs, each
  run in six contexts at once. The graphs mix monadic, dyadic and fork
  nodes. Each result is compared with the graph evaluated in the
  testbench. After every run, all presence bits must be clear again.

## Simulating

With Verilator 5, from the repository root. The package goes first:

```
verilator --binary --timing --assert -Irtl rtl/monadic_pkg.sv \
  $(ls rtl/*.sv | grep -v monadic_pkg) tb/tb_monadic_pe.sv \
  --top-module tb_monadic_pe -o sim
./obj_dir/sim
```

A unit testbench needs only the package, its module and the testbench.
For example: `rtl/monadic_pkg.sv rtl/token_lifo.sv tb/tb_token_lifo.sv`.

Every testbench ends with a line `TB_RESULT checks=N failures=M`. Each
also has a watchdog that ends the run with a failure if it hangs.

## Measured behaviour

Eight factorials in parallel (n between 0 and 12): 467 ALU operations,
34 bubbles, 178 slots filled by IF1, 92.7 % utilisation. A plain ETS
pipeline would have lost all 212 sync-non-achieved slots on the same
program.

A single iterative factorial has little parallelism. Each of its
iterations issues two first-arriving dyadic tokens and has only a few
monadic tokens available.

| N | operations (incl. bubbles) | bubbles | IF1 fills | utilisation |
|---|---|---|---|---|
| 2 | 26 | 5 | 5 | 80.8 % |
| 8 | 86 | 17 | 17 | 80.2 % |
| 32 | 326 | 65 | 65 | 80.1 % |
| 128 | 1286 | 257 | 257 | 80.0 % |

The original evaluation reports over 90 % at N = 8 and over 98 % at
N = 32. That evaluation used a recursive factorial, whose many concurrent
calls keep the monadic queue full. That program cannot be run here (see
below), so these figures are not comparable with it.

## Where this design departs from the original, and its limits

Taken from the original description:

- the stage structure, IF/SC/OM‖IF1/ALU‖form-tag/FT;
- the split token store: presence bits separate from frame values;
- the two queues, their priority and their LIFO order;
- the S1/S2 bits;
- the sync-non-achieved path to OM and the monadic queue;
- the code memory shared by both fetch stages;
- the utilisation measure.

Choices made here, where the original gives no detail:

- All widths: 32-bit data, 8-bit context and instruction address, 16-bit
  immediate. Memory sizes of 256 entries. Queue depth 32.
- The instruction fields beyond `<op, r, dest>` and S1/S2, and the opcode
  set. The original names only the identity instruction.
- When IF and IF1 both want a monadic token in one cycle, IF1 takes the
  top and IF the next.
- On overflow, tokens are dropped and a flag is set. There is no
  back-pressure.
- The host ports for program load, token injection and results.
- Only the basic dyadic matching function is built. Other presence-bit
  state machines of Monsoon-style processors are not.

Not built:

- Function calls. The design has no context allocation and no way to
  send tokens to another frame. The recursive factorial cannot run, and
  the host chooses the contexts.
- The I-structure memory used by the matrix-multiply and wave benchmarks.
  Its interface is not defined, so those benchmarks cannot run.
- The ETS baseline pipeline, which serves only as a reference for
  comparison.
