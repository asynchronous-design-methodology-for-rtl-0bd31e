# A self-timed 32-bit ALU with a dual-rail domino carry chain

This ALU has no clock that sets its cycle time. Each bit slice is a domino
gate. It precharges to an "empty" state, then evaluates once the operands are
there. The carry between slices is sent on two wires, "carry is 0" and
"carry is 1", so the carry chain itself tells when the addition has finished.
A slice that *generates* a carry (both conditioned operand bits 1) or *kills*
it (both 0) knows its carry out at once. Only a slice that *propagates* (bits
differ) waits for the carry from below. A C-element tree watches all 32
carries and raises the output request as soon as the last one is known. A
typical add therefore finishes in the time of its longest propagate run,
not of a full 32-bit ripple.

The design follows the paper "Asynchronous Design Methodology for an
Efficient Implementation of Low power ALU", which gives the bit slice at
transistor level, the sixteen-function table and the signalling building
blocks. This RTL is an independent gate-level rendering of that design. It
fills in the word-level control, which the paper describes only in outline.
The section "Departures and open points" lists every place where it does so.

## Timing model: one clock tick per gate delay

A self-timed circuit has no clock, but RTL simulators and synthesis tools
need one. Here **every state-holding element is a flip-flop on the rising
edge of `clk`**. That covers each Muller C-element, each domino carry node
and the operand capture register. One tick stands for one gate delay. The
circuits are delay-insensitive: they wait for a completion signal, not for a
number of ticks. Their results therefore do not depend on this choice; only
the latencies quoted below, counted in ticks, do.

`rst_n` is an asynchronous, active-low reset. It leaves every C-element at 0
and every dual-rail node empty, which is the paper's initial state.

## Dual-rail code and the C-element (`dr_pkg`, `c_element`)

A dual-rail bit `{f, t}` is `{1,0}` for a valid 0, `{0,1}` for a valid 1 and
`{0,0}` for *empty*. `{1,1}` is never used. A bit must pass through empty
between two data values (4-phase, return-to-zero). `dr_pkg::dr_bit_t` is this
pair, packed as `{f, t}`.

The Muller C-element follows its inputs when they agree and holds otherwise:
`z' = a·b + z·(a+b)`. A rising output therefore proves that both inputs are 1,
and a falling output that both are 0. This is the basis of every completion
signal in the design.

`dr_protocol_checker` turns the code rules into hardware. It raises
`bad_code` on a `{1,1}` and `bad_step` on a direct 0↔1 change. A sticky `err`
holds either until reset. The ALU uses it to watch its own carry chain.

## The bit slice (`alu_slice`)

Each slice first conditions its operands:

* `x` passes bit `a` true, complemented or as zero (`a_sel_t`).
* `y` passes bit `b` true or complemented.

From the conditioned bits it forms generate `g = a·b`, kill `k = ā·b̄` and
propagate `p = a⊕b`.

**Arithmetic mode (`add = 1`).** The carry out is two domino nodes:

    cout.t  is set by  g | p·cin.t
    cout.f  is set by  k | p·cin.f

While `eval` is 0 both nodes are precharged to empty. While `eval` is 1 a node
can only be set, never cleared, so a carry that has evaluated stays put even
if the carry-in later returns to empty. The sum is the dual-rail XOR of `p`
with the carry in, `p·cin.f | p̄·cin.t`. It is 0 until the carry in is valid.

**Logic mode (`add = 0`).** The result is AND, XOR or OR (`func`) of the
conditioned bits. The carry goes straight to a valid 0, so completion
detection is not held up by an unused chain.

The result is single-rail and is bundled with the carry chain: it is correct
once that slice's carry in and carry out are valid. The slice also asserts
that its carry never shows `{1,1}`.

## Function decoder (`alu_opdec`)

All slices share one control word. The function codes use the ARM
data-processing numbering, because the function list is the ARM ALU's.

| code | function | operation | a | b | carry into bit 0 |
|---|---|---|---|---|---|
| 0 | AND | AND | true | true | – |
| 1 | EOR | XOR | true | true | – |
| 2 | SUB | add | true | complement | 1 |
| 3 | RSB | add | complement | true | 1 |
| 4 | ADD | add | true | true | 0 |
| 5 | ADC | add | true | true | `c_flag` |
| 6 | SBC | add | true | complement | `c_flag` |
| 7 | RSC | add | complement | true | `c_flag` |
| 8 | TST | AND | true | true | – |
| 9 | TEQ | XOR | true | true | – |
| 10 | CMP | add | true | complement | 1 |
| 11 | CMN | add | true | true | 0 |
| 12 | ORR | OR | true | true | – |
| 13 | MOV | OR | zero | true | – |
| 14 | BIC | AND | true | complement | – |
| 15 | MVN | OR | zero | complement | – |

The a and b columns and the basic operation come from the paper's table. The
carry-in column is ordinary two's-complement arithmetic. For subtraction the
carry out is therefore "no borrow". TST, TEQ, CMP and CMN produce the same
value and carry as AND, EOR, SUB and ADD. There is no flag register.

## Carry chain and completion detection (`async_alu32`, `completion_detector`)

This is the part that sets the ALU's speed.

The carry into bit 0 is turned into dual-rail and driven only while `eval` is
high. Slice *i* takes its carry in from slice *i−1*. `completion_detector` ORs
the two rails of each of the 32 carry-outs into a "has data" flag. It merges
the flags with a balanced tree of C-elements: five levels for 32 bits, padded
to a power of two by repeating bit 0. Its output rises only when *every*
carry is valid and falls only when *every* carry is empty again. That output
is `req_out`.

Let *L* be the settling time of the slowest carry:

* for a generating or killing slice, t = 1;
* for a propagating slice, t = its lower neighbour's t + 1, with bit 0's
  neighbour counting as 0;
* in logic mode, every slice has t = 1.

`req_out` rises on the **(1 + L + log2 W)-th rising edge**, counted from the
edge at which `eval` rises. At W = 32 that is:

| case | example | ticks |
|---|---|---|
| best | logic function, or `a == b` in ADD | 7 |
| worst | full ripple, e.g. `0xFFFFFFFF + 0` | 38 |
| 1000 uniformly random ADDs | | 8 to 23, mean 11.4 |

The testbenches check this formula exactly on every operation.

## The stage and its handshake (`async_alu32`)

The ALU is one stage of a micropipeline. A one-stage Muller pipeline
(`muller_pipeline #(.N(1))`, a single C-element) computes
`eval = C(req_in, ~ack_out)`:

* On the edge where `eval` rises, the capture register loads `op`, `a`, `b`
  and `c_flag`. The slices evaluate from these held copies.
* `ack_in` is `eval`.
* `eval` falls, which precharges the slices, only after the sender has
  dropped `req_in` and the receiver has raised `ack_out`.

Both channels are 4-phase (return to zero):

    sender:   drive op/a/b/c_flag, raise req_in
              wait ack_in = 1, drop req_in        (inputs may now change)
              wait ack_in = 0
    receiver: wait req_out = 1, read result/cout, raise ack_out
              wait req_out = 0, drop ack_out

`result`, `cout` and `cout_dr` are valid from `req_out` rising until the
receiver has acknowledged. A new evaluation cannot start before the chain
has precharged to empty and the receiver has dropped `ack_out`. The
C-element holds `eval` low until then, so the sender may raise the next
request at any time after `ack_in` falls.

## The dual-rail pipeline (`dr_pipeline`, `muller_pipeline`)

`muller_pipeline` is the bare handshake pipeline: stage *i* is
`C(C[i−1], ~C[i+1])`, all stages start at 0, and N = 3 by default.

`dr_pipeline` carries data: each stage holds a W-bit dual-rail word in one
C-element per rail. The stage's acknowledge is its completion signal. The
defaults are one bit and three stages. Because data and empty spacers
alternate, three stages hold at most two words at once.

The paper uses this pipeline to explain its signalling and does not place it
inside the ALU. The top module therefore carries it beside the ALU, with its
own `pl_` ports.

## Files and hierarchy

    async_alu_top            top: ALU and dual-rail pipeline side by side
    ├── async_alu32          32-bit ALU stage
    │   ├── muller_pipeline  (N=1) stage controller → eval
    │   ├── alu_opdec        function decoder
    │   ├── alu_slice ×W     domino bit slices
    │   ├── completion_detector (W)
    │   │   └── c_element ×(W−1)
    │   └── dr_protocol_checker on the carry chain
    └── dr_pipeline          (W=1, N=3)
        ├── c_element ×2 per bit per stage
        └── completion_detector per stage
    dr_pkg                   dual-rail type, enums, control word

Parameters: `async_alu_top #(W=32, PL_W=1, PL_N=3)`, `async_alu32 #(W=32)`,
`completion_detector #(W=32)`, `dr_pipeline #(W=1, N=3)`,
`muller_pipeline #(N=3)`, `c_element #(INIT=0)`,
`dr_protocol_checker #(W=32)`. The ALU has been simulated at W = 32 and W = 8.

## Departures and open points

* **Gate level, not transistor level.** The paper's slice is a 53-transistor
  domino circuit. Here it is written from its function: the signal names and
  the function table are kept, the netlist is not. The precharge and buffer
  transistors of the layout have no RTL counterpart.
* **Control width.** The slice has a 2-bit `x`, because the function table
  needs three a-input choices, and a 2-bit `func` for AND/XOR/OR.
* **Carry in logic mode** resolves to 0 at once. This is a choice of this
  RTL.
* **Capture register and stage wiring** are this design's. The paper names
  bundled data in a Sutherland micropipeline but gives no circuit. Without the
  register, operands changing after `ack_in` corrupted a still-evaluating
  carry chain.
* **Completion detection covers the carry chain only.** Each sum bit is a
  function of signals already inside the detected set.
* **No status flags** (N, Z, C register, V). The compare and test functions
  only produce a value and a carry.
* **Timing numbers are in ticks.** The paper's nanosecond delays and its
  power figures come from transistor simulation and cannot be reproduced
  here.
* `dr_protocol_checker` is an addition that checks the code rules in
  hardware.

## Verification

Every testbench is self-checking, has a watchdog and prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_c_element` | random inputs against `z' = ab + z(a+b)`; reset value; hold cases |
| `tb_muller_pipeline` | every tick against a reference model; handshakes in = out |
| `tb_completion_detector` | W=32, random fill/drain order; done timing exactly log2 W |
| `tb_dr_pipeline` | W=1 and W=4: order, code rules, two words in flight |
| `tb_dr_protocol_checker` | legal traffic silent; `{1,1}` and 0↔1 flagged; `err` sticky |
| `tb_alu_slice` | all input combinations: precharge, early resolve, waiting on the carry, hold; four-step add 0011+0101 with carry-in 1 gives 1001, carry rails f=1000, t=0111 |
| `tb_alu_opdec` | all 16 functions on random operands against their arithmetic definitions |
| `tb_async_alu32` | 3000+ random operations through both handshakes; result, carry and exact latency |
| `tb_async_alu_top` | whole design at default parameters, ALU and pipeline running together; see below |
| `tb_alu_random_add` | 1000 random 32-bit ADDs; latency best/worst/mean |

`tb_async_alu_top` counts each mechanism and fails if any never happens:

* all sixteen functions;
* carry-in taken from the flag;
* early completion and full 32-bit ripple;
* a precharge after every operation;
* a receiver that holds a result;
* no carry-code breach;
* two words in flight in the pipeline;
* the pipeline stalling its sender.

All testbenches pass, and each run takes well under a second.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl rtl/dr_pkg.sv \
        tb/tb_async_alu_top.sv --top-module tb_async_alu_top
    ./obj_dir/Vtb_async_alu_top

Replace the testbench name to run any other. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/dr_pkg.sv rtl/<module>.sv`.

The lint warnings that remain are expected:

* `SYNCASYNCNET`: `rst_n` is both the flip-flops' asynchronous reset and the
  slice assertion's `disable iff`.
* Unused `clk`/`rst_n` in a one-bit completion detector.
* The unused `req_out` of the one-stage Muller pipeline, which equals its
  `ack_in`.
* The checker's unconnected detail outputs.
