# Resilient QDI pipelines with input/output-interlocking SR-latch buffers

Quasi-delay-insensitive (QDI) circuits have no clock. Every stage accepts data
whenever its handshake says it may, which makes them robust against delay
variation but exposes them to transient faults (single event transients,
SETs): while a stage is waiting for data, a spurious pulse on a wire looks
just like a real transition and is captured. A plain weak-conditioned half
buffer (WCHB) will even capture both rails of a dual-rail bit and pass the
illegal code word (1,1) down the pipeline, where nothing can remove it.

This repository holds synthesizable SystemVerilog for a hardened WCHB style,
here called **theta** (input/output interlocking with SR latches), and for two
4-bit circuits built entirely from it: an empty pipeline (FIFO) and a
pipelined shift-and-add multiplier. The theta buffer does two things:

* an **input interlock**: an SR latch decides which rail of a bit rose first
  and refuses the other one, so an illegal pair at the input is never passed
  on;
* an **output interlock**: a rail can only be armed while the other rail's
  output is low, so a flip of one output cannot be joined by the other.

The price of enforcing a legal code is that a transient that wins the race
turns into a *value* error instead of a *coding* error. The buffer does not
correct errors; it keeps the pipeline's code words legal.

## Dual-rail four-phase handshake

Each bit travels on two wires, `t` and `f` (`qdi_pkg::dr_t`):

| (t, f) | meaning |
|--------|---------|
| (0, 0) | spacer, separates tokens |
| (1, 0) | token "1" |
| (0, 1) | token "0" |
| (1, 1) | illegal |

A channel is a word of such bits plus an acknowledge wire running backwards.
The protocol is four-phase return-to-zero: the sender places a token, the
receiver raises `ack` once every bit is valid, the sender returns all bits to
the spacer, the receiver lowers `ack` once every bit is a spacer.

A WCHB stage (`theta_reg`) holds one token or one spacer. Its enable is the
inverted acknowledge of its successor (`en = ~ack_in`): with `en = 1` it is
armed for a token, with `en = 0` for the spacer. Its own acknowledge to the
predecessor (`ack_out`) comes from a completion detector
(`completion_detect`): an OR per bit and one C-element over all bits.

The state-holding gate everywhere is the Muller C-element (`c_element`): the
output copies the inputs when they all agree and holds while they disagree.
The C-element+ (`c_element_plus`) adds a positive input that must be 1 for
the output to rise but is ignored for the fall.

## The theta buffer bit

`theta_bit` is one dual-rail bit. For the true rail (the false rail is the
mirror image):

```
                 +-----------------+ grant_t_n  +-----+ int_in_t
  in.t --------->| input_interlock |----------->| NOR |-----------+
  in.f --------->|  (SR latch,     |            +-----+           |  pos
                 |   NAND pair)    |               ^ out.f        v
                 +-----------------+                          +--------+
  in.t ------------------------------------------------------>|  C+    |--> out.t
  en   ------------------------------------------------------>|        |
                                                              +--------+
```

* `input_interlock` behaves as two cross-coupled NAND gates fed by the two
  rails, i.e. the core of a mutex without its metastability filter. The first
  rail to rise gets its active-low grant; a later rise of the other rail is
  locked out until the granted rail returns to 0.
* The NOR arms the rail: `int_in_t = ~(grant_t_n | out.f)`. It combines the
  input grant with the state of the other rail's output. The two NORs, closed
  through the two output C-elements, form the second latch that interlocks the
  outputs.
* The output C-element+ takes the direct rail and `en` as regular inputs and
  the filtered `int_in_t` as positive input. Both the token and the spacer are
  decided by the direct rail and the enable; the filtered path only has to
  agree before the output may rise. In silicon a short input pulse that has
  died out before it crossed the NAND and NOR never meets its own filtered copy
  at the C-element, so it is filtered. The RTL carries no gate delays, so this
  filtering only exists after mapping to real cells.

What happens to a transient, by where it hits (observed in
`tb_theta_bit` and `tb_qdi_resilient_top`):

| hit | plain WCHB | theta |
|-----|-----------|-------|
| second rail of an input while the first holds the grant | (1,1) captured and propagated | blocked by the input interlock |
| one output C-element flips while the stage waits for a token | may be joined by the correct rail: (1,1) | other rail blocked by the NOR: wrong value, legal code |
| a rail of a stage holding a token drops | stage cannot complete: deadlock | same: the buffer does not address it |
| enable of the last stage while the sink has not acknowledged | output drops its token early: glitch | same: only a hardened read interface helps |

## Stage and target circuits

`theta_reg #(N)` puts N `theta_bit`s under one enable and adds the completion
detector. Two circuits are built from it and placed side by side in
`qdi_resilient_top`; they share only the reset.

### Empty pipeline (`qdi_fifo`)

`STAGES` (default 4) stages of `WIDTH` (default 4) bits in a chain. With the
sink stalled it holds `STAGES/2` tokens, each followed by a spacer, before it
stops acknowledging the source.

### Pipelined multiplier (`qdi_multiplier`)

Unsigned `W x W` (default 4 x 4) multiplication by shift and add. Partial
product k is `a & {W{b[k]}}`, formed by DIMS AND gates; from k = 1 on it is
added to the upper bits of the running sum by a DIMS ripple-carry adder
(`dims_adder`). The operands travel along with the running sum, so a bit of
`b` runs straight from one stage buffer to the next.

| stage | holds | dual-rail bits |
|-------|-------|----------------|
| 0 | a, b | 8 |
| 1 | a, b, sum of pp0 (4 bits) | 12 |
| 2 | a, b, sum of pp0..pp1 (6 bits) | 14 |
| 3 | a, b, sum of pp0..pp2 (7 bits) | 15 |
| 4 | product (8 bits) | 8 |

DIMS (delay-insensitive minterm synthesis, `dims_gate`) gives one C-element
per input minterm; each output rail is the OR of the minterms that produce it.
The block is strongly indicating: its outputs become valid only after all
inputs are valid, and return to the spacer only after all inputs have. The
truth table is a parameter (`TT`), so the AND gate, half adder and full adder
are the same module.

## Interfaces

All channels are `qdi_pkg::dr_t` arrays with an acknowledge:

| module | input side | output side |
|--------|-----------|-------------|
| `qdi_fifo` | `in[WIDTH]`, `in_ack` (out) | `out[WIDTH]`, `out_ack` (in) |
| `qdi_multiplier` | `a[W]`, `b[W]`, `in_ack` (out) | `p[2W]`, `out_ack` (in) |
| `qdi_resilient_top` | `fifo_*`, `mul_*` as above | |

`rst` is active high and asynchronous; it clears every C-element, so after
reset all stages hold spacers and all acknowledges are low. Hold `rst` while
the inputs are spacers and the output acknowledges are low.

## Design choices beyond the buffer's published description

The buffer's gate list (NAND input latch, NOR arming gate, C-element+
outputs) is the starting point. The following are this implementation's own
readings or choices:

* The NOR's "output state" input is taken to be the other rail's output.
* The enable is the inverted acknowledge, as in the plain WCHB. The hardened
  style this one descends from works on the acknowledge without inversion; for
  theta this is not specified.
* The SR latch is written as one latch process. A simultaneous rise of both
  rails (the case a mutex's metastability filter exists for) then resolves to
  the true rail in one step instead of oscillating in a zero-delay simulator.
* All gates are delay-free. Everything that depends on relative gate delays
  (glitch filtering, the race between a transient and a correct transition)
  is not modelled. Fault behaviour in the testbench is logical behaviour only.
* The reset, the FIFO depth (4 stages), the multiplier's stage split,
  ripple-carry adders and sum widths, and the multi-input C-element of the
  completion detector are not given and were chosen as the simplest option.
* The plain, interlocking and input/output-interlocking WCHB styles the theta
  buffer is compared against are not included.

## Testbenches

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and ends with a watchdog.

`tb_qdi_resilient_top` runs the whole design at its default sizes and plays
the part of a fault-injection environment. It uses a dual-rail source and a
sink per circuit with programmable per-phase delays, and monitors that
compare each output token with the expected value. They classify deviations
as value error, coding error, glitch (an output that changes before it is
acknowledged, or an acknowledge that moves out of turn) and deadlock.

1. Fault-free: both circuits, slow-source, balanced and slow-sink settings;
   any deviation fails.
2. Single transients: 200 runs at each of six sink/source delay ratios, 0.1
   to 4. Below 1 the pipeline is token limited, above 1 bubble limited. Each
   run flips one internal C-element or latch, or inverts an enable or a NOR
   arming output, for 0.2 ns. The targets are output C-elements of internal
   FIFO and multiplier stages, DIMS minterms, FIFO enables, and the NOR
   outputs and input-interlock latches of internal FIFO stages; the circuits'
   input and output rails are never hit. A coding error at an output fails
   the test, and so does a value error from a NOR or interlock-latch hit. The
   other classes are counted and printed per ratio and per target class, with
   glitches also counted without the last-stage enable.
3. Directed hits on the last FIFO stage's enable while the sink holds an
   unacknowledged token: these must produce the output glitch.

In this zero-delay model, no coding error ever reaches an output. Glitches
appear only from the last-stage enable. Hits on the NOR arming outputs and
the interlock latches are always masked: the direct rail still has to agree
at the output C-element. Almost all value errors come from flips of output
C-elements. Deadlocks (a stage left with an
incomplete word) rise sharply in bubble-limited settings. The run takes a few
seconds.

## Simulating

Verilator 5 with timing support, from the repository root:

```
verilator --binary --timing -Wno-fatal -y rtl rtl/qdi_pkg.sv \
    tb/tb_qdi_resilient_top.sv --top-module tb_qdi_resilient_top
./obj_dir/Vtb_qdi_resilient_top
```

Replace the testbench name to run another one. Lint reports circular logic
(UNOPTFLAT): those are the C-element latches and the handshake loops, which
are the intended feedback of a clockless circuit. Variables that nothing
initialises start random in a two-state simulator, so every testbench resets
the design first.

## Implementation notes

The RTL synthesizes to latches (one per C-element and two per input
interlock) and combinational loops. A conventional synchronous flow will
neither time nor place it correctly: QDI circuits need cells and constraints
that keep the C-elements, the isochronic forks at the DIMS inputs and the
latch loops intact. The modules are meant as a functional reference and a
starting point for such a flow.

| file | content |
|------|---------|
| `rtl/qdi_pkg.sv` | `dr_t`, spacer/token helpers, `DATA_W = 4` |
| `rtl/c_element.sv`, `rtl/c_element_plus.sv` | state-holding gates |
| `rtl/input_interlock.sv` | SR latch between the rails |
| `rtl/theta_bit.sv` | one bit of the theta buffer |
| `rtl/completion_detect.sv`, `rtl/theta_reg.sv` | N-bit stage |
| `rtl/dims_gate.sv`, `rtl/dims_adder.sv` | dual-rail logic |
| `rtl/qdi_fifo.sv`, `rtl/qdi_multiplier.sv` | target circuits |
| `rtl/qdi_resilient_top.sv` | both circuits side by side |
