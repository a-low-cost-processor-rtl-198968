# Processor-based logic emulator for a single FPGA

A logic emulator makes reprogrammable hardware behave like a digital design
that has not been fabricated yet, fast enough to sit in the real target
system. This RTL takes the *processor-based* approach: instead of mapping the
user's netlist onto FPGA fabric, it maps the netlist onto an array of small
time-multiplexed processors. Each processor evaluates one 4-input lookup table
per clock and is reprogrammed on every clock from its own control memory. One
sweep through the program (up to 128 clocks) evaluates the whole user design
once. That sweep is one *design clock cycle* of the emulated circuit.
Compiling a design for the emulator then only takes scheduling and writing
control words; no FPGA place-and-route is needed.

The emulator itself is ordinary synchronous logic and RAM, so the whole
machine fits on one mid-sized FPGA.

## Hierarchy and default sizes

| Level | Contents | Default |
|---|---|---|
| logic processor (LP) | control store, internal and external data stack, logic element | M = 4 LUT inputs, N = 128 steps |
| memory processor (MP) | control store, memory store, capture and release word units | Q = 8-bit words, 128 words |
| emulation module | R LPs + S MPs, sequential filler, module routing switch | R = 32, S = 4, so P = R + Q·S = 64 network outputs |
| emulation chip (top) | T modules, chip routing switch, step sequencer | T = 3, 64 chip inputs, 64 chip outputs |

The defaults are the chosen point of an area/speed exploration over
M = 2..8, N = 64..512, P = 32..256 and Q = 1..16. All of these are parameters
of the RTL (`emu_pkg.sv` holds the defaults).

At the defaults one chip evaluates 96 LPs × 128 steps = 12,288 four-input
functions per design cycle. At the usual rough rate of 8 ASIC gates per 4-LUT,
that is about 98k gate equivalents. The chip also holds 12 × 128 × 8 = 12,288
bits of emulated memory.

## The emulation step

Everything hinges on the timing inside one emulation clock period. It is the
least obvious part of the design. Both clock edges are used:

```
         step n-1        |        step n         |     step n+1
clk  ‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾|______________|‾‾‾‾‾‾‾‾|______ ...
                         ^ falling       ^ rising ^ falling
                         | opens step n  |        | closes step n, opens n+1
```

1. **Falling edge that opens step n.** Every processor reads control word `n`
   from its control store, addressed by the shared step number. The chip
   switch latches `n` as well.
2. **Low phase (x).** The control word's fields settle. This covers on-chip
   paths only.
3. **Rising edge.**
   - An LP reads its M operand addresses from both data stacks.
   - An MP performs its read, if this step is a read.
   - The chip routing switch loads its select word for step `n`.
4. **High phase (y).** The logic element selects each operand, either internal
   or external, and looks the result up in the LUT field. Results and MP
   outputs travel through the module and chip switches. If chips were
   connected into a larger engine, this phase would also carry signals between
   FPGAs. The high phase is therefore the critical one, and a duty cycle other
   than 50 % can lengthen it.
5. **Falling edge that closes step n.**
   - Each LP writes its result to its internal stack at address `n`.
   - Each LP writes the network bit chosen by its `ChooseInput` field to its
     external stack at address `n`.
   - An MP whose step is a write stores the `Q` network bits chosen by its CI
     fields.
   - The same edge reads control word `n+1`.

Consequences that matter when writing programs:

- **Step n sees the results of steps 0..n-1 of this cycle.** At its own
  address `n` it still finds what step `n` wrote in the *previous* design
  cycle. That is how flip-flops are emulated: a gate that reads its own
  address, or a later address, gets last cycle's value.
- **A value crosses processors within the step that computes it.** If LP a
  computes a value in step `s` and LP b needs it, LP b's word `s` must name LP a
  in `ChooseInput`. LP b then reads it later from external stack address `s`.
  Each LP captures one network bit per step.
- **Memory processor outputs are held.** A read puts the word on the MP's 8
  outputs in the same step, and the outputs keep it until the MP's next read.
  LP outputs are valid only during their step. To present a stable value to
  the target system, route it through an MP read.
- **Latency.** One LUT evaluation per LP per emulation clock. A design cycle
  takes `last_step + 1` emulation clocks. Reference figures are a 24 MHz
  emulation clock and 128 steps, which give a design clock of about 188 kHz.
  Using fewer steps gives a faster design clock.

`run` gates all emulation writes: a step opened with `run = 0` writes nothing.
Stores are loaded, and the emulator can be halted, without disturbing the
stacks or the emulated memory.

## Control words

Fields are listed most significant first. Widths are for the defaults.

**Logic processor, 54 bits** = log2(P) + M + 2^M + M·log2(N):

| bits | field | meaning |
|---|---|---|
| 53:48 | ChooseInput | module network output captured into the external stack this step |
| 47:32 | LUT | truth table; index bit k is operand k (A = bit 0) |
| 31, 30:24 | SelA, RAA | operand A: 0 = internal stack, 1 = external stack; stack address |
| 23, 22:16 | SelB, RAB | operand B |
| 15, 14:8 | SelC, RAC | operand C |
| 7, 6:0 | SelD, RAD | operand D |

**Memory processor, 56 bits** = log2(N) + 1 + Q·log2(P):

| bits | field | meaning |
|---|---|---|
| 55:49 | MWA | memory word address |
| 48 | W/R | 1 = write the captured word, 0 = read |
| 47:42 | CI1 | network output that becomes word bit 0 |
| ... | ... | ... |
| 5:0 | CI8 | network output that becomes word bit 7 |

An MP reads or writes in every step. An MP with no work should read a fixed
address, so that its outputs stay constant.

## Interconnect

**Inside a module**, each processor output is a network slot:

- slot `r` is LP `r`;
- slot `32 + 8s + q` is bit `q` of MP `s`.

Each processor *input* has a slot with the same number: LP `r`'s external
stack input, or capture bit `q` of MP `s`. The module routing switch gives
every input slot a 64-to-1 multiplexer over all 64 outputs. The multiplexer
is steered by the ChooseInput or CI field of the processor that owns the
slot. A 2-to-1 multiplexer after it can replace the result with a bit from
outside the module (`use_ext`).

**Across the chip**, the chip routing switch has a 4-to-1 multiplexer for each
of the 3 × 64 module input slots and for each of the 64 chip outputs.

| destination | option 0 | option 1 | option 2 | option 3 |
|---|---|---|---|---|
| module t, slot j | slot j of module (t+1) mod 3 | slot j of module (t+2) mod 3 | chip input j | chip input j+1 (mod 64) |
| chip output j | slot j of module 0 | slot j of module 1 | slot j of module 2 | chip input j |

So signals move between modules only along the same slot number. Option 3 on
an output lets a chip forward a signal between two other chips. The selects
can change every step. They sit in a routing select store: 128 words, each
holding 256 entries of 3 bits (`{use_ext, option}` from `route_sel_t`). Entry
`64t + j` is module t's slot j. Entry `192 + j` is chip output j, which uses
only the option bits.

## Loading

Before emulation, hold `run = 0` and use the shared load bus:

- **LP control word:** set `fill_mod` and `fill_lp_sel`, put the step in
  `fill_addr` and the word in `fill_data`, and pulse `fill_lp_we`.
- **MP control word:** the same with `fill_mp_sel` and `fill_mp_cs_we`.
- **MP memory word:** `fill_mp_ms_we`, with the word in `fill_data[7:0]`.
- **Routing select entry:** `fill_route_we`, `fill_route_idx` and
  `fill_route_sel`, with the step in `fill_addr`.

All stores accept writes on the falling edge, one entry per clock. Inside
each module a sequential filler decodes the selects into one-hot write
enables. Then set `last_step` and raise `run`. The first falling edge with
`run = 1` opens step 0.

## Example: a 4-bit multiplier

`tb/tb_emulation_chip.sv` acts as a small compiler. It builds a 4 × 4 array
multiplier from 16 AND gates and three rows of adders, where each sum is an
XOR LUT and each carry a majority LUT. It places one gate per step,
round-robin on LPs 0..7 of module 0:

- **Step 0:** the 8 LPs capture A and B from chip inputs.
- **Steps 1–8:** each LP re-emits its input bit so that the others can
  capture it.
- **Steps 9–48:** the 40 gates.
- **Step 49:** eight LPs re-emit the eight product bits together, and MP 0
  stores them as one word.
- **Step 50:** MP 0 reads the word back onto chip outputs 32–39. They hold the
  product until the next design cycle.

The program also exercises other paths:

- cross-module capture in both directions;
- the "input j+1" option, with a decoy on input j;
- chip-input forwarding;
- a preloaded memory word;
- a toggle flip-flop that reads its own previous-cycle value.

All 256 input pairs are run, with design cycles of 128, 64 and 51 steps. The
schedule is deliberately naive (one gate per step), so that the routing rules
are easy to follow.

`tb/tb_multiplier_schedule.sv` runs a tighter hand schedule of the same
multiplier. Its header comment prints it as a table.

- Eight LPs work in parallel, and the product is complete after 19 steps
  (`last_step = 18`).
- Each partial-product row is added with sum (XOR) and carry (majority) LUTs
  on alternate processors.
- A carry or sum produced in step s is captured by its consumers in the same
  step s. This is the fastest hand-off the step timing allows.
- The multiplier bits B0–B3 are held by four more LPs, which re-emit them in
  every step.
- Each product bit is checked on a chip output in the step that computes it,
  for all 256 input pairs.

## Files

| file | block |
|---|---|
| `rtl/emu_pkg.sv` | default sizes, control-word width and field-offset functions, `route_sel_t` |
| `rtl/emulation_chip.sv` | top: modules, chip routing switch, step sequencer |
| `rtl/emulation_module.sv` | 32 LPs, 4 MPs, sequential filler, module routing switch |
| `rtl/logic_processor.sv` | LP |
| `rtl/control_store.sv` | control word memory (LP and MP) |
| `rtl/data_stack.sv` | N × 1 stack, 1 write and M read ports |
| `rtl/logic_element.sv` | operand select multiplexers and LUT |
| `rtl/memory_processor.sv` | MP, including the capture and release word units |
| `rtl/memory_store.sv` | N × Q emulated memory |
| `rtl/module_switch.sv` | module routing switch |
| `rtl/sequential_filler.sv` | load-bus decoder |
| `rtl/chip_switch.sv` | chip routing switch and its select store |
| `rtl/step_sequencer.sv` | step counter, design clock |

Each `rtl/X.sv` has a self-checking `tb/tb_X.sv`. Every testbench prints
`TB_RESULT checks=N failures=F` and has a watchdog.
`tb/tb_processor_sizes.sv` runs both processors at other points of the size
exploration. `tb/tb_multiplier_schedule.sv` runs the hand-scheduled
multiplier on the full chip.

`tb/tb_chip_capacity.sv` fills the chip to capacity with random programs:
- every LP evaluates a random function in all 128 steps;
- every routing select is random;
- every memory word is both written and read.

It contains an independent model of the whole chip, and in every step it
compares the three module networks and the chip outputs with that model. It
is the quickest check after a change to the step timing or the routing.

## Simulating

Verilator 5 is enough. The package must come first; `-y rtl` finds the rest:

```
verilator --binary --timing --assert -y rtl rtl/emu_pkg.sv tb/tb_emulation_chip.sv \
          --top-module tb_emulation_chip -Mdir obj_chip
./obj_chip/Vtb_emulation_chip
```

Swap in any other testbench name. Add `-y tb` for `tb_processor_sizes`, which uses
helper modules from `tb/`. The chip testbench runs at the default
sizes. It loads about 48k store entries and runs about 22k emulation clocks,
which takes well under a second.

Synthesis: every module elaborates standalone with its defaults. At the
defaults the chip has about 860 kbit of RAM:

- LP control stores: 663,552 bits;
- MP control stores: 86,016 bits;
- memory stores: 12,288 bits;
- routing select store: 98,304 bits.

The 24,576 stack bits are flip-flops, because each stack needs four read ports.

## Where this RTL makes its own choices

The reference architecture fixes the processors, the step timing, the
control-word fields and their widths, the sizes, and the chip switch's option
sets. The following are choices of this RTL:

- **Path into a module.** A 6-bit ChooseInput can only name the 64 module
  outputs. The path from other modules and chip pins is therefore a per-slot
  `use_ext` bit, stored with the chip routing selects. In the reference
  implementation, the chip switch held 64 extra 2-to-1 multiplexers whose
  role is not known. Here there is one 2-to-1 multiplexer per module slot:
  192 in all.
- **Chip pins.** There are 64 chip inputs. The option sets are generalised
  from the reference examples. The routing store holds one word per step.
- **Bit-level details:**
  - the order of the Sel and RA bits inside a field;
  - Sel = 1 means external;
  - operand A is LUT index bit 0;
  - CI1 is word bit 0.
- **MP outputs.** MP outputs hold between reads.
- **Run gating.** `run` gates all writes.
- **Step counter.** The step counter advances on the falling edge.
  `design_clk` is high for the first half of the cycle.
- **Load bus.** The load bus layout is this design's own. All stores load on
  the falling edge.
- **Memory mapping.** Each LP has its own control store. The stacks are
  register arrays rather than duplicated 2-port RAMs. The reference
  implementation packed two LPs' control words into shared RAM blocks.
- **Reset.** Only the step counter is reset. Stack and memory contents start
  undefined, so programs should write before they read, or preload memory.

## Not included

- **Multi-chip engine.** Several chips can be joined into a mesh or a fully
  connected multi-FPGA board: roughly 590k gate equivalents with six chips.
  The chip already has the forwarding option such a board needs. The
  chip-to-chip wiring is not specified, so the board is not built.
  `tb/tb_engine_relay.sv` wires three chips in a line, pin j to pin j. A value
  computed on the first chip crosses the middle chip's forwarding path and is
  captured on the third chip, all in the same step. The middle chip's own
  processors also compute on what it receives.
- **Emulation compiler and host.** The compiler that partitions, schedules and
  generates control words is out of scope. Only the small scheduler inside the
  chip testbench and the hand schedule above exist.
- **Data capture unit.** The unit that records emulator outputs for the user
  is not designed.
