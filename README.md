# Algorithmic, event-driven digital test equipment

A conventional tester stores every test vector it applies. This tester
stores a *compact test* instead and expands it on line:

- a **test program P**, whose words are test vectors with symbolic places
  left in them (an operand, an instruction variant, an expected result);
- three **data arrays** that fill those places: **VAR** (the values that
  change the program from one pass to the next, e.g. the instruction under
  test), **OP** (operands) and **ET** (expected results, "etalons").

The program is run once per VAR value, with a nested loop over OP sets, and
each pass pulls its words out of the arrays. A test whose linear form has
`L_P * L_VAR * L_OP` vectors is downloaded as `L_P + L_VAR + L_OP + L_ET`
words. Such tests come naturally out of test generation on alternative
graphs (decision graphs of a device's functions): testing one graph node
gives one program that is repeated for every value of the node's variable.

The second idea is **event-driven execution**. Every program word says on
which state of the device's output lines it is to be applied: *IF event
THEN apply vector*. The tester therefore need not clock the device. It can
test a microprocessor that runs from its own, faster clock by following its
bus strobes, and it can act as the processor's program memory
(**pseudo-emulation**): it answers every instruction fetch itself, holds
the processor in WAIT between fetches, ignores the address bus and keeps
the board's own memory disabled. The device then runs a straight-line
program, byte by byte, supplied by the tester.

## Blocks

Connections (each arrow is a bus):

- `prog_mem` -> event field -> `event_analysis`
- `prog_mem` -> instruction field -> `control_block`
- `prog_mem` -> pattern -> `pattern_mux`
- `data_mem_blocks` -> data word -> `pattern_mux`
- `control_block` -> program address -> `prog_mem`
- `control_block` -> array and address -> `data_mem_blocks`
- `control_block` -> window and source -> `pattern_mux`
- `pattern_mux` -> vector -> `pin_electronics`
- device event lines -> `event_analysis` -> fire -> `pin_electronics`
- `control_block` -> compare, direction and mask loads -> `pin_electronics`
- `pin_electronics` -> acknowledge, fail -> `control_block`
- `pin_electronics` <-> device pins

| file | role |
|---|---|
| `rtl/tester_pkg.sv` | widths, opcodes, the program word `prog_word_t` |
| `rtl/prog_mem.sv` | test program memory, 1024 words, host write port |
| `rtl/data_mem_blocks.sv`, `rtl/data_mem.sv` | the VAR, OP and ET memories, 256 bytes each |
| `rtl/pattern_mux.sv` | puts a data word into a window of the pattern |
| `rtl/event_analysis.sv` | waits for the programmed event, fires the vector |
| `rtl/pin_electronics.sv` | drives and compares the device pins (digital side) |
| `rtl/control_block.sv` | sequencer: fetch, decode, loops, failure log |
| `rtl/test_system.sv` | the top: everything above wired together |

## The program word

A word of `prog_mem` is 63 bits, three fields from the top down:

| field | bits | contents |
|---|---|---|
| event `ev_field_t` | 9 | `edge_only`, `mask[3:0]`, `value[3:0]` |
| instruction `instr_t` | 22 | `op[2:0]`, `src[1:0]`, `win_lsb[4:0]`, `win_w[3:0]`, `offset[7:0]` |
| pattern | 32 | one bit per tester pin |

**Event.** The vector is applied when `(ev & mask) == (value & mask)` on
the four event lines. `mask = 0` applies it at once. With `edge_only` the
condition must *become* true while the word is waiting, so a strobe that is
already high does not count; use it only where the device cannot have
raised the line before the word is reached.

**Instructions.**

| `op` | effect |
|---|---|
| `OP_DRV` | on the event, drive the vector on the pins the tester drives |
| `OP_CMP` | the same, and compare the other pins that are in the compare mask with the vector |
| `OP_SETDIR` | load the direction register from the pattern (1 = tester drives the pin); immediate |
| `OP_SETMASK` | load the compare mask from the pattern (1 = check this pin); immediate |
| `OP_LOOP` | close a loop over `src` = VAR or OP: jump to `pattern[9:0]` until `var_count` / `op_count` passes are done, moving that array's base address on by `offset` each pass |
| `OP_HALT` | end of test |

**Mixing.** `src = SRC_NONE` is the normal mode: the vector is the pattern.
Otherwise pins `win_lsb .. win_lsb+win_w-1` of the pattern are replaced by
bits `0 .. win_w-1` of a data word, read from

- VAR at `var_base + offset`, OP at `op_base + offset`: the bases move with
  the loops, so `offset` picks the operand within the current set;
- ET at `et_ptr + offset`: `et_ptr` starts at 0 and moves on by one after
  every vector that used ET. The ET array therefore lists the expected
  results in the order the program observes them.

For `OP_CMP` with ET the window is the expected value; the other compared
pins are checked against the pattern bits.

## Timing

All logic runs on one tester clock with asynchronous active-low reset.

- A program word is read in one clock and decoded in the next. `OP_SETDIR`,
  `OP_SETMASK` and `OP_LOOP` take one clock each.
- A vector takes three clocks when its event is already present: decode
  (event analysis armed, data word read), fire, acknowledge. Otherwise it
  waits, armed, for as long as it takes. There is no time-out.
- The device's event lines and pins each pass two flip-flops, so `fire`
  comes two to three clocks after a line changes, and a compare sees the
  pins as they were when the event was seen.
- On fire, the driven pins take the vector on the next clock and hold it
  until the next vector. On `OP_SETDIR`, the enables change on the next
  clock.
- A failing compare adds one to `err_count` (16 bits, saturating). The
  address of the first failing word goes to `first_fail_pc` and its failing
  pins to `last_fail_pins`. The run does not stop on a failure.

Host side of `test_system`: write program words with `host_prog_we` and
data bytes with `host_data_we` / `host_data_sel` while the tester is idle.
Set `host_var_count` and `host_op_count` (0 or 1 means one pass), pulse
`host_start`, and wait for `done`. A new `host_start` clears the failure
log and the loop state.

## Pseudo-emulation as a program

No logic is dedicated to pseudo-emulation: it is a protocol, written as
event clauses. The end-to-end testbench wires the board so that the read
strobe and the write strobe are event lines 0 and 1, and READY and
memory-disable are tester-driven pins. The address pins are left out of the
compare mask. Answering one instruction fetch takes two words:

```
OP_DRV  IF rd == 1 : data pins = byte, READY = 1, MEMDIS = 1
OP_DRV  IF rd == 0 : READY = 0, MEMDIS = 1      (processor waits here until the next fetch)
```

The byte can come from the pattern or, through a window, from VAR or OP.
Observing a result is done with direction set to "device drives the data
pins", then

```
OP_CMP  IF wr rises (edge) : expect data pins = ET, READY = 1
OP_DRV  IF wr == 0 : READY = 0
```

## The test that is run end to end

`tb/test_system_tb.sv` runs the tester, at its default sizes, against
`tb/fig2_dut.sv`. That model is a register `Y` set by the function of a
small alternative graph:

```
I = 0 : F1            I = 2 : x3 ? F5 : F6
I = 1 : x1 ? (x2 ? F2 : F3) : F4      I = 3 : x4 ? F7 : F8
```

over two operand registers, fetched over a READY-handshaked bus from its own
clock (about 1.4 times faster than the tester's). The test of node `I`
applies `I = var` for `var` in VAR = (0, 1, 2, 3) with the flags
x1..x4 = 1110, for two operand sets from OP in a nested loop, and compares
each result with ET. ET is computed in the testbench by walking the graph.
The program is 33 words. With 4 VAR, 4 OP and 8 ET bytes, the download is
49 words, where a linear vector list would need 264.

The first run uses a good device: no failures, 8 compares, 56 fetches and
8 result writes. The second run sets a fault in the device, the x2 branch
stuck at 0. The two compares with `I = 1` must then fail, at the compare
word, on data pins only. The testbench also counts each mechanism and fails
if one never happened:

- normal vectors, and VAR, OP and ET mixing;
- unconditional, level and edge events, and clocks spent waiting;
- both loop jumps, and direction and mask loads;
- device wait states;
- passing and failing compares.

With the test vector 1110, x4 = 0, so `I = 3` selects F8, not F7. The
expected values follow the graph, so they match either way.

## A microprocessor instruction test

`tb/shld_workload_tb.sv` runs a second test on a behavioural model of an
8-bit processor, `tb/shld_dut.sv`. The model executes MVI L, MVI H and
SHLD, with 8080-style machine cycles. The test checks SHLD (opcode 22h,
store L and H direct):

- in its 4th machine cycle, the data bus must carry L and the address bus
  the two address bytes fetched in cycles 2 and 3;
- in its 5th cycle, the data bus must carry H and the address bus that
  address plus one.

The tester feeds in every byte the processor fetches. It finds machine
cycles 4 and 5 as rising edges of the write strobe. While READY is low,
the processor waits in each write cycle. During that wait the tester makes
three compares against consecutive ET bytes (data, address low, address
high), then raises READY.

VAR holds three addresses; one of them carries from the low into the high
byte. OP holds two (L, H) pairs. The test is 39 program words, 6 VAR,
4 OP and 36 ET bytes.

A good processor passes all 36 compares. A processor that drops that carry
fails exactly the two 5th-cycle address-high compares at that address, on
address bit 8.

## Where this RTL departs from or goes beyond the architecture

The architecture fixes the blocks and their connections:

- a program memory whose word holds an event part, an instruction part and
  a pattern;
- separate VAR, OP and ET memories;
- a multiplexer that replaces a window of the pattern, chosen by the
  instruction, with a data word;
- an event analysis block, a control block and pin electronics;
- cyclic execution over VAR, with a nested loop over OP.

Everything else is this design's choice:

- **Sizes**: 32 pins (8 data, 16 address and 8 control lines of an 8-bit
  microprocessor), 4 event lines, 8-bit data words, 1024 program words,
  256 words per data array.
- **Instruction set and encoding**, including the immediate direction and
  mask loads, and loop counts set by the host rather than by the program.
- **Event encoding** as mask and value. The edge qualifier is an addition.
- **ET read in run order** through an auto-incrementing pointer.
- **Pin electronics** are digital only. There are no drive levels, timing
  edges or analog comparators. Bidirectional pins are split into
  `pin_out`, `pin_oe` and `pin_in`.
- **Not built**: the device under test, and the off-line test generator
  with its host computer. The host's download path is the top's `host_*`
  ports.

Concurrent assertions check two rules. Event analysis fires only while
armed. The pin electronics acknowledge only a vector that is waiting.

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  --top-module test_system_tb rtl/tester_pkg.sv tb/test_system_tb.sv -o sim
./obj_dir/sim
```

Replace `test_system_tb` with `prog_mem_tb`, `data_mem_blocks_tb`,
`pattern_mux_tb`, `event_analysis_tb`, `pin_electronics_tb` or
`control_block_tb` for the unit tests, or `shld_workload_tb` for the
processor instruction test. The control block's test checks the
executed trace and the cycle count against a reference interpreter of the
instruction set. The end-to-end test takes well under a second.

## Changing the design

Widths (pins, event lines, data word, address widths) are constants in
`tester_pkg`. The program word struct follows from them, so the
testbenches' program builders adapt. The memory depths are parameters of
`test_system`: `PROG_DEPTH` and `DATA_DEPTH`. They must match `PROG_AW`
and `DATA_AW` in the package, or be smaller. A new opcode needs a case in
`control_block`'s decode and, if it applies a vector, in the pin
electronics' `compare` qualifier.
