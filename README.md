# FlowPU — a word-serial flow-context update unit

A flow-monitoring probe keeps one *context* record for every network flow,
for example byte counts or the largest gap between packets. For each packet
it must read that record, update it from the packet header and store it
again. At 10 Gb/s this happens tens of millions of times a second, so the
update is done by a hardware pipeline, not by a CPU. The idea behind this
design is that the pipeline is **generated** from short C-like expressions
written by the user. Each expression becomes a chain of small word-wide
arithmetic cells. The chain is cut into clock-cycle stages, and the record
and the header stream through it one word per cycle. A cell is not copied
for every word: one cell per stage handles the words one after another, and
the word address that travels with the data tells it what to do in that
cycle.

This repository holds SystemVerilog for the **Flow Processing Unit (FlowPU)**
around such a pipeline. The pipeline is the one generated for the worked
example

```
x = max(x, a - b);      // x, a, b: signed, 2 words
y += sqr(a - b);        // y: 3 words, sqr(v) = v * v
```

It also adds one control operation, "y has reached a limit". The architecture
follows the FlowPU of O. Lengál's bachelor thesis *Automated Generation of
Processing Elements for FPGA* (Brno University of Technology, 2008). That
thesis describes the generator only as software. Its output for the example
is given as a data-flow graph of word cells, and the FlowPU as a block
diagram. Every width, handshake, encoding and schedule below that those two
sources leave open is a choice made here, and the text says so where it
matters.

## Frames and words

All data moves as **frames** of `N_WORDS = 6` words of `WORD_W = 32` bits.
Words are sent lowest address first, one word per cycle. The context frame
and the header frame travel side by side, so word *k* of both is present in
the same cycle.

| word | context frame (port X / CONTEXT) | header frame (port Y / HEADER) |
|------|----------------------------------|--------------------------------|
| 0    | x[31:0]                          | a[31:0]                        |
| 1    | x[63:32]                         | a[63:32]                       |
| 2    | y[31:0]                          | b[31:0]                        |
| 3    | y[63:32]                         | b[63:32]                       |
| 4    | y[95:64]                         | unused                         |
| 5    | Application Decoder result       | unused                         |

The field sizes (x, a and b two words; y three words) come from the example's
data-flow graph. Where each field sits in the frame was chosen here; in the
thesis a genetic search picks the placement to save resources. Word 5 is a
slot for the Application Decoder's answer. The ALU passes it through, and the
Merger overwrites it on the way back to the Endpoint. The constants live in
`rtl/fpu_pkg.sv`.

## The generated pipeline (`pu_alu`)

The ALU has five stages (0 to `PIPE_LEN = 4`). Every stage receives its own
clock enable and word address from the Address Counter, so each stage knows
which word of which frame it holds. The cells of the example graph are built
once per stage. Each one runs a small "program" keyed on that stage's
address:

| stage | words | operation | cell |
|---|---|---|---|
| 0 | 0..5 | store every context and header word | capture registers |
| 0 | 2, 3 | `d = a - b`: a from the capture register, b live from Y | `pu_ser_add` (SUB=1): b inverted, carry-in 1 on word 2, carry kept in a flip-flop for word 3 |
| 0 | 2, 3 | `gt = x > d` (signed), on the live words of d | `pu_ser_gt`: 0 into word 2, result of word 2 kept for word 3, signed on word 3 |
| 1 | 3 | `sq = d * d`, cut to the 96 bits of y | `pu_mul`, product registered |
| 4 | 0, 1 | `x' = gt ? x : d` | one 32-bit selector |
| 4 | 2..4 | `y' = y + sq` | `pu_ser_add` (SUB=0), carry kept between words |
| 4 | 2..4 | `viol = (y' >= limit)`, unsigned, on the live sum words | `pu_ser_gt` with 1 into word 2; complete on word 4 |
| 4 | 5 | decoder word passes | – |

Results that a later stage needs (d, gt, sq) are held in the stage that made
them. Nothing waits for the whole frame to arrive: d is complete with b's
top word (word 3), sq one cycle later, and the first output word leaves
while input word 4 is still entering.

**Fixed latency per word.** Output word *k* leaves on Z exactly
`PIPE_LEN = 4` cycles after input word *k*. The number follows from the
schedule: b's top word is word 3, and the multiplier adds one stage.

**Atomicity and throughput.** A context must be updated completely before
the next update of the same flow reads it. The unit therefore holds at most
one whole frame, or parts of two. A new ALU frame may start
`SPACING = max(N_WORDS, PIPE_LEN + 1) = 6` cycles after the previous one.
With six-word frames, that means directly after it, with no idle cycle.
Register reuse is safe at that spacing: the next frame overwrites capture
word *k* two cycles after the output stage of the previous frame has read
it, and d, gt and sq only after their last use. The throughput is

```
T = (N_WORDS * WORD_W) bits / SPACING cycles = 192 / 6 = 32 bits per cycle
  = 3.2 Gb/s at 100 MHz
```

The thesis gives the rate as frame size over pipeline length, `S_F / L_P`.
Counted that way, this pipeline has `L_P = PIPE_LEN + 1 = 5` stages and
would reach 3.84 Gb/s. That figure assumes a new frame every `L_P` cycles.
Here a 6-word frame needs 6 cycles to enter at one word per cycle, so the
entry time, not the pipeline length, limits the rate. `tb_flowpu` ends with
a burst of 30 back-to-back updates and checks that they take exactly
`30 * SPACING` cycles.

The thesis sets a 10 Gb/s target and lists 64- and 128-byte contexts with
2- to 4-stage pipelines (12.8 to 51.2 Gb/s). Those numbers need much wider
words than this example uses. At one word per cycle, 10 Gb/s at 100 MHz
needs `WORD_W` of about 100 bits. The small example fields were kept instead.

## Feedback route: back-to-back packets of one flow

When two packets of the same flow arrive in a row, the context held by the
Endpoint is stale: the first update has not been written back yet. The
command `CMD_UPDATE_CUR` (the `use_current` line) makes the input MUX take
the context from the ALU's result instead. Every output word is also written
into a result register, which has a second read port (`fb_addr_i`/`fb_o`)
indexed by the input word address. Result word *k* is written `PIPE_LEN`
cycles after its input word. Word *k* of the next frame is read at the
earliest `SPACING` cycles after that input word, so it always finds the
fresh value, even while the rest of the previous frame is still leaving. The
testbenches run such updates back to back with no gap.

## Control operations, Reg Valid and where a record goes

The ALU outputs one bit per control operation (`N_CTRL = 1`). The Masking
Unit passes result *i* only while the output word whose address is
`CTRL_WORD[i]` is on Z; here that is word 4, the last word of y. **Reg
Valid** records whether the frame leaving the ALU has violated any control
operation so far, and is set again at word 0. The decision is therefore
known only at word 4, while write-back starts at word 0. The unit resolves
this as follows:

* The **Merger** writes every updated frame to the Endpoint
  (`UPD_CON_WR`, `UPDATED_CONTEXT`, address 0..5). On the way it replaces
  word 5 with the latest Application Decoder result.
* Every ALU frame also enters the result FIFO. At the last word it is either
  **committed** (violation: the Binder sends it to DO as a flow record) or
  **dropped** (the FIFO rewinds its write pointer to the last committed
  frame).
* The **Control Encoder** then pulses `COMMIT`. `UPDATED_CONTROL` tells the
  Endpoint what to do with the record just written: keep it (`VALID`) or,
  for an exported flow, free the entry (`EMPTY`, exported).

The thesis says a violating frame is exported and a good one is "stored
back". Here both are written, and the Endpoint acts on COMMIT. This is this
design's reading. It lets the write-back start before the control result is
complete.

## Commands

The Control Decoder samples `ctrl_i` with word 0 and holds the decoded lines
for the whole frame. The line names come from the block diagram; the codes
are chosen here.

| code | command | use_current | first | release | void | effect |
|---|---|---|---|---|---|---|
| 0 | `CMD_NOP` | | | | 1 | frame ignored |
| 1 | `CMD_UPDATE` | | | | | update the context delivered on CONTEXT |
| 2 | `CMD_UPDATE_CUR` | 1 | | | | update the ALU's last result (feedback) |
| 3 | `CMD_CREATE` | | 1 | | | update the default context from the MI registers |
| 4 | `CMD_RELEASE` | | | 1 | 1 | CONTEXT goes straight to the release FIFO and on to DO; the ALU is not used |
| 5 | `CMD_RELEASE_NEW` | | 1 | 1 | | export CONTEXT, then start a new context from the defaults (used when a hash collision is found upstream) |
| 6, 7 | – | | | | 1 | treated as no operation |

After each handled frame, the Control Encoder pulses `COMMIT` and puts a
code on `UPDATED_CONTROL = {exported, state}`:

| outcome | code |
|---|---|
| updated, kept | `{0, VALID}` |
| updated, exported | `{1, EMPTY}` |
| released | `{1, EMPTY}` |

A release-only frame is reported when it reaches the pipeline's output
stage. Two frames therefore never end in the same cycle.

## Around the pipeline

* `addr_counter` numbers the words 0..5. It delays the address and the clock
  enable through `PIPE_LEN` stages.
* `fl_fifo` (used twice, `FIFO_DEPTH = 16`) is a frame FIFO with commit and
  drop. `in_ready` waits for room for one frame in the release FIFO and for
  two in the result FIFO. Because of this, back-pressure on DO stalls the
  input and never loses records.
* `binder` sends whole frames from the two FIFOs to DO and alternates
  between them when both have a frame waiting.
* `fl_tx_adapter` drives DO and TX_APP_DEC; `fl_rx_adapter` receives
  RX_APP_DEC. FrameLink is modelled here as active-high `sof`/`eof`/`data`
  (`fpu_pkg::fl_t`) with `src_rdy`/`dst_rdy`, one word per transfer. The
  real protocol's active-low signals and partial last word are not modelled.
  The RX adapter keeps the first word of the decoder's latest answer.
* `param_regs` is the MI register bank. All addresses are word addresses,
  and reads return data one cycle later with `mi_drdy`.

| MI address | register |
|---|---|
| 0–5 | default context (read/write) |
| 6–8 | control limit, low word first (read/write; resets to all ones) |
| 16 | frames updated by the ALU |
| 17 | flow records sent on DO |
| 18 | contexts released by command |

## Top-level interface (`flowpu`)

* **Input frames.** A frame starts when `in_valid && in_ready` at word 0.
  Its remaining five words must follow on the next five cycles, and an
  assertion checks this. The command is on `ctrl_i` with word 0, and
  `pckt_end_i` marks word 5. The next frame may start `SPACING` cycles
  after a frame that uses the ALU, and `N_WORDS` cycles after any other
  frame. Both are 6 here, so frames can follow each other without a gap.
* **Payload.** The payload for the Application Decoder enters on
  `payload_i`/`pld_valid_i`/`pckt_start_i`/`pld_end_i`, with `pld_ready_o`
  for back-pressure.
* **Output timing.** For an update, the write-back word *k* appears
  `PIPE_LEN + 1 = 5` cycles after input word *k*. `COMMIT` comes one cycle
  after the last output word, in the same cycle as write-back word 5.
* **Reset.** `rst` is synchronous and active high.

## What is not here

The Endpoint, Fetch Block, Return Block, FlowContext, packet preprocessing
and Application Decoder are the probe's other blocks. The sources give them
only a name or one sentence, so the FlowPU's ports toward them are brought
out at the top. The generator itself (parser, operations graph, genetic
scheduling) is software. What it would produce for other expressions has to
be written by hand in `pu_alu`, following the same pattern. Commands beyond
the six above are not built.

## Simulating

Each testbench in `tb/` checks its results, prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fpu_pkg.sv \
          tb/tb_flowpu.sv --top-module tb_flowpu -Mdir obj_flowpu
obj_flowpu/Vtb_flowpu
```

Use the same command with `tb_<module>` for any block.

**`tb_flowpu`.** This testbench runs the whole unit at its default sizes. It
sends 400 frames with a random mix of all commands, stalls DO now and then
and talks to a small decoder model. A reference model of the update supplies
the expected values. The testbench checks every flow record, write-back,
commit code and debug counter against that model, as well as the minimum
spacing and the write-back latency. It counts each mechanism: feedback at
minimum spacing, create, release, release-and-create, no-op, export on
violation, record kept (result dropped from the FIFO), write-back, DO
back-pressure, input held for FIFO room and the merged decoder result. A mechanism that never happened counts as a
failure. The run takes well under a second.

The ALU testbench (`tb_pu_alu`) runs 400 frames mostly back to back. A third
of them take their context from the feedback port while the previous frame
is still leaving. Every output word is checked at its exact cycle, together
with the control bit at word 4. `tb_pu_ser_add` and `tb_pu_ser_gt` check the
serial cells on operands of up to five words, with idle cycles between the
words.

**Changing sizes.** `WORD_W` and the field offsets are in `fpu_pkg`.
`PIPE_LEN` and `SPACING` follow from them. `pu_alu` stops at elaboration
if the offsets no longer match its schedule. Different operations mean a new
`pu_alu` schedule built from the same serial cells. Its control results have
to be placed to match `CTRL_WORD` in the Masking Unit.
