# Synchroscalar tile array in SystemVerilog

Synchroscalar is a programmable DSP fabric for multi-rate signal processing (the
802.11a receiver kernels FIR equalisation, FFT and Viterbi decoding, plus AES). It tries
to reach ASIC-like energy efficiency with three ideas:

* **Parallel, slow and synchronous.** Work is spread over many small 16-bit DSP tiles
  running at a low frequency (and so, in silicon, a low voltage). Tiles are grouped in
  columns. Each column has one fixed clock. Column frequencies are in integer ratios
  ("rational clocking"), so two columns meet at known cycles and need no synchronisers.
* **Wide, segmented, statically scheduled buses.** At low frequency a signal crosses a
  whole column in one cycle. So each column gets one wide global bus. Switches
  ("segmenters") cut the bus into pieces, so several short messages can share the same
  wires in one cycle. Nothing is arbitrated at run time: a schedule fixed in advance says
  who drives, who listens and which segmenters are on.
* **SIMD control.** All tiles of a column execute one instruction stream from a single
  SIMD controller. Only the controller fetches and decodes; the tiles just execute.

This RTL implements the array at its preferred configuration: 3 columns, each with 4×2
tiles (four rows, a tile on each side of the bus), a 128-bit bus and 32 kB of SRAM per
tile. All of these are parameters.

## Organisation

```
synchroscalar                          top: NCOLS columns + clocks + horizontal bus
├── rclk_gen                           one tick enable per column, f_c = f_base / DIV[c]
├── hbus                               horizontal bus shared by all columns
└── ss_column  (x NCOLS)               one SIMD column
    ├── simd_ctrl                      fetch, control instructions, issue to tiles
    ├── seg_ctrl                       schedule walker: segmenters, branch tap, hbus bridge
    ├── seg_bus                        4 segments, 3 segmenters, 8 tile drivers + bridge
    └── pe  (x 2*ROWS)                 tile
        ├── pe_regfile                 16 x 16-bit, 4 read / 2 write ports
        ├── pe_alu                     functional unit 1: 16-bit ALU
        ├── pe_mac                     functional unit 2: 16x16 MAC, 40-bit accumulator
        ├── pe_sram                    32 kB, 128-bit lines, 16-bit lane write mask
        └── pe_comm                    per-tile communication table + tx/rx line buffers
```

`ss_pkg` holds the shared types (instruction fields, operation enums, communication and
configuration codes) and encoder functions (`enc_bundle`, `enc_i`, `enc_loop`) for
building programs.

## The communication schedule

This is the least obvious part of the design. Read it before writing a program.

A column performs a **bus step** in every cycle in which a `COMM` instruction reaches the
tiles. The segment controller holds a step counter. At the end of each step the counter
advances, and it wraps after `len` steps (the schedule length, written by the host).
The `CSYNC` instruction restarts the counter at 0. Every step number selects:

* **in the segment controller**, one entry `{seg_on[2:0], simd_rx, hb[1:0]}`:
  * `seg_on[k] = 1` isolates segment k from segment k+1; `0` joins them. All zeros make
    the bus one broadcast wire. `3'b010` makes two independent halves, so two messages
    travel in the same cycle.
  * `simd_rx = 1` makes the SIMD controller copy bits 15:0 of segment 0 into its branch
    register `creg`.
  * `hb`: `PUT` copies segment 0 into the column's horizontal-bus register and keeps
    driving the horizontal bus with it. `GET` drives segment 0 from the horizontal bus
    for this step. `REL` stops driving.
* **in every tile's `pe_comm`**, its own entry: `SEND`, `RECV`, `BOTH` or `IDLE`. A sender
  drives its transmit line buffer onto its segment. A receiver latches its segment into its
  receive line buffer at the end of the cycle. `BOTH` does both, so a tile that broadcasts
  also ends the step with the broadcast line in its receive buffer. An all-to-all exchange
  by successive broadcasts can then use one `COMM; STRX` loop on every tile.

All tiles execute the same `COMM`, but each does something different, because the
per-tile tables differ. Tile p sits on segment p/2. The horizontal-bus bridge and the
SIMD controller's tap sit on segment 0.

Rules for the schedule (the hardware does not enforce them, but it flags breaking them):
* At most one driver per joined group. If two drive, `bus_conflict` is raised and the
  values are ORed.
* A group that nobody drives reads 0.
* Between steps all segmenters are on, so the idle bus is fully split.

Data moves between the SRAM and the bus one full line at a time:
1. `LDTX` loads a line into the transmit buffer.
2. `COMM` performs the step.
3. `STRX` writes the receive buffer to a line.

`LDTX` returns a cycle later, but a `COMM` right after it still sends the new line: the
SRAM output is forwarded to the bus. A `STRX` must come before the next step that
receives into the same tile.

## Tile (pe)

The tile executes the word broadcast by the controller. There are two instruction forms
(see `ss_pkg`):

* **Bundle** (bit 31 = 1): one ALU operation (`ADD SUB AND OR XOR SHL SHRA MIN MAX MOV
  ABS RDACC`) and one MAC operation (`MAC MSU MUL CLR`) in the same cycle. This is the
  two-functional-unit VLIW word. Fields: alu_op[30:27], rd[26:23], ra[22:19],
  rb[18:15], mac_op[14:12], ma[11:8], mb[7:4].
* **Single** (bit 31 = 0): opcode[30:26], rd[25:22], ra[21:18], imm[15:0].
  * `LI`, `ADDI`
  * `LD`/`ST`: a 16-bit word at address `ra+imm`. Word address = line × L + lane, with
    L = `BUS_W`/16 words per line (8 at the default 128-bit bus).
  * `LDTX`/`STRX`: one bus-width line at line address `ra+imm`.
  * `COMM`

Opcodes 16 and up are control instructions. They never reach the tiles.

Timing:
* ALU and immediate results are written at the end of the issue cycle.
* The accumulator updates at the end of the cycle. `RDACC` returns
  `sat16(acc >>> 15)`, i.e. the Q15 product scale.
* A load returns one cycle later. Its data is forwarded to the next instruction, so code
  never has to wait for it. Load data and an ALU result can both be written in the same
  cycle (the regfile has two write ports). If they target the same register, the ALU
  result wins.
* The SRAM has a single port: one access per cycle, taken by whichever of `LD`, `ST`,
  `LDTX` or `STRX` is issued.

## SIMD controller (simd_ctrl)

The pipeline has three stages: fetch (combinational read of the 256-word instruction
memory), decode, and the issue register that feeds the tiles. Control instructions run
in decode, so the tiles never receive an instruction that later has to be cancelled.

| instruction | effect | cost in cycles |
|---|---|---|
| computation | forwarded to the tiles | 1 |
| `JMP t` | redirect fetch | 1 (its decode slot) |
| `BZ t` / `BNZ t` | test `creg` | 2: its slot plus one stall |
| `LOOP n, end` | body = next address .. `end`, n iterations | 1 once; 0 per loop-back |
| `CSYNC` | restart the communication schedule | 1 |
| `HALT` | stop; `halted` rises | 1 |

The conditional-branch stall is what lets a branch use a value received by the
`COMM` just before it. That `COMM` reaches the bus one cycle after it leaves decode.
The branch waits that cycle, then decides.

Loops cost nothing because the check is made on the **fetch address**, not on the
decoded instruction. When the address fetched equals `end` and iterations remain, the
next fetch goes to the loop start. There is one loop level. `n = 0` behaves like 1.

A program's run time in column cycles is therefore:

    1 + (decoded instructions) + (conditional branches)

## Mapping kernels onto a column

The workload benches in `tb/` (FIR, FFT, Viterbi, AES) use a few recurring patterns:

* **Different work from the same instructions.** Tiles differ only in their SRAM
  contents. Per-tile constants (a partner's line address, a sign mask, a twiddle table)
  are loaded by the host. The shared program then reads them with ordinary loads. The
  FFT gives each tile a sign mask m and computes `(x ^ m) - m`, so the lower tile of a
  butterfly pair adds and the upper one subtracts.
* **All-to-all by broadcasts.** Step k of the schedule lets tile k (or tile k/L, when
  each tile sends L lines) drive the joined bus while all others receive. One
  `COMM; STRX` loop then leaves every tile with every line. Viterbi uses this to share
  its 64 path metrics after each trellis step, and the FFT uses it before each of its
  cross-tile stages.
* **Parallel pairs and trees.** With segmenters on, each segment carries its own
  message in the same cycle. The FIR bench reduces the partial sums in a tree: the
  first level runs inside all segments at once. At level d segmenter k is on when
  (k+1) mod 2^d = 0.
* **Loops longer than one level.** There is only one hardware loop level. An outer loop
  keeps its counter in one tile, which sends it to the controller over the bus each
  pass, followed by a `BNZ`. Viterbi (trellis steps) and AES (rounds) work this way.
  The cost is the one stall cycle per pass.
* **Halving by the multiplier.** `MUL` by 16384 and then `RDACC` gives `x >>> 1`
  exactly. So a Q15 twiddle table scaled by ½ gives the FFT's per-stage scaling for free.

## Rational clocks and the horizontal bus

`rclk_gen` derives every column clock from one base clock, as an enable: column c ticks
once every `DIV[c]` base cycles. The default is `{1, 2, 3}`. All dividers start together,
and `all_en` marks the common ticks, which repeat every lcm(DIV) base cycles. Every
column's state, except host configuration writes, advances only on its own ticks.

The horizontal bus (`hbus`) carries the register of whichever column did a `PUT`. That
value stays stable until the column's next `PUT` or `REL`. Any other column can `GET` it
at any of its own ticks. The static schedule of the two programs decides when that is
safe.

## Host configuration (per column)

The configuration port is synchronous and works on any base-clock edge. `cfg_we` and
`cfg_sel` write:

| `cfg_sel` | target | `cfg_addr` | `cfg_wdata` |
|---|---|---|---|
| `CFG_IMEM` | instruction memory | address | `[31:0]` |
| `CFG_SEGTBL` | segment schedule | step | `{seg_on, simd_rx, hb}` |
| `CFG_SEGLEN` | schedule length | — | length |
| `CFG_COMMTBL` | communication table of tile `cfg_pe` | step | `[1:0]` |
| `CFG_SRAM` | SRAM line of tile `cfg_pe` | line | line |

`cfg_rd` with `CFG_SRAM` returns a line on `cfg_rdata` one cycle later. SRAM access from
the host is meant for when the column is halted: it takes the port from the tile.

`start` clears the controller pipeline and runs from address 0.

## Parameters

| parameter | default | basis |
|---|---|---|
| `NCOLS` | 3 | three clock domains, as in the usual drawing of the array |
| `ROWS` | 4 (4×2 tiles) | the preferred 4×2 tiles per column (2×2 also recommended) |
| `BUS_W` | 128 | the recommended bus width of 64 or 128 bits; a multiple of 16 |
| `SRAM_BYTES` | 32768 | the 32 kB tile memory of the power model |
| `DATA_W` | 16 | 16-bit DSP tiles |
| `DIV` | {1,2,3} | own choice (no frequencies are specified) |
| `STEPS` | 32 | own choice |
| `IMEM_DEPTH` | 256 | own choice |
| `NREGS`, `ACC_W` | 16, 40 | own choice |

`ROWS` of 1, 2 or 8 gives the 1×2, 2×2 and 8×2 columns. With `ROWS = 1` the column has
one segment and no segmenter; the segmenter vectors keep one bit, which is ignored.

## What is modelled and what is not

* **From the architecture:**
  * the column / SIMD-controller / tile structure and tiles on both sides of the bus;
  * the tile's contents (two-unit 16-bit DSP, register file, SRAM, communication
    interface);
  * the segmented single-cycle column bus and the meaning of segmenter on/off (off
    joins, so all-off is broadcast);
  * a central per-column segment controller that is reprogrammable per algorithm;
  * a per-tile programmable communication engine;
  * the SIMD controller that runs all control flow;
  * one stall cycle per conditional branch and free zero-overhead loops;
  * integer-ratio column clocks;
  * a single horizontal bus joining the columns.
* **Own choices:**
  * the instruction set and its encoding; register count; forwarding;
  * the table form of both schedules, and the step counter shared by the segment
    controller and the tiles;
  * the transmit/receive line buffers; SRAM organised in bus-width lines;
  * the bridge to the horizontal bus on segment 0, and its PUT/GET/REL protocol;
  * the single loop level; column clocks made as enables of one base clock; the
    host port.
* **Not modelled:**
  * Separate voltages per column. This is physical.
  * Real separate clock trees.
  * Transmission-gate segmenters as analog switches. A segmenter is modelled as a
    logical join of the segments.
  * Power. The architecture was evaluated with power models and hand cycle counts;
    none of that is reproduced here.

The bus, `hbus` and `seg_bus` are combinational OR-buses with conflict flags, which suits
simulation and synthesis. In silicon they stand for tri-state or transmission-gate
wires.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* Unit benches compare against reference models written independently of the RTL. Most
  are randomised: ALU, MAC, regfile, SRAM, communication interface, segmented bus
  groups and conflicts, horizontal bus, clock ratios, and segment-schedule walking with
  the bridge protocol.
* `tb_simd_ctrl` runs a program against a sequential interpreter. It checks the stream
  of issued instructions and the exact cycle count, with the column enable held high
  and again toggled randomly.
* `tb_pe` checks forwarding, bypass, partial stores and a random register workout.
* `ss_tb_pkg` holds a kernel: an 8-tap dot product per tile in a zero-overhead loop;
  then a bus step with two messages at once, a broadcast that feeds a conditional
  branch, and a horizontal-bus hand-off.
  * `tb_ss_column` runs it on one column.
  * `tb_synchroscalar` runs it on the full default array, with the three columns at
    ratios 1:2:3. Column 0's result travels over the horizontal bus to the two slower
    columns.

* Workload benches run whole kernels and compare them with reference models written in
  the bench:
  * `tb_fir128` (with `fir_run`): a 128-tap FIR filter on 1×2, 2×2, 4×2 and 8×2 columns.
    Each tile holds 128/(number of tiles) taps. The partial sums are combined by a tree
    reduction over the segmented bus. Its first level runs in every segment at once; its
    last level joins the whole bus. 7 outputs are checked per size. The costs are 268,
    146, 88 and 62 cycles per output.
  * `tb_segmented` (with `fir_run`): the same filter run twice on 2×2, 4×2 and 8×2
    columns. One run uses the segmenters; the other leaves them all off, so every message
    of the tree needs its own bus step (3, 7 and 15 steps per output instead of 2, 3 and
    4). Both runs must give the same outputs. The segmented runs are shorter by exactly
    the saved steps: 1027 against 1034, 621 against 649 and 439 against 516 cycles.
  * `tb_viterbi` (with `viterbi_run`): the add-compare-select of a 64-state, rate-1/2,
    K=7 Viterbi decoder (generators 133 and 171 octal), on the same four column sizes.
    Each tile updates 64/(number of tiles) states. The old metrics are read through
    per-tile address tables. After each trellis step the new-metric lines are exchanged
    by broadcasts, so every tile again holds all 64 metrics. The bench checks every
    decision and metric and traces back the transmitted bits. One trellis step takes
    606, 350, 222 and 198 cycles on 1×2 to 8×2 tiles.
  * `tb_fft128` (with `fft_run`): a 128-point radix-2 FFT (decimation in frequency,
    halving at every stage), on the same four column sizes. Each tile holds
    128/(number of tiles) points. The first log2(tiles) stages pair points in different
    tiles: all tiles swap their data by 32 broadcasts, and each tile computes its half of
    each butterfly from its partner's copy. The remaining stages are local. The bench
    checks every output against an integer model and against a floating-point DFT. It
    takes 6126, 3605, 2284 and 1635 cycles on 1×2 to 8×2 tiles.
  * `tb_aes128`: AES-128 encryption on the default 4×2 column, one block per tile, with
    the S-box and xtime as look-up tables. Tile 0 sends the round count to the SIMD
    controller every round. One block is checked against the FIPS-197 example, the
    others against a software model. Eight blocks take 3015 cycles.
  * `tb_tile_configs`: the dot-product kernel with segment-parallel exchange, broadcast and
    branch on 1×2, 2×2, 4×2 and 8×2 columns.
  * `tb_bus_widths`: that kernel on 4×2 columns with 32-, 64-, 256-, 1024- and 4096-bit
    buses. A line of tile SRAM is always one bus width.

The top-level bench checks all 24 tiles' results and each column's 55-cycle run time.
It also counts branch stalls, loop-backs, load forwards, parallel and broadcast steps,
horizontal puts/gets and common clock ticks, and fails if any count is zero.

Two programming rules are checked by assertions in the RTL (build with `--assert`):
`simd_ctrl` reports a `LOOP` started inside an active loop, and `pe` reports a host SRAM
access in the same cycle as a tile memory instruction.

To run a bench with Verilator, for example the full array:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/ss_pkg.sv tb/ss_tb_pkg.sv tb/tb_synchroscalar.sv --top-module tb_synchroscalar
    ./obj_dir/Vtb_synchroscalar

It builds and runs in a few seconds. Unit benches need only `rtl/ss_pkg.sv` and their
own file.

Throughput is not checked against the application rates (for example, 54 Mbps Viterbi):
no clock frequency is specified for the tiles. The storage the kernels need (FIR taps,
FFT points, Viterbi state, AES tables) fits easily in a column's 8 × 32 kB.
