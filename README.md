# NAPOLY — a reprogrammable NFA processor overlay in SystemVerilog

Many pattern-matching jobs (virus signatures, network rules, motif search,
edit-distance filters) reduce to running a non-deterministic finite automaton
(NFA) over a long byte stream. An NFA can have any number of states active at
once, which is cheap in hardware (one flip-flop per state, all updated in
parallel) and expensive in software. The catch of hardware automata engines is
capacity: real rule sets have tens to hundreds of thousands of states, more
than fit on a chip, and engines that take milliseconds or seconds to reload
cannot time-share their hardware between parts of the rule set.

NAPOLY is an overlay: a fixed array of identical *State Transition Elements*
(STEs) with a small, regular interconnect, whose behaviour is set entirely by
memory contents and configuration flip-flops. Reloading it takes tens of
thousands of cycles instead of an FPGA recompile, so an automaton of any size
is run as a sequence of *passes*: load one slice of the automaton, stream the
input through it, flush the reports, load the next slice.

This repository holds synthesizable RTL of the overlay, a testbench per block
and two end-to-end testbenches. The default parameters are the 8K-STE overlay
(8192 STEs, hardware fan-out 44, 64K-symbol input buffer, 32K-word output
buffer of 512-bit report words, 32 priority encoders).

## How one symbol is processed

The automaton is in ANML form: each state carries the set of symbols on which
it can be entered (rather than labels on edges). State *n* of a slice sits on
STE *n*.

1. The input symbol (8 bits) selects one row of the **current state table**
   (`napoly_cst`), a 256 × N_STE bit RAM. Bit *n* of the row says whether STE
   *n* accepts this symbol. The read is asynchronous, which is what allows one
   symbol per cycle (a registered block-RAM read would need a second cycle).
2. Each **STE** (`napoly_ste`) ORs its F incoming activation wires. If any is
   set and its match bit is 1, its state bit is set at the next clock edge;
   otherwise it is cleared. An STE with the **start flag** never clears: it is
   an always-active entry point of the automaton.
3. While its state bit is set, an STE drives its F outgoing wires, each ANDed
   with one **interconnect configuration bit**. An NFA edge is therefore a
   single bit.
4. An active STE with the **report flag** raises its report line.

The update rule, per STE and per consumed symbol:

    state' = start | ( OR_k(in_k) & CST[symbol][n] )

### The interconnect and its reach

There is no routing network. Every STE has a dedicated wire to itself and to
F−1 neighbours along a one-dimensional index:

    STE n  →  STE n − ⌊(F−1)/2⌋  …  STE n + ⌊F/2⌋

Output *k* of STE *n* drives input *k* of STE *n − ⌊(F−1)/2⌋ + k*; wires that
would leave the array are absent. With F = 44 an STE reaches 21 STEs below
and 22 above (plus itself). F is the *hardware fan-out*. It bounds both the
number of successors of a state and how far apart connected states may be
placed, so placing states is a one-dimensional mapping problem that is solved
offline (the published work uses a SAT solver). The array does not check the
mapping. It simply runs whatever edges the configuration enables.

F and the STE count trade against each other on a given FPGA, because the
F-input OR of each STE dominates logic use. These are the published
Stratix V design points:

| STEs | F   | Fmax (MHz) | encoders | output buffer depth × padded width |
|------|-----|-----------:|---------:|-------------------------------------|
| 4K   | 103 | 152 | 16 | 64K × 256  |
| 8K   | 44  | 136 | 32 | 32K × 512 (default) |
| 12K  | 25  | 122 | 48 | 24K × 1024 |
| 16K  | 12  | 121 | 64 | 16K × 1024 |
| 20K  | 6   | 119 | 80 | 12K × 2048 |
| 24K  | 3   | 112 | 96 | 8K × 2048  |

Any row can be built by setting `N_STE`, `F` and `OB_DEPTH` on `napoly_top`.
The report word width follows from `N_STE`.

## Reports: encoders, stalls and the report word

Any STE may report, and in the worst case every STE reports in every cycle.
The array is cut into **output regions** of 256 consecutive STEs (four per
1024-STE reporting region). Each region has one **priority encoder**
(`napoly_prio_enc`). Starting from the lowest-numbered STE it emits one
reporting STE per cycle and marks it served. All encoders work in parallel,
and their outputs of one cycle form one **report word** (`napoly_reporter`),
written to the output buffer.

If any encoder has more than one report pending, the array **stalls**: it
does not consume the next symbol, and the state vector stays still while the
encoders catch up. So a symbol costs one cycle if no output region has more
than one report, and *k* cycles if the busiest region has *k*. The array also
stalls while the output buffer is **full**. No report is ever dropped.

Report word layout (LSB first; E = N_STE/256 encoders, IDW = log2 N_STE):

| bits | content |
|------|---------|
| `[e*IDW +: IDW]` for e < E | global index of the STE reported by encoder e |
| `[E*IDW + e]` | valid flag of encoder e |
| `[E*IDW + E +: 16]` | input offset of the symbol that caused the reports |
| rest | zero padding up to a power of two |

For 8K: 32 × 13 = 416 ID bits, + 32 valid bits + 16 offset bits = 464,
padded to 512. The IDs and the power-of-two padding reproduce the published
buffer widths for all six sizes. Storing the offset in the padding also
follows the published design. The valid flags, which also sit in the
padding, are this implementation's own addition. The report for the symbol
at offset *t* describes the state *after* that symbol. The state before the
first symbol is never reported.

## A pass, and how the host drives it

`napoly_ctrl` sequences a pass: IDLE → RUN → DRAIN → DONE.

While `cfg_ok` is high (IDLE or DONE) the host may reprogram:

* **Current state table**: `cst_we`, `cst_waddr = {symbol, word}`,
  `cst_wdata` (64 bits). Word *w* of row *s* holds the match bits of STEs
  `[64w +: 64]` for symbol *s*. Full load: 256 × N_STE/64 cycles (32,768 for
  8K).
* **Interconnect and flags**: `cfg_shift`, `cfg_data` (64 bits). The flags
  live in 64 parallel shift chains (`napoly_cfg_chain`), one per bit of the
  memory interface. The flat image has F+2 bits per STE: bits
  `[n(F+2) +: F]` are STE n's output enables (bit k drives STE
  n − ⌊(F−1)/2⌋ + k), then its start flag, then its report flag. Image word
  *w* is bits `[64w +: 64]`. Send the highest word first.
  ⌈N_STE(F+2)/64⌉ cycles (5,888 for 8K/44).
* **Input buffer**: `ib_we`, `ib_waddr`, `ib_wdata`, eight symbols per
  64-bit word, symbol *i* in bits `[8i +: 8]` (8,192 cycles for 64K symbols).

`go` with `len` (1 … 65,536) starts the pass. The STE states load their start
flags, and the input buffer (`napoly_in_buf`) rewinds. From the next cycle on
it delivers one symbol per cycle for as long as the array is not stalled.
After the last symbol the controller waits in DRAIN until the encoders are
empty, then raises `done`. Host writes are ignored while a pass runs.

The output buffer (`napoly_out_buf`) is a FIFO read through `ob_rd_en`. Data
comes out on `ob_rd_data`/`ob_rd_valid` one cycle later, and `ob_count`
tells how many words are waiting. A DMA engine may drain it during the pass
(this is what prevents full-buffer stalls) or after `done`. The per-pass
counters `n_symbols`, `n_cycles`, `n_stall_report` and `n_stall_full`
report the cost of the pass.

The overlay's throughput model: per block of input, fill the input buffer,
then for each slice of the automaton reconfigure, stream the input buffer
through the array and flush the output buffer. Larger arrays need fewer
slices. An automaton of S states mapped at fan-out ≤ F needs ⌈S/N_STE⌉
passes per input buffer.

### Capacity against published workloads (default 8K / F = 44)

The state counts and minimum fan-outs below are the published mapping results
for the ANMLZoo suite. All of them have a minimum fan-out ≤ 44, so every one
maps onto the default array. All except Levenshtein need several passes:

| benchmark | states | min F | passes on 8K |
|-----------|-------:|------:|-------------:|
| Levenshtein | 2,784 | 16 | 1 |
| Hamming | 11,346 | 14 | 2 |
| Brill | 26,668 | 8 | 4 |
| PowerEN | 40,513 | 8 | 5 |
| Fermi | 40,783 | 5 | 5 |
| Protomata | 42,061 | 42 | 6 |
| ClamAV | 49,538 | 12 | 7 |
| Snort | 69,029 | 36 | 9 |
| Random Forest | 75,340 | 6 | 10 |
| Entity Resolution | 95,136 | 41 | 12 |
| Dotstar | 96,438 | 4 | 12 |
| SPM | 100,500 | 6 | 13 |

An input longer than 64K symbols is processed in 64K-symbol blocks, each
through every pass.

## Interpretations and departures

* **Start flag.** Here a start STE keeps its state bit set for the whole
  pass, whatever the input. An always-enabled ANML start state that still
  needs a symbol match is therefore modelled as a start STE feeding an
  ordinary STE. This follows the literal rule that the state bit is cleared
  "unless the start bit is set", and makes "all STEs report every cycle"
  reachable by setting only the start and report flags.
* **State at pass start.** `go` loads each state bit with its start flag.
  State is not carried between passes.
* **Encoder operation.** Each encoder emits one report per cycle and stalls
  the array while more remain. A different design could emit several
  reports per encoder per cycle.
* **Report IDs** are global STE indices (log2 N_STE bits), as in the
  published buffer-width table. A region-local 10-bit ID (320-bit words for
  8K) would also be possible.
* **Output buffer port widths.** The read port has the report word's width.
  For the default size this equals the 512-bit DMA width. For sizes whose
  word is not 512 bits, the published design has a separate 512-bit DMA port
  with a width ratio, which is not built here.
* **Output buffer full** stalls the array. The published flow instead
  flushes the buffer after the pass, with the depth sized for the expected
  report rate.
* **Reconfiguration time.** With 64-bit write ports, reloading the 8K overlay
  takes 32,768 + 5,888 cycles (≈ 285 µs at 136 MHz). The published figure
  is 31 µs, which implies a much wider current-state-table write path. The
  write width is `WR_W` on `napoly_cst` and can be widened. The same holds for
  the input buffer: filling 64K symbols 8 per cycle takes 8,192 cycles
  (≈ 60 µs). The published fill time of 8.6 µs implies a wider path
  (`WR_W` on `napoly_in_buf`).
* The host memory (DRAM), its controller and the DMA engine are outside this
  RTL. Their ports are the top-level write and read ports. The offline
  mapping tool (state placement, fan-in/fan-out relaxation) is software and
  not part of the RTL.

## Files

| file | contents |
|------|----------|
| `rtl/napoly_pkg.sv` | shared constants, report word width, controller states |
| `rtl/napoly_ste.sv` | one STE |
| `rtl/napoly_ste_array.sv` | N_STE STEs and the point-to-point interconnect |
| `rtl/napoly_cst.sv` | current state table (256 × N_STE, async read) |
| `rtl/napoly_cfg_chain.sv` | 64 parallel configuration shift chains |
| `rtl/napoly_in_buf.sv` | 64K × 8 input buffer and symbol streamer |
| `rtl/napoly_prio_enc.sv` | one output-region priority encoder |
| `rtl/napoly_reporter.sv` | all encoders, report word packing, stall |
| `rtl/napoly_out_buf.sv` | report FIFO |
| `rtl/napoly_ctrl.sv` | pass sequencer and counters |
| `rtl/napoly_top.sv` | the overlay |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_napoly_top.sv` | end-to-end, 512 STEs / F = 10, three passes |
| `tb/tb_napoly_top_full.sv` | end-to-end at the default size, one 64K-symbol pass |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and ends with
`$finish`. Each has a watchdog. Example with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
        rtl/napoly_pkg.sv tb/tb_napoly_top.sv -y rtl +libext+.sv \
        --top-module tb_napoly_top -o sim
    ./obj_dir/sim

The end-to-end testbenches draw a random automaton for every pass: small
symbol sets, sparse edges within reach, a few start and report states. They
load it through the host ports exactly as the host would and fill the input
buffer with random symbols. One slice also holds the automaton for "ababc"
in STEs 0–5. A reference model inside the testbench steps the automaton and
derives the expected report words, and every word read from the output
buffer is compared against it. The "ababc" reports are also checked against
a plain string search. The reduced testbench also counts report stalls,
full-buffer stalls, backward, self and forward edges firing, start states,
multi-encoder words and reconfiguration between passes, and fails if any of
them never happens.

The full-size testbench builds the 8192-STE array. Verilator needs about ten
minutes to build it and about two minutes to run it (roughly 1 ms per
simulated cycle).

## How far to trust it

* Every module has a self-checking testbench against an independently
  written model. Each testbench has been shown to fail on a deliberately
  broken copy of its module.
* The full-size testbench has run one complete pass at the default
  parameters. The pass streamed 65,536 symbols in 67,181 cycles, of which
  1,643 were report stalls, and produced 67,179 report words. Every word
  matched the reference model.
* The reduced end-to-end testbench runs three passes with reconfiguration in
  between. Report stalls and full-buffer stalls both occur in it, and every
  word is checked.
* The RTL is lint-clean in Verilator apart from width and unused-signal
  warnings, and it elaborates in the slang front end. It has not been
  through FPGA place and route. Timing and resource use at these sizes are
  therefore unknown for this code.
