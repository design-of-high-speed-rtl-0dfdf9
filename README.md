# Precomputation-based CAM with a gate-block parameter extractor and gated-power matchlines

A content addressable memory (CAM) answers "where is this word stored?" by
comparing the search word with every stored word at once. That parallel
comparison is what makes a CAM fast, and also what makes it power hungry: every
row's matchline is charged on every search, and all rows start drawing current
at the same instant.

This design attacks the problem from two sides:

1. **Precomputation (PB-CAM).** Every stored word carries a few extra
   *parameter bits*, a short signature computed from the word. A search word's
   signature is computed the same way, and only rows whose stored signature
   equals it can possibly match. Only those rows are compared; all others stay
   unpowered for that search.
2. **Gated-power matchlines.** The comparison transistors of each row sit on
   their own supply rail (VDDML), fed through a power transistor Px. Px turns on
   when a search starts and a feedback loop in the row's sense amplifier turns
   it off again by itself as soon as the row has registered a mismatch. A
   matching row draws no current and a mismatching row draws only until the
   mismatch is sensed.

The signature generator is a *gate-block* parameter extractor: a small tree of
NAND, NOR and XOR gates per 8-bit slice of the word, whose gate types are
chosen at design time for the data the CAM will hold so that the signatures
split the stored words as evenly as possible.

The RTL models all of this at the clock-cycle level. Transistor-level
behaviour (charge-up speed, peak current, IR drop, voltage scaling) is outside
what RTL can express and is not modelled.

## Default configuration

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `M`  | 8192 | words (rows) |
| `N`  | 32   | bits per word |
| `L`  | 8    | bits per extractor partition; one parameter bit per partition |
| `P`  | N/L = 4 | parameter bits stored per word |
| `GATES` | `default_gates(N, L)` | gate type of every extractor gate, 2 bits each |

At the defaults the extractor has 32 - 4 = 28 gates and a depth of three gate
delays, whatever the word width. Each row stores 32 data bits, 4 parameter bits
and a valid bit.

## How a COMPARE runs

```
cmd ─► search_ctrl ─► search_word_reg ─► SL/~SL ─► cam_array ─► mismatch[r]
                            │                          ▲   │
                            └► param_extractor ─► sparam   └► row_en[r]
       EN & row_en[r] ─► ml_power_ctrl[r] ─► vddml[r] (back to the row)
                                          └► ml_out[r] ─► priority_encoder ─► result
```

| Cycle (after the accepting edge) | EN | What happens |
|---|---|---|
| 0 (accept) | low  | search word captured; all matchlines grounded, all C1 nodes high, every Px off |
| 1 (evaluate) | high | extractor output compared with every stored parameter; rows that are valid and have an equal parameter (`row_en`) get Px on; powered rows with a differing bit pull their matchline up |
| 2 (sense) | high | rows that saw a mismatch now read MLout = 0 and have switched their own Px off; the priority encoder sees `ml_out & row_en`; the result is captured |
| 3 | low  | `rsp_valid` with hit, address, multi-match and the two row counts; the next command may be accepted in this cycle |

Two details matter:

* A row that is not enabled keeps its matchline grounded, and a grounded
  matchline reads as a match in this sense amplifier. Its output is therefore
  masked with its `row_en` before the encoder.
* A WRITE uses the same path: the cell's access transistors connect its
  storage nodes to the search lines, so the word to be written is loaded into
  the search word register, and the parameter stored with it comes from the
  same extractor. READ returns the stored word, parameter and valid bit.

WRITE and READ respond 2 cycles after acceptance, COMPARE 3 cycles. Commands
are handled one at a time.

## The parameter extractor and how its gates are chosen

The word is cut into `L`-bit partitions. Each partition is reduced by a binary
tree of two-input gates to one parameter bit, so an 8-bit partition uses seven
gates in three levels (G0-G3, then G4-G5, then G6).

Gate numbering, used by the `GATES` vector and by `pbcam_pkg`: level 0 has N/2
gates and gate k combines word bits 2k and 2k+1; gate k of level v+1 combines
outputs 2k and 2k+1 of level v; numbering runs through level 0 first, then
level 1, and so on. Gate g occupies `GATES[2g+1:2g]` with the encoding
`G_NAND = 0`, `G_NOR = 1`, `G_XOR = 2`.

**Why the choice of gates matters.** A parameter bit is only useful if it
splits the stored words evenly. If among `S` stored words `S0` give a 0 and
`S1` give a 1, then a search compares on average

    Cavg = (S0² + S1²) / S

rows. An unbiased bit halves the work; a bit that is almost always 1 saves
nothing. A NAND of two random bits is 1 three times out of four, while an XOR is
balanced, but real data are not random, which is why the choice is made per
gate from sample data.

**Selection procedure** (`pbcam_pkg::gbs_select`):

1. For every gate position of the current level, apply NAND, NOR and XOR to the
   corresponding input pair of every sample.
2. Compute Cavg of each candidate's output over the samples.
3. Keep the candidate with the smallest Cavg (ties: NAND, then NOR, then XOR).
4. If more than N/L bits remain, use the kept outputs as the next level's
   input data and repeat.

Example with 16 samples of 4-bit data (the set used in
`tb/param_extractor_tb.sv`). On the pair D3 D2, NAND gives Cavg = 12.5, NOR
8.125, XOR 9.125, so NOR is kept. On D1 D0, NAND 8, NOR 12.5, XOR 8.5: NAND is
kept. On the two results, XOR gives 8.125 (NAND 10, NOR 11.125): XOR is kept.
The resulting extractor is P = NOR(D3, D2) XOR NAND(D1, D0).

The default `GATES` simply repeats that pattern over the word: NAND on the
lower pair and NOR on the upper pair of every nibble, XOR on all higher levels.
For a real application, run `gbs_select` on representative words in a small
simulation and pass the printed result as `GATES`:

```systemverilog
import pbcam_pkg::*;
logic [MAX_W-1:0]   samples[$];   // push typical 32-bit words here
int unsigned        ncavg[];
logic [2*MAX_W-1:0] gates;
initial begin
  // ... fill samples ...
  gates = gbs_select(samples, 32, 8, ncavg);
  $display("GATES = %0d'h%h", 2*28, gates[2*28-1:0]);
end
```

`ncavg` returns S·Cavg of every candidate (index 3·gate + candidate) for
inspection.

## The gated-power matchline sense amplifier

Per row (`ml_power_ctrl`), the circuit is: EN low grounds the matchline (M7)
and precharges node C1 high (M9); a NAND2 of EN and C1 drives the PMOS power
transistor Px, so Px is on only while EN and C1 are both high; when a powered
cell mismatches, the matchline rises until transistor M8 pulls C1 low, which
turns Px off. C1, buffered, is MLout: 1 for a match.

The RTL keeps exactly that logic with one state bit, `ml_q` ("the matchline has
crossed M8's threshold"):

* `c1 = ~(en & ml_q)`, `vddml = en & c1`, `ml_out = c1`;
* `ml_q` is cleared while `en` is low and set while `en` is high by a mismatch
  seen on the powered row.

Crossing the threshold takes exactly one clock cycle here. In silicon it takes
longer when only a few bits mismatch, because the limited current through Px is
shared by all the row's mismatching cells; that dependence is not modelled, and
the clock period must cover the single-mismatch case.

`rsp_rows_enabled` (rows powered by the parameter match) and
`rsp_rows_cutoff` (rows whose Px switched itself off) make both savings
visible per search.

## Top-level interface (`pbcam_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset (clears every valid bit) |
| `cmd_valid` / `cmd_ready` | in / out | 1 | handshake; ready only when idle |
| `cmd_op` | in | 2 | `OP_READ`, `OP_WRITE`, `OP_COMPARE` (`pbcam_pkg::cam_op_e`) |
| `cmd_addr` | in | AW | row for READ and WRITE |
| `cmd_data` | in | N | word to write, or search word |
| `cmd_wvalid` | in | 1 | WRITE: 1 stores a valid entry, 0 deletes the row |
| `rsp_valid` | out | 1 | one-cycle response strobe |
| `rsp_op` | out | 2 | operation answered |
| `rsp_hit`, `rsp_addr`, `rsp_multi` | out | 1, AW, 1 | COMPARE: found, lowest matching row, more than one match |
| `rsp_rows_enabled`, `rsp_rows_cutoff` | out | AW+1 | COMPARE: rows compared, rows cut off by a mismatch |
| `rsp_rdata`, `rsp_rparam`, `rsp_rvalid` | out | N, P, 1 | READ: stored word, parameter, valid bit |

Response fields keep their value until the next response of the same kind.

## Files

| File | Content |
|---|---|
| `rtl/pbcam_pkg.sv` | gate and operation types, gate evaluation, default gate choice, gate-block selection functions |
| `rtl/param_extractor.sv` | gate-block parameter extractor |
| `rtl/search_word_reg.sv` | search word register driving SL/~SL |
| `rtl/cam_array.sv` | word, parameter and valid storage; parameter comparison; powered data comparison |
| `rtl/ml_power_ctrl.sv` | one row's gated-power matchline sense amplifier |
| `rtl/priority_encoder.sv` | lowest-address priority encoder with multi-match flag |
| `rtl/search_ctrl.sv` | READ/WRITE/COMPARE sequencer, global EN |
| `rtl/pbcam_top.sv` | the CAM |
| `tb/<module>_tb.sv` | self-checking testbench of each module |
| `tb/pbcam_top_tb.sv` | end-to-end test at 256 rows, random traffic against a model, counts every mechanism |
| `tb/pbcam_top_full_tb.sv` | the same checks at the default 8192 rows |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and ends with
`$finish`; it fails by its own watchdog if it hangs. With Verilator 5:

```sh
verilator --binary --timing --assert -j 4 --top-module pbcam_top_tb \
  -y rtl -y tb +libext+.sv rtl/pbcam_pkg.sv tb/pbcam_top_tb.sv
./obj_dir/Vpbcam_top_tb
```

Replace `pbcam_top_tb` by any other testbench name. The full-size test
(`pbcam_top_full_tb`) builds in about a minute with 4 jobs (8192 row
instances) and runs in under a second. The testbenches do not depend on X
values; they run with any `+verilator+rand+reset` setting.

## Where this design departs from the source, and how far to trust it

* **Word width.** The source evaluates its power techniques on an 8K x 132 cell
  array but specifies the parameter extractor for 32-bit words (4 parameter
  bits, 28 gates). 132 is not a multiple of the 8-bit partition, so the default
  here is 32-bit words; `N` is a parameter (any multiple of `L` up to 256).
* **Gate choice.** No gate choice is published for 32-bit words; the default
  `GATES` is a placeholder pattern and should be replaced by the result of
  `gbs_select` on the target data.
* **Timing.** A conventional CAM answers in one cycle. Here a COMPARE takes one
  cycle with EN low and two with EN high, and the result is registered; the
  command interface, the valid bit per entry, the lowest-address priority, the
  multi-match flag and the row counters are this design's additions.
* **Analog behaviour.** The matchline charge-up, the current limiting of Px,
  the roughly 0.5 V matchline swing, peak current, IR drop, supply scaling and
  the cell layout are not modelled. The power saving shows only as how many
  rows are powered and for how long.
* **Parameter comparison.** How the stored parameters are compared is not
  specified in the source; here it is plain equality logic that qualifies each
  row's EN.
* **Not built.** A modulo 2^n+1 multiplier is mentioned as a planned addition
  to the parameter extractor without width, operands or placement; it is not
  part of this RTL.

Verification: each module has a self-checking testbench against an
independently written reference (closed-form extractor equations, a linear
scan for the encoder, a behavioural copy of the array contents), and each
testbench was shown to fail on a deliberately broken copy of its module. The
end-to-end tests exercise hits, misses, multi-matches, deletes, reads, searches
where the parameter filters out some or all rows, and rows whose power is cut
by a mismatch, and they check every latency.
