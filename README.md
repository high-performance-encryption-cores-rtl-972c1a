# KASUMI encryption cores: pipelined and iterative

KASUMI is the 64-bit block cipher, keyed by 128 bits, behind the UMTS f8
(confidentiality) and f9 (integrity) functions, GSM A5/3 and GPRS GEA3. This
RTL gives two hardware implementations of KASUMI encryption built around one
idea: **pair the six FI sub-functions of two consecutive rounds so that each
pair shares dual-port S-box ROMs, and finish each pair in one clock cycle by
reading half of the S-boxes at the falling clock edge and half at the rising
edge.** From that one four-stage, two-round datapath come:

| core | structure | throughput | latency | S-box ROMs |
|---|---|---|---|---|
| `kasumi_pipelined` | 4 two-round datapaths in series, key travels with each block | 1 block (64 bit) per cycle | 16 cycles | 48 |
| `kasumi_iterative` | 1 two-round datapath, output fed back 4 times | 1 block per 16 cycles | 16 cycles | 12 |

`kasumi_top` places both cores side by side. They are independent designs
that share only clock and reset. Both do encryption only, the direction f8 and
f9 use.

## The cipher, briefly

KASUMI is an 8-round Feistel network on L‖R (32 bits each). Round *i*
computes `L_i = R_{i-1} ^ f_i(L_{i-1})`, `R_i = L_{i-1}`, where

* odd rounds use `f = FO(FL(x))` and even rounds use `f = FL(FO(x))`;
* **FL** (32 bit) is a few ANDs, ORs, XORs and 1-bit rotations (`kasumi_fl`);
* **FO** (32 bit) is a 3-round Feistel network on 16-bit halves. Each round
  calls FI: `r_j = FI(l_{j-1} ^ KO_j, KI_j) ^ r_{j-1}`;
* **FI** (16 bit) is a 4-round Feistel network on a 9-bit and a 7-bit half.
  It makes two levels of lookups: S9 and S7 on the input, then S9 and S7 on
  the intermediate result;
* the round keys KL, KO and KI come from the key's eight 16-bit words
  K1..K8 and from K'j = Kj ^ Cj, where C1..C8 are fixed constants. The words
  are taken by position and rotated by a fixed amount.

Tables and constants are in `kasumi_pkg`. The equations are written out in
the header comments of each module.

## Pairing six FI calls into three cycles (`kasumi_two_round`)

Take an odd round followed by an even round. Write FIa1..FIa3 for the odd
round's FO calls and FIb1..FIb3 for the even round's. Expand both FO
functions, and split the 32-bit XOR between them into its two 16-bit halves.
The dependencies then allow three pairs:

| stage | computed before the FI pair | FI pair (one `kasumi_fi_dp`) |
|---|---|---|
| 1 | `X = FL(L0, KL_odd)` | `FIa1(X.hi ^ KO1)`, `FIa2(X.lo ^ KO2)` |
| 2 | `r1 = FIa1^X.lo`, `r2 = FIa2^r1`, `L1.hi = R0.hi^r2` | `FIa3(r1 ^ KO3)`, `FIb1(L1.hi ^ KO1')` |
| 3 | `r3 = FIa3^r2`, `L1.lo = R0.lo^r3`, `s1 = FIb1^L1.lo` | `FIb2(L1.lo ^ KO2')`, `FIb3(s1 ^ KO3')` |
| 4 | `s2 = FIb2^s1`, `s3 = FIb3^s2`, `L2 = L0 ^ FL(s2‖s3, KL_even)`, `R2 = L1` | — (output register) |

Primed keys belong to the even round. The values an FI pair does not touch
(L0, R0, X.lo, r2, L1, s1) run beside it through `kasumi_sync_reg`. This is a
falling-edge flop followed by a rising-edge flop, so the value arrives together
with the FI results one cycle later. A block goes in during cycle *n*, and
L2‖R2 is in the output register during cycle *n+4*. Nothing stalls: a new
block can go in every cycle.

The original design fixes the four stages and the three dual-port FI blocks,
but not what goes in the fourth stage. This RTL puts the last FO XORs, the
even-round FL and the L0 XOR there, in front of an output register pair. It
also chooses where FL of the odd round sits: it is combinational in front of
stage 1.

## One FI pair per cycle (`kasumi_fi_dp`)

Each `kasumi_fi_dp` holds one dual-port S9 and one dual-port S7 ROM per
lookup level (`kasumi_s9_dp`, `kasumi_s7_dp`). Port A serves one FI and port
B the other. The ROMs are synchronous, as FPGA block RAM is, so two lookup
levels would normally take two clock cycles. To fit both in one cycle:

```
 cycle n            falling edge                    rising edge (end of n)
 in, KI valid ──► upper S9/S7 read ──► L2, R2 ──► lower S9/S7 read ──► out valid in n+1
                  7-bit half, KI                  R2 captured
                  captured
```

* The upper (first-level) ROMs are instantiated with `NEG_EDGE = 1` and read
  at the falling edge in the middle of the cycle.
* The lower ROMs read at the rising edge that ends the cycle.
* This design's own choice: the FI's 7-bit half and the KI bits are also
  captured at the falling edge, and R2 at the rising edge. The result is a
  function of registered values only, so it holds for the whole next cycle.

The timing rules that follow:

* Inputs to an FI pair, and every side value, only need to be settled by the
  falling edge. All logic in front of an FI (FL, the key XORs, the iterative
  core's input multiplexers) has half a clock period.
* The S-box lookup and the FI XORs between the two levels also have half a
  period.
* The logic after the last FI, in stage 4, has a whole period up to the
  output register.

In short, the design uses both clock edges throughout. A synthesis flow has
to constrain it as a two-phase design, and static timing analysis has to see
the half-cycle paths.

## Key scheduling

**Pipelined (`kasumi_ksched_pipe`).** Each of the four instances has four
stages. They carry the full 128-bit key beside the block, one copy per
stage. Each stage derives only the round-key fields its datapath stage
reads:

| stage | fields |
|---|---|
| 1 | KL, KO1, KO2, KI1, KI2 of the odd round |
| 2 | KO3, KI3 of the odd round; KO1, KI1 of the even round |
| 3 | KO2, KO3, KI2, KI3 of the even round |
| 4 | KL of the even round |

Instance `PAIR = p` serves rounds 2p+1 and 2p+2. Because the key moves with
its block, every block in the pipeline may use a different key.

**Iterative (`kasumi_ksched_iter`).** Two registers of eight 16-bit words
rotate left: one holds K1..K8 and the other C1..C8. Word 0 always belongs to
the round in progress, so every round key is fixed wiring plus an XOR. A
toggle flop divides the clock by two and enables a rotation every second
cycle. Each four-cycle pass therefore sees two register positions:

* cycles 1–2 (odd round *i*): all of round *i*, plus KO1/KI1 of round *i+1*,
  which is read one word further on;
* cycles 3–4 (after one rotation): the rest of round *i+1*.

This needs no multiplexer. The split matches exactly what stages 1–2 and
3–4 of the datapath read. After 16 cycles (8 rotations) the registers are
back where they were loaded, so the next block reuses the key with no
reload. The original design describes the divider as a clock divider. Here it is a
clock enable on rising-edge flops, which is this design's choice.

## Interfaces

All signals are sampled on the rising edge. `rst_n` is active low and
asynchronous, and resets only control state (valid bits, counters, the key
registers). Datapath registers have no reset.

**`kasumi_pipelined`** (`p_*` on the top)

* `in_valid`, `pt[63:0]`, `key[127:0]`: the block and its key, taken in any
  cycle with `in_valid` high. Hold them through the cycle; they are first
  used at its falling edge.
* `out_valid`, `ct[63:0]`: the result of the block taken 16 cycles earlier.
* There is no back-pressure.

**`kasumi_iterative`** (`i_*` on the top)

* `key_load`, `key`: load a key while the core is idle. The key stays until
  it is reloaded. `key_load` wins over a new block.
* `in_valid`, `in_ready`, `pt`: a block is taken when both are high. Hold
  `pt` through that cycle.
* `out_valid` (a one-cycle pulse) and `ct`: the result, 16 cycles after the
  block was taken.
* `in_ready` rises again in the same cycle as `out_valid`, so back-to-back
  blocks give 64 bits every 16 cycles. Between results, `ct` shows
  intermediate pass values.

## Size and how it compares with the reference figures

The S-box counts match the published implementation exactly: 48 ROMs in the
pipelined core and 12 in the iterative one. On a Virtex-E FPGA, each S7 fills
one 4096-bit block RAM and each S9 (4608 bits) fills two. That gives 72 and 18
block RAMs, which is what the published results list: 72 of 96 on an
XCV1000E and 18 of 32 on an XCV300E. The published clock rates are 83 MHz
(pipelined, 5.3 Gbit/s) and 79 MHz (iterative, 318 Mbit/s). They imply
exactly the 64 bits per cycle and 64 bits per 16 cycles that these cores
deliver.

Clock rate and slice counts depend on the FPGA mapping and have not been
reproduced. Generic synthesis counts 1,019 flip-flop bits for the
iterative core, against 1,018 slice flip-flops in the published figures.
For the pipelined core it counts 5,055 against 6,596. The gap most likely lies in
the key pipeline, whose storage the original design does not detail.

## Where this RTL departs from, or goes beyond, the source design

* **S-box tables, FL/FI equations, key schedule:** taken from the KASUMI
  standard, which the original design builds on. They are checked against
  the standard's test vector `2BD6459F82C5B300952C49104881FF48` /
  `EA024714AD5C4D84` → `DF1F9B251C0BF45F`.
* **Which FI calls pair up, and what stage 4 holds:** worked out here from
  the structure of the cipher, following the restructuring steps the
  original design describes (unroll both FO functions, split the 32-bit XOR
  between them, pair the parallel FI calls).
* **Registers inside `kasumi_fi_dp`:** the falling-edge capture of the 7-bit
  half and KI, and the rising-edge capture of R2, are this design's own.
* **Handshakes, valid bits, reset, the key-load port:** this design's own.
* **The divide-by-two divider:** implemented as a clock enable, not as a
  second clock.
* **Pipelined key scheduler:** the function is from the original design
  (each stage gets only the round keys it needs). The storage is this design's: a full key
  copy per stage.
* **Not provided:** decryption, the f8/f9 modes of operation, and
  vendor-specific block-RAM instantiation. The ROMs are written as arrays for
  the synthesis tool to map.

## Files

`rtl/`:

* `kasumi_pkg.sv`: tables, constants, the round-key struct `round_key_t` and
  the `round_keys()` function.
* `kasumi_s7_dp.sv`, `kasumi_s9_dp.sv`: dual-port S-box ROMs.
* `kasumi_fl.sv`, `kasumi_fi_dp.sv`, `kasumi_sync_reg.sv`: FL, the dual-port
  FI block and the register pair.
* `kasumi_two_round.sv`: the four-stage two-round datapath.
* `kasumi_ksched_pipe.sv`, `kasumi_ksched_iter.sv`: the two key schedulers.
* `kasumi_pipelined.sv`, `kasumi_iterative.sv`, `kasumi_top.sv`: the cores and
  the top.

`tb/`:

* `kasumi_ref_pkg.sv`: a plain software model of KASUMI, written directly
  from the cipher's definition.
* One `tb_<module>.sv` per module. Each is self-checking and prints
  `TB_RESULT checks=N failures=M`.

## Verification

Every testbench compares against `kasumi_ref_pkg`, not against the RTL's own
restructured equations:

* **S-box ROMs:** every address on both ports and both edge variants; the
  permutation property; the published corner entries; which edge each
  instance updates on.
* **`kasumi_fi_dp`, `kasumi_two_round`:** a new random input and key every
  cycle, checking the 1-cycle and 4-cycle latency. In the two-round test each
  key field is presented only in the stage that reads it.
* **Key schedulers:** every field, checked in the cycle or stage it is read.
* **Cores:** the standard test vector, streams of random blocks and keys, and
  latency.
* **`tb_kasumi_top`:** runs both cores at once at full size and counts each
  mechanism: a full 16-deep pipeline, bubbles, per-block key changes,
  feedback passes, input stalls, back-to-back hand-overs and key reloads.

To simulate with Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_kasumi_top rtl/kasumi_pkg.sv tb/kasumi_ref_pkg.sv tb/tb_kasumi_top.sv
./obj_dir/Vtb_kasumi_top
```

Substitute any other `tb_*` name to run another testbench. Each runs in
seconds.
