# LTE turbo decoder with an XMAP engine (150 Mbit/s class)

LTE reaches 150 Mbit/s with 2x2 MIMO by puncturing its rate-1/3 turbo code
up to rate 0.95. For a 6144-bit block only about a third of the coded bits
are then sent. A decoder must work fast enough for that data rate, yet still
get close to the error rate of an ideal, non-windowed decoder. The hard part
is the window borders. A parallel decoder cuts the block into windows and has
to estimate the trellis state at each border. With so few received values,
that estimate needs a long acquisition run.

This RTL implements such a decoder around a single pipelined **XMAP**
Max-Log-MAP engine:

* Every 4 clock cycles a new 32-bit window enters the engine, which delivers
  8 LLRs per cycle.
* Each window gets a 96-step acquisition on both sides.
* Acquisition is combined with **next iteration initialisation (NII)**. After
  the first iteration, the acquisitions do not start from "all states equally
  likely". They start from the border metrics that the previous iteration
  stored.
* Four recursion steps are folded onto each recursion unit.
* The CRC is checked after every half-iteration, and decoding stops at the
  first valid result.

A 6144-bit block with 13 half-iterations takes 12114 cycles. At the intended
300 MHz clock that is 152 Mbit/s.

| quantity | value |
|---|---|
| algorithm | Max-Log-MAP, extrinsic scaling factor 0.75 |
| channel / extrinsic / state metric width | 6 / 7 / 11 bit |
| window length WL, acquisition length AL, folding H | 32, 96, 4 |
| LLRs per cycle N | 8 |
| block sizes | any multiple of 8 up to 6144 (all LTE sizes) |
| code rate | up to 0.95 by external puncturing (punctured values enter as 0) |
| half-iterations | run-time limit `max_hi`, CRC early stop |
| cycles per half-iteration | 4*ceil(BL/32) + 163 (931 for BL = 6144) |

## Decoding flow

A turbo code block is encoded by two 8-state recursive convolutional
encoders. The LTE polynomials are g0 = 1+D^2+D^3 (feedback) and
g1 = 1+D+D^3. The first encoder sees the data in natural order. The second
sees it through the QPP interleaver Pi(i) = (f1*i + f2*i^2) mod BL.

The decoder alternates between the two codes, one *half-iteration* at a
time, on the same engine:

* **map 0 (natural order).** Lane j of group g is position 8g+j. The engine
  reads the systematic value, parity 1 and the a-priori value (the last
  extrinsic output of map 1) for each position. It writes the new extrinsic
  value back in place.
* **map 1 (interleaved order).** Lane j of group g works on position
  Pi(8g+j). It reads the systematic and extrinsic values at that position
  and parity 2 at 8g+j.

The extrinsic memory is split into 8 banks:

* bank = position mod 8;
* address = position div 8.

Because 8 divides every LTE block length, Pi(i) mod 8 is the same for i and
i+8. So the 8 lanes of a group always address 8 different banks, and
interleaved reads and writes never collide. One extrinsic memory, updated in
place, serves both component decoders. Every location is read before the
same half-iteration overwrites it.

Half-iterations are not overlapped. Each one is started once the previous
one has written its last value. The engine latency (about 160 cycles) is
therefore paid once per half-iteration. It is included in the cycle count
above.

## The XMAP engine (`xmap_core`)

This is the core of the design and the part that needs the most
explanation.

### Windows and recursion chains

Window w covers block positions 32w .. 32w+31. It is decoded on its own by
two recursions:

* **Forward recursion.** It starts at 32w-96 and runs 96 acquisition steps,
  then 32 steps through the window. The forward metrics (alpha) of the 32
  window bits are kept.
* **Backward recursion.** It starts at 32w+127 and runs 96 acquisition steps,
  then 32 steps down through the window. At each window bit it meets the
  stored alpha, and an LLR unit computes the output.

Each recursion is unrolled into a chain of (96+32)/4 = 32 `recursion_unit`
instances. Each unit does one trellis step per cycle. It spends 4 cycles
(phases 0..3) on a window, then hands its metric vector to the next unit in
the chain. That gives 64 recursion units, and a new window every 4 cycles.

The 8 backward units that cover the window itself each drive an `llr_unit`,
giving 8 LLRs per cycle. Unit u, in phase c, produces bit 31-4u-c of its
window.

### Schedule

All offsets are fixed. The cycle counter T starts at 0 after `start`.

| event | cycle |
|---|---|
| input group g (positions 8g..8g+7) enters the cache | T = g + 8 |
| forward chain launches window w | T = 4w |
| backward chain launches window w | T = 4w + 32 |
| forward unit s works on window T/4 - s, step 4s + (T mod 4) | |
| output group g leaves the engine | T = g + 161 |

The backward chain is launched 32 cycles after the forward chain, so every
alpha is ready before the beta it meets. Alpha of bit k is produced
63 - 2k cycles before beta of bit k+1.

### Channel value cache (`channel_cache`)

Each cycle, 8 new positions (systematic, parity and a-priori values) are
shifted into a 1208-entry register cache. At a fixed cycle offset, each
recursion unit always needs a value at a fixed distance from the newest
entry. A unit therefore reads one of 4 fixed taps, selected by its phase:

* forward unit s reads entry 28s + 7c + 31;
* backward unit s reads entry 36s + 9c + 64.

This way, 64 units are fed from a stream of 8 positions per cycle, and no
multi-ported RAM is needed.

### State metric pipeline (`metric_pipeline`)

The forward unit that handles bits 4(7-u) .. 4(7-u)+3 feeds lane u of a
register pipeline. Lane u returns the metric 1 + 8u + 2c cycles later, where
c is the phase of the backward unit that consumes it. So one shift register
of depth 8u+7 per lane, with a phase-selected tap, brings each alpha to its
LLR unit at exactly the right cycle. Only forward metrics are stored, 280
vectors in all. A split between alpha and beta storage would need fewer.

### Output reorder (`llr_reorder`)

In any one cycle, the 8 LLR units deliver bits of 8 different windows. The
memories, however, must be written with 8 consecutive positions, which is the
access pattern that keeps the interleaver conflict-free. A buffer of 16
windows x 32 bits therefore collects the results. Each cycle it emits one
group of 8 consecutive positions.

### Block borders and normalisation

* Forward steps before position 0 are forced to "state 0 known": the encoder
  starts in state 0.
* Backward steps at or beyond the block end are forced to "all states
  equal". Tail bits are not used, and the block end is treated as
  unterminated.
* Positions beyond BL in the last window are fed as zeros, and their outputs
  are discarded.
* After every step the largest of the 8 metrics is subtracted, and the result
  is saturated at -1024. This keeps all metrics within 11 bits.

### Branch metrics and LLR

The metrics use the max convention, with LLR = ln(P(0)/P(1)). The branch
metric is (u=0 ? sys+apr : 0) + (parity=0 ? par : 0).

The extrinsic output is:

    Le = max over (s, u=0) of [alpha(s) + parity term + beta(next)]
       - max over (s, u=1) of [alpha(s) + parity term + beta(next)]

It is scaled by 0.75, computed as (3*Le)>>>2, and saturated to +-63. The hard
decision is the sign of sys + apr + Le.

## Next iteration initialisation

`nii_memory` keeps, for each component decoder, one forward and one backward
metric vector per window border: 4 x 192 vectors for BL = 6144.

* The forward recursion of window w-1 stores its alpha at position 32w.
* The backward recursion of window w stores its beta at position 32w.
* From the second iteration on (half-iteration 3 onwards), the forward
  acquisition of window w starts from stored border w-3. The exception is
  window 3, whose acquisition begins exactly at position 0 and so starts in
  the known state 0.
* The backward acquisition of window w starts from stored border w+4, or
  from equal metrics if that border lies at or beyond the block end.

Stored values are always read before the current pass overwrites them.

## Interleaver address generation (`qpp_gen`)

Addresses are computed on the fly, 8 per cycle, with additions only. Lane j
has a fixed bank, Pi(j) mod 8. Its bank address a = Pi(i) div 8 follows:

    a(i+8) = (a(i) + d(i)) mod (BL/8)
    d(i)   = (f1 + 8 f2 + 2 f2 i) mod (BL/8),   d(i+8) = d(i) + 16 f2 mod (BL/8)

The start values of the 8 lanes come from 8 cycles of the one-step recursion
Pi(i+1) = Pi(i) + f1 + f2 + 2 f2 i, which runs once per block. There are two
generators:

* one for the reads;
* one for the writes, restarted together with the read generator and advanced
  as output groups appear.

f1 and f2 are inputs, taken from the LTE interleaver table, for example
(3,10) for K=40 and (263,480) for K=6144.

## CRC after every half-iteration

Because of heavy puncturing, decoding can oscillate: a block can be correct
after one half-iteration and wrong again after the next one. So the CRC
(CRC24B, g = x^24+x^23+x^6+x^5+x+1) is checked after every half-iteration,
by two `crc_unit`s:

* **CRC unit 1** checks the natural-order output of map 0 as it streams out,
  8 bits per cycle. The bits are also written to hard-decision memory A.
* **CRC unit 2** handles map 1. That output arrives in interleaved order, so
  it is written, deinterleaved, into hard-decision memory B. CRC unit 2 reads
  B in natural order while the next map-0 half-iteration runs. If the limit
  ends on a map-1 pass, it reads B in one extra pass of BL/8 + 2 cycles.

`turbo_ctrl` stops at the first passing CRC, or after `max_hi`
half-iterations. `hd_sel` tells which memory holds the result.

## Interface (`lte_turbo_decoder`)

1. **Load a block.** With `in_wr_en` high, write one position per cycle
   (`in_wr_pos`, `in_sys`, `in_p0`, `in_p1`) into input copy `in_wr_sel`.
   Punctured values are written as 0. The input memory is doubled, so the
   next block can be loaded while the other copy is being decoded.
2. **Start decoding.** Pulse `start` with `dec_sel` (the copy to decode),
   `bl`, `f1`, `f2` and `max_hi` (at least 1). `busy` stays high while the
   block is decoded. At the end, `done` pulses with `crc_ok` and `hi_used`.
3. **Read the result.** After `done`, raise `out_rd_en` with group g on
   `out_rd_group`. The bits of positions 8g..8g+7 appear on `out_rd_bits`
   one cycle later. Read the result before the next `start`.

Control registers use an asynchronous active-low reset `rst_n`. Datapath
registers and memories are not reset.

## Deviations from the original design and choices made here

* **Cycle schedule, cache, reorder buffer and metric pipeline.** The original
  gives the engine's structure: the unit count 2*(AL/H+N), register-pipeline
  metric storage and a channel value cache. The cycle schedule, the cache
  taps, the reorder buffer and the metric pipeline arrangement were worked
  out here. The metric pipeline uses more registers than the original's
  estimate of N^2*H/4 vectors.
* **NII memory ports.** The NII memory is modelled with a read and a write
  port per direction. The original uses single-port RAM, which would work
  because each port is used once every 4 cycles.
* **Output memory.** The original doubles both input and output memories.
  Here the two hard-decision memories serve the two CRC units. The result
  must be read out before the next block starts.
* **No block multiplexing.** Half-iterations of two blocks are not
  multiplexed to hide the engine latency. The throughput target is met
  without it.
* **From the LTE standard.** The trellis polynomials, the CRC24B polynomial
  and the QPP coefficient table come from the LTE standard, not from the
  original description. Tail bits are not used.
* **Left unspecified.** Rounding of the scaling, the normalisation scheme,
  reset, and the host interface timing are this design's choices.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_xmap_core` | every extrinsic value and hard decision against a window-by-window Max-Log-MAP reference written in the testbench; NII border metrics; first-output latency (161) and half-iteration length; random and heavily punctured inputs |
| `tb_recursion_unit`, `tb_llr_unit` | trellis step and LLR/extrinsic math against an independent model |
| `tb_channel_cache`, `tb_metric_pipeline`, `tb_llr_reorder`, `tb_nii_memory` | indexing and delays of the storage blocks |
| `tb_qpp_gen` | addresses against Pi(i) = (f1 i + f2 i^2) mod K for K = 40, 48, 1024, 6144, and bank conflict freedom |
| `tb_banked_mem`, `tb_input_buffer` | crossbar reads/writes, both input copies |
| `tb_crc_unit` | CRC24B register, and detection of intact vs corrupted blocks |
| `tb_turbo_ctrl` | half-iteration sequence and the four stop conditions |
| `tb_lte_turbo_decoder` | end to end, with its own LTE turbo encoder (see below) |

The end-to-end test covers these cases:

* a clean block that stops via CRC unit 1;
* blocks that only the interleaved pass can correct, which stop via CRC
  unit 2;
* a noisy block;
* random data that runs to the half-iteration limit, with both odd and even
  limits (the even one exercises the final CRC pass);
* loading the next block while decoding the current one;
* a full-size run with BL = 6144 and 13 half-iterations, which checks the
  throughput of at least 150 Mbit/s at 300 MHz (at most 12288 cycles) and
  then decodes a 6144-bit block.

The top has no parameters, so this test runs the design at its default size.

To simulate with Verilator, for example:

    verilator --binary --timing -Irtl -y rtl rtl/turbo_pkg.sv tb/tb_lte_turbo_decoder.sv \
        --top-module tb_lte_turbo_decoder -Mdir obj && obj/Vtb_lte_turbo_decoder

The sizes are set in `rtl/turbo_pkg.sv`, and the engine parameters in
`xmap_core` (NL, HF, WLEN, ALEN). WLEN must equal NL*HF, and ALEN must be a
multiple of WLEN.

## Limits

* Error-rate performance over many noisy frames has not been simulated.
  Only functional equality with the reference model, and successful decoding
  of the test blocks, have been checked.
* The 300 Mbit/s, four-layer LTE case would need 16 LLRs per cycle, and it
  has not been built.
