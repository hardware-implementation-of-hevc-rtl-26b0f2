# One-bin-per-cycle binary arithmetic encoder for HEVC CABAC

This is the arithmetic-coding core of an HEVC CABAC entropy encoder. It takes
bins, which a binarizer has already made from syntax elements, and turns them
into the arithmetic codeword of the HEVC bitstream. It encodes one bin every
clock cycle, whatever kind the bin is:

* **regular**: coded with an adaptive probability, whose context state
  (pStateIdx, valMps) comes from a context modeler;
* **bypass**: coded with probability one half;
* **terminate**: the end-of-slice style bins, which end the codeword with a
  flush when they are 1.

The reference HEVC encoder renormalizes the coding interval one bit at a
time in a loop. That loop can take up to seven passes per bin. Here, a
leading-zero count of the interval width tells in advance how many passes
are needed. The passes are then unrolled into one combinational stage, so
each bin takes exactly one cycle.

The architecture has four parts: a controller, a regular engine, a bypass
engine and a termination engine. A multiplexer returns the active engine's
result to the controller. That architecture, its port names and its state
numbering come from a published 180 nm implementation, which reported
180 MHz at about 4k gates. The tables, the flush and the rules for what
each bin is come from the HEVC standard. The interfaces that the original
leaves open are this design's own; they are marked below.

## Coder state and the outstanding bits

The encoder state is the HEVC one:

| register | width | meaning |
|---|---|---|
| ivlLow | 10 | lower end of the current interval |
| ivlRange | 9 | interval width, 256..510 between bins |
| outstanding count | 16 | bits already decided except for a possible carry |

The coder keeps ivlLow + ivlRange <= 1024. That is why ivlLow fits in 10
bits: a carry out of the interval never has to be stored. Each
renormalization pass shifts out one bit position and looks at the top two
bits of ivlLow:

| ivlLow[9:8] | action | meaning |
|---|---|---|
| 1x | PutBit(1), clear bit 9 | the bit is 1, and a carry reached the pending bits |
| 00 | PutBit(0) | the bit is 0 and no carry can reach it any more |
| 01 | outstanding + 1, clear bit 8 | undecided: 0 now, or 1 if a carry arrives later |

`PutBit(b)` writes `b` and then writes all outstanding bits as `!b`. The very
first PutBit of a slice writes nothing; that is the standard's first-bit
rule. The run of outstanding bits has no upper bound, so this encoder does
not expand bits itself. Instead, every bin cycle reports the list of actions
it took, in order (`o_bae_ev`, ten 3-bit slots, slot 0 first):

| code | event | emitted by |
|---|---|---|
| 0 `EV_NONE` | unused slot | |
| 1 `EV_PUT0` | PutBit(0) | renormalization pass |
| 2 `EV_PUT1` | PutBit(1) | renormalization pass |
| 3 `EV_OUT` | one more outstanding bit | renormalization pass |
| 4 `EV_WR0` / 5 `EV_WR1` | raw bit 0 / 1 | flush only |

A bitstream packer downstream keeps its own outstanding count and
first-bit flag, and appends bits. A regular bin produces 0 to 6 events, a
bypass bin exactly 1, a terminate-0 bin 0 or 1, and a terminate-1 bin 10.
`o_bae_outstd` shows the encoder's own count after the bin. The event
interface is an addition: the original architecture only names the
downstream "bitstream generator" and gives no port for bits. `tb/bae_ref_pkg.sv`
contains a reference packer (`bit_packer`).

## One-cycle renormalization (`bae_renorm`, `bae_zld`)

`bae_zld` counts the leading zeros of the 9-bit range. That count is the
number of loop passes n. `bae_renorm` has MAX_STEPS copies of the pass in
the table above; pass i acts only when i < n. The new range is
`range << n`. Each pass depends on the ivlLow left by the previous one,
because an outstanding pass clears bit 8 before the shift. For that reason
the passes are chained, not computed from the original ivlLow in parallel.
Each pass is only a 2-bit test and a clear, so the chain stays short.
The regular engine uses 8 passes. The smallest LPS range, 6, needs 6
shifts. The termination engine uses 7, for its flush with range 2.

## The three engines

All three engines are combinational. They read the controller's stored
state, and the controller registers the selected result at the end of the
cycle. An engine whose enable (`i_bae_en`) is low passes its inputs
through and reports no events.

**Regular (`bae_regular_engine`).** The engine computes
qRangeIdx = ivlRange[7:6] and looks up rLPS = rangeTabLps[pStateIdx][qRangeIdx]
in `bae_ctx_tables`. The MPS range is ivlRange - rLPS. The comparison
"bin == valMps" steers three muxes:

* On an MPS, ivlLow is kept, the range becomes the MPS range, and the state
  goes to transIdxMps (+1, held at 62).
* On an LPS, ivlLow grows by the MPS range, the range becomes rLPS, and the
  state goes to transIdxLps. valMps flips if pStateIdx was 0.

The updated state leaves on `o_bae_pstate`/`o_bae_mps`, for the context
modeler to store.

**Bypass (`bae_bypass_engine`).** The engine computes
`2*ivlLow + (bin ? ivlRange : 0)` in 11 bits, followed by one pass with
doubled thresholds:

* 1024 or more: PutBit(1), then subtract 1024;
* below 512: PutBit(0);
* otherwise: one more outstanding bit, then subtract 512.

The range does not change, so the multiplexer passes on the stored range
for bypass bins.

**Termination (`bae_term_engine`).** The range is reduced by 2.

* A 0 bin renormalizes; since the range is at least 254, that is at most one
  shift.
* A 1 bin adds the reduced range to ivlLow and then flushes in the same
  cycle: range = 2, seven passes, PutBit(ivlLow[9]), then the raw bits
  ivlLow[8] and 1.

After a flush the interval has to be restarted with `i_bae_init` before the
next bin.

## Controller, timing and bin modes (`bae_controller`)

A syntax element arrives as one strobe: `i_bi_syn_valid` together with
`i_bi_syn_idx`, `i_bi_bin` (bin k in bit k, up to 32 bins) and
`i_bi_bin_num`. It is taken only while `o_bae_ready` is high, that is, in
the idle state. The state register uses the numbering of the original
timing chart:

```
cycle   t        t+1      t+2       t+3 ..     t+1+N    t+2+N
state   0        1        3         2   ..     2        0
        strobe   load     bin 0     bin 1 ..   bin N-1  o_bae_finish = 1,
                          o_bae_period = 1 ..........   next strobe allowed
```

The per-bin throughput is one bin per cycle. Each element costs two extra
cycles (load and finish), so N-bin elements run back to back at
N bins per N+2 cycles.

The controller picks each bin's engine with `bae_pkg::bin_mode(syn, k)`.
Three elements are terminate: end_of_slice_segment_flag,
end_of_subset_one_bit and pcm_flag. For every other element, bins below a
per-element count are regular and the rest are bypass:

| regular bins | syntax elements |
|---|---|
| 0 (all bypass) | sao_offset_abs/sign, sao_band_position, sao_eo_class, mpm_idx, rem_intra_luma_pred_mode, abs_mvd_minus2, mvd_sign_flag, cu_qp_delta_sign_flag, last_sig_coeff_x/y_suffix, coeff_abs_level_remaining, coeff_sign_flag |
| 1 | sao_type_idx, intra_chroma_pred_mode, merge_idx |
| 2 | ref_idx |
| 3 | part_mode |
| 5 | cu_qp_delta_abs |
| all | every other element |

The numeric codes of the syntax elements (`bae_syn_e`, 6 bits) are this
design's own. An all-bypass element longer than 32 bins can be sent in
several strobes.

**Context modeler contract.** The encoder has no context memory.
`o_bae_bin_idx` and the element the modeler itself sent identify the bin.
During each cycle with `o_bae_period` high, the modeler drives
`i_bae_pstate`/`i_bae_mps` for the current bin, combinationally. When
`o_bae_mode` is regular, it writes `o_bae_pstate`/`o_bae_mps` back at the
clock edge. With a write-then-read table this works even when consecutive
bins share a context; the top testbench models exactly that.

**Reset and init.** `rst_m_n` is synchronous and active low. Both it and
`i_bae_init` (honoured when idle) set ivlLow = 0, ivlRange = 510 and the
outstanding count to 0. The first-bit flag belongs to the packer, which
must be reset at the same time.

Assertions in the controller and the top check the handshake: no strobe
unless idle, a bin count of 1 to 32, at most one engine enabled, and
`o_bae_period` only in bin states.

## Files

| file | content |
|---|---|
| `rtl/bae_pkg.sv` | widths, mode/event/state enums, syntax element codes, `bin_mode` |
| `rtl/bae_top.sv` | the encoder: controller, three engines, multiplexer |
| `rtl/bae_controller.sv` | FSM, stored interval, bin sequencing, mode decision |
| `rtl/bae_regular_engine.sv`, `bae_bypass_engine.sv`, `bae_term_engine.sv` | the engines |
| `rtl/bae_mux.sv` | result multiplexer |
| `rtl/bae_renorm.sv`, `rtl/bae_zld.sv` | one-cycle renormalization, leading-zero count |
| `rtl/bae_ctx_tables.sv` | rangeTabLps, transIdxLps, transIdxMps |
| `tb/bae_ref_pkg.sv` | bit-serial reference encoder, bit packer, arithmetic decoder |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_bae_top` end to end; `tb_bae_workload` frame-sized streams |

## Verification

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`. The reference for the engines is
`bae_ref_pkg`: the HEVC encoding processes written bit-serially on
integers, with a loop for renormalization and no shared RTL.

* The engine, renormalizer and table benches compare every output and every
  event on tens of thousands of random legal intervals. They also cover
  all 64 states and the thresholds.
* `tb_bae_controller` checks the state sequence, the cycle counts, bin
  order, the engine chosen for each bin, the stored updates, reset and init.
* `tb_bae_top` runs 24 slices of 150 random syntax elements at the default
  configuration. Per bin, it compares ivlLow, ivlRange, the outstanding
  count and the context update with the reference. Per slice, it compares
  the whole bitstream bit by bit. It then decodes the bitstream with the
  reference HEVC arithmetic decoder and checks that the bins come back.
  It checks the t+2 / t+2+N timing of every element. It also counts how
  often each mechanism occurred and fails if one never did: MPS, LPS,
  valMps flip, multi-shift renormalization, the three bypass outcomes, a
  carry into outstanding bits, terminate 0, flush, init, an element taken
  in the finish cycle, and 1-bin and 32-bin elements.
* `tb_bae_workload` feeds synthetic frames of the four sizes used to
  evaluate the original design, one frame each: 2560x1600, 1920x1080,
  832x480 and 416x240. Each frame is a stream of 64x64 coding units, with
  split flags, prediction syntax and residual coefficients. It checks the
  stream bit-exactly and with the decoder. The recorded HM bin traces that
  the original design was tested with are not reproduced here. The
  2560x1600 frame is about 1.5 million bins in 3.2 million cycles. Most
  syntax elements have only one or two bins, so the two cycles that each
  element costs outside its bins dominate. The whole stream therefore runs
  at about 0.48 bins per cycle; only the bins inside one element come at
  one per cycle. Accepting the next element during the current one would
  hide that overhead, but the timing this design follows does not show
  such overlap.

Simulate with plain Verilator, package files first:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/bae_pkg.sv tb/bae_ref_pkg.sv rtl/bae_zld.sv rtl/bae_ctx_tables.sv \
  rtl/bae_renorm.sv rtl/bae_regular_engine.sv rtl/bae_bypass_engine.sv \
  rtl/bae_term_engine.sv rtl/bae_mux.sv rtl/bae_controller.sv rtl/bae_top.sv \
  tb/tb_bae_top.sv --top-module tb_bae_top
./obj_dir/Vtb_bae_top
```

## Where this departs from the original architecture

* The bit-event output, `o_bae_ready`, `o_bae_mode`, `o_bae_bin_idx` and
  `o_bae_outstd` are additions. The original top exposes only the updated
  interval, the context update, a period flag and a finish flag.
* The original bypass-engine drawing feeds `range[8:1]` to its adder. The
  termination drawing gives ivlLow 11 bits where the others give it 10.
  This RTL computes exactly the standard's `2*low + range` and keeps ivlLow
  at 10 bits everywhere.
* The original regular-engine drawing labels its state logic
  "(pStateIdx != 0) && (binVal != valMps)". The valMps flip here follows
  the standard: it happens on an LPS in state 0.
* Where the original says only what a function does, the following are
  this design's choices: the mode table, the syntax element codes, the
  32-bin strobe format, the reset values, the 16-bit outstanding count, and
  the use of the load cycle (state 1) purely as a pipeline gap.
* Not included: the binarizer, the context modeler (context selection and
  memory) and the bitstream packer. The original also treats these as
  separate blocks of the full CABAC encoder.
