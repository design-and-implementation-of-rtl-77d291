# 5G NR PDSCH receiver in SystemVerilog

This is a synthesizable receive chain for the 5G NR Physical Downlink
Shared Channel (PDSCH). The input is a slot of time-domain baseband samples: one
antenna, one codeword, 64-QAM, and LDPC base graph 2. The output is the decoded
transport block with its CRC verdicts. The default size decodes a
14856-bit transport block carried as 4 code blocks of 3840 bits, with lifting
size Zc = 384, in 15000 coded bits. The slot is 14 OFDM symbols of a
1024-point FFT.

```
samples ─► cp_removal ─► fft ─► fixed_point_match ─► resource_demapper ─┐
            (72/80 CP)   1024pt   ×2^7, saturate      slot grid 1024×14  │ PDSCH (k,l) indices
                                                                         ▼
  transport block ◄─ crc_check ◄─ desegmentation ◄─ punctured_retrieval ◄─ ldpc_decoder
     bits            CRC24A      fillers, CRC24B     first 2·Zc bits       min-sum, BG2
                                                                         ▲
        llr_demapper ─► llr_serializer ─► descrambler ─► rate_recovery ──┘
        64-QAM max-log   6 LLR → 1/cycle   Gold seq.      E_r, deinterleave, k0, combine
```

All datapaths use 16-bit two's-complement values. Samples and symbols are
Q1.14. Soft bits use the convention **positive = bit 0**, from the demapper all the
way into the decoder: the descrambler flips signs instead of XORing bits.
Channel estimation and equalisation are *not* in the chain. The samples must
already be equalised, for example an AWGN channel with unit gain.

## Processing a slot

`pdsch_rx_top` handles one slot at a time, in two phases.

1. **Grid fill.** Samples enter on `smp_valid/smp_ready/smp_re/smp_im`.
   - `cp_removal` drops the cyclic prefix of each symbol: 80 samples before
     symbols 0 and 7, and 72 before the others. This is the normal-CP rule
     for μ = 0, scaled to a 1024-sample symbol.
   - `fft` transforms each 1024-sample body. The result is scaled by `2^7`
     and written into the grid RAM of `resource_demapper` at
     (bin, symbol).
   - After 14 symbols `grid_full` rises. `smp_ready` then stays low until
     the transport block is finished.
2. **Decode.** Pulse `start` with the transport block parameters:
   `rnti, nid, g_total, c_seg, qm, rv, k_prime, k_cb, filler_bits, crc_bits`.
   Then feed the PDSCH resource element positions `(idx_k, idx_l)` in
   transmission order. Generating the DM-RS/PT-RS-free positions is left to
   the user, because it depends on the allocation.
   - Each position reads one symbol from the grid. The demapper turns it into
     6 LLRs, and they are serialised and descrambled.
   - Rate recovery rebuilds each code block's circular buffer and streams it
     into the decoder.
   - The decoded systematic bits go through punctured-bit retrieval and
     desegmentation, then the CRC24A check.
   - The transport block leaves on `out_valid/out_bit/out_last`. `tb_done`
     ends the slot, and `tb_crc_ok` and `cb_crc_ok` are valid with it.
     `tb_done` also frees the grid for the next slot.

`start` must come at least 1600 cycles before the first soft bit reaches
the descrambler, because its Gold sequence generator has to run through its
Nc = 1600 warm-up steps. In practice, pulse `start` when `grid_full` rises and
send indices right after: the index stream stalls on `idx_ready` until the
chain can take data. The LDPC base graph is written once through `cfg_*` after
reset, as a list of `(column, shift, last-in-row)` entries in row order.

Status outputs for monitoring:
- `ldpc_iters` / `ldpc_converged`: the last code block's iteration count, and
  whether all its parity checks were met.
- `cb_done`: pulses once per code block.
- `punct_votes`: check rows that voted in punctured-bit retrieval.
- `cb_fail_count`: code blocks whose CRC24B failed.

## Number formats and scaling

| Point in the chain | Format | Scale |
|---|---|---|
| time samples | 16-bit Q1.14 | mean power about 16 dB below full scale |
| FFT output | 16-bit | DFT/1024 (each of the 10 stages halves) |
| after `fixed_point_match` | 16-bit Q1.14, saturated | ×128. With 948 used subcarriers at unit power, the constellation comes back to unit average power |
| LLRs | 16-bit signed | `min_S1 |y−x|² − min_S0 |y−x|²` in Q1.14, saturated |
| rate recovery buffer | 16-bit signed, saturating add | fillers = +32767, never-sent positions = 0 |
| decoder total belief | 22-bit signed | sum of channel value and all check messages |

Min-sum decoding does not depend on the LLR scale, so the decoder takes the
distances unscaled. No noise variance is needed anywhere.

## Front end: CP removal, FFT, scaling

`cp_removal` counts samples inside each symbol and symbols inside each half
subframe. Parameters allow the extended CP (256 samples for every symbol).

`fft` is an in-place radix-2 decimation-in-time FFT with one butterfly:
- Samples are written at bit-reversed addresses into separate real and
  imaginary RAMs.
- 10 stages of 512 butterflies each run at one butterfly per cycle. The
  twiddle factors `W^k`, k < 512, come from a ROM built at elaboration.
- The bins are then read out in natural order.
- A symbol costs 1024 + 5120 + 1024 cycles.
- `fft_butterfly` computes `(a ± bW)/2` with round-half-up.
- `complex_mult` forms the product at full width and rounds back to Q1.14.

## 64-QAM soft demapper

`llr_demapper` has three pipeline stages and accepts one symbol per cycle:
1. squared distances from y to all 64 Gray-mapped points (TS 38.211 5.1.5,
   1/√42 normalisation);
2. for each of the six bits, a 5-level comparator tree over the 32 points with
   that bit 0 and the 32 points with that bit 1;
3. the difference of the two minima.

The six bits share the 64 distances. `llr_serializer` turns the 6-LLR vector
into one value per cycle. It keeps count of the symbols in flight so that
symbols are only read from the grid when there is room, because the demapper
pipeline itself cannot stall.

## Descrambler

The Gold sequence is `c(n) = x1(n+1600) ⊕ x2(n+1600)`:
- `x1` starts at 1, 0, 0, …
- `x2` starts at `c_init = rnti·2^15 + q·2^14 + nid`.

Both are 31-bit shift registers clocked once per cycle during the warm-up, and
then once per value. In soft mode (`DW > 1`, used in the chain) a value's sign
is flipped wherever `c = 1`. In bit mode (`DW = 1`) the bit is XORed.

## Rate recovery (de-rate matching)

`rate_recovery` does the following for each code block r:
- It works out `E_r` from G, Qm and C, using the TS 38.212 5.4.2.1 rule for one
  layer.
- It deinterleaves the E_r values (`deinterleaver`: written in arrival order,
  read with the address recursion `i + j·Qm`).
- It writes them into the 19200-entry circular buffer, starting at
  `k0 = ⌊f·NCB/(50·Zc)⌋·Zc` with f = 0, 13, 25, 43 for rv 0 to 3.
- It skips the filler range `[K'−2Zc, K−2Zc)` and wraps at NCB.
- It adds a value landing on an occupied entry, so repetition (E > NCB)
  and repeated positions are soft-combined.
- It streams the buffer out and clears it behind the read.

The buffer holds one code block at a time. Its length NCB = 50·Zc is the BG2
codeword without the first two punctured systematic columns. No limited-buffer
rate matching is used.

## LDPC decoder

`ldpc_decoder` takes the most room in the design and is the hardest part to
follow.

**Code description.** The base graph is not hard-wired. It is a table of up to
`MAX_EDGES` (197 for BG2) entries `(row block, column block, shift)`, each
standing for a Zc × Zc cyclically shifted identity. It is written through
`cfg_*`. The check-to-variable messages are kept in a RAM of `MAX_EDGES·ZC`
entries. The same table drives `punctured_retrieval`.

**Schedule.** Flooding min-sum, one edge per clock:
- *load*: the 50·Zc received values are stored. The first `PUNC·ZC = 768`
  columns start at 0.
- *iteration*: each column's new total starts from its channel value. For
  every check row (Zc rows per base-graph row):
  - *pass 1* reads each edge's variable-to-check message
    `q = total_prev − R_old`. It tracks the smallest |q| (min1, and which edge
    gave it), the second smallest (min2), the sign product, and the parity of
    the current hard decisions.
  - *pass 2* writes `R_new = sign·(edge == argmin ? min2 : min1)` and adds it
    to that column's new total.
- *stop*: if every row's parity held for the hard decisions at the start of
  the iteration, those decisions are a codeword and the decoder stops.
  Otherwise it stops after `MAX_ITER = 20` iterations.
- The total beliefs sit in two banks, swapped each iteration: one holds the
  previous totals and the other collects the new ones.

**Cost.** One iteration takes `NB·ZC + 2·ZC·edges` cycles. For BG2 at Zc = 384
that is 171264 cycles, which is 0.86 ms at 200 MHz.

**Results.** `done` stays high until `release_i`. Hard decisions and final
beliefs can be read at any column address.

With `ZC = 1` the decoder runs any small binary H. The testbench runs a
4 × 7 example with r = [0.2 −0.3 1.2 −0.5 0.8 0.6 −1.1]. It matches the
hand-computed first iteration exactly: sums [−1 −0.4 1.1 −0.6 0.4 0.7 −0.7],
hard decision 1101001, and convergence after one iteration.

## Punctured-bit retrieval

The first 2·Zc systematic bits are never transmitted. `punctured_retrieval`
re-estimates them from the decoder's hard decisions:
- Every check row that contains exactly one punctured bit casts a vote for
  that bit: the XOR of its other bits.
- Each punctured bit takes the majority of its votes. With no votes, or a
  tie, it keeps the decoder's own decision.
- The block then streams the 10·Zc systematic bits, voted ones first, and
  releases the decoder.

## Desegmentation and CRCs

`desegmentation` handles each of the C code blocks of K bits:
- It drops the F filler bits.
- It checks the CRC24B (g(D) = D²⁴+D²³+D⁶+D⁵+D+1) and strips it.
- It buffers the payload until the verdict, then sends it on.

A failing code block is still forwarded, so the stream keeps its length, and
it is counted in `fail_count`. When C = 1, set `crc_bits = 0`.

`crc_check` is a bit-serial Galois LFSR with the polynomial as a parameter. At
the end of the chain it checks the CRC24A of the transport block (g(D) =
D²⁴+D²³+D¹⁸+D¹⁷+D¹⁴+D¹¹+D¹⁰+D⁷+D⁶+D⁵+D⁴+D³+D+1) and removes it.

## Throughput

This chain is built for correctness and small area, not for line rate. Per
slot at the default size:

| Stage | Cycles |
|---|---|
| FFTs | about 14 × 7168 ≈ 100 k |
| soft path | about 1 value per cycle (15000 soft bits) |
| decoder, per code block | 19200 load cycles plus 171 k cycles per iteration |

A good channel with 3 iterations and 4 code blocks therefore needs about 2.2 M
cycles, about 11 ms at 200 MHz. A real-time receiver needs a slot within 1 ms
at μ = 0. It would need a wider decoder (Zc edges per cycle instead of one)
and a pipelined FFT. Yosys reports the default top at 914 flip-flop bits
outside the memories and 3.38 Mbit of RAM/ROM. Most of that RAM is the
decoder's message store (75648 × 16 bits) and its two total banks
(2 × 19968 × 22 bits).

## Parameters

The top parameters default to the sizes above:

| Parameter | Default | Meaning |
|---|---|---|
| `NFFT` | 1024 | FFT size |
| `CP_LEN` / `CP_LONG` | 72 / 80 | normal and long CP |
| `NSYM` | 14 | symbols per slot |
| `FPM_SHIFT` | 7 | FFT rescaling shift |
| `ZC` | 384 | lifting size |
| `NB` | 52 | base graph columns |
| `KB` | 10 | systematic column blocks |
| `PUNC` | 2 | punctured column blocks |
| `MAX_EDGES` | 197 | base graph entries |
| `MAX_ITER` | 20 | decoder iteration limit |
| `EMAX` | 8192 | largest E_r |
| `KMAX` | 3840 | largest code block |

Smaller codes work by shrinking `ZC`, `NB`, `KB` and `MAX_EDGES` together and
writing a matching base graph.

## Simulating

Every module has a self-checking testbench in `tb/` with the same name prefixed
by `tb_`. Each one ends by printing `TB_RESULT checks=N failures=M`. Example:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/pdsch_pkg.sv \
          tb/tb_pdsch_rx_top.sv --top-module tb_pdsch_rx_top -Mdir obj
./obj/Vtb_pdsch_rx_top
```

The block testbenches compare against reference models written in the
testbench:
- DFT/N for the FFT;
- a real-valued max-log demapper;
- a second Gold sequence generator, which also checks the first bits for
  RNTI = NID = 0 against a known sequence;
- the 38.212 interleaver and rate-matching rules;
- a CRC reference;
- the worked LDPC example above, plus a quasi-cyclic code with Z = 16.

The two chain testbenches contain a complete transmitter model: CRC24A,
segmentation with CRC24B and fillers, LDPC encoding for the base graph in use,
rate matching, scrambling, 64-QAM mapping, OFDM with CP, and Gaussian noise
from `$urandom`.

- `tb_pdsch_rx_top` runs a reduced configuration: NFFT 64, Zc 16, and a
  14-column BG2-shaped graph. It covers 6 slots: clean, repetition with rv2,
  noisy, rv1, and two slots corrupted on purpose so that the CRCs fail and
  the decoder runs to its iteration limit. At the end it prints how often each
  mechanism occurred, and fails if any never did.
- `tb_pdsch_rx_top_full` uses the top with every parameter at its default. It
  decodes the 14856-bit, 4-code-block transport block at G = 15000 and checks
  every bit and both CRC verdicts. It uses a base graph with the BG2 shape and
  Zc = 384, generated in the testbench.

## Departures and open points

- **No channel estimation or equalisation.** DM-RS and PT-RS are treated only
  as positions to skip. They are never used.
- **BG2 shift table is not built in.** It is loaded through `cfg_*`. The
  full-size testbench uses its own quasi-cyclic graph of BG2 shape, so decoding
  performance with the real BG2 has not been measured here.
- **Soft values throughout.** Descrambling and rate recovery work on soft
  values, so the decoder gets real reliabilities. A hard-bit descrambler
  (`DW = 1`) and deinterleaver (`DW = 1`) are available as well.
- **LLR scaling.** No `2/σ²` factor: min-sum is scale-invariant, and the
  receiver has no noise estimate.
- **Punctured-bit retrieval** votes with the decoder's hard decisions. The
  received-value signs are not available for bits that were never sent.
- **Early stop.** The decoder stops as soon as all parity checks hold. The
  iteration limit is 20.
- **Redundancy versions 1–3 and soft combining** follow TS 38.212 and are
  supported in addition to rv0. There is no HARQ buffer across slots.
- **Number format.** Q1.14 is used everywhere, because the demapper's
  constellation (largest coordinate 7/√42 ≈ 1.08) fits in its ±2 range. The decoder keeps 22-bit totals.
- **FFT scaling.** Halving per stage, plus a fixed ×128 afterwards, is this
  design's own. Strong time-domain signals (mean power above about −16 dBFS)
  saturate after the rescale.
- **Streaming interfaces.** Every block here streams one value per transfer
  with valid/ready handshakes. The published block descriptions move whole
  vectors at once instead: 15000 bits into rate recovery, 4 × 19200 out of it,
  and 14880 bits out of desegmentation. The sizes and the per-block functions
  are the same. Desegmentation takes a 3-bit code block count, because 4 does
  not fit in 2 bits. It has no separate LDPC output length input: that length
  is `data_len`.
- **Decoder parallelism.** The min-sum algorithm follows the published
  description: two minima and a sign per check row, column sums with the
  channel value, and a hard decision. That description updates all bit nodes
  in parallel. This decoder works one edge per clock, which costs about
  890 × K cycles for 20 iterations at rate 1/5. The original work estimates
  roughly 1000 × K at rate 1/3, but the two architectures are not the same.
- **Timing.** The 200 MHz target has not been checked with a place-and-route
  run.
