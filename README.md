# Semi-blind oversampling clock and data recovery, 3.2 Gb/s

A serial receiver has two classic ways to recover data.

- **Phase-tracking CDR.** A loop steers the local clock onto the incoming
  edges. It follows slow phase wander of many unit intervals (UI), but it
  loses the data once the jitter is faster than the loop bandwidth.
- **Blind-oversampling CDR.** A free-running clock samples every bit
  several times, and digital logic picks the best sample afterwards. It copes
  with fast jitter. But the phase drift it can absorb is limited by its
  elastic buffer, and it needs the transmit and receive clocks to be nearly
  equal.

This design puts a 5x blind oversampler inside a phase-tracking loop. The
oversampler handles fast jitter within each 4-bit window. Its elastic FIFO
absorbs slower wander. The FIFO's fill level, called the *coarse phase*, is
the phase-detector output of an ordinary charge-pump-style loop that pulls
the VCO along with the incoming data. The loop only has to keep the FIFO away
from its ends, so the 32-bit FIFO multiplies the phase error the loop can
tolerate by roughly 32. That gives a large tolerance to low-frequency jitter
(hundreds of UI) while keeping the oversampler's tolerance to fast jitter.

```
 rx ──► VCO + 20 samplers ──► voting / retiming ──► fine-phase detector ──► downsampler ──► elastic FIFO ──► data_out (4 b/clk)
          ▲  (800 MHz, 20 phases)                                                         │   │
          │                                                        coarse phase (5 b) ◄───┘   └─► freq up/down (overflow/underflow)
          └──────────── V_cntl ◄── RC loop filter ◄── current DAC (cp − 15.5)·I_step  +  ±I_fd
                                                      BERT (PRBS31 checker) and scan chain watch data_out
```

At 3.2 Gb/s the VCO runs at 800 MHz, so each clock period holds 4 bits and
20 samples: 5 samples per UI. Everything digital runs on that one clock.

## Sample windows and conventions

A *window* is the 20 samples of one clock period. Bit 19 of `window_t` is the
earliest sample, x0, and bit 0 is the latest, x19. Sample `x[5b+n]` lies at
fine phase `n` (n/5 of a UI) within bit slot `b`. Phases are carried one-hot
in 5 bits (`phase_oh_t`). Recovered data is 4 bits per clock, and bit 3 is
the earliest bit.

## Voting and retiming (`voting_retiming`)

Each sample is replaced by the majority of itself and its two neighbours.
An isolated glitch next to a data edge, such as `00010111`, becomes a clean
`00001111`. A glitch like that would otherwise look like an extra transition
to the phase detector. The neighbours across the window boundary come from
the previous and next windows, so the block delays by two clocks. Voting can
be switched off from the scan chain.

## Fine-phase detector (`fine_phase_detector`, `transition_counter`, `avg_transition_locator`, `partial_sum_block`)

This is the least obvious part of the design.

**Counting transitions.** A transition is `t_n = x_n XOR x_(n-1)`, where the
first sample is compared with the last sample of the previous window. For
each of the five phases the counter adds up the transitions at that phase
over the four bit slots: `T_n = sum t[5i+n]`, 0..4.

**Why not a plain mean?** The data edges of one window are taken to come
from one phase plus random jitter. Within 4 UI the phase can move by at most
1/20 UI while the oversampler is still tracking. The best estimate is the
mean of the `T_n` distribution. But phases are circular: edges at 4 and 0 are
neighbours, and their mean is 4.5 ≡ 0, not 2.

The locator solves this in two steps.

1. **Unwrap around the previous phase.** The five phases are read starting
   three places after the previous fine phase `p`: `p+3, p+4, p, p+1, p+2`
   (mod 5). This cuts the circle opposite `p`. The jitter is assumed to stay
   within ±2 phases of the last estimate.
2. **Balance with power-of-two weights.** Instead of dividing, each candidate
   phase `k` is tested for balance. The edges before `k` are weighted 1, 2,
   4, 8 by distance, and so are the edges after it. The candidate is taken
   where the weighted sum above stops outweighing the sum below. The weights
   approximate the linear distance weights of a true mean. Over all
   single-window patterns with one to four transitions, only 8 of the 125
   give a rounded result that differs from the exact mean. The testbench
   counts them.

The hardware is a chain of five identical `partial_sum_block`s. Each block
receives the "down" sum from the block before it and the "up" sum from the
block after it. It passes on `2·sum + T` in each direction, which builds the
powers of two without multipliers. Each block computes the sign of
`up_out − down_in`. The selected phase is the block where that sign differs
from the sign of the next block. Below the last block the sign is forced to
1, so one block always wins. Because the chain is fed in rotated order, it is
a straight chain, not a ring with a movable break: there is no combinational
loop.

A window with no transitions (long runs of a PRBS) keeps the previous phase.

**Timing.** There are two register stages: the counts, then the phase. The
window is delayed by two clocks so that it leaves together with its own
phase.

## Downsampler (`downsampler`)

The sampling phase is the fine phase plus 2 (mod 5), the middle of the eye.
Four 5-to-1 multiplexers pick `x[5b + sp]` for b = 0..3. The output
`demux_data` is five bits: the first sample of the window, then the four
picked bits.

Normally a window carries 4 bits. When the sampling phase wraps, a bit
boundary has slipped across the window edge:

| previous → current sampling phase | meaning | bits used |
|---|---|---|
| current − previous ≥ 3 (e.g. 0 → 4) | the sampling point jumped back across the window edge: the bit straddling the boundary was missed | 5 (`data_size_5`): the window's first sample is kept as the extra bit |
| previous − current ≥ 3 (e.g. 4 → 0) | the sampling point moved forward across the edge: the first picked bit repeats the previous window's last | 3 (`data_size_3`) |
| otherwise | | 4 |

Six of the 25 (previous, current) pairs give 3 or 5 bits. The outputs are
combinational; the only register is the previous sampling phase.

## Elastic FIFO and coarse phase (`elastic_fifo`, `freq_detector`)

The FIFO is a 32-bit ring, read as 8 rows of 4 bits, one row per clock. The
write side places 3, 4 or 5 bits per clock. The write position runs a fixed
offset (`WR_LEAD` = 2) plus a pointer `wp` ahead of the read row. `wp` rises
by one after a 5-bit window, falls by one after a 3-bit window, and starts at
16.

`wp` is the **coarse phase**: the phase difference, in UI, between the data
and the local clock. A bit written at pointer `wp` is read out `wp + 2` bit
times later. Pointers 2..29 therefore read every bit exactly once. Values
near 0 or 31 mean the loop is far off centre.

Wrapping past 31 is an *overflow*. Wrapping below 0 is an *underflow*. Two
overflows in a row, with no underflow between them, send one `freq_up`
pulse. Two underflows in a row send `freq_down`. This frequency detector only
matters at start-up, when the clock rates differ and the pointer keeps
cycling.

## Loop: DAC, filter, VCO (`dac_lpf`, `vco_samplers`; behavioural models)

These two parts are analog. They are written as real-valued simulation
models and are not synthesizable.

- **DAC.** `dac_lpf` turns the coarse phase into a current
  `(cp − 15.5) · I_step`, which is zero at a half-full FIFO. The filter is a
  series R–C: the capacitor integrates the current, and `V_cntl` adds
  `R · I_DAC`.
- **Frequency pulses.** A `freq_up` or `freq_down` clock adds or removes
  `I_fd` directly on the capacitor.
- **Component values.** The values are R = 200 Ω, C = 1.5 nF (RC = 300 ns),
  I_step = 1.2 µA, and VCO gain 30 Grad/s/V. With a phase-detector gain of
  `2·I_step/π` per radian, these give a natural frequency of about 0.6 MHz
  and Q ≈ 0.85.
- **VCO and samplers.** `vco_samplers` is a VCO whose frequency is
  `F_CENTER_HZ + K·V_cntl/2π`, clamped to 475–875 MHz (1.9–3.5 Gb/s). It
  takes 20 ideal samples per period and presents the window at the falling
  edge, so the core sees it settled at the rising edge.

## Test support (`bert`, `scan_chain`)

- **BERT.** `bert` checks recovered PRBS 2^31−1 data with a self-synchronising
  predictor: bit n must equal bit n−28 XOR bit n−31. It starts checking after
  31 bits and counts errors in a saturating 32-bit counter. A single flipped
  bit counts three times, once directly and once in each of the two later
  predictions that use it.
- **Scan chain.** `scan_chain` is a 34-bit capture/shift/update register. It
  holds the error counter (bits 33..2) and two configuration bits:
  - bit 0: voting enable.
  - bit 1: recovered-clock output enable.

  Both configuration bits reset to 1. The error counter is also brought out
  directly, so it can be read without clocking the chain.

## Hierarchy

| module | role |
|---|---|
| `cdr_pkg` | sizes (5x, 4 bits, 20 samples, 32-bit FIFO), types, one-hot helpers |
| `sbo_cdr_top` | closed loop for simulation: `vco_samplers` + `sbo_cdr_core` + `dac_lpf` |
| `sbo_cdr_core` | synthesizable digital core: configuration synchroniser, voting, fine-phase detector, downsampler, FIFO, BERT, scan chain |
| `voting_retiming`, `fine_phase_detector` (`transition_counter`, `avg_transition_locator`, `partial_sum_block`), `downsampler`, `elastic_fifo` (`freq_detector`), `bert`, `scan_chain` | datapath blocks |
| `vco_samplers`, `dac_lpf` | behavioural models of the analog parts |

A window reaches the FIFO four clocks after the samplers present it (two for
voting and retiming, two for the phase pipeline; the downsampler is
combinational). The FIFO then delays each bit by `wp + 2` UI before its
registered output.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
          rtl/cdr_pkg.sv tb/tb_sbo_cdr_top.sv --top-module tb_sbo_cdr_top
./obj_dir/Vtb_sbo_cdr_top
```

Replace the testbench name to run another test. Each test prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_voting_retiming` | majority rule on random streams across window edges, the `00010111` example, bypass |
| `tb_avg_transition_locator` | all 5^5 count patterns for every previous phase against a direct weighted-sum reference; the 8 differences from the exact mean |
| `tb_fine_phase_detector` | drifting-phase data: tracking, hold without transitions, latency |
| `tb_downsampler` | data-size table, bit-exact reconstruction of a stream with slipping phase |
| `tb_elastic_fifo` | bit-exact queue against a reference for pointers 2..29, overflow, underflow, frequency pulses |
| `tb_bert`, `tb_scan_chain` | clean data, a single flipped bit, stalled data, clear, random data; configuration write and counter readback |
| `tb_vco_samplers`, `tb_dac_lpf` | VCO gain and clamp, sample alignment; DAC/filter charge arithmetic |
| `tb_sbo_cdr_core` | open-loop core: voting, phase tracking, 3/5-bit windows, overflow/underflow, frequency pulses, scan |
| `tb_sbo_cdr_top` | closed loop at the default 800 MHz (about 3.2 Gb/s; see the list below) |
| `tb_jitter_tolerance` | 2.4 Gb/s (VCO centre 600 MHz) jitter tolerance: 200 UI p-p at 200 kHz and 0.3 UI p-p at 50 MHz error free; amplitude ladders at 5 MHz, 1 MHz and 200 kHz |

`tb_sbo_cdr_top` runs these phases in order:

1. Data at 5% below 3.2 Gb/s locks through `freq_down` pulses.
2. It then runs error free.
3. It passes 200 UI p-p jitter at 200 kHz.
4. It passes 0.3 UI p-p at 50 MHz.
5. It re-locks through `freq_up` pulses after the rate steps up 5%, to
   3.2 Gb/s, and runs error free again.
6. It fails, as expected, under 200 UI p-p at 2 MHz. This comes last: a
   swing that fast moves the data frequency by tens of percent and can
   drag the loop further off than it can re-acquire.

At 2.4 Gb/s the loop model tolerates the following sinusoidal jitter
(largest error-free step of each ladder):

| jitter frequency | tolerated | first failing step |
|---|---|---|
| 200 kHz | 250 UI p-p | 300 UI p-p (small-signal estimate: about 240 UI) |
| 1 MHz | 20 UI p-p | 28 UI p-p |
| 5 MHz | 6 UI p-p | 8 UI p-p |
| 50 MHz | 0.3 UI p-p checked | — |

The samplers in the model are ideal, with no noise, so the mid-frequency
figures are better than a real chip would reach. The 2/5-UI tracking limit
of the oversampler is a worst-case bound for the longest PRBS runs.

## Departures and own choices

- **Retiming.** The analog half-cycle retiming stage is not modelled. The
  sampler model hands over all 20 samples on one edge.
- **Phase-region cut.** The cut is made by feeding the partial-sum chain in
  rotated order, not by breaking a ring of blocks.
- **FIFO offset.** The FIFO write offset `WR_LEAD` = 2 is chosen so that the
  error-free pointer range (2..29) is centred on the DAC's zero at 15.5.
- **Frequency pulses.** `I_fd` is not a published value; 200 µA is used.
  `freq_up` is taken to raise `V_cntl`, the sign that makes the loop lock.
- **Acquisition range.** In simulation the loop acquires reliably from about
  ±5% offset. From 6% or more, the oversampler cannot follow the phase
  between frequency pulses. The FIFO then overflows and underflows
  alternately, so the frequency detector never sees two wraps in the same
  direction, and the loop can settle at a wrong frequency.
- **BERT and scan chain.** Their internal organisation, the PRBS polynomial
  (x^31 + x^28 + 1), the configuration bits and all reset values are this
  design's choices.
- **Rate range.** The 1.9–3.5 Gb/s range is only a frequency clamp in the
  VCO model.
