# PRBS built-in self-test for a serial link and a LUT-based hybrid multiplier

This RTL tests two things with one pseudo-random bit sequence (PRBS). The first is a
multi-gigabit serial link. The second is a multiplier built entirely from FPGA logic
instead of DSP slices, a hybrid of a Vedic and a Wallace-tree multiplier with
carry look-ahead adders.

A generator sends PRBS words towards the transceiver. The received words are
multiplied by the hybrid multiplier. A checker then locks onto the result, predicts
every following word and counts word and bit errors, and a small controller runs a
test of a given length and says pass or fail.

Keeping DSP slices free is the reason for the hybrid multiplier. The reason for the
custom generator is that its pattern length and data source can be changed while it
runs, which a transceiver's hard PRBS cannot do.

The design follows the paper "Enhancing FPGA Testing Efficiency: A PRBS-Based
Approach for DSP Slices and Multipliers". That paper names the blocks and what they
do but gives almost no internals. Widths, encodings, handshakes, the
synchronisation rule and the multiplier's internal arrangement are this design's
own choices. They are marked as such below and in each file header.

```
                 user_data   pattern_sel  inject_err
                     |           |            |
             +-------v-----------v------------v--+   tx_data  +-------------+
   tx_en --->| prbs_gen: PRBS-7/9/15/23/31,      |----------->| transceiver |
             | W bits per clock, PRBS/user mux   |            | (not here)  |
             +----------------+------------------+            +------+------+
                              | ber_inject: programmed BER ---^      |
                     +--------+  near-end loopback                   | rx_data
                     +-------------------+   +-----------------------+
                                         v   v
                                     loopback_near
                                          |  A
                 mul_mode, mul_shift ---> B  |
                 mul_operand         +----v----------------+
                                     | hybrid_mult (64x64) |---> product
                                     +----+----------------+
                                          | product >> mul_shift (BIST)
                                     +----v----------------+
                                     | prbs_checker        |--> locked
                                     +----+----------------+
                                          | chk_valid, word_err, err_bits
                                     +----v-------+    +-----------+
                                     | ber_counter|--->| bist_ctrl |--> busy/done/pass/sync_fail
                                     +------------+    +-----------+
```

## Sequence and word format

All patterns use the form x^P + x^Q + 1, that is s[n] = s[n-P] xor s[n-Q], sent
without inversion:

| select (`prbs_sel_e`) | polynomial         | period        |
|-----------------------|--------------------|---------------|
| `PRBS7`  (0)          | x^7 + x^6 + 1      | 127           |
| `PRBS9`  (1)          | x^9 + x^5 + 1      | 511           |
| `PRBS15` (2)          | x^15 + x^14 + 1    | 32 767        |
| `PRBS23` (3)          | x^23 + x^18 + 1    | 8 388 607     |
| `PRBS31` (4)          | x^31 + x^28 + 1    | 2 147 483 647 |

The paper uses PRBS-7 for its generator and PRBS-31 on the transceiver. The other
three lengths complete the set that serial-link test equipment usually offers.

A word of `W` bits (64 by default) carries `W` consecutive sequence bits, and
**bit 0 is the earliest**. The state of both generator and checker is the last 31
sequence bits, with the oldest in bit 0. Every pattern is a function of that state,
so one register serves all lengths. Switching the length therefore needs no reseed:
the new recurrence simply continues from the bits already sent.

`prbs_step` is the "series-parallel" core. It unrolls the serial recurrence `W`
times, so one clock yields `W` bits. It builds one XOR network per pattern length,
each with constant taps, and a multiplexer picks one of them.

## Checker synchronisation: how the checker finds and keeps lock

This is the least obvious part of the design. The checker has no link to the
generator's state. It has to recover the state from the data and then decide when
errors mean noise and when they mean lost lock.

The checker has two states:

* **HUNT.** Every valid word is taken as a seed: its last 31 bits are a complete
  generator state. From that seed the checker predicts the next word with
  `prbs_step` and compares it with the word that actually arrives. It declares lock
  after `SYNC_WORDS` (4) correct predictions in a row. An all-zero word never
  counts as a match, because zero is a fixed point of every recurrence and a dead
  line would otherwise "lock". After a reset or `restart`, lock therefore needs
  1 + 4 = 5 clean words.
* **LOCKED.** The reference state now runs on by itself and is no longer reloaded
  from the line. This is what makes the error counts exact. A single flipped bit
  gives one errored word with `err_bits = 1`. If the checker kept reseeding from the
  line, that bit would spoil the next prediction as well and be counted twice. Each
  checked word pulses `chk_valid`, with `word_err` and the popcount `err_bits`.
  After `LOSS_WORDS` (4) errored words in a row, the checker pulses `lock_lost` and
  returns to HUNT.

The checker does not count errors in HUNT, so the BER counters count only locked
words. If the stream is replaced by other data, for example user data selected at
the transmitter, the checker loses lock after four words. Once PRBS words return, it
relocks within five words, because the generator's PRBS state keeps advancing while
user data is sent.

The hunt/lock rule and both thresholds are this design's own. The paper says only
that the checker regenerates the next seed, compares it with the incoming data, and
counts errored data and errored bits, and that a synchronisation-detection block
exists.

## Testing the multiplier with a PRBS checker

The paper's scheme feeds the PRBS into one multiplier input and a fixed value or
second PRBS into the other. A PRBS checker then judges the product. Here operand A
is the received word. In `MUL_BIST` mode, operand B is the fixed value
2^`mul_shift`, and the checker sees `product[mul_shift +: W]`. If the multiplier is
correct, that slice is exactly the PRBS word, so the same checker tests link and
multiplier together.

Sweeping `mul_shift` from 0 to W-1 over several runs moves the single active
partial-product row across the whole array. Coverage is limited: with a
one-hot B, no two partial products are ever non-zero together. Faults that show
only when rows add together are therefore not exercised. The product's bits
outside the checked slice are not observed either. The unit testbenches cover the
full arithmetic instead. The paper's other option, a second PRBS on B, needs a
reference product on the checking side and is not built.

In `MUL_USER` mode, B is `mul_operand` and the product is simply the result for the
user's data. The checker will then normally lose lock.

## Hybrid multiplier

`hybrid_mult` registers the product of `vedic_mult`. Its timing is one result per
clock with a latency of one cycle. The operands are unsigned.

* **Vedic level (`vedic_mult`).** "Vertically and crosswise" splits each operand
  into halves and forms the four half-size products LL, HL, LH and HH in parallel.
  The recursion is unrolled level by level. Level 0 multiplies every 4-bit digit of
  A by every 4-bit digit of B, which for 64 bits is 256 leaf products. Each further
  level merges four products into one of twice the width. In a merge, LL and HH do
  not overlap, so `{HH, LL}` is one row. The two cross products are shifted by half
  a digit. One layer of full adders reduces these three rows to two, and a carry
  look-ahead adder adds them. `N` must be `BASE`·2^k.
* **Wallace leaves (`wallace_mult`).** The N partial-product rows are reduced by
  layers of 3:2 counters, for example 4 → 3 → 2 rows. The last two rows go to a
  carry look-ahead adder. This is the word-level textbook form.
* **Carry look-ahead adder (`cla_adder`).** It works in 4-bit groups with the carry
  equations fully expanded inside a group. A Kogge-Stone prefix over the group
  generate/propagate pairs gives the carry into each group. No carry ripples.

The paper says only that Vedic and Wallace are combined and that a carry look-ahead
adder is used. The split point (4-bit Wallace leaves), the merge step and the adder
organisation are this design's choices. The multiplier contains no `*` operator, so
synthesis maps it to LUTs and not to DSP slices. Generic synthesis gives about 22k
word-level cells for 64×64; no device mapping or timing has been done.

## Run control and error counting

`bist_ctrl` runs one test when `start` is pulsed. It steps through the following
states:

1. **IDLE.** The controller waits for `start`.
2. **RESTART** (one cycle). It reseeds the generator, puts the checker back into
   HUNT and clears the counters.
3. **SYNC.** It waits for `locked`. If lock has not come after `SYNC_TIMEOUT`
   (1024) cycles, the run ends with `sync_fail`.
4. **RUN.** It counts `chk_valid` words until `test_words` words have been checked.
5. **DONE.** `pass` is high when no errored word was seen and lock was never lost.
   The decision includes the very last word, whose error has not yet reached the
   counter.

`start` is only accepted in IDLE or DONE, so a run cannot be aborted except by reset.

`ber_counter` keeps four saturating counters of `CNT_W` = 48 bits: bits checked
(`W` per word), bit errors, words and errored words. The bit error rate is
`err_bit_count / bit_count`; the division is left to software. 48 bits hold
2.8·10^14 bits, about 6 hours at 12.5 Gb/s. The paper's longest measurement per link
was 2.6·10^11 bits.

The counters count only while the controller is in IDLE or RUN. In IDLE, with no
run started since reset, the design is a free-running bit error rate tester and the
counters accumulate from reset. In DONE they hold the finished run's numbers until
the next `start` clears them.

Errors can be put in on purpose in two ways:

* **Single errors.** `inject_err` flips bit 0 of the next word the generator sends.
  If the generator is idle, the flip waits for the next word. This matches the
  "inject" control that transceiver hard PRBS logic offers.
* **A programmed bit error rate.** `ber_inject` sits between the generator and
  `tx_data`. While `ber_inj_en` is set, it flips `ber_inj_bits` adjacent bits in
  every `ber_inj_period`-th word. The applied rate is
  `ber_inj_bits / (W · ber_inj_period)`. With W = 64, six bits per word give
  9.4·10^-2, and one bit every 15 625 000 words gives 10^-9. That covers the 10^-1
  to 10^-9 range the paper's measurements apply. The flipped field starts at an
  offset that moves on by `ber_inj_bits` after every hit, so all bit positions get
  hit over time. The injector is deterministic rather than random, so a test knows
  exactly how many errors to expect. It is combinational and adds no latency, and
  `restart` resets its count.

## Interface and timing of `prbs_bist_top`

The top has no back-pressure: every `*_valid` is a strobe, one word per clock at
most. `rst_n` is asynchronous and active low everywhere.

| step                                | clock edge after `tx_en`/`inject_err` |
|-------------------------------------|---------------------------------------|
| word on `tx_data`/`tx_valid`        | 1                                     |
| product on `product`/`product_valid` | 2 (near-end loopback)                |
| checker result, `locked`            | 3                                     |
| BER counters                        | 4                                     |

From a word on `tx_data` to its count takes 3 clocks. At the 156.25 MHz fabric
clock the paper reports, that is 19.2 ns, not counting the transceiver; the paper
reports 35 ns minimum latency for its whole link. In external loopback, add the
channel delay. The checker needs no fixed delay; it locks onto whatever arrives.

The control inputs are:

* `pattern_sel` selects the pattern length. The generator and the checker must use
  the same value; the top wires one select to both.
* `src_sel` chooses PRBS or `user_data` for transmission.
* `inject_err`, `ber_inj_en`, `ber_inj_period` and `ber_inj_bits` control error
  injection, as described above.
* `loopback_near` selects where the receive side gets its words: 1 takes the
  transmit words inside the fabric, 0 takes `rx_data`/`rx_valid`.
* `mul_mode`, `mul_shift` and `mul_operand` set operand B of the multiplier, as
  described above.

Parameters (defaults): `W` = 64 is the word and operand width. It needs
`W` ≥ 2 and `W` = `MUL_BASE`·2^k; for example 80 with `MUL_BASE` = 5 gives 80
bits per clock. The other parameters are `CNT_W` = 48, `SYNC_WORDS` = 4,
`LOSS_WORDS` = 4, `SYNC_TIMEOUT` = 1024 and `MUL_BASE` = 4. None of these values
come from the paper. It gives no widths; 64 matches the 64b/66b user data buses of
its measurement setup.

## What is outside this RTL, and where it departs from the paper

* **Not here.** The serial transceiver, with its serializer, clock and data
  recovery, hard PRBS and its own near-end/far-end loopback, is vendor hard IP. So
  are the 64b/66b link-layer core and the on-chip logic analyser used in the
  paper's measurements. The top brings out `tx_*` and `rx_*` where a transceiver
  connects. The near-end loopback here is a fabric-side multiplexer standing in for
  the transceiver's loopback modes.
* **One lane.** The paper measures many links at once, and each would get its own
  `prbs_bist_top` or at least its own generator, checker and counters.
* **Line rate.** One 64-bit word per clock at 156.25 MHz is 10 Gb/s. The paper's
  12.3125 Gb/s at that clock needs about 79 bits per clock (for example `W` = 80,
  `MUL_BASE` = 5) or a faster fabric clock. Nothing here has been timed on a device.
* **Added beyond the paper.** Single-error injection in the custom generator,
  the deterministic form of the rate injector, the
  power-of-two fixed operand with shifted checking, the hunt/lock rule and the run
  controller's pass rule are additions or choices not taken from the paper.
* **Not built.** The conventional BIST structure the paper shows for comparison,
  with a ROM of expected responses, response compression and compare/analyse, is
  not built. Neither is the second-PRBS operand option for the multiplier.

## Files

Everything is in `rtl/`:

| file | contents |
|------|----------|
| `prbs_pkg.sv` | pattern, source and multiplier-mode enums, seed, polynomial taps |
| `prbs_step.sv` | W-bit unrolled recurrence, shared by generator and checker |
| `prbs_gen.sv` | generator, pattern and user-data multiplexers, error injection |
| `ber_inject.sv` | injection at a programmed bit error rate |
| `prbs_checker.sv` | synchronisation, reference sequence, error detection |
| `ber_counter.sv` | bit, error, word and errored-word counters |
| `bist_ctrl.sv` | run sequencing and pass/fail |
| `cla_adder.sv` | carry look-ahead adder |
| `wallace_mult.sv` | Wallace-tree leaf multiplier |
| `vedic_mult.sv` | Vedic multiplier |
| `hybrid_mult.sv` | registered multiplier |
| `prbs_bist_top.sv` | the whole design |

## Simulation

Each block has a self-checking testbench in `tb/`. Expected values come from
independent models: a bit-serial Fibonacci shift register (`tb/prbs_ref_pkg.sv`)
for the sequences, and the simulator's own `+` and `*` for the arithmetic. Every
testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

`tb_prbs_bist_top` runs the whole design at its default parameters. Its external
loopback goes through a 5-clock channel model. It covers:

* complete runs with every pattern length
* near-end and external loopback
* fixed operands 2^0, 2^1, 2^5, 2^17, 2^40 and 2^63
* exact counting of injected errors
* a programmed rate of 3 bits every 37 words (1.27·10^-3), measured exactly
* idle gaps in `tx_en`
* a user-data burst that costs lock and relocks
* a sync timeout with the link down
* checked multiplier products in user mode
* the latency listed above

It counts each of these and fails if one never happened.

`tb_ber_sweep` also runs the whole design at defaults. It sweeps the applied bit
error rate from 10^-1 to 10^-9, through a 3-clock external loopback. At each rate
it checks three things: that every errored word carries the programmed number of
bits, that the errored-word count matches the number of injection points, and that
lock holds. The lowest rates need up to 10^9 bits per run, so this test takes about
a minute.

With Verilator 5, from the project root:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/prbs_pkg.sv tb/prbs_ref_pkg.sv tb/tb_prbs_bist_top.sv \
    --top-module tb_prbs_bist_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another test: `tb_ber_sweep`, `tb_prbs_gen`,
`tb_prbs_checker`, `tb_ber_inject`, `tb_ber_counter`, `tb_bist_ctrl`,
`tb_hybrid_mult`, `tb_vedic_mult`, `tb_wallace_mult` or `tb_cla_adder`. The top-level test builds in about 20 s and
runs in under a second.

What the tests show:

* The multipliers are checked exhaustively at 4, 5 and 8 bits and on random and
  corner operands at 16, 32 and 64 bits.
* The adder is checked at 13, 16 and 128 bits.
* Each testbench was also run against a deliberately broken copy of its block and
  failed, as it should.

What they do not show: timing closure, resource use on a device, behaviour with a
real transceiver, and sequences long enough to wrap PRBS-23 or PRBS-31.
