# Distance bounding with a link-driven ring oscillator

A distance bounding protocol lets a reader decide both *who* a tag is and
*how far away* it is: the tag must answer a string of one-bit challenges so
quickly that the answers could not have come from further than a given
distance. The usual difficulty is timing one bit's round trip: at a few
metres that is nanoseconds, and measuring it needs gigahertz hardware.

This design, an RTL model of the scheme in the paper *A New Implementation
Methodology for a Secure Distance Bounding Protocol*, avoids that problem.
The clock that paces the bit exchange is itself a ring oscillator running
*through the link between reader and tag*: an inverter at the reader, the
path to the tag, the tag's loop-back and the path back. Its period is twice
the round-trip delay, so when the reader times the whole exchange of `n`
challenges it measures `n` round trips at once, with a slow timer.

As in the paper's FPGA prototype, the radio links are replaced by shift
registers. Each of the four channels is a chain of flip-flops shifting at
10 kHz; the number of flip-flops stands for the distance. Everything else
(reader, tag, hash, timer) is ordinary synchronous logic on a 50 MHz clock.

## The protocol (Hancke and Kuhn)

1. The reader picks a random nonce `N_V` and sends it to the tag.
2. Reader and tag both compute `R0 || R1 = h(K, N_V)` with their shared key
   `K`; `R0` and `R1` are `n` bits each.
3. The reader picks random challenge bits `c_1 .. c_n` and sends them one at
   a time. For each `c_i` the tag immediately returns `R0_i` if `c_i = 0`,
   `R1_i` if `c_i = 1`.
4. The reader accepts if every answer equals its own `R_i^{c_i}` and the
   exchange was fast enough.

A tag without `K` guesses each answer with probability 1/2, so it passes with
probability 2^-n. A tag whose answer has to wait for anything (a clock edge,
a computation) looks further away than it is, which is why the tag's answer
is a plain multiplexer driven by the incoming challenge line (`db_tag`).

## Four channels and the oscillator

```
            channel 1 (CH1_LEN)  reader_data_out ----> tag_data_in
   +--|>o-- channel 2 (CH2_LEN)  inverter out   ----> tag_signal_in --+
   |                                                                  | tag loop-back
   +------- channel 3 (CH3_LEN)  reader_signal_in <--- tag_signal_out -+
            channel 4 (CH4_LEN)  reader_data_in  <---- tag_data_out
```

With two channels only, one carrying data each way, an unclocked receiver
cannot tell a run of equal bits apart. The extra pair of channels carries
the oscillator, so both ends see one edge pair per bit.

All channels reset to 0. The inverter output is then 1, it reaches the tag
after `CH2_LEN` ticks and the reader after `H = CH2_LEN + CH3_LEN` ticks, the
inverter flips, and so on. The reader's oscillator input `reader_signal_in`
is 0 for `H` ticks, then 1 for `H` ticks: a period of `2H` shift ticks, or
`2H * DIV` system clock cycles.

### One bit per period

Every bit occupies one full oscillator period:

* The reader puts a bit on channel 1 at each **falling** edge of
  `reader_signal_in`. That is the moment its inverter output rises, so if
  channels 1 and 2 are of equal length the bit reaches the tag together with
  the **rising** edge of `tag_signal_in`.
* The tag reads the bit on the **falling** edge of `tag_signal_in`, half a
  period later, in the middle of the bit.
* The tag's answer appears as soon as the challenge arrives and stays until
  the next rising edge, when the next challenge arrives and the tag's `R0` and
  `R1` shift registers (the "packages") move on by one bit.
* The answer travels over channel 4 and, if channels 3 and 4 are equal,
  reaches the reader at the rising edge of `reader_signal_in`. The reader
  reads it at the next falling edge, the same edge on which it sends the
  next challenge.

Unequal channels work as long as the data still reaches the other end inside
the window: `|CH1_LEN - CH2_LEN| < CH2_LEN + CH3_LEN` and
`CH4_LEN < CH2_LEN + 2 * CH3_LEN`. `tb_db_system` runs one system with
channel lengths 5, 4, 6, 5.

### Framing

The line from the reader idles at 0. A frame is a start bit 1, the 13 bits of
`N_V` (most significant first) and the 12 challenges, one per period, with no
gaps. The tag waits for a period that reads 1, takes the next 13 bits as the
nonce, computes its hash during the following half period and then answers
12 challenges before going back to waiting. The start bit is this design's
addition: the prototype simply starts both sides from a common reset.

### What the timer reads

The reader starts its 29-bit timer on the falling edge that sends `c_1` and
stops it on the falling edge that reads the answer to `c_n`. These are `n`
periods apart, so

```
timer = N_BITS * 2 * (CH2_LEN + CH3_LEN) * DIV      (system clock cycles)
```

exactly, independent of seed or key. At the defaults (12 challenges, 100
flip-flops per channel, 5000 cycles per tick) that is 24,000,000 cycles,
480 ms at 50 MHz. One extra flip-flop in one channel of the ring adds
`12 * 2 * 5000 = 120,000` cycles, so a single flip-flop of "distance" is
easily resolved, which is the sensitivity the prototype reports. The six
most significant timer bits are brought out as `dist_msb`, a coarse
distance reading; at the defaults it reads 2 and steps once for roughly 35
more flip-flops per channel.

Channels 1 and 4 carry data only. Their lengths do not enter the timer,
only the window conditions above.

The reader accepts (`accept`) when the answers match (`auth_ok`) **and**
`timer <= time_bound` (`in_range`). Choosing the bound is left to the user of
the design.

## Hash and random numbers

The hash unit is labelled only "SHA" in the source material. This design uses
SHA-1 (`sha1_core`, one round per clock, 82 cycles from start to digest) on
the single padded block `K || N_V`; `R0` is the first 12 digest bits and `R1`
the next 12 (`db_prf`). The prototype's reported size (about 110 flip-flops
in total) shows that its hash was much smaller than this. Any keyed
pseudo-random function can be swapped in behind `db_prf`'s interface, as long
as it finishes within half an oscillator period: `(CH2_LEN + CH3_LEN) * DIV`
must exceed 82 cycles, and `db_tag` asserts this.

Nonce and challenges come from a seeded 32-bit LFSR (`lfsr`). That is enough
for a model; a real reader needs a true random source, since predictable
challenges break the protocol.

## Modules

| module | role |
| --- | --- |
| `db_system` | top: reader, tag, four channels, shift tick |
| `db_reader` | reader state machine: nonce, challenges, expected answers `G`, received answers `Y`, timer, verdict |
| `db_tag` | tag state machine and the combinational answer multiplexer |
| `ring_osc` | inverter plus channels 2 and 3; the tag side of the loop is left open |
| `shift_channel` | one channel: `LEN` flip-flops shifting on `tick` |
| `tick_gen` | one-cycle `tick` every `DIV` clocks (10 kHz from 50 MHz) |
| `db_timer` | saturating counter with clear/start/stop |
| `db_prf` | `R0 || R1 = h(K, N_V)`: padding, hash, split |
| `sha1_core` | SHA-1 compression of one block |
| `lfsr` | random bit source |
| `db_pkg` | default sizes, SHA-1 padding function, state types |

Parameters of `db_system` and their defaults:

| parameter | default | origin |
| --- | --- | --- |
| `NV_BITS` | 13 | nonce width of the prototype |
| `N_BITS` | 12 | number of challenges of the prototype |
| `TIMER_BITS` | 29 | timer width of the prototype |
| `DIV` | 5000 | 50 MHz timer clock, 10 kHz shift registers, as in the prototype |
| `KEY_BITS` | 32 | this design's choice |
| `CH1_LEN` .. `CH4_LEN` | 100 | this design's choice (the prototype does not state its lengths); gives a 40 ms oscillator period |

All logic runs on one clock, `clk`; the shift registers use `tick` as an
enable rather than a derived clock, and the reader and tag find the edges of
the oscillator by comparing it with its value one clock earlier. That costs
one 20 ns clock in a 100 us shift tick, which the timer cannot see. Reset is
synchronous and active high.

## Where this model departs from the prototype

* SHA-1 as the hash, the 32-bit key and the LFSR are choices made here.
* The start bit, the `time_bound` check and the `accept` output are
  additions; the prototype compares answers and leaves the distance reading
  to the timer's top bits.
* The prototype's waveform shows 13-bit registers for the tag's packages and
  the reader's received answers next to 12-bit challenges; here all of them
  are `N_BITS` = 12 wide, matching the protocol's "`R0` and `R1` are `n`
  bits".
* The reader generates the challenges together with the nonce and starts its
  hash while still sending the nonce; the prototype's flow chart does these
  after sending the nonce. The results are the same.
* The prototype's reader empties its nonce and challenge registers as it
  sends them; here both stay readable (`reader_nv`, `reader_c`) and copies
  are shifted out.
* The prototype clocks the tag directly with the oscillator signal; here the
  tag samples it with the system clock (see above).
* The first proposed system, with real RF transmitters and receivers in
  place of the shift registers, is not modelled.

A tag is only as honest as its loop-back: a tag that drives
`tag_signal_out` from an oscillator of its own instead of returning
`tag_signal_in` can make itself look nearer or further. The loop-back is kept
as a visible port pair of `ring_osc` so that such attacks can be modelled.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=<n> failures=<m>`. The reference model in
`tb/sha1_ref_pkg.sv` (a behavioural SHA-1, the `R0`/`R1` split and the LFSR)
is written independently of the RTL and checked against the published SHA-1
of "abc".

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/db_pkg.sv tb/sha1_ref_pkg.sv tb/tb_db_system.sv \
    -y rtl -y tb +libext+.sv --top-module tb_db_system -o sim
./obj_dir/sim
```

* `tb_db_system` runs three systems side by side at `DIV = 20` with 4, 7 and
  unequal channel lengths: accepted tags, tags with the wrong key, a tag
  beyond the time bound, and timers that scale exactly with the distance.
* `tb_db_system_full` runs one authentication at the default parameters
  (about 58 million clock cycles, roughly a minute and a half) and checks
  the 24,000,000-cycle timer value.
* `tb_cheat_oscillator` assembles the system with a tag that holds the right
  key but returns its own, faster oscillator instead of looping the ring
  back: it is accepted and appears nearer than it is.
* `tb_db_tag` also checks that the tag's answer follows the challenge line
  with no clock edge in between.
