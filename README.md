# MSK transmitter from waveform ROMs and multiplexers

Minimum shift keying (MSK) is usually generated with multipliers. Each of two
channels, I and Q, multiplies a ±1 data level by a half-sine weight, then
multiplies the result by a carrier, and the two channels are summed. This
design removes every multiplier. Over one bit period, a channel's output can
only be one of two waveforms, and the two are exact negatives of each other.
Both waveforms are stored in ROM, and the data bit picks one with a 2-to-1
multiplexer. Each channel is then a plain binary (BPSK-style) modulator: a
counter, two ROMs and a mux. The transmitter is two such modulators side by
side, plus an adder.

The architecture follows the single-counter transmitter ("P-MSK") described by
M. Sonmez and A. Akbal in *Performance Analysis of MSK Architectures*. That
transmitter has four ROMs of 200 8-bit samples, two multiplexers, one adder and
one counter. The RTL here implements it in synthesizable SystemVerilog. Where
the original description leaves a detail open, the choice made here is stated
below.

```
            +---------+  count   +-------------+ i1  +----------+ mux_i
 clk,rst_n->| counter |----+---->| I_ch_phase1 |---->|          |------+
            +---------+    |     +-------------+     | I_ch_mux |      |
                           +---->| I_ch_phase2 |---->|          |      |   +-------+
                           |     +-------------+ i2  +----------+      +-->|       |
                           |                           ^ sel=I_bit         | adder |--> msk
                           +---->| Q_ch_phase1 |-q1->+----------+      +-->|       |
                           |     +-------------+     | Q_ch_mux |------+   +-------+
                           +---->| Q_ch_phase2 |-q2->|          | mux_q
                           |     +-------------+     +----------+
                           |                           ^ sel=Q_bit
                           +---->+---------------+     |
              d_in[7:0] -------->| bit_separator |-----+ I_bit, Q_bit
              d_ack    <---------+---------------+
```

## How stored segments replace the multipliers

In the textbook modulator, with `T` the message-bit period, the output is

    s(t) = aI(t)·sin(πt/2T)·cos(ωc·t)  −  aQ(t−T)·cos(πt/2T)·sin(ωc·t)

Here `aI` and `aQ` are the ±1 levels of the I bits and Q bits. The I channel
takes the even message bits and the Q channel the odd ones. Each channel bit
lasts `2T`, and the Q bits are delayed by `T`.

The design runs at one output sample per clock, with these default sizes:

| quantity | samples |
|---|---|
| message bit period `T` | 100 |
| channel bit period (one ROM period) | 200 |
| carrier period | 50, so four carrier cycles per ROM period |

Three facts make the multipliers unnecessary:

1. **The weight only changes sign from bit to bit.** `sin(πt/2T)` has a
   period of `4T`. It is positive during one I bit and negative during the
   next. Storing only its positive half, `sin(π·a/200)` for address
   `a = 0..199`, gives the right waveform once the sign is moved onto the
   data. Likewise, `cos(πt/2T)` during the Q bits is ± the same half-sine.
2. **The carrier repeats exactly.** There are four whole carrier cycles in a
   ROM period, so the product of weight and carrier is the same for every bit
   of a channel. It can be stored once.
3. **The sign of the data becomes a multiplexer.** `+segment` and
   `−segment` are both stored. The channel bit selects one, so no
   multiplier remains.

### The inversion rule

Moving the weight's sign onto the data means that alternate channel bits are
inverted before they reach the mux select. Let `p` be the number of the I/Q
bit pair, counting from 0 after reset and running on across message words:

| pair parity `k = p mod 2` | I select `di` | Q select `dq` |
|---|---|---|
| 0 (even pair) | NOT I bit | Q bit |
| 1 (odd pair)  | I bit     | NOT Q bit |

So the even I bits and the odd Q bits are inverted. The Q half of this rule
reproduces the textbook Q channel exactly. The I half reproduces the textbook
I channel with its sign reversed everywhere. The result is still a valid MSK
signal, with constant envelope and continuous phase. With the rule applied,
the output sample for sample number `n` is

    msk(n) ≈ −127·aI·sin(πn/200)·cos(2πn/50) − 127·aQ·cos(πn/200)·sin(2πn/50)

It differs from this expression by at most one LSB, because the two stored
samples are each rounded. The end-to-end testbench checks this bound on
every sample.

Without the inversion, the signal would still have MSK's spectrum, but a
conventional coherent MSK receiver would decode every other bit wrongly. With
the inversion, a receiver built for the textbook expression recovers every
Q bit as sent, and every I bit inverted. Because the I polarity is fixed, the
receiver only has to swap its I decision (or the sender invert the I bits).
`msk_demod_tb` demonstrates this.

### Replace technique: one counter for both channels

The Q bits start half a ROM period (100 samples) after the I bits. A direct
implementation uses a second address counter for the Q ROMs, held at zero for
the first half period. Instead, the Q tables are stored with their two halves
exchanged:

    Q ROM[a] = Q waveform[(a + 100) mod 200]

The Q ROMs can then share the I counter. When the shared address reaches 100,
the Q ROM output is at the start of a Q bit, and that is when the bit
separator switches the Q select. Only one counter remains.

## The stored tables (`msk_rom`)

The four ROMs are instances of one module. The `KIND` parameter selects the
table. With `n = 0..199` and `round()` rounding to nearest:

| ROM (KIND) | selected when | sample at address n |
|---|---|---|
| `I_CH_PHASE1` | I select = 1 | `round(127·sin(πn/200)·cos(2πn/50))` |
| `I_CH_PHASE2` | I select = 0 | negative of `I_CH_PHASE1` |
| `Q_CH_PHASE1` | Q select = 1 | `round(127·sin(πm/200)·sin(2πm/50))`, `m = (n+100) mod 200` |
| `Q_CH_PHASE2` | Q select = 0 | negative of `Q_CH_PHASE1` |

The tables are computed at elaboration by a constant function in
`msk_rom.sv`, so no data files are needed, and synthesis sees initialised
ROMs. Samples are 8-bit two's complement. The worst-case sum `|I + Q|` is
127, so the 8-bit adder never wraps.

Four ROMs of 200 × 8 bits hold 6400 bits of table. A synthesizer may round
each ROM up to 256 words, filling the top 56 addresses with the zeros that
the module returns for out-of-range addresses.

The scale 127 and the carrier period of 50 samples were not stated in the
original description. The carrier period was read off its plotted waveforms,
which show four carrier cycles per 200 samples. The scale is fixed by the
sample values shown in its simulation: 123, −123, −1 and +1 in the four ROMs
at one instant. These are exactly the table values at address 98. The ROM
testbench checks them.

## Blocks

All blocks are clocked on the rising edge of `clk`. Shared constants and
the `rom_kind_t` enum are in `msk_pkg`.

| module | role | registers |
|---|---|---|
| `msk_counter` | address `count` = 0..199, wraps; shared by all four ROMs | count |
| `msk_bit_separator` | splits the message word into I/Q bits and applies the inversion rule; drives both mux selects | word, pair index, parity, `di`, `dq` |
| `msk_rom` | one 200 × 8 table, one clock of read latency | output |
| `msk_mux` | 2-to-1 select of bit-1 (`data1x`) or bit-0 (`data0x`) sample | output |
| `msk_adder` | `dataa + datab` modulo 2^8 | output |
| `msk_top` | the transmitter | — |

### Message input and bit timing

`d_in` is one message word of `MSG_W` = 8 bits, sent bit 0 first:

- bits 0, 2, 4 and 6 are I bits;
- bits 1, 3, 5 and 7 are Q bits;
- bit `2j` and bit `2j+1` form pair `j`.

Each pair lasts one ROM period, so a word takes 800 clocks.

The bit separator takes its timing from the shared counter:

| clock edge where `count` = | what happens |
|---|---|
| 0 | the I select changes |
| 100 | the Q select changes |
| 0, at the start of a word | `d_in` is taken |

`d_ack` is high during the cycle whose clock edge takes `d_in`. The source
must hold the next word on `d_in` until then. The select registers change
one clock after the address, in step with the ROMs' one-clock latency, so
each mux sees the sample and its select together.

After reset, the first Q bit does not begin until address 100. Until then
`dq` is 0, so the Q channel plays the bit-0 Q waveform for the first half
period. It acts as a dummy bit, and no gating logic is needed.

### Pipeline and latency

The ROM, the mux and the adder each add one register stage. The sample for
address `a` appears on `msk` three clocks after `count` shows `a`:

| signal | valid |
|---|---|
| `i1`, `i2`, `q1`, `q2` | 1 clock after the address |
| `mux_i`, `mux_q` | 2 clocks after the address |
| `msk` | 3 clocks after the address |

The internal signals are brought out under their original names, for
observation. The ROM, mux and adder outputs have no reset. For the first
three clocks after reset they are invalid.

### Parameters of `msk_top`

| parameter | default | meaning |
|---|---|---|
| `SAMPLES` | 200 | samples per ROM period (one I/Q bit pair) |
| `WIDTH` | 8 | sample width |
| `ADDR_W` | 8 | counter and ROM address width |
| `MSG_W` | 8 | bits per message word (must be even) |
| `CARRIER_PERIOD` | 50 | samples per carrier cycle (4 cycles per ROM period) |
| `AMPLITUDE` | 127 | table scale |

For the output to be MSK, `SAMPLES/2` must be a multiple of
`CARRIER_PERIOD`. This makes the carrier repeat both per ROM period and
across the half-period Q offset. `AMPLITUDE` must keep `|I+Q|` inside
`WIDTH` bits.

## Where this implementation makes its own choices

These details are not fixed by the original description, or are read from
its figures, and are choices of this RTL:

- **Bit order and word hand-over.** Bit 0 of `d_in` is sent first. A new
  word is taken every four ROM periods, marked by `d_ack`. The original
  names `d_in[7:0]` but gives no handshake.
- **Bit-separator timing input.** The bit separator gets the shared counter
  value as an input (`count`). The original shows it with only data and
  clock. Using the shared counter keeps its bit edges aligned with the ROM
  addresses by construction.
- **Pair parity.** The parity of the inversion rule runs across words, so
  it stays correct for any even `MSG_W`.
- **Reset.** A synchronous active-low reset, `rst_n`, is used for the
  counter and the bit separator. The original does not mention reset.
- **Pipeline.** Each of the ROMs, muxes and adder has one register stage.
  The original blocks have clock pins, but it gives no stage count or
  latency.
- **Polarity of the I channel.** The I channel has the opposite global sign
  to the textbook modulator, as described under "The inversion rule". This
  follows from the original's inversion rule and stored waveforms, with bit
  pairs counted from 0. Counting them from 1 would move the global sign flip
  to the Q channel instead; with the stored waveforms as given, one of the
  two channels is always reversed.
- **Table contents.** The scale, rounding and carrier period are as
  described under "The stored tables". The table shapes, 200 samples,
  8 bits and the half exchange of the Q tables follow the original.
- **Assertions.** An assertion checks that the shared address stays below
  `SAMPLES`.

Not implemented, because they are only comparison designs in the original:

- the conventional multiplier-based modulator;
- the two-counter variant of this transmitter.

The original reports logic-element counts, register counts and clock
frequencies for a specific FPGA. Those figures are not reproduced here.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `msk_counter_tb` | count sequence and wrap over three periods, reset |
| `msk_bit_separator_tb` | `di`, `dq` and `d_ack` for six random words against an independent model of the split and inversion rule; dummy Q bit; both inversion cases |
| `msk_rom_tb` | every address of all four tables against the formulas (computed in the testbench with real arithmetic), the four reference values at address 98, one-clock latency, zero beyond the table |
| `msk_mux_tb`, `msk_adder_tb` | random and corner operands, one-clock latency, hold between edges |
| `msk_top_tb` | see below |
| `msk_demod_tb` | 128 random bits through `msk_top`, recovered by a behavioural coherent receiver (correlation with the textbook I and Q references over each channel bit); all bits correct, I polarity inverted, each correlation at least 90% of ideal |

`msk_top_tb` runs the transmitter at its default sizes. It sends eight words,
6400 output samples. It checks every `mux_i`, `mux_q` and `msk` sample in two
ways:

- exactly, against a model of the tables and selects;
- within one LSB, against the analytic MSK expression above.

It also counts that each mechanism occurred, and fails if one never did:

- word hand-over;
- inverted and plain I bits, and inverted and plain Q bits;
- both selections in both muxes;
- the dummy Q half period;
- a Q switch half-way through a ROM period.

The largest deviation from the analytic waveform is 0.99 LSB.

To run a testbench with Verilator 5, from the directory that holds `rtl/`
and `tb/`:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
        rtl/msk_pkg.sv tb/msk_top_tb.sv --top-module msk_top_tb -o sim
    ./obj_dir/sim

Replace `msk_top_tb` with any other testbench name to run that test. Each
finishes in well under a second.
