# TRNG2015: a 10 Gbit/s true random number generator from ring-oscillator jitter

This design produces true random bits on ten parallel pins, one new bit per pin on every cycle
of an external sampling clock. At 1 GHz that gives 1 Gbit/s per pin and 10 Gbit/s in total.
The randomness comes from the timing jitter of free-running ring oscillators. A single
oscillator has too little jitter to make a sample unpredictable. Each channel therefore
samples 256 independent oscillators and XORs the samples together. The XORed waveform has so
many edges, each of them jittery, that the edges cover the whole sampling period. Whatever
instant the clock picks, the sampled value is random. No pseudo-random scrambling is needed
to get there. A simple FIR filter (FIR11) is available as optional post-processing, and a
bypass can switch it off.

The RTL is SystemVerilog (IEEE 1800-2017). The digital part is synthesizable. The ring
oscillators are analog in nature, so they are written as a behavioural timing model for
simulation.

## Structure

```
            SCL SDI SLD                     CLK (shared sampling clock)
             |   |   |                       |
        +----v---v---+-----+   +-------------v------------------------------+
 SDO <--| spi_regs (20-bit |-->| setting_regs  --osc_en[c], bypass[c]-->    |  x10
        |  shift register) |   |                                            |
        +------------------+   |  trng_channel c:                           |
                               |   256 x ring_osc --> xor_sampler_tree -->  |
                               |                      fir_postproc --> TD[c]|
                               +--------------------------------------------+
```

| module | what it is |
|---|---|
| `trng2015` | top level: SPI port, setting registers, ten channels |
| `trng_channel` | one channel: 256 oscillators, sampling XOR tree, post-processing |
| `ring_osc` | behavioural model of a 3-stage NAND/inverter ring oscillator |
| `xor_sampler_tree` | sampling flip-flops plus a pipelined tree of 2-input XORs |
| `fir_postproc` | FIR11 filter, bypass multiplexer and output register |
| `spi_regs` | SPI shift register (SCL, SDI, SDO) |
| `setting_regs` | settings loaded from the shift register on SLD |
| `trng_pkg` | channel and oscillator counts, the settings struct `trng_cfg_t` |

## Where the randomness is made

**Ring oscillators.** Each oscillator is a ring of three stages: a NAND gate and two
inverters. It runs at about 4.7 GHz, far faster than the sampling clock. The second NAND input
is an enable. With enable low, the NAND output is forced high, the ring stops, and its output
rests at 1. This saves power while a channel is idle.

**Sampling.** Every oscillator output goes straight into a D flip-flop clocked by `CLK`. The
random decision is made at this flip-flop. When the clock edge lands inside the jitter band
of an oscillator edge, that sample is 0 or 1 by chance. With one oscillator, most clock edges
fall between jitter bands, and those samples are predictable. With 256 oscillators of
slightly different frequencies, some oscillator is always near an edge, and its jitter makes
the parity of all 256 samples unpredictable.

**Why a pipelined tree.** One 256-input XOR would be impossible to place well, and its inputs
would toggle faster than it can respond. So the samples are first registered, then combined
by eight levels of 2-input XOR gates, with a flip-flop after every gate. After the sampling
flip-flop, all logic is synchronous. Each stage holds a single gate, which lets the tree keep
up with a 1 GHz clock. Logic after the sampling flip-flops cannot change the randomness. It
only combines values that are already decided.

`xor_sampler_tree` stores the tree as a heap: `node[1]` is the root, and the children of node
`i` are `2i` and `2i+1`. The sampling flip-flops are nodes `N..2N-1`. Every node is a
flip-flop, so the tree has 2N-1 of them (511 for N = 256). For sizes that are not a power of
two, the tree is padded with zero inputs.

## Post-processing: FIR11 and bypass

`fir_postproc` reads the name FIR11 as a binary FIR filter with coefficients (1, 1):

    y[n] = x[n] XOR x[n-1]

The filter reduces any bias of the raw bits. It still gives one output bit per input bit, so
the data rate is the same with or without it. The coefficients are a parameter (`TAPS`, bit
`k` weights `x[n-k]`), so other XOR filters are one change away. The `bypass` setting selects
the output:

- 1: raw XOR-tree bits
- 0: filtered bits

The selected bit is registered onto `TD`.

## Timing of TD

- All channels share `CLK`, so their outputs are cycle-aligned.
- `TD[c]` after rising edge `m` is derived from the oscillator samples taken at edge `m-9`:
  - 8 cycles for the XOR tree
  - 1 cycle for the output register
- With FIR11, the bit also depends on the samples from edge `m-10`.
- There is no reset pin. The pipeline flushes itself. Discard the first 10 bits after power-up
  or after enabling a channel.
- A stopped channel outputs a constant 0: its 256 resting ones have even parity.

## Configuration port

Four wires: `SCL`, `SDI`, `SDO` and `SLD`.

1. Shift a 20-bit settings word in on `SDI`, MSB first. `SDI` is sampled on the rising edge of
   `SCL`.
2. Give `SLD` a rising edge. The setting registers copy the word.

`SDO` is the MSB of the shift register. While a new word is shifted in, `SDO` returns the
previous word, MSB first. This gives a readback of the settings, and it lets several devices
share one chain.

| bits | field | meaning |
|---|---|---|
| 19..10 | `bypass[9:0]` | per channel: 1 = raw output, 0 = FIR11 output |
| 9..0 | `osc_en[9:0]` | per channel: 1 = oscillators run, 0 = stopped (TD = 0) |

The settings are not synchronised to `CLK`. Treat them as static, and ignore `TD` for about
10 cycles after a load. The settings are undefined until the first load.

## How far to trust it

- **Logic.** The sampling tree, the filter, the SPI shift register and the setting registers
  are ordinary synthesizable RTL. Their testbenches check them bit-exactly against independent
  models.
- **Oscillator model.** `ring_osc` is only a model, not a substitute for circuit simulation.
  - Each stage delay is 35 ps, plus or minus 1 ps of uniform random jitter drawn on every
    transition.
  - Each instance gets a fixed offset of -2..+2 ps to mimic mismatch.
  - The mean frequency is about 4.76 GHz.

  The statistics produced by this model say that the sampling principle works. They say
  nothing about the real circuit's entropy. Real jitter, coupling between oscillators, and
  supply noise are not modelled.
- **Not modelled.** The LVDS clock receiver, the ten LVDS output drivers and the supply pads
  are analog parts. Here `CLK` and `TD` are plain single-ended ports.
- **Timing.** Whether 1 GHz closes timing depends on the process and layout, and is not
  checked here. Each pipeline stage is a single 2-input gate.
- **The top is not fully synthesizable.** `trng_channel` and `trng2015` contain the
  behavioural oscillators. A synthesis flow must replace `ring_osc` with a hand-built cell.

## Choices this design makes on its own

The overall structure is fixed by the published design:

- ten channels, each with 256 three-stage NAND ring oscillators
- sampling flip-flops on every oscillator
- a registered 2-input XOR tree
- FIR11 with bypass
- a shared sampling clock up to 1 GHz
- a 4-wire SPI port with setting registers

The following points are this design's own choices:

- the meaning of FIR11 as the (1, 1) filter
- the bypass polarity and the output register
- the SPI protocol: bit order, clock edge, readback on SDO, and loading on the rising edge of
  SLD
- the settings layout, with one oscillator enable and one bypass bit per channel
- no reset
- the delays and jitter law of the oscillator model

## Simulating

Every testbench checks itself and ends by printing `TB_RESULT checks=N failures=M`. Each one
has a watchdog.

| testbench | what it checks |
|---|---|
| `ring_osc_tb` | stop state, frequency 4.4 to 5.0 GHz, jitter present, restart |
| `xor_sampler_tree_tb` | parity and 8-cycle latency at 256 inputs; padding at 5 inputs |
| `fir_postproc_tb` | FIR11 and bypass, bit by bit, 1-cycle latency |
| `spi_regs_tb` | shifting and the readback on SDO |
| `setting_regs_tb` | field layout; settings hold without a load |
| `trng_channel_tb` | one full channel against a parity model of its sampling flip-flops; stopped, raw and FIR11 phases; share of ones |
| `trng2015_tb` | the whole chip at full size (10 x 256 oscillators, 1 GHz), driven only through its pins |
| `trng_stat_tb` | 8192 raw and 8192 FIR11 bits of one channel; monobit, block-frequency (M = 128) and runs statistics at the 0.1% level |

`trng2015_tb` runs four configurations: all stopped; all running with mixed bypass; half
stopped; restart. It counts each mechanism and fails if one never occurs. The mechanisms are:
stopped channel, raw output, FIR11 output, settings load, SDO readback, and restart.

`trng_stat_tb` computes the same statistics as the NIST SP 800-22 tests of those names, on
far shorter sequences than the 1 Mbit sequences the suite expects.

Example, the full chip (about one to two minutes):

```
verilator --binary --timing --assert -Irtl rtl/trng_pkg.sv rtl/ring_osc.sv \
  rtl/xor_sampler_tree.sv rtl/fir_postproc.sv rtl/trng_channel.sv rtl/spi_regs.sv \
  rtl/setting_regs.sv rtl/trng2015.sv tb/trng2015_tb.sv --top-module trng2015_tb
./obj_dir/Vtrng2015_tb
```

For a block testbench, list the package, the block, the modules it instantiates, and the
testbench. `--timing` is required wherever `ring_osc` is included. The models use a 1 ps time
unit, and the sampling clock in the testbenches is 1 GHz (`#500` half period).

To change the size, edit `NUM_CH` and `N_OSC` in `trng_pkg`, or set the `N_OSC_PER_CH`
parameter of `trng2015`. The testbenches are written for the published sizes: 10 channels,
256 oscillators, and a 20-bit settings word.
