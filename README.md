# Satellite-constellation channel simulator

Measuring the bit error rate of a mobile satellite link down to 1e-4 or 1e-5
needs 1e6 to 1e7 transmitted symbols or more. A software channel model is far
too slow for that. This RTL does the channel in hardware instead, one sample
per clock. It reproduces what the radio channel does to the signal of a
constellation of three non-geostationary satellites, each with seven beams:

- a separate delay on each path;
- a separate path loss on each beam;
- a Doppler shift on each beam;
- interference from other users, added with a controllable delay per beam;
- multipath fading, from the same signal reaching several beams or satellites with different delays and Doppler shifts.

Routing changes made at run time act out beam hand-over and satellite
hand-over. Routing one signal to several satellites at once gives diversity
reception.

The structure follows a published FPGA prototype of such a simulator. That
prototype had one satellite per Xilinx Virtex FPGA and a control FPGA that
took settings from a host PC over PCI. Its description gives the block
structure, the bus widths and the ranges. It does not give the arithmetic of
most blocks. Where this RTL had to choose, the choice is stated below and in
the opening comment of each file.

## Top level

`constellation_simulator` holds three `satellite` instances and one `control_section`.

| port | width | meaning |
|---|---|---|
| `clk`, `rst_n` | 1 | sample clock; synchronous active-low reset |
| `wsd[3]` | 3 x 12 | wanted signals WSD1..WSD3, shared by all three satellites |
| `is_in[3]` | 3 x 12 | interference inputs IS1..IS3, one for each satellite |
| `host_wr`, `host_addr`, `host_data` | 1, 10, 16 | register write port; `host_addr = {sat, reg}`, where `sat` 0..2 picks a satellite and 3 writes to all of them |
| `host_wr_count` | 16 | number of writes forwarded so far |
| `dac_data[3]`, `dac_clk[3]` | 3 x 12, 3 | output of each satellite for an external 12-bit DAC, with its clock |
| `test_data[3]`, `test_clk[3]` | 3 x 12, 3 | test port of each satellite |
| `sum_clipped[3]` | 3 | the satellite's beam sum was clipped on this sample |

All samples are 12-bit two's complement.

## One satellite

```
 WSD1 ─ delay 1..8192 ─┐                                      per beam b = 0..6
 WSD2 ─ delay 1..8192 ─┼─ switching ─ ws_b ─┐
 WSD3 ─ delay 1..8192 ─┘   matrix           ├─ (+) ─ gain k/64 ─ R→C ─ Doppler ─ C→R ─┐
                                            │                (Hilbert) (NCO+CORDIC) (Re)│
 IS ─ gain k/4096 ─┬─────────────── tap 0 ──┘ (beam 0)                                 ├─ Σ ─ clip ─ DAC mux ─ dac_data
                   └ D ─ tap 1 ─ D ─ tap 2 ... D ─ tap 6  (beam b gets tap b)           │
                                                                  seven beam outputs ───┘
        test mux: any of 16 internal nodes ─ test_data
```

- **Wanted-signal delays** (`delay_line`). Each of the three inputs passes
  through a circular buffer of 8192 words. Register value D gives a total delay
  of D+1 samples, so 1 to 8192.
- **Switching matrix** (`input_switching_matrix`). Each beam takes none or one
  of the three delayed inputs. One input may feed any number of beams.
- **Interference path** (`attenuator` with 12-bit gain,
  `interference_delay_chain`). The interference input is scaled by k/4096, a
  range of 72 dB. It then runs through six equal delay elements in series.
  Beam b receives it after b elements, so its delay relative to beam 0 is
  b·(D+1). Making D small gives interference that is nearly coherent across
  the beams; making it large gives incoherent interference.
- **Beam channel** (`beam_channel`). The beam first adds its wanted signal and
  its interference tap, saturating to 12 bits. Next it applies the path loss
  with a k/64 attenuator (36 dB range). Then it shifts the signal in
  frequency; the next section explains how.
- **Combiner** (`beam_combiner`). The seven beam outputs are summed and clipped
  to 12 bits. There is no rescaling: the beam gains set the level.
  `sum_clipped` flags each clipped sample.
- **Multiplexers** (`test_mux`, two instances). Both choose from the same 16
  nodes:
  - 0: the satellite output;
  - 1..7: the beam outputs;
  - 8..10: the delayed WSD1..3;
  - 11: the attenuated interference.

  One drives the test port. The other chooses what goes to the DAC; after
  reset it selects the satellite output.
- **Control logic** (`sat_control_logic`). This is the register file, written
  over an 8-bit address, 16-bit data and a one-clock strobe.

### Gains in decibels

Both attenuators multiply by k/2^KW and round half up. The 6-bit beam gain
gives the following settings:

| k | gain |
|---|---|
| 63 | -0.14 dB |
| 62 | -0.28 dB |
| 45 | -3.06 dB |
| 38 | -4.53 dB |
| 32 | -6.02 dB |
| 1 | -36.1 dB |
| 0 | silence |

The 12-bit interference gain goes down to -72.2 dB (k = 1). For example,
k = 228 gives -25.08 dB and k = 3840 gives -0.56 dB. The gain can never
exceed 1, so the attenuators cannot overflow.

## Frequency shift of a real signal (R→C, Doppler, C→R)

This is the least obvious part of the design. Multiplying a real signal by
cos(ωt) does not move it in frequency. It creates two images, at +ω and at
−ω. A clean shift needs the analytic signal x + j·H{x}, where H is the Hilbert
transform. Rotating that by e^{jφ(t)} and keeping the real part gives

    y = x·cos φ − H{x}·sin φ

This is the signal moved up by the NCO frequency, with no mirror image. Each
beam does this in three stages.

1. **R→C** (`hilbert_r2c`). A 31-tap type-III FIR computes H{x}. Its odd taps
   are the ideal response 2/(πn), shaped by a Hamming window; its even taps
   are zero. The coefficients, in units of 2^-11, are

       h[n] = round(2048 · 2/(πn) · (0.54 + 0.46·cos(2πn/30)))   for odd n
       h[-n] = -h[n]

   so h[1..15] = 1291, 396, 201, 110, 58, 28, 12, 7. The in-phase path is the
   input delayed by the filter's 15-sample group delay. The Hilbert gain is
   close to 1 from about 0.05·fs to 0.45·fs. It falls towards DC and fs/2, as
   it does for every Hilbert FIR. Signals meant for shifting should therefore
   sit on an IF inside that band. Energy near DC or fs/2 is shifted with a
   residual mirror image. Q is saturated to 12 bits.
2. **Doppler** (`doppler_nco`). A 16-bit phase accumulator adds the signed
   frequency word `fw` every sample. The shift is f = fw·fs/2^16. The
   published settings come in steps of 117.1875 Hz and run up to ±15 kHz,
   which is fw = ±128. That step equals fs/2^16 at fs = 7.68 MHz, twice the
   UMTS chip rate. The complex sample is rotated by the accumulator phase with
   a 14-stage pipelined CORDIC, so no sine table is needed. The phase is first
   folded into [−90°, +90°) by negating the vector.
3. **C→R**. Only the real part of the rotated vector is kept. It is
   multiplied by 19898/2^15 = 1/1.64676 to cancel the CORDIC gain, then
   rounded and saturated.

Against exact arithmetic, a beam's output is within 2 LSB.

## Timing

Latencies count clock edges from the edge that takes a sample in. An edge
that takes a sample in counts as stage 1. With frequency word `fw` constant,
the phase applied to a sample is the sum of the frequency words of all
earlier clocks.

| path | clocks |
|---|---|
| `delay_line` | D + 1 |
| `input_switching_matrix`, `attenuator`, `beam_combiner`, `test_mux` | 1 each |
| `hilbert_r2c` | 17 |
| `doppler_nco` | 16 |
| `beam_channel` (adder 1 + gain 1 + Hilbert 17 + Doppler 16) | 35 |
| WSDn to `dac_data` | (Dn + 1) + 1 + 35 + 1 + 1 |
| IS to beam b's adder input | 1 + b·(D_is + 1) |

Register writes take effect on the clock after the strobe. The control
section adds one clock after `host_wr`. Settings can be changed while the
datapath runs. The NCO phase continues from where it was; it is not reset
when the frequency changes.

## Register map (per satellite, 8-bit address)

| address | register | bits | meaning |
|---|---|---|---|
| 0x00+b | beam b gain | 6 | k, gain k/64; 0 mutes the beam |
| 0x08+b | beam b Doppler | 16 | signed fw, f = fw·fs/65536 |
| 0x10+b | beam b source | 2 | 0 none; 1..3 = WSD1..WSD3 |
| 0x18 | interference gain | 12 | k, gain k/4096; 0 mutes the interference |
| 0x19 | interference delay | 13 | D of each of the six chain elements |
| 0x1A..0x1C | WSD1..3 delay | 13 | D, total delay D+1 samples |
| 0x1D | test mux select | 4 | node number |
| 0x1E | DAC mux select | 4 | node number; 0 is the satellite output |

Registers are write-only and reset to 0. In that state every beam is muted
and unrouted, and the DAC shows the satellite output, which is then silence.
The constants are in `sat_pkg`.

## What follows the original system and what is this design's own

These parts follow the original system's description:

- three satellites of seven beams each;
- three wanted inputs and one interference input per satellite;
- input delays of up to 8192 samples;
- a 72 dB interference attenuator and a 36 dB beam attenuator;
- a chain of six delays for the interference;
- the per-beam order adder → gain → R→C → Doppler → C→R → sum;
- a Doppler range of ±15 kHz;
- 12-bit two's complement samples;
- an 8-bit address, 16-bit data and a data strobe for control;
- a test multiplexer with a 12-bit test port.

The gain and Doppler step sizes are not stated in the original. They are
inferred from the settings its control program offers, which fit these
formulas exactly.

These are this design's own choices:

- the linear k/2^KW attenuator law and its rounding;
- the Hilbert filter, NCO and CORDIC;
- saturation everywhere instead of wrap-around;
- an unscaled, clipped beam sum;
- placing the wanted-signal delays in front of the switching matrix;
- one delay setting shared by the six interference elements, each 8192 words deep;
- the per-beam source encoding of the matrix;
- the node lists of the two multiplexers;
- the register map;
- the satellite-select and broadcast scheme of the host port;
- forwarding `clk` as the DAC and test clocks;
- a single clock domain.

The original also had a double-rate clock. Its use is not described, and it
is not used here.

## Not included

- **PCI target.** The host port is a plain synchronous write port. A PCI
  target, or any other bus bridge, has to be put in front of it.
- **DACs, anti-aliasing filters and analog buffers.** `dac_data` and `dac_clk`
  are meant for an external 12-bit DAC, for example one that takes two's
  complement input.
- **Host software.** The register map above is its interface.

## Resources

At the default sizes each satellite holds 9 delay RAMs of 8192 × 12 bits,
which is 884,736 bits; the whole design holds 2.65 Mbit. That is more than
the block RAM plus distributed RAM of one XCV1000-class FPGA, about 0.52 Mbit.
For one satellite per device of that size, reduce `IS_DEPTH` (the depth of
each interference delay element), `WS_DEPTH`, or both. Both are parameters of
`satellite` and `constellation_simulator`. The datapath needs 21 Hilbert
filters and 21 CORDICs, with 14 add/subtract stages each; the sum of all
beams is one adder tree per satellite.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. Most testbenches compare
every output on every clock with values computed inside the testbench:

- the Hilbert coefficients are recomputed from their formula;
- the Doppler rotation is done in real arithmetic with a 3 LSB tolerance;
- latencies are checked with steps and impulses.

`tb/sat_model.sv` is a clock-accurate reference model of a whole satellite.
It rebuilds every stage from its definition. `tb_satellite` (with reduced
delay depths) and `tb_constellation_simulator` use it.
`tb_constellation_simulator` runs at full default size and covers:

- the longest input delay;
- a 6 × 1601-sample interference chain;
- broadcast and per-satellite writes;
- muting and Doppler at ±15 kHz;
- satellite diversity;
- beam and satellite hand-over;
- clipping;
- both multiplexers.

It counts each of these and fails if one never happens.

`tb_example_configuration` loads the full-size simulator with the example
setting of the original control program. It uses:

- gains of -0.14 to -6.02 dB;
- Doppler settings of -15000 to +1054.6 Hz;
- an interference delay of 2600;
- WSD1 routed to satellite 1, beam 0.

It checks the outputs against the model. It also checks, independently of
the model, that satellite 1 carries the input tone moved down by 15 kHz.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/sat_pkg.sv \
        tb/tb_constellation_simulator.sv --top-module tb_constellation_simulator
    ./obj_dir/Vtb_constellation_simulator

Replace the testbench name to run any other; the module files are found
through `-Irtl`. The full-size run takes well under a minute.
