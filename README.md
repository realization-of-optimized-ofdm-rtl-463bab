# 8-subcarrier BPSK OFDM transmitter and receiver

This is the baseband core of an OFDM link with eight subcarriers. It is small enough to
follow bit by bit. Data bits are BPSK mapped and collected into 8-bit words by shift
registers. An 8-point inverse FFT turns the eight words into one OFDM symbol, and
counter-plus-multiplexer converters send the symbol out serially. The receiver mirrors
this: shift registers, an 8-point FFT, serial converters, then a BPSK decision per bin.

The main idea is in the two transforms. They use no radix-2 butterflies. Each of the
eight outputs has its own "path" unit, which evaluates that bin's DFT sum directly with
constant twiddle factors. All eight paths read one shared input register. The result
is one symbol per clock, with one clock of latency.

Everything is synthesizable SystemVerilog (IEEE 1800-2017). The default parameters are
the original design's sizes: 8 points, 8-bit samples, 4 data inputs and 14 serial outputs.

## Signal chain

```
 transmitter (ofdm_tx)
 d1..d4 ─► bpsk ×4 ─► sertopar ×8 ─► ifft8 ─► par_ser ×14 ─► serout1..14 ─► (to up-conversion)

 receiver (ofdm_rx)                                               top (ofdm_transceiver)
 SERIN1..8 ─► sertopar ×8 ─► fft8 ─► par_ser ×14 ─► serout1..14 ─► bpsk_demapper ×8 ─► rx_data
```

Up-conversion, the channel, down-conversion and the cyclic prefix are not part of this
design. The top therefore brings out the transmitter's serial outputs and the
receiver's serial inputs as ports.

The two halves cannot be looped straight into each other. The transmitter sends 14
words per symbol: the real parts of all eight outputs, plus the imaginary parts of
outputs 1, 2, 3, 5, 6 and 7. The receiver's FFT takes eight real words. A real RF front
end and channel would have to join the two halves. The testbench plays that role (see
*Verification*).

| module | what it is |
|---|---|
| `ofdm_pkg` | sample type (`sample_t`, 8-bit signed), transform length, twiddle tables `COS_Q`/`SIN_Q` |
| `bpsk` | registered mapper, `q = {d, 1}`: bit 0 → `01` (+1), bit 1 → `11` (−1) |
| `sertopar` | 8-bit shift register, `Q <= {Q[6:0], SERIN}` |
| `par_ser` | 3-bit counter, 8-bit holding register and 8:1 mux; sends MSB first; `word_start` marks the MSB |
| `dft8_pass` | shared input register of a transform (8 × 8 bits) |
| `dft8_path` | one output bin, computed combinationally from the direct formula |
| `ifft8`, `fft8` | `dft8_pass` + 8 × `dft8_path`; ports `in_x0..7`, `outre0..7`, `outim1,2,3,5,6,7` |
| `bpsk_demapper` | takes the sign bit of a serial word as the decided bit |
| `ofdm_tx`, `ofdm_rx` | the two chains above |
| `ofdm_transceiver` | top: both chains plus a bank of eight de-mappers |

## The direct-formula transforms

Each path unit `k` of `dft8_path` computes

```
forward  (fft8):   X[k] =        Σ_n x[n] · e^(−j2πnk/8)
inverse  (ifft8):  y[k] = (1/8) · Σ_n x[n] · e^(+j2πnk/8)
```

over eight real 8-bit inputs. Every real and imaginary part of e^(±j2πm/8) is one of
0, ±1 or ±cos(π/4). The package holds these values as integers with 8 fraction bits:
`COS_Q[m]` and `SIN_Q[m]` are round(256·cos(2πm/8)) and round(256·sin(2πm/8)). That
makes cos(π/4) = 181/256 = 0.70703. Because `k` is a parameter, every product is by a
constant, and synthesis reduces it to shifts and adds.

A path sums the eight products at full precision (24 bits), then brings the sum back
to 8 bits:

- **Scaling.** The sum is divided by 2^(8+SHIFT). `ifft8` uses `SHIFT = 3`, which
  divides by 8. `fft8` uses `SHIFT = 0`, which is unscaled and so undoes the inverse
  transform's 1/8.
- **Rounding.** By default the division truncates towards zero, so −1.75 becomes −1.
  With `ROUND_NEAREST = 1` it rounds to the nearest integer instead, with halves going
  away from zero.
- **Saturation.** Results outside −128…127 are clamped. This can happen only in the
  unscaled FFT, for example when all eight inputs are +127.

Since the inputs are real, outputs 0 and 4 are always real. Their imaginary parts are
not brought out, so each transform has 8 + 6 = 14 output words. One clock edge latches
a new symbol into `dft8_pass`. The 14 results are valid combinationally from then until
the next edge.

The scaling and rounding come from a published example of the IFFT. The input
`34 34 34 34 34 23 42 12` (hex) must give real outputs `2F FF FF 01 08 01 FF FF`, and
imaginary outputs `02` for bin 2 and `FE` for bin 6. `tb_ifft8` replays this example.
A description of the original design says that fractions above 0.5 round up. That
rounding would give `FE` rather than `FF` for bin 2 (−1.75). The default follows the
example's numbers instead, and the parameter selects the other reading.

The same published example also lists imaginary outputs for bins 1, 3, 5 and 7:
`FD F1 00 F3`. Those numbers are not the transform of that input, which gives
`02 06 FA FE`. No scaling or twiddle precision reconciles them. This design computes
the mathematically correct values.

## Framing and timing

All blocks run on every clock, and nothing stalls. The shift registers are sliding
windows. An OFDM symbol is defined by the parallel-to-serial converters: they share a
reset, so their counters run in step. Each converter loads a new word on every eighth
clock edge, when its counter wraps from 7 to 0, and sends it MSB first during the
next eight clocks. `word_start` is high while the MSB is on the line.

In the timings below, edges are numbered from 1, the first rising edge with `reset` low.

- **Receiver.** The 8 bits of a symbol are sampled on edges 8m−9 … 8m−2, MSB first on
  each `SERIN`. They are in the shift registers after edge 8m−2 and in the FFT input
  register after edge 8m−1. The converters load the FFT result at edge 8m and send it
  during edges 8m+1 … 8m+8. The de-mappers capture the sign at edge 8m+1, and
  `rx_data_valid` is high for the clock after that edge.
- **Transmitter.** A bit applied to `d` is in the mapper after one edge and in the shift
  register after two. The IFFT input register is loaded at edge 8m−1. It therefore
  holds the data bits sampled on edges 8m−10 … 8m−3, oldest in the MSB. That symbol is
  sent during edges 8m+1 … 8m+8.
- **Latencies.** `bpsk`, `sertopar` (per bit) and `dft8_pass` take one clock each. The
  path units take none.

## How the mapper feeds the IFFT

Each mapper produces a 2-bit symbol: the data bit on top (the sign) and a constant 1
below it. Both bits go to the IFFT, each into its own shift register. Converter 2k−1
collects the data bits of `d(k)`. Converter 2k collects only ones, so its word is
always `FF` (−1).

As a result, the IFFT's odd inputs `in_x1, 3, 5, 7` are constant −1. Its even inputs
hold the last eight data bits of `d1`…`d4`, read as a signed byte. This follows the
original transmitter's instances, four mappers feeding eight converters. The exact
pairing of mapper bits to converters, and of IFFT outputs to `serout1..14`, is this
design's choice:

- `serout1..8` carry `outre0..7`.
- `serout9..14` carry `outim1, 2, 3, 5, 6, 7`.

## De-mapping

The mapper sends bit 0 as +1 and bit 1 as −1, so the de-mapper decides on the sign:
a negative word gives 1. It reads the MSB of the serial word while `word_start` is
high. The top has eight de-mappers, one on the real part of each received bin. BPSK
symbols are real, so the imaginary streams carry no data.

The original design only names a de-mapping bank after the receiver's
parallel-to-serial stage. The sign decision, the framing and the number of de-mappers
are this implementation's.

## Departures from the original and choices made here

- **Reset.** The original has a reset only on the transforms. Here every register has
  a synchronous active-high reset: mapper to +1, everything else to 0.
- **Parallel-to-serial load.** The original is described as "counter + 8:1 mux, parallel
  loaded". A holding register here provides the parallel load. A start bit mentioned in
  the original description is not sent, because its converter structure has no place
  for one. `word_start` provides the framing instead.
- **Bit order.** MSB first, so that a word travelling from a `par_ser` into a `sertopar`
  arrives unchanged.
- **Transform algorithm.** The transforms use direct per-bin formulas. The original is
  described in some places as radix-2 decimation in frequency and elsewhere as direct
  formulas. Its schematics show the direct structure.
- **Numeric details.** The twiddle precision (8 fraction bits), FFT scaling (none) and
  saturation are not specified by the original.
- **Not built.** The cyclic prefix (left out of the original as well), up-conversion,
  down-conversion and the channel.

## Resources

The original design reports 178 I/O pins and 64 registers for its transmitter and for
its receiver. Those numbers are exactly the port count and register count of one
8-point transform (2 + 8·8 + 14·8 pins, and 8·8 input-register bits). They are also
what `ifft8` and `fft8` have here, which is why the path units are combinational.

Generic synthesis of the full modules gives these flip-flop bit counts:

| module | flip-flop bits |
|---|---|
| `ofdm_tx` | 286 |
| `ofdm_rx` | 282 |
| `ofdm_transceiver` | 577 |

About half of the transmitter's and receiver's bits sit in their 14 converters, each with 8 holding bits and 3 counter bits.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_bpsk` | symbol values and latency |
| `tb_sertopar` | the known sequence `01 02 05 0A 14 28 50`, then random bits |
| `tb_par_ser` | the word sent is the one present at the load edge; MSB-first order; `word_start` |
| `tb_ifft8`, `tb_fft8` | the published example (IFFT), extreme inputs and 300 random symbols against a floating-point reference (`ofdm_ref_pkg::dft`); latency of one clock; `tb_ifft8` also checks a second instance with `ROUND_NEAREST = 1` |
| `tb_bpsk_demapper` | sign decision and valid timing |
| `tb_ofdm_tx`, `tb_ofdm_rx` | all 14 serial outputs on every clock against a word-level model (`ofdm_ref_pkg::chain_model`); the receiver test drives the FFT into saturation |
| `tb_ofdm_tx_steady` | the transmitter with `d1..d4` held at `1 1 1 0` (the input setting of the original's published transmitter run); the IFFT inputs settle to −1 except `in_x6 = 0`, every output truncates to 0, and all serial outputs must stay low |
| `tb_ofdm_transceiver` | the top at its default configuration, end to end (see below) |

`tb_ofdm_transceiver` checks both serial output sets of the top against the model on
every clock. It also acts as the channel: it builds 300 OFDM symbols, each carrying
eight BPSK bits with b[8−k] = b[k] so that the time signal is real. It sends their
samples into the receiver and checks that the de-mapped bits equal the bits sent. It
fails if any bin never decides both a 0 and a 1, or if the mapper never sees both bit
values.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ofdm_pkg.sv tb/ofdm_ref_pkg.sv tb/tb_ofdm_transceiver.sv --top-module tb_ofdm_transceiver
./obj_dir/Vtb_ofdm_transceiver
```

Replace the last file and the top module to run another testbench. The unit testbenches
that do not use the reference package need only `rtl/ofdm_pkg.sv` ahead of them.
