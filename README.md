# DMT power-line modem: FPGA front end in SystemVerilog

Indoor power lines are a hostile medium for a broadband signal. The
attenuation varies strongly across frequency, there is plenty of noise, and
the channel changes over each mains cycle as appliances switch their
impedance. Discrete multitone (DMT) modulation copes with this by
splitting the band into many narrow carriers:

- each carrier sees an almost flat channel;
- each carrier is given as many bits as its own signal-to-noise ratio allows;
- a one-tap complex equalizer per carrier undoes that carrier's gain and
  phase, and follows the slow changes with an LMS update.

This repository holds the digital part of such a modem, modelled on a
published laboratory prototype:

- a transmitter FPGA that turns pseudo-random data into DMT symbols for a
  14-bit DAC;
- a receiver FPGA that demodulates the 12-bit ADC stream and hands the
  wanted carriers to a DSP through a dual-clock FIFO;
- the equalizer and detector that sit on the DSP side of that FIFO.

All the heavy arithmetic is one transform engine, `fft_r4`. The
transmitter uses it as an inverse FFT and the receiver as a forward FFT.

System numbers (in `rtl/dmt_pkg.sv`):

| quantity | value |
|---|---|
| transform size | 2048 (carriers 0..1023) |
| sample clock | 50 MHz (20 ns per sample) |
| constellations | 0..10 bits per carrier |
| cyclic prefix | 1..512 samples (the system is meant for 20..512) |
| internal word | 16-bit fixed point |
| DAC / ADC | 14 bits / 12 bits |
| DSP bus | 32 bits at 100 MHz |
| receive FIFO | 512 words |

## Block map

```
 serial bus ─► serial_bus_ctrl ─► (Scale_Factor, CP_Length, Start, bit-load writes)
                                        │
 TX (tx_fpga, 50 MHz):
   fft_r4 (INVERSE) asks for index k ─► bit_loader ─► randomizer_mapper ─► hermitic_gen ─┐
        ▲                                                                                 │
        └──────────────────────── sample k of the spectrum ◄─────────────────────────────┘
   fft_r4 real output ─► cp_insert ─► dac_data[13:0]

 RX (rx_fpga, 50 MHz → 100 MHz):
   adc_data[11:0] ─► fft_r4 (forward) ─► pack {re,im} ─► fifo_ctrl (Down..Top) ─► async_fifo ─► dsp_data
                                                                            100 MHz │
 DSP side (dmt_modem_top, 100 MHz):                                                 ▼
   DSP program ─► feq_lms (equalizer, LMS update, detector, training switch) ─► decisions
                          └─ error e ─► bit_alloc (SNDR per carrier ─► bit load)
```

| file | role |
|---|---|
| `dmt_pkg.sv` | sizes, register map, constellation gain function |
| `serial_bus_ctrl.sv` | configuration registers loaded over a 1-bit serial bus |
| `bit_loader.sv` | 1024-entry table of bits per carrier |
| `randomizer_mapper.sv` | ten LFSRs and the QAM mapper |
| `hermitic_gen.sv` | mirrors the 1024 carriers into a Hermitian 2048-point spectrum |
| `fft_r4.sv` | the transform engine (IFFT in TX, FFT in RX) |
| `cp_insert.sv` | cyclic prefix, double-buffered playback, DAC word |
| `tx_fpga.sv` | transmitter |
| `fifo_ctrl.sv` | carrier window and FIFO write/read enables |
| `async_fifo.sv` | 512 x 32 dual-clock FIFO |
| `rx_fpga.sv` | receiver, including the 32-bit packing |
| `feq_lms.sv` | per-carrier equalizer, normalised LMS, detector |
| `bit_alloc.sv` | per-carrier SNDR estimate and bit-load rule |
| `dmt_modem_top.sv` | both FPGAs and the equalizer on one board |

## The transform engine (`fft_r4`)

This is the part to understand first. Both FPGAs rely on it, and it sets
the throughput of the whole modem.

### Organisation

The engine is a burst, in-place transform with three phases.

**LOAD.** The engine raises `in_req` and counts `in_index` from 0 to N-1.
The producer answers after a fixed latency of its own choosing: `in_valid`
together with the sample and that sample's index (`in_addr`). The engine
writes the sample into a single N-word complex memory at that address.
Because the address travels with the data, the producer may be a pipeline
of any depth. In the transmitter that pipeline is bit loader → mapper →
Hermitian generator, three cycles deep. An assertion checks that the engine
never receives more samples than it requested.

**COMPUTE.** The transform is a decimation-in-frequency (DIF) FFT with
floor(log2 N / 2) radix-4 stages. When log2 N is odd, as for N = 2048 =
4^5 · 2, it ends with one radix-2 stage.

- Every cycle the engine reads four words, computes one radix-4 butterfly
  with its three twiddle products, and writes four words back to the same
  addresses.
- A stage therefore takes N/4 cycles. The radix-2 stage does two radix-2
  butterflies per cycle so that it also takes N/4.
- For N = 2048 compute takes 6 × 512 = 3072 cycles.
- At stage s with span L = N / 4^(s+1), butterfly j reads addresses
  base + {0, 1, 2, 3}·L, where base = (j / L)·4L + j mod L. The twiddles for
  outputs 1..3 are W^(m·p), where p = (j mod L)·4^s and m = 1..3.

**UNLOAD.** The results leave in natural order, one per cycle, with
`out_index`. The memory is read at the mixed-radix digit-reversed address
of the output index. The digits are base-4 except for the last radix-2
digit, and they are reversed as a group. `done` pulses with the last
sample.

### Fixed-point behaviour

- **Word width.** Data is 16-bit two's complement.
- **Twiddles.** They are 18 bits with 16 fraction bits, so +1.0 is exactly
  representable. This fits an 18 × 18 multiplier. The cosine/sine table is
  computed at elaboration by a constant function, so no table file is
  needed.
- **Per-stage scaling.** The 12-bit `scale_factor` is read as six 2-bit
  fields. Stage s shifts its results right by `scale_factor[2s+1:2s]`
  (0..3 bits). The shift uses round-half-to-even, which removes the DC bias
  that plain round-half-up builds up over six stages. The result then
  saturates to 16 bits. The factor is latched at `start`.
- **Gain.** A 2048-point transform grows by up to 2^11, so the total shift
  over the six stages sets the trade-off between overflow and quantisation
  noise. The end-to-end test uses 0x555 in the transmitter (one bit per
  stage, 2^-6) and 0x155 in the receiver (2^-5). The round trip then has
  unit gain: 2048 · 2^-6 · 2^-5 = 1.
- **Inverse.** `INVERSE = 1` computes conj(FFT(conj x)). Both conjugations
  are free: one is a saturating negation on the way in, the other on the way
  out. The result is the inverse transform without the 1/N factor, which the
  scale factor supplies instead.

### Timing

After a one-cycle `start` while idle:

| phase | cycles |
|---|---|
| load | N + producer latency |
| compute | (number of stages) · N/4 |
| unload | N |

`tb_fft_r4` checks that the last input and the first output are exactly
NSTAGES·N/4 + 1 cycles apart. It also checks every bin against a
double-precision DFT, for these configurations:

- a 2048-point inverse transform (odd log2, ends with a radix-2 stage);
- a 64-point forward transform (radix-4 stages only);
- a 32-point forward transform driven into saturation.

### What this costs

One butterfly per 50 MHz cycle, with load, compute and unload in sequence,
gives one 2048-point block per about 7170 cycles. A real-time DMT stream
with a 300-sample prefix needs a symbol every 2348 samples. This
implementation is therefore about three times too slow for continuous
transmission. `cp_insert` fills the gaps with an idle (zero) line, and the
receiver is told where each block starts (see below).

Real time needs a combination of the following, none of which alters the
arithmetic (overlapping alone still leaves 3072 compute cycles per block):

- overlap the phases with two or three working memories;
- clock the engine faster than the sample rate;
- use two butterflies per cycle.

## Transmitter (`tx_fpga`)

The transform engine drives the transmitter: each `in_index` it asks for
walks down a short pipeline.

1. **`bit_loader`** reads the number of bits l (0..10) of carrier k from a
   1024-entry table. The table is written over the serial bus. Indices
   1024..2047 (the mirror half) read as 0, and stored values above 10 read
   as 10.
2. **`randomizer_mapper`** makes an l-bit pseudo-random word and maps it.
   - The word comes from ten independent 23-bit LFSRs (x^23 + x^18 + 1,
     each with its own seed). LFSR i supplies bit i and steps only when
     i < l, so a carrier consumes exactly l bits and a receiver can
     regenerate the same stream from the same bit loads.
   - The word maps onto rectangular QAM in natural binary:
     - the low ceil(l/2) bits pick the in-phase level and the rest pick the
       quadrature level;
     - levels are the odd integers ±1, ±3, …;
     - l = 1 is BPSK.
   - Each constellation is multiplied by a gain that gives every carrier the
     same RMS (8192 by default). The gain is
     `qam_gain(l) = round(16·RMS / sqrt(E))` with E = ((MI² − 1) + (MQ² − 1))/3.
3. **`hermitic_gen`** keeps the 1024 points of the current symbol. For
   index k ≥ 1024 it returns the conjugate of point 2048 − k. Bin 0 is made
   real and bin 1024 is zero, so the inverse transform is exactly real.
   Only its real output is used.
4. **`fft_r4`** (inverse) restarts by itself whenever it is idle and
   `cp_insert` has a free buffer.
5. **`cp_insert`** holds two 2048-word buffers.
   - While one is being written, the other is played: first its last CP
     samples, then the whole block, one sample per clock.
   - `sym_start` marks the first prefix sample and `dft_start` the first
     block sample.
   - The DAC word is the 16-bit sample with its two LSBs dropped.

## Receiver (`rx_fpga`)

- **Input.** The 12-bit ADC word is registered and placed in the top bits of
  the FFT's 16-bit real input. The imaginary input is zero.
- **Block alignment.** The receiver does not search for the symbol boundary,
  and it does not strip a prefix. It starts a forward transform at
  `rx_sync`, with Start set and the engine idle. In `dmt_modem_top`,
  `rx_sync` is the transmitter's `dft_start`: both FPGAs share the board's
  sampling clock, and the prefix samples simply go unused. Over a real line,
  a timing-recovery circuit would have to supply this strobe.
- **`fifo_ctrl`.** It passes a bin to the FIFO only when:
  - Start is set;
  - its index lies in [Down_Carrier, Top_Carrier];
  - the FIFO is not full.

  A bin that meets a full FIFO is dropped, and both `overflow` and a
  saturating 16-bit counter record it. The DSP's read request is gated by
  FIFO-empty.
- **Packing.** The real and imaginary FFT outputs form one 32-bit word: real
  part in [31:16], imaginary part in [15:0].
- **`async_fifo`.** It holds 512 words between the 50 MHz write clock and
  the 100 MHz read clock. Pointers cross the clock domains in Gray code
  through two-flop synchronisers. Read data arrives one read clock after
  `rd_en`, flagged by `rd_valid`. Full and empty are conservative: each side
  sees the other's pointer late, never early.

## Equalizer and detector (`feq_lms`)

For carrier k of symbol n, the bin Y is multiplied by the carrier's
coefficient W, which gives S~ = W·Y. A slicer turns S~ into the nearest
constellation point S^ and its bit word. The error is e = S~ − R, and the
coefficient is updated as

    W ← W − μ · e · conj(Y) / |Y|²

The reference R is the known training point while `train` is high, and the
decision S^ otherwise. This is the normalised LMS recursion: the
instantaneous power |Y|² stands in for the mean power of the carrier.

- **Step size.** μ is a run-time input with 16 fraction bits. For example,
  0.1 is 6554. μ close to 1 learns a static channel in one training symbol;
  μ around 0.1 tracks a slowly turning channel while averaging the noise.
- **Schedule.** One carrier takes four clocks: accept and read W, equalise,
  slice, then update and write back. The divider for the update is
  combinational and is the block's long path.
- **Slicer.** It multiplies by a precomputed reciprocal of the level
  spacing, clamps, and rebuilds the point exactly as the mapper does. A
  correct decision therefore reproduces the transmitted point bit for bit.
- **Formats.** W is 24 bits with 16 fraction bits (gains up to ±128). A
  carrier that has never been written reads W = 1. `clear` forgets all
  coefficients. A zero bin leaves W unchanged.
- **Feeding it.** The DSP program supplies each FIFO word with its carrier
  index, bit load and (while training) the reference point. Which words are
  equalised is up to software.

## Bit loading (`bit_alloc`)

The equalizer's error on a carrier contains everything the equalizer could
not remove: noise, plus distortion from channel changes it did not follow.
`bit_alloc` sums |e|² for each carrier and counts the samples. When a
carrier is queried, it turns the sum into a bit load:

    SNDR = RMS² · count / Σ|e|²
    load = largest l with SNDR ≥ G · (2^l − 1)

G is the SNR gap for a 1e-5 bit error rate on uncoded QAM (9.8 dB, this
design's figure) plus the 3 dB guard margin. The comparison is done for all
ten loads at once, in the form RMS²·count·256 ≥ round(256·G·(2^l − 1))·Σ|e|²,
so there is no divider. By default only even loads are granted. This
follows the reported tests, which used even constellations only.

- **Which errors count.** In the top level, `bl_measure` decides which
  symbols are measured. Normally these are the training-preamble symbols.
- **Reading out.** The load and sample count of `bl_q_idx` appear one clock
  later. A carrier never measured reads 0 bits. `bl_clear` starts a new
  measurement.
- **Applying the loads.** Software writes the loads to both bit loaders
  over the serial bus. Nothing is applied automatically.

## Configuration bus (`serial_bus_ctrl`)

Each FPGA has its own copy of this block. While `ser_en` is high, one bit
is shifted in per clock, MSB first. A 32-bit frame is a 16-bit address
followed by 16 bits of data. The write happens on the 32nd bit, and
dropping `ser_en` abandons a partial frame.

| address | register |
|---|---|
| 0x0000 | Scale_Factor [11:0] |
| 0x0001 | CP_Length [8:0]; prefix = CP_Length + 1 |
| 0x0002 | Top_Carrier [11:0] |
| 0x0003 | Down_Carrier [11:0] |
| 0x0004 | bit 0: Start (run) |
| 0x1000 + k | bit load of carrier k [3:0] |

After reset the prefix is 300 samples (CP_Length = 299) and everything
else is 0.

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=… failures=…`. Reference values are computed
independently in the testbench: the LFSR bank and constellations are
re-modelled, and `dmt_tb_pkg` contains a direct DFT.

`tb_dmt_modem_top` runs the complete modem at its default sizes:

- **Configuration:**
  - 200 carriers (41..240) with bit loads cycling 0..10;
  - a 300-sample prefix;
  - the DAC looped back to the ADC through a flat channel of gain 0.75.
- **Results:**
  - six symbols decided without error by the testbench slicer, with an
    error-vector magnitude of about −59 dB;
  - the equalizer trained on one symbol, then 910 of 910 later carriers
    decided correctly by the hardware detector;
  - one deliberate DSP stall of three symbols: 600 bins meet a 512-word
    FIFO, and exactly 88 are counted lost;
  - delivery resumes afterwards;
  - measured symbol period: 7173 clocks;
  - bit loads from the measured SNDR: each of the 200 carriers matches the
    load the testbench derives from the errors it saw, and 182 carriers
    reach 8 or 10 bits.

`tb_dmt_780_carriers` runs the widest carrier set, 780 carriers (41..820,
1 MHz to 20 MHz), with loads of 2..6 bits:

- The DSP side reads the FIFO only as fast as the equalizer accepts words,
  one carrier per four 100 MHz clocks.
- During each 780-bin burst the FIFO backlog peaks at 390 of its 512 words,
  and no bin is lost.
- All 2340 decisions after the training symbol are correct.

`tb_feq_lms` covers the equalizer on its own:

- It runs a random complex channel on 24 carriers and compares against a
  floating-point model of the same recursion.
- After training, the residual error is about −68 dB.
- It checks decisions for every bit load from 1 to 10.
- A channel rotating 0.4° per symbol is tracked without decision errors
  with each of μ = 0.05, 0.1 and 0.15. With μ = 0 the same rotation
  produces decision errors.

`tb_bit_alloc` feeds 48 carriers with noise of known power and compares
each load with a floating-point evaluation of the rule. Every load from 0
to 10 is produced, both with and without the even-only restriction.
Unmeasured carriers and `clear` are also checked.

To simulate a testbench with plain Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    tb/dmt_tb_pkg.sv rtl/dmt_pkg.sv tb/tb_dmt_modem_top.sv \
    --top-module tb_dmt_modem_top -Mdir obj_top -o sim
./obj_top/sim
```

Replace `tb_dmt_modem_top` with any other `tb_*` name. The full-size
end-to-end run takes well under a minute. `tb_fft_r4` and `tb_cp_insert`
override the transform size to keep their extra runs short.

## Where this design departs from the prototype, and what it leaves out

- **Not real time.** The single-butterfly transform engine delivers about
  one symbol per 7173 samples, against the 2068..2560 needed. The line
  therefore carries idle gaps between symbols. At the test loading (about
  1900 bits per symbol) this is roughly 13 Mb/s, not the ≈ 40 Mb/s a
  continuous stream would carry.
- **Receiver alignment.** The receiver is aligned by a strobe from the
  transmitter on the same board. There is no symbol synchronisation and no
  prefix removal.
- **Equalizer and bit loading in logic.** The prototype ran the equalizer,
  detector and SNDR estimation as DSP software. Here they are logic on the DSP side of the FIFO, and
  training is driven by whoever feeds them.
- **Own choices.** The serial bus protocol, register map, LFSR polynomial
  and seeds, constellation labelling and all rounding rules are this
  design's own.
- **Not included.** The DAC, ADC, analog coupling, oscillator, DSP, its
  task scheduler, the PCI link and the host PC. Their signals are ports of
  `dmt_modem_top`.
- **Memories.** The working memories are written as plain arrays. The
  transform memory is read and written at four addresses per cycle, which
  an FPGA block RAM would need banking to provide.
