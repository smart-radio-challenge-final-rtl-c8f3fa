# FPGA datapath for a cognitive first-responder radio

This is the FPGA half of a software-defined cognitive radio that works in the
FRS band: 200 channels of 25 kHz. Each node senses the band ten times a
second, and sends voice or data only on channels that no licensed user
occupies. The work is split between a DSP and an FPGA:

- **DSP:** does everything that is sequential or adaptive:
  - symbol mapping and framing;
  - packet detection, carrier recovery, equalization and demapping;
  - the sensing filterbank;
  - the vocoder and the MAC.
- **FPGA:** does everything that runs at the sample rate or bit by bit:
  - channel encoding and decoding;
  - upconversion of the transmit baseband to a 30 MHz IF;
  - downconversion of the received IF to two samples per symbol;
  - the periodic sensing front end, which silences the transmitter while it
    listens.

The two chips talk over a 16-bit streaming port and a small bank of shared
registers. The DSP writes a *command number* (R_f) into a register and then
streams the data. The FPGA runs the matching service and streams the
results back. Each returned word carries a *tag* (R_d) that tells the DSP
what kind of data it is. Everything in this repository is synthesizable
SystemVerilog for that FPGA side. The top module is `sdr_fpga_top`.

```
             R_f=0   RS(63,51) encoder ------------------------------+
 DSP ==16b=> R_f=1   K=7 r1/2 conv. encoder -> 12x16 interleaver ----+
  VPBE  -->  R_f=2   CPSCIC x8 -> CIC x500 -> DDS mixer ---> DAC      |
 (32-bit     R_f=0x12 RS(63,51) decoder -----------------------------+--> arbiter --> VPFE ==16b=> DSP
  words)     R_f=0x13 deinterleaver -> Viterbi ----------------------+    (R_d tag)
                                                                     |
 ADC ------> DDS mixer -> CIC /500 -> CPSCIC /4  (40 kS/s, R_d=1) ---+
     \-----> DDS mixer -> polyphase /16 (5 MS/s, window only, R_d=3)-+
 sensing timer: every 100 ms opens a 4 us window, tx_enable low meanwhile
```

## Clocks and rates

Everything runs on one 80 MHz clock, which is also the ADC and DAC sample
rate. The rates follow from three figures of the original system:

- the 30 MHz IF;
- 20 ksymbol/s at the pulse shaper for both services;
- a 5 MHz sensing bandwidth.

| Path | Rate change | Result |
|---|---|---|
| Transmit | x8 in the pulse shaper, x500 in the CIC (8 x 500 = 80 MHz / 20 kbaud) | 80 MS/s at the DAC |
| Receive | /500 in the CIC, /4 in the matched filter | 40 kS/s, two samples per symbol for a half-symbol-spaced equalizer |
| Sensing | /16 | 5 MS/s complex: exactly the 200 x 25 kHz band |

The 8 x 500 and 500 x 4 splits and the CIC order of 4 are this design's
choices. The original system only states the total rates.

All DDS tuning words reset to `0x6000_0000`. That is 30 MHz exactly, because
30/80 = 3/8 of a turn per sample.

## Command and tag protocol

### Shared registers (`custom_regs`)

There are eight 32-bit registers. The DSP writes them through a simple
strobe/address/data port.

| Address | Name | Meaning |
|---|---|---|
| 0 | R_f | Service command, written by the DSP. |
| 1 | R_d | Tag of the last word the FPGA handed to the link. Written only by the FPGA; DSP writes to it are ignored. |
| 2 | DUC tuning word | Upconverter DDS. |
| 3 | DDC tuning word | Downconverter DDS. |
| 4 | Sensing tuning word | Sensing DDS. |
| 5 to 7 | free | |

Any write to R_f produces a one-cycle `rf_changed` pulse. The top uses it to
flush the coding chains, so each service starts from a clean state: encoder
state zero, empty interleaver banks, Viterbi metrics reset.

### Commands (`cmd_router`)

The original system uses R_f = 2 for two different services: "upconvert" on
transmit and "decode voice" on receive. The FPGA cannot tell these apart
from the number alone. This design therefore reads bit 4 of R_f as a receive
flag:

| R_f | Service | Input word | Output word (tag) |
|---|---|---|---|
| 0x00 | RS(63,51) encode | symbol in bits [5:0] | 63 symbols per 51 in (R_d = 0) |
| 0x01 | Convolutional encode + interleave | 16 information bits, LSB first | 32 coded bits (R_d = 0) |
| 0x02 | Upconvert and transmit | {Q[15:0], I[15:0]} symbol | to the DAC |
| 0x12 | RS(63,51) decode | symbol in bits [5:0] | 51 corrected symbols (R_d = 2) |
| 0x13 | Deinterleave + Viterbi decode | 32 coded bits | 16 decoded bits (R_d = 2) |
| other | reserved | dropped (`cmd_dropped` pulses) | |

Two streams run independently of R_f:

- received baseband (R_d = 1), {Q, I} at 40 kS/s;
- sensing samples (R_d = 3), {Q, I} at 5 MS/s inside each window.

### The link (`vpss_port`)

The DSP's video port is 16 bits wide, while the FPGA's internal bus is 32
bits.

- **Back end (DSP to FPGA):** pairs incoming halfwords into a word, low half
  first.
- **Front end (FPGA to DSP):** sends each word as two halfwords, low half
  first, with the R_d tag on a side channel.

Both directions use valid/ready handshakes. The timing of the real video
port is not modelled.

### Return arbitration (`rd_arbiter`)

Six sources share the link back to the DSP. They are served in fixed
priority, and a stalled word holds its grant until it is taken:

1. sensing samples;
2. baseband samples;
3. Viterbi output;
4. RS decoder output;
5. convolutional encoder output;
6. RS encoder output.

The two sample streams cannot wait. Each goes through a FIFO: 32 words for
sensing, 16 for baseband. Assertions in the top check that neither FIFO
ever overflows. At the link's 80 M halfwords/s the load is tiny: about 0.1 M
halfwords/s.

## Channel coding

### Reed-Solomon (voice)

`rs_encoder` is a systematic RS(63,51) encoder over GF(64), with field
polynomial x^6 + x + 1. The generator's roots are alpha^1 to alpha^12; the
original system does not state them. The 51 message symbols pass straight
through, one per cycle, while a 12-stage LFSR builds the parity. The 12
parity symbols follow.

`rs_decoder` corrects up to six symbol errors. It reads one codeword per
call in five phases:

1. **Syndromes:** S1 to S12 are accumulated by Horner's rule as the symbols
   arrive. The symbols are also kept in a buffer.
2. **Berlekamp-Massey:** the inversion-free form, one iteration per cycle,
   12 cycles.
3. **Error evaluator:** Omega(x) = S(x)·Lambda(x) mod x^12.
4. **Chien search with Forney's formula:** one position per cycle, from the
   first received symbol on. Each message symbol is corrected and sent out
   as it is evaluated. The inverse and power tables are ROMs computed at
   elaboration.
5. **Done:** `done` pulses. `n_corrected` holds the number of corrected
   symbols. `fail` is set when the error locator's degree does not match
   the number of roots found, which means more than six errors. By then
   the word has already been sent, so the DSP must discard a word flagged
   this way.

The first decoded symbol appears 14 cycles after the last input symbol.
Only the 51 message symbols are output.

### Convolutional code and interleaver (data)

`conv_encoder` is the standard rate-1/2, constraint-length-7 code with
generators G0 = x^6+x^5+x^4+x^3+1 and G1 = x^6+x^4+x^3+x+1. The x^6 term
is the newest bit. Code bits leave serially, G0 first.

`block_interleaver` writes 192 bits row by row into a 12 x 16 array and
reads them column by column. 192 is a multiple of 3, so each block fills a
whole number of 8-PSK symbols. Two banks alternate, so one block is written
while the other is read. The receiver's deinterleaver is the same module
with rows and columns swapped. The array size is this design's choice; the
original system only calls it a simple row-column interleaver.

`viterbi_decoder` is a hard-decision decoder with 64 states.

- **Each bit pair:** one add-compare-select over all 64 states, with 8-bit
  path metrics normalised by subtracting the minimum.
- **Survivors:** register exchange, 42 bits deep (6 x K).
- **Output:** the oldest bit of the best state's survivor.
- **Latency:** decoded bits lag the input by 42 bit pairs. The last 42
  bits of a stream stay inside until more input arrives or R_f changes.

The original system used a vendor core here. This one is written from
scratch and makes no claim to match that core's soft-decision or
traceback options.

## Transmit upconverter (`duc`)

The chain has four stages:

1. **Pulse shaper (`cpscic_interp`):** an 80-tap polyphase FIR that
   interpolates by 8. It is meant to hold a combined pulse-shaping and
   CIC-compensating (CPSCIC) response, which is Nyquist-8 and pre-emphasised
   against the CIC droop. There is one multiply-accumulator per rail, and
   each output phase takes 11 cycles. The response coefficients are not
   published, so all 80 taps are writable through `coef_*`. They reset to a
   15-tap triangle: Nyquist-8 with unit DC gain, usable but not
   droop-compensated. Coefficients are Q1.14.
2. **CIC (`cic_interpolator`):** order 4, rate 500. One sample is taken every
   500 cycles. The comb runs at the low rate and the integrators at 80 MHz.
   The output is scaled by 2^-27. The gain 500^3 / 2^27 = 0.93 is left in.
3. **DDS (`nco`):** a 32-bit phase accumulator driving a 16-stage pipelined
   CORDIC, giving 16-bit cos and sin within 8 LSB.
4. **Mixer:** dac = (I·cos − Q·sin) >> 16.

`sym_ready` pulses once every 4000 cycles, which is exactly 20 kbaud. The
16-word symbol FIFO in front of the upconverter lets the DSP send a frame
in one burst. While the sensing timer holds `tx_enable` low, the DAC output
is forced to zero and the pipeline keeps running, so the signal resumes
where it left off.

## Receive downconverter (`ddc`)

The chain has three stages:

1. **DDS mixer:** I = (adc·cos) >> 13 and Q = −(adc·sin) >> 13. For a carrier
   of amplitude A, this gives about 2A at baseband.
2. **CIC (`cic_decimator`):** two order-4, rate-500 decimators, one per
   rail. The output is scaled by 2^-36, for a gain of 0.91.
3. **Matched filter (`cpscic_decim`):** the 80-tap receive CPSCIC, which
   decimates by 4. It is a sequential multiply-accumulator that takes one
   sample-group at a time and has 2000 cycles to do so. Its coefficients are
   writable and reset to the same triangle, with unit DC gain.

The output is one complex sample every 2000 cycles.

## Spectrum sensing

`sensing_timer` counts a 100 ms period (8,000,000 cycles). At the start of
each period it opens a window of `ACTIVE` cycles. While the window is open,
`tx_enable` is low. The first window opens right after reset.

`sense_frontend` mixes the ADC stream down from the IF with its own DDS. A
`polyphase_decimator` then lowpass-filters the stream and decimates it by
16 to 5 MS/s:

- **Filter:** 64 taps in 16 branches of 4, with four multiply-accumulators
  per rail working in parallel.
- **Coefficients:** writable, reset to a 16-sample moving average.
- **Restart:** the commutator restarts at each window, so every window
  yields whole output samples.
- **Output:** samples are produced only inside the window.

**Window length is an open question.** The original system gives two sizes
that disagree:

- it says sensing lasts "almost 4 µs";
- its DSP filterbank works on 2048 samples at 5 MS/s, which takes 409.6 µs.

The default here is the 4 µs figure: `SENSE_ACTIVE = 320` cycles, which
gives 20 samples per window. To feed the full filterbank from a single
window, set `SENSE_ACTIVE = 32768`. That silences the transmitter for 0.4 %
of the time. The sensing FIFO only has to absorb short bursts, because the
link drains it at 40 MS/s.

## Parameters of `sdr_fpga_top`

| Parameter | Default | Meaning |
|---|---|---|
| SENSE_PERIOD | 8000000 | sensing period in clocks (100 ms) |
| SENSE_ACTIVE | 320 | sensing window in clocks (4 µs) |
| IL_ROWS, IL_COLS | 12, 16 | interleaver array |
| VIT_DEPTH | 42 | Viterbi survivor depth |
| PSF_TAPS | 80 | CPSCIC taps (transmit and receive) |
| TX_M1, RX_M1 | 8, 4 | CPSCIC interpolation and decimation |
| CIC_M2, CIC_N | 500, 4 | CIC rate and order |
| SENSE_M3, SENSE_TAPS | 16, 64 | sensing decimation and taps |

`coef_sel` picks which filter a coefficient write goes to: 0 is the
transmit CPSCIC, 1 the receive CPSCIC, 2 the sensing lowpass.
`rtl/sdr_pkg.sv` holds the shared constants, GF(64) arithmetic and the
command and tag enums.

## Where this design departs from the original system

- **Command numbers:** the receive flag in bit 4 of R_f, explained above.
- **Viterbi decoder:** written from scratch, where the original used a
  vendor core.
- **Sensing window:** 4 µs by default, which is too short for the 2048-sample
  filterbank.
- **Filter coefficients:** no CPSCIC or sensing-filter coefficients were
  published. The reset kernels are placeholders with the right structure
  and gain. Real coefficients must be loaded for spectrally clean operation.
- **Unstated details chosen here:** interleaver size, RS generator roots, CIC
  order, rate splits, link word formats, register addresses, arbitration
  order and FIFO depths.
- **Left to other devices:** the DSP software, the ARM host, the ADC and DAC
  devices, the RF module and the audio codec. The top brings out the ADC
  (14-bit) and DAC (16-bit) sample ports, plus the DSP-side register and
  link ports.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The checks compare
against independent models in the testbench:

- the RS encoder and decoder against a software GF(64) codec with random
  error patterns (`tb/rs_tb_pkg.sv`);
- the convolutional encoder against a bit-level model;
- the Viterbi decoder under random bit errors;
- the filters and CICs against reference arithmetic;
- the NCO against `$cos`/`$sin`.

The upconverter, downconverter and sensing testbenches check signals rather
than exact bits:

- tone amplitudes and angles;
- image and stopband rejection;
- the 20 kbaud intake;
- 20 samples per sensing window.

`tb_sdr_fpga_top` runs the top at its default parameters for 8.2 million
cycles. That covers two sensing windows, and takes about two minutes in
Verilator. Acting as the DSP, it:

- RS-encodes a message and compares the result with the software encoder;
- convolutionally encodes 12 words, flips 3 coded bits, and sends them back
  through the Viterbi service to recover the data;
- RS-decodes a codeword with 5 corrupted symbols;
- sends a word under a reserved command;
- loads a new sensing kernel between windows;
- transmits across the second window while a carrier at the IF drives the
  ADC.

It counts every mechanism and fails if any never happened:

- each R_f service;
- each R_d tag on the link and in the register;
- dropped words;
- transmitter-off cycles, with the DAC exactly zero during them.

For each block, a deliberately broken copy was also run against the block's
testbench, to confirm that the testbench catches a real bug.

To run a testbench with Verilator:

```
verilator --binary --timing -Irtl -Itb rtl/sdr_pkg.sv tb/rs_tb_pkg.sv \
    tb/tb_sdr_fpga_top.sv --top-module tb_sdr_fpga_top
./obj_dir/Vtb_sdr_fpga_top
```

Unit testbenches are built the same way. Only `rtl/sdr_pkg.sv` has to be
named; the other modules are found through `-Irtl`. `rs_tb_pkg.sv` is
needed only by the RS and top testbenches.
