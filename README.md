# CDMA mobile-station chip set: modem and vocoder DSP in SystemVerilog

A CDMA (IS-95 style) handset needs two pieces of digital baseband silicon. The first is a
modem that spreads, filters and sends the reverse link. It also finds, despreads, combines
and decodes the forward link. The second is a small fixed-point DSP that runs the speech
coder. This repository is RTL for both:

* `modem_asic`, the modem:
  * a reverse link modulator (convolutional encoder, block interleaver, 64-ary Walsh
    modulation, data burst randomizer, long and short PN spreading with OQPSK offset, 48-tap
    FIR filters);
  * a forward link demodulator (double-dwell pilot searcher, three rake fingers, power
    measurement, symbol combiner with power control);
  * a block deinterleaver and a K=9 Viterbi decoder;
  * a register interface for the host microcontroller and a timing/sleep generator.
* `vocoder_dsp`, a 16-bit DSP:
  * 24-bit single-word instructions, each issued in one clock;
  * dual X/Y data banks, two 36-bit accumulators with an 18x18 multiplier, and
    zero-overhead repeat loops;
  * serial and parallel ports, and seven interrupt sources.
* `cdma_chipset` puts the two side by side. Each keeps its own pins (prefix `m_` for the
  modem, `d_` for the DSP). In a handset the microcontroller links them; that software path
  is not part of the RTL.

The block structure, the main sizes and the algorithms named below come from a published
description of such a chip set. That description names most blocks and says what they do, but
it rarely gives bit-level detail. Where the code follows the CDMA standard of the time (code
generators, PN polynomials, frame timing), the values come from the IS-95 air interface. Where
it follows neither, it is this design's own choice. The last two sections list what departs
from the described chips and what is missing.

## Reverse link: from host bits to TXIQ

`reverse_modulator` takes one traffic bit at a time from the host FIFO (`bit_valid`/`bit_ready`)
and produces filtered baseband at four samples per chip.

1. **Encoder** (`conv_encoder`): rate 1/3, K=9, generators 557, 663 and 711 (octal), three
   symbols per bit. The host supplies the 192-bit frame, including the CRC and eight tail bits.
2. **Interleaver** (`block_interleaver`): 32 rows by 18 columns, written by columns. At lower
   rates each symbol is written 2, 4 or 8 times, so a bank always holds 576 symbols. Rows are
   read in 5-bit bit-reversed order. Each 18-symbol row is three 6-symbol Walsh groups, so one
   group read is a slice of one row. There are two banks: one fills while the other is sent.
3. **Walsh modulator** (`walsh_modulator`): chip `k` of Walsh function `w` is the parity of
   `w & k`. There are 64 chips per symbol and 4 PN chips per Walsh chip.
4. **Data burst randomizer** (`data_burst_randomizer`): picks which of the 16 power control
   groups (PCGs) of a frame are sent. It uses the frame rate and 14 long-code bits, saved from
   the end of the previous frame, and the IS-95 selection rule. `tx_gate` is the result.
5. **Spreading**: the long code (`long_code_gen`) is a 42-stage generator. Its output is the
   parity of the state ANDed with the user mask. The I and Q short codes (`short_pn_gen`) are
   15-stage generators, with one zero stuffed after the run of 14 zeros, giving period 32768.
6. **OQPSK and filtering**: Q is delayed by two samples (half a chip). Each arm is a zero-stuffed
   +/-1 stream into `fir_filter`. The filter has 48 symmetric taps and forms pre-added pairs.
   Its coefficients are a Hamming-windowed sinc with cutoff at one eighth of the sample rate.
   They are scaled so that the largest polyphase sum is 510, then rounded; the formula is in
   the filter's header. The output is
   the sum shifted right by two and saturated to 8 bits. `txiq` multiplexes I and Q onto one
   8-bit bus.

**Frame timing.** A frame is 24576 chips: 96 Walsh symbols, or 16 PCGs of 6 symbols. The
modulator decides on the last sample of a frame whether the next frame carries traffic, and at
which rate. It sends only if `tx_enable` is high and a full interleaver bank is waiting. It
releases the bank on the second sample of the last chip, so `frame_avail` already shows the
next bank at the decision.

## Forward link: fingers, combiner, decoder

The receive input is 4-bit I/Q at two samples per chip. Every receive block uses the same
`samp_en` strobe.

**Searcher** (`pilot_searcher`): a serial double-dwell search over `win` hypotheses, one chip
apart:

* It correlates the received signal with the local I/Q pilot code for `l1` chips. The energy
  is (sum I)^2 + (sum Q)^2.
* Below `t1`, the hypothesis is dropped. Otherwise a second dwell of `l2` chips is compared
  with `t2`.
* Between hypotheses the local code is held for one chip (the slip).
* Every hypothesis produces a result (`res_offset`, `res_energy`, `res_pass`, `res_dwell2`).
  The host picks the paths.

**Finger** (`rake_finger`): despreads the on-time sample with the short PN codes and
correlates over 64 chips:

* The Walsh code of the traffic channel gives the traffic vector; the all-zero Walsh code
  gives the pilot vector.
* The symbol is the dot product of traffic and pilot vectors, so it comes out phase-corrected
  and weighted by path strength.
* The cross product of successive pilot vectors is the frequency error.
* Pilot energy against `lock_thr` gives `lock`.
* **Timing tracking** accumulates late-minus-early energy, taken half a chip either side.
  When the sum passes `track_thr`, the finger moves half a chip.
  * "Later" suppresses one sample strobe.
  * "Earlier" flips the sample phase `ph`.
* A slew (`slew_req`, `slew_chips`) holds the local code for that many chips, to assign a new
  path.

**Symbol combiner** (`symbol_combiner`):

* A 4-deep deskew FIFO per finger lines the fingers' symbols up. When a full FIFO receives
  another symbol, it drops the oldest and counts that in `deskew_err`.
* It sums the enabled fingers and removes the long code (one long-code bit per symbol). It
  then scales (`soft_shift`) and saturates the sum to 4-bit soft symbols.
* The power control bit sits in 2 of the 24 symbols of each 1.25 ms PCG, at a position given
  by 4 long-code bits. Those two symbols become erasures (0) in the data stream. Each bit
  moves `tx_gain` by `pc_step`.
* `tx_gain` and the summed frequency error drive first-order sigma-delta modulators
  (`pdm_modulator`). Their outputs are the pulse-density power and frequency control lines
  to the IF circuits.
* It keeps system time: the PCG strobe, the frame strobe and the frame count.

**Deinterleaver** (`block_deinterleaver`): a 16 x 24, double-banked RAM of 384 soft symbols.
Received symbol `j` is written at address `16*(j % 24) + bitrev4(j / 24)`, and a full bank is
read out in order. `overflow` counts symbols that arrived while both banks were full.

**Viterbi decoder** (`viterbi_decoder`): K=9, rate 1/2, generators 753 and 561 (octal), soft
decisions.

* **Structure**: an input buffer holds the frame's 384 symbols. Branch metrics feed one
  add-compare-select (ACS) per clock over the 256 states. Two state-metric banks ping-pong,
  and a path memory stores one decision bit per state and step.
* **Output**: a traceback from state 0 (the tail bits flush the encoder) fills the output
  buffer. The decoder sends 184 bits: the frame less its 8 tail bits.
* **Quality**: the decoder re-encodes the decoded bits to count symbol errors (`ser`). It
  checks the 12-bit CRC (polynomial 0xF13, register preset to ones) to set `quality`.
* **Timing**: a 192-bit frame takes 49536 clocks, about a quarter of a 20 ms frame at the
  modem clock.

## Modem clocking, sleep and host interface

The modem runs from one clock of `CLK_PER_CHIP` = 8 cycles per 1.2288 Mchip/s chip
(9.83 MHz). `modem_clock_gen` makes two strobes: `en_x4` for the transmit side and `en_x2`
for the receive side. A sleep request stops both for a programmed number of chips. The chip
counter `chip_time` keeps running during sleep, and a wake interrupt follows. The enables
stand in for gated clocks.

`up_interface` is a synchronous register port: `bus_cs`, `bus_wr`, an 8-bit address and 16-bit
data. Reads are combinational, and a read of a popping register acts at that clock. The
full map is in the header of `rtl/up_interface.sv`; in brief:

| address | contents |
|---|---|
| 00 | control: tx enable, I/Q select, tracking, PDM, finger enables |
| 01, 02 | transmit FIFO (16-bit words, sent MSB first) and rate |
| 03 | status: free TX words, searcher busy, decoded words, quality, asleep, lock |
| 04-06, 18-1B | long code mask; long code state and its load strobe |
| 07-0C, 10-13 | searcher start, window, dwells, thresholds (x256); result registers |
| 14-17 | finger tracking and lock thresholds; combiner scaling and power control step |
| 1C-1F | received power; interrupt mask and status (write 1 to clear); sleep |
| 20-27 | decoded-word FIFO, SER, frame count, error counters, system time, power control |
| 28-32 | per-finger Walsh code, slew, lock and energy |

`irq` is the OR of the unmasked status bits:

* receive frame;
* search done;
* decoder frame done;
* wake;
* transmit frame boundary;
* traffic frame sent.

## The vocoder DSP

`vocoder_dsp` is four blocks. Each decodes the 24-bit instruction register that program
control broadcasts.

* **Program control** (`dsp_prog_ctrl`):
  * PC (16 bits), IR (24 bits) and an 8k x 24 program ROM;
  * an 8-deep hardware return stack;
  * repeat registers RS, RE and RC, each with a 3-deep stack for nested loops.
  * `RPT len, cnt` repeats the next `len+1` words `cnt` times with no overhead. A RPT in IR
    takes effect on the fetch in the same cycle.
  * With `mp_mode` high, instructions come from external memory (`prog_addr`, `prog_data`,
    `strb`) instead of the ROM. `prog_data` must be valid in the same cycle.
  * IDLE stops the core until an unmasked interrupt (or emulation) is pending.
  * An interrupt saves the PC and jumps to `4*n`.
* **Memory** (`dsp_mem_block`):
  * each bank (X and Y) holds 1k x 16 RAM at 0x000 and 1.5k x 16 ROM at 0x400;
  * address registers AX0/AX1 and AY0/AY1 post-modify by +1, -1 or the index register
    IX/IY;
  * start/end registers XS/XE and YS/YE make circular buffers;
  * SP and SPB, with the stack in X RAM.
  * A dual load (DLD, MACD) reads both banks in one cycle.
* **ALU** (`dsp_alu_block`):
  * two 36-bit accumulators A0 and A1. Each is a 4-bit guard nibble, a 16-bit X part and a
    16-bit Y part (RX0/RY0, RX1/RY1).
  * general registers RX2, RX3, RY2 and RY3;
  * an 18x18 signed multiplier, a 36-bit barrel shifter, and an ALU (add, subtract, and,
    or, xor, load, compare, negate) with flags Z, N, V.
  * MACD performs `A += RX2*RY2` while RX2 and RY2 reload from the X and Y buses. The loads
    come over the RBH and RBL move buses, which gives a one-cycle FIR/correlation kernel
    under RPT.
* **I/O** (`dsp_io_block`):
  * interrupt mask/status/control (IMR, ISR, SCR);
  * a serial port (SIR, SOR) with external bit clocks and word syncs, MSB first;
  * a parallel port (PIR, POR, `pio_oe`), both ports with 8- or 16-bit modes;
  * external and emulation interrupt pins, the emulation one non-maskable.
  * Interrupt priority, highest first: emulation, external, serial in, serial out, parallel
    in, parallel out. Entry clears SCR.IE, and RETI sets it again.

The instruction set and its encoding are in the header of `rtl/dsp_pkg.sv`. Opcode is bits
23:19. Immediates are 16 bits and direct addresses 12 bits, so every instruction is one
word. A taken branch, call, return or interrupt entry costs one extra cycle.

## Where this departs from the described chips

* **DSP pipeline**: two stages (fetch, execute), with multiplies in one cycle. The described
  DSP has three stages, four for multiplies, and reaches about 40 MIPS at 80 MHz, which is two
  clocks per instruction. This design issues one instruction per clock.
* **Instruction encoding and memory map** are this design's own. No encoding was published.
* **PSW**: the flags are held in the ALU block, not among the memory block's registers.
* **Parallel port**: the 16-bit bidirectional parallel bus is split into `pio_in`, `pio_out`
  and `pio_oe`.
* **Received power** is read by the host. It is not fed into the combiner's power control.
* **Searcher results** go to the host through a result register. The described chip uses DMA.
* **Modem-DSP link**: the DSP-to-modem connection shown for the original chips is not
  described, so the two cores share no signals here.
* **Standard-derived numbers**: the FIR coefficients, code generators, PN polynomials,
  interleaver orders, data burst randomizer rule and power-control positions come from the
  air interface standard or from this design, not from the described chips. The 1.5 dB
  ripple and 40 dB stopband of the original FIR, and its 4.5 dB coding gain, were not
  measured here.
* **Host-side functions**: CRC generation and tail bits on transmit, path selection, and
  closing the AGC loop are left to the host.

## Not included

* The QCELP speech coder program, and DSP ROM contents. `PROG_INIT`, `XROM_INIT` and
  `YROM_INIT` may name hex files.
* The data port and FM port of the modem.
* The 80C186 host, the RF/IF analog chain and the analog-mode (FM) processing.
* Access channel and sync/paging channel specifics.

## Simulating

Every testbench in `tb/` is self-checking. It ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. Build one with Verilator 5, listing the
packages first:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cdma_chipset \
    rtl/cdma_pkg.sv rtl/dsp_pkg.sv $(ls rtl/*.sv | grep -v _pkg.sv) tb/tb_cdma_chipset.sv
./obj_dir/Vtb_cdma_chipset +verilator+rand+reset+2
```

* `tb_cdma_chipset` is the end-to-end test at the default parameters. It does the following:
  * a base-station model sends a pilot;
  * a host model programs the modem, finds the pilot with the searcher, slews a finger onto
    it and waits for lock;
  * it checks the combiner's PCG clock and the power readout;
  * it fills the transmit FIFO past full until it pushes back, and waits for a traffic frame
    to be sent;
  * it puts the modem to sleep and wakes it;
  * meanwhile the DSP multiplies, idles and is woken by an interrupt.

  It counts each of these mechanisms and fails on any that never happened. It runs about
  one second.
* `tb_vocoder_dsp` runs a program from external program memory. The program covers:
  * table fill and the dual-load MAC under RPT;
  * call/return, direct and indirect addressing, push/pop;
  * both ports in both directions;
  * the external, emulation, serial and parallel interrupts, and idle/wake.
* `tb_modem_clock_gen` checks the enable rates and phases and a sleep of random length.
  System time must keep counting through the sleep, and exactly one wake pulse must follow.
* `tb_up_interface` checks register readback and the transmit FIFO up to full and bit
  order. It also checks decoded-word packing, the held searcher result, interrupt masking
  and clearing, and the finger slew pulse.
* Each modem block has its own testbench. Each compares against a model computed in the
  testbench: bit-exact encoder and PN sequences, the FIR against a direct convolution, the
  Viterbi decoder on frames with weak and flipped symbols, and the finger on a delayed,
  phase-turned pilot-plus-traffic signal whose timing then moves.
