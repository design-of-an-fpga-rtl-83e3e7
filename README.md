# K-clock data acquisition core for frequency scanning interferometry

Frequency scanning interferometry (FSI) measures absolute distance with a
tunable laser. The laser sweeps its optical frequency. The light returned
from a target interferes with a reference beam, and the beat frequency of
that interference is proportional to the target distance. Real lasers do not
sweep linearly, so sampling the photodetector at equal *time* steps smears
the beat frequency. This design avoids that by not using its own sample
clock. A second, auxiliary interferometer of fixed path difference produces a
fringe signal, the *K-clock*. Sampling the photodetector on each K-clock
edge puts the samples at equal steps of *optical frequency*. An FFT of one
sweep's samples then gives a sharp peak per target, whatever the laser's
tuning nonlinearity.

This repository holds the FPGA side of such a system: a SystemVerilog core
that

1. receives 16-bit samples from an external ADC clocked by the K-clock, over
   eight DDR LVDS lanes with the ADC's own output clock (AD CLK);
2. stores every sample of one valid laser sweep in on-chip block RAM (up to
   524,288 samples);
3. streams them to a host over a 460800-baud UART while the laser is between
   sweeps.

The laser's trigger output marks the valid part of the sweep: low while the
sweep is valid, high between sweeps. Acquisition runs from the trigger's
falling edge to its rising edge. Transmission follows.

The design follows a published Artix-7 FSI acquisition system: its block
structure, DDR capture, four-sample packing, FIFO sizes, seven-state
controller and baud rate. Where that description is silent or where this
implementation chose differently, the text below says so, mainly in
[Departures and choices](#departures-and-choices).

## Data path and clock domains

```
             AD CLK domain (K-clock rate, up to 160 MHz)         |  system clock (100 MHz)
                                                                 |
adc_data[7:0] --> ddr_interface --16--> joint_numbers --64--> async_fifo --16--> byte_mux --8--> uart_core --> uart_txd
ad_clk  -------->   FF1 fall             FF1..FF4 chain     (wr_clk = AD CLK/4) |   (HB, LB)      (8N1)
                    FF2 rise             FF5 every 4th edge        |            |
                    FF3 fall             wr_clk = AD CLK / 4       |            |
                                                                   |
trigger --------> trigger_sync (4-stage sync, TF/TR pulses) --> daq_fsm --> we, re, tx_dv, byte select
adc_config_rdy -> 4-stage sync ------------------------------->    ^  <-- FIFO empty/full, reset busy, UART done
                                                                   |
                       we --> 4-stage sync into AD CLK --> joint_numbers.enable
```

Three clocks are involved: AD CLK, its divide-by-four (the FIFO write clock)
and the system clock. Only these signals cross between domains:

| Signal | From -> to | How |
|---|---|---|
| sample words | AD CLK/4 -> system | `async_fifo`, Gray pointers through 8-stage synchronizers |
| `we` (acquire) | system -> AD CLK | 4-stage synchronizer |
| `trigger` | laser -> system | 4-stage synchronizer plus edge detector |
| `adc_config_rdy` | ADC module -> system | 4-stage synchronizer |
| `sys_rst` | pin -> each domain | asynchronous assert, synchronous release |

The core captures one ADC channel, as in the original FPGA block diagram. The
ADC has two. A second channel would need a second
`ddr_interface`/`joint_numbers`/`async_fifo` path and a controller that
interleaves the two in transmission. Neither is provided.

## Getting samples off the DDR lanes (`ddr_interface`)

The ADC sends each 16-bit sample in two halves on eight lanes. Lane *j*
carries bit D2j in one half and D2j+1 in the other:

- the **even** bits are valid at a **falling** edge of AD CLK and are
  captured by FF1;
- the **odd** bits are valid at the following **rising** edge and are
  captured by FF2;
- at the next **falling** edge FF3 takes FF1 and FF2 together, interleaved
  back into bit order.

So the sample at the output changes on falling edges. It is stable around
every rising edge, which is where the next stage samples it. Latency is half
an AD CLK period after the odd half.

Which falling edge starts a word depends on the output-clock phase the ADC is
programmed with over its SPI port. That programming is done by a
microcontroller on the ADC board, not by this core. The core assumes the
even half comes first. If your ADC is programmed the other way, each output
sample will hold the odd half of one sample and the even half of the
previous one. To fix that, either change the ADC's output-clock phase, or
move FF3 to the rising edge and pair FF2 with the *next* FF1.

FF1 and FF2 have no reset, because they are overwritten on every edge. FF3 is
reset.

## Packing four samples per FIFO word (`joint_numbers`)

The FIFO is 64 bits wide on its write side, not 16. In the original design
the vendor FIFO generator limits write depth to 131,072 entries. A 64-bit
word lets that depth hold 524,288 samples without external memory. The
packer is a four-deep shift chain:

- FF1..FF4 shift on each rising edge of AD CLK, with FF1 taking the new
  sample. A multiplexer in front of each register feeds zero while `enable`
  is low, so the chain is clean at the start of each measurement.
- A free-running two-bit counter divides AD CLK by four. Its top bit is the
  FIFO write clock.
- Every fourth edge, FF5 takes the chain as one word: FF1 (newest) in bits
  15:0, FF4 (oldest) in bits 63:48.

**Timing detail.** FF5 is written here as a load-enabled register in the
AD CLK domain, not as a register clocked by the divided clock. The divided
clock rises two AD CLK periods after FF5 loads. The FIFO therefore sees a
word that has been stable for two periods and stays stable for two more.

**Partial words.** `word_valid` is high only when all four samples of a word
were taken during the current acquisition. A word that straddles the start
or end of a sweep is dropped, not padded with zeros. Up to three samples can
be lost at each end of a sweep, and the host always receives a multiple of
four samples.

## The FIFO (`async_fifo`)

This is an independent-clock FIFO with a 64-bit write port and a 16-bit
read port:

- **Storage.** One 64-bit-wide array of `WR_DEPTH` entries (default 131,072,
  i.e. 8 Mbit of block RAM). It is read synchronously at the read pointer's
  word address, and a 16-bit slice is selected from the word.
- **Read order.** The most significant slice comes out first. With the
  packing above, samples leave the FIFO in the order they were taken.
- **Pointers.** Binary pointers carry one extra wrap bit. They cross domains
  in Gray code through `SYNC_STAGES` (8) flip-flops. The read pointer counts
  16-bit slices. A word is handed back to the writer when its last slice has
  been read.
- **Flags.**
  - `rd_empty` and `rd_full` are computed on the read side. `wr_full` is
    computed on the write side.
  - `rd_empty` and `wr_full` are conservative: each can stay set a few
    cycles after it could have cleared, but never clears too early.
  - `rd_full` tells the controller the FIFO is full. It sets a few cycles
    after `wr_full`, and writes in between are dropped.
  - A write while full is dropped.
- **Read timing.** Standard mode: `dout` shows the slice the cycle after a
  read is accepted, and holds it until the next read.
- **Reset.** Reset is bridged into each domain through an 8-stage reset
  synchronizer. Each side raises `*_rst_busy` until its own reset is
  released, and ignores requests until then. The controller waits for both
  flags to drop before leaving its init state.

The original design generates this FIFO with the FPGA vendor's IP. This
module is a portable equivalent with the same widths, depth and
synchronizer depth.

## The controller (`daq_fsm`)

The controller runs on the system clock. Its states are numbered 1 to 7,
after the original state diagram:

| # | State | Outputs | Leaves when |
|---|---|---|---|
| 1 | INIT | – | FIFO read and write reset-busy both low -> 2 |
| 2 | IDLE | – | ADC configuration ready -> 3 |
| 3 | READY | – | trigger falling edge (TF) -> 4 |
| 4 | ACQUIRE | `we` | trigger rising edge (TR) or FIFO full (FiF) -> 5 |
| 5 | TX_IDLE | `re` for one cycle (if not empty) | next cycle -> 6 |
| 6 | SEND_HB | `tx_dv` on entry, high byte selected | UART done -> 7 |
| 7 | SEND_LB | `tx_dv` on entry, low byte selected | UART done: FIFO empty -> 2, else -> 5 |

Notes on this table:

- Trigger edges outside state 3 or 4 are ignored. A sweep that begins while
  the previous one is still being transmitted is skipped entirely.
- After the FIFO drains, the controller goes through IDLE back to READY. It
  moves on at once if the ADC is still ready.
- **Addition to the original sequence.** State 5 reads only when the FIFO is
  not empty. If the FIFO stays empty for `SETTLE_CYCLES` cycles (default
  256), state 5 returns to IDLE. This covers two cases:
  - The last words of a sweep need a few AD CLK and system-clock cycles to
    cross the write-enable synchronizer, the packer and the FIFO pointer
    synchronizers. Without the wait, the first entry to state 5 could read
    an apparently empty FIFO.
  - A sweep shorter than one 64-bit word leaves nothing to send.

  `SETTLE_CYCLES` must cover about 16 AD CLK periods plus 10 system
  clocks. Those are the write-enable synchronizer, the packer, one
  write-clock period and the FIFO pointer synchronizer. The default of 256
  system clocks (2.56 µs) is enough for a K-clock of 10 MHz or faster. Raise
  it for a slower K-clock.

**AD CLK must keep running.** The K-clock comes from an interferometer, so
it may stop when the laser stops sweeping. The core needs AD CLK in two
places:
- During and after reset, the FIFO's write side must leave reset, or the
  controller stays in INIT.
- For about 16 periods after the trigger rises. Otherwise the last word or
  two of the sweep stay in the packer. They are written only when AD CLK
  resumes, ahead of the next sweep's data.

## What the host receives

- The UART frame is 8N1 (8 data bits, no parity, one stop bit), LSB first,
  at 460800 baud. With the default `CLKS_PER_BIT` = 217 at 100 MHz, the
  actual rate is 460829 baud.
- Each sample goes out as two bytes, high byte first.
- Samples arrive in sampling order, one contiguous run per sweep, and the
  run length is a multiple of four.
- Nothing marks where one sweep ends. The host can separate sweeps by the
  idle gap on the line, or by the known number of samples per sweep.

**Throughput.** A frame takes 10 bit times, and the controller adds two
cycles between bytes. One sample therefore takes about 43.4 µs. A full
524,288-sample FIFO takes about 23 s to empty.

## Sizing against the measurement

- **Samples per sweep.** The count is the optical frequency span times the
  delay of the auxiliary interferometer. A 1530–1560 nm sweep spans
  3.77 THz. With a 22.44 m path mismatch, the delay is:
  - 75 ns if 22.44 m is the optical path difference, or
  - about 110 ns if it is a fibre length with group index about 1.47.

  That gives roughly 282,000–414,000 samples per sweep. The 524,288-sample
  FIFO holds a whole sweep in either case.
- **Sampling rate.** At 2000 nm/s the 30 nm sweep takes 15 ms, so the
  K-clock averages 19–28 MHz. The capture path is written for up to
  160 MHz.
- **Range.** The sampling theorem requires the auxiliary path difference to
  be at least four times the largest target distance. With 22.44 m, targets
  up to about 5.6 m can be measured.
- **Transfer time.** At the UART rate, one sweep of this size takes 12–18 s
  to reach the host. The original system names the serial link as its main
  limitation.

## Departures and choices

These points go beyond the original description, or differ from it:

- **Single channel.** Only one ADC channel is captured (see above).
- **FIFO.** The FIFO is this design's own, not vendor IP. Its read order
  (most significant slice first) matches the vendor FIFO's behaviour for a
  wide write port and a narrow read port.
- **FF5.** FF5 is a load-enabled register in the AD CLK domain. The write
  clock is phase-placed mid-word.
- **Word boundaries.** Partial words at the ends of a sweep are dropped, not
  zero-filled.
- **DDR bit order and framing.** Lane *j* carries D2j/D2j+1, and the even
  half starts a word. The original timing diagram draws a word as odd half
  first. Its register arrangement and text pair the halves the way this
  core does.
- **State 5.** The controller has the empty check and settle timeout in
  state 5 (see above).
- **`tx_dv`.** It is a one-cycle pulse on entry to each send state.
- **System clock and UART frame.** A 100 MHz system clock and the 8N1 frame
  are assumptions. Change `CLKS_PER_BIT` for another clock.
- **UART receiver.** The receiver is built, and its bytes come out on
  `rx_valid`/`rx_byte`. The design gives them no function.
- **Resets and synchronizers.**
  - Reset bridges sit on every domain.
  - The acquire enable (`we`) and ADC-ready inputs each pass through a
    4-stage synchronizer, like the trigger.
  - Resets are asynchronous in the data path and synchronous in the UART
    and controller.
- **Outside the core.** The ADC board is not part of this RTL: the ADC,
  LVDS repeater, configuration microcontroller, RF transformers and K-clock
  generation. Nor are the FPGA's differential input buffers, which belong in
  a board-specific wrapper: `ad_clk` and `adc_data` are their single-ended
  outputs.

## Parameters of the top (`fsi_daq_top`)

| Parameter | Default | Meaning |
|---|---|---|
| `FIFO_DEPTH` | 131072 | FIFO depth in 64-bit words (power of two) |
| `CLKS_PER_BIT` | 217 | UART bit time in system clocks (100 MHz / 460800) |
| `SETTLE_CYCLES` | 256 | controller wait for late words after a sweep |

Shared widths, the state encoding and the byte-select type are in
`rtl/fsi_daq_pkg.sv`.

## Files

`rtl/`:

- `fsi_daq_pkg.sv`: shared types and constants.
- `fsi_daq_top.sv`: the core.
- `ddr_interface.sv`, `joint_numbers.sv`, `async_fifo.sv`: the data path.
- `byte_mux.sv`, `uart_core.sv` (with `uart_tx.sv`, `uart_rx.sv`): the serial
  output.
- `trigger_sync.sv`, `daq_fsm.sv`: the control path.
- `sync_bits.sv`, `reset_sync.sv`: synchronizer helpers.

`tb/`: one self-checking testbench per module, `<module>_tb.sv`, plus:

- `fsi_daq_top_tb.sv`: end-to-end test with a 16-word FIFO and a 4-cycle
  bit time.
- `fsi_daq_top_full_tb.sv`: one sweep through the core at its default
  parameters.
- `fsi_daq_sweep_tb.sv`: full-length sweeps at the default parameters.
- `adc_ddr_model.sv`: behavioural model of the ADC's DDR output.
- `uart_monitor.sv`: serial decoder used by the testbenches.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. With Verilator 5, from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
    rtl/fsi_daq_pkg.sv tb/fsi_daq_top_tb.sv --top-module fsi_daq_top_tb
./obj_dir/Vfsi_daq_top_tb
```

Replace the testbench name to run any other one. The simulator is
two-state, so every register that is read is reset.

What the testbenches establish:

- `ddr_interface_tb`: every bit's position, and that a sample appears on the
  falling edge after its odd half and not before.
- `joint_numbers_tb`:
  - the write clock is AD CLK/4;
  - each word holds four consecutive samples, oldest on top;
  - words of a sweep are contiguous;
  - at most three samples are lost at either end of a sweep;
  - nothing is written while disabled.
- `async_fifo_tb`: a reference-queue comparison under random traffic on
  unrelated clocks; full, write drop while full, empty and reset-busy
  behaviour.
- `uart_core_tb`:
  - the line is decoded bit by bit;
  - `tx_done` comes exactly ten bit times after `tx_dv`;
  - loopback into the receiver works;
  - a frame with a bad stop bit is rejected.
- `trigger_sync_tb`: edge pulses at exactly five clocks' latency, against a
  reference delay line.
- `daq_fsm_tb`: every transition of the table above, with the outputs in
  each cycle.
- `fsi_daq_top_tb`: five sweeps in a row, which reach each of these at least
  once (the test counts them):
  - waiting for reset-busy and for ADC-ready;
  - a sweep ended by the trigger, and one ended by FIFO full;
  - the return to idle once the FIFO is empty;
  - the settle timeout;
  - a dropped partial word;
  - a sweep ignored during transmission;
  - a received byte.

  The host-side stream is checked for contiguity, word alignment and
  position within the trigger window.
- `fsi_daq_sweep_tb`: full-length sweeps at the default parameters. Sweeps
  of 282,000 and 414,000 samples end on the trigger and are stored whole. A
  600,000-sample sweep stops at exactly 524,288 samples. The first 48
  samples of each are checked on the serial line. Sending a whole sweep
  would take 12–23 s of simulated time, so the rest is not sent.
- `fsi_daq_top_full_tb`: a 120-sample sweep at a 160 MHz sampling clock.
  All samples arrive in order over the 217-cycle-per-bit UART, and the byte
  time is checked. It runs in a few seconds.

How far to trust it: every module is exercised in simulation, including
fault-injected variants that the testbenches detect. Nothing has been
synthesized for an FPGA or timed at 160 MHz. Clock-domain crossings have
been checked only functionally, in a simulator without metastability.
