# An eight-channel FPGA logic analyzer

A logic analyzer records the logic levels of a few digital lines (an I2C or
SPI bus, a clock, a parallel port) at a fixed sample rate so that they can be
looked at afterwards. This design is the FPGA half of a small, low-cost one:
eight probe inputs, a capture memory of 4096 samples, sample rates from
12.5 MHz down to below 1 Hz, and a plain UART link to a PC. The PC program
sends one-character commands and draws the eight waveforms from the bytes it
gets back. Everything on the FPGA is simple, single-clock RTL. It is aimed
at a small FPGA with a few tens of kilobits of block RAM. That RAM is what
limits it: 4096 samples, with no compression and no trigger on the probe
data.

## One capture, start to finish

1. The PC sends a **rate character** (`'a'` to `8'h7F`). It picks a bit of a
   free-running 32-bit counter as the sample clock.
2. The PC sends **`'S'`**. Both address counters are cleared and the capture
   starts.
3. On every sample tick the eight (synchronised) probe lines are latched into
   the **input buffer**. In the next cycle they are written to the **sample
   memory**, and the **write address counter** advances.
4. After the write into location 4095, `write_done` rises and sampling stops.
5. The **read controller** then uploads the memory, oldest sample first. For
   each location it does four things, in order:
   - read the memory;
   - load the **output buffer**;
   - hand the byte to the **UART transmitter** once it is idle;
   - wait for the transmitter's `tx_done` and advance the **read address
     counter**.
6. After the byte from location 4095 has gone out, `read_done` rises.

Each sample goes to the PC as one raw byte. Bit *i* of the byte is probe
channel *i*.

A new `'S'` at any time restarts from step 2, even in the middle of a capture
or an upload. A byte the transmitter has already started is still finished,
and the new upload waits for it.

## Sample-rate generator

All logic runs on one master clock, `mclk`. A 50 MHz clock is assumed: the
UART's default divider and the rate table below depend on it. The 32-bit
counter `rate_counter` increments on every `mclk` cycle. Its bit *n*
(the "tap") rises once every 2^(n+1) cycles. A one-cycle `sample_tick` is
produced on each rising edge of the selected tap. The tick is a clock enable:
the sample logic is never clocked from the divided signal.

| command | tap | sample rate at 50 MHz |
|---|---|---|
| `'a'` (reset default) | 1 | 12.5 MHz |
| `'b'` | 2 | 6.25 MHz |
| `'f'` | 6 | 390.625 kHz |
| `'t'` | 20 | 23.84 Hz |
| `'x'` / `'y'` | 24 / 25 | 1.49 Hz / 0.745 Hz |
| `8'h7F` | 31 | 0.0116 Hz |

The rate is f_mclk / 2^(tap+1), with tap = byte − `'a'` + 1. So only
power-of-two fractions of the master clock are possible, and 1 Hz itself lies
between two steps. Tap 0 (25 MHz) is not offered. Ticks are therefore at
least four cycles apart, which gives the write controller its two-cycle
load/write sequence with room to spare. A rate change applies at once, also
during a capture.

## Timing

* Capture: 4096 sample periods after the start command, give or take one
  period for the phase of the first tick. At 12.5 MHz that is 328 µs.
* Input path: the probes pass two synchroniser flip-flops. A sample
  therefore shows the probes as they were about three `mclk` cycles before
  its tick.
* Upload: one 10-bit UART frame per sample plus three cycles per byte. At
  9600 baud that is 4096 × 52 080 cycles, about 4.27 s. The upload, not the
  capture, sets how often a capture can be repeated.
* Commands: the receiver takes about 9.5 bit times to deliver a byte.
  `start` follows one cycle after `rx_dv`.

## Modules

| file | role |
|---|---|
| `rtl/la_pkg.sv` | command characters, counter width, rate decoding function |
| `rtl/uart_rx.sv` | 8N1 receiver, `CLKS_PER_BIT` = 5208 (9600 baud at 50 MHz) |
| `rtl/start_trigger.sv` | turns a received `'S'` into a one-cycle `start` |
| `rtl/rate_counter.sv` | 32-bit counter, tap select, `sample_tick` |
| `rtl/write_enable.sv` | capture controller: buffer load, memory write, counter advance, stop at full |
| `rtl/data_buffer.sv` | 8-bit load-enable register (input and output buffer) |
| `rtl/addr_counter.sv` | address counter with clear, increment and `last` (write and read side) |
| `rtl/sample_sram.sv` | 4096 × 8 simple dual-port memory, one-cycle registered read |
| `rtl/read_enable.sv` | upload controller (READ, LOAD, SEND, WAIT, DONE) |
| `rtl/uart_tx.sv` | 8N1 transmitter with `tx_active` and `tx_done` |
| `rtl/logic_analyzer_top.sv` | the whole analyzer |

Top-level parameters: `DEPTH` (4096), `RX_CLKS_PER_BIT` and
`TX_CLKS_PER_BIT` (both 5208). `DEPTH` is meant to be a power of two.
Status outputs:

* `capturing` / `write_done` and `reading` / `read_done`;
* `led_show_write` / `led_show_read`: the upper 8 bits of each address, a
  progress display for LEDs;
* `data_out_2`: the most recently stored sample;
* `rate_tap`: the selected tap;
* the UART's `rx_dv`, `tx_active` and `tx_done`.

`rst` is synchronous and active high. The memory contents are not reset.

## Where this design fills in gaps

The analyzer's structure comes from its original description:

* receiver, trigger and 32-bit counter;
* input buffer, write counter and write-enable unit;
* a 4096-byte SRAM;
* read-enable unit, read counter, output buffer and transmitter;
* 9600 baud, sample rates from 1 Hz to 12.5 MHz, 4096 samples.

The following were not specified and are choices made here:

* The command set (`'S'`, `'a'`+k). The original only says that commands
  are ASCII characters.
* One clock with tick enables, instead of counters clocked from divided
  clocks.
* The upload starts by itself once the capture is complete, and sends raw
  bytes.
* The number of samples is always the full memory. A smaller "sample
  quantity" is left to the PC, which can drop the rest.
* 8N1 frames, the probe synchroniser, the reset input, and the meaning of
  `data_out_2`.

Known departures:

* An earlier, smaller build of the same analyzer used 8-bit address counters
  and a 256-byte memory. This RTL uses the 12-bit / 4096-entry size
  throughout; set `DEPTH = 256` for the small one.
* That build's receiver divider corresponded to 115 200 baud at 50 MHz while
  its transmitter ran at 9600 baud. Here both default to 9600 baud. They
  remain separate parameters.
* The analyzer has no trigger on probe data (pattern or edge). "Trigger"
  means the start command from the PC.

## Simulating

Every testbench in `tb/` checks its own results and ends with a line
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/la_pkg.sv \
        tb/logic_analyzer_top_tb.sv --top-module logic_analyzer_top_tb
    ./obj_dir/Vlogic_analyzer_top_tb

Use the same command for the other testbenches, naming a different file and
top module. `-Irtl` lets Verilator find the design files on its own.

* `<block>_tb.sv`: one testbench per module. The UART testbenches use 8
  cycles per bit.
* `logic_analyzer_top_tb.sv`: the whole analyzer at 64 samples and 8 cycles
  per bit. The testbench plays the PC and runs four captures:
  - two different rates with a rate switch between them;
  - one restarted during its capture;
  - one restarted during its upload.

  The probes carry a counter that advances once every few cycles, so the
  samples of a capture must step by a fixed amount. It also checks the
  capture and upload durations and the byte count, and counts every
  mechanism.
* `logic_analyzer_workload_tb.sv`: full 4096-sample captures of an eight-channel
  clock. The UART runs fast so the test finishes quickly. It runs 1 MHz
  sampled at 6.25 MHz and 10 kHz sampled at 390.625 kHz, and compares the
  number of rising edges with the expected 655.4 and 104.9. The 100 Hz case
  at 23.84 Hz would need 8.6 × 10^9 cycles and is not simulated.
* `logic_analyzer_full_tb.sv`: everything at the defaults (4096 samples,
  9600 baud, 50 MHz). It runs one capture at 390.625 kHz and the full
  4.27 s upload, some 214 million cycles, which takes about 1.5 minutes of
  simulation.

The simulator used has only two logic states. The testbenches therefore
reset everything they read and make no use of X.
