# SDRAM-backed data acquisition for a fast ADC

A 12-bit pipeline ADC produces samples far faster than a DSP can analyse
them. This FPGA design puts three SDR SDRAMs between the two: samples are
streamed into one SDRAM in bursts at the memory clock, while a previously
filled SDRAM is read back to the DSP at whatever pace the DSP sets. The three
memories take turns, so capture can continue without losing a word as long as
the DSP keeps up on average, and a single capture can be as long as a whole
512 Mb device (33,554,432 16-bit words) per buffer.

Each SDRAM is driven by a standard SDR SDRAM controller soft core (the
Actel/Microsemi CoreSDR). That core handles initialisation, refresh, bank
management and the SDRAM command pins. It is **not** part of this RTL. The
design talks to each controller over the core's simple *local bus*. It also
supplies the core's run-time timing settings from its own configuration
register.

```
            +-------------+        +--------------+   local bus   +---------+
 ADC ------>| adc_capture |--FIFO->| main_module 0|<------------->| CoreSDR |--SDRAM 0
 12 bit     | (input reg, |   |    +--------------+               +---------+
            |  1024 FIFO) |   +--->| main_module 1|<------------->| CoreSDR |--SDRAM 1
            +-------------+   |    +--------------+               +---------+
                              +--->| main_module 2|<------------->| CoreSDR |--SDRAM 2
                                   +--------------+               +---------+
                                       |  read words      ^ sdr_cfg, sd_init
                                       v                  |
 DSP <--- valid/ready --- read_module (512 FIFO)     config_reg <--- host port
                                       ^
                   main_ctrl: which SDRAM writes, which reads
```

Everything runs on one clock (`clk`) with an active-low asynchronous reset
(`rst_n`).

## Files

| file | contents |
|---|---|
| `rtl/das_pkg.sv` | widths, the local-bus and configuration structs, buffer states |
| `rtl/das_top.sv` | top level: wires the blocks below |
| `rtl/adc_capture.sv` | ADC input register, elastic capture FIFO, loss counter |
| `rtl/main_module.sv` | local-bus master for one SDRAM: burst writer and burst reader |
| `rtl/addr_incr.sv` | address increment module used inside each main module |
| `rtl/main_ctrl.sv` | main module controller: rotates the three SDRAM buffers |
| `rtl/read_module.sv` | collects read bursts, hands words to the DSP |
| `rtl/config_reg.sv` | run-time SDRAM timing, geometry and burst-size registers |
| `rtl/sync_fifo.sv` | first-word-fall-through FIFO used by capture and readout |
| `tb/coresdr_model.sv` | behavioural model of the controller's local bus plus SDRAM storage |
| `tb/tb_*.sv` | self-checking testbenches, one per block, plus two system tests |

## The buffer rotation (`main_ctrl`)

Each SDRAM is one buffer and is always in one of four states: EMPTY, WRITING,
FULL or READING. The controller keeps a write pointer and a read pointer.
Both step through the SDRAMs in the fixed order 0, 1, 2, 0, …

* **Writer.** When no SDRAM is being written and the SDRAM at the write
  pointer is EMPTY, the controller sends that main module `start_wr`. It does
  this if acquisition is on, or if captured words are still queued. The main
  module writes until its buffer holds `BUF_WORDS` words, or until it is told
  to flush. It then reports `wr_done` with the number of words written. The
  buffer becomes FULL with that length, and the write pointer moves on. A
  buffer that received no word goes back to EMPTY and the pointer stays.
* **Flush.** A writer is told to flush once `acq_en` is low and the capture
  input register is empty. It then writes whatever is left in the capture
  FIFO, using one shorter burst for the tail, and finishes.
* **Reader.** When no SDRAM is being read and the SDRAM at the read pointer
  is FULL, that main module gets `start_rd` with the stored length. After
  `rd_done` the buffer is EMPTY again.

The writer never has to wait for the reader, unless all three SDRAMs hold data
that is not yet read. In that case the capture FIFO absorbs the wait, and
`wait_cycles` counts the clocks spent waiting. Once that FIFO is full, samples
are dropped. `lost_cnt` counts them and `overrun` stays set until reset. So
"no word lost" is a claim you can check on the pins, not just an assumption.
The DSP sees the buffers in capture order. The last word of each buffer has
`dsp_last` set.

Only one main module writes at a time. A new writer starts only after the
previous one has moved its last word, so words leave the shared capture FIFO
strictly in order.

## Talking to the SDRAM controller (`main_module`)

This is the most delicate part of the design. The controller's local bus
works like this:

* The master raises `W_REQ` or `R_REQ` with `RADDR[30:0]` and
  `B_SIZE[3:0]`. `B_SIZE` can be 1 up to the programmed burst length BL.
  The master holds the request until `RW_ACK`.
* For a write, the controller raises `D_REQ` once per word, **one clock
  before** it needs that word on `DATAIN`. `W_VALID` is `D_REQ` delayed by
  one clock.
* For a read, `R_VALID` marks each word on `DATAOUT`, a few clocks later
  (set by the CAS latency and the controller's pipeline).

The main module has no way to pause a burst once the controller has
acknowledged it. So it only makes promises it can keep:

* **Write.** `inflight` counts the words of acknowledged bursts that are not
  yet transferred. A write burst of *n* words is requested only when the
  capture FIFO holds at least `inflight + n` words. Every `D_REQ` pops the
  FIFO head into the `DATAIN` register, so the word is there on the next
  clock, which is exactly when the controller takes it.
* **Read.** A read burst is requested only when the read FIFO has room for
  `inflight + n` words. Every `R_VALID` word goes straight into that FIFO.

A new request can be raised while the data of the previous burst is still
moving, so a controller that chains requests can keep the bus busy. `AUTO_PCH`
is held low, and the controller's bank management decides when to close rows.

`main_module` checks with assertions that a request stays stable until it is
acknowledged, that `R_REQ` and `W_REQ` are never high together, and that every
burst size is in 1..8.

### Address increment and burst cutting (`addr_incr`)

Each main module owns a counter that holds the address of the next burst.
Every acknowledged burst advances it by that burst's size. It clears to zero
when a new write or read starts, since each SDRAM buffer starts at address 0.
The counter also proposes the size of the next burst. This is the configured
size, cut down so that:

1. the burst does not run past the end of the buffer (for writes) or past
   the stored length (for reads), and
2. the burst does not cross a multiple of BL. An SDRAM burst wraps inside its
   BL-aligned block of columns, so a crossing burst would write the wrong
   columns.

With the default burst size of 8, every burst is a whole aligned block. The
address seen on the SDRAM pins then steps by 8 per burst. Odd sizes, such as
3, still work: the bursts are cut at every 8-word boundary.

## Capture path (`adc_capture`)

The ADC word, after the FPGA's LVDS receivers, is registered on every rising
edge. It is written into the 1024-word capture FIFO if `acq_en` and
`adc_valid` are both high. `adc_valid` is tied high when the ADC delivers a
sample on every clock. It can be driven from a data-ready signal when the
sample rate is below the system clock. Samples are zero-extended from 12 to
16 bits. The FIFO covers the clocks in which the SDRAM cannot take data:
refresh, row activation and the switch to the next SDRAM.

## Readout (`read_module`)

The read module selects the sink port of the main module that is currently
reading. It stores each word, with its end-of-buffer flag, in a 512-word FIFO.
The FIFO head is offered to the DSP as a valid/ready stream: a word moves on
every clock where `dsp_valid` and `dsp_ready` are both high. `words_out` counts
the words delivered.

## Configuration register (`config_reg`)

A host writes one field per address. Every field reads back. Each write is
clamped into the field's valid range. The timing and geometry fields go to
the SDRAM controllers on `sdr_cfg`. Together they select the speed grade and
the device size.

| addr | field | range | reset | meaning |
|---|---|---|---|---|
| 0 | RAS | 1–10 | 6 | tRAS, clocks |
| 1 | RCD | 2–5 | 3 | tRCD |
| 2 | RRD | 2–3 | 2 | tRRD |
| 3 | RP | 1–4 | 3 | tRP |
| 4 | RC | 3–12 | 9 | tRC |
| 5 | RFC | 2–14 | 9 | tRFC |
| 6 | MRD | 1–7 | 2 | tMRD |
| 7 | CL | 1–4 | 3 | CAS latency |
| 8 | BL | 0–3 | 3 | burst length 1/2/4/8 |
| 9 | WR | 1–3 | 2 | tWR |
| 10 | DELAY | 10–65535 | 26600 | power-up wait, clocks (200 µs at 133 MHz) |
| 11 | REF | 10–65535 | 1037 | refresh period, clocks (7.8 µs at 133 MHz) |
| 12 | COLBITS | 3–7 | 5 | 8–12 column bits (5 = 10) |
| 13 | ROWBITS | 0–3 | 2 | 11–14 row bits (2 = 13) |
| 14 | REGDIMM | 0–1 | 0 | registered DIMM timing |
| 15 | write burst size | 1–8 | 8 | words per write request |
| 16 | read burst size | 1–8 | 8 | words per read request |
| 17 | control | — | — | write bit 0 = 1: pulse `sd_init` (re-initialise SDRAMs) |

The reset values suit a 133 MHz, x16, 512 Mb part. The burst-size outputs are
also limited to BL, because the controller accepts `B_SIZE` only up to BL.

## Throughput and limits

* The capture side takes at most one sample per clock. One SDRAM is written at
  a time, so the sustained rate is bounded by one SDRAM's write throughput,
  minus refresh (about 9 clocks in every 1037 at the reset settings) and row
  changes. An ADC producing a sample on *every* clock forever therefore
  overflows the capture FIFO eventually (after roughly 10⁵ clocks). Rates up
  to about 95 % of the clock are sustainable with a controller that chains
  bursts. A 500 MSPS ADC has to be decimated or clocked down: an SDR SDRAM
  runs at roughly 100–166 MHz.
* A buffer holds 33,554,432 samples. At 133 MS/s, that gives the DSP about
  0.25 s of slack per buffer.
* `BUF_WORDS` must fit in 31 bits. `CAP_FIFO_DEPTH` and `RD_FIFO_DEPTH` must
  be powers of two.

## Where the design makes its own choices

The overall architecture comes from the description of this system. That
includes the ADC, the three main modules with one SDRAM controller each, a
controller over them, automatic address increment, a run-time configuration
register and slower readout to a DSP. So do the local-bus protocol and the
controller's parameter fields. The following are this design's own:

* the three-buffer rotation and its EMPTY/WRITING/FULL/READING bookkeeping;
* the two FIFOs and their depths (1024 and 512);
* the flow-control rule that only whole bursts are requested, and the
  flush with a short tail burst;
* cutting bursts at BL boundaries;
* the register map, reset values and clamping of `config_reg`. The
  controller fields are run-time registers here, while the stock core sets
  them when the core is generated;
* the `adc_valid` qualifier, zero-extension to 16 bits, the single clock
  domain, and the DSP valid/ready stream with `dsp_last`.

The RTL stops at the local bus. The SDRAM command pins (CS#, RAS#, CAS#, WE#,
CKE, DQM, BA, SA), initialisation and refresh belong to the controller core.
The LVDS input buffers belong to the FPGA's I/O.

## Verification

Each block has a self-checking testbench that prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it shows |
|---|---|
| `tb_addr_incr` | address and burst size against a reference model, over random sizes, BL codes and limits, including the end of a full-size device |
| `tb_config_reg` | reset values, read-back, range clamping, burst sizes limited to BL, `sd_init` pulse |
| `tb_adc_capture` | order, latency, `busy`, and exact loss count on overflow against a queue model |
| `tb_read_module` | port selection, order, last flag, free space and counter under random DSP stalls |
| `tb_main_ctrl` | rotation order, legal state changes, `rd_len`, flush, prompt starts, waiting for a free buffer |
| `tb_main_module` | full buffer with a cut last burst, flushed tail with size-5 bursts, read-back with size-3 bursts, refreshes in between, no protocol errors in the model; then, against a controller that chains requests, 203 words written in 203 consecutive clocks and read back in 203 consecutive clocks (full local-bus throughput) |
| `tb_das_top` | system at `BUF_WORDS`=300: lossless capture at about 80 % of the clock rate over six buffers with rotation wrap-around, then an overload in which all buffers fill and the loss counter must equal the gaps seen in the ramp at the DSP; counts refresh stalls, full-buffer switches, wrap-around, short tail bursts, chained bursts, reader held back by a full read FIFO and DSP back-pressure, and fails if any never happened |
| `tb_das_full` | default sizes: samples on nine clocks out of ten fill one whole 33,554,432-word SDRAM plus 1000 samples in the next one; both are read back and every word is checked (about 75 million clocks, under a minute in Verilator) |

The controller model in `tb/coresdr_model.sv` works at the level of the
local bus. It has a fixed acknowledge latency, the one-clock `D_REQ` lead,
a CAS latency and periodic refresh. It can chain a waiting request onto the
end of a burst, as the real core does for sequential accesses, or take
requests one at a time. It does not model the SDRAM pins or their timing.
Nothing here has been run against the real controller core or on
hardware.

To run a testbench with Verilator, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_das_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/das_pkg.sv tb/tb_das_top.sv
./obj_dir/Vtb_das_top
```

Replace `tb_das_top` with any other testbench name. Lint a module with
`verilator --lint-only -Wall -y rtl rtl/das_pkg.sv rtl/<module>.sv`.
