# Bunch-by-bunch feedback ADC/DAC boards: FPGA firmware in SystemVerilog

In a storage ring with bunches 2 ns apart, a multi-bunch feedback measures
every bunch's position on every turn and kicks each bunch back. The position
signal is digitised at 500 MS/s with 8 bits. No single processor can follow
that rate, so the stream is split over several DSP boards. Their correction
kicks are merged back into one 500 MS/s stream for the DAC that drives the
kicker. Every nanosecond in this chain costs feedback efficiency.

This RTL implements the digital part of the two converter boards that sit
around the DSPs. It follows the ADC/DAC board family built for the
ELETTRA/SLS multi-bunch feedback:

```
            ADC board                                            DAC board
 adc_d  +-----------------------+   +-----------+         +-----------+   +-------------------------+
 8 bit  | DDR capture, 1:4 demux|   | FPDP board|  N x 32 | FPDP board|   | redirector -> FIFO ->   |  dac_d
 ------>| Gray->binary          |-->| 1:N demux |-------->| N:1 mux   |-->| 4:1 mux (START_DAC)     |------>
 500MS/s| 2-way redirector, ZBT |   | (N<=12)   |  DSPs   |           |   | ZBT record / playback   | 2x8 bit
        | ring memory, VME      |   +-----------+ (not    +-----------+   | VME                     | @250MHz
        +-----------------------+                 built)                  +-------------------------+
```

Each board has a main-board FPGA (`adc_main_fpga`, `dac_main_fpga`) and an
FPDP connector board with its own FPGA (`fpdp_demux`, `fpdp_mux`). FPDP is
the Front Panel Data Port, ANSI/VITA 17. `mbf_top` holds both boards side by
side. The DSP boards are outside the design: the ADC's FPDP ports and the
DAC's FPDP ports are ports of `mbf_top`.

## Rates and word format

| point in the chain | width | rate |
|---|---|---|
| ADC mezzanine to FPGA | 8 bit, one sample per clk250 edge (DDR) | 500 MS/s |
| inside both FPGAs, main board to FPDP board, ZBT RAM | 32 bit word = 4 samples | 125 MHz |
| each FPDP port, ratio N | 32 bit | 125/N MWords/s (20.8 at N = 6) |
| FPGA to DAC mezzanine | 16 bit = 2 samples | 250 MHz |

Inside a word, the oldest sample is in bits 7:0 and the newest in bits 31:24.
The same order holds on the 16 bit DAC bus, with the earlier sample in bits
7:0. The ADC delivers Gray code. Everything after `gray2bin` is binary, as
the ADC produced it. The DAC receives the DSPs' words unchanged.

The FPDP split is round-robin over words. After a start trigger, word 0 goes
to port 0, word 1 to port 1, and so on; word N goes to port 0 again. With
ratio 6, DSP board k therefore sees bunches 4k..4k+3, 24+4k..24+4k+3, and so
on. The DAC side undoes this. It takes one word from port 0, then one from
port 1, up to port N-1, and starts again at port 0. It waits for the port
whose turn it is, so a slow DSP delays the stream but never reorders it. The
ratio can be programmed from 1 to 12.

## Two clocks and how they meet

This is the least obvious part of the design. The FPGAs use two clocks:

* `clk250` for the converter interfaces;
* `clk125` for everything else.

`clk125` must come from the same source as `clk250`, with aligned rising
edges (for example from the DCM's divide output). Nothing in the RTL
generates it.

A block that works in both domains (`adc_demux_1to4`, `dac_mux_4to1`) must
know which `clk250` rising edge coincides with a `clk125` edge. It finds out
with a toggle flop:

* `t125` toggles on every `clk125` edge;
* the `clk250` side samples `t125` into `t125_s` on every edge;
* `t125 ^ t125_s` is high exactly on the `clk250` edge that falls between
  two `clk125` edges (the "mid edge").

This works because a flop and its reader on a coinciding edge see the old
value. No reset ordering is needed, and the result never depends on which
clock starts first.

* **ADC side.** Rising- and falling-edge samples become a pair on every
  `clk250` rising edge. On each mid edge, the last two pairs become a word.
  The word then stays unchanged for a whole 125 MHz period centred on the
  next `clk125` edge. Both neighbouring edges are 4 ns away, so the
  `clk125` logic (the Gray decoder register) can take it directly.
* **DAC side.** A word registered at a `clk125` edge is read on the next mid
  edge. Its low pair goes out at once and its high pair one `clk250` cycle
  later.

## ADC board (`adc_main_fpga` + `fpdp_demux`)

1. `adc_demux_1to4`: DDR capture and 1:4 demultiplexing, as above.
2. `gray2bin`: converts each lane from Gray code to binary. It is the one
   register stage in the `clk125` domain.
3. `data_redirector`: combinational routing, controlled by CTRL bits.
   * `fwd_en` sends the stream to the FPDP board.
   * `ram_wr_en` sends it to the ZBT ring memory.
   * `fwd_src_ram` makes the FPDP board receive RAM playback instead of live
     data. This is how data written over VME becomes a test stream at the
     FPDP ports.
4. `zbt_ctrl`: drives the ZBT SRAM (see below).
5. `trigger_in`: takes a software trigger (TRIG register bit 0) or a rising
   edge on the external trigger line. The external line passes a two-flop
   synchroniser. One trigger does two things: it starts the FPDP stream at
   port 0 with SYNC, and it stops the ring memory after POST_TRIG more words.
6. `vme_slave`: registers and the memory window.
7. `fpdp_demux`: on the FPDP board. Per port it drives:
   * `p_data`, held until the port's next word;
   * `p_strobe`, a one-clock pulse when the data changes;
   * `p_dvalid`, high on the active ports while the stream runs;
   * `p_sync`, high with the first word after the start trigger.

   All four are synchronous to `clk125`. Turning `p_strobe` into an
   FPDP-TTL STROBE edge belongs to the board's output drivers, which are not
   part of this RTL.

## DAC board (`fpdp_mux` + `dac_main_fpga`)

* `fpdp_mux` (FPDP board): each port's DVALID pushes a word into a 4-deep
  per-port FIFO, and the round-robin sequencer drains the FIFOs. `overflow`
  means that a port got more than four words ahead of its turn. The
  sequence restarts at port 0 when the DAC board is enabled (CTRL.enable
  going from 0 to 1), so enable the DAC board before starting the ADC
  stream.
* `data_redirector`: the same module as on the ADC board. Live FPDP words
  can go to the FIFO, to the ring memory, or both. The FIFO can instead be
  fed by RAM playback. Playback is paced by the FIFO's fill level and
  pauses 8 words before full.
* `sync_fifo`: 512 words, first-word-fall-through. It buffers the stream
  until START_DAC.
* `dac_mux_4to1`: START_DAC (external edge or TRIG bit 0) starts it. It then
  pops one word per `clk125` cycle. If the FIFO is empty, it sends mid-scale
  (`IDLE_CODE` = 80h) and sets the sticky `underflow` flag. Clearing
  CTRL.enable stops it and flushes the FIFO.

## ZBT memory controller (`zbt_ctrl`)

The memory is 8 MByte of pipelined ZBT SRAM: 2^21 words of 32 bits, one
access per `clk125` cycle. The address and write enable are driven in cycle
n. Write data is driven, or read data captured, in cycle n+2. All pins are
registered. The controller has three users:

* **Ring recording.** Writing 1 to TRIG bit 1 arms the ring at address 0.
  Every word the redirector sends is stored at the next address, wrapping
  at the end. A trigger saves the current address in TRIG_ADDR. POST_TRIG
  more words are stored, then recording stops and STATUS.done is set. The
  memory now holds the history before the trigger and POST_TRIG words after
  it.
* **Playback.** While CTRL.enable and CTRL.fwd_src_ram are set, words 0 to
  PLAY_LEN-1 are read in an endless loop. PLAY_LEN = 0 means the whole
  memory. Read data arrives four clocks after the read is issued. Playback
  does not restart at word 0 on a trigger, so the first word on the FPDP
  ports can be any word of the loop.
* **VME.** Single words, served only while neither recording nor playback
  runs. Otherwise the VME cycle waits, with DTACK* held off.

## VME interface (`vme_slave`)

The slave answers A32/D32 single cycles with AM 09h or 0Dh.

* **Board window.** A31..A24 select the board. The compare value is either
  `{000, GA4..GA0}` (geographic address, `ga_sel = 1`) or an 8-bit switch.
* **Inside the window.** A23 = 0 reaches the RAM: A22..A2 is the word
  address. A23 = 1 reaches the registers: A7..A2 is the register index.
* **Synchronisation.** The strobes pass two-flop synchronisers. DTACK* comes
  about four clocks after DS* for a register and about eight for a memory
  read.

| index (offset) | name | access | meaning |
|---|---|---|---|
| 0 (80_0000h) | CTRL | rw | bit0 enable, bit1 fwd_en, bit2 ram_wr_en, bit3 fwd_src_ram |
| 1 (80_0004h) | TRIG | w | bit0 software trigger (start ADC / START_DAC), bit1 arm ring |
| 2 (80_0008h) | RATIO | rw | FPDP ratio 1..12, reset value 6 |
| 3 (80_000Ch) | POST_TRIG | rw | words recorded after a trigger |
| 4 (80_0010h) | PLAY_LEN | rw | playback loop length, 0 = whole memory |
| 5 (80_0014h) | TRIG_ADDR | r | ring address of the trigger |
| 6 (80_0018h) | STATUS | r | bit0 recording, bit1 done, bit2 playing, bit3 overflow, bit4 underflow |
| 7 (80_001Ch) | ID | r | 4D42_4641h (ADC board), 4D42_4644h (DAC board) |

In `mbf_top` both boards share one bus. DTACK* is wired-AND, and read data
comes from whichever board enables its drivers. Each board needs its own
window (different geographic address or switch).

## Latency

The boards are specified at 88 ns combined, ADC and DAC together, including
the converters. The digital path here takes 60 ns (15 `clk250` cycles),
measured from the capture of an ADC sample to the same sample on `dac_d`,
with the FPDP ports looped back without delay:

| stage | ns |
|---|---|
| DDR capture and 1:4 demux, to the `clk125` edge that takes the word's oldest sample | 16 |
| Gray register → FPDP port register | 8 |
| FPDP mux: port FIFO + output register | 16 |
| DAC FIFO (write → head) + mux word register | 16 |
| mid edge → `dac_d` | 4 |

Each clock the DSPs spend adds 8 ns. The end-to-end testbench uses a
one-clock DSP stand-in and measures 68 ns. The DAC must have been started
before the data arrives. Otherwise the FIFO holds words and adds 8 ns per
word it holds.

## Parameters

| module | parameter | default | note |
|---|---|---|---|
| `mbf_pkg` | `SAMPLE_W`, `LANES` | 8, 4 | converter resolution, samples per word |
| `mbf_top` | `NPORTS` | 12 | FPDP ports per board |
| `mbf_top`, `zbt_ctrl`, `vme_slave` | `ADDR_W` | 21 | 8 MByte; 19 to 22 cover the 2 to 16 MByte variants |
| `mbf_top`, `dac_main_fpga` | `FIFO_DEPTH` | 512 | one Virtex II block RAM |
| `fpdp_mux` | `PORT_DEPTH` | 4 | per-port skew buffer |
| `dac_mux_4to1` | `IDLE_CODE` | 80h | DAC code sent when there is no data |
| `trigger_in` | `SYNC_STAGES` | 2 | external trigger synchroniser |

## What follows the original boards and what is this design's choice

**Taken from the board description:**
* 8-bit samples at 500 MS/s, captured with 250 MHz DDR clocking;
* 1:4 demultiplexing to 32 bits at 125 MHz;
* Gray-to-binary decoding;
* the two-way redirector and its routes;
* 8 MByte of ZBT RAM used as a ring memory, with VME write access and
  playback;
* the FPDP split and merge with a ratio of up to 12;
* DVALID-triggered input on the DAC;
* the FIFO, and its launch by a START_DAC trigger;
* software or external triggers;
* VME A32/D32 with a geographic or switch base address;
* 16 bits at 250 MHz to the DAC mezzanine.

**This design's own choices:**
* the sample order inside a word;
* the clock relation and the phase detector;
* the round-robin word split (the description gives only the rates);
* the FPDP port signalling;
* the per-port FIFOs and the wait-for-turn rule;
* all trigger semantics: ring stop after POST_TRIG words, FPDP start, edge
  detection;
* the ZBT pipeline timing and the arbitration;
* the FIFO depth and the underflow/overflow behaviour;
* the mid-scale idle code;
* the whole register map, the window layout and the board IDs.

**Not built:**
* the converter mezzanines;
* the programmable clock delay (more than 2 ns range, steps under 100 ps) and
  the clock distribution;
* the trigger generator;
* the DSP boards and their software;
* the control lines from the FPGA to the mezzanines;
* the LVDS/TTL pad primitives;
* the VME64x configuration ROM/CSR space and VME block transfers. The boards
  claim VME64x compatibility, but nothing about these is specified here, so
  the slave is A32/D32 only.

## Simulation

All files are plain SystemVerilog 2017. Testbenches need `--timing`, and
they use `$urandom`, never constrained randomisation. Use a 1 ns time unit,
since the testbenches contain fractional delays. To run one with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
          rtl/mbf_pkg.sv tb/tb_mbf_top.sv --top-module tb_mbf_top -o sim
./obj_dir/sim
```

Every testbench ends by printing `TB_RESULT checks=N failures=M` and has a
watchdog.

| testbench | what it shows |
|---|---|
| `tb_mbf_top` | both boards at default sizes. Live feedback at ratio 6: every DAC sample matches the ADC sample, latency exactly 68 ns, ring memory read back. Then playback from the ADC memory through 12 ports to the DAC. Each mechanism is counted: triggers, SYNC, ring stop, underflow, overflow, playback, use of all ports. Runs in a few seconds. |
| `tb_beam_workload` | bunch-by-bunch readout through the ADC board at ratio 6 for a 480-bucket ring (960 ns turn) and a 432-bucket ring. A coupled-bunch oscillation is generated (tune 0.17), the turn-by-bunch matrix is rebuilt from the six ports and compared entry by entry. Also checks H/24 words per DSP per turn and one turn of ring memory around the trigger. |
| `tb_adc_main_fpga` | FPDP stream equals decoded samples, 16 ns latency; software and external trigger; ring memory contents around the trigger; playback loop |
| `tb_dac_main_fpga` | buffering before START_DAC, in-order DAC samples, recording of FPDP input, underflow, overflow, playback to the DAC |
| `tb_adc_demux_1to4`, `tb_dac_mux_4to1` | sample order and timing across the two clocks |
| `tb_fpdp_demux`, `tb_fpdp_mux` | every ratio 1..12, random gaps and port skew, SYNC/DVALID, overflow |
| `tb_zbt_ctrl` | VME read-back, ring wrap with trigger and post-trigger count (word by word), playback with back-pressure, 4-clock read latency |
| `tb_vme_slave` | registers, pulses, RAM window, base address by switch and by geographic address, no DTACK* for foreign addresses or AMs |
| `tb_gray2bin`, `tb_sync_fifo`, `tb_data_redirector`, `tb_trigger_in` | the small blocks against independent models |

`tb/zbt_sram_model.sv` is a behavioural model of the pipelined ZBT SRAM,
backed by a sparse array. `tb/vme_master.svh` holds the VME master tasks.
