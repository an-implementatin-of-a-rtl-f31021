# Multi-channel telephone speech recorder: board and multiplexer logic

This RTL is the digital glue of a call recorder for up to 64 telephone lines.
Each line has its own DSP. The DSP compresses the line's speech in real time to
8 kbit/s with the VSELP coder: one 160-bit frame every 20 ms. It puts a small
header in front of each frame: channel number, sequence number, date and time.
The frame records of all lines are merged into one stream in a FIFO, which a
host PC reads over its I/O bus. The PC sorts the records by channel and stores
them on disk.

The hardware splits into two halves:

* **The DSP boards.** There are up to eight boards with eight channels each.
  One channel has a hook-off detector, converter control, a 4 Kword input buffer
  from the converter to its DSP, and a 4 Kword output buffer from its DSP towards
  the multiplexer.
* **The multiplexer.** One FPGA holds an address decoder, a channel ON/OFF
  control unit and a buffer control unit. Next to it sits a 16 Kword FIFO. The
  buffer control unit collects the records from all 64 output buffers, fills the
  FIFO and interrupts the PC when the FIFO is full.

The block structure, the buffer sizes, the 8 kHz / 160-sample framing, the
160-bit frame layout and the 8 × 8 channel organisation follow the published
system. The system description gives what these blocks do but not how they are
built. Bus protocols, the record format, the register map, arbitration and
interrupt behaviour are this design's own choices; they are listed under
"Design choices" below.

The DSPs and their VSELP software are not part of this RTL. Neither are the
DSPs' memories, the analog front end (gain control, low-pass filter, 16-bit
converter) or the PC. Their signals are ports of the top level.

## How one call becomes records

1. **Hook-off.** The line interface gives a raw loop-current bit
   (`line_offhook`). `hookoff_detector` synchronises it and debounces it for
   10 ms. On an accepted hook-off it pulses `dsp_int` to the channel's DSP.
2. **Sampling.** The DSP raises `dsp_adc_en`. `adc_sampler` then strobes
   `adc_convert` every `CLK_HZ/8000` clocks. Each converted sample
   (`adc_valid`, `adc_data`) is written to the 4 Kword input buffer. After every
   160th sample (20 ms) it pulses `dsp_frame_tick`.
3. **Encoding** happens in the DSP, outside this RTL. The DSP reads 160 samples
   (`dsp_in_rd`; data one clock later on `dsp_in_data`). It writes one 16-word
   record into the 4 Kword output buffer (`dsp_out_wr`, `dsp_out_data`).
4. **Multiplexing.** When an output buffer holds at least one whole record, the
   channel's `buf_frame_ready` ("buffer state") goes high. The buffer control
   unit copies the record word by word into the 16 Kword MUX FIFO.
5. **Host.** The PC reads the FIFO through the data register. It finds record
   boundaries by counting 16 words, and the channel in the first word of each
   record.

If a channel is switched OFF in the ON/OFF control unit, three things happen:
its converter is held off, its hook-off interrupt is suppressed, and the buffer
control unit no longer serves it. Any complete records already in its output
buffer stay there until it is switched on again.

## Frame record

A record is 16 words of 16 bits: 6 header words, then 10 payload words.
`surv_pkg` defines both parts as packed structs.

| word | content |
|---|---|
| 0 | `8'hA5` sync, 2 reserved bits, 6-bit channel number |
| 1 | sequence number |
| 2 | year |
| 3 | month, day |
| 4 | hour, minute |
| 5 | second, hundredths |
| 6–15 | 160-bit VSELP frame (`vselp_frame_t`), most significant word first |

The VSELP frame layout per 20 ms is:

* 38 bits of LPC coefficients;
* 5 bits of frame energy;
* four 5 ms subframes of 29 bits each: a 7-bit pitch lag, two 7-bit codewords
  and 8 bits of gains;
* one unused bit.

The hardware never looks inside a record. Only `FRAME_WORDS = 16` matters to
it. The DSP software decides the header contents.

## The buffer control unit (`buffer_ctrl`)

This is the only part with non-trivial sequencing.

* **Requests.** Channel *i* requests when `ch_ready[i] & chan_on[i]` is true,
  that is, when its output buffer holds at least one whole record.
* **Grant (IDLE state).** If transfers are enabled, some channel requests and
  the FIFO has room for a whole record, the unit grants one channel. It picks the
  first requester after the channel it served last (round robin over all 64). A
  write still in flight counts against the room.
* **Transfer (XFER state).** For 16 clocks the unit asserts the one-hot
  `ch_rd[cur_ch]` ("buffer control signal"). Each popped word comes back one
  clock later on the board's data bus. `mux_system` selects the right board with
  a register, and the word is written into the FIFO in that clock. A record takes
  17 clocks. Records are never split or interleaved, which is what lets the host
  parse the stream.
* **Full FIFO.** The FIFO depth must be a multiple of the record length; this is
  checked at elaboration. Whole records therefore fill the FIFO exactly. When it
  is full, `irq` goes high (if enabled) and stays high until the host has read a
  word. A channel that requests while the FIFO is full waits: this is the stall.
  The STATUS register reports it, and its records stay in its 4 Kword output
  buffer.

Throughput: one record per 17 clocks. At 50 MHz that is about 2.9 M words/s.
64 channels produce 51,200 words/s. A full 16 Kword FIFO holds 16 frame periods
(320 ms) of all 64 channels, which is the host's latency budget.

## Host interface

The host bus is synchronous. `pc_wr` and `pc_rd` are one-clock strobes, and
`pc_rdata` is valid the clock after `pc_rd`. The registers sit in a 32-byte
window at `BASE_ADDR` (default `0x300`). All registers are 16 bits wide at even
addresses.

| offset | R/W | register |
|---|---|---|
| 0x00 | R | DATA: pops one word from the MUX FIFO |
| 0x02 | R | STATUS: bit 0 empty, bit 1 full, bit 2 stalled, bit 3 irq |
| 0x04 | R | COUNT: FIFO fill level in words |
| 0x06 | RW | CONTROL: bit 0 transfer enable, bit 1 interrupt enable (both 0 after reset) |
| 0x08 | R | FRAMES: records moved into the FIFO, mod 2^16 |
| 0x10 + 2·b | RW | ON/OFF mask of board b, bit i = channel 8·b+i (all off after reset) |

`mux_addr_decoder` sends offsets 0x00–0x0E to the buffer control unit and
0x10–0x1E to the ON/OFF control unit. Reads outside the window return `0xFFFF`.

A host driver works like this:

1. Write the masks.
2. Write CONTROL = 3.
3. On each interrupt, read COUNT and then read COUNT/16 whole records from DATA.

## Timing summary

| path | latency |
|---|---|
| line settles → `offhook` / `dsp_int` | 2 + `DEBOUNCE_MS·CLK_HZ/1000` clocks |
| conversion strobes | every `CLK_HZ/8000` clocks while enabled |
| `dsp_frame_tick` | with the write of every 160th sample |
| FIFO read (all buffers) | data one clock after the read strobe |
| record transfer | 1 arbitration clock + 16 word clocks |
| host read | `pc_rdata` one clock after `pc_rd` |

## Modules

| module | role |
|---|---|
| `surv_pkg` | constants, record and VSELP frame types, register enum |
| `sync_fifo` | single-clock FIFO (memory array); 4 K and 16 K instances |
| `hookoff_detector` | synchroniser, debounce, hook-off interrupt |
| `adc_sampler` | 8 kHz conversion strobes, sample capture, frame tick |
| `channel_module` | one channel: the two blocks above plus input and output buffers |
| `dsp_board` | eight channels and the board's shared data bus |
| `mux_addr_decoder` | host address window and unit select |
| `channel_onoff_ctrl` | per-board ON/OFF mask registers |
| `buffer_ctrl` | arbitration, record transfer, interrupt, buffer registers |
| `mux_system` | decoder, ON/OFF, buffer control and the 16 K FIFO; host read mux |
| `surveillance_top` | `N_BOARDS` boards and the multiplexer |

Top-level parameters and their defaults:

| parameter | default | from |
|---|---|---|
| `N_BOARDS` | 8 | published system (8 to 64 channels in steps of 8) |
| `CH_DEPTH` | 4096 | published system |
| `MUX_DEPTH` | 16384 | published system |
| `CLK_HZ` | 50 MHz | own choice: the clock of a 25 MIPS TMS320C31 |
| `DEBOUNCE_MS` | 10 | own choice |
| `BASE_ADDR` | 0x300 | own choice |

At the defaults the design holds about 8.6 Mbit of buffer memory:

* 64 × 2 × 4 K × 16 bits in the channel buffers;
* 16 K × 16 bits in the MUX FIFO.

## Design choices

Beyond what the published system states, the following are this design's own:

* **One clock for everything** (50 MHz by default). In the original system the
  DSPs, the FPGA and the PC bus are separate parts.
* **FIFOs are on-chip memory arrays** rather than FIFO chips. They are 16 bits
  wide, with sticky overflow and underflow flags.
* **Board data bus.** Each board has a shared 16-bit output bus with a
  registered select. It stands in for a tri-state board bus.
* **ON/OFF control is per channel**, one bit each, not per board. What OFF does
  (see above) is an interpretation.
* **Record-granular transfers** with round-robin arbitration, a level interrupt
  on FIFO full, and the register map above.
* **Hook-off detection** uses a two-flop synchroniser, a 10 ms debounce and a
  one-clock interrupt pulse. Only hook-off interrupts; hang-up is visible on
  `dsp_offhook`.
* **Converter handshake.** The controller sends a start strobe and the converter
  answers with a valid pulse; `dsp_frame_tick` tells the DSP a frame is ready.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. Testbench-only models:

* `dsp_model` plays one channel's DSP. Its "encoder" is a stand-in: payload word
  k is the sum of samples 16k..16k+15. It checks that samples arrive in order.
* `adc_model` answers conversion strobes with `{channel, count}` samples.

There are two system-level testbenches:

* **`tb_surveillance_top`: 64 channels at reduced scale.** It uses a 400 kHz
  clock, 1 Kword channel buffers and a 512-word MUX FIFO. The host drains the
  FIFO only on interrupt. The run includes calls on all lines, one channel
  switched OFF from the start, one switched off mid-call, and hang-ups. Every
  received record is compared with what the DSP models wrote. The run counts
  hook-off interrupts, frame ticks, channel switches in the stream, full
  interrupts and stalls, and fails if any of them never occurs.
* **`tb_surveillance_full`: every parameter at its default.** All 64 channels
  each record two 20 ms frames: about 3.2 M clocks, roughly 25 s with Verilator.
* **`tb_workload_fifo_full`: the full-size FIFO budget.** All 64 channels at the
  defaults are in a call for 340 ms. The host reads only on the full interrupt
  and answers it 20 ms late. The 16 Kword FIFO fills after 16 frame periods.
  The test checks that the interrupt fires, that records wait (a stall) and that
  every record still arrives intact. It simulates about 18 M clocks, roughly
  2 minutes.

To build and run one with Verilator 5 from the directory holding `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/surv_pkg.sv tb/tb_surveillance_top.sv --top-module tb_surveillance_top
./obj_dir/Vtb_surveillance_top
```

Replace the testbench name to run any other. All testbenches except
`tb_workload_fifo_full` finish in well under a minute.
