// surv_pkg: shared constants and types of the multi-channel speech recorder.
//
// The recorder digitises up to 64 telephone lines at 8 kHz, has one DSP per
// line compress each 20 ms frame (160 samples) to a 160-bit VSELP frame, and
// multiplexes the compressed frames of all lines into one FIFO that a host PC
// drains over its I/O bus.
//
// From the source design: 16-bit samples, 160 samples per 20 ms frame, 4 Kword
// per-channel buffers, 16 Kword multiplexer buffer, 8 boards of 8 channels and
// the 160-bit VSELP bit allocation (vselp_frame_t). This design's own choices:
// the 16-word frame record (6 header words + 10 payload words), the header
// layout and the host register map.
package surv_pkg;

  localparam int unsigned DATA_W          = 16;     // sample / bus word width
  localparam int unsigned CH_PER_BOARD    = 8;      // channels on one DSP board
  localparam int unsigned MAX_BOARDS      = 8;      // boards one MUX system serves
  localparam int unsigned SAMPLE_HZ       = 8000;   // 160 samples per 20 ms
  localparam int unsigned FRAME_SAMPLES   = 160;    // samples per 20 ms frame
  localparam int unsigned CH_FIFO_DEPTH   = 4096;   // 4 Kword input/output buffers
  localparam int unsigned MUX_FIFO_DEPTH  = 16384;  // 16 Kword MUX buffer
  localparam int unsigned HDR_WORDS       = 6;      // header words per frame record
  localparam int unsigned PAYLOAD_WORDS   = 10;     // 160 bits of VSELP data
  localparam int unsigned FRAME_WORDS     = HDR_WORDS + PAYLOAD_WORDS;
  localparam logic [7:0]  FRAME_SYNC      = 8'hA5;  // first byte of every record

  // One 5 ms subframe of the 8 kbit/s VSELP frame: 7-bit pitch lag, two
  // 7-bit codebook codewords and 8 bits of gains (29 bits).
  typedef struct packed {
    logic [6:0]  lag;
    logic [13:0] codewords;
    logic [7:0]  gains;
  } vselp_subframe_t;

  // A 20 ms VSELP frame: 38 bits of LPC coefficients, 5 bits of frame
  // energy, four subframes and one unused bit: 160 bits, 10 bus words.
  typedef struct packed {
    logic [37:0]                 lpc;
    logic [4:0]                  energy;
    vselp_subframe_t [3:0]       sf;
    logic                        unused;
  } vselp_frame_t;

  // Header the channel's DSP puts ahead of each frame: sync byte and
  // channel number, frame sequence number, calling date and time.
  typedef struct packed {
    logic [7:0]  sync;
    logic [1:0]  rsvd;
    logic [5:0]  channel;
    logic [15:0] seq;
    logic [15:0] year;
    logic [7:0]  month;
    logic [7:0]  day;
    logic [7:0]  hour;
    logic [7:0]  minute;
    logic [7:0]  second;
    logic [7:0]  hundredths;
  } frame_header_t;

  // Host register map, byte offsets inside the board's 32-byte I/O window.
  // Offsets 0x00..0x0E belong to the buffer control unit, 0x10..0x1E to the
  // channel ON/OFF control unit (one register per board).
  typedef enum logic [3:0] {
    REG_DATA    = 4'd0,   // 0x00 R : pop one word from the MUX FIFO
    REG_STATUS  = 4'd1,   // 0x02 R : {irq, stalled, full, empty}
    REG_COUNT   = 4'd2,   // 0x04 R : MUX FIFO fill level in words
    REG_CONTROL = 4'd3,   // 0x06 RW: bit0 transfer enable, bit1 IRQ enable
    REG_FRAMES  = 4'd4    // 0x08 R : frames moved into the MUX FIFO (mod 2^16)
  } buf_reg_e;

  localparam int unsigned HOST_ADDR_W = 10;  // ISA-style I/O address width

endpackage
