// buffer_ctrl: buffer control unit of the multiplexer FPGA. It moves whole
// frame records from the channels' output buffers into the MUX FIFO, so that
// the records of all channels are multiplexed into one stream, watches the
// FIFO's fill level, raises the host interrupt when the FIFO is full, and
// serves the host's data, status and control registers.
//
// Arbitration: a channel requests when it is switched on and its output
// buffer holds at least one whole record (ch_ready, the boards' buffer state
// signals). In IDLE the unit grants the first requester after the channel
// served last (round robin), provided the FIFO has room for a whole record
// beyond any write still in flight; otherwise it waits (a stall). In XFER it
// pops FRAME_W consecutive words from that channel (ch_rd, one-hot, plus the
// channel number on cur_ch); each word returns on ch_data one clock later
// and is written to the FIFO in that clock. A record therefore takes
// FRAME_W + 1 clocks and is never split or interleaved with another.
//
// Host registers (see surv_pkg::buf_reg_e): reading REG_DATA pops the FIFO
// (fifo_rd; the word is on the FIFO output one clock later), STATUS, COUNT
// and FRAMES read back state, CONTROL holds transfer enable (bit 0, off after
// reset) and IRQ enable (bit 1). irq is a level: high while IRQ is enabled
// and the FIFO is full. FIFO_DEPTH must be a multiple of FRAME_W (checked at
// elaboration), so whole records fill the FIFO exactly and, as long as the
// host reads whole records, a full FIFO is
// the only state in which a waiting record cannot start; STATUS bit 2
// (stalled) reports that a record is waiting for room.
//
// The unit's three duties follow the source design; record-granular round
// robin, the register set and the level interrupt are this design's choices.
module buffer_ctrl
  import surv_pkg::*;
#(
  parameter int unsigned N_CH       = MAX_BOARDS * CH_PER_BOARD,
  parameter int unsigned FRAME_W    = FRAME_WORDS,
  parameter int unsigned FIFO_DEPTH = MUX_FIFO_DEPTH,
  localparam int unsigned CHW       = (N_CH > 1) ? $clog2(N_CH) : 1,
  localparam int unsigned CW        = $clog2(FIFO_DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // host side, from the address decoder
  input  logic              we,
  input  logic              re,
  input  logic [2:0]        reg_idx,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata,
  output logic              irq,
  // DSP boards
  input  logic [N_CH-1:0]   ch_ready,
  input  logic [N_CH-1:0]   ch_on,
  output logic [N_CH-1:0]   ch_rd,
  output logic [CHW-1:0]    cur_ch,
  input  logic [DATA_W-1:0] ch_data,
  // MUX FIFO
  output logic              fifo_wr,
  output logic [DATA_W-1:0] fifo_wdata,
  output logic              fifo_rd,
  input  logic [CW-1:0]     fifo_count,
  input  logic              fifo_empty,
  input  logic              fifo_full
);

  typedef enum logic {S_IDLE, S_XFER} state_e;

  state_e                       state_q;
  logic [CHW-1:0]               last_q;
  logic [$clog2(FRAME_W)-1:0]   word_q;
  logic                         rd_q;
  logic                         xfer_en_q, irq_en_q;
  logic [15:0]                  frames_q;
  logic [N_CH-1:0]              req;
  logic                         any_req, room, stalled;
  logic [CHW-1:0]               pick;

  assign req     = ch_ready & ch_on;
  assign any_req = |req;
  // Room for a whole record, counting a write still in flight.
  assign room    = (int'(fifo_count) + int'(rd_q) + FRAME_W) <= FIFO_DEPTH;
  // With the host reading whole records, a full FIFO is the only no-room state.
  assign stalled = xfer_en_q && any_req && fifo_full;

  if (FIFO_DEPTH % FRAME_W != 0) begin : g_bad_size
    $error("FIFO_DEPTH must be a multiple of FRAME_W");
  end

  // Round robin: first requester after the channel served last.
  always_comb begin
    int j;
    logic found;
    pick  = last_q;
    found = 1'b0;
    for (int k = 1; k <= N_CH; k++) begin
      j = int'(last_q) + k;
      if (j >= N_CH) j -= N_CH;
      if (!found && req[j]) begin
        found = 1'b1;
        pick  = CHW'(j);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      last_q    <= CHW'(N_CH - 1);
      cur_ch    <= '0;
      word_q    <= '0;
      rd_q      <= 1'b0;
      xfer_en_q <= 1'b0;
      irq_en_q  <= 1'b0;
      frames_q  <= '0;
    end else begin
      rd_q <= (state_q == S_XFER);
      case (state_q)
        S_IDLE: begin
          if (xfer_en_q && any_req && room) begin
            cur_ch   <= pick;
            word_q   <= '0;
            frames_q <= frames_q + 1'b1;
            state_q  <= S_XFER;
          end
        end
        S_XFER: begin
          if (word_q == ($clog2(FRAME_W))'(FRAME_W - 1)) begin
            last_q  <= cur_ch;
            state_q <= S_IDLE;
          end else begin
            word_q <= word_q + 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
      if (we && reg_idx == REG_CONTROL[2:0]) begin
        xfer_en_q <= wdata[0];
        irq_en_q  <= wdata[1];
      end
    end
  end

  always_comb begin
    ch_rd = '0;
    if (state_q == S_XFER) ch_rd[cur_ch] = 1'b1;
  end

  assign fifo_wr    = rd_q;
  assign fifo_wdata = ch_data;
  assign fifo_rd    = re && (reg_idx == REG_DATA[2:0]);
  assign irq        = irq_en_q && fifo_full;

  always_comb begin
    rdata = '0;
    case (reg_idx)
      REG_STATUS[2:0]:  rdata[3:0] = {irq, stalled, fifo_full, fifo_empty};
      REG_COUNT[2:0]:   rdata = DATA_W'(fifo_count);
      REG_CONTROL[2:0]: rdata[1:0] = {irq_en_q, xfer_en_q};
      REG_FRAMES[2:0]:  rdata = frames_q;
      default:          rdata = '0;
    endcase
  end

  a_no_fifo_overflow: assert property (@(posedge clk) disable iff (!rst_n) fifo_wr |-> !fifo_full);
  a_one_grant:        assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ch_rd));

endmodule
