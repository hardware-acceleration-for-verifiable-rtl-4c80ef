// Frame receiver of the Network Code Processor (receive side of the
// transceiver).
//
// Every frame from the MAC is examined as it arrives, one byte per valid
// cycle. Frames carrying the Network Code EtherType are guaranteed traffic:
// their payload goes into the receive buffer of the channel named in the
// header, and when the last byte arrives the channel's "message received"
// flag is set, its length recorded and rx_event pulses with the channel (for
// sync()). All other frames are best-effort traffic for the host: they are
// copied into the best-effort receive queue, and dropped there (discard) if
// they turn out to be Network Code frames or the queue fills up. This
// realises the separation of best-effort from guaranteed traffic.
//
// If a Network Code frame arrives on a channel whose previous message has not
// been read, the old one is overwritten and overrun pulses: the input queue
// overflowed. Frames for a channel number >= CHANNELS are dropped. Payload
// bytes beyond the buffer size are dropped too.
//
// Frame layout: see ncp_pkg (18-byte header, length in words in bytes
// 16..17). rx_consume (from receive()) clears a channel's flag. The header
// layout, channel count and overrun policy are this design's choices.
module ncp_rx_parser #(
  parameter int unsigned CHANNELS = 4,
  parameter int unsigned BYTES    = 2048,
  parameter int unsigned LW       = 16,
  parameter int unsigned CW       = (CHANNELS > 1) ? $clog2(CHANNELS) : 1,
  parameter int unsigned BW       = $clog2(BYTES)
) (
  input  logic                clk,
  input  logic                rst_n,
  // from the MAC
  input  logic                rx_valid,
  input  logic                rx_last,
  input  logic [7:0]          rx_data,
  // receive buffer write port
  output logic                buf_we,
  output logic [CW-1:0]       buf_ch,
  output logic [BW-1:0]       buf_addr,
  output logic [7:0]          buf_data,
  // channel status
  output logic [CHANNELS-1:0] rx_flags,
  output logic [LW-1:0]       rx_len [CHANNELS],
  input  logic                rx_consume,
  input  logic [CW-1:0]       rx_consume_ch,
  output logic                rx_event,
  output logic [CW-1:0]       rx_event_ch,
  output logic                overrun,
  // best-effort receive queue
  output logic                be_wr,
  output logic [7:0]          be_data,
  output logic                be_last,
  output logic                be_discard,
  input  logic                be_full,
  output logic                be_dropped
);
  import ncp_pkg::*;

  logic [15:0] idx;        // byte index within the frame (saturating)
  logic [15:0] etype;
  logic [7:0]  ch_byte;
  logic [15:0] len_q;
  logic        is_nc;      // valid from byte 14 on
  logic        be_drop;    // best-effort copy abandoned
  logic [15:0] pay_idx;

  assign pay_idx  = idx - 16'(HDR_BYTES);
  assign is_nc    = (etype == NC_ETHERTYPE);

  // best-effort path: copy until the frame is known to be Network Code
  logic nc_known;
  assign nc_known = (idx == 16'd13) && ({etype[7:0], rx_data} == NC_ETHERTYPE);
  always_comb begin
    be_wr      = 1'b0;
    be_discard = 1'b0;
    be_dropped = 1'b0;
    if (rx_valid && !be_drop) begin
      if (nc_known || (idx > 16'd13 && is_nc)) begin
        be_discard = 1'b1;
      end else if (be_full) begin
        be_discard = 1'b1;
        be_dropped = 1'b1;
      end else begin
        be_wr = 1'b1;
      end
    end
  end
  assign be_data = rx_data;
  assign be_last = rx_last;

  // guaranteed path
  logic ch_ok;
  assign ch_ok    = int'(ch_byte) < CHANNELS;
  assign buf_we   = rx_valid && is_nc && ch_ok && idx >= 16'(HDR_BYTES) && pay_idx < 16'(BYTES);
  assign buf_ch   = CW'(ch_byte);
  assign buf_addr = BW'(pay_idx);
  assign buf_data = rx_data;

  logic frame_done;
  assign frame_done  = rx_valid && rx_last && is_nc && ch_ok && idx >= 16'(HDR_BYTES - 1);
  assign rx_event    = frame_done;
  assign rx_event_ch = CW'(ch_byte);
  assign overrun     = frame_done && rx_flags[CW'(ch_byte)];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx      <= '0;
      etype    <= '0;
      ch_byte  <= '0;
      len_q    <= '0;
      be_drop  <= 1'b0;
      rx_flags <= '0;
      for (int i = 0; i < CHANNELS; i++) rx_len[i] <= '0;
    end else begin
      if (rx_consume) rx_flags[rx_consume_ch] <= 1'b0;
      if (rx_valid) begin
        case (idx)
          16'd12: etype[15:8] <= rx_data;
          16'd13: etype[7:0]  <= rx_data;
          16'd14: ch_byte     <= rx_data;
          16'd16: len_q[15:8] <= rx_data;
          16'd17: len_q[7:0]  <= rx_data;
          default: ;
        endcase
        if (be_discard) be_drop <= 1'b1;
        if (frame_done) begin
          rx_flags[CW'(ch_byte)] <= 1'b1;
          rx_len[CW'(ch_byte)]   <= (idx == 16'(HDR_BYTES - 1)) ? {len_q[15:8], rx_data} : len_q;
        end
        if (rx_last) begin
          idx     <= '0;
          etype   <= '0;
          ch_byte <= '0;
          be_drop <= 1'b0;
        end else if (idx != 16'hFFFF) begin
          idx <= idx + 1'b1;
        end
      end
    end
  end
endmodule
