// send() execution unit of the Network Code Processor.
//
// send(channel, msg) transmits the message held in the send buffer as one
// Network Code frame on the 8-bit MAC interface: an 18-byte header
// (broadcast destination, this node's address, the Network Code EtherType,
// the channel and the payload length in words, see ncp_pkg) followed by the
// payload, four bytes per 32-bit word, most significant byte first.
//
// To let send() run next to the create() that fills the buffer, the unit
// first spends SETUP + HDR_CYCLES cycles on the header before it reads the
// FIFO; by then create(), which writes one word per cycle, is well ahead,
// and the byte-wide MAC side drains the FIFO four times slower than create()
// fills it. The header is emitted during the last HDR_BYTES cycles of that
// phase. A one-word prefetch register keeps the payload at exactly four
// cycles per word. If the FIFO is nevertheless empty, or the MAC deasserts
// tx_ready, the unit waits.
//
// Timing: with tx_ready high and the FIFO never empty, busy is high for
// exactly SETUP + HDR_CYCLES + 4*LEN cycles, LEN being the descriptor length.
// The defaults (5 and 30) reproduce the 547 cycles the document quotes for
// 128 words and its "about 30 cycles" of header construction. At the end the
// unit clears the send buffer descriptor (msg_done). The header layout and
// byte order are this design's choices.
module ncp_send_unit #(
  parameter int unsigned LW         = 16,
  parameter int unsigned CW         = 8,
  parameter int unsigned SETUP      = 5,
  parameter int unsigned HDR_CYCLES = 30
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [CW-1:0] channel,
  input  logic [47:0]   src_addr,
  output logic          busy,
  // send buffer
  input  logic [LW-1:0] msg_len,
  input  logic          fifo_empty,
  output logic          fifo_rd,
  input  logic [31:0]   fifo_rdata,
  input  logic          fifo_rvalid,
  output logic          msg_done,
  // MAC transmit byte stream
  output logic          tx_valid,
  output logic          tx_last,
  output logic [7:0]    tx_data,
  input  logic          tx_ready
);
  import ncp_pkg::*;

  localparam int unsigned PRE = SETUP + HDR_CYCLES - HDR_BYTES;  // idle cycles before the header bytes

  typedef enum logic [1:0] {S_IDLE, S_PRE, S_HDR, S_PAY} state_e;
  state_e        state;
  logic [7:0]    cnt;         // cycles in S_PRE, header byte index in S_HDR
  logic [CW-1:0] ch_q;
  logic [LW-1:0] len_q;
  logic [LW-1:0] popped;      // words requested from the FIFO
  logic [LW-1:0] sent;        // words fully transmitted
  logic [1:0]    byte_idx;
  logic [31:0]   cur_word, nxt_word;
  logic          cur_valid, nxt_valid, pop_pending;
  logic [7:0]    hdr_byte;

  always_comb begin
    case (cnt)
      8'd0, 8'd1, 8'd2, 8'd3, 8'd4, 8'd5: hdr_byte = 8'hFF;
      8'd6:  hdr_byte = src_addr[47:40];
      8'd7:  hdr_byte = src_addr[39:32];
      8'd8:  hdr_byte = src_addr[31:24];
      8'd9:  hdr_byte = src_addr[23:16];
      8'd10: hdr_byte = src_addr[15:8];
      8'd11: hdr_byte = src_addr[7:0];
      8'd12: hdr_byte = NC_ETHERTYPE[15:8];
      8'd13: hdr_byte = NC_ETHERTYPE[7:0];
      8'd14: hdr_byte = 8'(ch_q);
      8'd15: hdr_byte = 8'h00;
      8'd16: hdr_byte = 8'(len_q >> 8);
      default: hdr_byte = len_q[7:0];
    endcase
  end

  logic emit_hdr, emit_pay, word_done, consume_nxt;
  assign emit_hdr    = (state == S_HDR) && tx_ready;
  assign emit_pay    = (state == S_PAY) && cur_valid && tx_ready;
  assign word_done   = emit_pay && (byte_idx == 2'd3);
  logic hdr_end;
  assign hdr_end     = emit_hdr && (cnt == 8'(HDR_BYTES - 1));
  // the word in the prefetch register moves to the output register at the
  // end of the header or when the current word's last byte goes out
  assign consume_nxt = nxt_valid && (hdr_end || ((state == S_PAY) && (!cur_valid || word_done)));
  assign fifo_rd     = (state == S_HDR || state == S_PAY) && !pop_pending && !fifo_empty
                       && (popped != len_q) && (!nxt_valid || consume_nxt);

  assign busy     = (state != S_IDLE);
  assign tx_valid = (state == S_HDR) || ((state == S_PAY) && cur_valid);
  assign tx_data  = (state == S_HDR) ? hdr_byte : cur_word[31 - 8*byte_idx -: 8];
  assign tx_last  = ((state == S_HDR) && cnt == 8'(HDR_BYTES - 1) && len_q == '0)
                 || ((state == S_PAY) && cur_valid && byte_idx == 2'd3 && sent == len_q - 1'b1);
  assign msg_done = busy && tx_valid && tx_ready && tx_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      cnt         <= '0;
      ch_q        <= '0;
      len_q       <= '0;
      popped      <= '0;
      sent        <= '0;
      byte_idx    <= '0;
      cur_word    <= '0;
      nxt_word    <= '0;
      cur_valid   <= 1'b0;
      nxt_valid   <= 1'b0;
      pop_pending <= 1'b0;
    end else begin
      pop_pending <= fifo_rd;
      if (fifo_rd) popped <= popped + 1'b1;
      // prefetch register
      if (fifo_rvalid && pop_pending) begin
        nxt_word  <= fifo_rdata;
        nxt_valid <= 1'b1;
      end else if (consume_nxt) begin
        nxt_valid <= 1'b0;
      end
      if (consume_nxt) begin
        cur_word  <= nxt_word;
        cur_valid <= 1'b1;
      end else if (word_done) begin
        cur_valid <= 1'b0;
      end
      case (state)
        S_IDLE: if (start) begin
          ch_q      <= channel;
          len_q     <= msg_len;
          popped    <= '0;
          sent      <= '0;
          byte_idx  <= '0;
          cnt       <= 8'(PRE);
          state     <= (PRE > 0) ? S_PRE : S_HDR;
          if (PRE == 0) cnt <= '0;
        end
        S_PRE: begin
          cnt <= cnt - 1'b1;
          if (cnt == 8'd1) begin
            cnt   <= '0;
            state <= S_HDR;
          end
        end
        S_HDR: if (tx_ready) begin
          cnt <= cnt + 1'b1;
          if (cnt == 8'(HDR_BYTES - 1)) state <= (len_q == '0) ? S_IDLE : S_PAY;
        end
        S_PAY: begin
          if (emit_pay) byte_idx <= byte_idx + 1'b1;
          if (word_done) sent <= sent + 1'b1;
          if (word_done && sent == len_q - 1'b1) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
