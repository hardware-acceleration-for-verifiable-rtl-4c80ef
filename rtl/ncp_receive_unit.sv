// receive() execution unit of the Network Code Processor.
//
// receive(channel, var) copies the payload of the last frame received on a
// channel from that channel's byte-wide receive buffer into the variable
// memory, assembling four bytes (most significant first) into each 32-bit
// word and writing it over the internal memory bus. At most VLEN words are
// copied, so a frame longer than the variable cannot overrun it. The channel's
// "message received" flag is cleared when the copy ends (rx_consume). When the
// channel holds no unread message the variable is left unchanged.
//
// Timing: busy is high for exactly SETUP + 4*N cycles, N being the number of
// words copied. The default SETUP = 31 reproduces the 543 cycles the document
// quotes for 128 words; how those cycles are spent in the original is not
// described, here they are idle apart from the final write. The unit owns the
// memory bus for its whole busy time.
module ncp_receive_unit #(
  parameter int unsigned AW    = 12,
  parameter int unsigned LW    = 16,
  parameter int unsigned CW    = 2,
  parameter int unsigned BW    = 11,
  parameter int unsigned SETUP = 31
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [CW-1:0] channel,
  input  logic [AW-1:0] base,
  input  logic [LW-1:0] vlen,
  output logic          busy,
  // channel status from the frame receiver
  input  logic          msg_valid,  // flag of the selected channel
  input  logic [LW-1:0] msg_len,    // length in words of the selected channel
  output logic [CW-1:0] sel_ch,     // channel whose status/buffer is read
  output logic          rx_consume,
  // receive buffer read port
  output logic [BW-1:0] rbuf_addr,
  input  logic [7:0]    rbuf_rdata,
  // internal memory bus (write only)
  output logic          bus_req,
  output logic          bus_we,
  output logic [AW-1:0] bus_addr,
  output logic [31:0]   bus_wdata
);
  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_READ, S_LAST} state_e;
  state_e        state;
  logic [CW-1:0] ch_q;
  logic [AW-1:0] waddr;
  logic [LW-1:0] words;
  logic [LW+1:0] nbytes, bidx;  // bytes to copy, bytes requested
  logic [7:0]    setup_cnt;
  logic          rd_pending;
  logic [1:0]    asm_idx;
  logic [23:0]   asm_hi;
  logic          had_msg;

  assign busy      = (state != S_IDLE);
  assign bus_req   = busy;
  assign sel_ch    = (state == S_IDLE) ? channel : ch_q;
  assign rbuf_addr = BW'(bidx);

  // a word is complete when its fourth byte returns from the buffer
  assign bus_we    = rd_pending && (asm_idx == 2'd3);
  assign bus_addr  = waddr;
  assign bus_wdata = {asm_hi, rbuf_rdata};
  assign rx_consume = (state == S_LAST) && had_msg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      ch_q       <= '0;
      waddr      <= '0;
      words      <= '0;
      nbytes     <= '0;
      bidx       <= '0;
      setup_cnt  <= '0;
      rd_pending <= 1'b0;
      asm_idx    <= '0;
      asm_hi     <= '0;
      had_msg    <= 1'b0;
    end else begin
      rd_pending <= (state == S_READ);
      if (rd_pending) begin
        asm_idx <= asm_idx + 1'b1;
        case (asm_idx)
          2'd0: asm_hi[23:16] <= rbuf_rdata;
          2'd1: asm_hi[15:8]  <= rbuf_rdata;
          2'd2: asm_hi[7:0]   <= rbuf_rdata;
          default: waddr <= waddr + 1'b1;
        endcase
      end
      case (state)
        S_IDLE: if (start) begin
          ch_q      <= channel;
          waddr     <= base;
          had_msg   <= msg_valid;
          words     <= msg_valid ? ((msg_len < vlen) ? msg_len : vlen) : '0;
          bidx      <= '0;
          asm_idx   <= '0;
          setup_cnt <= 8'(SETUP - 1);
          state     <= S_SETUP;
        end
        S_SETUP: begin
          nbytes    <= {words, 2'b00};
          setup_cnt <= setup_cnt - 1'b1;
          if (setup_cnt == 8'd1) state <= (words == '0) ? S_LAST : S_READ;
        end
        S_READ: begin
          bidx <= bidx + 1'b1;
          if (bidx == nbytes - 1'b1) state <= S_LAST;
        end
        S_LAST: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
