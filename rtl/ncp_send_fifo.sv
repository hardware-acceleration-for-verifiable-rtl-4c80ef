// Send buffer of the Network Code Processor.
//
// The processor has exactly one send buffer. It is a FIFO of 32-bit words
// between the create() unit, which fills it from the variable memory, and the
// send() unit, which drains it towards the MAC. Because it is a FIFO, send()
// can start while create() is still filling it, which is how the frequent pair
// "create(); send();" overlaps. Besides the data, the buffer keeps a message
// descriptor: whether a message is present and its length in words. create()
// sets it when it starts, send() clears it when the frame is out, destroy()
// clears it and empties the FIFO. The if(SendBufferEmpty) guard reads it.
// The dependence table lets a create() start while the previous send() is
// still draining the buffer, so the descriptor counts messages (up to 3)
// rather than holding a single flag; msg_len is that of the latest create().
//
// Reads are synchronous: rd_en in one cycle gives rdata/rvalid in the next.
// Pushing into a full FIFO or popping an empty one is ignored (a verified
// program never does either). The FIFO depth (512 words, one maximal Ethernet
// payload) is this design's choice.
module ncp_send_fifo #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned AW    = $clog2(DEPTH),
  parameter int unsigned LW    = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  // data
  input  logic          wr_en,
  input  logic [31:0]   wdata,
  input  logic          rd_en,
  output logic [31:0]   rdata,
  output logic          rvalid,
  output logic          empty,
  output logic          full,
  output logic [AW:0]   count,
  // message descriptor
  input  logic          msg_set,
  input  logic [LW-1:0] msg_set_len,
  input  logic          msg_clear,   // send() finished
  input  logic          flush,       // destroy(): drop data and descriptor
  output logic          msg_present,
  output logic [LW-1:0] msg_len
);
  logic [31:0] mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic do_wr, do_rd;
  logic [1:0] msg_count;   // messages created and not yet sent

  assign msg_present = (msg_count != 2'd0);

  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign do_wr = wr_en && !full && !flush;
  assign do_rd = rd_en && !empty && !flush;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wdata;
    if (do_rd) rdata <= mem[rptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr        <= '0;
      rptr        <= '0;
      count       <= '0;
      rvalid      <= 1'b0;
      msg_count   <= '0;
      msg_len     <= '0;
    end else begin
      rvalid <= do_rd;
      if (flush) begin
        wptr  <= '0;
        rptr  <= '0;
        count <= '0;
      end else begin
        if (do_wr) wptr <= wptr + 1'b1;
        if (do_rd) rptr <= rptr + 1'b1;
        count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
      end
      if (flush) begin
        msg_count <= '0;
      end else begin
        msg_count <= msg_count + 2'(msg_set && msg_count != 2'd3) - 2'(msg_clear && msg_count != 2'd0);
      end
      if (msg_set && !flush) msg_len <= msg_set_len;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> !full || flush)
    else $error("send buffer overflow");
endmodule
