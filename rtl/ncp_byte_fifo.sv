// Frame-granular byte FIFO for the best-effort queues.
//
// Best-effort traffic bypasses the Network Code program: frames from the host
// wait in a transmit queue until the run-time system is in soft mode, and
// received frames that are not Network Code frames wait in a receive queue for
// the host. Both queues are this FIFO. Each entry is a byte plus an
// end-of-frame flag. Writes are tentative until the last byte of a frame is
// written: only then does the frame become visible to the reader ("commit").
// A writer may instead drop the frame written so far ("discard"), which the
// frame receiver uses when a frame turns out to be Network Code traffic or the
// queue runs full. So the reader never sees a partial frame, and the
// transmit arbiter can start a frame knowing all of it is there.
//
// The read side is first-word-fall-through: rd_data/rd_last are valid while
// rd_valid is high, and rd_en takes the byte. The depth (2048 bytes) is this
// design's choice; the document gives no queue sizes.
module ncp_byte_fifo #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr_en,
  input  logic [7:0] wr_data,
  input  logic       wr_last,     // this byte ends the frame: commit it
  input  logic       wr_discard,  // drop the uncommitted part of the frame
  output logic       wr_full,
  output logic       rd_valid,
  output logic [7:0] rd_data,
  output logic       rd_last,
  input  logic       rd_en,
  output logic [AW:0] frames      // complete frames waiting
);
  logic [8:0] mem [DEPTH];
  logic [AW:0] wptr, cptr, rptr;   // write, committed-write and read pointers
  logic do_wr, do_rd;

  assign wr_full  = (wptr - rptr) == (AW+1)'(DEPTH);
  assign do_wr    = wr_en && !wr_full && !wr_discard;
  assign rd_valid = (cptr != rptr);
  assign do_rd    = rd_en && rd_valid;
  assign {rd_last, rd_data} = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= {wr_last, wr_data};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr   <= '0;
      cptr   <= '0;
      rptr   <= '0;
      frames <= '0;
    end else begin
      if (wr_discard) begin
        wptr <= cptr;
      end else if (do_wr) begin
        wptr <= wptr + 1'b1;
        if (wr_last) cptr <= wptr + 1'b1;
      end
      if (do_rd) rptr <= rptr + 1'b1;
      frames <= frames + (AW+1)'(do_wr && wr_last) - (AW+1)'(do_rd && rd_last);
    end
  end
endmodule
