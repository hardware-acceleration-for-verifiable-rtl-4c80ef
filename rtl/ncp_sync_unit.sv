// sync() execution unit of the Network Code Processor.
//
// sync(channel, timeout) synchronises distributed nodes: the program must not
// continue until either a synchronisation packet arrives on the channel or
// the timeout expires. Here a synchronisation packet is any Network Code
// frame completed on that channel after sync() started (rx_event/rx_event_ch
// from the frame receiver); the timeout counts time-base ticks (time units of
// the future() instruction). On arrival the unit sets the status bit that the
// if(StatusTest) guard reads and pulses realign, which restarts the current
// time unit of the local time base, so that the node's slots line up with the
// sender's; on timeout it clears the status bit.
//
// Timing: busy from the cycle after start until the cycle in which the packet
// or the last timeout tick is seen. A timeout of 0 ends after one cycle with
// the status cleared. What sync frames look like and how the time base is
// corrected are this design's choices; the document only states the wait.
module ncp_sync_unit #(
  parameter int unsigned CW = 2,
  parameter int unsigned TW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [CW-1:0] channel,
  input  logic [TW-1:0] timeout,
  input  logic          tick,
  input  logic          rx_event,
  input  logic [CW-1:0] rx_event_ch,
  output logic          busy,
  output logic          status_ok,
  output logic          realign,
  output logic          timed_out    // pulse: sync() ended by timeout
);
  logic [CW-1:0] ch_q;
  logic [TW-1:0] left;
  logic          hit, expire;

  assign hit     = busy && rx_event && (rx_event_ch == ch_q);
  assign expire  = busy && !hit && ((left == '0) || (tick && left == TW'(1)));
  assign realign = hit;
  assign timed_out = expire;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      ch_q      <= '0;
      left      <= '0;
      status_ok <= 1'b0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        ch_q <= channel;
        left <= timeout;
      end
    end else begin
      if (tick && left != '0) left <= left - 1'b1;
      if (hit) begin
        busy      <= 1'b0;
        status_ok <= 1'b1;
      end else if (expire) begin
        busy      <= 1'b0;
        status_ok <= 1'b0;
      end
    end
  end
endmodule
