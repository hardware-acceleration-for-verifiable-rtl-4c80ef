// Per-channel receive buffers of the Network Code Processor.
//
// Each Network Code channel has a buffer that holds the payload of the last
// guaranteed-traffic frame received on it, one byte per location, written by
// the frame receiver (ncp_rx_parser) as the bytes arrive from the 8-bit MAC
// interface and read by the receive() unit. The memory is byte wide because
// the MAC side is; this is why receive() moves one 32-bit word every four
// cycles. Channel c occupies addresses c*BYTES .. c*BYTES+BYTES-1.
//
// The document describes input queues that separate guaranteed from
// best-effort traffic but gives no sizes: four channels of 2048 bytes (room
// for a maximum Ethernet payload of 1500 bytes) are this design's choice.
//
// Interface: write (we, wch, waddr, wdata); read (rch, raddr -> rdata one
// cycle later).
module ncp_rx_buffer #(
  parameter int unsigned CHANNELS = 4,
  parameter int unsigned BYTES    = 2048,
  parameter int unsigned CW       = (CHANNELS > 1) ? $clog2(CHANNELS) : 1,
  parameter int unsigned BW       = $clog2(BYTES)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [CW-1:0] wch,
  input  logic [BW-1:0] waddr,
  input  logic [7:0]    wdata,
  input  logic [CW-1:0] rch,
  input  logic [BW-1:0] raddr,
  output logic [7:0]    rdata
);
  logic [7:0] mem [CHANNELS*BYTES];

  always_ff @(posedge clk) begin
    if (we) mem[{wch, waddr}] <= wdata;
    rdata <= mem[{rch, raddr}];
  end
endmodule
