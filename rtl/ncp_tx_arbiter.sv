// Transmit queue arbitration of the Network Code Processor.
//
// Two sources share the MAC's transmit byte stream: the send() unit
// (guaranteed traffic, under control of the Network Code program) and the
// host's best-effort transmit queue. Arbitration works on whole frames. When
// no frame is in progress, a frame offered by send() always wins; a queued
// best-effort frame may start only while the run-time system is in soft mode.
// Once a frame has started, its source keeps the MAC until the frame's last
// byte has been accepted. tx_active is high while a frame is in progress (or
// send() is offering one); the mode() unit waits for it to fall before a mode
// switch, so a switch happens in the gap between frames.
//
// Interface: valid/ready byte streams with an end-of-frame flag; the
// best-effort queue is first-word-fall-through (ncp_byte_fifo) and only holds
// complete frames. Combinational from source to MAC.
module ncp_tx_arbiter (
  input  logic           clk,
  input  logic           rst_n,
  input  ncp_pkg::mode_e mode,
  // send() unit
  input  logic           nc_valid,
  input  logic           nc_last,
  input  logic [7:0]     nc_data,
  output logic           nc_ready,
  // best-effort queue
  input  logic           be_valid,
  input  logic           be_last,
  input  logic [7:0]     be_data,
  output logic           be_rd,
  // MAC
  output logic           tx_valid,
  output logic           tx_last,
  output logic [7:0]     tx_data,
  input  logic           tx_ready,
  output logic           tx_active,
  output logic           be_frame_start   // pulse: a best-effort frame started
);
  import ncp_pkg::*;

  typedef enum logic [1:0] {O_NONE, O_NC, O_BE} owner_e;
  owner_e owner, sel;

  always_comb begin
    sel = owner;
    if (owner == O_NONE) begin
      if (nc_valid)                           sel = O_NC;
      else if (be_valid && mode == MODE_SOFT) sel = O_BE;
    end
  end

  always_comb begin
    tx_valid = 1'b0;
    tx_last  = 1'b0;
    tx_data  = '0;
    case (sel)
      O_NC: begin tx_valid = nc_valid; tx_last = nc_last; tx_data = nc_data; end
      O_BE: begin tx_valid = be_valid; tx_last = be_last; tx_data = be_data; end
      default: ;
    endcase
  end

  assign nc_ready  = (sel == O_NC) && tx_ready;
  assign be_rd     = (sel == O_BE) && tx_ready && be_valid;
  assign tx_active = (owner != O_NONE) || (sel != O_NONE) || nc_valid;
  assign be_frame_start = (owner == O_NONE) && (sel == O_BE) && tx_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owner <= O_NONE;
    end else if (tx_valid && tx_ready) begin
      owner <= tx_last ? O_NONE : sel;
    end
  end
endmodule
