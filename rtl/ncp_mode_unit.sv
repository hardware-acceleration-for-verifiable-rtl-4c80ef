// mode() execution unit of the Network Code Processor.
//
// mode(m) switches the run-time system between its operating modes: init (set
// up), soft (best-effort traffic of the host may use the network), hard
// (guaranteed traffic from send() only) and sync. Before switching, the
// network must be available: the unit waits until no frame is being handed to
// the MAC (tx_active low), so in a saturated network the switch happens when
// the running transmission reaches its inter-frame gap. The new mode is
// written in the cycle the network is seen free.
//
// Timing: busy from the cycle after start until the mode register is written,
// at least one cycle. Reset mode is init. The mode encoding is in ncp_pkg.
module ncp_mode_unit (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  ncp_pkg::mode_e new_mode,
  input  logic           tx_active,
  output logic           busy,
  output ncp_pkg::mode_e mode,
  output logic           waited    // pulse: a switch had to wait for the network
);
  import ncp_pkg::*;
  mode_e pending;

  assign waited = busy && tx_active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      pending <= MODE_INIT;
      mode    <= MODE_INIT;
    end else if (!busy) begin
      if (start) begin
        busy    <= 1'b1;
        pending <= new_mode;
      end
    end else if (!tx_active) begin
      mode <= pending;
      busy <= 1'b0;
    end
  end
endmodule
