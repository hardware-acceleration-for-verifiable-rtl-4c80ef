// Program memory of the Network Code Processor.
//
// Holds the Network Code program as 64-bit instruction words (ncp_pkg::instr_t).
// The host loads it through the write port; the controller fetches through a
// synchronous read port, so the word addressed in one cycle is available in the
// next, as in an FPGA block RAM. The document names the program store but not
// its size: 1024 instructions is this design's choice.
//
// Interface: host write (we, waddr, wdata); fetch read (raddr -> rdata, one
// cycle later). No reset: the memory contents are defined by the host load.
module ncp_prog_mem #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [63:0]   wdata,
  input  logic [AW-1:0] raddr,
  output logic [63:0]   rdata
);
  logic [63:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
