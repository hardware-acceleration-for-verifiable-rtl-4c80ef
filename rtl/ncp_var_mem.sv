// Variable memory ("dual RAM") of the Network Code Processor.
//
// The variables that Network Code programs send, receive and compare live in a
// dual-ported RAM of 32-bit words. Port A is the processor's internal memory
// bus (create reads, receive writes, if() value comparisons read); port B
// belongs to the host, which writes the values to be sent and reads the values
// received. Both ports are synchronous: read data appears one cycle after the
// address. A write and a read of the same address on the two ports in one
// cycle return the old word on the reading port.
//
// The document states a dual RAM and a 32-bit internal bus; the depth (4096
// words, 16 KiB) is this design's choice.
module ncp_var_mem #(
  parameter int unsigned WORDS = 4096,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  // port A: internal memory bus
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [31:0]   a_wdata,
  output logic [31:0]   a_rdata,
  // port B: host
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [31:0]   b_wdata,
  output logic [31:0]   b_rdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      b_rdata <= mem[b_addr];
    end
  end
endmodule
