// Internal 32-bit memory bus of the Network Code Processor.
//
// One bus connects the execution units to port A of the variable memory:
// create() reads words for the send buffer, receive() writes received words,
// and if() reads operands for value comparisons. The bus has no arbitration
// of its own: the concurrency controller never starts a unit that needs the
// bus while another holds it (the 'b' entries of the dependence table, which
// wait until the bus is free). This module multiplexes the requesting unit
// onto the memory port, reports the bus as busy, and checks with an
// assertion that no two units ever hold it at once.
module ncp_mem_bus #(
  parameter int unsigned AW = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  // create() (read)
  input  logic          cr_req,
  input  logic [AW-1:0] cr_addr,
  // receive() (write)
  input  logic          rv_req,
  input  logic          rv_we,
  input  logic [AW-1:0] rv_addr,
  input  logic [31:0]   rv_wdata,
  // if() (read)
  input  logic          br_req,
  input  logic [AW-1:0] br_addr,
  // memory port and status
  output logic          mem_en,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [31:0]   mem_wdata,
  output logic          bus_busy
);
  assign bus_busy  = cr_req || rv_req || br_req;
  assign mem_en    = bus_busy;
  assign mem_we    = rv_req && rv_we;
  assign mem_wdata = rv_wdata;
  always_comb begin
    if (rv_req)      mem_addr = rv_addr;
    else if (br_req) mem_addr = br_addr;
    else             mem_addr = cr_addr;
  end

  a_one_owner: assert property (@(posedge clk) disable iff (!rst_n)
                                (2'(cr_req) + 2'(rv_req) + 2'(br_req)) <= 2'd1)
    else $error("two units hold the memory bus");
endmodule
