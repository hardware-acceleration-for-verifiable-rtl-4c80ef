// create() execution unit of the Network Code Processor.
//
// create(msg, var) builds the message to be sent from a variable: it copies
// LEN 32-bit words starting at word address BASE of the variable memory into
// the send buffer FIFO, one word per cycle over the internal memory bus. When
// it starts, it records the message length in the send buffer descriptor, so
// that a send() running alongside knows how many words to expect.
//
// Timing: busy is high for exactly SETUP + LEN cycles from the cycle after
// start. The default SETUP = 7 reproduces the 135 cycles the document quotes
// for a 128-word variable; the document's throughput formula counts 8 setup
// cycles, which includes the cycle in which the controller issues create().
// The unit reads the bus during SETUP-1 idle cycles, then LEN read cycles,
// then one cycle to push the last word; it owns the memory bus (bus_req) for
// its whole busy time, which is what the 'b' entries of the dependence table
// wait for. How the setup cycles are spent inside the original block is not
// described; here they are idle.
module ncp_create_unit #(
  parameter int unsigned AW    = 12,
  parameter int unsigned LW    = 16,
  parameter int unsigned SETUP = 7
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] base,
  input  logic [LW-1:0] len,
  output logic          busy,
  // internal memory bus (read only)
  output logic          bus_req,
  output logic [AW-1:0] bus_addr,
  input  logic [31:0]   bus_rdata,
  // send buffer
  output logic          fifo_wr,
  output logic [31:0]   fifo_wdata,
  output logic          msg_set,
  output logic [LW-1:0] msg_len
);
  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_READ, S_LAST} state_e;
  state_e        state;
  logic [LW-1:0] remaining;
  logic [AW-1:0] addr;
  logic [7:0]    setup_cnt;
  logic          rd_pending;

  assign busy     = (state != S_IDLE);
  assign bus_req  = busy;
  assign bus_addr = addr;
  assign msg_set  = start;
  assign msg_len  = len;
  assign fifo_wr    = rd_pending;
  assign fifo_wdata = bus_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      remaining  <= '0;
      addr       <= '0;
      setup_cnt  <= '0;
      rd_pending <= 1'b0;
    end else begin
      rd_pending <= (state == S_READ);
      case (state)
        S_IDLE: if (start) begin
          addr      <= base;
          remaining <= len;
          setup_cnt <= 8'(SETUP - 1);
          state     <= (SETUP > 1) ? S_SETUP : ((len == '0) ? S_LAST : S_READ);
        end
        S_SETUP: begin
          setup_cnt <= setup_cnt - 1'b1;
          if (setup_cnt == 8'd1) state <= (remaining == '0) ? S_LAST : S_READ;
        end
        S_READ: begin
          addr      <= addr + 1'b1;
          remaining <= remaining - 1'b1;
          if (remaining == LW'(1)) state <= S_LAST;
        end
        S_LAST: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
