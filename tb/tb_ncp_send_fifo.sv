// Testbench for ncp_send_fifo: pushes and pops words with random timing and
// checks order, the one-cycle read latency, the count/empty/full flags, the
// flush of destroy() and the message descriptor (set by create(), cleared by
// send() or destroy()).
module tb_ncp_send_fifo;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, rvalid, empty, full;
  logic [31:0] wdata = 0, rdata;
  logic [4:0] count;
  logic msg_set = 0, msg_clear = 0, flush = 0, msg_present;
  logic [15:0] msg_set_len = 0, msg_len;
  int checks = 0, failures = 0;
  logic [31:0] q[$];
  logic expect_rd;

  ncp_send_fifo #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model and data check
  always @(posedge clk) begin
    if (rst_n) begin
      if (expect_rd) begin
        chk(rvalid, "rvalid after read");
        chk(rdata == q.pop_front(), "data order");
      end
      expect_rd <= rd_en && !empty && !flush;
      if (wr_en && !full && !flush) q.push_back(wdata);
      if (flush) q.delete();
    end else begin
      expect_rd <= 1'b0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // fill to full
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); wr_en = 1; wdata = $urandom;
    end
    @(negedge clk); wr_en = 0;
    chk(full && count == 5'(DEPTH), "full after DEPTH pushes");
    // random traffic
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      wr_en = ($urandom_range(2) != 0) && !full;
      wdata = $urandom;
      rd_en = ($urandom_range(2) != 0);
    end
    @(negedge clk); wr_en = 0; rd_en = 0;
    @(negedge clk);
    chk(count == 5'(q.size()), "count matches model");
    // descriptor
    @(negedge clk); msg_set = 1; msg_set_len = 16'd77;
    @(negedge clk); msg_set = 0;
    chk(msg_present && msg_len == 16'd77, "descriptor set");
    msg_clear = 1;
    @(negedge clk); msg_clear = 0;
    chk(!msg_present, "descriptor cleared by send");
    // two messages, one send done: still present
    msg_set = 1; msg_set_len = 16'd5;
    @(negedge clk); msg_set_len = 16'd6;
    @(negedge clk); msg_set = 0; msg_clear = 1;
    @(negedge clk); msg_clear = 0;
    chk(msg_present && msg_len == 16'd6, "second message still present");
    // flush
    wr_en = 1; wdata = 32'h1234;
    @(negedge clk); wr_en = 0; flush = 1;
    @(negedge clk); flush = 0;
    chk(empty && count == 0 && !msg_present, "flush empties data and descriptor");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
