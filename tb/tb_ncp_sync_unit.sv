// Testbench for ncp_sync_unit: checks that sync() ends on a frame completed
// on its own channel (status set, one realign pulse), ignores frames on other
// channels, ends after exactly the programmed number of time-base ticks when
// nothing arrives (status cleared, timeout pulse), and ends at once with a
// timeout of zero.
module tb_ncp_sync_unit;
  logic clk = 0, rst_n = 0, start = 0, tick, rx_event = 0;
  logic [1:0] channel = 0, rx_event_ch = 0;
  logic [15:0] timeout = 0;
  logic busy, status_ok, realign, timed_out;
  int checks = 0, failures = 0, realigns = 0, timeouts = 0, ticks = 0;

  ncp_sync_unit dut (.*);
  always #5 clk = ~clk;
  // a tick every 10 cycles
  int tc = 0;
  always @(posedge clk) begin
    tc <= (tc == 9) ? 0 : tc + 1;
    if (realign) realigns++;
    if (timed_out) timeouts++;
    if (tick && busy) ticks++;
  end
  assign tick = (tc == 9);

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // packet arrives on channel 1 after one on channel 2
    @(negedge clk); start = 1; channel = 2'd1; timeout = 16'd50;
    @(negedge clk); start = 0;
    repeat (7) @(negedge clk);
    rx_event = 1; rx_event_ch = 2'd2;
    @(negedge clk); rx_event = 0;
    chk(busy, "other channel ignored");
    repeat (5) @(negedge clk);
    rx_event = 1; rx_event_ch = 2'd1;
    @(negedge clk); rx_event = 0;
    chk(!busy && status_ok && realigns == 1 && timeouts == 0, "ends on own channel with status set");
    // timeout of 3 ticks
    @(negedge clk); start = 1; channel = 2'd0; timeout = 16'd3; ticks = 0;
    @(negedge clk); start = 0;
    while (busy) @(negedge clk);
    chk(!status_ok && timeouts == 1 && ticks == 3 && realigns == 1, "timeout after 3 ticks clears status");
    // zero timeout
    @(negedge clk); start = 1; timeout = 16'd0;
    @(negedge clk); start = 0;
    chk(busy, "busy one cycle");
    @(negedge clk);
    chk(!busy && timeouts == 2, "zero timeout ends at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
