// Testbench for ncp_mode_unit: checks that a mode switch takes effect in one
// cycle when the network is idle, and that while a transmission is running
// the switch waits (busy, old mode kept, wait reported) until it ends.
module tb_ncp_mode_unit;
  import ncp_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, tx_active = 0, busy, waited;
  mode_e new_mode = MODE_INIT, mode;
  int checks = 0, failures = 0;

  ncp_mode_unit dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(mode == MODE_INIT && !busy, "reset mode init");
    start = 1; new_mode = MODE_HARD;
    @(negedge clk); start = 0;
    chk(busy && mode == MODE_INIT, "busy one cycle");
    @(negedge clk);
    chk(!busy && mode == MODE_HARD, "hard mode");
    tx_active = 1;
    start = 1; new_mode = MODE_SOFT;
    @(negedge clk); start = 0;
    for (int i = 0; i < 10; i++) begin
      chk(busy && waited && mode == MODE_HARD, "waits for the network");
      @(negedge clk);
    end
    tx_active = 0;
    @(negedge clk);
    chk(!busy && mode == MODE_SOFT, "switched after the frame");
    start = 1; new_mode = MODE_SYNC;
    @(negedge clk); start = 0;
    @(negedge clk);
    chk(mode == MODE_SYNC, "sync mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
