// Testbench for ncp_timer: checks the tick period (QUANTUM cycles), that
// future() is busy for exactly 3 cycles, that the alarm fires at the start of
// time unit T + delay with its label and stays pending until acknowledged,
// that a later future() replaces the earlier alarm, and that realign restarts
// the current time unit.
module tb_ncp_timer;
  localparam int Q = 20;
  logic clk = 0, rst_n = 0, realign = 0, start = 0, alarm_ack = 0;
  logic tick, busy, alarm_pending;
  logic [31:0] now;
  logic [15:0] delay = 0;
  logic [9:0] label = 0, alarm_label;
  int checks = 0, failures = 0;
  int cyc = 0, last_tick = -1;

  ncp_timer #(.QUANTUM(Q)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

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
    int b, t0, n0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // tick period
    @(negedge clk); while (!tick) @(negedge clk);
    t0 = cyc;
    @(negedge clk); while (!tick) @(negedge clk);
    chk(cyc - t0 == Q, $sformatf("tick period %0d", cyc - t0));
    // future(2, 77) in unit n0
    repeat (4) @(negedge clk);
    n0 = now;
    start = 1; delay = 16'd2; label = 10'd77;
    @(negedge clk); start = 0;
    b = 0;
    while (busy) begin b++; @(negedge clk); end
    chk(b == 3, $sformatf("future busy %0d cycles", b));
    while (!alarm_pending) begin
      chk(now <= 32'(n0 + 2), "no alarm before unit T+2");
      @(negedge clk);
    end
    chk(now == 32'(n0 + 2) && alarm_label == 10'd77, "alarm at unit T+2 with label");
    repeat (5) @(negedge clk);
    chk(alarm_pending, "alarm held until acknowledged");
    alarm_ack = 1;
    @(negedge clk); alarm_ack = 0;
    chk(!alarm_pending, "acknowledged");
    // replace: future(5, 1) then future(1, 2)
    start = 1; delay = 16'd5; label = 10'd1;
    @(negedge clk); start = 0;
    repeat (4) @(negedge clk);
    n0 = now;
    start = 1; delay = 16'd1; label = 10'd2;
    @(negedge clk); start = 0;
    while (!alarm_pending) @(negedge clk);
    chk(alarm_label == 10'd2 && now <= 32'(n0 + 1), "second future replaces the first");
    alarm_ack = 1;
    @(negedge clk); alarm_ack = 0;
    // realign restarts the unit
    while (!tick) @(negedge clk);
    repeat (7) @(negedge clk);
    realign = 1;
    @(negedge clk); realign = 0;
    t0 = cyc;
    while (!tick) @(negedge clk);
    chk(cyc - t0 == Q - 1, $sformatf("realign restarts the unit (%0d)", cyc - t0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
