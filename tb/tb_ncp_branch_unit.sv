// Testbench for ncp_branch_unit: evaluates every guard with random operands
// against a reference model. A reference memory with one cycle of read
// latency stands in for the variable memory. Checks the outcome, the run time
// (3 cycles for value comparisons, 1 otherwise) and that the bus is held only
// by value comparisons.
module tb_ncp_branch_unit;
  import ncp_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  guard_e guard = G_ALWAYS_TRUE;
  logic [15:0] op1 = 0, op2 = 0;
  logic busy, done, taken, sync_ok = 0, send_buf_empty = 0, bus_req;
  logic [3:0] rx_flags = 0;
  logic [15:0] cnt [4];
  logic [11:0] bus_addr;
  logic [31:0] bus_rdata;
  logic [31:0] mem [4096];
  int checks = 0, failures = 0;

  ncp_branch_unit dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) bus_rdata <= mem[bus_addr];

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic model(guard_e g, logic [15:0] a, logic [15:0] b);
    logic [31:0] va, vb;
    va = mem[a[11:0]];
    vb = mem[b[11:0]];
    case (g)
      G_ALWAYS_TRUE:       return 1;
      G_ALWAYS_FALSE:      return 0;
      G_TEST_VAR:          return va != 0;
      G_GREATER_VAR_VAR:   return va > vb;
      G_COMPARE_VAR_VAR:   return va == vb;
      G_LESS_VAR_VAR:      return va < vb;
      G_STATUS_TEST:       return sync_ok;
      G_SEND_BUFFER_EMPTY: return send_buf_empty;
      G_MSG_RECEIVED:      return a < 4 && rx_flags[a[1:0]];
      G_COUNTER_EQ:        return a < 4 && cnt[a[1:0]] == b;
      G_COUNTER_LESS:      return a < 4 && cnt[a[1:0]] < b;
      default:             return 0;
    endcase
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4096; i++) mem[i] = ($urandom_range(3) == 0) ? 0 : 32'($urandom_range(20));
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 600; k++) begin
      int cyc, bus_cyc;
      logic exp, got;
      @(negedge clk);
      guard = guard_e'($urandom_range(10));
      sync_ok = $urandom_range(1);
      send_buf_empty = $urandom_range(1);
      rx_flags = 4'($urandom);
      for (int i = 0; i < 4; i++) cnt[i] = 16'($urandom_range(5));
      op1 = 16'($urandom_range(guard inside {G_MSG_RECEIVED, G_COUNTER_EQ, G_COUNTER_LESS} ? 5 : 4095));
      op2 = 16'($urandom_range(guard inside {G_COUNTER_EQ, G_COUNTER_LESS} ? 6 : 4095));
      if ($urandom_range(3) == 0) op2 = op1;
      exp = model(guard, op1, op2);
      start = 1;
      @(negedge clk); start = 0;
      cyc = 1; bus_cyc = bus_req;
      while (!done) begin @(negedge clk); cyc++; bus_cyc += bus_req; end
      got = taken;
      @(negedge clk);
      chk(got == exp, $sformatf("guard %s op1 %0d op2 %0d: %0d want %0d", guard.name(), op1, op2, got, exp));
      chk(cyc == (guard_uses_bus(guard) ? 3 : 1), $sformatf("%s took %0d cycles", guard.name(), cyc));
      chk(bus_cyc == (guard_uses_bus(guard) ? 3 : 0), "bus use");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
