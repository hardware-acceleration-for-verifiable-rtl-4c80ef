// Testbench for ncp_mem_bus: for each possible single owner (create,
// receive, if) checks that its address, write enable and data reach the
// memory port and that the bus reports busy; with no owner the port is idle.
module tb_ncp_mem_bus;
  logic clk = 0, rst_n = 0;
  logic cr_req = 0, rv_req = 0, rv_we = 0, br_req = 0;
  logic [11:0] cr_addr = 0, rv_addr = 0, br_addr = 0, mem_addr;
  logic [31:0] rv_wdata = 0, mem_wdata;
  logic mem_en, mem_we, bus_busy;
  int checks = 0, failures = 0;

  ncp_mem_bus dut (.*);
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
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 100; k++) begin
      int who;
      @(negedge clk);
      who = $urandom_range(3);
      cr_addr = 12'($urandom); rv_addr = 12'($urandom); br_addr = 12'($urandom);
      rv_wdata = $urandom; rv_we = $urandom_range(1);
      cr_req = (who == 1); rv_req = (who == 2); br_req = (who == 3);
      #1;
      case (who)
        0: chk(!mem_en && !bus_busy && !mem_we, "idle");
        1: chk(mem_en && bus_busy && !mem_we && mem_addr == cr_addr, "create owns");
        2: chk(mem_en && bus_busy && mem_we == rv_we && mem_addr == rv_addr && mem_wdata == rv_wdata, "receive owns");
        default: chk(mem_en && bus_busy && !mem_we && mem_addr == br_addr, "if owns");
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
