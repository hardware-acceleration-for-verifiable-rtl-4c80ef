// Testbench for ncp_create_unit: a reference memory with one cycle of read
// latency stands in for the variable memory. Checks that create() copies the
// right words in order into the send buffer, sets the descriptor, holds the
// bus for its whole run and is busy for exactly SETUP + LEN cycles (135 for
// the 128-word variable of the document's example).
module tb_ncp_create_unit;
  logic clk = 0, rst_n = 0, start = 0;
  logic [11:0] base = 0;
  logic [15:0] len = 0, msg_len;
  logic busy, bus_req, fifo_wr, msg_set;
  logic [11:0] bus_addr;
  logic [31:0] bus_rdata, fifo_wdata;
  logic [31:0] mem [4096];
  int checks = 0, failures = 0;
  logic [31:0] got[$];

  ncp_create_unit dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) bus_rdata <= mem[bus_addr];
  always @(posedge clk) if (fifo_wr) got.push_back(fifo_wdata);

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

  task automatic run(input int b, input int n, input int exp_cycles);
    int cyc;
    logic bus_ok;
    got.delete();
    @(negedge clk);
    start = 1; base = 12'(b); len = 16'(n);
    #1 chk(msg_set && msg_len == 16'(n), "descriptor set at start");
    @(negedge clk); start = 0;
    cyc = 0; bus_ok = 1;
    while (busy) begin
      cyc++;
      if (!bus_req) bus_ok = 0;
      @(negedge clk);
    end
    chk(bus_ok, "bus held while busy");
    chk(cyc == exp_cycles, $sformatf("busy %0d cycles, want %0d", cyc, exp_cycles));
    chk(got.size() == n, $sformatf("%0d words pushed, want %0d", got.size(), n));
    for (int i = 0; i < n && i < got.size(); i++)
      if (got[i] !== mem[b + i]) begin
        chk(0, $sformatf("word %0d: %h want %h", i, got[i], mem[b + i]));
        break;
      end
    checks++;
  endtask

  initial begin
    for (int i = 0; i < 4096; i++) mem[i] = $urandom;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(12'h100, 128, 135);
    run(12'h7F0, 16, 7 + 16);
    run(12'h000, 1, 8);
    run(12'h020, 0, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
