// Testbench for ncp_receive_unit: a reference byte buffer with one cycle of
// read latency holds a message per channel. Checks that receive() writes the
// right words (bytes assembled most significant first) to the right
// addresses, clips to the variable length, clears the channel's flag, leaves
// the variable alone when no message is there, holds the bus, and is busy for
// SETUP + 4*N cycles (543 for 128 words).
module tb_ncp_receive_unit;
  logic clk = 0, rst_n = 0, start = 0;
  logic [1:0] channel = 0, sel_ch;
  logic [11:0] base = 0, bus_addr;
  logic [15:0] vlen = 0, msg_len;
  logic busy, msg_valid, rx_consume, bus_req, bus_we;
  logic [10:0] rbuf_addr;
  logic [7:0] rbuf_rdata;
  logic [31:0] bus_wdata;
  logic [7:0] rbuf [4][2048];
  logic [3:0] flags;
  logic [15:0] lens [4];
  logic [31:0] var_mem [4096];
  int checks = 0, failures = 0;

  ncp_receive_unit #(.BW(11), .CW(2)) dut (.*);
  always #5 clk = ~clk;
  assign msg_valid = flags[sel_ch];
  assign msg_len   = lens[sel_ch];
  always @(posedge clk) begin
    rbuf_rdata <= rbuf[sel_ch][rbuf_addr];
    if (bus_we) var_mem[bus_addr] <= bus_wdata;
    if (rx_consume) flags[sel_ch] <= 1'b0;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int ch, input int b, input int vl, input int exp_words);
    int cyc;
    logic bus_ok, had;
    logic [31:0] prev_mem [4096];
    prev_mem = var_mem;
    had = flags[ch];
    @(negedge clk);
    start = 1; channel = 2'(ch); base = 12'(b); vlen = 16'(vl);
    @(negedge clk); start = 0;
    cyc = 0; bus_ok = 1;
    while (busy) begin cyc++; if (!bus_req) bus_ok = 0; @(negedge clk); end
    @(negedge clk);
    chk(bus_ok, "bus held");
    chk(cyc == 31 + 4 * exp_words, $sformatf("busy %0d cycles, want %0d", cyc, 31 + 4 * exp_words));
    chk(!flags[ch], "flag cleared");
    for (int i = 0; i < 4096; i++) begin
      logic [31:0] e;
      e = prev_mem[i];
      if (i >= b && i < b + exp_words)
        e = {rbuf[ch][4*(i-b)], rbuf[ch][4*(i-b)+1], rbuf[ch][4*(i-b)+2], rbuf[ch][4*(i-b)+3]};
      if (var_mem[i] !== e) begin chk(0, $sformatf("var[%0d] %h want %h (had msg %0d)", i, var_mem[i], e, had)); break; end
    end
    checks++;
  endtask

  initial begin
    for (int c = 0; c < 4; c++) for (int i = 0; i < 2048; i++) rbuf[c][i] = 8'($urandom);
    for (int i = 0; i < 4096; i++) var_mem[i] = 32'hDEAD_0000 + 32'(i);
    flags = 4'b1011;
    lens = '{16'd128, 16'd10, 16'd5, 16'd200};
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 12'h000, 128, 128);
    run(1, 12'h200, 128, 10);
    run(3, 12'h400, 64, 64);     // clipped to the variable
    run(2, 12'h600, 64, 0);      // no message: variable untouched
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
