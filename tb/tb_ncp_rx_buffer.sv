// Testbench for ncp_rx_buffer: writes distinct random bytes into every
// channel's buffer and reads them back per channel, so that a mix-up of
// channel or address shows as wrong data.
module tb_ncp_rx_buffer;
  localparam int CH = 4, BY = 64;
  logic clk = 0, we = 0;
  logic [1:0] wch = 0, rch = 0;
  logic [5:0] waddr = 0, raddr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] ref_mem [CH][BY];
  int checks = 0, failures = 0;

  ncp_rx_buffer #(.CHANNELS(CH), .BYTES(BY)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < CH; c++)
      for (int i = 0; i < BY; i++) begin
        @(negedge clk);
        we = 1; wch = 2'(c); waddr = 6'(i); wdata = 8'($urandom); ref_mem[c][i] = wdata;
      end
    @(negedge clk) we = 0;
    for (int k = 0; k < 300; k++) begin
      int c, a;
      c = $urandom_range(CH - 1);
      a = $urandom_range(BY - 1);
      rch = 2'(c); raddr = 6'(a);
      @(posedge clk); #1;
      checks++;
      if (rdata !== ref_mem[c][a]) begin failures++; $display("ch%0d[%0d] %h %h", c, a, rdata, ref_mem[c][a]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
