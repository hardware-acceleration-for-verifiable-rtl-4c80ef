// Testbench for ncp_prog_mem: writes random instruction words through the
// host port, reads them back through the fetch port and checks the data and
// the one-cycle read latency against a reference array.
module tb_ncp_prog_mem;
  localparam int DEPTH = 64;
  logic clk = 0, we = 0;
  logic [5:0] waddr = 0, raddr = 0;
  logic [63:0] wdata = 0, rdata;
  logic [63:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  ncp_prog_mem #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 6'(i); wdata = {$urandom, $urandom};
      ref_mem[i] = wdata;
    end
    @(negedge clk) we = 0;
    for (int k = 0; k < 200; k++) begin
      int a;
      a = $urandom_range(DEPTH - 1);
      raddr = 6'(a);
      @(posedge clk); #1;
      checks++;
      if (rdata !== ref_mem[a]) begin
        failures++;
        $display("read %0d: got %h want %h", a, rdata, ref_mem[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
