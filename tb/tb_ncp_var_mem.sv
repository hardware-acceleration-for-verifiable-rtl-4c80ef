// Testbench for ncp_var_mem: random reads and writes on both ports checked
// against a reference array; words written on one port must be readable on
// the other, with one cycle of read latency.
module tb_ncp_var_mem;
  localparam int WORDS = 256;
  logic clk = 0;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [7:0] a_addr = 0, b_addr = 0;
  logic [31:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [31:0] ref_mem [WORDS];
  int checks = 0, failures = 0;

  ncp_var_mem #(.WORDS(WORDS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill through port B
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      b_en = 1; b_we = 1; b_addr = 8'(i); b_wdata = $urandom; ref_mem[i] = b_wdata;
    end
    @(negedge clk) b_en = 0; b_we = 0;
    for (int k = 0; k < 500; k++) begin
      int aa, ba;
      logic aw, bw;
      aa = $urandom_range(WORDS - 1);
      ba = $urandom_range(WORDS - 1);
      if (ba == aa) ba = (ba + 1) % WORDS;
      aw = $urandom_range(1);
      bw = $urandom_range(1);
      @(negedge clk);
      a_en = 1; a_we = aw; a_addr = 8'(aa); a_wdata = $urandom;
      b_en = 1; b_we = bw; b_addr = 8'(ba); b_wdata = $urandom;
      @(posedge clk); #1;
      if (!aw) begin
        checks++;
        if (a_rdata !== ref_mem[aa]) begin failures++; $display("A %0d %h %h", aa, a_rdata, ref_mem[aa]); end
      end
      if (!bw) begin
        checks++;
        if (b_rdata !== ref_mem[ba]) begin failures++; $display("B %0d %h %h", ba, b_rdata, ref_mem[ba]); end
      end
      if (aw) ref_mem[aa] = a_wdata;
      if (bw) ref_mem[ba] = b_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
