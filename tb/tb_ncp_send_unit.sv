// Testbench for ncp_send_unit: a queue with one cycle of read latency stands
// in for the send buffer, preloaded with the message words, and a byte sink
// stands in for the MAC. Checks the 18-byte header, the payload bytes (most
// significant first), the end-of-frame flag, the descriptor clear and the run
// time of SETUP + HDR_CYCLES + 4*LEN cycles (547 for 128 words). A second run
// lets the sink refuse bytes at random and checks the frame is still intact.
module tb_ncp_send_unit;
  import ncp_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] channel = 0;
  logic [47:0] src_addr = 48'h02_11_22_33_44_55;
  logic busy, fifo_rd, fifo_rvalid = 0, msg_done, tx_valid, tx_last, tx_ready = 1;
  logic [15:0] msg_len = 0;
  logic fifo_empty;
  logic [31:0] fifo_rdata = 0;
  logic [7:0] tx_data;
  int checks = 0, failures = 0;
  logic [31:0] words[$];
  logic [31:0] model[$];
  logic [7:0] bytes[$];
  int lasts, dones;
  logic random_ready = 0;

  ncp_send_unit dut (.*);
  always #5 clk = ~clk;

  assign fifo_empty = (model.size() == 0);
  always @(posedge clk) begin
    fifo_rvalid <= fifo_rd && model.size() != 0;
    if (fifo_rd && model.size() != 0) fifo_rdata <= model.pop_front();
    if (tx_valid && tx_ready) begin
      bytes.push_back(tx_data);
      if (tx_last) lasts++;
    end
    if (msg_done) dones++;
  end
  always @(negedge clk) tx_ready = random_ready ? ($urandom_range(3) != 0) : 1'b1;

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

  task automatic run(input int n, input int ch, input int exp_cycles);
    int cyc;
    logic [7:0] hdr [HDR_BYTES];
    words.delete(); bytes.delete(); lasts = 0; dones = 0;
    for (int i = 0; i < n; i++) words.push_back($urandom);
    model = words;
    @(negedge clk);
    start = 1; channel = 8'(ch); msg_len = 16'(n);
    @(negedge clk); start = 0;
    cyc = 0;
    while (busy) begin cyc++; @(negedge clk); end
    if (exp_cycles > 0) chk(cyc == exp_cycles, $sformatf("busy %0d cycles, want %0d", cyc, exp_cycles));
    chk(bytes.size() == HDR_BYTES + 4 * n, $sformatf("%0d bytes, want %0d", bytes.size(), HDR_BYTES + 4 * n));
    chk(lasts == 1 && dones == 1, "one end-of-frame and one descriptor clear");
    hdr = '{8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'h02, 8'h11, 8'h22, 8'h33, 8'h44, 8'h55,
            8'h88, 8'hB5, 8'(ch), 8'h00, 8'(n >> 8), 8'(n)};
    for (int i = 0; i < HDR_BYTES && i < bytes.size(); i++)
      if (bytes[i] !== hdr[i]) begin chk(0, $sformatf("header byte %0d: %h want %h", i, bytes[i], hdr[i])); break; end
    checks++;
    for (int i = 0; i < n && HDR_BYTES + 4 * i + 3 < bytes.size(); i++)
      if ({bytes[HDR_BYTES + 4*i], bytes[HDR_BYTES + 4*i + 1], bytes[HDR_BYTES + 4*i + 2], bytes[HDR_BYTES + 4*i + 3]} !== words[i]) begin
        chk(0, $sformatf("payload word %0d", i)); break;
      end
    checks++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(128, 1, 547);
    run(3, 2, 35 + 12);
    run(0, 3, 35);
    random_ready = 1;
    run(40, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
