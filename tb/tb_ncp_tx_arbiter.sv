// Testbench for ncp_tx_arbiter: a send() source and a best-effort source
// offer frames; checks that best-effort frames go out only in soft mode, that
// send() wins when both are waiting, that a started frame is never
// interrupted (frames arrive at the MAC whole and unmixed, also under MAC
// back-pressure), and that tx_active covers each frame.
module tb_ncp_tx_arbiter;
  import ncp_pkg::*;
  logic clk = 0, rst_n = 0;
  mode_e mode = MODE_HARD;
  logic nc_valid = 0, nc_last = 0, nc_ready, be_valid = 0, be_last = 0, be_rd;
  logic [7:0] nc_data = 0, be_data = 0;
  logic tx_valid, tx_last, tx_ready = 1, tx_active, be_frame_start;
  logic [7:0] tx_data;
  int checks = 0, failures = 0;
  logic [7:0] nc_q[$], be_q[$];    // bytes still to offer
  int nc_len, be_len;
  logic [8:0] out[$];
  int nc_frames_out = 0, be_frames_out = 0;
  logic rand_ready = 0;

  ncp_tx_arbiter dut (.*);
  always #5 clk = ~clk;

  // sources: nc bytes are 8'h1x, be bytes 8'h2x
  always_comb begin
    nc_valid = nc_q.size() != 0;
    nc_data  = nc_valid ? nc_q[0] : 8'h00;
    nc_last  = nc_q.size() == 1;
    be_valid = be_q.size() != 0;
    be_data  = be_valid ? be_q[0] : 8'h00;
    be_last  = be_q.size() == 1;
  end
  logic [7:0] cur_src;
  always @(posedge clk) begin
    if (nc_ready && nc_valid) void'(nc_q.pop_front());
    if (be_rd) void'(be_q.pop_front());
    if (tx_valid && tx_ready) begin
      if (cur_src == 0) cur_src <= tx_data & 8'hF0;
      else if ((tx_data & 8'hF0) != cur_src) begin failures++; $display("FAIL frames mixed"); end
      checks++;
      if (!tx_active) begin failures++; $display("FAIL tx_active low during frame"); end
      if (tx_last) begin
        cur_src <= 0;
        if ((tx_data & 8'hF0) == 8'h10) nc_frames_out++; else be_frames_out++;
      end
    end
  end
  always @(negedge clk) tx_ready = rand_ready ? $urandom_range(1) : 1'b1;

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

  initial begin
    cur_src = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // hard mode: best-effort frame waits
    @(negedge clk);
    for (int i = 0; i < 20; i++) be_q.push_back(8'h20 | 8'(i % 16));
    repeat (50) @(negedge clk);
    chk(be_frames_out == 0 && be_q.size() == 20, "best effort held in hard mode");
    // send() frame goes out in hard mode
    for (int i = 0; i < 10; i++) nc_q.push_back(8'h10 | 8'(i % 16));
    repeat (30) @(negedge clk);
    chk(nc_frames_out == 1 && be_frames_out == 0, "send frame out in hard mode");
    // soft mode: best-effort frame goes out
    mode = MODE_SOFT;
    repeat (30) @(negedge clk);
    chk(be_frames_out == 1 && !tx_active, "best effort out in soft mode");
    // both waiting in soft mode: send() wins, neither is cut
    rand_ready = 1;
    mode = MODE_HARD;
    for (int i = 0; i < 15; i++) be_q.push_back(8'h20 | 8'(i % 16));
    for (int i = 0; i < 15; i++) nc_q.push_back(8'h10 | 8'(i % 16));
    @(negedge clk);
    mode = MODE_SOFT;
    @(negedge clk);
    repeat (6) @(negedge clk);
    chk(nc_q.size() < 15 && be_q.size() == 15, "send() first");
    // a new nc frame arrives while best effort is running
    while (nc_q.size() != 0) @(negedge clk);
    repeat (3) @(negedge clk);
    for (int i = 0; i < 8; i++) nc_q.push_back(8'h10 | 8'(i % 16));
    repeat (120) @(negedge clk);
    chk(nc_frames_out == 3 && be_frames_out == 2 && nc_q.size() == 0 && be_q.size() == 0, "all frames out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
