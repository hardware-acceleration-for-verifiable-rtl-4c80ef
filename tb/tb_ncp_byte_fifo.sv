// Testbench for ncp_byte_fifo: writes random frames, some of them discarded
// part-way, reads with random gaps and checks that exactly the committed
// frames come out, whole and in order, and that the frame count and the full
// flag are right.
module tb_ncp_byte_fifo;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_last = 0, wr_discard = 0, wr_full, rd_valid, rd_last, rd_en = 0;
  logic [7:0] wr_data = 0, rd_data;
  logic [6:0] frames;
  int checks = 0, failures = 0;
  logic [8:0] expq[$];
  logic [8:0] pend[$];
  int committed = 0, read_frames = 0;

  ncp_byte_fifo #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reader
  always @(posedge clk) if (rst_n && rd_en && rd_valid) begin
    logic [8:0] e;
    e = expq.pop_front();
    chk({rd_last, rd_data} == e, "read byte");
    if (rd_last) read_frames++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // reading nothing while nothing is committed
    @(negedge clk);
    wr_en = 1; wr_data = 8'hAA; wr_last = 0;
    @(negedge clk); wr_en = 0;
    chk(!rd_valid, "uncommitted byte invisible");
    wr_discard = 1;
    @(negedge clk); wr_discard = 0;
    for (int f = 0; f < 40; f++) begin
      int len;
      logic drop;
      len = $urandom_range(1, 12);
      drop = ($urandom_range(3) == 0);
      pend.delete();
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        rd_en = $urandom_range(1);
        wr_en = 1; wr_data = 8'($urandom); wr_last = (i == len - 1) && !drop;
        if (!wr_full) pend.push_back({wr_last, wr_data});
        else drop = 1;
        if (wr_full) begin wr_en = 0; end
      end
      @(negedge clk);
      wr_en = 0; wr_last = 0;
      if (drop) begin
        wr_discard = 1;
        @(negedge clk); wr_discard = 0;
      end else begin
        foreach (pend[i]) expq.push_back(pend[i]);
        committed++;
      end
      // drain fully sometimes
      if ($urandom_range(1) == 0) begin
        rd_en = 1;
        while (rd_valid) @(negedge clk);
        rd_en = 0;
      end
    end
    rd_en = 1;
    while (rd_valid) @(negedge clk);
    rd_en = 0;
    @(negedge clk);
    chk(read_frames == committed, "all committed frames read");
    chk(frames == 0 && expq.size() == 0, "queue empty");
    // full flag
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); wr_en = 1; wr_data = 8'(i); wr_last = (i == DEPTH - 1);
    end
    @(negedge clk); wr_en = 0; wr_last = 0;
    chk(wr_full && frames == 7'd1, "full with one frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
