// Testbench for ncp_rx_parser: feeds Network Code frames on several channels,
// best-effort frames, a frame for a channel that does not exist and a second
// frame on an unread channel. Checks the payload written to the receive
// buffer (reference array), the per-channel flags and lengths, the rx_event
// pulses, the overrun pulse, flag clearing, and that best-effort frames (and
// only they) reach the best-effort queue (a reference model of the queue's
// commit/discard behaviour).
module tb_ncp_rx_parser;
  import ncp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic rx_valid = 0, rx_last = 0;
  logic [7:0] rx_data = 0;
  logic buf_we;
  logic [1:0] buf_ch, rx_consume_ch = 0, rx_event_ch;
  logic [10:0] buf_addr;
  logic [7:0] buf_data;
  logic [3:0] rx_flags;
  logic [15:0] rx_len [4];
  logic rx_consume = 0, rx_event, overrun;
  logic be_wr, be_last, be_discard, be_full = 0, be_dropped;
  logic [7:0] be_data;
  logic [7:0] rbuf [4][2048];
  logic [8:0] be_pend[$], be_out[$], be_exp[$];
  int checks = 0, failures = 0, events = 0, overruns = 0;
  logic [1:0] last_event_ch;

  ncp_rx_parser dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (buf_we) rbuf[buf_ch][buf_addr] <= buf_data;
    if (rx_event) begin events++; last_event_ch <= rx_event_ch; end
    if (overrun) overruns++;
    if (be_discard) be_pend.delete();
    else if (be_wr) begin
      be_pend.push_back({be_last, be_data});
      if (be_last) begin foreach (be_pend[i]) be_out.push_back(be_pend[i]); be_pend.delete(); end
    end
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

  task automatic send_frame(input logic [7:0] f[$]);
    foreach (f[i]) begin
      // idle gaps inside the frame
      if (i != 0 && $urandom_range(4) == 0) begin
        @(negedge clk); rx_valid = 0;
      end
      @(negedge clk);
      rx_valid = 1; rx_data = f[i]; rx_last = (i == f.size() - 1);
    end
    @(negedge clk); rx_valid = 0; rx_last = 0;
    repeat (2) @(negedge clk);
  endtask

  function automatic void nc_frame(output logic [7:0] f[$], input int ch, input logic [31:0] w[$]);
    f = '{8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'h02, 8'h00, 8'h00, 8'h00, 8'h00, 8'h09,
          8'h88, 8'hB5, 8'(ch), 8'h00, 8'(w.size() >> 8), 8'(w.size())};
    foreach (w[i]) begin f.push_back(w[i][31:24]); f.push_back(w[i][23:16]); f.push_back(w[i][15:8]); f.push_back(w[i][7:0]); end
  endfunction

  initial begin
    logic [7:0] f[$];
    logic [31:0] w[$];
    logic [31:0] w2[$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    // channel 2, 10 words
    w.delete(); for (int i = 0; i < 10; i++) w.push_back($urandom);
    nc_frame(f, 2, w);
    send_frame(f);
    chk(rx_flags == 4'b0100 && rx_len[2] == 16'd10 && events == 1 && last_event_ch == 2'd2, "channel 2 flagged");
    foreach (w[i]) chk({rbuf[2][4*i], rbuf[2][4*i+1], rbuf[2][4*i+2], rbuf[2][4*i+3]} == w[i], $sformatf("ch2 word %0d", i));
    chk(be_out.size() == 0, "NC frame not in best-effort queue");
    // best-effort frame (IPv4 EtherType)
    f = '{8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'h02, 8'h00, 8'h00, 8'h00, 8'h00, 8'h07, 8'h08, 8'h00};
    for (int i = 0; i < 30; i++) f.push_back(8'($urandom));
    be_exp.delete();
    foreach (f[i]) be_exp.push_back({(i == f.size() - 1) ? 1'b1 : 1'b0, f[i]});
    send_frame(f);
    chk(be_out.size() == be_exp.size(), "best-effort frame length");
    foreach (be_exp[i]) if (i < be_out.size()) chk(be_out[i] == be_exp[i], $sformatf("be byte %0d", i));
    chk(events == 1, "best-effort frame raises no event");
    // second frame on unread channel 2: overrun, new data
    w2.delete(); for (int i = 0; i < 4; i++) w2.push_back($urandom);
    nc_frame(f, 2, w2);
    send_frame(f);
    chk(overruns == 1 && rx_len[2] == 16'd4, "overrun on unread channel");
    chk({rbuf[2][0], rbuf[2][1], rbuf[2][2], rbuf[2][3]} == w2[0], "new data replaces old");
    // channel 0, 1 word, then consume channel 2
    w.delete(); w.push_back(32'hCAFE_F00D);
    nc_frame(f, 0, w);
    send_frame(f);
    chk(rx_flags == 4'b0101 && overruns == 1, "channel 0 flagged");
    @(negedge clk); rx_consume = 1; rx_consume_ch = 2'd2;
    @(negedge clk); rx_consume = 0;
    chk(rx_flags == 4'b0001, "channel 2 consumed");
    // channel 7 does not exist: ignored
    nc_frame(f, 7, w);
    send_frame(f);
    chk(rx_flags == 4'b0001 && events == 3, "nonexistent channel ignored");
    // best-effort frame while the queue is full: dropped
    be_out.delete();
    be_full = 1;
    f = '{8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'h02, 8'h00, 8'h00, 8'h00, 8'h00, 8'h07, 8'h08, 8'h06, 8'h01};
    send_frame(f);
    be_full = 0;
    chk(be_out.size() == 0, "frame dropped when queue full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
