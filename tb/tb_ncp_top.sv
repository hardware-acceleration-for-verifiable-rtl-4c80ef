// End-to-end testbench for ncp_top, at the default parameters: two
// processors, A and B, joined back to back (each one's MAC transmit stream is
// the other's receive stream, which stands in for two MACs and a cable with
// no switch in between, as in the document's two-node measurement set-up).
//
// Node A runs the document's most common program structure every time unit:
//   L0: mode(hard); create(msg, B); send(1, msg); receive(0, A);
//       count(inc, 0); if(counter0 == 2, L_soft); future(1, L0); halt()
//   L_soft: mode(soft); future(1, L0); halt()
// with 128-word variables, so that in its second round it opens a soft-mode
// window in which a 400-byte best-effort frame from its host goes out; that
// frame is still on the wire when the next round begins, so the next
// mode(hard) has to wait for it.
// Node B first checks destroy() and SendBufferEmpty, lets a sync() on an
// unused channel time out, synchronises on A's first frame with sync(), and
// then loops: send its own 128-word variable on channel 0, receive A's
// variable every other round (so the unread frames of the other rounds
// overrun the input buffer), test the first received word with a value
// comparator and signal the host.
//
// Checks: the variables arrive intact in both directions; the best-effort
// frame reaches B's host queue intact; B's interrupt codes; the slot
// structure (every time unit, A is halted with all units idle when the next
// unit begins: its program fits the 1000-cycle unit); and each mechanism
// (overlapped issue, 'w' and 'b' stalls, halt/alarm resume, mode switch
// waiting for the network, best-effort transmission and reception, input
// overrun, sync success and timeout, destroy, branches both ways) happened at
// least once.
module tb_ncp_top;
  import ncp_pkg::*;
  localparam int ROUNDS = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;   // 100 MHz

  // per-node host-side signals
  logic        start [2];
  logic        running [2], halted [2], irq [2], irq_ack [2];
  logic [1:0]  mode [2];
  logic [31:0] now [2];
  logic [7:0]  irq_code [2];
  logic        prog_we [2];
  logic [9:0]  prog_waddr [2];
  logic [63:0] prog_wdata [2];
  logic        var_en [2], var_we [2];
  logic [11:0] var_addr [2];
  logic [31:0] var_wdata [2], var_rdata [2];
  logic        be_tx_wr [2], be_tx_last [2], be_tx_full [2];
  logic [7:0]  be_tx_data [2];
  logic        be_rx_valid [2], be_rx_last [2], be_rx_rd [2];
  logic [7:0]  be_rx_data [2];
  logic        tx_valid [2], tx_last [2];
  logic [7:0]  tx_data [2];
  logic        ev_overlap [2], ev_stall_w [2], ev_stall_b [2], ev_rx_overrun [2], ev_be_drop [2];
  logic        ev_sync_ok [2], ev_sync_timeout [2], ev_mode_wait [2], ev_be_tx_start [2];

  for (genvar n = 0; n < 2; n++) begin : g_node
    ncp_top dut (
      .clk, .rst_n,
      .start(start[n]), .running(running[n]), .halted(halted[n]), .mode(mode[n]), .now(now[n]),
      .irq(irq[n]), .irq_code(irq_code[n]), .irq_ack(irq_ack[n]),
      .prog_we(prog_we[n]), .prog_waddr(prog_waddr[n]), .prog_wdata(prog_wdata[n]),
      .var_en(var_en[n]), .var_we(var_we[n]), .var_addr(var_addr[n]), .var_wdata(var_wdata[n]),
      .var_rdata(var_rdata[n]),
      .be_tx_wr(be_tx_wr[n]), .be_tx_data(be_tx_data[n]), .be_tx_last(be_tx_last[n]),
      .be_tx_full(be_tx_full[n]),
      .be_rx_valid(be_rx_valid[n]), .be_rx_data(be_rx_data[n]), .be_rx_last(be_rx_last[n]),
      .be_rx_rd(be_rx_rd[n]),
      .mac_tx_valid(tx_valid[n]), .mac_tx_last(tx_last[n]), .mac_tx_data(tx_data[n]), .mac_tx_ready(1'b1),
      .mac_rx_valid(tx_valid[1-n]), .mac_rx_last(tx_last[1-n]), .mac_rx_data(tx_data[1-n]),
      .ev_overlap(ev_overlap[n]), .ev_stall_w(ev_stall_w[n]), .ev_stall_b(ev_stall_b[n]),
      .ev_rx_overrun(ev_rx_overrun[n]), .ev_be_drop(ev_be_drop[n]), .ev_sync_ok(ev_sync_ok[n]),
      .ev_sync_timeout(ev_sync_timeout[n]), .ev_mode_wait(ev_mode_wait[n]),
      .ev_be_tx_start(ev_be_tx_start[n]));
  end

  int checks = 0, failures = 0;
  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ programs
  function automatic logic [63:0] mk(opcode_e op, int sub = 0, int a = 0, int b = 0, int c = 0);
    instr_t i;
    i.op = op; i.sub = 12'(sub); i.a = 16'(a); i.b = 16'(b); i.c = 16'(c);
    return i;
  endfunction

  logic [63:0] prog_a [$], prog_b [$];
  initial begin
    prog_a = '{
      /* 0 L0 */ mk(OP_MODE, 0, MODE_HARD),
      /* 1 */    mk(OP_CREATE, 0, 'h100, 128),
      /* 2 */    mk(OP_SEND, 0, 1),
      /* 3 */    mk(OP_RECEIVE, 0, 0, 'h000, 128),
      /* 4 */    mk(OP_COUNT, CNT_INC, 0),
      /* 5 */    mk(OP_IF, G_COUNTER_EQ, 8, 0, 2),
      /* 6 */    mk(OP_FUTURE, 0, 1, 0),
      /* 7 */    mk(OP_HALT),
      /* 8 */    mk(OP_MODE, 0, MODE_SOFT),
      /* 9 */    mk(OP_FUTURE, 0, 1, 0),
      /* 10 */   mk(OP_HALT)};
    prog_b = '{
      /* 0 */    mk(OP_CREATE, 0, 'h000, 4),
      /* 1 */    mk(OP_DESTROY),
      /* 2 */    mk(OP_IF, G_SEND_BUFFER_EMPTY, 4),
      /* 3 */    mk(OP_SIGNAL, 0, 'hEE),
      /* 4 */    mk(OP_SYNC, 0, 2, 1),
      /* 5 */    mk(OP_IF, G_STATUS_TEST, 3),
      /* 6 */    mk(OP_SYNC, 0, 1, 20),
      /* 7 */    mk(OP_IF, G_STATUS_TEST, 9),
      /* 8 */    mk(OP_SIGNAL, 0, 'hEE),
      /* 9 Lb */ mk(OP_MODE, 0, MODE_HARD),
      /* 10 */   mk(OP_CREATE, 0, 'h200, 128),
      /* 11 */   mk(OP_SEND, 0, 0),
      /* 12 */   mk(OP_COUNT, CNT_INC, 1),
      /* 13 */   mk(OP_IF, G_COUNTER_EQ, 15, 1, 2),
      /* 14 */   mk(OP_IF, G_ALWAYS_TRUE, 20),
      /* 15 */   mk(OP_COUNT, CNT_RESET, 1),
      /* 16 */   mk(OP_RECEIVE, 0, 1, 'h100, 128),
      /* 17 */   mk(OP_IF, G_TEST_VAR, 19, 'h100),
      /* 18 */   mk(OP_IF, G_ALWAYS_TRUE, 20),
      /* 19 */   mk(OP_SIGNAL, 0, 'h42),
      /* 20 */   mk(OP_FUTURE, 0, 1, 9),
      /* 21 */   mk(OP_HALT)};
  end

  // ------------------------------------------------------- event counting
  int n_overlap, n_stall_w, n_stall_b, n_overrun, n_sync_ok, n_sync_to, n_mode_wait;
  int n_be_tx, n_resume, n_destroy, n_taken, n_not_taken, n_slot_ok, n_slot_bad, n_irq42, n_irq_bad;
  int rounds_a;
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < 2; n++) begin
      n_overlap   += int'(ev_overlap[n]);
      n_stall_w   += int'(ev_stall_w[n]);
      n_stall_b   += int'(ev_stall_b[n]);
      n_overrun   += int'(ev_rx_overrun[n]);
      n_sync_ok   += int'(ev_sync_ok[n]);
      n_sync_to   += int'(ev_sync_timeout[n]);
      n_mode_wait += int'(ev_mode_wait[n]);
      n_be_tx     += int'(ev_be_tx_start[n]);
    end
    if (g_node[0].dut.alarm_ack) n_resume++;
    if (g_node[1].dut.st_destroy) n_destroy++;
    for (int n = 0; n < 2; n++) if (n == 0 ? g_node[0].dut.br_done : g_node[1].dut.br_done) begin
      if (n == 0 ? g_node[0].dut.br_taken : g_node[1].dut.br_taken) n_taken++; else n_not_taken++;
    end
    // slot structure of node A: at the end of each time unit after the
    // first, A must be halted with every unit idle
    if (running[0] && g_node[0].dut.tick && now[0] != 0) begin
      if (halted[0] && g_node[0].dut.unit_busy == '0 && !g_node[0].dut.u_ctrl.nop_busy) n_slot_ok++;
      else begin
        n_slot_bad++;
        $display("slot %0d of node A overran", now[0]);
      end
      rounds_a++;
    end
    if (irq[1]) begin
      if (irq_code[1] == 8'h42) n_irq42++; else n_irq_bad++;
    end
  end
  always_comb begin
    irq_ack[0] = irq[0];
    irq_ack[1] = irq[1];
  end

  // best-effort frame of A's host, read back from B's host queue
  logic [7:0] be_frame [$];
  logic [7:0] be_got [$];
  int be_got_last;
  always_comb be_rx_rd[1] = be_rx_valid[1];
  always_comb be_rx_rd[0] = be_rx_valid[0];
  always @(posedge clk) if (rst_n && be_rx_valid[1]) begin
    be_got.push_back(be_rx_data[1]);
    if (be_rx_last[1]) be_got_last = be_got.size();
  end

  // ------------------------------------------------------------ stimulus
  logic [31:0] var_a [128], var_b [128];
  initial begin
    be_got_last = 0;
    for (int n = 0; n < 2; n++) begin
      start[n] = 0; prog_we[n] = 0; prog_waddr[n] = 0; prog_wdata[n] = 0;
      var_en[n] = 0; var_we[n] = 0; var_addr[n] = 0; var_wdata[n] = 0;
      be_tx_wr[n] = 0; be_tx_data[n] = 0; be_tx_last[n] = 0;
    end
    for (int i = 0; i < 128; i++) begin
      var_a[i] = $urandom | 32'h1;   // nonzero, so B's TestVar branch is taken
      var_b[i] = $urandom;
    end
    be_frame = '{8'h02, 8'h00, 8'h00, 8'h00, 8'h00, 8'h02, 8'h02, 8'h00, 8'h00, 8'h00, 8'h00, 8'h01, 8'h08, 8'h00};
    while (be_frame.size() < 400) be_frame.push_back(8'($urandom));
    repeat (3) @(negedge clk);
    rst_n = 1;
    // load programs
    foreach (prog_a[i]) begin
      @(negedge clk); prog_we[0] = 1; prog_waddr[0] = 10'(i); prog_wdata[0] = prog_a[i];
    end
    @(negedge clk); prog_we[0] = 0;
    foreach (prog_b[i]) begin
      @(negedge clk); prog_we[1] = 1; prog_waddr[1] = 10'(i); prog_wdata[1] = prog_b[i];
    end
    @(negedge clk); prog_we[1] = 0;
    // load variables: A's at 0x100, B's at 0x200
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      var_en[0] = 1; var_we[0] = 1; var_addr[0] = 12'('h100 + i); var_wdata[0] = var_a[i];
      var_en[1] = 1; var_we[1] = 1; var_addr[1] = 12'('h200 + i); var_wdata[1] = var_b[i];
    end
    @(negedge clk); var_en[0] = 0; var_we[0] = 0; var_en[1] = 0; var_we[1] = 0;
    // queue the best-effort frame at A
    foreach (be_frame[i]) begin
      @(negedge clk); be_tx_wr[0] = 1; be_tx_data[0] = be_frame[i]; be_tx_last[0] = (i == be_frame.size() - 1);
    end
    @(negedge clk); be_tx_wr[0] = 0; be_tx_last[0] = 0;
    // start B first (it waits in sync), then A at the start of a time unit
    start[1] = 1;
    @(negedge clk); start[1] = 0;
    while (!g_node[0].dut.tick) @(negedge clk);
    start[0] = 1;
    @(negedge clk); start[0] = 0;
    while (rounds_a < ROUNDS) @(negedge clk);
    repeat (20) @(negedge clk);
    // read back received variables
    for (int i = 0; i < 128; i++) begin
      logic [31:0] ra, rb;
      var_en[0] = 1; var_we[0] = 0; var_addr[0] = 12'('h000 + i);
      var_en[1] = 1; var_we[1] = 0; var_addr[1] = 12'('h100 + i);
      @(negedge clk);
      ra = var_rdata[0]; rb = var_rdata[1];
      chk(ra == var_b[i], $sformatf("A received word %0d of B: %h want %h", i, ra, var_b[i]));
      chk(rb == var_a[i], $sformatf("B received word %0d of A: %h want %h", i, rb, var_a[i]));
    end
    var_en[0] = 0; var_en[1] = 0;
    // best-effort frame
    chk(be_got_last == be_frame.size(), $sformatf("best-effort frame of %0d bytes reached B (%0d)", be_frame.size(), be_got_last));
    for (int i = 0; i < be_frame.size() && i < be_got.size(); i++)
      if (be_got[i] != be_frame[i]) begin chk(0, $sformatf("best-effort byte %0d", i)); break; end
    checks++;
    chk(n_irq42 > 0 && n_irq_bad == 0, $sformatf("B signalled 0x42 %0d times, wrong codes %0d", n_irq42, n_irq_bad));
    chk(n_slot_bad == 0 && n_slot_ok >= ROUNDS - 1, $sformatf("slot structure kept: %0d ok, %0d overrun", n_slot_ok, n_slot_bad));
    chk(mode[0] == 2'(MODE_HARD) && mode[1] == 2'(MODE_HARD), "both nodes end in hard mode");
    $display("mechanisms: overlap %0d, stall_w %0d, stall_b %0d, halt/resume %0d, mode wait %0d, be tx %0d, be rx bytes %0d,",
             n_overlap, n_stall_w, n_stall_b, n_resume, n_mode_wait, n_be_tx, be_got.size());
    $display("            overrun %0d, sync ok %0d, sync timeout %0d, destroy %0d, branch taken %0d / not %0d",
             n_overrun, n_sync_ok, n_sync_to, n_destroy, n_taken, n_not_taken);
    chk(n_overlap > 0, "overlapped issue happened");
    chk(n_stall_w > 0, "'w' stall happened");
    chk(n_stall_b > 0, "'b' stall happened");
    chk(n_resume >= ROUNDS - 1, "halt and alarm resume happened");
    chk(n_mode_wait > 0, "mode switch waited for the network");
    chk(n_be_tx == 1, "best-effort frame sent in soft mode");
    chk(n_overrun > 0, "input overrun happened");
    chk(n_sync_ok == 1, "sync succeeded once");
    chk(n_sync_to == 1, "sync timed out once");
    chk(n_destroy == 1, "destroy happened");
    chk(n_taken > 0 && n_not_taken > 0, "branches taken and not taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
