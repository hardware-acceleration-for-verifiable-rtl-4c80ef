// Throughput workload testbench for ncp_top at its default parameters.
//
// Two nodes. Node A sends one variable of B bytes every k time units:
//   L0: create(var, B/4); send(0); future(k, L0); halt()
// Node B receives it every k time units:
//   L0: receive(0, var, B/4); future(k, L0); halt()
// A's transmit stream goes through a behavioural model of a 100 Mbit/s
// Ethernet MAC. The model takes one byte every 8 cycles, which is 80 ns at
// 100 MHz. It spends 8 byte times on the preamble before the frame, pads the
// frame to 60 bytes, and spends 4 byte times on the FCS and 10 on the
// inter-frame gap after it. The gap is the document's figure. The model
// passes each accepted byte on to node B and checks the frame header and
// payload itself.
//
// For each size B in {4, 80, 200, 500, 1000} bytes the test does three runs:
//   1. A run with a long period measures t, the cycles from the start of A's
//      slot to the end of the inter-frame gap. t must lie between the wire
//      time 8*(8 + max(18+B, 60) + 4 + 10) and that plus 48 cycles, which
//      covers the fetch, setup and header phases of create() and send().
//   2. A run with k = ceil(t / 1000) must keep the slot structure: at every
//      alarm of A, send() and the MAC are idle. Node B must then hold A's
//      variable, with no input overrun.
//   3. If k > 1, a run with k - 1 must break it.
// The test prints the resulting throughput B/(k*10 us) next to the
// document's analytic model:
//   tp = (8 + B/4 + 5) * 10 ns,  ts = (26 + max(B, 28) + 10) * 80 ns,
//   TP = B / (ceil((tp + ts)/10 us) * 10 us)
// It checks that k differs from the model's slot count by at most one. This
// design's header is 18 bytes where the model counts 14, so the two counts
// can differ near a slot boundary.
module tb_ncp_throughput;
  import ncp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;   // 100 MHz
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // host-side signals of both nodes
  logic        start [2];
  logic        running [2], halted [2], irq [2];
  logic [1:0]  mode [2];
  logic [31:0] now [2];
  logic [7:0]  irq_code [2];
  logic        prog_we [2];
  logic [9:0]  prog_waddr [2];
  logic [63:0] prog_wdata [2];
  logic        var_en [2], var_we [2];
  logic [11:0] var_addr [2];
  logic [31:0] var_wdata [2], var_rdata [2];
  logic        be_tx_full [2], be_rx_valid [2], be_rx_last [2];
  logic [7:0]  be_rx_data [2];
  logic        tx_valid [2], tx_last [2], tx_ready [2];
  logic [7:0]  tx_data [2];
  logic        rx_valid [2], rx_last [2];
  logic [7:0]  rx_data [2];
  logic        ev_overlap [2], ev_stall_w [2], ev_stall_b [2], ev_rx_overrun [2], ev_be_drop [2];
  logic        ev_sync_ok [2], ev_sync_timeout [2], ev_mode_wait [2], ev_be_tx_start [2];

  for (genvar n = 0; n < 2; n++) begin : g_node
    ncp_top dut (
      .clk, .rst_n,
      .start(start[n]), .running(running[n]), .halted(halted[n]), .mode(mode[n]), .now(now[n]),
      .irq(irq[n]), .irq_code(irq_code[n]), .irq_ack(irq[n]),
      .prog_we(prog_we[n]), .prog_waddr(prog_waddr[n]), .prog_wdata(prog_wdata[n]),
      .var_en(var_en[n]), .var_we(var_we[n]), .var_addr(var_addr[n]), .var_wdata(var_wdata[n]),
      .var_rdata(var_rdata[n]),
      .be_tx_wr(1'b0), .be_tx_data(8'h00), .be_tx_last(1'b0), .be_tx_full(be_tx_full[n]),
      .be_rx_valid(be_rx_valid[n]), .be_rx_data(be_rx_data[n]), .be_rx_last(be_rx_last[n]),
      .be_rx_rd(be_rx_valid[n]),
      .mac_tx_valid(tx_valid[n]), .mac_tx_last(tx_last[n]), .mac_tx_data(tx_data[n]),
      .mac_tx_ready(tx_ready[n]),
      .mac_rx_valid(rx_valid[n]), .mac_rx_last(rx_last[n]), .mac_rx_data(rx_data[n]),
      .ev_overlap(ev_overlap[n]), .ev_stall_w(ev_stall_w[n]), .ev_stall_b(ev_stall_b[n]),
      .ev_rx_overrun(ev_rx_overrun[n]), .ev_be_drop(ev_be_drop[n]), .ev_sync_ok(ev_sync_ok[n]),
      .ev_sync_timeout(ev_sync_timeout[n]), .ev_mode_wait(ev_mode_wait[n]),
      .ev_be_tx_start(ev_be_tx_start[n]));
  end

  // B never transmits; A receives nothing.
  assign tx_ready[1] = 1'b1;
  assign rx_valid[0] = 1'b0;
  assign rx_last[0]  = 1'b0;
  assign rx_data[0]  = 8'h00;

  int checks = 0, failures = 0;
  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------ 100 Mbit/s MAC model
  typedef enum logic [1:0] {M_IDLE, M_PRE, M_DATA, M_TAIL} mac_st_e;
  mac_st_e     mst;
  int          mcnt, mlen;
  logic [7:0]  expect_frame [$];   // header and payload of the frame A should send
  int          frame_errs, frames;
  int unsigned t_frame_end;

  assign tx_ready[0] = (mst == M_DATA) && (mcnt == 0);

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mst <= M_IDLE; mcnt <= 0; mlen <= 0;
      rx_valid[1] <= 1'b0; rx_last[1] <= 1'b0; rx_data[1] <= 8'h00;
    end else begin
      rx_valid[1] <= 1'b0;
      rx_last[1]  <= 1'b0;
      case (mst)
        M_IDLE: if (tx_valid[0]) begin mst <= M_PRE; mcnt <= 8 * 8 - 1; mlen <= 0; end
        M_PRE:  if (mcnt == 0) mst <= M_DATA; else mcnt <= mcnt - 1;
        M_DATA: begin
          if (mcnt != 0) mcnt <= mcnt - 1;
          else if (tx_valid[0]) begin
            if (mlen >= expect_frame.size() || tx_data[0] != expect_frame[mlen]) frame_errs <= frame_errs + 1;
            rx_valid[1] <= 1'b1;
            rx_data[1]  <= tx_data[0];
            rx_last[1]  <= tx_last[0];
            mlen <= mlen + 1;
            if (tx_last[0]) begin
              if (mlen + 1 != expect_frame.size()) frame_errs <= frame_errs + 1;
              mst  <= M_TAIL;
              mcnt <= 8 * ((mlen + 1 < 60 ? 60 - (mlen + 1) : 0) + 4 + 10) - 1;
            end else mcnt <= 7;
          end
        end
        M_TAIL: if (mcnt == 0) begin
          mst <= M_IDLE; frames <= frames + 1; t_frame_end <= cyc + 1;
        end else mcnt <= mcnt - 1;
      endcase
    end
  end

  // ------------------------------------------------ slot observation
  int unsigned t_slot0;
  int slots, slot_bad, overruns_b;
  always @(posedge clk) if (rst_n) begin
    if (start[0]) t_slot0 <= cyc;
    if (g_node[0].dut.alarm_ack) begin
      slots <= slots + 1;
      if (g_node[0].dut.sd_busy || mst != M_IDLE) slot_bad <= slot_bad + 1;
    end
    if (ev_rx_overrun[1]) overruns_b <= overruns_b + 1;
  end

  // ------------------------------------------------ programs and runs
  function automatic logic [63:0] mk(opcode_e op, int sub = 0, int a = 0, int b = 0, int c = 0);
    instr_t i;
    i.op = op; i.sub = 12'(sub); i.a = 16'(a); i.b = 16'(b); i.c = 16'(c);
    return i;
  endfunction

  logic [31:0] var_a [256];

  task automatic load(input int n, input logic [63:0] p [$]);
    foreach (p[i]) begin
      @(negedge clk); prog_we[n] = 1; prog_waddr[n] = 10'(i); prog_wdata[n] = p[i];
    end
    @(negedge clk); prog_we[n] = 0;
  endtask

  // Runs both nodes with period k for nslots alarms of A; returns the time
  // from the start of A's first slot to the end of its first frame.
  task automatic run(input int bytes, input int k, input int nslots, output int unsigned t_first);
    int words;
    logic [63:0] pa [$], pb [$];
    words = bytes / 4;
    rst_n = 0;
    repeat (3) @(negedge clk);
    frame_errs = 0; frames = 0; slots = 0; slot_bad = 0; overruns_b = 0;
    rst_n = 1;
    pa = '{mk(OP_CREATE, 0, 'h000, words), mk(OP_SEND, 0, 0), mk(OP_FUTURE, 0, k, 0), mk(OP_HALT)};
    pb = '{mk(OP_RECEIVE, 0, 0, 'h400, words), mk(OP_FUTURE, 0, k, 0), mk(OP_HALT)};
    load(0, pa);
    load(1, pb);
    for (int i = 0; i < words; i++) begin
      @(negedge clk);
      var_en[0] = 1; var_we[0] = 1; var_addr[0] = 12'(i); var_wdata[0] = var_a[i];
      var_en[1] = 1; var_we[1] = 1; var_addr[1] = 12'('h400 + i); var_wdata[1] = 32'h0;
    end
    @(negedge clk); var_en[0] = 0; var_we[0] = 0; var_en[1] = 0; var_we[1] = 0;
    // expected frame
    expect_frame = {};
    for (int i = 0; i < 6; i++) expect_frame.push_back(8'hFF);
    for (int i = 5; i >= 0; i--) expect_frame.push_back(8'(48'h02_00_00_00_00_01 >> (8 * i)));
    expect_frame.push_back(8'h88); expect_frame.push_back(8'hB5);
    expect_frame.push_back(8'h00); expect_frame.push_back(8'h00);
    expect_frame.push_back(8'(words >> 8)); expect_frame.push_back(8'(words));
    for (int i = 0; i < words; i++)
      for (int j = 3; j >= 0; j--) expect_frame.push_back(8'(var_a[i] >> (8 * j)));
    while (!g_node[0].dut.tick) @(negedge clk);
    start[0] = 1; start[1] = 1;
    @(negedge clk); start[0] = 0; start[1] = 0;
    while (frames == 0) @(negedge clk);
    t_first = t_frame_end - t_slot0;
    while (slots < nslots) @(negedge clk);
    while (mst != M_IDLE) @(negedge clk);
    repeat (1100) @(negedge clk);   // let B take the last frame
  endtask

  int sizes [5] = '{4, 80, 200, 500, 1000};
  initial begin
    for (int n = 0; n < 2; n++) begin
      start[n] = 0; prog_we[n] = 0; prog_waddr[n] = 0; prog_wdata[n] = 0;
      var_en[n] = 0; var_we[n] = 0; var_addr[n] = 0; var_wdata[n] = 0;
    end
    frame_errs = 0; frames = 0; t_frame_end = 0;
    foreach (var_a[i]) var_a[i] = $urandom;
    foreach (sizes[s]) begin
      int b, k, k_model, wire_t, lead, ok_slots;
      int unsigned t, t2;
      longint tot_ns;
      b = sizes[s];
      // 1: measurement with a period that is long enough for any size
      run(b, 12, 2, t);
      wire_t = 8 * (8 + (18 + b > 60 ? 18 + b : 60) + 4 + 10);
      lead = int'(t) - wire_t;
      chk(lead >= 0 && lead <= 48, $sformatf("B=%0d: %0d cycles per frame, wire time %0d", b, t, wire_t));
      chk(frame_errs == 0 && frames >= 2, $sformatf("B=%0d: frames intact (%0d errors in %0d frames)", b, frame_errs, frames));
      k = (int'(t) + 999) / 1000;
      // 2: the smallest period
      run(b, k, 5, t2);
      ok_slots = slots;
      chk(slot_bad == 0, $sformatf("B=%0d k=%0d: slot structure kept (%0d of %0d slots overran)", b, k, slot_bad, ok_slots));
      chk(frame_errs == 0 && frames >= 5, $sformatf("B=%0d k=%0d: frames intact (%0d errors in %0d frames)", b, k, frame_errs, frames));
      chk(overruns_b == 0, $sformatf("B=%0d k=%0d: no overrun at node B", b, k));
      for (int i = 0; i < b / 4; i++) begin
        var_en[1] = 1; var_we[1] = 0; var_addr[1] = 12'('h400 + i);
        @(negedge clk);
        if (var_rdata[1] != var_a[i]) begin
          chk(0, $sformatf("B=%0d: node B word %0d = %h, want %h", b, i, var_rdata[1], var_a[i]));
          break;
        end
      end
      var_en[1] = 0;
      checks++;
      // 3: one time unit less must overrun
      if (k > 1) begin
        run(b, k - 1, 5, t2);
        chk(slot_bad > 0, $sformatf("B=%0d k=%0d: slot structure breaks", b, k - 1));
      end
      // the document's analytic model
      tot_ns = 10 * (13 + b / 4) + 80 * (36 + (b > 28 ? b : 28));
      k_model = int'((tot_ns + 9999) / 10000);
      chk(k - k_model <= 1 && k_model - k <= 1, $sformatf("B=%0d: %0d slots, model %0d", b, k, k_model));
      $display("B=%4d bytes: %5d cycles per frame, period %0d x 10 us, throughput %6d kB/s (model: %0d slots, %6d kB/s)",
               b, t, k, (b * 100000) / (1024 * k), k_model, (b * 100000) / (1024 * k_model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
