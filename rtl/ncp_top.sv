// Network Code Processor: one node.
//
// A co-processor that executes Network Code programs, time-triggered
// communication schedules for real-time Ethernet, in hardware so that their
// timing has no software jitter. The host loads a program and the variables;
// the processor then sends, receives and synchronises on its own, slot by
// slot, and interrupts the host when the program says so (signal()).
//
// Structure:
//   ncp_prog_mem      program store, read by the controller
//   ncp_controller    fetch/decode and concurrency control (dependence table)
//   execution units   ncp_create_unit, ncp_send_unit, ncp_receive_unit,
//                     ncp_sync_unit, ncp_timer (future() and time base),
//                     ncp_mode_unit, ncp_branch_unit (if()), ncp_counters;
//                     nop, halt and signal are handled in the controller
//   ncp_send_fifo     the single send buffer between create() and send()
//   ncp_mem_bus       32-bit internal bus to port A of ncp_var_mem
//   ncp_var_mem       variables; port B belongs to the host
//   ncp_rx_parser     separates guaranteed from best-effort received frames
//   ncp_rx_buffer     one byte buffer per channel for guaranteed traffic
//   ncp_byte_fifo x2  best-effort transmit and receive queues of the host
//   ncp_tx_arbiter    frame-level arbitration of the MAC transmit stream
// The Ethernet MAC and the host processor are outside: their interfaces are
// the mac_* and host-side ports.
//
// Interfaces (all synchronous to clk, reset active low and asynchronous):
//   host        start, program write port, variable port B (one-cycle read
//               latency), irq/irq_code/irq_ack, status (running, halted,
//               mode, now)
//   best effort be_tx_* write side of the transmit queue (commit on last),
//               be_rx_* first-word-fall-through read side of the receive queue
//   MAC         mac_tx_* valid/ready byte stream with end-of-frame flag,
//               mac_rx_* byte stream (valid, last), no back-pressure
//   events      one-cycle pulses for observation and performance counting
//
// Default sizes: 1024 instructions, 4096 variable words, 512-word send
// buffer, 4 channels of 2048 bytes, 2048-byte best-effort queues. The clock
// is meant to be 100 MHz and a time unit 1000 cycles (10 us), as in the
// document; memory sizes are this design's choices.
module ncp_top #(
  parameter int unsigned PROG_DEPTH  = 1024,
  parameter int unsigned VAR_WORDS   = 4096,
  parameter int unsigned SEND_WORDS  = 512,
  parameter int unsigned CHANNELS    = 4,
  parameter int unsigned RX_BYTES    = 2048,
  parameter int unsigned BE_BYTES    = 2048,
  parameter int unsigned QUANTUM     = 1000,
  parameter int unsigned NCNT        = 4,
  parameter logic [47:0] NODE_ADDR   = 48'h02_00_00_00_00_01,
  parameter int unsigned CREATE_SETUP = 7,
  parameter int unsigned SEND_SETUP   = 5,
  parameter int unsigned SEND_HDR     = 30,
  parameter int unsigned RECV_SETUP   = 31,
  parameter int unsigned PW = $clog2(PROG_DEPTH),
  parameter int unsigned AW = $clog2(VAR_WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // host: control and status
  input  logic          start,
  output logic          running,
  output logic          halted,
  output logic [1:0]    mode,
  output logic [31:0]   now,
  output logic          irq,
  output logic [7:0]    irq_code,
  input  logic          irq_ack,
  // host: program load
  input  logic          prog_we,
  input  logic [PW-1:0] prog_waddr,
  input  logic [63:0]   prog_wdata,
  // host: variable memory port
  input  logic          var_en,
  input  logic          var_we,
  input  logic [AW-1:0] var_addr,
  input  logic [31:0]   var_wdata,
  output logic [31:0]   var_rdata,
  // host: best-effort queues
  input  logic          be_tx_wr,
  input  logic [7:0]    be_tx_data,
  input  logic          be_tx_last,
  output logic          be_tx_full,
  output logic          be_rx_valid,
  output logic [7:0]    be_rx_data,
  output logic          be_rx_last,
  input  logic          be_rx_rd,
  // MAC
  output logic          mac_tx_valid,
  output logic          mac_tx_last,
  output logic [7:0]    mac_tx_data,
  input  logic          mac_tx_ready,
  input  logic          mac_rx_valid,
  input  logic          mac_rx_last,
  input  logic [7:0]    mac_rx_data,
  // events
  output logic          ev_overlap,
  output logic          ev_stall_w,
  output logic          ev_stall_b,
  output logic          ev_rx_overrun,
  output logic          ev_be_drop,
  output logic          ev_sync_ok,
  output logic          ev_sync_timeout,
  output logic          ev_mode_wait,
  output logic          ev_be_tx_start
);
  import ncp_pkg::*;

  localparam int unsigned CW = (CHANNELS > 1) ? $clog2(CHANNELS) : 1;
  localparam int unsigned BW = $clog2(RX_BYTES);
  localparam int unsigned SW = $clog2(SEND_WORDS);
  localparam int unsigned LW = 16;

  // ------------------------------------------------------------ controller
  logic [PW-1:0] prog_raddr;
  logic [63:0]   prog_rdata;
  logic          issue;
  instr_t        instr;
  logic [NUM_UNITS-1:0] unit_busy;
  logic          bus_busy, br_done, br_taken;
  logic          alarm_pending, alarm_ack;
  logic [PW-1:0] alarm_label, pc;

  ncp_prog_mem #(.DEPTH(PROG_DEPTH)) u_prog (
    .clk, .we(prog_we), .waddr(prog_waddr), .wdata(prog_wdata),
    .raddr(prog_raddr), .rdata(prog_rdata));

  ncp_controller #(.PW(PW)) u_ctrl (
    .clk, .rst_n, .start,
    .prog_addr(prog_raddr), .prog_rdata,
    .unit_busy, .bus_busy, .branch_done(br_done), .branch_taken(br_taken),
    .alarm_pending, .alarm_label, .alarm_ack,
    .issue, .instr, .running, .halted, .pc,
    .irq, .irq_code, .irq_ack,
    .ev_overlap, .ev_stall_w, .ev_stall_b);

  logic st_create, st_destroy, st_send, st_receive, st_sync, st_future, st_mode, st_if, st_count;
  assign st_create  = issue && instr.op == OP_CREATE;
  assign st_destroy = issue && instr.op == OP_DESTROY;
  assign st_send    = issue && instr.op == OP_SEND;
  assign st_receive = issue && instr.op == OP_RECEIVE;
  assign st_sync    = issue && instr.op == OP_SYNC;
  assign st_future  = issue && instr.op == OP_FUTURE;
  assign st_mode    = issue && instr.op == OP_MODE;
  assign st_if      = issue && instr.op == OP_IF;
  assign st_count   = issue && instr.op == OP_COUNT;

  // ------------------------------------------------------------- memories
  logic          cr_req, rv_req, rv_we, br_req;
  logic [AW-1:0] cr_addr, rv_addr, br_addr;
  logic [31:0]   rv_wdata;
  logic          ma_en, ma_we;
  logic [AW-1:0] ma_addr;
  logic [31:0]   ma_wdata, ma_rdata;

  ncp_mem_bus #(.AW(AW)) u_bus (
    .clk, .rst_n,
    .cr_req, .cr_addr, .rv_req, .rv_we, .rv_addr, .rv_wdata, .br_req, .br_addr,
    .mem_en(ma_en), .mem_we(ma_we), .mem_addr(ma_addr), .mem_wdata(ma_wdata),
    .bus_busy);

  ncp_var_mem #(.WORDS(VAR_WORDS)) u_var (
    .clk,
    .a_en(ma_en), .a_we(ma_we), .a_addr(ma_addr), .a_wdata(ma_wdata), .a_rdata(ma_rdata),
    .b_en(var_en), .b_we(var_we), .b_addr(var_addr), .b_wdata(var_wdata), .b_rdata(var_rdata));

  // --------------------------------------------------- create / send buffer
  logic          cr_busy, f_wr, f_rd, f_rvalid, f_empty, f_full, msg_set, msg_done, msg_present;
  logic [31:0]   f_wdata, f_rdata;
  logic [LW-1:0] msg_set_len, msg_len;
  logic [SW:0]   f_count;

  ncp_create_unit #(.AW(AW), .LW(LW), .SETUP(CREATE_SETUP)) u_create (
    .clk, .rst_n, .start(st_create), .base(AW'(instr.a)), .len(instr.b), .busy(cr_busy),
    .bus_req(cr_req), .bus_addr(cr_addr), .bus_rdata(ma_rdata),
    .fifo_wr(f_wr), .fifo_wdata(f_wdata), .msg_set, .msg_len(msg_set_len));

  ncp_send_fifo #(.DEPTH(SEND_WORDS), .LW(LW)) u_sbuf (
    .clk, .rst_n, .wr_en(f_wr), .wdata(f_wdata), .rd_en(f_rd), .rdata(f_rdata),
    .rvalid(f_rvalid), .empty(f_empty), .full(f_full), .count(f_count),
    .msg_set, .msg_set_len, .msg_clear(msg_done), .flush(st_destroy),
    .msg_present, .msg_len);

  logic          sd_busy, sd_valid, sd_last, sd_ready;
  logic [7:0]    sd_data;

  ncp_send_unit #(.LW(LW), .CW(8), .SETUP(SEND_SETUP), .HDR_CYCLES(SEND_HDR)) u_send (
    .clk, .rst_n, .start(st_send), .channel(instr.a[7:0]), .src_addr(NODE_ADDR),
    .busy(sd_busy), .msg_len, .fifo_empty(f_empty), .fifo_rd(f_rd), .fifo_rdata(f_rdata),
    .fifo_rvalid(f_rvalid), .msg_done,
    .tx_valid(sd_valid), .tx_last(sd_last), .tx_data(sd_data), .tx_ready(sd_ready));

  // ------------------------------------------------------------ receive side
  logic                rb_we;
  logic [CW-1:0]       rb_wch, rv_ch;
  logic [BW-1:0]       rb_waddr, rb_raddr;
  logic [7:0]          rb_wdata, rb_rdata;
  logic [CHANNELS-1:0] rx_flags;
  logic [LW-1:0]       rx_len [CHANNELS];
  logic                rx_consume, rx_event;
  logic [CW-1:0]       rx_event_ch;
  logic                berx_wr, berx_last, berx_discard, berx_full;
  logic [7:0]          berx_data;
  logic [$clog2(BE_BYTES):0] berx_frames, betx_frames;

  ncp_rx_parser #(.CHANNELS(CHANNELS), .BYTES(RX_BYTES), .LW(LW)) u_rxp (
    .clk, .rst_n, .rx_valid(mac_rx_valid), .rx_last(mac_rx_last), .rx_data(mac_rx_data),
    .buf_we(rb_we), .buf_ch(rb_wch), .buf_addr(rb_waddr), .buf_data(rb_wdata),
    .rx_flags, .rx_len, .rx_consume, .rx_consume_ch(rv_ch), .rx_event, .rx_event_ch,
    .overrun(ev_rx_overrun),
    .be_wr(berx_wr), .be_data(berx_data), .be_last(berx_last), .be_discard(berx_discard),
    .be_full(berx_full), .be_dropped(ev_be_drop));

  ncp_rx_buffer #(.CHANNELS(CHANNELS), .BYTES(RX_BYTES)) u_rxbuf (
    .clk, .we(rb_we), .wch(rb_wch), .waddr(rb_waddr), .wdata(rb_wdata),
    .rch(rv_ch), .raddr(rb_raddr), .rdata(rb_rdata));

  logic rv_busy;
  ncp_receive_unit #(.AW(AW), .LW(LW), .CW(CW), .BW(BW), .SETUP(RECV_SETUP)) u_receive (
    .clk, .rst_n, .start(st_receive), .channel(CW'(instr.a)), .base(AW'(instr.b)), .vlen(instr.c),
    .busy(rv_busy), .msg_valid(rx_flags[rv_ch]), .msg_len(rx_len[rv_ch]), .sel_ch(rv_ch),
    .rx_consume, .rbuf_addr(rb_raddr), .rbuf_rdata(rb_rdata),
    .bus_req(rv_req), .bus_we(rv_we), .bus_addr(rv_addr), .bus_wdata(rv_wdata));

  ncp_byte_fifo #(.DEPTH(BE_BYTES)) u_be_rx (
    .clk, .rst_n, .wr_en(berx_wr), .wr_data(berx_data), .wr_last(berx_last),
    .wr_discard(berx_discard), .wr_full(berx_full),
    .rd_valid(be_rx_valid), .rd_data(be_rx_data), .rd_last(be_rx_last), .rd_en(be_rx_rd),
    .frames(berx_frames));

  // ------------------------------------------------------- time, sync, mode
  logic tick, realign, tm_busy, sy_busy, sync_ok, md_busy, tx_active;
  mode_e mode_q;

  ncp_timer #(.QUANTUM(QUANTUM), .TW(32), .PW(PW)) u_timer (
    .clk, .rst_n, .realign, .tick, .now,
    .start(st_future), .delay(instr.a), .label(PW'(instr.b)), .busy(tm_busy),
    .alarm_pending, .alarm_label, .alarm_ack);

  ncp_sync_unit #(.CW(CW), .TW(16)) u_sync (
    .clk, .rst_n, .start(st_sync), .channel(CW'(instr.a)), .timeout(instr.b), .tick,
    .rx_event, .rx_event_ch, .busy(sy_busy), .status_ok(sync_ok), .realign,
    .timed_out(ev_sync_timeout));
  assign ev_sync_ok = realign;

  ncp_mode_unit u_mode (
    .clk, .rst_n, .start(st_mode), .new_mode(mode_e'(instr.a[1:0])),
    .tx_active(tx_active || sd_busy), .busy(md_busy), .mode(mode_q), .waited(ev_mode_wait));
  assign mode = mode_q;

  // ----------------------------------------------------- branches, counters
  logic [15:0] cnt [NCNT];
  logic        br_busy;

  ncp_counters #(.N(NCNT), .W(16)) u_cnt (
    .clk, .rst_n, .op_en(st_count), .op(cnt_op_e'(instr.sub[1:0])),
    .idx(instr.a[$clog2(NCNT)-1:0]), .value(instr.b), .cnt);

  ncp_branch_unit #(.AW(AW), .CHANNELS(CHANNELS), .NCNT(NCNT), .CNTW(16)) u_branch (
    .clk, .rst_n, .start(st_if), .guard(guard_e'(instr.sub[3:0])), .op1(instr.b), .op2(instr.c),
    .busy(br_busy), .done(br_done), .taken(br_taken),
    .sync_ok, .send_buf_empty(!msg_present), .rx_flags, .cnt,
    .bus_req(br_req), .bus_addr(br_addr), .bus_rdata(ma_rdata));

  // ----------------------------------------------------------- transmit side
  logic       betx_valid, betx_last, betx_rd;
  logic [7:0] betx_data;

  ncp_byte_fifo #(.DEPTH(BE_BYTES)) u_be_tx (
    .clk, .rst_n, .wr_en(be_tx_wr), .wr_data(be_tx_data), .wr_last(be_tx_last),
    .wr_discard(1'b0), .wr_full(be_tx_full),
    .rd_valid(betx_valid), .rd_data(betx_data), .rd_last(betx_last), .rd_en(betx_rd),
    .frames(betx_frames));

  ncp_tx_arbiter u_txarb (
    .clk, .rst_n, .mode(mode_q),
    .nc_valid(sd_valid), .nc_last(sd_last), .nc_data(sd_data), .nc_ready(sd_ready),
    .be_valid(betx_valid), .be_last(betx_last), .be_data(betx_data), .be_rd(betx_rd),
    .tx_valid(mac_tx_valid), .tx_last(mac_tx_last), .tx_data(mac_tx_data), .tx_ready(mac_tx_ready),
    .tx_active, .be_frame_start(ev_be_tx_start));

  // unit status for the controller (nop and halt are tracked inside it)
  always_comb begin
    unit_busy            = '0;
    unit_busy[U_CREATE]  = cr_busy;
    unit_busy[U_SEND]    = sd_busy;
    unit_busy[U_RECEIVE] = rv_busy;
    unit_busy[U_SYNC]    = sy_busy;
    unit_busy[U_FUTURE]  = tm_busy;
    unit_busy[U_MODE]    = md_busy;
    unit_busy[U_IF]      = br_busy;
  end
endmodule
