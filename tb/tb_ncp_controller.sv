// Testbench for ncp_controller: the execution units are replaced by models
// that stay busy for a chosen number of cycles (create and receive hold the
// memory bus while busy). The dependence table is written out again here,
// from the document's Table 2, independently of the package.
//  1. For every pair "x(); y();" (x not if/halt) it measures the cycles
//     between the issue of x and of y and compares them with the table:
//     1 cycle for 'c', x's run time + 1 for 'w' and 'b'.
//  2. if() taken and not taken, halt() with resume at the alarm label,
//     signal() with interrupt and code.
//  3. The document's example program (create, send, receive, future, halt
//     with 128-word variables: 135/547/543/3/2 cycles): the processor must
//     halt within 145 cycles and all units must finish within 682 cycles,
//     the figures the document gives for the superscalar schedule, against
//     1230 cycles sequentially.
module tb_ncp_controller;
  import ncp_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [9:0] prog_addr, alarm_label = 0, pc;
  logic [63:0] prog_rdata;
  logic [NUM_UNITS-1:0] unit_busy;
  logic bus_busy, branch_done, branch_taken, alarm_pending = 0, alarm_ack, issue;
  instr_t instr;
  logic running, halted, irq, irq_ack = 0, ev_overlap, ev_stall_w, ev_stall_b;
  logic [7:0] irq_code;
  int checks = 0, failures = 0;

  ncp_controller dut (.*);
  always #5 clk = ~clk;

  instr_t prog [1024];
  always @(posedge clk) prog_rdata <= prog[prog_addr];

  // unit models
  int dur [NUM_UNITS];
  int left [NUM_UNITS];
  logic if_bus, if_taken;
  int cyc = 0;
  int issue_cyc[$];
  opcode_e issue_op[$];
  int last_busy_cyc;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) begin
      for (int u = 0; u < NUM_UNITS; u++) left[u] <= 0;
    end else begin
      for (int u = 0; u < NUM_UNITS; u++) if (left[u] != 0) left[u] <= left[u] - 1;
      if (issue) begin
        issue_cyc.push_back(cyc);
        issue_op.push_back(instr.op);
        if (unit_of(instr.op) != U_NOP && unit_of(instr.op) != U_HALT)
          left[unit_of(instr.op)] <= dur[unit_of(instr.op)];
        if (instr.op == OP_IF) begin
          if_bus   <= guard_uses_bus(guard_e'(instr.sub[3:0]));
          if_taken <= guard_e'(instr.sub[3:0]) == G_ALWAYS_TRUE;
        end
      end
      if (unit_busy != '0) last_busy_cyc <= cyc;
    end
  end
  always_comb begin
    for (int u = 0; u < NUM_UNITS; u++) unit_busy[u] = (left[u] != 0);
    bus_busy     = unit_busy[U_CREATE] || unit_busy[U_RECEIVE] || (unit_busy[U_IF] && if_bus);
    branch_done  = (left[U_IF] == 1);
    branch_taken = branch_done && if_taken;
  end

  // Table 2, rows = second instruction, columns = nop create send receive
  // sync halt future mode if
  string table2 [9] = '{
    "wccccwcwc",  // nop
    "wwcbcwcww",  // create
    "wcwcwwcww",  // send
    "wbcwwwcww",  // receive
    "wcwcwwcww",  // sync
    "wcccwwcww",  // halt
    "wccccwwww",  // future
    "wcwwwwcww",  // mode
    "wbcbwwcww"   // if
  };
  opcode_e op_of_unit [9] = '{OP_NOP, OP_CREATE, OP_SEND, OP_RECEIVE, OP_SYNC, OP_HALT, OP_FUTURE, OP_MODE, OP_IF};

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic instr_t mk(opcode_e op, int sub = 0, int a = 0, int b = 0, int c = 0);
    instr_t i;
    i.op = op; i.sub = 12'(sub); i.a = 16'(a); i.b = 16'(b); i.c = 16'(c);
    return i;
  endfunction

  task automatic restart();
    rst_n = 0;
    issue_cyc.delete(); issue_op.delete();
    alarm_pending = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nw = 0, nb = 0, nc = 0;
    for (int u = 0; u < NUM_UNITS; u++) dur[u] = 6;
    dur[U_IF] = 2;
    // 1. pair sweep
    for (int x = 0; x < 9; x++) begin
      if (x == 5 || x == 8) continue;  // halt and if change control flow
      for (int y = 0; y < 9; y++) begin
        int gap, want, dx;
        byte e;
        if (y == 5) continue;
        prog[0] = mk(op_of_unit[x], 0, 1, 4);
        prog[1] = mk(op_of_unit[y], (y == 8) ? int'(G_ALWAYS_FALSE) : 0, 1, 4);
        prog[2] = mk(OP_HALT);
        restart();
        repeat (30) @(negedge clk);
        e = table2[y][x];
        dx = (x == 0) ? 1 : dur[x];
        want = (e == "c") ? 1 : dx + 1;
        if (e == "w") nw++; else if (e == "b") nb++; else nc++;
        chk(issue_cyc.size() >= 2, "both issued");
        if (issue_cyc.size() >= 2) begin
          gap = issue_cyc[1] - issue_cyc[0];
          chk(gap == want, $sformatf("%s then %s: gap %0d want %0d ('%c')",
                                     op_of_unit[x].name(), op_of_unit[y].name(), gap, want, e));
        end
      end
    end
    chk(nw > 0 && nb > 0 && nc > 0, "all three kinds of entries exercised");
    // 2a. if taken / not taken
    prog[0] = mk(OP_IF, G_ALWAYS_TRUE, 5);
    prog[1] = mk(OP_SIGNAL, 0, 8'h11);
    prog[2] = mk(OP_HALT);
    prog[5] = mk(OP_SIGNAL, 0, 8'h22);
    prog[6] = mk(OP_HALT);
    restart();
    repeat (20) @(negedge clk);
    chk(irq && irq_code == 8'h22 && halted, "if taken jumps, signal raises irq");
    irq_ack = 1; @(negedge clk); irq_ack = 0;
    chk(!irq, "irq acknowledged");
    prog[0] = mk(OP_IF, G_ALWAYS_FALSE, 5);
    restart();
    repeat (20) @(negedge clk);
    chk(irq && irq_code == 8'h11, "if not taken falls through");
    irq_ack = 1; @(negedge clk); irq_ack = 0;
    // 2b. halt waits for the alarm and resumes at its label
    prog[0] = mk(OP_HALT);
    prog[1] = mk(OP_SIGNAL, 0, 8'h33);
    prog[9] = mk(OP_SIGNAL, 0, 8'h44);
    prog[10] = mk(OP_HALT);
    restart();
    repeat (40) @(negedge clk);
    chk(halted && issue_cyc.size() == 1 && !irq, "halted until alarm");
    alarm_label = 10'd9; alarm_pending = 1;
    @(negedge clk);
    while (!alarm_ack) @(negedge clk);
    @(negedge clk); alarm_pending = 0;
    repeat (10) @(negedge clk);
    chk(irq && irq_code == 8'h44 && halted, "resumed at alarm label");
    irq_ack = 1; @(negedge clk); irq_ack = 0;
    // 3. the document's example program
    dur[U_CREATE] = 135; dur[U_SEND] = 547; dur[U_RECEIVE] = 543; dur[U_FUTURE] = 3;
    prog[0] = mk(OP_CREATE, 0, 12'h100, 128);
    prog[1] = mk(OP_SEND, 0, 1);
    prog[2] = mk(OP_RECEIVE, 0, 0, 12'h000, 128);
    prog[3] = mk(OP_FUTURE, 0, 1, 0);
    prog[4] = mk(OP_HALT);
    restart();
    begin
      int t0, th;
      while (issue_cyc.size() == 0) @(negedge clk);  // first issue
      t0 = issue_cyc[0];
      th = -1;
      for (int i = 0; i < 1000; i++) begin
        if (halted && th < 0) th = cyc - t0;
        @(negedge clk);
      end
      chk(issue_cyc.size() == 5, "five instructions issued");
      chk(issue_cyc[1] - t0 == 1, "send overlaps create");
      chk(issue_cyc[2] - t0 == 136, $sformatf("receive waits for the bus: %0d", issue_cyc[2] - t0));
      chk(th > 0 && th <= 145, $sformatf("halted after %0d cycles (document: 145)", th));
      chk(last_busy_cyc - t0 + 1 <= 682, $sformatf("all done after %0d cycles (document: 682)", last_busy_cyc - t0 + 1));
      $display("example: halted after %0d cycles, all units done after %0d cycles", th, last_busy_cyc - t0 + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
