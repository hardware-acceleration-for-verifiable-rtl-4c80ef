// Concurrency controller of the Network Code Processor.
//
// The controller fetches Network Code instructions, decodes them and starts
// the execution unit of each. It issues at most one instruction per cycle and
// lets it run alongside those already running whenever the dependence table
// (ncp_pkg::dep_action, Table 2 of the design) allows: for the instruction to
// be issued (row) and each unit that is still running (column) the table says
// continue, wait until that unit has finished, or wait until the internal
// memory bus is free. If any running unit demands a wait, the instruction
// stays in decode and is re-checked every cycle; as soon as it issues, the
// next instruction is decoded in the following cycle.
//
// Control flow: if() hands its guard to the branch unit and the controller
// waits for the outcome before fetching again (one refetch cycle). halt() is
// busy for two cycles and then stops the processor until the alarm armed by
// an earlier future() fires; execution resumes at the alarm's label. nop(),
// signal() and the counter instruction take one cycle and use the nop row and
// column of the table; signal() raises the host interrupt (held until
// irq_ack) with an 8-bit code. destroy() uses the create() row and column
// and, beyond the table, also waits for a running send(), since both touch
// the send buffer.
//
// Interface: start (pulse) begins execution at address 0. The program memory
// is read synchronously (prog_addr now, prog_rdata next cycle). issue pulses
// for one cycle with the decoded instruction on instr; the execution units
// decode their own start from it. ev_* pulse for the testbench and
// performance counting: an overlapped issue, a cycle stalled on a 'w' entry,
// a cycle stalled on a 'b' entry.
module ncp_controller #(
  parameter int unsigned PW = 10
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  // program memory
  output logic [PW-1:0]                 prog_addr,
  input  logic [63:0]                   prog_rdata,
  // unit status
  input  logic [ncp_pkg::NUM_UNITS-1:0] unit_busy,   // nop and halt entries are ignored
  input  logic                          bus_busy,
  input  logic                          branch_done,
  input  logic                          branch_taken,
  input  logic                          alarm_pending,
  input  logic [PW-1:0]                 alarm_label,
  output logic                          alarm_ack,
  // issue
  output logic                          issue,
  output ncp_pkg::instr_t               instr,
  // status
  output logic                          running,
  output logic                          halted,
  output logic [PW-1:0]                 pc,
  output logic                          irq,
  output logic [7:0]                    irq_code,
  input  logic                          irq_ack,
  // events
  output logic                          ev_overlap,
  output logic                          ev_stall_w,
  output logic                          ev_stall_b
);
  import ncp_pkg::*;

  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_DECODE, S_BRANCH, S_HALT} state_e;
  state_e state;

  logic                 nop_busy;
  logic [1:0]           halt_cnt;
  logic [NUM_UNITS-1:0] busy;
  unit_e                y;
  logic                 needs_bus;
  logic                 stall_w, stall_b;

  assign instr = instr_t'(prog_rdata);
  assign y     = unit_of(instr.op);

  always_comb begin
    busy          = unit_busy;
    busy[U_NOP]   = nop_busy;
    busy[U_HALT]  = (halt_cnt != 2'd0);
  end

  always_comb begin
    needs_bus = (instr.op == OP_CREATE) || (instr.op == OP_RECEIVE) ||
                ((instr.op == OP_IF) && guard_uses_bus(guard_e'(instr.sub[3:0])));
    stall_w = 1'b0;
    stall_b = 1'b0;
    for (int x = 0; x < NUM_UNITS; x++) begin
      if (busy[x]) begin
        case (dep_action(y, unit_e'(x)))
          DEP_W:   stall_w = 1'b1;
          DEP_B:   if (bus_busy) stall_b = 1'b1;
          default: ;
        endcase
      end
    end
    if (needs_bus && bus_busy) stall_b = 1'b1;
    if ((instr.op == OP_DESTROY) && busy[U_SEND]) stall_w = 1'b1;
  end

  assign issue      = (state == S_DECODE) && !stall_w && !stall_b;
  assign ev_overlap = issue && (busy != '0);
  assign ev_stall_w = (state == S_DECODE) && stall_w;
  assign ev_stall_b = (state == S_DECODE) && !stall_w && stall_b;
  assign running    = (state != S_IDLE);
  assign halted     = (state == S_HALT);
  assign alarm_ack  = (state == S_HALT) && (halt_cnt == 2'd0) && alarm_pending;

  // fetch address: the next instruction as soon as the current one issues
  always_comb begin
    prog_addr = pc;
    if (issue && instr.op != OP_IF && instr.op != OP_HALT) prog_addr = pc + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      pc       <= '0;
      nop_busy <= 1'b0;
      halt_cnt <= '0;
      irq      <= 1'b0;
      irq_code <= '0;
    end else begin
      nop_busy <= issue && (y == U_NOP);
      if (halt_cnt != 2'd0) halt_cnt <= halt_cnt - 1'b1;
      if (irq_ack) irq <= 1'b0;
      if (issue && instr.op == OP_SIGNAL) begin
        irq      <= 1'b1;
        irq_code <= instr.a[7:0];
      end
      case (state)
        S_IDLE: if (start) begin
          pc    <= '0;
          state <= S_FETCH;
        end
        S_FETCH: state <= S_DECODE;
        S_DECODE: if (issue) begin
          case (instr.op)
            OP_IF:   state <= S_BRANCH;
            OP_HALT: begin
              halt_cnt <= 2'd2;
              state    <= S_HALT;
            end
            default: pc <= pc + 1'b1;
          endcase
        end
        S_BRANCH: if (branch_done) begin
          pc    <= branch_taken ? PW'(instr.a) : pc + 1'b1;
          state <= S_FETCH;
        end
        S_HALT: if (alarm_ack) begin
          pc    <= alarm_label;
          state <= S_FETCH;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
