// if() execution unit (branch guards) of the Network Code Processor.
//
// if(guard, target) jumps to target when the guard holds and falls through
// otherwise. The hardware offers a fixed set of guards in three groups:
//   value comparators   compare words of the variable memory, read over the
//                       internal memory bus (TestVar, GreaterVarVar,
//                       CompareVarVar, LessVarVar; unsigned);
//   state comparators   test status bits: the outcome of the last sync()
//                       (StatusTest), an empty send buffer (SendBufferEmpty),
//                       an unread message on a channel (MsgReceived);
//   counter comparators compare a program counter with a constant
//                       (CounterEq, CounterLess);
// plus AlwaysTrue and AlwaysFalse. Operand meanings per guard are listed in
// ncp_pkg::guard_e.
//
// Timing: a value comparison is busy for 3 cycles (read operand 1, read
// operand 2, compare) and holds the memory bus meanwhile; every other guard is
// busy for 1 cycle. done pulses with taken in the last busy cycle. The guard
// names follow the document; operand encodings, MsgReceived and the counter
// comparisons' exact forms are this design's choices.
module ncp_branch_unit #(
  parameter int unsigned AW       = 12,
  parameter int unsigned CHANNELS = 4,
  parameter int unsigned NCNT     = 4,
  parameter int unsigned CNTW     = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  ncp_pkg::guard_e     guard,
  input  logic [15:0]         op1,
  input  logic [15:0]         op2,
  output logic                busy,
  output logic                done,
  output logic                taken,
  // status inputs
  input  logic                sync_ok,
  input  logic                send_buf_empty,
  input  logic [CHANNELS-1:0] rx_flags,
  input  logic [CNTW-1:0]     cnt [NCNT],
  // internal memory bus (read only)
  output logic                bus_req,
  output logic [AW-1:0]       bus_addr,
  input  logic [31:0]         bus_rdata
);
  import ncp_pkg::*;

  localparam int unsigned CHW = (CHANNELS > 1) ? $clog2(CHANNELS) : 1;
  localparam int unsigned NIW = (NCNT > 1) ? $clog2(NCNT) : 1;

  typedef enum logic [2:0] {S_IDLE, S_EVAL, S_RD1, S_RD2, S_CMP} state_e;
  state_e      state;
  guard_e      g_q;
  logic [15:0] op1_q, op2_q;
  logic [31:0] v1;
  logic        result;

  assign busy     = (state != S_IDLE);
  assign bus_req  = (state == S_RD1) || (state == S_RD2) || (state == S_CMP);
  assign bus_addr = (state == S_RD1) ? AW'(op1_q) : AW'(op2_q);
  assign done     = (state == S_EVAL) || (state == S_CMP);
  assign taken    = done && result;

  always_comb begin
    result = 1'b0;
    case (g_q)
      G_ALWAYS_TRUE:       result = 1'b1;
      G_ALWAYS_FALSE:      result = 1'b0;
      G_TEST_VAR:          result = (v1 != '0);
      G_GREATER_VAR_VAR:   result = (v1 >  bus_rdata);
      G_COMPARE_VAR_VAR:   result = (v1 == bus_rdata);
      G_LESS_VAR_VAR:      result = (v1 <  bus_rdata);
      G_STATUS_TEST:       result = sync_ok;
      G_SEND_BUFFER_EMPTY: result = send_buf_empty;
      G_MSG_RECEIVED:      result = (int'(op1_q) < CHANNELS) && rx_flags[op1_q[CHW-1:0]];
      G_COUNTER_EQ:        result = (int'(op1_q) < NCNT) && (cnt[op1_q[NIW-1:0]] == CNTW'(op2_q));
      G_COUNTER_LESS:      result = (int'(op1_q) < NCNT) && (cnt[op1_q[NIW-1:0]] <  CNTW'(op2_q));
      default:             result = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      g_q   <= G_ALWAYS_FALSE;
      op1_q <= '0;
      op2_q <= '0;
      v1    <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          g_q   <= guard;
          op1_q <= op1;
          op2_q <= op2;
          state <= guard_uses_bus(guard) ? S_RD1 : S_EVAL;
        end
        S_RD1: state <= S_RD2;
        S_RD2: begin
          v1    <= bus_rdata;
          state <= S_CMP;
        end
        default: state <= S_IDLE;  // S_EVAL, S_CMP
      endcase
    end
  end
endmodule
