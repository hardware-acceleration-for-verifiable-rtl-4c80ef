// Network Code Processor (NCP) shared definitions.
//
// The NCP is a superscalar processor for Network Code, a small language that
// describes time-triggered communication schedules. Every instruction has its
// own execution unit ("microcode block"); a controller issues one instruction
// per cycle and lets it overlap with those still running whenever the
// dependence table allows it.
//
// This package holds what the modules share: the opcode and guard encodings,
// the operating modes, the 64-bit instruction word, the frame header format
// and the dependence table (Table 2 of the Network Code Processor design,
// reproduced in dep_action()). The instruction set (create, send, receive,
// sync, halt, future, mode, if, nop) follows the language; destroy, signal
// and the counter instruction are the hardware additions described for the
// processor. All bit encodings, field positions and the frame header layout
// are this design's own choices.
package ncp_pkg;

  // ---------------------------------------------------------------- opcodes
  typedef enum logic [3:0] {
    OP_NOP     = 4'd0,
    OP_CREATE  = 4'd1,
    OP_SEND    = 4'd2,
    OP_RECEIVE = 4'd3,
    OP_SYNC    = 4'd4,
    OP_HALT    = 4'd5,
    OP_FUTURE  = 4'd6,
    OP_MODE    = 4'd7,
    OP_IF      = 4'd8,
    OP_DESTROY = 4'd9,
    OP_SIGNAL  = 4'd10,
    OP_COUNT   = 4'd11
  } opcode_e;

  // Execution units tracked by the concurrency controller (one per Table 2
  // column). destroy shares the create column, signal/count share nop.
  typedef enum logic [3:0] {
    U_NOP     = 4'd0,
    U_CREATE  = 4'd1,
    U_SEND    = 4'd2,
    U_RECEIVE = 4'd3,
    U_SYNC    = 4'd4,
    U_HALT    = 4'd5,
    U_FUTURE  = 4'd6,
    U_MODE    = 4'd7,
    U_IF      = 4'd8
  } unit_e;
  localparam int unsigned NUM_UNITS = 9;

  // Branch guards of if(guard, target, ...).
  typedef enum logic [3:0] {
    G_ALWAYS_TRUE       = 4'd0,
    G_ALWAYS_FALSE      = 4'd1,
    G_TEST_VAR          = 4'd2,  // var[op1] != 0
    G_GREATER_VAR_VAR   = 4'd3,  // var[op1] >  var[op2]
    G_COMPARE_VAR_VAR   = 4'd4,  // var[op1] == var[op2]
    G_LESS_VAR_VAR      = 4'd5,  // var[op1] <  var[op2]
    G_STATUS_TEST       = 4'd6,  // last sync() saw its packet
    G_SEND_BUFFER_EMPTY = 4'd7,  // send buffer holds no message
    G_MSG_RECEIVED      = 4'd8,  // channel op1 holds an unread message
    G_COUNTER_EQ        = 4'd9,  // counter[op1] == op2
    G_COUNTER_LESS      = 4'd10  // counter[op1] <  op2
  } guard_e;

  // Operating modes of the run-time system.
  typedef enum logic [1:0] {
    MODE_INIT = 2'd0,
    MODE_SOFT = 2'd1,
    MODE_HARD = 2'd2,
    MODE_SYNC = 2'd3
  } mode_e;

  // Counter instruction operations.
  typedef enum logic [1:0] {
    CNT_RESET = 2'd0,
    CNT_SET   = 2'd1,
    CNT_INC   = 2'd2,
    CNT_DEC   = 2'd3
  } cnt_op_e;

  // 64-bit instruction word.
  //   create : a = variable base (word address), b = length in words
  //   send   : a = channel
  //   receive: a = channel, b = variable base, c = variable length (words)
  //   sync   : a = channel, b = timeout in time units
  //   future : a = delay in time units, b = label (program address)
  //   mode   : a[1:0] = mode_e
  //   if     : sub = guard_e, a = target, b = operand 1, c = operand 2
  //   signal : a[7:0] = code reported to the host
  //   count  : sub[1:0] = cnt_op_e, a = counter index, b = value
  typedef struct packed {
    opcode_e     op;   // [63:60]
    logic [11:0] sub;  // [59:48]
    logic [15:0] c;    // [47:32]
    logic [15:0] b;    // [31:16]
    logic [15:0] a;    // [15:0]
  } instr_t;

  // Dependence actions of Table 2.
  typedef enum logic [1:0] {
    DEP_C = 2'd0,  // continue: may overlap
    DEP_W = 2'd1,  // wait until the running instruction has finished
    DEP_B = 2'd2   // wait until the internal memory bus is free
  } dep_e;

  // Table 2: for the sequence "x(); y();" the running instruction x selects
  // the column and the instruction y to be issued selects the row.
  function automatic dep_e dep_action(unit_e y, unit_e x);
    // Each row lists columns nop, create, send, receive, sync, halt, future,
    // mode, if.
    localparam logic [1:0] C = 2'd0, W = 2'd1, B = 2'd2;
    logic [17:0] row;
    case (y)
      U_NOP:     row = {W, C, C, C, C, W, C, W, C};
      U_CREATE:  row = {W, W, C, B, C, W, C, W, W};
      U_SEND:    row = {W, C, W, C, W, W, C, W, W};
      U_RECEIVE: row = {W, B, C, W, W, W, C, W, W};
      U_SYNC:    row = {W, C, W, C, W, W, C, W, W};
      U_HALT:    row = {W, C, C, C, W, W, C, W, W};
      U_FUTURE:  row = {W, C, C, C, C, W, W, W, W};
      U_MODE:    row = {W, C, W, W, W, W, C, W, W};
      U_IF:      row = {W, B, C, B, W, W, C, W, W};
      default:   row = {NUM_UNITS{W}};
    endcase
    // Column nop is the most significant entry.
    return dep_e'(row[2*(NUM_UNITS-1-int'(x)) +: 2]);
  endfunction

  // Which Table 2 row/column an opcode uses.
  function automatic unit_e unit_of(opcode_e op);
    case (op)
      OP_CREATE, OP_DESTROY: return U_CREATE;
      OP_SEND:               return U_SEND;
      OP_RECEIVE:            return U_RECEIVE;
      OP_SYNC:               return U_SYNC;
      OP_HALT:               return U_HALT;
      OP_FUTURE:             return U_FUTURE;
      OP_MODE:               return U_MODE;
      OP_IF:                 return U_IF;
      default:               return U_NOP;  // nop, signal, count
    endcase
  endfunction

  // Guards that read the variable memory through the internal bus.
  function automatic logic guard_uses_bus(guard_e g);
    return g inside {G_TEST_VAR, G_GREATER_VAR_VAR, G_COMPARE_VAR_VAR,
                     G_LESS_VAR_VAR};
  endfunction

  // ------------------------------------------------------------ frame format
  // Network Code frame as handed to the MAC (preamble and FCS are the MAC's):
  //   bytes 0..5   destination address (broadcast)
  //   bytes 6..11  source address
  //   bytes 12..13 EtherType NC_ETHERTYPE
  //   byte  14     channel
  //   byte  15     reserved (0)
  //   bytes 16..17 payload length in 32-bit words, most significant byte first
  //   bytes 18..   payload, each word most significant byte first
  localparam logic [15:0] NC_ETHERTYPE = 16'h88B5;
  localparam int unsigned HDR_BYTES    = 18;

  // Byte stream to and from the MAC.
  typedef struct packed {
    logic       valid;
    logic       last;
    logic [7:0] data;
  } byte_stream_t;

endpackage
