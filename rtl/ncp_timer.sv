// Time base and future() execution unit of the Network Code Processor.
//
// Network Code is time triggered: future(delay, label) arms an alarm that,
// delay time units later, wakes the processor from halt() and resumes it at
// label. A time unit is QUANTUM clock cycles: 1000 cycles, 10 us at the
// document's 100 MHz clock, the document's 100 kHz program resolution. The
// time base counts cycles within the unit and whole units (now); tick pulses
// in the last cycle of each unit. An alarm armed in unit T with delay d
// fires when the count reaches T + d, i.e. at the start of slot T + d, which
// keeps programs aligned to the slot structure. As in the document's hardware
// there is one alarm only: a second future() replaces the first.
//
// The future() unit takes three cycles (busy for 3 cycles after start, as the
// document states): latch the operands, add the delay to the current time,
// arm. alarm_pending stays high with alarm_label until the controller takes it
// (alarm_ack). realign (from sync()) restarts the current time unit.
module ncp_timer #(
  parameter int unsigned QUANTUM = 1000,
  parameter int unsigned TW      = 32,
  parameter int unsigned PW      = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          realign,
  output logic          tick,
  output logic [TW-1:0] now,
  // future() unit
  input  logic          start,
  input  logic [15:0]   delay,
  input  logic [PW-1:0] label,
  output logic          busy,
  // alarm towards the controller
  output logic          alarm_pending,
  output logic [PW-1:0] alarm_label,
  input  logic          alarm_ack
);
  localparam int unsigned QW = (QUANTUM > 1) ? $clog2(QUANTUM) : 1;
  logic [QW-1:0] sub;
  logic [1:0]    step;       // 0 idle, 1 latched, 2 added
  logic [15:0]   delay_q;
  logic [PW-1:0] label_q;
  logic [TW-1:0] target, alarm_time;
  logic          armed;
  logic          armed_wr;   // third cycle: write the alarm registers
  logic [TW-1:0] since;      // now - alarm_time, negative until the alarm is due

  assign tick = (sub == QW'(QUANTUM - 1));
  assign busy = (step != 2'd0) || armed_wr;

  assign since = now - alarm_time;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sub           <= '0;
      now           <= '0;
      step          <= '0;
      armed_wr      <= 1'b0;
      delay_q       <= '0;
      label_q       <= '0;
      target        <= '0;
      alarm_time    <= '0;
      armed         <= 1'b0;
      alarm_pending <= 1'b0;
      alarm_label   <= '0;
    end else begin
      // time base
      if (realign) begin
        sub <= '0;
      end else if (tick) begin
        sub <= '0;
        now <= now + 1'b1;
      end else begin
        sub <= sub + 1'b1;
      end
      // future(): three cycles
      armed_wr <= 1'b0;
      case (step)
        2'd0: if (start) begin
          delay_q <= delay;
          label_q <= label;
          step    <= 2'd1;
        end
        2'd1: begin
          target <= now + TW'(delay_q);
          step   <= 2'd2;
        end
        default: begin
          step     <= 2'd0;
          armed_wr <= 1'b1;
        end
      endcase
      if (armed_wr) begin
        alarm_time  <= target;
        alarm_label <= label_q;
        armed       <= 1'b1;
      end else if (armed && !since[TW-1]) begin
        armed         <= 1'b0;
        alarm_pending <= 1'b1;
      end
      if (alarm_ack) alarm_pending <= 1'b0;
    end
  end
endmodule
