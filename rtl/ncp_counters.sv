// Program counters of the Network Code Processor.
//
// The hardware gives Network Code programs a small set of counters that the
// program itself can reset, set, increment and decrement, and that the
// counter comparators of if() read, so a program can for instance take a
// branch every other round without help from the host. The number (4) and
// width (16 bits) of the counters are this design's choices.
//
// Interface: op_en with op/idx/value updates one counter at the clock edge;
// all counters are visible on cnt. Reset clears them.
module ncp_counters #(
  parameter int unsigned N  = 4,
  parameter int unsigned W  = 16,
  parameter int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             op_en,
  input  ncp_pkg::cnt_op_e op,
  input  logic [IW-1:0]    idx,
  input  logic [W-1:0]     value,
  output logic [W-1:0]     cnt [N]
);
  import ncp_pkg::*;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) cnt[i] <= '0;
    end else if (op_en && int'(idx) < N) begin
      case (op)
        CNT_RESET: cnt[idx] <= '0;
        CNT_SET:   cnt[idx] <= value;
        CNT_INC:   cnt[idx] <= cnt[idx] + 1'b1;
        default:   cnt[idx] <= cnt[idx] - 1'b1;
      endcase
    end
  end
endmodule
