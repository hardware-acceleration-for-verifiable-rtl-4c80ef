// Testbench for ncp_counters: random reset/set/increment/decrement
// operations checked against a reference model.
module tb_ncp_counters;
  import ncp_pkg::*;
  logic clk = 0, rst_n = 0, op_en = 0;
  cnt_op_e op = CNT_RESET;
  logic [1:0] idx = 0;
  logic [15:0] value = 0;
  logic [15:0] cnt [4];
  logic [15:0] model [4];
  int checks = 0, failures = 0;

  ncp_counters dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '{default: 16'd0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      op_en = $urandom_range(3) != 0;
      op = cnt_op_e'($urandom_range(3));
      idx = 2'($urandom_range(3));
      value = 16'($urandom);
      if (op_en)
        case (op)
          CNT_RESET: model[idx] = 0;
          CNT_SET:   model[idx] = value;
          CNT_INC:   model[idx] = model[idx] + 1;
          default:   model[idx] = model[idx] - 1;
        endcase
      @(posedge clk); #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (cnt[i] !== model[i]) begin failures++; $display("cnt%0d %h want %h", i, cnt[i], model[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
