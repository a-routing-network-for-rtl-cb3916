// Self-checking testbench for bypass_latch: random operands on every input;
// each must appear on its output exactly one cycle later, and reset must
// clear the outputs.
module tb_bypass_latch;
  import gpa_router_pkg::*;

  logic clk = 0, rst_n = 0;
  op_t  op_in [NUM_SRC], op_lat [NUM_SRC], prev [NUM_SRC];
  int checks = 0, failures = 0;

  bypass_latch dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < NUM_SRC; s++) op_in[s] = op_t'({$urandom, $urandom});
    repeat (3) @(posedge clk);
    #1;
    for (int s = 0; s < NUM_SRC; s++) check(op_lat[s] == '0, "reset");
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      for (int s = 0; s < NUM_SRC; s++) begin
        op_in[s] = op_t'({$urandom, $urandom});
        prev[s]  = op_in[s];
      end
      @(posedge clk);
      #1;
      for (int s = 0; s < NUM_SRC; s++) begin
        // input changes only after the edge, so output shows this cycle's value
        check(op_lat[s] == prev[s], "one-cycle delay");
      end
      @(negedge clk);
      for (int s = 0; s < NUM_SRC; s++) check(op_lat[s] == prev[s], "held for a full cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
