// Self-checking testbench for operand_fifo: random pushes and pops (never
// overflowing), head, empty and full compared every cycle with a queue kept
// by the testbench; includes simultaneous push and pop when full.
module tb_operand_fifo;
  import gpa_router_pkg::*;

  localparam int DEPTH = 4;
  logic              clk = 0, rst_n = 0;
  logic              push = 0, pop = 0;
  logic [DATA_W-1:0] push_data = '0, head;
  logic              empty, full;
  logic [DATA_W-1:0] q[$];
  int checks = 0, failures = 0;
  int full_pushpop = 0;

  operand_fifo #(.DEPTH(DEPTH)) dut (.*);

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
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == DEPTH), "full");
      if (q.size() > 0) check(head == q[0], "head");
      pop  = (q.size() > 0) && ($urandom_range(0, 2) != 0);
      push = ($urandom_range(0, 2) != 0) && (q.size() < DEPTH || pop);
      push_data = $urandom;
      if (push && pop && q.size() == DEPTH) full_pushpop++;
      @(posedge clk);
      #1;
      if (pop) void'(q.pop_front());
      if (push) q.push_back(push_data);
    end
    check(full_pushpop > 0, "push and pop together when full was exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
