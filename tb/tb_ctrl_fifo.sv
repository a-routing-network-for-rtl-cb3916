// Self-checking testbench for ctrl_fifo: random pushes and pops (never
// overflowing), head, empty, full and count compared every cycle with a
// queue kept by the testbench; includes simultaneous push and pop when full.
module tb_ctrl_fifo;
  import gpa_router_pkg::*;

  localparam int DEPTH = 4;
  logic   clk = 0, rst_n = 0;
  logic   push = 0, pop = 0;
  route_t push_route = '0, head;
  logic   empty, full;
  logic [$clog2(DEPTH+1)-1:0] count;
  route_t q[$];
  int checks = 0, failures = 0;
  int full_pushpop = 0;

  ctrl_fifo #(.DEPTH(DEPTH)) dut (.*);

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
      check(int'(count) == q.size(), "count");
      if (q.size() > 0) check(head == q[0], "head");
      pop  = (q.size() > 0) && ($urandom_range(0, 2) != 0);
      push = ($urandom_range(0, 2) != 0) && (q.size() < DEPTH || pop);
      push_route = route_t'($urandom);
      if (push && pop && q.size() == DEPTH) full_pushpop++;
      @(posedge clk);
      #1;
      if (pop) void'(q.pop_front());
      if (push) q.push_back(push_route);
    end
    check(full_pushpop > 0, "push and pop together when full was exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
