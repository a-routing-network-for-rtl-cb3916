// Self-checking testbench for operand_switch: random grants (each source
// granted to at most one output per cycle, as the choosers guarantee) are
// applied in cycle t; in cycle t+2 each output must carry the bypass-latch or
// FIFO-head value of the granted source, and exactly the FIFOs whose heads
// were granted must be popped.
module tb_operand_switch;
  import gpa_router_pkg::*;

  localparam int IW = $clog2(2 * NUM_SRC);
  logic              clk = 0, rst_n = 0;
  logic              grant_valid [NUM_OUT];
  logic [IW-1:0]     grant_idx   [NUM_OUT];
  logic [DATA_W-1:0] lat         [NUM_SRC];
  logic [DATA_W-1:0] fifo_head   [NUM_SRC];
  logic              op_valid    [NUM_OUT];
  logic [DATA_W-1:0] op_data     [NUM_OUT];
  logic [NUM_SRC-1:0] fifo_pop;

  // history of grants for the two-cycle pipeline
  logic          hv [3][NUM_OUT];
  logic [IW-1:0] hi [3][NUM_OUT];
  int checks = 0, failures = 0;

  operand_switch dut (.*);

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
    logic [NUM_SRC-1:0] used;
    logic [NUM_SRC-1:0] exp_pop;
    int s;
    for (int o = 0; o < NUM_OUT; o++) begin
      grant_valid[o] = 0; grant_idx[o] = '0;
      for (int h = 0; h < 3; h++) begin hv[h][o] = 0; hi[h][o] = '0; end
    end
    for (int k = 0; k < NUM_SRC; k++) begin lat[k] = '0; fifo_head[k] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // new data on the latches and FIFO heads, new grants
      for (int k = 0; k < NUM_SRC; k++) begin lat[k] = $urandom; fifo_head[k] = $urandom; end
      used = '0;
      for (int o = 0; o < NUM_OUT; o++) begin
        grant_valid[o] = 1'b0;
        grant_idx[o]   = IW'($urandom_range(0, 2 * NUM_SRC - 1));
        s = int'(grant_idx[o]) % NUM_SRC;
        if ($urandom_range(0, 3) != 0 && !used[s]) begin
          grant_valid[o] = 1'b1;
          used[s] = 1'b1;
        end
      end
      // the grants of two cycles ago are what the switch steers now
      #1;
      exp_pop = '0;
      for (int o = 0; o < NUM_OUT; o++) begin
        if (cyc >= 2) begin
          check(op_valid[o] == hv[1][o], "op_valid");
          if (hv[1][o]) begin
            automatic int k = int'(hi[1][o]);
            if (k < NUM_SRC) begin
              check(op_data[o] == fifo_head[k], "data from FIFO head");
              exp_pop[k] = 1'b1;
            end else begin
              check(op_data[o] == lat[k - NUM_SRC], "data from bypass latch");
            end
          end
        end
      end
      if (cyc >= 2) check(fifo_pop == exp_pop, "fifo_pop");
      @(posedge clk);
      for (int o = 0; o < NUM_OUT; o++) begin
        hv[1][o] = hv[0][o]; hi[1][o] = hi[0][o];
        hv[0][o] = grant_valid[o]; hi[0][o] = grant_idx[o];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
