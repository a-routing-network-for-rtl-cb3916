// Self-checking testbench for ctrl_switch: random candidate packets and
// random one-hot (or empty) grants per output; one cycle later each output
// must carry the granted candidate's packet, marked valid, or an invalid one.
module tb_ctrl_switch;
  import gpa_router_pkg::*;

  logic              clk = 0, rst_n = 0;
  ctrl_t             cand  [NUM_CAND];
  logic [NUM_CAND-1:0] grant [NUM_OUT];
  ctrl_t             ctrl_out [NUM_OUT];
  ctrl_t             exp [NUM_OUT];
  int checks = 0, failures = 0;

  ctrl_switch dut (.*);

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
    int g;
    for (int k = 0; k < NUM_CAND; k++) cand[k] = '0;
    for (int o = 0; o < NUM_OUT; o++) grant[o] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      for (int k = 0; k < NUM_CAND; k++) cand[k] = ctrl_t'($urandom);
      for (int o = 0; o < NUM_OUT; o++) begin
        g = $urandom_range(0, NUM_CAND);   // NUM_CAND means no grant
        grant[o] = (g < NUM_CAND) ? (NUM_CAND'(1) << g) : '0;
        exp[o] = (g < NUM_CAND) ? cand[g] : '0;
        if (g < NUM_CAND) exp[o].valid = 1'b1;
      end
      @(posedge clk);
      #1;
      for (int o = 0; o < NUM_OUT; o++) begin
        check(ctrl_out[o].valid == exp[o].valid, "valid");
        if (exp[o].valid) check(ctrl_out[o] == exp[o], "packet");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
