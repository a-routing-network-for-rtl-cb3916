// Self-checking testbench for chooser: random request vectors and throttle;
// the grant must be the lowest-numbered request (static priority), one-hot,
// and empty while throttled.
module tb_chooser;
  localparam int N = 8;
  logic [N-1:0]         req = '0, grant;
  logic                 throttle_in = 0, granted;
  logic [$clog2(N)-1:0] grant_idx;
  int checks = 0, failures = 0;

  chooser #(.N(N)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s req=%b thr=%0d grant=%b", what, req, throttle_in, grant); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int it = 0; it < 3000; it++) begin
      req = (it < 256) ? N'(it) : N'($urandom);
      throttle_in = (it >= 256) && ($urandom_range(0, 3) == 0);
      #1;
      exp = -1;
      for (int i = N - 1; i >= 0; i--) if (req[i]) exp = i;
      if (throttle_in || exp < 0) begin
        check(grant == '0 && !granted, "no grant");
      end else begin
        check(granted, "granted");
        check(grant == (N'(1) << exp), "lowest index wins");
        check(int'(grant_idx) == exp, "grant_idx");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
