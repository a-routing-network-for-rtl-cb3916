// Self-checking testbench for dest_decoder: every valid/invalid packet with
// every (dx, dy, slot) is applied and compared with a reference computed here
// from the relative-addressing rule (dx < 0 left, dx > 0 right, dx = 0 below,
// (0,0) for this node; dy drops by one per hop, dx steps towards zero).
module tb_dest_decoder;
  import gpa_router_pkg::*;

  ctrl_t  ctrl_in;
  logic   fwd, for_here, bad;
  route_t route;
  int checks = 0, failures = 0;

  dest_decoder dut (.ctrl_in, .fwd, .for_here, .route, .bad);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: dx=%0d dy=%0d v=%0d", what, ctrl_in.dx, ctrl_in.dy, ctrl_in.valid);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dxi, dyi, exp_dx;
    logic exp_here, exp_fwd, exp_bad;
    dir_e exp_dir;
    for (int v = 0; v < 2; v++)
      for (int sl = 0; sl < 2; sl++)
        for (dxi = -(2 ** (DX_W - 1)); dxi < 2 ** (DX_W - 1); dxi++)
          for (dyi = 0; dyi < 2 ** DY_W; dyi++) begin
            ctrl_in.valid = v[0];
            ctrl_in.slot  = sl[0];
            ctrl_in.dx    = DX_W'(dxi);
            ctrl_in.dy    = DY_W'(dyi);
            #1;
            exp_here = v[0] && dxi == 0 && dyi == 0;
            exp_bad  = v[0] && dyi == 0 && dxi != 0;
            exp_fwd  = v[0] && dyi > 0;
            exp_dir  = (dxi < 0) ? DIR_LEFT : (dxi > 0) ? DIR_RIGHT : DIR_DOWN;
            exp_dx   = (dxi < 0) ? dxi + 1 : (dxi > 0) ? dxi - 1 : 0;
            check(for_here == exp_here, "for_here");
            check(bad == exp_bad, "bad");
            check(fwd == exp_fwd, "fwd");
            check(route.nxt.valid == exp_fwd, "nxt.valid");
            if (exp_fwd) begin
              check(route.dir == exp_dir, "dir");
              check(int'(route.nxt.dx) == exp_dx, "nxt.dx");
              check(int'(route.nxt.dy) == dyi - 1, "nxt.dy");
              check(route.nxt.slot == sl[0], "nxt.slot");
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
