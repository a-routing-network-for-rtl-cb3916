// Self-checking testbench for alu_decoder: every announced destination is
// applied and compared with a reference computed here (first hop always one
// row down; dx < 0 left, dx > 0 right, dx = 0 below; dy = 0 unreachable).
module tb_alu_decoder;
  import gpa_router_pkg::*;

  ctrl_t  alu_ctrl;
  logic   fwd, bad;
  route_t route;
  int checks = 0, failures = 0;

  alu_decoder dut (.alu_ctrl, .fwd, .route, .bad);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: dx=%0d dy=%0d v=%0d", what, alu_ctrl.dx, alu_ctrl.dy, alu_ctrl.valid);
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
    logic exp_fwd;
    dir_e exp_dir;
    for (int v = 0; v < 2; v++)
      for (int sl = 0; sl < 2; sl++)
        for (dxi = -(2 ** (DX_W - 1)); dxi < 2 ** (DX_W - 1); dxi++)
          for (dyi = 0; dyi < 2 ** DY_W; dyi++) begin
            alu_ctrl.valid = v[0];
            alu_ctrl.slot  = sl[0];
            alu_ctrl.dx    = DX_W'(dxi);
            alu_ctrl.dy    = DY_W'(dyi);
            #1;
            exp_fwd = v[0] && dyi > 0;
            exp_dir = (dxi < 0) ? DIR_LEFT : (dxi > 0) ? DIR_RIGHT : DIR_DOWN;
            exp_dx  = (dxi < 0) ? dxi + 1 : (dxi > 0) ? dxi - 1 : 0;
            check(fwd == exp_fwd, "fwd");
            check(bad == (v[0] && dyi == 0), "bad");
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
