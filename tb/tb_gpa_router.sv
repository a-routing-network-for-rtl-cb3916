// Self-checking testbench for one gpa_router.
//
// Phase 1 (directed) measures the latencies on an idle router: a packet on
// control input k in cycle t must leave on its output control channel in t+1
// with its operand in t+2; a for-here packet delivers its operand in t+1.
// Phase 2 (random) drives all three network inputs and the processor port
// with random destinations, obeying throttle_out/throttle_alu as producers
// must, while the downstream side raises throttle_in at random. Every operand
// carries a unique number; a scoreboard checks that each expected copy leaves
// exactly once, on the right channel, with the right rewritten control
// packet, and exactly one cycle behind it, and that nothing leaves on a
// throttled channel. The testbench counts the mechanisms of the router
// (bypass, buffering, contention, throttling of producers, throttled outputs,
// delivery to the node, processor results, multicast results when AT > 1)
// and fails if one never happened.
module tb_gpa_router;
  import gpa_router_pkg::*;

  localparam int DEPTH = 4;
  localparam int AT    = 1;                 // destinations per processor result
  localparam int NSRC  = NUM_IN + AT;

  logic               clk = 0, rst_n = 0;
  ctrl_t              ctrl_in  [NUM_IN];
  op_t                op_in    [NUM_IN];
  logic [NUM_IN-1:0]  throttle_out;
  ctrl_t              ctrl_out [NUM_OUT];
  op_t                op_out   [NUM_OUT];
  logic [NUM_OUT-1:0] throttle_in;
  ctrl_t              alu_ctrl [AT];
  op_t                alu_op;
  logic               throttle_alu;
  logic [NUM_IN-1:0]  here_next, here_valid, here_slot;
  logic [NUM_IN-1:0]  last_here_next = '0;
  logic [DATA_W-1:0]  here_data [NUM_IN];

  gpa_router #(.DEPTH(DEPTH), .ALU_TARGETS(AT)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ reference model
  typedef struct {
    bit    here;
    int    dir;
    ctrl_t nxt;
  } exp_t;
  exp_t sb [int unsigned][$];  // operand number -> copies still expected
  int unsigned next_id = 1;

  function automatic exp_t expect_of(ctrl_t c);
    exp_t e;
    int dx = int'(c.dx), dy = int'(c.dy);
    e.here = (dx == 0 && dy == 0);
    e.dir  = (dx < 0) ? 0 : (dx > 0) ? 2 : 1;
    e.nxt  = c;
    e.nxt.dy = DY_W'(dy - 1);
    e.nxt.dx = DX_W'((dx < 0) ? dx + 1 : (dx > 0) ? dx - 1 : 0);
    return e;
  endfunction

  function automatic ctrl_t rand_dest(bit allow_here);
    ctrl_t c;
    int dy = allow_here ? $urandom_range(0, GRID_ROWS - 1) : $urandom_range(1, GRID_ROWS - 1);
    int dx = $urandom_range(0, 2 * dy) - dy;
    c.valid = 1'b1;
    c.dx    = DX_W'(dx);
    c.dy    = DY_W'(dy);
    c.slot  = 1'($urandom);
    return c;
  endfunction

  // Remove the expected copy of `id` that matches; returns 1 if found.
  function automatic bit take(int unsigned id, bit here, int dir, ctrl_t nxt, bit slot);
    if (!sb.exists(id)) return 0;
    for (int i = 0; i < sb[id].size(); i++) begin
      if (here ? (sb[id][i].here && sb[id][i].nxt.slot == slot)
               : (!sb[id][i].here && sb[id][i].dir == dir && sb[id][i].nxt == nxt)) begin
        sb[id].delete(i);
        if (sb[id].size() == 0) sb.delete(id);
        return 1;
      end
    end
    return 0;
  endfunction

  // ------------------------------------------------------ producers
  bit                sending = 0;      // random traffic enabled
  int                rate = 50;        // percent chance to send per cycle
  logic [DATA_W-1:0] pend_data [NUM_IN + 1];
  bit                pend      [NUM_IN + 1];
  int                n_sent = 0, cnt_multicast = 0;

  // drive one network input (s < NUM_IN) or the processor (s == NUM_IN);
  // called just after the negative edge
  task automatic drive_src(int s, bit force_send, ctrl_t force_c);
    ctrl_t c [AT];
    op_t   o = '0;
    bit    thr = (s == NUM_IN) ? throttle_alu : throttle_out[s];
    int    ncopies = 0;
    for (int t = 0; t < AT; t++) c[t] = '0;
    if (pend[s]) begin o.valid = 1'b1; o.data = pend_data[s]; end
    pend[s] = 0;
    if (force_send || (sending && !thr && $urandom_range(0, 99) < rate)) begin
      c[0] = force_send ? force_c : rand_dest(s != NUM_IN);
      if (s == NUM_IN && !force_send)
        for (int t = 1; t < AT; t++) if ($urandom_range(0, 1) == 1) c[t] = rand_dest(0);
      for (int t = 0; t < AT; t++) if (c[t].valid) begin
        sb[next_id].push_back(expect_of(c[t]));
        ncopies++;
      end
      if (ncopies > 1) cnt_multicast++;
      pend_data[s] = DATA_W'(next_id);
      pend[s] = 1;
      next_id++;
      n_sent++;
    end
    if (s == NUM_IN) begin alu_ctrl = c; alu_op = o; end
    else begin ctrl_in[s] = c[0]; op_in[s] = o; end
  endtask

  // ------------------------------------------------------ consumers
  bit    rand_throttle = 0;
  ctrl_t last_ctrl [NUM_OUT];
  int n_recv = 0;
  int cnt_bypass = 0, cnt_buffered = 0, cnt_contention = 0, cnt_thr_out = 0;
  int cnt_thr_in_block = 0, cnt_here = 0, cnt_alu = 0;

  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < NSRC; s++) begin
      if (dut.fwd[s] && dut.granted_any[NSRC + s]) cnt_bypass++;
      if (dut.cf_push[s]) cnt_buffered++;
    end
    cnt_thr_out += $countones(throttle_out) + int'(throttle_alu);
    for (int t = 0; t < AT; t++) if (alu_ctrl[t].valid) cnt_alu++;
    for (int o = 0; o < NUM_OUT; o++) begin
      if ($countones(dut.req[o]) > 1 && !throttle_in[o]) cnt_contention++;
      if (dut.req[o] != '0 && throttle_in[o]) cnt_thr_in_block++;
    end
  end

  // called just after the negative edge, once the inputs are driven
  task automatic consume();
    for (int o = 0; o < NUM_OUT; o++) begin
      // operand one cycle behind the control seen last cycle
      if (last_ctrl[o].valid) begin
        check(op_out[o].valid, "operand follows its control by one cycle");
        if (op_out[o].valid) begin
          check(take(int'(op_out[o].data), 0, o, last_ctrl[o], 0),
                "operand expected on this output with this control packet");
          n_recv++;
        end
      end else begin
        check(!op_out[o].valid, "no operand without a control");
      end
      // throttle_in still holds the value the router decided with
      if (ctrl_out[o].valid) check(!throttle_in[o], "nothing sent on a throttled channel");
      last_ctrl[o] = ctrl_out[o];
    end
    // the early for-here flag announces exactly the deliveries of the next cycle
    check(here_valid == last_here_next, "for-here flag one cycle ahead of the operand");
    last_here_next = here_next;
    for (int k = 0; k < NUM_IN; k++) begin
      if (here_valid[k]) begin
        check(take(int'(here_data[k]), 1, 0, '0, here_slot[k]), "operand for this node, right slot");
        n_recv++;
        cnt_here++;
      end
    end
    throttle_in = rand_throttle ? NUM_OUT'($urandom_range(0, 7) & $urandom_range(0, 7)) : '0;
  endtask

  task automatic step(int fs = -1, ctrl_t fc = '0);
    @(negedge clk);
    for (int s = 0; s <= NUM_IN; s++) drive_src(s, s == fs, fc);
    #1;
    consume();
  endtask

  task automatic idle(int n);
    repeat (n) step();
  endtask

  initial begin
    ctrl_t c;
    int t0;
    for (int s = 0; s < NUM_IN; s++) begin ctrl_in[s] = '0; op_in[s] = '0; end
    for (int t = 0; t < AT; t++) alu_ctrl[t] = '0;
    alu_op = '0; throttle_in = '0;
    for (int o = 0; o < NUM_OUT; o++) last_ctrl[o] = '0;
    for (int s = 0; s <= NUM_IN; s++) pend[s] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    idle(2);

    // Phase 1: latency of a forwarded packet and of a for-here packet.
    for (int k = 0; k <= NUM_IN; k++) begin
      c = '0; c.valid = 1; c.dy = 2; c.dx = DX_W'(k == NUM_IN ? 0 : k - 1); c.slot = 1;
      t0 = (k == NUM_IN) ? 1 : k;      // expected output channel
      step(k, c);                      // control on input k in cycle t
      @(posedge clk); #1;
      check(ctrl_out[t0].valid, "control leaves in cycle t+1");
      check(!op_out[t0].valid, "operand not yet out in cycle t+1");
      step();                          // operand on input k in cycle t+1
      @(posedge clk); #1;
      check(op_out[t0].valid, "operand leaves in cycle t+2");
      idle(3);
    end
    c = '0; c.valid = 1; c.slot = 1;
    step(1, c);
    check(here_next == 3'b010, "for-here flag raised in cycle t");
    @(posedge clk); #1;
    check(here_valid == 3'b010 && here_slot[1], "for-here flag raised in cycle t+1");
    idle(3);
    check(sb.num() == 0, "all directed operands delivered");

    // Phase 2: random traffic with contention and throttling.
    sending = 1;
    rand_throttle = 1;
    for (int r = 0; r < 3; r++) begin
      rate = (r == 0) ? 30 : (r == 1) ? 70 : 100;
      repeat (2000) step();
    end
    sending = 0;
    rand_throttle = 0;
    repeat (60) step();
    check(sb.num() == 0, "every operand copy delivered exactly once");
    if (sb.num() != 0) $display("undelivered: %0d", sb.num());

    $display("sent %0d copies received %0d multicast %0d", n_sent, n_recv, cnt_multicast);
    $display("bypass %0d buffered %0d contention %0d throttle_out %0d throttled_output %0d here %0d alu %0d",
             cnt_bypass, cnt_buffered, cnt_contention, cnt_thr_out, cnt_thr_in_block, cnt_here, cnt_alu);
    check(cnt_bypass > 0, "bypass happened");
    check(cnt_buffered > 0, "buffering happened");
    check(cnt_contention > 0, "contention happened");
    check(cnt_thr_out > 0, "producer throttling happened");
    check(cnt_thr_in_block > 0, "throttled output happened");
    check(cnt_here > 0, "delivery to the node happened");
    check(cnt_alu > 0, "processor results sent");
    if (AT > 1) check(cnt_multicast > 0, "multicast results sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
