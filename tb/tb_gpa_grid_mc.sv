// End-to-end testbench for the whole operand network, gpa_grid, at its
// default size (4 x 4 nodes, default buffer depth) with multicast enabled
// (ALU_TARGETS = 2).
//
// Every node gets a processor model that consumes the operands delivered to
// it and produces results with random reachable destinations, announcing
// each with a control packet one cycle before the operand and obeying its
// throttle. The register-file side injects operands into the first row the
// same way. Each operand carries a unique number; a scoreboard checks that it
// arrives exactly once, at the node and operand slot its destination names,
// and never earlier than the hop count allows. Some processors answer the
// early for-here flag (here_next) by announcing a result in the same cycle,
// which exercises the router's longest control path. Nothing may leave through the
// bottom edge, since every destination lies inside the grid.
//
// Phase 1 sends single operands through an idle grid and checks the exact
// latency: announced in cycle t, h rows down, delivered in cycle t+h+1.
// Phase 2 runs random traffic at rising rates. With AT = 2 (multicast) about
// half of the processor results name a second destination, and every copy
// is tracked. The testbench counts bypasses,
// buffered packets, contention at a chooser, throttled producers, throttled
// outputs, deliveries, processor results and injections from the top edge,
// and fails if any never happened.
module tb_gpa_grid_mc;
  import gpa_router_pkg::*;

  localparam int R = GRID_ROWS;
  localparam int C = GRID_COLS;
  localparam int AT = 2;      // destinations per processor result
  localparam int NSRC = NUM_IN + AT;   // sources of each router

  logic               clk = 0, rst_n = 0;
  ctrl_t              top_ctrl_in     [C][NUM_IN];
  op_t                top_op_in       [C][NUM_IN];
  logic [NUM_IN-1:0]  top_throttle    [C];
  ctrl_t              bot_ctrl_out    [C][NUM_OUT];
  op_t                bot_op_out      [C][NUM_OUT];
  logic [NUM_OUT-1:0] bot_throttle_in [C];
  ctrl_t              alu_ctrl        [R][C][AT];
  op_t                alu_op          [R][C];
  logic               throttle_alu    [R][C];
  logic [NUM_IN-1:0]  here_next       [R][C];
  logic [NUM_IN-1:0]  here_valid      [R][C];
  logic [NUM_IN-1:0]  last_here_next  [R][C];
  logic [NUM_IN-1:0]  here_slot       [R][C];
  logic [DATA_W-1:0]  here_data       [R][C][NUM_IN];

  gpa_grid #(.ALU_TARGETS(AT)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ scoreboard
  typedef struct {
    int row, col, slot, sent, hops;
  } exp_t;
  exp_t sb [int unsigned][$];   // operand number -> copies still expected
  int unsigned next_id = 1;
  int n_sent = 0, n_recv = 0, cnt_multicast = 0;

  // A random destination reachable from (row, col) through links that
  // descend one row per hop and stay inside the grid. allow_here: the packet
  // is decoded at (row, col) itself (top edge), so (0,0) is allowed.
  function automatic ctrl_t rand_dest(int row, int col, bit allow_here);
    ctrl_t c;
    int maxdy = R - 1 - row;
    int dy, dx, lo, hi;
    dy = allow_here ? $urandom_range(0, maxdy) : $urandom_range(1, maxdy);
    lo = (-dy > -col) ? -dy : -col;
    hi = (dy < C - 1 - col) ? dy : C - 1 - col;
    dx = $urandom_range(0, hi - lo) + lo;
    c.valid = 1'b1;
    c.dx = DX_W'(dx);
    c.dy = DY_W'(dy);
    c.slot = 1'($urandom);
    return c;
  endfunction

  // ------------------------------------------------------ producers
  bit                sending = 0;
  int                rate = 20;
  bit                alu_pend [R][C];
  logic [DATA_W-1:0] alu_pd   [R][C];
  bit                top_pend [C][NUM_IN];
  logic [DATA_W-1:0] top_pd   [C][NUM_IN];
  int cnt_alu = 0, cnt_top = 0, cnt_wakeup = 0;

  function automatic logic [DATA_W-1:0] register_op(ctrl_t c, int row, int col);
    exp_t e;
    e.row  = row + int'(c.dy);
    e.col  = col + int'(c.dx);
    e.slot = int'(c.slot);
    e.sent = cyc;
    e.hops = int'(c.dy);
    sb[next_id].push_back(e);
    n_sent++;
    return DATA_W'(next_id);
  endfunction

  // force_r/force_c/force_ctrl: one directed packet from a processor
  task automatic drive(int force_r = -1, int force_col = -1, ctrl_t force_ctrl = '0);
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        ctrl_t k = '0;
        ctrl_t k2 [AT];
        op_t   o = '0;
        for (int t = 0; t < AT; t++) k2[t] = '0;
        if (alu_pend[r][c]) begin o.valid = 1; o.data = alu_pd[r][c]; end
        alu_pend[r][c] = 0;
        if (r == force_r && c == force_col) begin
          k = force_ctrl;
        end else if (sending && r < R - 1 && !throttle_alu[r][c] && $urandom_range(0, 99) < rate) begin
          k = rand_dest(r, c, 0);
        end else if (sending && r < R - 1 && !throttle_alu[r][c] && here_next[r][c] != '0 &&
                     $urandom_range(0, 1) == 1) begin
          // wake-up: an operand is announced for this node, and the waiting
          // instruction announces its own result in the same cycle
          k = rand_dest(r, c, 0);
          cnt_wakeup++;
        end
        if (k.valid) begin
          k2[0] = k;
          alu_pd[r][c] = register_op(k, r, c);
          // further destinations of the same result (multicast)
          for (int t = 1; t < AT; t++)
            if (force_r < 0 && $urandom_range(0, 1) == 1) begin
              k2[t] = rand_dest(r, c, 0);
              void'(register_op(k2[t], r, c));
              if (t == 1) cnt_multicast++;
            end
          next_id++;
          alu_pend[r][c] = 1;
          cnt_alu++;
        end
        alu_ctrl[r][c] = k2;
        alu_op[r][c] = o;
      end
    // top edge: a packet entering node (0, c) carries its destination
    // relative to that node, which decodes it first
    for (int c = 0; c < C; c++)
      for (int k = 0; k < NUM_IN; k++) begin
        ctrl_t p = '0;
        op_t   o = '0;
        if (top_pend[c][k]) begin o.valid = 1; o.data = top_pd[c][k]; end
        top_pend[c][k] = 0;
        if (sending && !top_throttle[c][k] && $urandom_range(0, 99) < rate / 2) begin
          p = rand_dest(0, c, 1);
          top_pd[c][k] = register_op(p, 0, c);
          next_id++;
          top_pend[c][k] = 1;
          cnt_top++;
        end
        top_ctrl_in[c][k] = p;
        top_op_in[c][k] = o;
      end
  endtask

  // ------------------------------------------------------ consumers
  int min_slack = 1000;
  int lat_last = -1;
  task automatic consume();
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        check(here_valid[r][c] == last_here_next[r][c], "for-here flag one cycle ahead of the operand");
        last_here_next[r][c] = here_next[r][c];
      end
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++)
        for (int k = 0; k < NUM_IN; k++)
          if (here_valid[r][c][k]) begin
            int unsigned id = int'(here_data[r][c][k]);
            int hit = -1;
            if (sb.exists(id))
              for (int i = 0; i < sb[id].size(); i++)
                if (hit < 0 && sb[id][i].row == r && sb[id][i].col == c &&
                    sb[id][i].slot == int'(here_slot[r][c][k])) hit = i;
            check(hit >= 0, "operand expected at this node and slot, not yet delivered");
            if (hit >= 0) begin
              check(cyc - sb[id][hit].sent >= sb[id][hit].hops + 1, "not faster than one hop per cycle");
              lat_last = cyc - sb[id][hit].sent;
              sb[id].delete(hit);
              if (sb[id].size() == 0) sb.delete(id);
              n_recv++;
            end
          end
    for (int c = 0; c < C; c++)
      for (int o = 0; o < NUM_OUT; o++)
        check(!bot_ctrl_out[c][o].valid && !bot_op_out[c][o].valid, "nothing leaves the bottom edge");
  endtask

  task automatic step(int fr = -1, int fc = -1, ctrl_t fk = '0);
    @(negedge clk);
    drive(fr, fc, fk);
    #1;
    consume();
  endtask

  // ------------------------------------------------------ mechanism counters
  int cnt_bypass = 0, cnt_buffered = 0, cnt_contention = 0, cnt_thr = 0, cnt_thr_block = 0;
  int cnt_here = 0;
  for (genvar r = 0; r < R; r++) begin : g_r
    for (genvar c = 0; c < C; c++) begin : g_c
      always @(posedge clk) if (rst_n) begin
        for (int s = 0; s < NSRC; s++) begin
          if (dut.g_row[r].g_col[c].u_router.fwd[s] &&
              dut.g_row[r].g_col[c].u_router.granted_any[NSRC + s]) cnt_bypass++;
          if (dut.g_row[r].g_col[c].u_router.cf_push[s]) cnt_buffered++;
          if (dut.g_row[r].g_col[c].u_router.throttle_q[s]) cnt_thr++;
        end
        for (int o = 0; o < NUM_OUT; o++) begin
          if ($countones(dut.g_row[r].g_col[c].u_router.req[o]) > 1) cnt_contention++;
          if (dut.g_row[r].g_col[c].u_router.req[o] != '0 &&
              dut.g_row[r].g_col[c].u_router.throttle_in[o]) cnt_thr_block++;
        end
        cnt_here += $countones(here_valid[r][c]);
      end
    end
  end

  initial begin
    ctrl_t k;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        for (int t = 0; t < AT; t++) alu_ctrl[r][c][t] = '0;
        alu_op[r][c] = '0; alu_pend[r][c] = 0; last_here_next[r][c] = '0;
      end
    for (int c = 0; c < C; c++) begin
      bot_throttle_in[c] = '0;
      for (int i = 0; i < NUM_IN; i++) begin
        top_ctrl_in[c][i] = '0; top_op_in[c][i] = '0; top_pend[c][i] = 0;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) step();

    // Phase 1: exact latency through an idle grid.
    for (int h = 1; h < R; h++) begin
      k = '0; k.valid = 1; k.dy = DY_W'(h); k.dx = DX_W'(h > 1 ? 1 : -1); k.slot = 1;
      step(0, 1, k);
      repeat (h + 4) step();
      check(sb.num() == 0, "single operand delivered");
      check(lat_last == h + 1, "latency of h rows is h+1 cycles");
      if (lat_last != h + 1) $display("h=%0d latency=%0d", h, lat_last);
    end

    // Phase 2: random traffic at rising rates.
    sending = 1;
    for (int p = 0; p < 3; p++) begin
      rate = (p == 0) ? 15 : (p == 1) ? 40 : 90;
      repeat (1500) step();
    end
    sending = 0;
    repeat (200) step();
    check(sb.num() == 0, "every operand delivered exactly once");
    if (sb.num() != 0) $display("undelivered: %0d", sb.num());

    $display("copies sent %0d received %0d multicast results %0d", n_sent, n_recv, cnt_multicast);
    $display("same-cycle wake-up responses %0d", cnt_wakeup);
    $display("bypass %0d buffered %0d contention %0d throttle %0d throttled_output %0d here %0d alu %0d top %0d",
             cnt_bypass, cnt_buffered, cnt_contention, cnt_thr, cnt_thr_block, cnt_here, cnt_alu, cnt_top);
    check(cnt_bypass > 0, "bypass happened");
    check(cnt_buffered > 0, "buffering happened");
    check(cnt_contention > 0, "contention happened");
    check(cnt_thr > 0, "throttling happened");
    check(cnt_thr_block > 0, "a throttled output held a packet back");
    check(cnt_here > 0, "delivery to a node happened");
    check(cnt_alu > 0, "processor results sent");
    check(cnt_top > 0, "operands injected from the top edge");
    check(cnt_wakeup > 0, "processor answered an early for-here flag in the same cycle");
    if (AT > 1) check(cnt_multicast > 0, "multicast results sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
