// Operand router of one grid processor node.
//
// The router links a node to its three upstream and three downstream
// neighbours and to its own processor. It uses two networks: a control network
// whose packet carries an operand's relative destination, and an operand
// network whose operand follows that packet one cycle later. Because the
// control arrives first, routing and arbitration are done a cycle before the
// operand is there, and in the common case the operand only crosses a
// multiplexer.
//
// Cycle by cycle, for an operand whose control arrives in cycle t:
//   t    the input's decoder (or, for the processor's own result, the ALU
//        decoder) picks the output channel and rewrites the destination. If
//        no older packet of that input is waiting, the packet asks the
//        channel's chooser for the channel (bypass). If it loses, or the
//        channel is throttled, it is written to the input's control FIFO and
//        a slot is reserved in the input's operand FIFO.
//   t+1  the granted packet leaves on the output control channel; the operand
//        arrives and is captured by the input's delay element, or written to
//        the operand FIFO if its control was buffered. A packet addressed to
//        this node (destination 0,0) raised for-here in cycle t; the operand
//        goes straight to the processor in t+1.
//   t+2  the operand leaves on the output operand channel.
// A buffered packet competes at its chooser from the head of its control FIFO
// in the same way, and its operand leaves from the operand FIFO two cycles
// after the grant. So a hop costs one cycle, control and operand alike.
//
// Flow control: for each input the router counts reserved operand slots. When
// a cycle leaves two free slots or fewer, it raises throttle_out to that
// input's producer (registered, reaching the producer the next cycle); a
// producer whose throttle_in is high sends nothing on that channel. One slot
// covers the operand already announced, the other the one that can be sent
// while the throttle travels back, so a producer never needs an
// acknowledgement. The processor is throttled the same way (throttle_alu).
//
// Multicast (ALU_TARGETS = 2): a processor result may name two destinations,
// alu_ctrl[0] and alu_ctrl[1]. The processor's path is then duplicated: each
// destination has its own ALU decoder, control FIFO, operand FIFO and delay
// element, all fed with the same result, and the two copies compete for their
// output channels independently. throttle_alu is high when either path is
// short of room. With ALU_TARGETS = 1 (the default) the router has a single
// processor path. Replicating the units for multicast follows the router's
// design; the two-destination port is this design's choice.
//
// here_next is the decoder's for-here flag itself, in the cycle the control
// packet arrives: it tells the processor a cycle early that an operand is
// coming, so the processor can select the waiting instruction and announce
// its result (alu_ctrl) in that same cycle. This is the router's longest
// control path: decoder, processor, ALU decoder, chooser, control switch.
// here_data is wired straight from op_in: an operand for this node goes to
// the processor in the cycle it arrives, with here_valid/here_slot registered
// from the control packet of the cycle before.
//
// Input index 0 is the upper-left neighbour, 1 the one above, 2 the
// upper-right one; output 0 goes to the lower-left neighbour, 1 below, 2 to
// the lower-right. The organisation (decoders, control and operand FIFOs per
// input, one chooser per output, two switches, delay elements on the bypass
// paths, two-slot throttling, static priority) follows the router's design.
// Timing details, the candidate order and the buffer depth are this design's
// choices.
module gpa_router
  import gpa_router_pkg::*;
#(
  parameter int unsigned DEPTH          = 4,  // operand/control FIFO depth per input
  parameter int unsigned THROTTLE_SLOTS = 2,  // free slots at which to throttle
  parameter int unsigned ALU_TARGETS    = 1   // destinations per processor result (2: multicast)
) (
  input  logic               clk,
  input  logic               rst_n,
  // network inputs
  input  ctrl_t              ctrl_in      [NUM_IN],
  input  op_t                op_in        [NUM_IN],
  output logic [NUM_IN-1:0]  throttle_out,
  // network outputs
  output ctrl_t              ctrl_out     [NUM_OUT],
  output op_t                op_out       [NUM_OUT],
  input  logic [NUM_OUT-1:0] throttle_in,
  // local processor: results to send
  input  ctrl_t              alu_ctrl     [ALU_TARGETS],
  input  op_t                alu_op,
  output logic               throttle_alu,
  // local processor: operands delivered to this node
  output logic [NUM_IN-1:0]  here_next,    // cycle t: the operand of cycle t+1 is for this node
  output logic [NUM_IN-1:0]  here_valid,
  output logic [NUM_IN-1:0]  here_slot,
  output logic [DATA_W-1:0]  here_data    [NUM_IN]
);

  localparam int unsigned OCC_W = $clog2(DEPTH + 1);
  // Sources: the network inputs, then one per processor destination. Each
  // source has its own decoder, control FIFO, operand FIFO and delay element.
  localparam int unsigned NSRC  = NUM_IN + ALU_TARGETS;
  localparam int unsigned NCAND = 2 * NSRC;
  localparam int unsigned CW    = $clog2(NCAND);

  // ---------------------------------------------------------------- decode
  logic   fwd   [NSRC];
  route_t route [NSRC];
  logic   bad   [NSRC];
  logic   for_here [NUM_IN];

  for (genvar s = 0; s < NUM_IN; s++) begin : g_dec
    dest_decoder u_dec (
      .ctrl_in  (ctrl_in[s]),
      .fwd      (fwd[s]),
      .for_here (for_here[s]),
      .route    (route[s]),
      .bad      (bad[s])
    );
  end

  for (genvar t = 0; t < ALU_TARGETS; t++) begin : g_alu_dec
    alu_decoder u_alu_dec (
      .alu_ctrl (alu_ctrl[t]),
      .fwd      (fwd[NUM_IN + t]),
      .route    (route[NUM_IN + t]),
      .bad      (bad[NUM_IN + t])
    );
  end

  // ---------------------------------------------------------- control FIFOs
  logic   cf_push  [NSRC];
  logic   cf_pop   [NSRC];
  route_t cf_head  [NSRC];
  logic   cf_empty [NSRC];

  for (genvar s = 0; s < NSRC; s++) begin : g_cf
    logic unused_full;
    logic [$clog2(DEPTH+1)-1:0] unused_count;
    ctrl_fifo #(.DEPTH(DEPTH)) u_cf (
      .clk        (clk),
      .rst_n      (rst_n),
      .push       (cf_push[s]),
      .push_route (route[s]),
      .pop        (cf_pop[s]),
      .head       (cf_head[s]),
      .empty      (cf_empty[s]),
      .full       (unused_full),
      .count      (unused_count)
    );
  end

  // ------------------------------------------------------------- candidates
  logic [NCAND-1:0] req [NUM_OUT];
  ctrl_t               cand [NCAND];

  always_comb begin
    for (int o = 0; o < NUM_OUT; o++) req[o] = '0;
    for (int s = 0; s < NSRC; s++) begin
      // buffered packet at the head of the control FIFO
      cand[s] = cf_head[s].nxt;
      if (!cf_empty[s]) req[int'(cf_head[s].dir)][s] = 1'b1;
      // freshly decoded packet, allowed to bypass only behind an empty FIFO
      cand[NSRC + s] = route[s].nxt;
      if (fwd[s] && cf_empty[s]) req[int'(route[s].dir)][NSRC + s] = 1'b1;
    end
  end

  // --------------------------------------------------------------- choosers
  logic [NCAND-1:0] grant       [NUM_OUT];
  logic                grant_valid [NUM_OUT];
  logic [CW-1:0]   grant_idx   [NUM_OUT];

  for (genvar o = 0; o < NUM_OUT; o++) begin : g_ch
    chooser #(.N(NCAND)) u_ch (
      .req         (req[o]),
      .throttle_in (throttle_in[o]),
      .grant       (grant[o]),
      .granted     (grant_valid[o]),
      .grant_idx   (grant_idx[o])
    );
  end

  // Buffer control derived from the grants.
  logic [NCAND-1:0] granted_any;
  always_comb begin
    granted_any = '0;
    for (int o = 0; o < NUM_OUT; o++) granted_any |= grant[o];
    for (int s = 0; s < NSRC; s++) begin
      cf_pop[s]  = granted_any[s];
      cf_push[s] = fwd[s] && !granted_any[NSRC + s];
    end
  end

  // --------------------------------------------------------- control switch
  ctrl_switch #(.N_OUT(NUM_OUT), .N_CAND(NCAND)) u_cs (
    .clk      (clk),
    .rst_n    (rst_n),
    .cand     (cand),
    .grant    (grant),
    .ctrl_out (ctrl_out)
  );

  // ---------------------------------------------------------- operand side
  op_t src_op [NSRC];
  op_t lat    [NSRC];
  always_comb begin
    for (int s = 0; s < NUM_IN; s++) src_op[s] = op_in[s];
    for (int s = NUM_IN; s < NSRC; s++) src_op[s] = alu_op;
  end

  bypass_latch #(.N(NSRC)) u_lat (
    .clk    (clk),
    .rst_n  (rst_n),
    .op_in  (src_op),
    .op_lat (lat)
  );

  // The operand of a buffered packet arrives one cycle after the push.
  logic [NSRC-1:0] op_push_q;
  always_ff @(posedge clk) begin
    if (!rst_n) op_push_q <= '0;
    else for (int s = 0; s < NSRC; s++) op_push_q[s] <= cf_push[s];
  end

  logic [DATA_W-1:0]  of_head [NSRC];
  logic [DATA_W-1:0]  lat_data [NSRC];
  logic [NSRC-1:0] of_pop;

  for (genvar s = 0; s < NSRC; s++) begin : g_of
    logic unused_empty, unused_full;
    operand_fifo #(.DEPTH(DEPTH), .WIDTH(DATA_W)) u_of (
      .clk       (clk),
      .rst_n     (rst_n),
      .push      (op_push_q[s]),
      .push_data (src_op[s].data),
      .pop       (of_pop[s]),
      .head      (of_head[s]),
      .empty     (unused_empty),
      .full      (unused_full)
    );
    assign lat_data[s] = lat[s].data;
  end

  logic              ov [NUM_OUT];
  logic [DATA_W-1:0] od [NUM_OUT];

  operand_switch #(.N_OUT(NUM_OUT), .N_SRC(NSRC), .W(DATA_W)) u_os (
    .clk         (clk),
    .rst_n       (rst_n),
    .grant_valid (grant_valid),
    .grant_idx   (grant_idx),
    .lat         (lat_data),
    .fifo_head   (of_head),
    .op_valid    (ov),
    .op_data     (od),
    .fifo_pop    (of_pop)
  );

  always_comb begin
    for (int o = 0; o < NUM_OUT; o++) begin
      op_out[o].valid = ov[o];
      op_out[o].data  = od[o];
    end
  end

  // ----------------------------------------------------------- flow control
  logic [OCC_W-1:0]   occ      [NSRC];
  logic [OCC_W-1:0]   occ_next [NSRC];
  logic [NSRC-1:0] throttle_q;

  always_comb begin
    for (int s = 0; s < NSRC; s++)
      occ_next[s] = occ[s] + OCC_W'(cf_push[s]) - OCC_W'(of_pop[s]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < NSRC; s++) occ[s] <= '0;
      throttle_q <= '0;
    end else begin
      for (int s = 0; s < NSRC; s++) begin
        occ[s]        <= occ_next[s];
        throttle_q[s] <= (DEPTH - int'(occ_next[s])) <= THROTTLE_SLOTS;
      end
    end
  end

  assign throttle_out = throttle_q[NUM_IN-1:0];
  // the processor stops when any of its destination paths is short of room
  assign throttle_alu = |throttle_q[NSRC-1:NUM_IN];

  // ------------------------------------------------------ delivery to node
  logic [NUM_IN-1:0] here_q;
  logic [NUM_IN-1:0] here_slot_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      here_q      <= '0;
      here_slot_q <= '0;
    end else begin
      for (int s = 0; s < NUM_IN; s++) begin
        here_q[s]      <= for_here[s];
        here_slot_q[s] <= ctrl_in[s].slot;
      end
    end
  end

  always_comb begin
    for (int s = 0; s < NUM_IN; s++) here_data[s] = op_in[s].data;
  end
  always_comb begin
    for (int s = 0; s < NUM_IN; s++) here_next[s] = for_here[s];
  end
  assign here_valid = here_q;
  assign here_slot  = here_slot_q;

  // ------------------------------------------------------------- checking
  for (genvar s = 0; s < NSRC; s++) begin : g_chk
    a_reachable: assert property (@(posedge clk) disable iff (!rst_n) !bad[s])
      else $error("gpa_router: unreachable destination on input %0d", s);
    a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                   cf_push[s] |-> occ[s] < OCC_W'(DEPTH))
      else $error("gpa_router: buffer overrun on input %0d", s);
    a_operand_follows: assert property (@(posedge clk) disable iff (!rst_n)
                                        op_push_q[s] |-> src_op[s].valid)
      else $error("gpa_router: operand missing one cycle after its control on input %0d", s);
  end
  for (genvar t = 0; t < ALU_TARGETS; t++) begin : g_chk_alu
    a_alu_obeys_throttle: assert property (@(posedge clk) disable iff (!rst_n)
                                           throttle_alu |-> !alu_ctrl[t].valid)
      else $error("gpa_router: processor sent while throttled");
  end

endmodule
