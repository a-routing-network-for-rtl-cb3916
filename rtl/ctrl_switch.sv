// Control switch of the operand router.
//
// A multiplexer per output control channel: it puts the rewritten control
// packet of the candidate that the channel's chooser granted onto the
// channel. The output is registered, so a packet that arrives in cycle t and
// is granted in cycle t is seen by the next node in cycle t+1, one node per
// cycle. With no grant the channel carries an invalid packet.
//
// Interface: cand[k] is the packet candidate k would forward, grant[o] the
// one-hot grant of output o's chooser. ctrl_out[o] is valid one cycle later.
module ctrl_switch
  import gpa_router_pkg::*;
#(
  parameter int unsigned N_OUT  = NUM_OUT,
  parameter int unsigned N_CAND = NUM_CAND
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ctrl_t             cand     [N_CAND],
  input  logic [N_CAND-1:0] grant    [N_OUT],
  output ctrl_t             ctrl_out [N_OUT]
);

  ctrl_t sel [N_OUT];

  always_comb begin
    for (int o = 0; o < N_OUT; o++) begin
      sel[o] = '0;
      for (int k = 0; k < N_CAND; k++) begin
        if (grant[o][k]) sel[o] = cand[k];
      end
      sel[o].valid = |grant[o];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int o = 0; o < N_OUT; o++) ctrl_out[o] <= '0;
    end else begin
      for (int o = 0; o < N_OUT; o++) ctrl_out[o] <= sel[o];
    end
  end

endmodule
