// ALU destination decoder of the operand router.
//
// The local processor announces each result one cycle before it produces it
// by presenting a control packet holding the result's relative destination.
// This decoder picks the output channel the result will leave on and builds
// the packet the next node receives. A result never targets its own node
// through the network, so there is no for-here case: the first hop always
// descends one row, and dx moves one step towards zero on a diagonal hop.
// A packet with dy = 0 cannot leave the node and raises bad. The slot tag is
// carried through unchanged.
//
// Purely combinational. That the processor's control goes through its own
// decoder follows the router's design; sharing the relative-address rule of
// the channel decoders is this design's choice.
module alu_decoder
  import gpa_router_pkg::*;
(
  input  ctrl_t  alu_ctrl,   // destination announced by the processor
  output logic   fwd,        // a result is to be sent
  output route_t route,      // output channel and packet for the next node
  output logic   bad         // destination the network cannot reach
);

  logic go_left, go_right;

  always_comb begin
    go_left  = alu_ctrl.dx < 0;
    go_right = alu_ctrl.dx > 0;
    fwd      = alu_ctrl.valid && (alu_ctrl.dy != '0);
    bad      = alu_ctrl.valid && (alu_ctrl.dy == '0);

    route.nxt       = alu_ctrl;
    route.nxt.valid = fwd;
    route.nxt.dy    = alu_ctrl.dy - 1'b1;
    unique case ({go_left, go_right})
      2'b10:   begin route.dir = DIR_LEFT;  route.nxt.dx = alu_ctrl.dx + DX_W'(1); end
      2'b01:   begin route.dir = DIR_RIGHT; route.nxt.dx = alu_ctrl.dx - DX_W'(1); end
      default: begin route.dir = DIR_DOWN;  route.nxt.dx = alu_ctrl.dx;         end
    endcase
  end

endmodule
