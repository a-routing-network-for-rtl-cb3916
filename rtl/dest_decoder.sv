// Input channel decoder of the operand router.
//
// One decoder sits on each incoming control channel. Addressing is relative:
// a packet whose destination is (dx, dy) = (0, 0) has arrived, and the decoder
// raises for_here so that the processor takes the operand that follows on the
// next cycle. Otherwise the sign of dx picks the output channel: negative goes
// left-below, positive right-below, zero straight below. The decoder rewrites
// the destination for the next node: dy drops by one (every hop descends one
// row) and dx moves one step towards zero when the hop is diagonal.
//
// A packet with dy = 0 and dx != 0 cannot be reached over links that always
// descend; it raises bad. The router treats that as a compiler error. The
// slot tag (which operand of the consumer) is carried through unchanged.
//
// Purely combinational. The zero-compare routing and the rewrite of the
// destination at every node follow the router's design; the field layout of
// the packet is this design's choice.
module dest_decoder
  import gpa_router_pkg::*;
(
  input  ctrl_t  ctrl_in,    // packet arriving on the control channel
  output logic   fwd,        // packet is to be forwarded
  output logic   for_here,   // operand on the next cycle is for this node
  output route_t route,      // direction and rewritten packet (valid when fwd)
  output logic   bad         // unreachable destination
);

  always_comb begin
    fwd       = 1'b0;
    for_here  = 1'b0;
    bad       = 1'b0;
    route.dir = DIR_DOWN;
    route.nxt = ctrl_in;
    if (ctrl_in.valid) begin
      if (ctrl_in.dx == '0 && ctrl_in.dy == '0) begin
        for_here = 1'b1;
      end else if (ctrl_in.dy == '0) begin
        bad = 1'b1;
      end else begin
        fwd          = 1'b1;
        route.nxt.dy = ctrl_in.dy - 1'b1;
        if (ctrl_in.dx < 0) begin
          route.dir    = DIR_LEFT;
          route.nxt.dx = ctrl_in.dx + DX_W'(1);
        end else if (ctrl_in.dx > 0) begin
          route.dir    = DIR_RIGHT;
          route.nxt.dx = ctrl_in.dx - DX_W'(1);
        end else begin
          route.dir    = DIR_DOWN;
        end
      end
    end
    if (!fwd) route.nxt.valid = 1'b0;
  end

endmodule
