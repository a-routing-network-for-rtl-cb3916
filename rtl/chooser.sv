// Output channel chooser of the operand router.
//
// There is one chooser per output channel. Each cycle it looks at every
// candidate that wants its channel and grants at most one of them the
// channel for the next cycle. Candidates are the heads of the control FIFOs
// (operands already waiting in the router) and the packets decoded this cycle
// that could bypass the buffers. The grant also tells the buffers what to do:
// a granted FIFO head is popped, a granted bypass packet is not buffered, and
// a bypass packet that is not granted is written to its control FIFO.
//
// Priority is static: the lowest candidate index wins. With the candidate
// order of the router (all FIFO heads first, then bypass packets, each in
// input order with the processor last) waiting operands go before new ones.
// A static scheme follows the router's design; this particular order is this
// design's choice. When throttle_in is high the next node has no room left
// and nothing is granted.
//
// Purely combinational.
module chooser #(
  parameter int unsigned N = 8   // number of candidates
) (
  input  logic [N-1:0]         req,          // candidate wants this channel
  input  logic                 throttle_in,  // next node asks to stop sending
  output logic [N-1:0]         grant,        // one-hot grant
  output logic                 granted,      // some candidate was granted
  output logic [$clog2(N)-1:0] grant_idx     // index of the granted candidate
);

  always_comb begin
    grant     = '0;
    granted   = 1'b0;
    grant_idx = '0;
    if (!throttle_in) begin
      for (int i = N - 1; i >= 0; i--) begin
        if (req[i]) begin
          grant     = '0;
          grant[i]  = 1'b1;
          granted   = 1'b1;
          grant_idx = ($clog2(N))'(i);
        end
      end
    end
  end

endmodule
