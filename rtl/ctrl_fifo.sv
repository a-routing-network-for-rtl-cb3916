// Control FIFO of the operand router.
//
// One control FIFO sits behind each decoder. When a freshly decoded packet
// cannot take its output channel at once (the channel is contended or
// throttled, or older packets from the same input are still waiting), the
// packet, already decoded into its output direction and rewritten for the
// next node, is written here. The chooser of that direction reads the head.
// Because the operand follows its control by one cycle, this FIFO runs one
// cycle ahead of the operand FIFO of the same input.
//
// Interface: push/push_route write at the clock edge, head/empty show the
// oldest entry, pop removes it at the clock edge. Push and pop may coincide,
// also when full. Pushing into a full FIFO without a pop is a protocol error
// and is checked by an assertion; the router's throttling prevents it.
//
// Depth 4 is this design's choice; the sizing of the buffers is left open.
module ctrl_fifo
  import gpa_router_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   push,
  input  route_t push_route,
  input  logic   pop,
  output route_t head,
  output logic   empty,
  output logic   full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  route_t            mem [DEPTH];
  logic [PTR_W-1:0]  rd_ptr, wr_ptr;

  function automatic logic [PTR_W-1:0] inc(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign empty = (count == '0);
  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign head  = mem[rd_ptr];

  logic do_push, do_pop;
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= inc(wr_ptr);
      if (do_pop)  rd_ptr <= inc(rd_ptr);
      count <= count + (($clog2(DEPTH+1))'(do_push)) - (($clog2(DEPTH+1))'(do_pop));
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= push_route;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop))
    else $error("ctrl_fifo: push into a full FIFO");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty)
    else $error("ctrl_fifo: pop from an empty FIFO");

endmodule
