// Delay elements on the bypass paths of the operand router.
//
// Every input operand channel passes a one-cycle delay before it reaches the
// operand switch. An operand arrives one cycle after its control packet; the
// delay gives the decoder and chooser a full cycle for that packet and keeps
// the operand one cycle behind the forwarded control packet, so it can never
// catch up with it. The router's design places latches here; this design uses
// edge-triggered registers, which give the same one-cycle delay.
//
// Interface: op_in[s] in cycle t appears on op_lat[s] in cycle t+1.
module bypass_latch
  import gpa_router_pkg::*;
#(
  parameter int unsigned N = NUM_SRC
) (
  input  logic clk,
  input  logic rst_n,
  input  op_t  op_in  [N],
  output op_t  op_lat [N]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < N; s++) op_lat[s] <= '0;
    end else begin
      for (int s = 0; s < N; s++) op_lat[s] <= op_in[s];
    end
  end

endmodule
