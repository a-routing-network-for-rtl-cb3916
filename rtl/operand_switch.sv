// Operand switch of the operand router.
//
// A multiplexer per output operand channel. The chooser's grant for a cycle t
// is carried through two pipeline registers, so the switch steers the operand
// in cycle t+2, one cycle after the control switch has sent its packet. The
// operand comes either from the delay element of its input (a bypassing
// operand that arrived in t+1 and was delayed by one cycle) or from the head
// of its input's operand FIFO, which is popped in the same cycle.
//
// Interface: grant_valid/grant_idx come from the choosers in cycle t, using
// the router's candidate numbering (below N_SRC a FIFO head, from N_SRC on a
// bypass packet). lat[s] is the delay element of input s, fifo_head[s] the
// head of its operand FIFO. op_out[o] and fifo_pop[s] are combinational from
// registers, valid in cycle t+2.
module operand_switch
  import gpa_router_pkg::*;
#(
  parameter int unsigned N_OUT = NUM_OUT,
  parameter int unsigned N_SRC = NUM_SRC,
  parameter int unsigned W     = DATA_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          grant_valid [N_OUT],
  input  logic [$clog2(2*N_SRC)-1:0]    grant_idx   [N_OUT],
  input  logic [W-1:0]                  lat         [N_SRC],
  input  logic [W-1:0]                  fifo_head   [N_SRC],
  output logic                          op_valid    [N_OUT],
  output logic [W-1:0]                  op_data     [N_OUT],
  output logic [N_SRC-1:0]              fifo_pop
);

  localparam int unsigned IW = $clog2(2 * N_SRC);

  logic          v1 [N_OUT], v2 [N_OUT];
  logic [IW-1:0] i1 [N_OUT], i2 [N_OUT];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int o = 0; o < N_OUT; o++) begin
        v1[o] <= 1'b0; v2[o] <= 1'b0; i1[o] <= '0; i2[o] <= '0;
      end
    end else begin
      for (int o = 0; o < N_OUT; o++) begin
        v1[o] <= grant_valid[o];
        i1[o] <= grant_idx[o];
        v2[o] <= v1[o];
        i2[o] <= i1[o];
      end
    end
  end

  always_comb begin
    fifo_pop = '0;
    for (int o = 0; o < N_OUT; o++) begin
      op_valid[o] = v2[o];
      op_data[o]  = '0;
      for (int s = 0; s < N_SRC; s++) begin
        if (v2[o] && i2[o] == IW'(s)) begin
          op_data[o]  = fifo_head[s];
          fifo_pop[s] = 1'b1;
        end
        if (v2[o] && i2[o] == IW'(N_SRC + s)) op_data[o] = lat[s];
      end
    end
  end

endmodule
