// Operand network of a grid processor: a ROWS x COLS array of routers.
//
// Each node of the grid has a processor and a router. A router sends to the
// three nodes of the next row that touch it (lower-left, below, lower-right)
// and receives from the three of the row above, so operands always move one
// row down per hop and can shift one column per hop. The routers of the top
// row receive from the register-file side of the processor, whose channels
// are ports here, and the outputs of the bottom row are ports as well. A link
// that would leave the grid on the left or right edge does not exist: its
// input is idle and its output is held throttled, so a router never uses it;
// the delivery outputs of those idle inputs are therefore constant.
//
// The processors (instruction and operand buffers, ALU and wake-up logic)
// are not part of the network. Their side of every router is a port:
// alu_ctrl/alu_op to send a result (to ALU_TARGETS destinations at once),
// throttle_alu back-pressure, here_next announcing an operand one cycle
// ahead, and here_valid/here_slot/here_data for operands delivered to the
// node.
//
// Timing: a control packet takes one cycle per hop and its operand follows it
// one cycle behind, so an uncontended operand announced by a processor in
// cycle t reaches a node h rows below in cycle t+h+1 (for-here in t+h).
//
// The 4 x 4 size and the three-way connectivity follow the grid organisation
// the router was designed for; the edge handling is this design's choice.
module gpa_grid
  import gpa_router_pkg::*;
#(
  parameter int unsigned ROWS           = GRID_ROWS,
  parameter int unsigned COLS           = GRID_COLS,
  parameter int unsigned DEPTH          = 4,
  parameter int unsigned THROTTLE_SLOTS = 2,
  parameter int unsigned ALU_TARGETS    = 1   // 2: every result may go to two nodes
) (
  input  logic               clk,
  input  logic               rst_n,
  // top edge: channels into the first row
  input  ctrl_t              top_ctrl_in     [COLS][NUM_IN],
  input  op_t                top_op_in       [COLS][NUM_IN],
  output logic [NUM_IN-1:0]  top_throttle    [COLS],
  // bottom edge: channels out of the last row
  output ctrl_t              bot_ctrl_out    [COLS][NUM_OUT],
  output op_t                bot_op_out      [COLS][NUM_OUT],
  input  logic [NUM_OUT-1:0] bot_throttle_in [COLS],
  // processor side of every node
  input  ctrl_t              alu_ctrl        [ROWS][COLS][ALU_TARGETS],
  input  op_t                alu_op          [ROWS][COLS],
  output logic               throttle_alu    [ROWS][COLS],
  output logic [NUM_IN-1:0]  here_next       [ROWS][COLS],
  output logic [NUM_IN-1:0]  here_valid      [ROWS][COLS],
  output logic [NUM_IN-1:0]  here_slot       [ROWS][COLS],
  output logic [DATA_W-1:0]  here_data       [ROWS][COLS][NUM_IN]
);

  ctrl_t              n_ctrl_in  [ROWS][COLS][NUM_IN];
  op_t                n_op_in    [ROWS][COLS][NUM_IN];
  logic [NUM_IN-1:0]  n_thr_out  [ROWS][COLS];
  ctrl_t              n_ctrl_out [ROWS][COLS][NUM_OUT];
  op_t                n_op_out   [ROWS][COLS][NUM_OUT];
  logic [NUM_OUT-1:0] n_thr_in   [ROWS][COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col

      // ---- inputs: from the row above (or the top edge)
      for (genvar k = 0; k < NUM_IN; k++) begin : g_in
        // input k comes from the node at column c+k-1 of the row above,
        // through that node's output 2-k
        localparam int SC = c + k - 1;
        if (r == 0) begin : g_top
          assign n_ctrl_in[r][c][k] = top_ctrl_in[c][k];
          assign n_op_in[r][c][k]   = top_op_in[c][k];
        end else if (SC >= 0 && SC < COLS) begin : g_link
          assign n_ctrl_in[r][c][k] = n_ctrl_out[r-1][SC][2-k];
          assign n_op_in[r][c][k]   = n_op_out[r-1][SC][2-k];
        end else begin : g_edge
          assign n_ctrl_in[r][c][k] = '0;
          assign n_op_in[r][c][k]   = '0;
        end
      end

      // ---- throttles seen by this node's outputs: from the row below
      for (genvar o = 0; o < NUM_OUT; o++) begin : g_thr
        // output o goes to the node at column c+o-1 of the row below,
        // arriving there on input 2-o
        localparam int DC = c + o - 1;
        if (r == ROWS - 1) begin : g_bot
          assign n_thr_in[r][c][o]    = bot_throttle_in[c][o];
          assign bot_ctrl_out[c][o]   = n_ctrl_out[r][c][o];
          assign bot_op_out[c][o]     = n_op_out[r][c][o];
        end else if (DC >= 0 && DC < COLS) begin : g_link
          assign n_thr_in[r][c][o] = n_thr_out[r+1][DC][2-o];
        end else begin : g_edge
          assign n_thr_in[r][c][o] = 1'b1;
        end
      end

      if (r == 0) begin : g_top_thr
        assign top_throttle[c] = n_thr_out[r][c];
      end

      gpa_router #(
        .DEPTH(DEPTH), .THROTTLE_SLOTS(THROTTLE_SLOTS), .ALU_TARGETS(ALU_TARGETS)
      ) u_router (
        .clk          (clk),
        .rst_n        (rst_n),
        .ctrl_in      (n_ctrl_in[r][c]),
        .op_in        (n_op_in[r][c]),
        .throttle_out (n_thr_out[r][c]),
        .ctrl_out     (n_ctrl_out[r][c]),
        .op_out       (n_op_out[r][c]),
        .throttle_in  (n_thr_in[r][c]),
        .alu_ctrl     (alu_ctrl[r][c]),
        .alu_op       (alu_op[r][c]),
        .throttle_alu (throttle_alu[r][c]),
        .here_next    (here_next[r][c]),
        .here_valid   (here_valid[r][c]),
        .here_slot    (here_slot[r][c]),
        .here_data    (here_data[r][c])
      );
    end
  end

endmodule
