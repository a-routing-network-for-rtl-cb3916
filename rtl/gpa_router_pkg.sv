// Shared types and constants of the grid operand network.
//
// The network joins the nodes of a grid processor. Every node has three
// downstream links (left-below, below, right-below) and three upstream links,
// a fan-in and fan-out of three. Each link is a pair of channels: a control
// channel, which carries a small packet with the operand's relative
// destination, and an operand channel, which carries the operand itself one
// clock cycle after its control packet.
//
// Grid size (4 x 4) and fan-in/fan-out follow the grid organisation that the
// router was designed for. Operand width, the width of the target-slot tag and
// the buffer depth are this design's choices.
package gpa_router_pkg;

  // Grid organisation: four rows of four nodes.
  localparam int unsigned GRID_ROWS = 4;
  localparam int unsigned GRID_COLS = 4;

  // Operand width (choice of this design: one 32-bit integer word).
  localparam int unsigned DATA_W = 32;

  // Relative destination. dx is the signed column offset, dy the number of
  // rows still to travel. Every hop moves one row down, so dy never exceeds
  // GRID_ROWS-1 and |dx| never exceeds dy for a reachable target.
  localparam int unsigned DX_W = $clog2(GRID_COLS) + 1;
  localparam int unsigned DY_W = (GRID_ROWS > 1) ? $clog2(GRID_ROWS) : 1;

  // Network ports of one router.
  localparam int unsigned NUM_IN  = 3;           // network inputs
  localparam int unsigned NUM_OUT = 3;           // network outputs
  // Sources of a router without multicast: the inputs plus the processor.
  // With multicast the router adds one source per extra processor target.
  localparam int unsigned NUM_SRC = NUM_IN + 1;

  // Candidate index seen by a chooser: 0..NUM_SRC-1 are the heads of the
  // control FIFOs, NUM_SRC..2*NUM_SRC-1 are freshly decoded (bypass) packets.
  localparam int unsigned NUM_CAND = 2 * NUM_SRC;

  // Output channel directions, seen from the sending node.
  typedef enum logic [1:0] {
    DIR_LEFT  = 2'd0,   // to row+1, column-1
    DIR_DOWN  = 2'd1,   // to row+1, same column
    DIR_RIGHT = 2'd2    // to row+1, column+1
  } dir_e;

  // Control packet. slot names the operand buffer (OP1 or OP2) of the
  // consuming instruction; it travels unchanged.
  typedef struct packed {
    logic                   valid;
    logic signed [DX_W-1:0] dx;
    logic [DY_W-1:0]        dy;
    logic                   slot;
  } ctrl_t;

  // Operand channel. valid marks the cycle that carries an operand.
  typedef struct packed {
    logic              valid;
    logic [DATA_W-1:0] data;
  } op_t;

  // A control packet decoded for forwarding: where it goes and what the
  // next node receives.
  typedef struct packed {
    dir_e  dir;
    ctrl_t nxt;
  } route_t;

endpackage
