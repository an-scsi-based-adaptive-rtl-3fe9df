// router_pkg: types and constants shared by the SCSI torus router.
//
// Holds the 16-bit routing header carried in the first bytes of every
// packet, the SCSI bus phase and status codes used by the SCSI target
// controllers, and the output directions of a torus node.
//
// Header layout (bit 15 down to bit 0):
//   [15]    dim        0 = the packet is travelling along X, 1 = along Y
//   [14]    vx         X virtual channel in use / last used (0 = h, 1 = p)
//   [13]    vy         Y virtual channel in use / last used (0 = h, 1 = p)
//   [12]    x_pos      virtual network, X direction (1 = X+, 0 = X-)
//   [11]    y_pos      virtual network, Y direction (1 = Y+, 0 = Y-)
//   [10:6]  x_dist     hops still to go along X
//   [5:1]   y_dist     hops still to go along Y
//   [0]     reserved, written 0
// The positions of dim, vx, vy, the two virtual-network bits and the start
// of X-distance follow the published header format; the split of the two
// distance fields into 5 bits each and the reserved bit 0 are this design's
// choice.
//
// The SCSI bus is modelled with active-high logic levels (a real SCSI bus
// uses active-low, wired-OR lines) and an 8-bit data bus without parity.
package router_pkg;

  localparam int DIST_W = 5;

  typedef struct packed {
    logic              dim;
    logic              vx;
    logic              vy;
    logic              x_pos;
    logic              y_pos;
    logic [DIST_W-1:0] x_dist;
    logic [DIST_W-1:0] y_dist;
    logic              rsvd;
  } route_hdr_t;

  // Virtual channel classes of the unidirectional torus routing
  localparam logic VC_H = 1'b0;
  localparam logic VC_P = 1'b1;

  // Output choice of the per-hop routing decision
  typedef enum logic [2:0] {
    DIR_NORTH   = 3'd0,  // Y+
    DIR_SOUTH   = 3'd1,  // Y-
    DIR_EAST    = 3'd2,  // X+
    DIR_WEST    = 3'd3,  // X-
    DIR_DELIVER = 3'd4   // packet has arrived at this node
  } dir_e;

  // SCSI information-transfer phases as {MSG, C/D, I/O}
  localparam logic [2:0] PH_DATA_OUT = 3'b000;
  localparam logic [2:0] PH_COMMAND  = 3'b010;
  localparam logic [2:0] PH_STATUS   = 3'b011;
  localparam logic [2:0] PH_MSG_IN   = 3'b111;

  // SCSI status bytes returned in the STATUS phase
  localparam logic [7:0] ST_GOOD      = 8'h00;
  localparam logic [7:0] ST_CHECK     = 8'h02;
  localparam logic [7:0] ST_BUSY      = 8'h08;

  // SCSI message COMMAND COMPLETE
  localparam logic [7:0] MSG_CMD_COMPLETE = 8'h00;

  // Command opcodes understood by the command decoder
  localparam logic [7:0] OP_TEST_UNIT_READY = 8'h00;
  localparam logic [7:0] OP_SEND6           = 8'h0A;

endpackage
