// utr_route: one hop of the minimally adaptive unidirectional torus
// routing (UTR) over the four virtual networks.
//
// Given the node's own coordinates and the packet header, it chooses the
// output link and the virtual channel class, or reports that the packet
// has arrived, and returns the header to send on.
//
// Direction: the virtual network bits fix the sign of each dimension, so a
// packet only ever moves toward its destination. While both distances are
// non-zero either dimension is a shortest-path step: the unit keeps the
// current dimension (header bit dim) unless that link is marked busy and
// the other is free. This selection rule is this design's choice; the
// document says only that the packet may take any shortest path.
//
// Virtual channel (Dally and Seitz's p/h classes): the p-channels carry
// packets that still have to cross the wraparound link of the ring, the
// h-channels all others. Moving + from coordinate c with distance n, the
// wraparound is still ahead when c + n >= k; moving -, when n > c. The hop
// takes class p in that case, else h. The chosen class is written into vx
// or vy, the distance of the chosen dimension is decremented and dim
// records the dimension used, as in the header tables.
//
// Links: X+ = East, X- = West, Y+ = North, Y- = South (naming is this
// design's choice). Purely combinational.
module utr_route
  import router_pkg::*;
#(
  parameter int COORD_W = 4
) (
  input  logic [COORD_W:0]   k,
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  route_hdr_t         hdr_in,
  input  logic [3:0]         link_busy,  // indexed by dir_e: N, S, E, W
  output dir_e               dir,
  output logic               vc,         // VC_H or VC_P for the chosen hop
  output route_hdr_t         hdr_out
);

  localparam int SW = COORD_W + DIST_W + 2;

  logic need_x, need_y, use_y;
  dir_e dir_x, dir_y;
  logic vc_x, vc_y;

  always_comb begin
    need_x = (hdr_in.x_dist != '0);
    need_y = (hdr_in.y_dist != '0);
    dir_x  = hdr_in.x_pos ? DIR_EAST  : DIR_WEST;
    dir_y  = hdr_in.y_pos ? DIR_NORTH : DIR_SOUTH;

    // class p while the wraparound link is still ahead
    vc_x = hdr_in.x_pos ? (SW'(cur_x) + SW'(hdr_in.x_dist) >= SW'(k))
                        : (SW'(hdr_in.x_dist) > SW'(cur_x));
    vc_y = hdr_in.y_pos ? (SW'(cur_y) + SW'(hdr_in.y_dist) >= SW'(k))
                        : (SW'(hdr_in.y_dist) > SW'(cur_y));

    // dimension selection
    if (need_x && need_y) begin
      if (hdr_in.dim) use_y = !(link_busy[2'(dir_y)] && !link_busy[2'(dir_x)]);
      else            use_y =  (link_busy[2'(dir_x)] && !link_busy[2'(dir_y)]);
    end else begin
      use_y = need_y;
    end

    hdr_out = hdr_in;
    if (!need_x && !need_y) begin
      dir = DIR_DELIVER;
      vc  = VC_H;
    end else if (use_y) begin
      dir            = dir_y;
      vc             = vc_y;
      hdr_out.dim    = 1'b1;
      hdr_out.vy     = vc_y;
      hdr_out.y_dist = hdr_in.y_dist - 1'b1;
    end else begin
      dir            = dir_x;
      vc             = vc_x;
      hdr_out.dim    = 1'b0;
      hdr_out.vx     = vc_x;
      hdr_out.x_dist = hdr_in.x_dist - 1'b1;
    end
  end

endmodule
