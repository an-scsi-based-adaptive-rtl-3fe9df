// utr_inject: builds the routing header of a new packet at its source node.
//
// The bidirectional 2-D torus is split into four virtual networks,
// X+Y+, X+Y-, X-Y+ and X-Y-. A packet stays in one of them from source to
// destination, so its X and Y directions are fixed here, each chosen to
// give the shorter way round its ring: with d = (dst - src) mod k the
// packet goes + with distance d when d <= k - d, otherwise - with
// distance k - d. A tie (d = k/2) goes +; a zero distance is marked +.
// Both rules are this design's choice (the document only says the packet
// takes a shortest path). The header starts in dimension X unless no X hop
// is needed, and both virtual-channel bits start at 0 (h); utr_route
// rewrites them at each hop.
//
// Purely combinational. k is the radix of the torus (nodes per ring), from
// 2 up to 2**COORD_W; coordinates must be below k.
module utr_inject
  import router_pkg::*;
#(
  parameter int COORD_W = 4
) (
  input  logic [COORD_W:0]   k,
  input  logic [COORD_W-1:0] src_x,
  input  logic [COORD_W-1:0] src_y,
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  output route_hdr_t         hdr
);

  // shortest direction and distance along one ring
  function automatic logic [DIST_W:0] ring_choice(
      input logic [COORD_W:0]   kk,
      input logic [COORD_W-1:0] s,
      input logic [COORD_W-1:0] d);
    logic [COORD_W+1:0] fwd, back;
    begin
      fwd  = (d >= s) ? (COORD_W+2)'(d) - (COORD_W+2)'(s)
                      : (COORD_W+2)'(d) + (COORD_W+2)'(kk) - (COORD_W+2)'(s);
      back = (fwd == '0) ? '0 : (COORD_W+2)'(kk) - fwd;
      if (fwd <= back) ring_choice = {1'b1, DIST_W'(fwd)};
      else             ring_choice = {1'b0, DIST_W'(back)};
    end
  endfunction

  logic [DIST_W:0] xc, yc;

  always_comb begin
    xc = ring_choice(k, src_x, dst_x);
    yc = ring_choice(k, src_y, dst_y);
    hdr        = '0;
    hdr.x_pos  = xc[DIST_W];
    hdr.x_dist = xc[DIST_W-1:0];
    hdr.y_pos  = yc[DIST_W];
    hdr.y_dist = yc[DIST_W-1:0];
    hdr.dim    = (xc[DIST_W-1:0] == '0);
    hdr.vx     = VC_H;
    hdr.vy     = VC_H;
  end

endmodule
