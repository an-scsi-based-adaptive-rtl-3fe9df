// tb_utr_route: routes packets hop by hop through tori of radix 2 to 16.
//
// For each source/destination pair the header comes from utr_inject; the
// testbench then applies utr_route at every node on the way, with random
// busy links, and moves the packet to the neighbour the unit names. The
// reference is independent of the unit's equations: the packet must arrive
// in exactly the minimal number of hops (found by walking the rings), each
// hop must move in the direction of its virtual network, the unit must
// report delivery only at the destination, and the virtual channel must be
// p exactly when the remaining hops of that dimension still cross the
// wraparound link (between nodes k-1 and 0), h otherwise. The busy-link
// rule is checked too: with both dimensions open, the current one is kept
// unless its link is busy and the other is free. Counts of p hops, h hops,
// wraparound crossings and busy-driven dimension changes must all be
// non-zero.
`timescale 1ns/1ps
module tb_utr_route;
  import router_pkg::*;
  localparam int CW = 4;

  logic [CW:0] k;
  logic [CW-1:0] src_x, src_y, dst_x, dst_y, cur_x, cur_y;
  route_hdr_t inj_hdr, hdr_in, hdr_out;
  logic [3:0] link_busy;
  dir_e dir;
  logic vc;

  utr_inject #(.COORD_W(CW)) u_inj (.k, .src_x, .src_y, .dst_x, .dst_y, .hdr(inj_hdr));
  utr_route  #(.COORD_W(CW)) dut (.k, .cur_x, .cur_y, .hdr_in, .link_busy, .dir, .vc, .hdr_out);

  int checks = 0, failures = 0;
  int n_p = 0, n_h = 0, n_wrap = 0, n_adapt = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int walk(input int kk, input int s, input int d, input bit plus);
    int c = s, n = 0;
    while (c != d) begin
      c = plus ? (c + 1) % kk : (c + kk - 1) % kk;
      n++;
    end
    return n;
  endfunction

  // does walking from s to d in the given direction use the k-1 <-> 0 link?
  function automatic bit crosses(input int kk, input int s, input int d, input bit plus);
    int c = s;
    while (c != d) begin
      if (plus && c == kk - 1) return 1;
      if (!plus && c == 0) return 1;
      c = plus ? (c + 1) % kk : (c + kk - 1) % kk;
    end
    return 0;
  endfunction

  initial begin
    int radii [6] = '{2, 3, 4, 5, 8, 16};
    foreach (radii[r]) begin
      automatic int kk = radii[r];
      for (int sx = 0; sx < kk; sx++)
      for (int sy = 0; sy < kk; sy += (kk > 8 ? 3 : 1))
      for (int dx = 0; dx < kk; dx++)
      for (int dy = 0; dy < kk; dy += (kk > 8 ? 5 : 1)) begin
        int hops, min_hops, x, y;
        bit arrived;
        k = (CW+1)'(kk);
        src_x = CW'(sx); src_y = CW'(sy); dst_x = CW'(dx); dst_y = CW'(dy);
        #1;
        min_hops = ((walk(kk, sx, dx, 1) < walk(kk, sx, dx, 0)) ? walk(kk, sx, dx, 1) : walk(kk, sx, dx, 0)) +
                   ((walk(kk, sy, dy, 1) < walk(kk, sy, dy, 0)) ? walk(kk, sy, dy, 1) : walk(kk, sy, dy, 0));
        hdr_in = inj_hdr;
        x = sx; y = sy; hops = 0; arrived = 0;
        while (!arrived && hops <= 2 * kk) begin
          bit open_x, open_y, exp_vc;
          cur_x = CW'(x); cur_y = CW'(y);
          link_busy = 4'($urandom);
          #1;
          open_x = (hdr_in.x_dist != 0);
          open_y = (hdr_in.y_dist != 0);
          if (dir == DIR_DELIVER) begin
            arrived = 1;
            check(x == dx && y == dy, $sformatf("k=%0d delivered at (%0d,%0d) not (%0d,%0d)", kk, x, y, dx, dy));
          end else begin
            automatic bit is_x = (dir == DIR_EAST || dir == DIR_WEST);
            automatic bit plus = (dir == DIR_EAST || dir == DIR_NORTH);
            check(is_x ? (plus == hdr_in.x_pos) : (plus == hdr_in.y_pos), "direction follows virtual network");
            exp_vc = is_x ? crosses(kk, x, dx, plus) : crosses(kk, y, dy, plus);
            check(vc == exp_vc, $sformatf("k=%0d vc at (%0d,%0d) to (%0d,%0d) dir %s", kk, x, y, dx, dy, dir.name()));
            check(is_x ? (hdr_out.vx == vc && hdr_out.dim == 0) : (hdr_out.vy == vc && hdr_out.dim == 1),
                  "header records the channel and dimension");
            if (open_x && open_y) begin
              automatic bit cur_is_y = hdr_in.dim;
              automatic int cur_link = cur_is_y ? (hdr_in.y_pos ? 0 : 1) : (hdr_in.x_pos ? 2 : 3);
              automatic int oth_link = cur_is_y ? (hdr_in.x_pos ? 2 : 3) : (hdr_in.y_pos ? 0 : 1);
              automatic bit exp_switch = link_busy[cur_link] && !link_busy[oth_link];
              check((is_x == cur_is_y) == exp_switch, "busy-link dimension selection");
              if (exp_switch) n_adapt++;
            end else begin
              check(is_x == open_x, "only the open dimension is used");
            end
            if (vc) n_p++; else n_h++;
            if ((is_x && plus && x == kk-1) || (is_x && !plus && x == 0) ||
                (!is_x && plus && y == kk-1) || (!is_x && !plus && y == 0)) n_wrap++;
            if (is_x) x = plus ? (x + 1) % kk : (x + kk - 1) % kk;
            else      y = plus ? (y + 1) % kk : (y + kk - 1) % kk;
            hops++;
            hdr_in = hdr_out;
          end
        end
        check(arrived && hops == min_hops, $sformatf("k=%0d (%0d,%0d)->(%0d,%0d) %0d hops, minimum %0d", kk, sx, sy, dx, dy, hops, min_hops));
      end
    end
    check(n_p > 0 && n_h > 0 && n_wrap > 0 && n_adapt > 0, "p, h, wraparound and adaptive hops all seen");
    $display("p hops %0d, h hops %0d, wraparounds %0d, adaptive switches %0d", n_p, n_h, n_wrap, n_adapt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
