// tb_utr_inject: for every source/destination pair of tori with radix 2,
// 3, 4, 5, 8 and 16, compares the header with a reference found by
// walking the ring step by step in both directions: the direction bits
// must give the shorter walk (ties go +), the distances must equal that
// walk's length, dim must point at X unless no X hop is needed, and the
// virtual-channel and reserved bits must be 0.
`timescale 1ns/1ps
module tb_utr_inject;
  import router_pkg::*;
  localparam int CW = 4;

  logic [CW:0] k;
  logic [CW-1:0] src_x, src_y, dst_x, dst_y;
  route_hdr_t hdr;

  utr_inject #(.COORD_W(CW)) dut (.*);

  int checks = 0, failures = 0;

  // number of + steps and - steps from s to d on a ring of kk nodes
  function automatic int walk(input int kk, input int s, input int d, input bit plus);
    int c = s, n = 0;
    while (c != d) begin
      c = plus ? (c + 1) % kk : (c + kk - 1) % kk;
      n++;
    end
    return n;
  endfunction

  initial begin
    int radii [6] = '{2, 3, 4, 5, 8, 16};
    foreach (radii[r]) begin
      automatic int kk = radii[r];
      for (int sx = 0; sx < kk; sx++)
      for (int sy = 0; sy < kk; sy += (kk > 8 ? 3 : 1))
      for (int dx = 0; dx < kk; dx++)
      for (int dy = 0; dy < kk; dy += (kk > 8 ? 5 : 1)) begin
        int px, mx, py, my;
        bit exp_xp, exp_yp;
        int exp_xd, exp_yd;
        k = (CW+1)'(kk);
        src_x = CW'(sx); src_y = CW'(sy); dst_x = CW'(dx); dst_y = CW'(dy);
        #1;
        px = walk(kk, sx, dx, 1); mx = walk(kk, sx, dx, 0);
        py = walk(kk, sy, dy, 1); my = walk(kk, sy, dy, 0);
        exp_xp = (px <= mx); exp_xd = exp_xp ? px : mx;
        exp_yp = (py <= my); exp_yd = exp_yp ? py : my;
        checks++;
        if (hdr.x_pos !== exp_xp || int'(hdr.x_dist) != exp_xd ||
            hdr.y_pos !== exp_yp || int'(hdr.y_dist) != exp_yd ||
            hdr.dim !== (exp_xd == 0) || hdr.vx !== 1'b0 || hdr.vy !== 1'b0 ||
            hdr.rsvd !== 1'b0) begin
          failures++;
          if (failures < 10)
            $display("FAIL: k=%0d (%0d,%0d)->(%0d,%0d) hdr=%h", kk, sx, sy, dx, dy, hdr);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
