// tb_scsi_router: end-to-end test of one router node at its default sizes.
//
// The node sits at (1,2) of a 4 x 4 torus. Four behavioural SCSI
// initiators, one per neighbour bus (North, South, East, West), send
// packets at the same time: 128-byte, 1024-byte and random 128..1024-byte
// packets. Byte 0-1 of a packet is the routing header, bytes 2-3 its
// length, byte 4 the port and byte 5 a sequence number; the rest follows a
// fixed formula so that the receiver can check every byte. A sender that
// gets BUSY status waits and retries.
//
// A behavioural host plays the interrupt program: on IRQ it reads and
// acknowledges the pending interrupts, scans the data-record bits, reads
// each full buffer through the memory-mapped port, checks the packet,
// runs the routing unit on the header (checked against a ring-walking
// reference: delivery only at the destination, minimal-distance step,
// p-channel exactly when the wraparound link is still ahead) and releases
// the buffer. The host is deliberately slow at times, so that both buffers
// of a port fill and the controller has to answer BUSY.
//
// The test counts each mechanism of the design and fails if one never
// happened: BUSY answers, use of both buffers of a port, both record bits
// set at once, interrupts from all four controllers, several interrupts
// pending at once, CHECK CONDITION for an oversized packet, delivery,
// forwarding on a p-channel and on an h-channel, a busy-link dimension
// change, and header generation for new packets.
`timescale 1ns/1ps
module tb_scsi_router;
  import router_pkg::*;

  localparam int BUF_BYTES = 2048;
  localparam int AW = $clog2(BUF_BYTES);
  localparam int CW = 4;
  localparam int K = 4;
  localparam int NODE_X = 1, NODE_Y = 2;
  localparam int NPKT = 9;      // packets per port

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] sel_i, bsy_i, ack_i, bsy_o, req_o, msg_o, cd_o, io_o, db_oe;
  logic [3:0][7:0] db_init, db_o, db_bus;
  logic [AW+2:0] host_addr;
  logic host_rd, host_release, irq;
  logic [7:0] host_rdata;
  logic [3:0][1:0] rec;
  logic [3:0] int_pending, int_ack;
  logic [CW-1:0] inj_dst_x, inj_dst_y;
  route_hdr_t inj_hdr, rt_hdr_in, rt_hdr_out;
  logic [3:0] rt_link_busy;
  dir_e rt_dir;
  logic rt_vc;

  scsi_router dut (
    .clk, .rst_n,
    .scsi_sel_i(sel_i), .scsi_bsy_i(bsy_i), .scsi_ack_i(ack_i), .scsi_db_i(db_bus),
    .scsi_bsy_o(bsy_o), .scsi_req_o(req_o), .scsi_msg_o(msg_o), .scsi_cd_o(cd_o),
    .scsi_io_o(io_o), .scsi_db_o(db_o), .scsi_db_oe(db_oe),
    .host_addr, .host_rd, .host_rdata, .host_release, .rec,
    .irq, .int_pending, .int_ack,
    .k((CW+1)'(K)), .node_x(CW'(NODE_X)), .node_y(CW'(NODE_Y)),
    .inj_dst_x, .inj_dst_y, .inj_hdr,
    .rt_hdr_in, .rt_link_busy, .rt_dir, .rt_vc, .rt_hdr_out);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // --------------------------------------------------------- reference
  function automatic int walk(input int s, input int d, input bit plus);
    int c = s, n = 0;
    while (c != d) begin
      c = plus ? (c + 1) % K : (c + K - 1) % K;
      n++;
    end
    return n;
  endfunction

  function automatic bit crosses(input int s, input int d, input bit plus);
    int c = s;
    while (c != d) begin
      if (plus && c == K - 1) return 1;
      if (!plus && c == 0) return 1;
      c = plus ? (c + 1) % K : (c + K - 1) % K;
    end
    return 0;
  endfunction

  function automatic logic [7:0] body(input int p, input int s, input int j);
    return 8'(p * 37 + s * 101 + j * 13 + (j >> 8) * 7);
  endfunction

  route_hdr_t exp_hdr [4][NPKT];
  int         exp_len [4][NPKT];
  int         exp_dx  [4][NPKT];
  int         exp_dy  [4][NPKT];
  bit         got     [4][NPKT];

  // mechanism counters
  int n_busy = 0, n_check = 0, n_recv = 0, n_buf1 = 0, n_both_full = 0;
  int n_multi_int = 0, n_deliver = 0, n_fwd_p = 0, n_fwd_h = 0, n_adapt = 0, n_inject = 0;
  int int_seen [4];
  int senders_done = 0;
  longint bytes_sent = 0;

  // ---------------------------------------------------- four neighbours
  for (genvar p = 0; p < 4; p++) begin : g_nb
    scsi_initiator_model #(.MAX_BYTES(4096)) ini (
      .clk, .bsy_t(bsy_o[p]), .req(req_o[p]), .msg(msg_o[p]), .cd(cd_o[p]), .io(io_o[p]),
      .db_t(db_bus[p]), .sel(sel_i[p]), .bsy(bsy_i[p]), .ack(ack_i[p]), .db_o(db_init[p]));
    assign db_bus[p] = db_init[p] | (db_oe[p] ? db_o[p] : 8'h00);

    initial begin
      wait (rst_n);
      repeat (10 + 50 * p) @(posedge clk);
      if (p == 0) begin
        // a packet longer than a buffer is refused
        ini.set_send(4096);
        ini.send(3'(p));
        check(ini.status == ST_CHECK && ini.data_bytes == 0, "oversized packet refused");
        if (ini.status == ST_CHECK) n_check++;
      end
      for (int s = 0; s < NPKT; s++) begin
        automatic int len;
        automatic int dx = $urandom_range(K - 1);
        automatic int dy = $urandom_range(K - 1);
        automatic route_hdr_t h;
        automatic bit sent = 0;
        if (p == 0 && s == 0) begin   // one packet ends here
          dx = NODE_X;
          dy = NODE_Y;
        end
        unique case (s % 3)
          0: len = 128;
          1: len = 1024;
          default: len = $urandom_range(128, 1024);
        endcase
        h = '0;
        h.x_pos  = walk(NODE_X, dx, 1) <= walk(NODE_X, dx, 0);
        h.x_dist = DIST_W'(h.x_pos ? walk(NODE_X, dx, 1) : walk(NODE_X, dx, 0));
        h.y_pos  = walk(NODE_Y, dy, 1) <= walk(NODE_Y, dy, 0);
        h.y_dist = DIST_W'(h.y_pos ? walk(NODE_Y, dy, 1) : walk(NODE_Y, dy, 0));
        h.dim    = 1'($urandom);
        h.vx     = 1'($urandom);
        h.vy     = 1'($urandom);
        exp_hdr[p][s] = h;
        exp_len[p][s] = len;
        exp_dx[p][s]  = dx;
        exp_dy[p][s]  = dy;
        ini.pkt[0] = h[15:8];
        ini.pkt[1] = h[7:0];
        ini.pkt[2] = 8'(len >> 8);
        ini.pkt[3] = 8'(len);
        ini.pkt[4] = 8'(p);
        ini.pkt[5] = 8'(s);
        for (int j = 6; j < len; j++) ini.pkt[j] = body(p, s, j);
        ini.ack_delay = $urandom_range(2);
        while (!sent) begin
          ini.set_send(len);
          ini.send(3'(p));
          if (ini.status == ST_BUSY) begin
            n_busy++;
            check(ini.data_bytes == 0, "no data after BUSY");
            repeat ($urandom_range(200, 3000)) @(posedge clk);
          end else begin
            check(ini.status == ST_GOOD && ini.data_bytes == len && ini.message == MSG_CMD_COMPLETE,
                  $sformatf("port %0d packet %0d accepted", p, s));
            sent = 1;
            bytes_sent += len;
          end
        end
        repeat ($urandom_range(50)) @(posedge clk);
      end
      senders_done++;
    end
  end

  // ------------------------------------------------------------ host
  task automatic host_read(input int p, input int b, input int off, output logic [7:0] v);
    @(negedge clk);
    host_addr = {2'(p), 1'(b), AW'(off)};
    host_rd = 1;
    @(negedge clk);
    host_rd = 0;
    v = host_rdata;
  endtask

  task automatic process(input int p, input int b);
    logic [7:0] v0, v1, v2, v3, v4, v5, v;
    int len, s;
    bit ok;
    route_hdr_t h;
    host_read(p, b, 0, v0); host_read(p, b, 1, v1);
    host_read(p, b, 2, v2); host_read(p, b, 3, v3);
    host_read(p, b, 4, v4); host_read(p, b, 5, v5);
    len = {v2, v3};
    s = v5;
    h = {v0, v1};
    check(v4 == 8'(p) && s < NPKT, $sformatf("packet in port %0d buffer %0d has a valid tag", p, b));
    if (s >= NPKT) return;
    check(!got[p][s], "packet received once");
    got[p][s] = 1;
    check(h == exp_hdr[p][s] && len == exp_len[p][s], "header and length");
    ok = 1;
    for (int j = 6; j < len; j++) begin
      host_read(p, b, j, v);
      if (v != body(p, s, j)) ok = 0;
    end
    check(ok, $sformatf("port %0d packet %0d payload", p, s));
    if (b == 1) n_buf1++;
    n_recv++;

    // routing decision for the packet
    rt_hdr_in = h;
    rt_link_busy = 4'($urandom);
    #1;
    if (h.x_dist == 0 && h.y_dist == 0) begin
      check(rt_dir == DIR_DELIVER && exp_dx[p][s] == NODE_X && exp_dy[p][s] == NODE_Y, "delivered at destination");
      n_deliver++;
    end else begin
      automatic bit is_x = (rt_dir == DIR_EAST || rt_dir == DIR_WEST);
      automatic bit plus = (rt_dir == DIR_EAST || rt_dir == DIR_NORTH);
      automatic int nx = NODE_X, ny = NODE_Y;
      check(rt_dir != DIR_DELIVER, "forwarded when not at destination");
      if (is_x) begin
        check(plus == h.x_pos && h.x_dist != 0, "X step in the packet's virtual network");
        check(rt_vc == crosses(NODE_X, exp_dx[p][s], plus), "X virtual channel class");
        nx = plus ? (NODE_X + 1) % K : (NODE_X + K - 1) % K;
      end else begin
        check(plus == h.y_pos && h.y_dist != 0, "Y step in the packet's virtual network");
        check(rt_vc == crosses(NODE_Y, exp_dy[p][s], plus), "Y virtual channel class");
        ny = plus ? (NODE_Y + 1) % K : (NODE_Y + K - 1) % K;
      end
      check(int'(rt_hdr_out.x_dist) == walk(nx, exp_dx[p][s], h.x_pos ? 1'b1 : 1'b0) &&
            int'(rt_hdr_out.y_dist) == walk(ny, exp_dy[p][s], h.y_pos ? 1'b1 : 1'b0),
            "remaining distances after the hop");
      if (h.x_dist != 0 && h.y_dist != 0 && (is_x == h.dim)) n_adapt++;
      if (rt_vc) n_fwd_p++; else n_fwd_h++;
    end

    // a new packet from this node to the packet's destination
    inj_dst_x = CW'(exp_dx[p][s]);
    inj_dst_y = CW'(exp_dy[p][s]);
    #1;
    check(int'(inj_hdr.x_dist) + int'(inj_hdr.y_dist) ==
          ((walk(NODE_X, exp_dx[p][s], 1) < walk(NODE_X, exp_dx[p][s], 0)) ? walk(NODE_X, exp_dx[p][s], 1) : walk(NODE_X, exp_dx[p][s], 0)) +
          ((walk(NODE_Y, exp_dy[p][s], 1) < walk(NODE_Y, exp_dy[p][s], 0)) ? walk(NODE_Y, exp_dy[p][s], 1) : walk(NODE_Y, exp_dy[p][s], 0)),
          "new header has the minimal distance");
    n_inject++;

    // hand the buffer back
    @(negedge clk);
    host_addr = {2'(p), 1'(b), AW'(0)};
    host_release = 1;
    @(negedge clk);
    host_release = 0;
    @(negedge clk);
    check(rec[p][b] == 1'b0, "buffer released");
  endtask

  initial begin
    host_addr = '0; host_rd = 0; host_release = 0; int_ack = '0;
    inj_dst_x = '0; inj_dst_y = '0; rt_hdr_in = '0; rt_link_busy = '0;
    foreach (int_seen[i]) int_seen[i] = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    while (n_recv < 4 * NPKT) begin
      @(negedge clk);
      if (irq) begin
        automatic logic [3:0] pend = int_pending;
        if ($countones(pend) > 1) n_multi_int++;
        for (int i = 0; i < 4; i++) if (pend[i]) int_seen[i]++;
        int_ack = pend;
        @(negedge clk);
        int_ack = '0;
        // the host is sometimes slow, letting buffers fill up
        if ($urandom_range(3) == 0) repeat ($urandom_range(5000, 20000)) @(negedge clk);
        for (int p = 0; p < 4; p++) begin
          if (rec[p] == 2'b11) n_both_full++;
          for (int b = 0; b < 2; b++)
            if (rec[p][b]) process(p, b);
        end
      end
    end
    wait (senders_done == 4);
    repeat (20) @(posedge clk);
    for (int p = 0; p < 4; p++)
      for (int s = 0; s < NPKT; s++)
        check(got[p][s], $sformatf("port %0d packet %0d arrived", p, s));
    check(int_pending == 0 || irq, "no interrupt left unserved");
    $display("packets %0d, bytes %0d, BUSY answers %0d, CHECK %0d, buffer-1 packets %0d, both full %0d",
             n_recv, bytes_sent, n_busy, n_check, n_buf1, n_both_full);
    $display("interrupts N/S/E/W %0d/%0d/%0d/%0d, several pending %0d",
             int_seen[0], int_seen[1], int_seen[2], int_seen[3], n_multi_int);
    $display("delivered %0d, forwarded on p %0d, on h %0d, busy-link dimension changes %0d, headers built %0d",
             n_deliver, n_fwd_p, n_fwd_h, n_adapt, n_inject);
    check(n_busy > 0, "BUSY answered at least once");
    check(n_check > 0, "CHECK CONDITION at least once");
    check(n_buf1 > 0, "second buffer used");
    check(n_both_full > 0, "both buffers full at once");
    check(n_multi_int > 0, "several interrupts pending at once");
    for (int i = 0; i < 4; i++) check(int_seen[i] > 0, $sformatf("interrupt from controller %0d", i));
    check(n_deliver > 0 && n_fwd_p > 0 && n_fwd_h > 0, "delivery and forwarding on p and h channels");
    check(n_adapt > 0, "busy-link dimension change");
    check(n_inject > 0, "header generation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
