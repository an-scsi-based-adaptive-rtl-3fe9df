// torus_bench: a K x K torus of router nodes with behavioural hosts, for
// network-level tests. Not synthesizable; instantiated by tb_torus_*.
//
// Every node is one scsi_router plus a behavioural host and one SCSI
// adapter (scsi_initiator_model). A node's adapter drives one SCSI bus
// that reaches the four controllers receiving from it: the South port of
// its northern neighbour, the North port of its southern neighbour, the
// West port of its eastern neighbour and the East port of its western one.
// Target-driven lines of those four controllers are ORed onto the bus.
// The controllers answer to ID = their port number (N 0, S 1, E 2, W 3).
//
// Host program of each node, in a loop:
//   - acknowledge interrupts;
//   - copy every full buffer into host memory (checking every byte),
//     release it, and either accept the packet (distances zero) or queue it
//     for forwarding;
//   - inject its own packets at random intervals (mean GAP clocks), with
//     the header from the node's utr_inject: uniform random destinations,
//     or the transpose (x,y) -> (y,x) when TRANSPOSE is set;
//   - send the head of the queue: route it with utr_route, marking links
//     that answered BUSY as busy so that the routing unit can pick the
//     other dimension, and requeue it on BUSY.
// Checks: every packet arrives exactly once, at its destination, intact,
// after exactly the minimal number of hops, and p- and h-channel hops both
// occur. Packet layout: bytes 0-1 header, 2-3 length, 4 source node,
// 5 sequence number, then body(src, seq, j).
`timescale 1ns/1ps
module torus_bench
  import router_pkg::*;
#(
  parameter int K         = 4,
  parameter int NPKT      = 4,   // packets injected per active node
  parameter int LEN_MODE  = 0,   // 0: 128 bytes, 1: 1024 bytes, 2: uniform 128..1024
  parameter bit TRANSPOSE = 1'b0,
  parameter int GAP       = 3000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int NN = K * K;
  localparam int CW = 4;
  localparam int AW = 11;
  localparam int NID = NN * NPKT;

  logic rst_n;
  longint cyc;

  // router ports
  logic [3:0]      sel_i [NN], bsy_i [NN], ack_i [NN];
  logic [3:0][7:0] db_i  [NN];
  logic [3:0]      bsy_o [NN], req_o [NN], msg_o [NN], cd_o [NN], io_o [NN], db_oe [NN];
  logic [3:0][7:0] db_o  [NN];
  logic [AW+2:0]   host_addr [NN];
  logic            host_rd [NN], host_release [NN], irq [NN];
  logic [7:0]      host_rdata [NN];
  logic [3:0][1:0] rec [NN];
  logic [3:0]      int_pending [NN], int_ack [NN];
  logic [CW-1:0]   inj_dst_x [NN], inj_dst_y [NN];
  route_hdr_t      inj_hdr [NN], rt_hdr_in [NN], rt_hdr_out [NN];
  logic [3:0]      rt_link_busy [NN];
  dir_e            rt_dir [NN];
  logic            rt_vc [NN];

  // each node's own SCSI bus: adapter side and ORed target side
  logic       a_sel [NN], a_bsy [NN], a_ack [NN];
  logic [7:0] a_db  [NN];
  logic       t_bsy [NN], t_req [NN], t_msg [NN], t_cd [NN], t_io [NN];
  logic [7:0] t_db  [NN];

  function automatic int nb(input int n, input int d);
    int x = n % K, y = n / K;
    unique case (d)
      0: y = (y + 1) % K;
      1: y = (y + K - 1) % K;
      2: x = (x + 1) % K;
      default: x = (x + K - 1) % K;
    endcase
    return y * K + x;
  endfunction

  function automatic int ring(input int s, input int d);
    int f = (d - s + K) % K;
    return (f <= K - f) ? f : K - f;
  endfunction

  function automatic int min_dist(input int s, input int d);
    return ring(s % K, d % K) + ring(s / K, d / K);
  endfunction

  function automatic logic [7:0] body(input int src, input int seq, input int j);
    return 8'(src * 29 + seq * 53 + j * 7 + (j >> 8) * 3);
  endfunction

  // bus wiring
  always_comb begin
    for (int a = 0; a < NN; a++) begin
      t_bsy[a] = 0; t_req[a] = 0; t_msg[a] = 0; t_cd[a] = 0; t_io[a] = 0; t_db[a] = 0;
      for (int d = 0; d < 4; d++) begin
        automatic int r = nb(a, d);
        automatic int q = d ^ 1;
        t_bsy[a] |= bsy_o[r][q];
        t_req[a] |= req_o[r][q];
        t_msg[a] |= msg_o[r][q];
        t_cd[a]  |= cd_o[r][q];
        t_io[a]  |= io_o[r][q];
        t_db[a]  |= db_oe[r][q] ? db_o[r][q] : 8'h00;
      end
    end
    for (int b = 0; b < NN; b++) begin
      for (int q = 0; q < 4; q++) begin
        automatic int s = nb(b, q);
        sel_i[b][q] = a_sel[s];
        bsy_i[b][q] = a_bsy[s];
        ack_i[b][q] = a_ack[s];
        db_i[b][q]  = a_db[s] | t_db[s];
      end
    end
  end

  // ------------------------------------------------------------ shared state
  typedef struct {
    route_hdr_t hdr;
    int         len;
    int         src;
    int         seq;
  } swpkt_t;

  swpkt_t txq [NN][$];
  int     dst_of [NID];
  int     hops [NID];
  bit     arrived [NID];
  longint t_inj [NID];
  int     len_of [NID];
  int     n_active, n_delivered = 0, n_busy = 0, n_adapt = 0, n_p = 0, n_h = 0, n_int = 0;
  longint lat_sum = 0, byte_sum = 0, hop_sum = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL (%0dx%0d): %s", K, K, what);
    end
  endtask

  task automatic host_read(input int n, input int p, input int b, input int off, output logic [7:0] v);
    @(negedge clk);
    host_addr[n] = {2'(p), 1'(b), AW'(off)};
    host_rd[n] = 1;
    @(negedge clk);
    host_rd[n] = 0;
    v = host_rdata[n];
  endtask

  // copy one full buffer to host memory, release it, deliver or queue
  task automatic receive(input int n, input int p, input int b);
    logic [7:0] v0, v1, v2, v3, v4, v5, v;
    swpkt_t pk;
    int id;
    bit ok = 1;
    host_read(n, p, b, 0, v0); host_read(n, p, b, 1, v1);
    host_read(n, p, b, 2, v2); host_read(n, p, b, 3, v3);
    host_read(n, p, b, 4, v4); host_read(n, p, b, 5, v5);
    pk.hdr = {v0, v1};
    pk.len = {v2, v3};
    pk.src = v4;
    pk.seq = v5;
    for (int j = 6; j < pk.len; j++) begin
      host_read(n, p, b, j, v);
      if (v != body(pk.src, pk.seq, j)) ok = 0;
    end
    @(negedge clk);
    host_addr[n] = {2'(p), 1'(b), AW'(0)};
    host_release[n] = 1;
    @(negedge clk);
    host_release[n] = 0;
    id = pk.src * NPKT + pk.seq;
    check(pk.src < NN && pk.seq < NPKT, "packet tag");
    if (!(pk.src < NN && pk.seq < NPKT)) return;
    check(ok && pk.len == len_of[id], "packet intact");
    if (pk.hdr.x_dist == 0 && pk.hdr.y_dist == 0) begin
      check(dst_of[id] == n, $sformatf("packet %0d/%0d accepted at its destination %0d (here %0d)", pk.src, pk.seq, dst_of[id], n));
      check(!arrived[id], "packet accepted once");
      check(hops[id] == min_dist(pk.src, n), $sformatf("minimal path: %0d hops, minimum %0d", hops[id], min_dist(pk.src, n)));
      arrived[id] = 1;
      n_delivered++;
      lat_sum += cyc - t_inj[id];
      byte_sum += pk.len;
      hop_sum += hops[id];
    end else begin
      txq[n].push_back(pk);
    end
  endtask

  // ------------------------------------------------------------- the nodes
  for (genvar n = 0; n < NN; n++) begin : g_node
    localparam int X = n % K, Y = n / K;

    scsi_router u_node (
      .clk, .rst_n,
      .scsi_sel_i(sel_i[n]), .scsi_bsy_i(bsy_i[n]), .scsi_ack_i(ack_i[n]), .scsi_db_i(db_i[n]),
      .scsi_bsy_o(bsy_o[n]), .scsi_req_o(req_o[n]), .scsi_msg_o(msg_o[n]), .scsi_cd_o(cd_o[n]),
      .scsi_io_o(io_o[n]), .scsi_db_o(db_o[n]), .scsi_db_oe(db_oe[n]),
      .host_addr(host_addr[n]), .host_rd(host_rd[n]), .host_rdata(host_rdata[n]),
      .host_release(host_release[n]), .rec(rec[n]),
      .irq(irq[n]), .int_pending(int_pending[n]), .int_ack(int_ack[n]),
      .k((CW+1)'(K)), .node_x(CW'(X)), .node_y(CW'(Y)),
      .inj_dst_x(inj_dst_x[n]), .inj_dst_y(inj_dst_y[n]), .inj_hdr(inj_hdr[n]),
      .rt_hdr_in(rt_hdr_in[n]), .rt_link_busy(rt_link_busy[n]), .rt_dir(rt_dir[n]),
      .rt_vc(rt_vc[n]), .rt_hdr_out(rt_hdr_out[n]));

    scsi_initiator_model #(.MAX_BYTES(2048)) ini (
      .clk, .bsy_t(t_bsy[n]), .req(t_req[n]), .msg(t_msg[n]), .cd(t_cd[n]), .io(t_io[n]),
      .db_t(a_db[n] | t_db[n]), .sel(a_sel[n]), .bsy(a_bsy[n]), .ack(a_ack[n]), .db_o(a_db[n]));

    initial begin
      automatic int injected = 0;
      automatic longint next_inj = 0;
      automatic logic [3:0] lbusy = '0;
      automatic bit active = TRANSPOSE ? (X != Y) : 1'b1;
      host_addr[n] = '0; host_rd[n] = 0; host_release[n] = 0; int_ack[n] = '0;
      inj_dst_x[n] = '0; inj_dst_y[n] = '0; rt_hdr_in[n] = '0; rt_link_busy[n] = '0;
      @(posedge rst_n);
      next_inj = cyc + $urandom_range(GAP);
      while (!done) begin
        automatic bit did = 0;
        if (irq[n]) begin
          n_int++;
          int_ack[n] = int_pending[n];
          @(negedge clk);
          int_ack[n] = '0;
          did = 1;
        end
        for (int p = 0; p < 4; p++)
          for (int b = 0; b < 2; b++)
            if (rec[n][p][b]) begin
              receive(n, p, b);
              did = 1;
            end
        if (active && injected < NPKT && cyc >= next_inj) begin
          automatic swpkt_t pk;
          automatic int dst, id;
          if (TRANSPOSE) dst = X * K + Y;
          else begin
            dst = $urandom_range(NN - 1);
            while (dst == n) dst = $urandom_range(NN - 1);
          end
          inj_dst_x[n] = CW'(dst % K);
          inj_dst_y[n] = CW'(dst / K);
          #1;
          pk.hdr = inj_hdr[n];
          pk.len = (LEN_MODE == 0) ? 128 : (LEN_MODE == 1) ? 1024 : $urandom_range(128, 1024);
          pk.src = n;
          pk.seq = injected;
          id = n * NPKT + injected;
          dst_of[id] = dst;
          len_of[id] = pk.len;
          t_inj[id]  = cyc;
          hops[id]   = 0;
          check(int'(pk.hdr.x_dist) + int'(pk.hdr.y_dist) == min_dist(n, dst), "injected header distance");
          txq[n].push_back(pk);
          injected++;
          next_inj = cyc + GAP / 2 + $urandom_range(GAP);
          did = 1;
        end
        if (txq[n].size() > 0) begin
          automatic swpkt_t pk = txq[n].pop_front();
          automatic dir_e d;
          automatic route_hdr_t nh;
          automatic int id = pk.src * NPKT + pk.seq;
          rt_hdr_in[n] = pk.hdr;
          rt_link_busy[n] = lbusy;
          #1;
          d  = rt_dir[n];
          nh = rt_hdr_out[n];
          check(d != DIR_DELIVER, "queued packet has a next hop");
          if (pk.hdr.x_dist != 0 && pk.hdr.y_dist != 0 && nh.dim != pk.hdr.dim) n_adapt++;
          ini.pkt[0] = nh[15:8];
          ini.pkt[1] = nh[7:0];
          ini.pkt[2] = 8'(pk.len >> 8);
          ini.pkt[3] = 8'(pk.len);
          ini.pkt[4] = 8'(pk.src);
          ini.pkt[5] = 8'(pk.seq);
          for (int j = 6; j < pk.len; j++) ini.pkt[j] = body(pk.src, pk.seq, j);
          ini.set_send(pk.len);
          ini.send(3'(int'(d) ^ 1));
          if (ini.status == ST_BUSY) begin
            n_busy++;
            lbusy[d] = 1'b1;
            txq[n].push_back(pk);
            repeat ($urandom_range(20, 200)) @(negedge clk);
          end else begin
            check(ini.selected && ini.status == ST_GOOD && ini.data_bytes == pk.len, "hop accepted");
            lbusy[d] = 1'b0;
            hops[id]++;
            if (rt_vc[n]) n_p++; else n_h++;
          end
          did = 1;
        end
        if (!did) @(negedge clk);
      end
    end
  end

  string pattern_name, len_name;

  initial begin
    pattern_name = TRANSPOSE ? "transpose" : "uniform random";
    len_name = (LEN_MODE == 0) ? "128-byte" : (LEN_MODE == 1) ? "1024-byte" : "128..1024-byte";
    checks = 0;
    failures = 0;
    done = 0;
    n_active = 0;
    for (int n = 0; n < NN; n++)
      if (!TRANSPOSE || (n % K) != (n / K)) n_active++;
    rst_n = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (n_delivered == n_active * NPKT);
    repeat (10) @(posedge clk);
    check(n_p > 0 && n_h > 0, "both p- and h-channel hops used");
    $display("%0dx%0d %s, %s packets: %0d delivered, mean hops %0.2f, mean latency %0.1f clocks (%0.2f clocks per byte), BUSY answers %0d, busy-link dimension changes %0d, p hops %0d, h hops %0d, interrupts %0d",
             K, K, pattern_name, len_name,
             n_delivered, real'(hop_sum) / n_delivered, real'(lat_sum) / n_delivered,
             real'(lat_sum) / real'(byte_sum),
             n_busy, n_adapt, n_p, n_h, n_int);
    done = 1;
  end

  always_ff @(posedge clk) cyc <= (rst_n ? cyc + 1 : 0);

endmodule
