// scsi_router: receiving hardware and routing decision of one node of an
// SCSI-connected 2-D torus.
//
// Every node of the torus sends with an ordinary SCSI adapter (initiator)
// and receives with this hardware: one SCSI target controller per
// neighbour (North, South, East, West), each on its own SCSI bus, so nodes
// never compete for a shared bus. Each controller stores incoming packets
// in a pair of 2 KB buffers that it and the host use in turn: while the
// host works on a packet in one buffer the controller can fill the other.
// A data-record bit per buffer says whether it holds an unprocessed
// packet; with both bits set the controller answers BUSY and the sender
// retries later. Each completed packet raises the controller's interrupt,
// and the interrupt unit merges the four into the host IRQ.
//
// The host reads the buffers as memory (processor or DMA controller) and
// decides where each packet goes next. Two combinational units compute
// that decision in hardware: utr_inject builds the header of a new packet,
// utr_route makes the per-hop choice of link and virtual channel. In the
// published node the host runs this algorithm in software; here it is
// offered as logic next to the receive path.
//
// Host interface:
//   host_addr = {port[1:0], buffer, byte offset}; host_rdata is valid one
//   clock after host_rd. host_release (one clock, same address lines for
//   port and buffer) hands a processed buffer back to its controller.
//   rec[p][b] are the data-record bits, int_pending/int_ack/irq belong to
//   the interrupt unit.
// SCSI buses (index 0..3 = North, South, East, West): active-high levels,
// initiator-driven lines *_i and target-driven lines *_o; db_o is valid
// while db_oe is high. scsi_bsy_i is BSY as driven by the initiator.
// A node's single SCSI adapter drives one bus that reaches the four
// controllers receiving from it, one in each neighbour: the South port of
// the node above, the North port of the node below, and so on. The four
// controllers of a node therefore answer to four different SCSI IDs
// (TARGET_IDS), so that they can share such a bus. Port order, the IDs and
// the host address map are this design's choices.
module scsi_router
  import router_pkg::*;
#(
  parameter int         BUF_BYTES = 2048,
  parameter int         COORD_W   = 4,
  // SCSI ID of the controller of each port, index 0..3 = N, S, E, W
  parameter logic [3:0][2:0] TARGET_IDS = {3'd3, 3'd2, 3'd1, 3'd0},
  localparam int        N_PORTS   = 4,
  localparam int        AW        = $clog2(BUF_BYTES)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // four SCSI buses
  input  logic [N_PORTS-1:0]        scsi_sel_i,
  input  logic [N_PORTS-1:0]        scsi_bsy_i,
  input  logic [N_PORTS-1:0]        scsi_ack_i,
  input  logic [N_PORTS-1:0][7:0]   scsi_db_i,
  output logic [N_PORTS-1:0]        scsi_bsy_o,
  output logic [N_PORTS-1:0]        scsi_req_o,
  output logic [N_PORTS-1:0]        scsi_msg_o,
  output logic [N_PORTS-1:0]        scsi_cd_o,
  output logic [N_PORTS-1:0]        scsi_io_o,
  output logic [N_PORTS-1:0][7:0]   scsi_db_o,
  output logic [N_PORTS-1:0]        scsi_db_oe,
  // host: memory-mapped buffers
  input  logic [AW+2:0]             host_addr,
  input  logic                      host_rd,
  output logic [7:0]                host_rdata,
  input  logic                      host_release,
  output logic [N_PORTS-1:0][1:0]   rec,
  // host: interrupts
  output logic                      irq,
  output logic [N_PORTS-1:0]        int_pending,
  input  logic [N_PORTS-1:0]        int_ack,
  // routing decision
  input  logic [COORD_W:0]          k,
  input  logic [COORD_W-1:0]        node_x,
  input  logic [COORD_W-1:0]        node_y,
  input  logic [COORD_W-1:0]        inj_dst_x,
  input  logic [COORD_W-1:0]        inj_dst_y,
  output route_hdr_t                inj_hdr,
  input  route_hdr_t                rt_hdr_in,
  input  logic [3:0]                rt_link_busy,
  output dir_e                      rt_dir,
  output logic                      rt_vc,
  output route_hdr_t                rt_hdr_out
);

  logic [1:0]    h_port;
  logic          h_buf;
  logic [AW-1:0] h_off;
  logic [1:0]    h_port_q;

  logic [N_PORTS-1:0]         int_req;
  logic [N_PORTS-1:0][7:0]    h_rdata;

  assign {h_port, h_buf, h_off} = host_addr;

  for (genvar p = 0; p < N_PORTS; p++) begin : g_port
    logic          buf_sel, mem_we, done;
    logic [AW-1:0] mem_addr;
    logic [7:0]    mem_wdata;

    scsi_target #(.BUF_BYTES(BUF_BYTES), .TARGET_ID(TARGET_IDS[p])) u_ctrl (
      .clk      (clk),
      .rst_n    (rst_n),
      .sel_i    (scsi_sel_i[p]),
      .bsy_i    (scsi_bsy_i[p]),
      .ack_i    (scsi_ack_i[p]),
      .db_i     (scsi_db_i[p]),
      .bsy_o    (scsi_bsy_o[p]),
      .req_o    (scsi_req_o[p]),
      .msg_o    (scsi_msg_o[p]),
      .cd_o     (scsi_cd_o[p]),
      .io_o     (scsi_io_o[p]),
      .db_o     (scsi_db_o[p]),
      .db_oe    (scsi_db_oe[p]),
      .rec      (rec[p]),
      .buf_sel  (buf_sel),
      .mem_we   (mem_we),
      .mem_addr (mem_addr),
      .mem_wdata(mem_wdata),
      .done     (done),
      .int_o    (int_req[p])
    );

    buffer_pair #(.BUF_BYTES(BUF_BYTES)) u_bufs (
      .clk      (clk),
      .rst_n    (rst_n),
      .c_buf_sel(buf_sel),
      .c_we     (mem_we),
      .c_addr   (mem_addr),
      .c_wdata  (mem_wdata),
      .c_done   (done),
      .h_sel    (h_buf),
      .h_rd     (host_rd && h_port == 2'(p)),
      .h_addr   (h_off),
      .h_rdata  (h_rdata[p]),
      .h_release(host_release && h_port == 2'(p)),
      .rec      (rec[p])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       h_port_q <= '0;
    else if (host_rd) h_port_q <= h_port;
  end
  assign host_rdata = h_rdata[h_port_q];

  interrupt_unit #(.N_SRC(N_PORTS)) u_int (
    .clk    (clk),
    .rst_n  (rst_n),
    .int_req(int_req),
    .int_ack(int_ack),
    .pending(int_pending),
    .irq    (irq)
  );

  utr_inject #(.COORD_W(COORD_W)) u_inject (
    .k    (k),
    .src_x(node_x),
    .src_y(node_y),
    .dst_x(inj_dst_x),
    .dst_y(inj_dst_y),
    .hdr  (inj_hdr)
  );

  utr_route #(.COORD_W(COORD_W)) u_route (
    .k        (k),
    .cur_x    (node_x),
    .cur_y    (node_y),
    .hdr_in   (rt_hdr_in),
    .link_busy(rt_link_busy),
    .dir      (rt_dir),
    .vc       (rt_vc),
    .hdr_out  (rt_hdr_out)
  );

endmodule
