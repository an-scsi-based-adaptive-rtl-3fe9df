// buffer_pair: the two receive buffers of one SCSI controller, with their
// data-record bits and the address/data switching in front of them.
//
// Each of the two SRAMs can be reached by the SCSI controller (to store a
// packet arriving on the SCSI bus) or by the host (memory-mapped reads by
// the processor or the DMA controller). In the board design tri-state
// address and data buffers do this switching; here it is a multiplexer per
// SRAM. Which side owns an SRAM is decided by its data-record bit:
//   rec[i] = 0  buffer i is empty and belongs to the controller,
//   rec[i] = 1  buffer i holds a packet and belongs to the host.
// Each data-record bit is a T flip-flop, as in the published design. It is
// toggled by the controller when a packet has been completely stored
// (c_done, 0 -> 1) and by the host when it has finished with the packet
// (h_release, 1 -> 0); the host-side toggle is this design's choice, the
// document does not say how a bit is cleared.
//
// Controller side: c_buf_sel (BUF_SEL) picks the buffer, c_we (SMEMW)
// writes c_wdata at c_addr on the rising clock edge. Writes to a buffer the
// host owns are ignored.
// Host side: h_sel and h_addr pick the byte; h_rdata is valid one clock
// after h_rd (IOR). Reading a buffer the controller owns returns 0.
module buffer_pair #(
  parameter int BUF_BYTES = 2048,
  localparam int AW       = $clog2(BUF_BYTES)
) (
  input  logic          clk,
  input  logic          rst_n,
  // SCSI controller side
  input  logic          c_buf_sel,
  input  logic          c_we,
  input  logic [AW-1:0] c_addr,
  input  logic [7:0]    c_wdata,
  input  logic          c_done,
  // host side
  input  logic          h_sel,
  input  logic          h_rd,
  input  logic [AW-1:0] h_addr,
  output logic [7:0]    h_rdata,
  input  logic          h_release,
  // data-record bits (HIS_BUF1, HIS_BUF2)
  output logic [1:0]    rec
);

  logic [1:0]    we;
  logic [AW-1:0] addr  [2];
  logic [7:0]    rdata [2];
  logic          h_sel_q, h_own_q;

  // address/data switching, one multiplexer per SRAM
  always_comb begin
    for (int i = 0; i < 2; i++) begin
      addr[i] = rec[i] ? h_addr : c_addr;
      we[i]   = !rec[i] && c_we && (c_buf_sel == 1'(i));
    end
  end

  for (genvar i = 0; i < 2; i++) begin : g_buf
    sram_buffer #(.BYTES(BUF_BYTES), .DATA_W(8)) u_sram (
      .clk  (clk),
      .we   (we[i]),
      .addr (addr[i]),
      .wdata(c_wdata),
      .rdata(rdata[i])
    );
  end

  // data-record bits: T flip-flops
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rec <= 2'b00;
    end else begin
      for (int i = 0; i < 2; i++) begin
        if ((c_done && c_buf_sel == 1'(i)) ^ (h_release && h_sel == 1'(i)))
          rec[i] <= ~rec[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_sel_q <= 1'b0;
      h_own_q <= 1'b0;
    end else if (h_rd) begin
      h_sel_q <= h_sel;
      h_own_q <= rec[h_sel];
    end
  end

  assign h_rdata = h_own_q ? rdata[h_sel_q] : 8'h00;

  // the controller fills only an empty buffer, the host releases only a full one
  a_ctrl_done_empty: assert property (@(posedge clk) disable iff (!rst_n)
    c_done |-> !rec[c_buf_sel]);
  a_host_release_full: assert property (@(posedge clk) disable iff (!rst_n)
    h_release |-> rec[h_sel]);

endmodule
