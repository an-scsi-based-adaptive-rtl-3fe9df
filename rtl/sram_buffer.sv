// sram_buffer: one packet buffer, a byte-wide single-port SRAM.
//
// Each SCSI controller owns two of these, 2 KB each as in the published
// design. The single port is shared between the SCSI controller (writing a
// received packet) and the host (reading it back); buffer_pair decides who
// drives it. Timing: a write with we=1 lands at the rising clock edge; a
// read returns mem[addr] on rdata one clock after addr is presented
// (synchronous read, this design's choice so that the array maps onto
// block RAM).
module sram_buffer #(
  parameter int BYTES  = 2048,
  parameter int DATA_W = 8,
  localparam int AW    = $clog2(BYTES)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [BYTES];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
