// scsi_initiator_model: behavioural SCSI initiator (the sending node's SCSI
// adapter) for the testbenches. Not synthesizable.
//
// The caller fills pkt[] and cdb[] hierarchically and calls send(). The
// task arbitrates, selects target TID, then answers every REQ of the
// target in the phase the target sets: command bytes from cdb[], data-out
// bytes from pkt[], and it stores the status and message bytes it reads.
// All lines are active-high; db_o is released (0) while the target drives
// the bus. ack_delay adds clocks before each ACK, to vary the timing.
module scsi_initiator_model #(
  parameter int         MAX_BYTES = 4096,
  parameter logic [2:0] MY_ID     = 3'd7
) (
  input  logic       clk,
  // target-driven lines
  input  logic       bsy_t,
  input  logic       req,
  input  logic       msg,
  input  logic       cd,
  input  logic       io,
  input  logic [7:0] db_t,
  // initiator-driven lines
  output logic       sel,
  output logic       bsy,
  output logic       ack,
  output logic [7:0] db_o
);

  logic [7:0] pkt [MAX_BYTES];
  logic [7:0] cdb [6];
  int         ack_delay = 0;

  // results of the last send()
  logic [7:0] status;
  logic [7:0] message;
  int         data_bytes;
  int         cmd_bytes;
  bit         selected;
  int         cycles;

  initial begin
    sel  = 1'b0;
    bsy  = 1'b0;
    ack  = 1'b0;
    db_o = 8'h00;
  end

  task automatic handshake_out(input logic [7:0] b);
    db_o = b;
    repeat (1 + ack_delay) @(posedge clk);
    ack = 1'b1;
    while (req) @(posedge clk);
    ack  = 1'b0;
    db_o = 8'h00;
  endtask

  task automatic handshake_in(output logic [7:0] b);
    repeat (1 + ack_delay) @(posedge clk);
    b   = db_t;
    ack = 1'b1;
    while (req) @(posedge clk);
    ack = 1'b0;
  endtask

  // fill cdb[] with a SEND(6) command for len bytes
  task automatic set_send(input int len);
    cdb[0] = 8'h0A;
    cdb[1] = 8'h00;
    cdb[2] = 8'(len >> 16);
    cdb[3] = 8'(len >> 8);
    cdb[4] = 8'(len);
    cdb[5] = 8'h00;
  endtask

  // one complete SCSI transfer toward target TID
  task automatic send(input logic [2:0] tid);
    int  t0;
    bit  fin;
    int  wait_cnt;
    logic [7:0] b;
    t0         = 0;
    status     = 8'hFF;
    message    = 8'hFF;
    data_bytes = 0;
    cmd_bytes  = 0;
    selected   = 0;
    cycles     = 0;
    // bus free, then arbitration and selection
    while (bsy_t) @(posedge clk);
    @(posedge clk);
    bsy  = 1'b1;
    db_o = 8'(1) << MY_ID;
    repeat (3) @(posedge clk);
    sel  = 1'b1;
    db_o = (8'(1) << MY_ID) | (8'(1) << tid);
    @(posedge clk);
    bsy  = 1'b0;
    wait_cnt = 0;
    while (!bsy_t && wait_cnt < 50) begin
      @(posedge clk);
      wait_cnt++;
    end
    if (!bsy_t) begin
      sel  = 1'b0;
      db_o = 8'h00;
      return;
    end
    selected = 1;
    sel  = 1'b0;
    db_o = 8'h00;
    // information transfer phases
    fin = 0;
    while (!fin) begin
      @(posedge clk);
      cycles++;
      if (!bsy_t) fin = 1;
      else if (req) begin
        unique case ({msg, cd, io})
          3'b010: begin handshake_out(cdb[cmd_bytes]); cmd_bytes++; end
          3'b000: begin handshake_out(pkt[data_bytes]); data_bytes++; end
          3'b011: handshake_in(status);
          3'b111: handshake_in(message);
          default: handshake_in(b);
        endcase
      end
    end
  endtask

endmodule
