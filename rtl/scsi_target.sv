// scsi_target: the SCSI controller of one receiving port of the router.
//
// Each of the four neighbours of a torus node owns a private SCSI bus whose
// initiator is the neighbour's SCSI interface card; this module is the
// target on that bus. It is split into the units of the published
// controller: the SCSI interface control (REQ/ACK handshake of one byte),
// the phase state control (bus free, selection, command, data-out, status,
// message-in), the command decoder, the memory control and interrupt logic,
// the block counter and a few registers.
//
// One transfer: the initiator selects the target (SEL with the target's ID
// bit on the data bus while BSY is low); the target answers with BSY and
// requests a 6-byte command. For SEND(6) (opcode 0Ah, 24-bit byte count in
// command bytes 2..4) it reads the two data-record bits of its buffers:
//   - both set: no room, the target returns BUSY status with no data phase;
//   - otherwise it picks buffer 0 if free, else buffer 1, receives the
//     packet in the data-out phase byte by byte into that buffer, toggles
//     the buffer's data-record bit and pulses int_o, then returns GOOD.
// TEST UNIT READY returns GOOD; any other command, and a SEND whose count is
// 0 or larger than one buffer, returns CHECK CONDITION. Every transfer ends
// with the COMMAND COMPLETE message and bus free.
// The document describes the busy check, the buffer choice, the record bit
// and the interrupt; the command set, the status codes and the choice of
// buffer 0 first are this design's, following the SCSI-2 conventions for a
// processor-type target. ATN, parity, disconnection and bus reset are not
// handled.
//
// Interface: SCSI lines are active-high here. sel_i, bsy_i, ack_i come
// from another node and are synchronised with two flip-flops each; db_i is
// sampled once ack is seen, as the initiator holds it stable until REQ
// falls. Outputs change on the rising edge of clk. The target drives db_o
// only while db_oe is high (phases with I/O high). Each byte takes about
// six clocks plus the initiator's response time.
module scsi_target
  import router_pkg::*;
#(
  parameter int         BUF_BYTES = 2048,
  parameter logic [2:0] TARGET_ID = 3'd0,
  localparam int        AW        = $clog2(BUF_BYTES)
) (
  input  logic          clk,
  input  logic          rst_n,
  // SCSI bus, initiator-driven lines
  input  logic          sel_i,
  input  logic          bsy_i,
  input  logic          ack_i,
  input  logic [7:0]    db_i,
  // SCSI bus, target-driven lines
  output logic          bsy_o,
  output logic          req_o,
  output logic          msg_o,
  output logic          cd_o,
  output logic          io_o,
  output logic [7:0]    db_o,
  output logic          db_oe,
  // buffer pair
  input  logic [1:0]    rec,      // data-record bits HIS_BUF1/HIS_BUF2
  output logic          buf_sel,  // BUF_SEL
  output logic          mem_we,   // SMEMW
  output logic [AW-1:0] mem_addr,
  output logic [7:0]    mem_wdata,
  output logic          done,     // toggles the record bit of buf_sel
  // interrupt to the interrupt unit
  output logic          int_o
);

  // ------------------------------- SCSI interface control: input synchronisers
  logic [1:0] sel_sy, bsy_sy, ack_sy;
  logic       sel_s, bsy_s, ack_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_sy <= '0;
      bsy_sy <= '0;
      ack_sy <= '0;
    end else begin
      sel_sy <= {sel_sy[0], sel_i};
      bsy_sy <= {bsy_sy[0], bsy_i};
      ack_sy <= {ack_sy[0], ack_i};
    end
  end
  assign sel_s = sel_sy[1];
  assign bsy_s = bsy_sy[1];
  assign ack_s = ack_sy[1];

  // ------------------------------------------ phase state control and registers
  typedef enum logic [3:0] {
    S_BUS_FREE,  // wait for selection
    S_SELECTED,  // BSY asserted, wait for SEL to be released
    S_PHASE,     // phase lines settle before REQ
    S_REQ,       // REQ high, wait for ACK
    S_ACK,       // REQ low, wait for ACK to fall
    S_DECODE,    // command decoder
    S_RELEASE    // release the bus
  } state_e;

  state_e     state;
  logic [2:0] phase;        // {MSG, C/D, I/O}
  logic [2:0] cdb_idx;
  logic [7:0] cdb [6];
  logic [7:0] out_byte;
  logic [AW:0] blk_cnt;     // block counter: bytes still to receive
  // mem_addr (an output) is the MEM control unit's address counter
  logic [23:0] xfer_len;
  logic        cmd_send, len_ok;

  assign {msg_o, cd_o, io_o} = (state == S_BUS_FREE) ? 3'b000 : phase;
  assign db_oe = bsy_o && io_o;
  assign db_o  = db_oe ? out_byte : 8'h00;

  // ---------------------------------------------------- command decoder
  assign xfer_len = {cdb[2], cdb[3], cdb[4]};
  assign cmd_send = (cdb[0] == OP_SEND6);
  assign len_ok   = (xfer_len != 24'd0) && (xfer_len <= 24'(BUF_BYTES));

  // ------- phase sequencing, REQ/ACK handshake, MEM control and interrupt logic
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_BUS_FREE;
      phase     <= PH_COMMAND;
      bsy_o     <= 1'b0;
      req_o     <= 1'b0;
      cdb_idx   <= '0;
      for (int i = 0; i < 6; i++) cdb[i] <= '0;
      out_byte  <= '0;
      blk_cnt   <= '0;
      buf_sel   <= 1'b0;
      mem_we    <= 1'b0;
      mem_addr  <= '0;
      mem_wdata <= '0;
      done      <= 1'b0;
      int_o     <= 1'b0;
    end else begin
      mem_we <= 1'b0;
      done   <= 1'b0;
      int_o  <= 1'b0;
      // the address advances after each stored byte
      if (mem_we) mem_addr <= mem_addr + 1'b1;

      unique case (state)
        S_BUS_FREE: begin
          if (sel_s && !bsy_s && db_i[TARGET_ID]) begin
            bsy_o <= 1'b1;
            state <= S_SELECTED;
          end
        end

        S_SELECTED: begin
          if (!sel_s) begin
            phase   <= PH_COMMAND;
            cdb_idx <= '0;
            state   <= S_PHASE;
          end
        end

        S_PHASE: begin
          req_o <= 1'b1;
          state <= S_REQ;
        end

        S_REQ: begin
          if (ack_s) begin
            req_o <= 1'b0;
            state <= S_ACK;
            unique case (phase)
              PH_COMMAND: begin
                cdb[cdb_idx] <= db_i;
                cdb_idx      <= cdb_idx + 1'b1;
              end
              PH_DATA_OUT: begin
                mem_wdata <= db_i;
                mem_we    <= 1'b1;
                blk_cnt   <= blk_cnt - 1'b1;
              end
              default: ;
            endcase
          end
        end

        S_ACK: begin
          if (!ack_s) begin
            unique case (phase)
              PH_COMMAND: begin
                if (cdb_idx == 3'd6) state <= S_DECODE;
                else begin
                  req_o <= 1'b1;
                  state <= S_REQ;
                end
              end
              PH_DATA_OUT: begin
                if (blk_cnt == '0) begin
                  // packet complete: set the record bit, interrupt the host
                  done     <= 1'b1;
                  int_o    <= 1'b1;
                  phase    <= PH_STATUS;
                  out_byte <= ST_GOOD;
                  state    <= S_PHASE;
                end else begin
                  req_o <= 1'b1;
                  state <= S_REQ;
                end
              end
              PH_STATUS: begin
                phase    <= PH_MSG_IN;
                out_byte <= MSG_CMD_COMPLETE;
                state    <= S_PHASE;
              end
              default: state <= S_RELEASE;  // message-in done
            endcase
          end
        end

        S_DECODE: begin
          state <= S_PHASE;
          if (cmd_send && len_ok && rec != 2'b11) begin
            buf_sel  <= rec[0];          // buffer 0 if free, else buffer 1
            mem_addr <= '0;
            blk_cnt  <= (AW+1)'(xfer_len);
            phase    <= PH_DATA_OUT;
          end else begin
            phase    <= PH_STATUS;
            if (cmd_send && len_ok)                  out_byte <= ST_BUSY;
            else if (cdb[0] == OP_TEST_UNIT_READY)   out_byte <= ST_GOOD;
            else                                     out_byte <= ST_CHECK;
          end
        end

        S_RELEASE: begin
          bsy_o <= 1'b0;
          phase <= PH_COMMAND;
          state <= S_BUS_FREE;
        end

        default: state <= S_BUS_FREE;
      endcase
    end
  end

  a_req_needs_bsy: assert property (@(posedge clk) disable iff (!rst_n)
    req_o |-> bsy_o);
  a_write_in_data_phase: assert property (@(posedge clk) disable iff (!rst_n)
    mem_we |-> (phase == PH_DATA_OUT));

endmodule
