// tb_scsi_target: self-checking test of the SCSI target controller.
//
// A behavioural initiator sends SEND(6) commands of several lengths; the
// testbench keeps its own copy of the two data-record bits (toggled on
// each done pulse, and cleared by the "host" between tests) and its own
// model of the two buffers written through mem_we. It checks the status
// byte (GOOD, BUSY, CHECK CONDITION), the COMMAND COMPLETE message, the
// buffer chosen, every stored byte, the done and interrupt pulses, and
// that a selection of another SCSI ID is ignored.
`timescale 1ns/1ps
module tb_scsi_target;
  import router_pkg::*;

  localparam int BUF_BYTES = 2048;
  localparam int AW = $clog2(BUF_BYTES);
  localparam logic [2:0] TID = 3'd2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sel, bsy_i, ack, bsy_t, req, msg, cd, io, db_oe, buf_sel, mem_we, done, int_o;
  logic [7:0] db_init, db_t, mem_wdata, db_bus;
  logic [AW-1:0] mem_addr;
  logic [1:0] rec;

  assign db_bus = db_init | (db_oe ? db_t : 8'h00);

  scsi_target #(.BUF_BYTES(BUF_BYTES), .TARGET_ID(TID)) dut (
    .clk, .rst_n, .sel_i(sel), .bsy_i(bsy_i), .ack_i(ack), .db_i(db_bus),
    .bsy_o(bsy_t), .req_o(req), .msg_o(msg), .cd_o(cd), .io_o(io),
    .db_o(db_t), .db_oe, .rec, .buf_sel, .mem_we, .mem_addr, .mem_wdata,
    .done, .int_o);

  scsi_initiator_model #(.MAX_BYTES(4096)) ini (
    .clk, .bsy_t, .req, .msg, .cd, .io, .db_t(db_bus),
    .sel, .bsy(bsy_i), .ack, .db_o(db_init));

  // reference buffers and record bits
  logic [7:0] ref_mem [2][BUF_BYTES];
  int writes, dones, ints;
  logic last_done_buf;

  always_ff @(posedge clk) begin
    if (mem_we) begin
      ref_mem[buf_sel][mem_addr] <= mem_wdata;
      writes <= writes + 1;
    end
    if (done) begin
      rec[buf_sel] <= ~rec[buf_sel];
      dones <= dones + 1;
      last_done_buf <= buf_sel;
    end
    if (int_o) ints <= ints + 1;
  end

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic set_cdb(input logic [7:0] op, input int len);
    ini.cdb[0] = op;
    ini.cdb[1] = 8'h00;
    ini.cdb[2] = 8'(len >> 16);
    ini.cdb[3] = 8'(len >> 8);
    ini.cdb[4] = 8'(len);
    ini.cdb[5] = 8'h00;
  endtask

  // expected buffer: 0 if free, else 1
  task automatic do_send(input int len, input logic [7:0] exp_status, input string name);
    int w0, d0, i0;
    logic exp_buf;
    logic [1:0] rec0;
    bit ok;
    rec0 = rec;
    exp_buf = rec[0];
    for (int j = 0; j < len && j < 4096; j++) ini.pkt[j] = 8'($urandom);
    set_cdb(OP_SEND6, len);
    w0 = writes; d0 = dones; i0 = ints;
    ini.send(TID);
    repeat (3) @(posedge clk);
    check(ini.selected == 1, {name, ": selected"});
    check(ini.cmd_bytes == 6, {name, ": six command bytes"});
    check(ini.status == exp_status, $sformatf("%s: status %h expected %h", name, ini.status, exp_status));
    check(ini.message == MSG_CMD_COMPLETE, {name, ": command complete message"});
    if (exp_status == ST_GOOD) begin
      check(ini.data_bytes == len, $sformatf("%s: %0d data bytes sent", name, ini.data_bytes));
      check(writes - w0 == len, {name, ": byte writes"});
      check(dones - d0 == 1 && ints - i0 == 1, {name, ": one done and one interrupt"});
      check(last_done_buf == exp_buf, {name, ": buffer choice"});
      check(rec[exp_buf] == 1'b1 && rec[!exp_buf] == rec0[!exp_buf], {name, ": record bit set"});
      ok = 1;
      for (int j = 0; j < len; j++) if (ref_mem[exp_buf][j] != ini.pkt[j]) ok = 0;
      check(ok, {name, ": buffer contents"});
    end else begin
      check(ini.data_bytes == 0 && writes == w0, {name, ": no data phase"});
      check(dones == d0 && ints == i0, {name, ": no done or interrupt"});
      check(rec == rec0, {name, ": record bits unchanged"});
    end
  endtask

  initial begin
    rec = 2'b00;
    writes = 0; dones = 0; ints = 0; last_done_buf = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);

    do_send(128, ST_GOOD, "first 128-byte packet");   // buffer 0
    do_send(1024, ST_GOOD, "1024-byte packet");        // buffer 1
    do_send(128, ST_BUSY, "both buffers full");        // BUSY
    rec[0] = 1'b0;                                     // host frees buffer 0
    ini.ack_delay = 3;
    do_send(300, ST_GOOD, "refill buffer 0");
    ini.ack_delay = 0;
    rec = 2'b01;
    do_send(2048, ST_GOOD, "full 2 KB packet into buffer 1");
    rec = 2'b00;
    do_send(1, ST_GOOD, "1-byte packet");
    rec = 2'b00;
    do_send(0, ST_CHECK, "zero length");
    do_send(2049, ST_CHECK, "longer than a buffer");

    // TEST UNIT READY and an unknown command
    set_cdb(OP_TEST_UNIT_READY, 0);
    ini.send(TID);
    check(ini.status == ST_GOOD && ini.data_bytes == 0, "test unit ready");
    set_cdb(8'h28, 16);
    ini.send(TID);
    check(ini.status == ST_CHECK && ini.data_bytes == 0, "unsupported opcode");

    // a selection of another ID is ignored
    set_cdb(OP_SEND6, 16);
    ini.send(3'd5);
    check(ini.selected == 0 && !bsy_t, "other ID ignored");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
