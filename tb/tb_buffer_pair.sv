// tb_buffer_pair: checks the ownership rule of the two buffers.
//
// The controller side fills a buffer and pulses c_done; the testbench
// checks that the record bit toggles, that the host then reads back what
// was written, that controller writes into a host-owned buffer are
// dropped, that a host read of a controller-owned buffer returns 0, that
// h_release toggles the bit back, and that the two buffers are
// independent (one can be filled while the host reads the other).
`timescale 1ns/1ps
module tb_buffer_pair;
  localparam int BUF_BYTES = 2048;
  localparam int AW = $clog2(BUF_BYTES);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic c_buf_sel, c_we, c_done, h_sel, h_rd, h_release;
  logic [AW-1:0] c_addr, h_addr;
  logic [7:0] c_wdata, h_rdata;
  logic [1:0] rec;

  buffer_pair #(.BUF_BYTES(BUF_BYTES)) dut (.*);

  logic [7:0] ref_mem [2][BUF_BYTES];
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic ctrl_fill(input logic b, input int len, input bit expect_store);
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      c_buf_sel = b; c_we = 1; c_addr = AW'(i); c_wdata = 8'($urandom);
      if (expect_store) ref_mem[b][i] = c_wdata;
    end
    @(negedge clk); c_we = 0;
  endtask

  task automatic ctrl_done(input logic b);
    @(negedge clk); c_buf_sel = b; c_done = 1;
    @(negedge clk); c_done = 0;
  endtask

  task automatic host_check(input logic b, input int len, input bit expect_data, input string what);
    bit ok = 1;
    for (int i = 0; i < len; i++) begin
      @(negedge clk); h_sel = b; h_addr = AW'(i); h_rd = 1;
      @(negedge clk); h_rd = 0;
      if (h_rdata !== (expect_data ? ref_mem[b][i] : 8'h00)) ok = 0;
    end
    check(ok, what);
  endtask

  task automatic host_release(input logic b);
    @(negedge clk); h_sel = b; h_release = 1;
    @(negedge clk); h_release = 0;
  endtask

  initial begin
    {c_buf_sel, c_we, c_done, h_sel, h_rd, h_release} = '0;
    c_addr = 0; h_addr = 0; c_wdata = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    check(rec == 2'b00, "both buffers empty after reset");

    ctrl_fill(0, 128, 1);
    host_check(0, 16, 0, "host sees 0 while controller owns buffer 0");
    ctrl_done(0);
    check(rec == 2'b01, "record bit 0 set by controller");
    host_check(0, 128, 1, "host reads packet in buffer 0");

    // controller fills buffer 1 while the host reads buffer 0
    ctrl_fill(1, 1024, 1);
    ctrl_done(1);
    check(rec == 2'b11, "both record bits set");
    ctrl_fill(0, 64, 0);                    // dropped: host owns buffer 0
    host_check(0, 128, 1, "host-owned buffer 0 not overwritten");
    host_check(1, 1024, 1, "host reads packet in buffer 1");

    host_release(0);
    check(rec == 2'b10, "host release clears record bit 0");
    ctrl_fill(0, BUF_BYTES, 1);
    ctrl_done(0);
    check(rec == 2'b11, "buffer 0 refilled with a full 2 KB packet");
    host_check(0, BUF_BYTES, 1, "full 2 KB packet read back");
    host_release(1);
    host_release(0);
    check(rec == 2'b00, "both released");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
