// tb_sram_buffer: writes random bytes to random addresses of one 2 KB
// buffer, keeping a reference array, and checks every read one clock
// after its address, including reads of the address being written.
`timescale 1ns/1ps
module tb_sram_buffer;
  localparam int BYTES = 2048;
  localparam int AW = $clog2(BYTES);

  logic clk = 0;
  always #5 clk = ~clk;

  logic we;
  logic [AW-1:0] addr;
  logic [7:0] wdata, rdata;
  logic [7:0] ref_mem [BYTES];

  sram_buffer #(.BYTES(BYTES), .DATA_W(8)) dut (.clk, .we, .addr, .wdata, .rdata);

  int checks = 0, failures = 0;

  initial begin
    we = 0; addr = 0; wdata = 0;
    // fill every location
    for (int i = 0; i < BYTES; i++) begin
      @(negedge clk);
      we = 1; addr = AW'(i); wdata = 8'($urandom);
      ref_mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    // read back in random order, with random writes mixed in
    for (int n = 0; n < 6000; n++) begin
      logic [7:0] expv;
      @(negedge clk);
      addr = AW'($urandom_range(BYTES - 1));
      we = ($urandom_range(3) == 0);
      wdata = 8'($urandom);
      expv = ref_mem[addr];          // a read sees the old contents
      if (we) ref_mem[addr] = wdata;
      @(posedge clk); #1;
      checks++;
      if (rdata !== expv) begin
        failures++;
        if (failures < 10) $display("FAIL: addr %0d read %h expected %h", addr, rdata, expv);
      end
    end
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
