// tb_interrupt_unit: drives random request and acknowledge pulses on the
// four interrupt inputs and compares pending[] and IRQ, every clock, with
// a reference model: pending' = (pending & ~ack) | req, IRQ = any pending,
// held low for the clock after an acknowledge. It also checks the IRQ
// latency of one clock on a single request.
`timescale 1ns/1ps
module tb_interrupt_unit;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] int_req, int_ack, pending;
  logic irq;

  interrupt_unit #(.N_SRC(4)) dut (.*);

  logic [3:0] ref_pend;
  logic ref_gap;
  int checks = 0, failures = 0, gaps = 0;

  initial begin
    int_req = 0; int_ack = 0;
    ref_pend = 0; ref_gap = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // latency of a single request
    @(negedge clk); int_req = 4'b0100;
    @(negedge clk); int_req = 0;
    checks++;
    if (!(irq && pending == 4'b0100)) begin failures++; $display("FAIL: single request"); end
    ref_pend = 4'b0100;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      int_req = ($urandom_range(3) == 0) ? 4'(1 << $urandom_range(3)) : 4'b0;
      int_ack = ($urandom_range(2) == 0) ? (ref_pend & 4'($urandom)) : 4'b0;
      ref_pend = (ref_pend & ~int_ack) | int_req;
      ref_gap  = |int_ack;
      @(negedge clk);
      int_req = 0; int_ack = 0;
      checks++;
      if (pending !== ref_pend || irq !== (|ref_pend && !ref_gap)) begin
        failures++;
        if (failures < 10) $display("FAIL: pending %b irq %b expected %b %b", pending, irq, ref_pend, |ref_pend && !ref_gap);
      end
      if (ref_gap && |ref_pend) gaps++;
      ref_gap = 0;
    end
    checks++;
    if (gaps == 0) begin failures++; $display("FAIL: no IRQ gap exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
