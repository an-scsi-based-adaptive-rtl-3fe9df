// interrupt_unit: merges the interrupt requests of the four SCSI
// controllers (INT A..D) into the single IRQ line of the host.
//
// A one-clock pulse on int_req[i] marks controller i as pending. pending[]
// can be read by the host's interrupt program; writing a 1 to int_ack[i]
// clears that bit. IRQ is high while any request is pending. Because a PC
// interrupt controller is edge triggered, IRQ is dropped for one clock
// after every acknowledge while other requests remain, so that each of
// them produces a new rising edge. The document gives only the unit's
// purpose; the pending register, the acknowledge and the one-clock gap are
// this design's choices.
//
// Timing: IRQ rises one clock after the first int_req pulse. A request and
// an acknowledge of the same bit in the same clock leave the bit set.
module interrupt_unit #(
  parameter int N_SRC = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_SRC-1:0] int_req,
  input  logic [N_SRC-1:0] int_ack,
  output logic [N_SRC-1:0] pending,
  output logic             irq
);

  logic gap;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= '0;
      gap     <= 1'b0;
    end else begin
      pending <= (pending & ~int_ack) | int_req;
      gap     <= |int_ack;
    end
  end

  assign irq = |pending && !gap;

endmodule
