// tb_torus_network: whole tori of router nodes under the traffic of the
// published evaluation, all networks simulated side by side:
//   4 x 4 (the 16-node machine): uniform random traffic with 128-byte,
//         1024-byte and random 128..1024-byte packets, and transpose
//         traffic with 128-byte packets;
//   8 x 8: uniform random and transpose traffic with 128-byte packets.
// A 16 x 16 network is one more torus_bench line with K = 16; it is left
// out here because its build takes several minutes.
// Each network checks that every packet arrives once, intact, on a
// minimal path; mean hops and latency per byte are printed. The packet
// counts are small, so the latencies describe a lightly loaded network.
// Ends with the summed TB_RESULT.
`timescale 1ns/1ps
module tb_torus_network;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NB = 6;
  logic [NB-1:0] done;
  int c [NB], f [NB];
  int checks = 0, failures = 0;

  torus_bench #(.K(4), .NPKT(6), .LEN_MODE(0), .TRANSPOSE(1'b0), .GAP(3000)) u_u128  (.clk, .done(done[0]), .checks(c[0]), .failures(f[0]));
  torus_bench #(.K(4), .NPKT(3), .LEN_MODE(1), .TRANSPOSE(1'b0), .GAP(12000)) u_u1024 (.clk, .done(done[1]), .checks(c[1]), .failures(f[1]));
  torus_bench #(.K(4), .NPKT(4), .LEN_MODE(2), .TRANSPOSE(1'b0), .GAP(8000)) u_urnd  (.clk, .done(done[2]), .checks(c[2]), .failures(f[2]));
  torus_bench #(.K(4), .NPKT(6), .LEN_MODE(0), .TRANSPOSE(1'b1), .GAP(3000)) u_t128  (.clk, .done(done[3]), .checks(c[3]), .failures(f[3]));
  torus_bench #(.K(8), .NPKT(3), .LEN_MODE(0), .TRANSPOSE(1'b0), .GAP(3000)) u8_u128  (.clk, .done(done[4]), .checks(c[4]), .failures(f[4]));
  torus_bench #(.K(8), .NPKT(3), .LEN_MODE(0), .TRANSPOSE(1'b1), .GAP(3000)) u8_t128  (.clk, .done(done[5]), .checks(c[5]), .failures(f[5]));


  initial begin
    wait (&done);
    foreach (c[i]) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000000) @(posedge clk);
    foreach (c[i]) begin
      checks += c[i];
      failures += f[i];
    end
    failures++;
    $display("FAIL: watchdog, networks done %b", done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
