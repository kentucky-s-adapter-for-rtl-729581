// tb_kapers_top: end-to-end test of the adapter at its default parameters
// (4 PEs, 256 nybbles, FIFO depth 8, round-robin arbitration). The host
// programs and checks are in kapers_host.svh.
module tb_kapers_top;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0;
  always #10 clk = ~clk;          // 50 MHz
`include "kapers_host.svh"
  kapers_top dut (.clk, .rst_n, .pe_in(pin), .pe_out(pout), .led_r, .led_g, .fifo_overflow(ovf));
  // watchdog
  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
