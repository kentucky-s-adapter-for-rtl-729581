// tb_kapers_top_token: the end-to-end test of tb_kapers_top (programs and
// checks in kapers_host.svh) with the arbiter switched to the token ring.
// With this policy the memory grant goes straight to the next unit that is
// requesting. The document describes it as the alternative to the
// round-robin counter it built. All results, mechanism counts and the reply
// latency bound must hold as with round-robin. Clock 50 MHz; other
// parameters at their defaults.
module tb_kapers_top_token;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0;
  always #10 clk = ~clk;
`include "kapers_host.svh"
  kapers_top #(.TOKEN_RING(1'b1)) dut (.clk, .rst_n, .pe_in(pin), .pe_out(pout), .led_r, .led_g,
                                      .fifo_overflow(ovf));
  // watchdog
  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
