// tb_nxt_seq: self-checking test of the strobe-flip command detector.
// Drives a sequence of port bytes, each held several clocks, and checks that
// exactly one enable pulse with x = D6..D0 follows every flip of D7, on the
// first clock edge that samples the flip, and none follows a change of the low bits alone or the
// first value after reset.
module tb_nxt_seq;
  logic clk = 0, rst_n = 0;
  logic [7:0] a = 8'h80;
  logic [6:0] x;
  logic enable;
  int checks = 0, failures = 0;
  int pulses = 0, expected = 0;

  nxt_seq dut (.clk, .rst_n, .a, .x, .enable);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n && enable) pulses++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] prev;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;       // port idles with D7 = 1 after reset
    repeat (5) @(posedge clk);
    #1 chk(pulses == 0, "no command from the idle level after reset");
    prev = a;
    for (int n = 0; n < 500; n++) begin
      logic [7:0] v;
      bit flip;
      flip = ($urandom_range(0, 3) != 0);
      v = {flip ? ~prev[7] : prev[7], 7'($urandom)};
      @(negedge clk) a = v;
      @(posedge clk); #1;
      if (flip) begin
        expected++;
        chk(enable == 1'b1 && x == v[6:0], $sformatf("flip to %h: enable=%b x=%h", v, enable, x));
      end else begin
        chk(enable == 1'b0, $sformatf("no flip (%h) but enable", v));
      end
      @(posedge clk); #1;
      chk(enable == 1'b0, "enable lasts one clock");
      repeat ($urandom_range(0, 3)) @(posedge clk);
      prev = v;
    end
    chk(pulses == expected, $sformatf("pulse count %0d expected %0d", pulses, expected));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
