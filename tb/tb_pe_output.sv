// tb_pe_output: self-checking test of the result port.
// For each loaded result, O3..O0 must show it on the next clock while O4 is
// unchanged, and O4 must toggle exactly READY_DELAY clocks after the data
// (2 clocks = 40 ns at 50 MHz), once per result.
module tb_pe_output;
  localparam int RD = 2;
  logic clk = 0, rst_n = 0;
  logic load = 0;
  logic [3:0] din = '0;
  logic [4:0] o;
  int checks = 0, failures = 0;

  pe_output #(.READY_DELAY(RD)) dut (.clk, .rst_n, .load, .din, .o);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic r0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    #1 chk(o == 5'b0, "reset value");
    for (int n = 0; n < 200; n++) begin
      logic [3:0] v;
      int lat;
      v  = 4'($urandom);
      r0 = o[4];
      @(negedge clk) begin load = 1; din = v; end
      @(negedge clk) load = 0;
      chk(o[3:0] == v, $sformatf("data %h expected %h", o[3:0], v));
      chk(o[4] == r0, "ready toggled together with the data");
      lat = 0;
      while (o[4] == r0 && lat < 10) begin @(negedge clk); lat++; end
      chk(lat == RD, $sformatf("ready after %0d clocks, expected %0d", lat, RD));
      chk(o[3:0] == v, "data held while ready toggles");
      repeat ($urandom_range(1, 6)) @(negedge clk);
      chk(o[4] == ~r0, "ready toggles only once per result");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
