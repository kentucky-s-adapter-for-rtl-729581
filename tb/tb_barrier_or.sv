// tb_barrier_or: self-checking test of the OR barrier.
// Units arrive at random times with random nybbles and leave when go is seen.
// go must fire only when all are waiting, exactly once per barrier, one clock
// after the last arrival, and result must be the OR of the nybbles.
module tb_barrier_or;
  localparam int NPE = 4;
  logic clk = 0, rst_n = 0;
  logic [NPE-1:0] req = '0;
  logic [3:0] data [NPE];
  logic go;
  logic [3:0] result;
  int checks = 0, failures = 0;

  barrier_or #(.NPE(NPE)) dut (.clk, .rst_n, .req, .data, .go, .result);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (data[i]) data[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int b = 0; b < 300; b++) begin
      int arrive [NPE];
      int last, t;
      logic [3:0] exp;
      last = 0; t = 0; exp = '0;
      foreach (arrive[i]) begin
        arrive[i] = $urandom_range(0, 12);
        if (arrive[i] > last) last = arrive[i];
      end
      // random nybbles, mostly sparse so the OR is not always 1111
      foreach (data[i]) begin
        data[i] = 4'(1 << $urandom_range(0, 3)) & 4'($urandom);
        exp |= data[i];
      end
      while (1) begin
        @(negedge clk);
        chk(!go, "go before every unit arrived");
        foreach (arrive[i]) if (arrive[i] == t) req[i] = 1'b1;
        if (t == last) break;
        t++;
      end
      @(negedge clk);
      chk(go && result == exp, $sformatf("go=%b result=%h expected %h", go, result, exp));
      req = '0;
      @(negedge clk);
      chk(!go, "go lasted more than one clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
