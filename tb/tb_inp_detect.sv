// tb_inp_detect: self-checking test of the input stability filter.
// A clean step must reach dout on the fifth clock edge that samples it
// (four clocks after the first); pulses shorter than five samples must never reach dout; random
// traffic is checked against a history rule: dout may only change to a value
// that din held on the last four edges (the sampling state s0 moves on
// without comparing, so four is the shortest run that can pass).
module tb_inp_detect;
  logic clk = 0, rst_n = 0;
  logic [7:0] din = '0, dout;
  int checks = 0, failures = 0;
  logic [7:0] hist [5];

  inp_detect dut (.clk, .rst_n, .din, .dout);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // history of din as sampled at each edge
  always @(posedge clk) begin
    hist[4] <= hist[3]; hist[3] <= hist[2]; hist[2] <= hist[1]; hist[1] <= hist[0]; hist[0] <= din;
  end

  logic [7:0] last_dout;
  bit track = 0;
  always @(posedge clk) begin
    #1;
    if (track && dout != last_dout)
      chk(hist[0] == dout && hist[1] == dout && hist[2] == dout && hist[3] == dout,
          $sformatf("dout changed to %h without four stable samples", dout));
    last_dout = dout;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    chk(dout == 8'h00, "reset value");
    // clean steps: measure latency
    for (int n = 0; n < 20; n++) begin
      logic [7:0] v;
      v = 8'($urandom);
      if (v == dout) v = ~v;
      @(negedge clk) din = v;
      lat = 0;
      while (dout != v && lat < 20) begin @(posedge clk); #1; lat++; end
      chk(lat == 5, $sformatf("step latency %0d edges, expected 5", lat));
      repeat (3) @(negedge clk);
    end
    // glitches of 1..4 cycles are rejected
    for (int w = 1; w <= 4; w++) begin
      logic [7:0] base;
      base = dout;
      @(negedge clk) din = ~base;
      repeat (w - 1) @(negedge clk);
      @(negedge clk) din = base;
      repeat (8) @(posedge clk);
      #1 chk(dout == base, $sformatf("glitch of %0d cycles leaked", w));
    end
    // random traffic, checked by the history rule
    track = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) din = 8'($urandom);
    end
    din = 8'h5a;
    repeat (10) @(posedge clk);
    #1 chk(dout == 8'h5a, "final stable value");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
