// tb_cmd_fifo: self-checking test of the command FIFO against a queue model.
// Random pushes and pops, including pushes into a full FIFO (dropped and
// flagged by overflow) and pops from an empty one (ignored).
module tb_cmd_fifo;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [6:0] din = '0, dout;
  logic empty, full, overflow;
  logic [3:0] count;
  int checks = 0, failures = 0;
  logic [6:0] model [$];
  int n_full = 0, n_ovf = 0;

  cmd_fifo #(.WIDTH(7), .DEPTH(DEPTH)) dut (.clk, .rst_n, .push, .din, .pop, .dout, .empty, .full,
                                           .overflow, .count);
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
    bit exp_ovf;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      // phases: fill-biased, drain-biased, mixed
      case ((n / 500) % 3)
        0: begin push = ($urandom_range(0, 3) != 0); pop = ($urandom_range(0, 3) == 0); end
        1: begin push = ($urandom_range(0, 3) == 0); pop = ($urandom_range(0, 3) != 0); end
        default: begin push = $urandom_range(0, 1); pop = $urandom_range(0, 1); end
      endcase
      din = 7'($urandom);
      #1;
      chk(empty == (model.size() == 0), "empty flag");
      chk(full == (model.size() == DEPTH), "full flag");
      chk(count == 4'(model.size()), "count");
      if (model.size() != 0) chk(dout == model[0], $sformatf("head %h expected %h", dout, model[0]));
      if (full) n_full++;
      exp_ovf = push && (model.size() == DEPTH);
      @(posedge clk);
      if (pop && model.size() != 0) void'(model.pop_front());
      if (push && !exp_ovf) model.push_back(din);
      #1;
      chk(overflow == exp_ovf, "overflow flag");
      if (overflow) n_ovf++;
    end
    chk(n_full > 0 && n_ovf > 0, "full and overflow both exercised");
    push = 0; pop = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
