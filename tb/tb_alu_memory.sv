// tb_alu_memory: self-checking test of the ALU memory against a reference
// array. Random operations of all five functions, with random carries,
// check the returned old value, the new carry and, via later reads, the
// stored value. Function semantics as in the memory-function table:
// Xchg m=d; Or m|=d; Xor m^=d; Add (carry,m)=m+carry+d;
// Min: if carry==0 {m=min(m,d); carry=(m!=d)}.
module tb_alu_memory;
  import kapers_pkg::*;
  localparam int SIZE = 256;
  logic clk = 0, rst_n = 0;
  logic en = 0;
  logic [7:0] addr = '0;
  memfunc_e fn = FN_XCHG;
  logic [3:0] din = '0, old;
  logic cin = 0, cout;
  int checks = 0, failures = 0;
  int ref_m [SIZE];
  int seen [5];

  alu_memory #(.SIZE(SIZE), .ADDR_W(8)) dut (.clk, .rst_n, .en, .addr, .fn, .din, .cin, .old, .cout);
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
    foreach (ref_m[i]) ref_m[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      int m, d, c, nm, nc, f;
      @(negedge clk);
      addr = 8'($urandom_range(0, 15));          // small range so values accumulate
      f    = $urandom_range(0, 4);
      fn   = memfunc_e'(f);
      din  = 4'($urandom);
      cin  = 1'($urandom);
      en   = ($urandom_range(0, 7) != 0);
      m = ref_m[addr]; d = din; c = cin;
      nm = m; nc = c;
      case (f)
        0: nm = d;
        1: nm = m | d;
        2: nm = m ^ d;
        3: begin nm = (m + d + c) % 16; nc = (m + d + c) / 16; end
        4: if (c == 0) begin nm = (m < d) ? m : d; nc = (nm != d); end
      endcase
      #1;
      chk(old == 4'(m), $sformatf("old %h expected %h at %0d", old, m, addr));
      chk(cout == 1'(nc), $sformatf("fn %0d m=%h d=%h c=%0d: cout %b expected %0d", f, m, d, c, cout, nc));
      @(posedge clk);
      if (en) begin ref_m[addr] = nm; seen[f]++; end
    end
    foreach (seen[i]) chk(seen[i] > 0, "every function exercised");
    // reset clears the memory
    @(negedge clk) begin en = 0; rst_n = 0; end
    @(negedge clk) rst_n = 1;
    for (int a = 0; a < 16; a++) begin
      addr = 8'(a); #1;
      chk(old == 4'h0, "cleared by reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
