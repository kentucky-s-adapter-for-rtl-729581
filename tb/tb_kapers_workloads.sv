// tb_kapers_workloads: the aggregate operations of the host library at their
// largest object size, 64 bits (16 nybbles), on the adapter at its default
// parameters (4 PEs, 256 nybbles of memory, FIFO depth 8).
//
// Each round the four hosts run, as one SPMD program with random data:
//   OR and XOR reductions of 64-bit values,
//   an unlocked 64-bit Add reduction (carry carried through 16 nybbles),
//   a locked 64-bit atomic Add (the returned old values must form a chain),
//   a 64-bit broadcast,
//   a 64-bit put/get area of NPE x 16 = 64 nybbles,
//   Votecount with one 32-bit counter (8 nybbles) per PE,
//   an ordered exclusive prefix sum (scan) of 64-bit values.
// Together they use addresses up to 0xF0, so the second address nybble is
// set by AddrNext throughout. Results are checked against values worked out
// here from the inputs; no FIFO may overflow.
module tb_kapers_workloads;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0;
  always #10 clk = ~clk;          // 50 MHz
`include "kapers_hostlib.svh"
  kapers_top dut (.clk, .rst_n, .pe_in(pin), .pe_out(pout), .led_r, .led_g, .fifo_overflow(ovf));

  localparam int ROUNDS = 20;
  localparam int N64 = 16;        // nybbles in a 64-bit object

  longint v [NP];
  longint got [NP];
  int     vote [NP];
  int     src;

  // PE 0 clears n nybbles from a (16 at a time), then all meet at a barrier
  task automatic clear_area(input int k, input int a, input int n);
    longint r;
    if (k == 0) begin
      p_setfunc(k, F_XCHG);
      for (int o = 0; o < n; o += N64) begin
        p_address(k, a + o);
        p_memfunc(k, 0, (n - o < N64) ? n - o : N64, r);
      end
    end
    p_bar(k);
  endtask

  task automatic run_pe(input int k);
    longint r, exp;

    // OR and XOR reductions
    clear_area(k, 8'h00, 2 * N64);
    p_setfunc(k, F_OR);  p_address(k, 8'h00); p_memfunc(k, v[k], N64, r);
    p_setfunc(k, F_XOR); p_address(k, 8'h10); p_memfunc(k, v[k], N64, r);
    p_bar(k);
    p_setfunc(k, F_OR); p_address(k, 8'h00); p_memfunc(k, 0, N64, r);
    exp = 0; for (int j = 0; j < NP; j++) exp |= v[j];
    chk(r == exp, $sformatf("PE%0d reduce OR64 %h expected %h", k, r, exp));
    p_address(k, 8'h10); p_memfunc(k, 0, N64, r);
    exp = 0; for (int j = 0; j < NP; j++) exp ^= v[j];
    chk(r == exp, $sformatf("PE%0d reduce XOR64 %h expected %h", k, r, exp));
    p_bar(k);

    // unlocked Add reduction
    clear_area(k, 8'h20, N64);
    p_setfunc(k, F_ADD); p_address(k, 8'h20); p_memfunc(k, v[k], N64, r);
    p_bar(k);
    p_setfunc(k, F_OR); p_memfunc(k, 0, N64, r);
    exp = 0; for (int j = 0; j < NP; j++) exp += v[j];
    chk(r == exp, $sformatf("PE%0d reduce ADD64 %h expected %h", k, r, exp));
    p_bar(k);

    // locked atomic Add: each PE's old value plus its addend is another's old value
    clear_area(k, 8'h30, N64);
    p_setfunc(k, F_ADD | LOCK); p_address(k, 8'h30); p_memfunc(k, v[k], N64, r);
    got[k] = r;
    p_bar(k);
    if (k == 0) begin
      int links = 0;
      for (int i = 0; i < NP; i++) begin
        bit found = 0;
        for (int j = 0; j < NP; j++) if (got[i] + v[i] == got[j]) found = 1;
        if (found) links++;
      end
      chk(links == NP - 1, $sformatf("locked ADD64 not atomic: %0d links", links));
    end
    p_setfunc(k, F_OR); p_memfunc(k, 0, N64, r);
    exp = 0; for (int j = 0; j < NP; j++) exp += v[j];
    chk(r == exp, $sformatf("PE%0d locked ADD64 %h expected %h", k, r, exp));
    p_bar(k);

    // broadcast from PE src
    if (k == src) begin p_setfunc(k, F_XCHG); p_address(k, 8'h40); p_memfunc(k, v[k], N64, r); end
    p_bar(k);
    p_setfunc(k, F_OR); p_address(k, 8'h40); p_memfunc(k, 0, N64, r);
    chk(r == v[src], $sformatf("PE%0d bcast64 %h expected %h", k, r, v[src]));
    p_bar(k);

    // put/get: every PE puts into its own 16 nybbles, then reads the PE before it
    p_setfunc(k, F_XCHG); p_address(k, 8'h80 + N64 * k); p_memfunc(k, v[k], N64, r);
    p_bar(k);
    p_setfunc(k, F_OR); p_address(k, 8'h80 + N64 * ((k + NP - 1) % NP)); p_memfunc(k, 0, N64, r);
    chk(r == v[(k + NP - 1) % NP], $sformatf("PE%0d putget64 %h", k, r));
    p_bar(k);

    // Votecount: one 32-bit counter per PE
    clear_area(k, 8'hC0, 8 * NP);
    p_setfunc(k, F_ADD); p_address(k, 8'hC0 + 8 * vote[k]); p_memfunc(k, 1, 8, r);
    p_bar(k);
    p_address(k, 8'hC0 + 8 * k); p_memfunc(k, 0, 8, r);
    exp = 0; for (int j = 0; j < NP; j++) exp += (vote[j] == k);
    chk(r == exp, $sformatf("PE%0d votecount32 %0d expected %0d", k, r, exp));
    p_bar(k);

    // ordered exclusive prefix sum, turn kept by the reference nybble at 0xE0
    clear_area(k, 8'hE0, 1 + N64);
    do begin
      p_setfunc(k, F_OR); p_address(k, 8'hE0); p_memfunc(k, 0, 1, r);
    end while (r != k);
    p_setfunc(k, F_ADD); p_address(k, 8'hE1); p_memfunc(k, v[k], N64, r);
    exp = 0; for (int j = 0; j < k; j++) exp += v[j];
    chk(r == exp, $sformatf("PE%0d scan64 %h expected %h", k, r, exp));
    p_setfunc(k, F_XCHG); p_address(k, 8'hE0); p_memfunc(k, k + 1, 1, r);
    p_bar(k);
  endtask

  always @(posedge clk) if (rst_n)
    for (int i = 0; i < NP; i++) if (ovf[i]) chk(0, $sformatf("FIFO %0d overflow", i));

  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NP; i++) begin pin[i] = '0; outlast[i] = '0; inlast[i] = 0; addrlast[i] = 0; end
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    for (int round = 0; round < ROUNDS; round++) begin
      for (int i = 0; i < NP; i++) begin
        v[i] = {$urandom, $urandom};
        vote[i] = $urandom_range(0, NP - 1);
      end
      src = round % NP;
      fork
        run_pe(0);
        run_pe(1);
        run_pe(2);
        run_pe(3);
      join
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
