// kapers_host.svh: body shared by the end-to-end testbenches of kapers_top.
//
// Four behavioural PE hosts drive the adapter through its port protocol, the
// way the host library does it: each command byte flips the strobe bit D7,
// and a reply is awaited by polling for a change of O4. The hosts run the
// aggregate-function algorithms (OR/XOR/Add reductions, an atomic locked
// 16-bit add, Count, Votecount, Vote, First, broadcast, put/get, a locked
// multi-nybble Min, an ordered prefix scan and a locked 32-bit put sent
// without handshakes) as one SPMD program, and check
// every result against values computed here from the inputs.
// Port writes are spaced GAP_MIN..GAP_MAX clocks apart and are sometimes
// written with a skew (strobe first, data one or two clocks later), which the
// input filter must ignore.
//
// The including module declares the instance `dut`, the clock `clk` and a
// watchdog.

`include "kapers_hostlib.svh"

  localparam int ROUNDS = 20;

  // ---------------- shared data of one round ----------------
  longint v [NP];
  longint got [NP];
  int flag [NP], vote [NP];

  // clear n nybbles at a by PE 0, then barrier
  task automatic init_area(input int k, input int a, input int n, input longint val);
    longint r;
    if (k == 0) begin
      p_setfunc(k, F_XCHG);
      p_address(k, a);
      p_memfunc(k, val, n, r);
    end
    p_bar(k);
  endtask

  task automatic run_pe(input int k, input int round);
    longint r, exp;
    logic [3:0] b;
    // BarOr returns the OR of all PEs' nybbles
    p_baror(k, 4'(1 << k), b);
    chk(b == 4'hF, $sformatf("PE%0d BarOr %h", k, b));

    // OR and XOR reductions, 8 bit
    init_area(k, 8'h00, 4, 0);
    p_setfunc(k, F_OR);  p_address(k, 8'h00); p_memfunc(k, v[k] & 255, 2, r);
    p_setfunc(k, F_XOR); p_address(k, 8'h02); p_memfunc(k, v[k] & 255, 2, r);
    p_bar(k);
    p_setfunc(k, F_OR); p_address(k, 8'h00); p_memfunc(k, 0, 2, r);
    exp = 0; for (int j = 0; j < NP; j++) exp |= v[j] & 255;
    chk(r == exp, $sformatf("PE%0d reduce OR %h expected %h", k, r, exp));
    p_address(k, 8'h02); p_memfunc(k, 0, 2, r);
    exp = 0; for (int j = 0; j < NP; j++) exp ^= v[j] & 255;
    chk(r == exp, $sformatf("PE%0d reduce XOR %h expected %h", k, r, exp));
    p_bar(k);

    // Add reduction, 16 bit, unlocked
    init_area(k, 8'h10, 4, 0);
    p_setfunc(k, F_ADD); p_address(k, 8'h10); p_memfunc(k, v[k] & 16'hffff, 4, r);
    p_bar(k);
    p_setfunc(k, F_OR); p_memfunc(k, 0, 4, r);
    exp = 0; for (int j = 0; j < NP; j++) exp += v[j] & 16'hffff;
    chk(r == (exp & 16'hffff), $sformatf("PE%0d reduce ADD %h expected %h", k, r, exp & 16'hffff));
    p_bar(k);

    // atomic 16-bit add with locking: the old values form a chain
    init_area(k, 8'h20, 4, 0);
    p_setfunc(k, F_ADD | LOCK); p_address(k, 8'h20); p_memfunc(k, v[k] & 16'hffff, 4, r);
    got[k] = r;
    p_bar(k);
    if (k == 0) begin
      int links = 0;
      for (int i = 0; i < NP; i++) begin
        bit found = 0;
        for (int j = 0; j < NP; j++)
          if (((got[i] + (v[i] & 16'hffff)) & 16'hffff) == got[j]) found = 1;
        if (found) links++;
      end
      chk(links == NP - 1, $sformatf("locked add not atomic: %0d links", links));
    end
    p_setfunc(k, F_OR); p_memfunc(k, 0, 4, r);
    chk(r == (exp & 16'hffff), $sformatf("PE%0d locked ADD %h", k, r));
    p_bar(k);

    // locked 32-bit put from every PE without handshake: the locks keep the
    // writers in order, so the object ends up as one PE's whole value
    p_setfunc(k, F_XCHG | LOCK); p_address(k, 8'hB0); p_memfunc_nowait(k, v[k] >> 8, 8);
    p_bar(k);
    p_setfunc(k, F_OR); p_memfunc(k, 0, 8, r);
    begin
      bit whole = 0;
      for (int j = 0; j < NP; j++) if (r == ((v[j] >> 8) & 32'hffffffff)) whole = 1;
      chk(whole, $sformatf("PE%0d locked put mixed: %h", k, r));
    end
    p_bar(k);

    // Count
    init_area(k, 8'h30, 2, 0);
    p_setfunc(k, F_ADD); p_address(k, 8'h30);
    if (flag[k]) p_memfunc(k, 1, 2, r);
    p_bar(k);
    p_memfunc(k, 0, 2, r);
    exp = 0; for (int j = 0; j < NP; j++) exp += flag[j];
    chk(r == exp, $sformatf("PE%0d count %0d expected %0d", k, r, exp));
    p_bar(k);

    // Votecount: two nybbles per PE
    init_area(k, 8'h40, 2 * NP, 0);
    p_setfunc(k, F_ADD); p_address(k, 8'h40 + 2 * vote[k]); p_memfunc(k, 1, 2, r);
    p_bar(k);
    p_address(k, 8'h40 + 2 * k); p_memfunc(k, 0, 2, r);
    exp = 0; for (int j = 0; j < NP; j++) exp += (vote[j] == k);
    chk(r == exp, $sformatf("PE%0d votecount %0d expected %0d", k, r, exp));
    p_bar(k);

    // Vote: bit vector per PE, one nybble each
    init_area(k, 8'h48, NP, 0);
    p_setfunc(k, F_OR); p_address(k, 8'h48 + vote[k]); p_memfunc(k, 1 << k, 1, r);
    p_bar(k);
    p_address(k, 8'h48 + k); p_memfunc(k, 0, 1, r);
    exp = 0; for (int j = 0; j < NP; j++) if (vote[j] == k) exp |= 1 << j;
    chk(r == exp, $sformatf("PE%0d vote %h expected %h", k, r, exp));
    p_bar(k);

    // First: lowest PE number with flag set (Min on PE numbers)
    init_area(k, 8'h50, 1, NP + 1);
    p_setfunc(k, F_MIN); p_address(k, 8'h50);
    if (flag[k]) p_memfunc(k, k, 1, r);
    p_bar(k);
    p_memfunc(k, NP + 1, 1, r);
    exp = NP + 1; for (int j = NP - 1; j >= 0; j--) if (flag[j]) exp = j;
    chk(r == exp, $sformatf("PE%0d first %0d expected %0d", k, r, exp));
    p_bar(k);

    // Broadcast from PE 2, 16 bit
    if (k == 2) begin p_setfunc(k, F_XCHG); p_address(k, 8'h60); p_memfunc(k, v[2] >> 16, 4, r); end
    p_bar(k);
    p_setfunc(k, F_OR); p_address(k, 8'h60); p_memfunc(k, 0, 4, r);
    chk(r == ((v[2] >> 16) & 16'hffff), $sformatf("PE%0d bcast %h", k, r));
    p_bar(k);

    // Put/get: read the value of the next PE
    p_setfunc(k, F_XCHG); p_address(k, 8'h70 + 2 * k); p_memfunc(k, v[k] >> 32, 2, r);
    p_bar(k);
    p_setfunc(k, F_OR); p_address(k, 8'h70 + 2 * ((k + 1) % NP)); p_memfunc(k, 0, 2, r);
    chk(r == ((v[(k + 1) % NP] >> 32) & 255), $sformatf("PE%0d putget %h", k, r));
    p_bar(k);

    // locked Min, high nybble first; values {h,h} with distinct h
    init_area(k, 8'h80, 2, 8'hff);
    p_setfunc(k, F_MIN | LOCK); p_address(k, 8'h80);
    p_memfunc_hi(k, {4'(v[k] >> 40), 4'(v[k] >> 40)}, 2, r);
    p_bar(k);
    p_setfunc(k, F_OR); p_memfunc_hi(k, 0, 2, r);
    exp = 255; for (int j = 0; j < NP; j++) if ({4'(v[j] >> 40), 4'(v[j] >> 40)} < exp) exp = {4'(v[j] >> 40), 4'(v[j] >> 40)};
    chk(r == exp, $sformatf("PE%0d locked min %h expected %h", k, r, exp));
    p_bar(k);

    // ordered scan (exclusive prefix sum, 8 bit), order kept by a reference nybble
    init_area(k, 8'h90, 3, 0);
    do begin
      p_setfunc(k, F_OR); p_address(k, 8'h90); p_memfunc(k, 0, 1, r);
    end while (r != k);
    p_setfunc(k, F_ADD); p_address(k, 8'h91); p_memfunc(k, v[k] & 255, 2, r);
    exp = 0; for (int j = 0; j < k; j++) exp += v[j] & 255;
    chk(r == (exp & 255), $sformatf("PE%0d scan %h expected %h", k, r, exp & 255));
    p_setfunc(k, F_XCHG); p_address(k, 8'h90); p_memfunc(k, k + 1, 1, r);
    p_bar(k);
  endtask

  // ---------------- mechanism monitors ----------------
  always @(posedge clk) if (rst_n) begin
    int nreq;
    nreq = $countones(dut.u_arb.req);
    if (nreq > 1) n_contention++;
    if (dut.bar_go) n_barrier++;
    if (dut.m_en && dut.m_fn == kapers_pkg::FN_ADD && dut.m_cout) n_add_carry++;
    if (dut.m_en && dut.m_fn == kapers_pkg::FN_MIN && !dut.m_cin && dut.m_cout) n_min_decided++;
    for (int i = 0; i < NP; i++) begin
      if (ovf[i]) chk(0, $sformatf("FIFO %0d overflow", i));
      if (!led_r[i] && !led_g[i]) n_led_dark++;
      if (led_r[i]) n_led_red++;
      if (led_g[i]) n_led_green++;
    end
  end
  for (genvar i = 0; i < NP; i++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (dut.g_pe[i].u_pu.lock_wait) n_lock_wait++;
      if (dut.g_pe[i].u_pu.state == 2'd3 && dut.g_pe[i].u_pu.mem_grant) n_lock_move++;
      if (dut.g_pe[i].u_fifo.count >= 2) n_fifo_backlog++;
    end
  end

  initial begin
    int t0;
    for (int i = 0; i < NP; i++) begin pin[i] = '0; outlast[i] = '0; inlast[i] = 0; addrlast[i] = 0; end
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    for (int round = 0; round < ROUNDS; round++) begin
      int hs [16];
      // distinct high nybbles for the Min test
      for (int i = 0; i < 16; i++) hs[i] = i;
      hs.shuffle();
      for (int i = 0; i < NP; i++) begin
        v[i] = {$urandom, $urandom};
        v[i][43:40] = 4'(hs[i]);
        flag[i] = $urandom_range(0, 1);
        vote[i] = $urandom_range(0, NP - 1);
      end
      t0 = $time;
      fork
        run_pe(0, round);
        run_pe(1, round);
        run_pe(2, round);
        run_pe(3, round);
      join
    end
    // every mechanism must have happened
    chk(n_skew > 0, "strobe/data skew injected");
    chk(n_short_addr > 0, "address set by its low nybble only");
    chk(n_barrier > 0, "barrier fired");
    chk(n_lock_wait > 0, "a PE waited on a lock");
    chk(n_lock_move > 0, "lock handed to the next nybble");
    chk(n_fifo_backlog > 0, "FIFO held two or more commands");
    chk(n_contention > 0, "several PEs requested the memory in one clock");
    chk(n_add_carry > 0, "Add carried into the next nybble");
    chk(n_min_decided > 0, "Min decided by a higher nybble");
    chk(n_led_dark > 0 && n_led_red > 0 && n_led_green > 0, "LED dark, red and green all shown");
    chk(max_unlocked_latency <= 50, $sformatf("unlocked reply within 1 us (50 clocks): %0d", max_unlocked_latency));
    $display("mechanisms: skew=%0d short_addr=%0d barrier=%0d lock_wait=%0d lock_move=%0d fifo_backlog=%0d contention=%0d add_carry=%0d min_decided=%0d led d/r/g=%0d/%0d/%0d max_latency=%0d",
             n_skew, n_short_addr, n_barrier, n_lock_wait, n_lock_move, n_fifo_backlog, n_contention,
             n_add_carry, n_min_decided, n_led_dark, n_led_red, n_led_green, max_unlocked_latency);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
