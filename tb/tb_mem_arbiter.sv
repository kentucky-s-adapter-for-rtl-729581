// tb_mem_arbiter: self-checking test of both arbitration policies.
// Two arbiters see the same random requests. Round-robin: unit i may only be
// granted when a free-running modulo-4 count equals i. Token ring: some
// requester is granted whenever any requests, and with all units requesting
// the grant rotates 0,1,2,3. Both: at most one grant, only to a requester,
// and the memory port carries the granted unit's fields, enabled only for an
// operation (not for a lock-only step).
module tb_mem_arbiter;
  import kapers_pkg::*;
  localparam int NPE = 4;
  logic clk = 0, rst_n = 0;
  logic [NPE-1:0] req = '0, op = '0, cin = '0;
  logic [7:0] addr_i [NPE];
  memfunc_e fn_i [NPE];
  logic [3:0] din_i [NPE];
  logic [NPE-1:0] g_rr, g_tr;
  logic en_rr, en_tr, cin_rr, cin_tr;
  logic [7:0] a_rr, a_tr;
  memfunc_e f_rr, f_tr;
  logic [3:0] d_rr, d_tr;
  int checks = 0, failures = 0;

  mem_arbiter #(.NPE(NPE), .ADDR_W(8), .TOKEN_RING(1'b0)) u_rr (
    .clk, .rst_n, .req, .op, .addr_i, .fn_i, .din_i, .cin_i(cin), .grant(g_rr),
    .m_en(en_rr), .m_addr(a_rr), .m_fn(f_rr), .m_din(d_rr), .m_cin(cin_rr));
  mem_arbiter #(.NPE(NPE), .ADDR_W(8), .TOKEN_RING(1'b1)) u_tr (
    .clk, .rst_n, .req, .op, .addr_i, .fn_i, .din_i, .cin_i(cin), .grant(g_tr),
    .m_en(en_tr), .m_addr(a_tr), .m_fn(f_tr), .m_din(d_tr), .m_cin(cin_tr));
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int idx(input logic [NPE-1:0] g);
    for (int i = 0; i < NPE; i++) if (g[i]) return i;
    return -1;
  endfunction

  task automatic port_ok(input logic [NPE-1:0] g, input logic en, input logic [7:0] a, input memfunc_e f,
                         input logic [3:0] d, input logic c, input string who);
    int k;
    k = idx(g);
    chk($countones(g) <= 1, {who, ": more than one grant"});
    chk((g & ~req) == '0, {who, ": grant without request"});
    if (k >= 0) begin
      chk(a == addr_i[k] && f == fn_i[k] && d == din_i[k] && c == cin[k], {who, ": port fields"});
      chk(en == op[k], {who, ": enable follows op"});
    end else begin
      chk(!en, {who, ": enable without grant"});
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt = 1, prev_tr = -1, rr_grants = 0, tr_grants = 0;
    foreach (addr_i[i]) begin addr_i[i] = '0; fn_i[i] = FN_XCHG; din_i[i] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;   // the counter steps on the next edge, hence cnt = 1
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (n < 2000) req = 4'($urandom) & 4'($urandom);
      else req = 4'hF;                              // everyone requesting
      op  = 4'($urandom);
      cin = 4'($urandom);
      foreach (addr_i[i]) begin
        addr_i[i] = 8'($urandom); fn_i[i] = memfunc_e'($urandom_range(0, 4)); din_i[i] = 4'($urandom);
      end
      #1;
      port_ok(g_rr, en_rr, a_rr, f_rr, d_rr, cin_rr, "round-robin");
      port_ok(g_tr, en_tr, a_tr, f_tr, d_tr, cin_tr, "token ring");
      chk(g_rr == (req[cnt] ? 4'(1 << cnt) : 4'b0), "round-robin grant follows the counter");
      chk((req == 0) == (g_tr == 0), "token ring grants whenever anyone requests");
      if (n >= 2001) chk(idx(g_tr) == (prev_tr + 1) % NPE, "token ring rotates under full load");
      prev_tr = idx(g_tr);
      rr_grants += (g_rr != 0);
      tr_grants += (g_tr != 0);
      cnt = (cnt + 1) % NPE;
    end
    chk(tr_grants > rr_grants, "token ring wastes fewer clocks than round-robin");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
