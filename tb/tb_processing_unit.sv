// tb_processing_unit: self-checking test of one processing unit.
// The testbench plays the FIFO (a queue), the arbiter (random grants), the
// ALU memory (an array), the barrier and the other PEs' lock registers. A
// command-level reference model (address register, offset, modal function,
// carry) predicts every returned nybble and the final memory contents.
// Directed parts check: multi-nybble Add with carry, the other functions,
// address setting by low nybbles only, BarOr, waiting on a nybble locked by
// another PE, lock hand-over to the next nybble, release by MemLast, dropping
// the next-nybble lock when a non-memory command follows, and the LED.
module tb_processing_unit;
  import kapers_pkg::*;
  localparam int NPE = 4;
  logic clk = 0, rst_n = 0;
  logic cmd_valid;
  cmd_t cmd;
  logic cmd_pop;
  logic mem_req, mem_op, mem_cin, mem_grant, mem_cout;
  logic [7:0] mem_addr;
  memfunc_e mem_fn;
  logic [3:0] mem_din, mem_old;
  logic lock_valid;
  logic [7:0] lock_addr;
  logic [NPE-1:0] all_lock_valid;
  logic [7:0] all_lock_addr [NPE];
  logic bar_req, bar_go = 0;
  logic [3:0] bar_data, bar_result = '0;
  logic res_load;
  logic [3:0] res_data;
  logic lock_wait, led_r, led_g;
  int checks = 0, failures = 0;

  processing_unit #(.NPE(NPE), .PE_ID(0), .ADDR_NYB(2)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- environment ----------------
  cmd_t q [$];
  logic [3:0] mem [256];
  logic [3:0] results [$];
  bit grant_rand = 1;
  logic [NPE-1:0] other_valid = '0;
  logic [7:0] other_addr [NPE];

  assign cmd_valid = (q.size() != 0);
  assign cmd = (q.size() != 0) ? q[0] : cmd_t'(7'h0);
  assign all_lock_valid = {other_valid[3:1], lock_valid};
  always_comb begin
    all_lock_addr[0] = lock_addr;
    for (int i = 1; i < NPE; i++) all_lock_addr[i] = other_addr[i];
  end

  // reference ALU, written from the memory-function table
  function automatic logic [4:0] ref_alu(input int f, input int m, input int d, input int c);
    int nm, nc;
    nm = m; nc = c;
    case (f)
      0: nm = d;
      1: nm = m | d;
      2: nm = m ^ d;
      3: begin nm = (m + d + c) & 15; nc = (m + d + c) >> 4; end
      4: if (c == 0) begin nm = (m < d) ? m : d; nc = (nm != d); end
      default: ;
    endcase
    return {1'(nc), 4'(nm)};
  endfunction

  logic gr;
  always_ff @(negedge clk) gr <= grant_rand ? 1'($urandom_range(0, 2) != 0) : 1'b1;
  assign mem_grant = mem_req && gr;
  assign mem_old   = mem[mem_addr];
  logic [4:0] alu_now;
  assign alu_now  = ref_alu(int'(mem_fn), int'(mem_old), int'(mem_din), int'(mem_cin));
  assign mem_cout = alu_now[4];

  // the environment changes its state only at falling edges, away from the
  // unit's rising-edge registers
  logic pop_now = 0;
  always @(posedge clk) begin
    if (mem_grant && mem_op) mem[mem_addr] <= alu_now[3:0];
    pop_now <= cmd_pop;
  end
  always @(negedge clk) begin
    if (pop_now) void'(q.pop_front());
    if (res_load) results.push_back(res_data);
  end

  task automatic push(input opcode_e op, input logic [3:0] d);
    @(negedge clk);
    q.push_back('{op: op, d: d});
  endtask

  // ---------------- reference model ----------------
  int r_addr = 0, r_aoff = 0, r_off = 0, r_func = 0, r_carry = 0;
  int r_mem [256];

  // send one command; for commands with a reply, wait for it and check it
  task automatic send(input opcode_e op, input logic [3:0] d);
    int exp;
    logic [4:0] a;
    push(op, d);
    case (op)
      OP_SETFUNC: begin r_func = d[2:0]; r_off = 0; r_carry = 0; end
      OP_ADDRFIRST: begin r_addr = (r_addr & 'hf0) | d; r_aoff = 1; r_off = 0; r_carry = 0; end
      OP_ADDRNEXT: begin if (r_aoff == 1) r_addr = (r_addr & 'h0f) | (d << 4); r_aoff++; end
      OP_MEMNEXT, OP_MEMLAST: begin
        int ad;
        ad  = (r_addr + r_off) & 255;
        exp = r_mem[ad];
        a = ref_alu(r_func, r_mem[ad], d, r_carry);
        r_mem[ad] = a[3:0];
        r_carry = a[4];
        r_off++;
        if (op == OP_MEMLAST) begin r_off = 0; r_carry = 0; end
        wait_result(exp, $sformatf("mem op %0d at %h", r_func, ad));
      end
      default: ;
    endcase
  endtask

  // BarOr: the reply must be what the barrier returned, and d must reach it
  task automatic send_bar(input logic [3:0] d);
    int t = 0;
    push(OP_BAROR, d);
    r_off = 0; r_carry = 0;
    while (results.size() == 0 && t < 2000) begin @(posedge clk); t++; end
    if (results.size() == 0) chk(0, "BarOr: no result");
    else begin
      logic [3:0] r;
      r = results.pop_front();
      chk(r == bar_result && (bar_result & d) == d, $sformatf("BarOr(%h): got %h", d, r));
    end
  endtask

  task automatic wait_result(input int exp, input string what);
    int t = 0;
    while (results.size() == 0 && t < 2000) begin @(posedge clk); t++; end
    if (results.size() == 0) chk(0, {what, ": no result"});
    else begin
      logic [3:0] r;
      r = results.pop_front();
      chk(r == 4'(exp), $sformatf("%s: got %h expected %h", what, r, exp));
    end
  endtask

  task automatic drain();
    int t = 0;
    while ((q.size() != 0 || mem_req || bar_req || lock_wait) && t < 2000) begin @(posedge clk); t++; end
    @(posedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // barrier partner: answer every request after a random delay
  logic [3:0] bar_other;
  initial begin
    forever begin
      @(posedge clk);
      if (bar_req && !bar_go) begin
        repeat ($urandom_range(0, 5)) @(posedge clk);
        @(negedge clk);
        bar_other  = 4'($urandom);
        bar_result = bar_other | bar_data;
        bar_go     = 1;
        @(negedge clk) bar_go = 0;
      end
    end
  end

  initial begin
    foreach (other_addr[i]) other_addr[i] = '0;
    foreach (mem[i]) begin mem[i] = 4'($urandom); r_mem[i] = mem[i]; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    #1 chk(!led_r && !led_g, "LED dark before the first command");

    // 16-bit add with carry at 0x13: 0x9c7f + 0x8a91
    send(OP_SETFUNC, 4'(FN_ADD));
    send(OP_ADDRFIRST, 4'h3);
    send(OP_ADDRNEXT, 4'h1);
    send(OP_MEMNEXT, 4'h1); send(OP_MEMNEXT, 4'h9); send(OP_MEMNEXT, 4'ha); send(OP_MEMLAST, 4'h8);
    drain();
    chk(mem_addr == 8'h13, "address from two nybbles");
    chk(led_g && !led_r, "LED green when running");
    // only the low nybble sent: high nybble kept
    send(OP_ADDRFIRST, 4'h7);
    drain();
    chk(mem_addr == 8'h17, "AddrFirst keeps the high nybble");
    // random unlocked traffic of every function
    for (int n = 0; n < 300; n++) begin
      int k;
      send(OP_SETFUNC, 4'($urandom_range(0, 4)));
      send(OP_ADDRFIRST, 4'($urandom));
      if ($urandom_range(0, 1)) send(OP_ADDRNEXT, 4'($urandom));
      k = $urandom_range(0, 4);
      for (int j = 0; j < k; j++) send(OP_MEMNEXT, 4'($urandom));
      send(OP_MEMLAST, 4'($urandom));
      if ($urandom_range(0, 3) == 0) send_bar(4'($urandom));
    end
    drain();
    for (int i = 0; i < 256; i++) chk(mem[i] == 4'(r_mem[i]), $sformatf("memory %h", i));

    // ---------- locking ----------
    grant_rand = 0;
    send(OP_SETFUNC, 4'(FN_XCHG) | 4'h8);
    send(OP_ADDRFIRST, 4'h0); send(OP_ADDRNEXT, 4'h4);          // 0x40
    other_valid[2] = 1; other_addr[2] = 8'h40;                 // PE 2 holds 0x40
    push(OP_MEMNEXT, 4'h5);
    repeat (20) @(posedge clk);
    #1 chk(results.size() == 0 && mem[8'h40] == 4'(r_mem[8'h40]), "locked nybble not touched");
    chk(lock_wait && led_r && !led_g, "waiting on a lock shows red");
    @(negedge clk) other_valid[2] = 0;                          // PE 2 releases
    begin
      int exp;
      exp = r_mem[8'h40]; r_mem[8'h40] = 5; r_off = 1;
      wait_result(exp, "locked MemNext after release");
    end
    @(posedge clk); @(posedge clk); #1;
    chk(lock_valid && lock_addr == 8'h41, "lock moved to the next nybble");
    // next nybble held by PE 3 until it lets go: lock stays on 0x41 meanwhile
    other_valid[3] = 1; other_addr[3] = 8'h42;
    send(OP_MEMNEXT, 4'h6);
    repeat (5) @(posedge clk); #1;
    chk(lock_valid && lock_addr == 8'h41, "lock kept while the next nybble is busy");
    @(negedge clk) other_valid[3] = 0;
    repeat (3) @(posedge clk); #1;
    chk(lock_valid && lock_addr == 8'h42, "lock taken on the freed nybble");
    send(OP_MEMLAST, 4'h7);
    drain(); #1;
    chk(!lock_valid, "MemLast releases the lock");
    // a barrier after a locked MemNext drops the pending next-nybble lock
    send(OP_ADDRFIRST, 4'h8);                                  // 0x48
    other_valid[1] = 1; other_addr[1] = 8'h49;
    send(OP_MEMNEXT, 4'h1);
    repeat (4) @(posedge clk);
    #1 chk(lock_valid && lock_addr == 8'h48 && lock_wait, "waiting for the next nybble");
    send_bar(4'h2);
    #1 chk(!lock_valid, "pending lock dropped for the barrier");
    other_valid[1] = 0;
    drain();
    for (int i = 0; i < 256; i++) chk(mem[i] == 4'(r_mem[i]), $sformatf("memory after locking %h", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
