// kapers_hostlib.svh: behavioural model of the PE hosts' side of the port
// protocol, shared by the end-to-end testbenches of kapers_top.
//
// Each host keeps the state the host library keeps: the last byte written
// (whose D7 is flipped for every new command), the last level of O4 seen, and
// the last address set, so that a new address is sent only as the low nybbles
// that differ. port_write() spaces writes GAP_MIN..GAP_MAX clocks apart (the
// PC needs about a microsecond per port access) and on one write in four
// puts the strobe out one or two clocks ahead of the data, which the input
// filter must ignore. wait_ready() polls for a change of O4. The library
// tasks p_baror, p_address, p_setfunc and p_memfunc* send the command
// sequences of the corresponding operations.
//
// The including module declares the clock `clk` and connects pin/pout/led_r/
// led_g/ovf/rst_n to its instance of kapers_top.

  localparam int NP = 4;
  localparam int GAP_MIN = 7, GAP_MAX = 14;
  // host-library encodings
  localparam logic [7:0] C_BAROR = 8'h00, C_SETFUNC = 8'h20, C_ADDRFIRST = 8'h40,
                         C_ADDRNEXT = 8'h50, C_MEMNEXT = 8'h60, C_MEMLAST = 8'h70;
  localparam int F_XCHG = 0, F_OR = 1, F_XOR = 2, F_ADD = 3, F_MIN = 4, LOCK = 8;

  int checks = 0, failures = 0;
  logic [7:0] pin [NP];
  logic [4:0] pout [NP];
  logic [NP-1:0] led_r, led_g, ovf;
  logic rst_n = 0;

  // per-PE library state
  logic [7:0] outlast [NP];
  logic       inlast [NP];
  int         addrlast [NP];
  bit         locked_mode [NP];

  // mechanism counters
  int n_skew = 0, n_short_addr = 0, n_barrier = 0, n_lock_wait = 0, n_lock_move = 0;
  int n_fifo_backlog = 0, n_contention = 0, n_add_carry = 0, n_min_decided = 0;
  int n_led_dark = 0, n_led_red = 0, n_led_green = 0;
  int max_unlocked_latency = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- port level ----------------
  task automatic port_write(input int k, input logic [7:0] cmd);
    logic [7:0] v;
    v = {~outlast[k][7], cmd[6:0]};
    repeat ($urandom_range(GAP_MIN, GAP_MAX)) @(negedge clk);
    if ($urandom_range(0, 3) == 0) begin
      pin[k] = {v[7], outlast[k][6:0]};       // strobe races ahead of the data
      repeat ($urandom_range(1, 2)) @(negedge clk);
      n_skew++;
    end
    pin[k] = v;
    outlast[k] = v;
  endtask

  task automatic wait_ready(input int k, input bit unlocked_mem, output logic [3:0] r);
    int t = 0;
    while (pout[k][4] == inlast[k] && t < 20000) begin @(negedge clk); t++; end
    chk(t < 20000, $sformatf("PE%0d: no reply", k));
    inlast[k] = pout[k][4];
    r = pout[k][3:0];
    if (unlocked_mem && t > max_unlocked_latency) max_unlocked_latency = t;
  endtask

  // ---------------- library level ----------------
  task automatic p_baror(input int k, input logic [3:0] d, output logic [3:0] r);
    port_write(k, C_BAROR | 8'(d));
    wait_ready(k, 0, r);
  endtask

  task automatic p_bar(input int k);
    logic [3:0] r;
    p_baror(k, 4'h0, r);
  endtask

  task automatic p_address(input int k, input int a);
    int diff, n;
    diff = a ^ addrlast[k];
    if (diff != 0) begin
      addrlast[k] = a;
      port_write(k, C_ADDRFIRST | 8'(a & 15));
      n = 1;
      diff >>= 4;
      while (diff != 0) begin
        a >>= 4;
        port_write(k, C_ADDRNEXT | 8'(a & 15));
        diff >>= 4;
        n++;
      end
      if (n < 2) n_short_addr++;
    end
  endtask

  task automatic p_setfunc(input int k, input int f);
    port_write(k, C_SETFUNC | 8'(f));
    locked_mode[k] = (f & LOCK) != 0;
  endtask

  // n nybbles, low nybble first; returns the old object value
  task automatic p_memfunc(input int k, input longint d, input int n, output longint r);
    logic [3:0] x;
    r = 0;
    for (int j = 0; j < n; j++) begin
      port_write(k, ((j == n - 1) ? C_MEMLAST : C_MEMNEXT) | 8'((d >> (4 * j)) & 15));
      wait_ready(k, !locked_mode[k], x);
      r |= longint'(x) << (4 * j);
    end
  endtask

  // n nybbles, high nybble first (for Min); object stored high nybble at the low address
  task automatic p_memfunc_hi(input int k, input longint d, input int n, output longint r);
    logic [3:0] x;
    r = 0;
    for (int j = n - 1; j >= 0; j--) begin
      port_write(k, ((j == 0) ? C_MEMLAST : C_MEMNEXT) | 8'((d >> (4 * j)) & 15));
      wait_ready(k, !locked_mode[k], x);
      r |= longint'(x) << (4 * j);
    end
  endtask

  // n nybbles, low first, sent without waiting for the replies (a write the
  // host does not need the old value of); afterwards the host waits long
  // enough for every reply and takes the final level of O4 as its reference
  task automatic p_memfunc_nowait(input int k, input longint d, input int n);
    for (int j = 0; j < n; j++)
      port_write(k, ((j == n - 1) ? C_MEMLAST : C_MEMNEXT) | 8'((d >> (4 * j)) & 15));
    repeat (600) @(negedge clk);
    inlast[k] = pout[k][4];
  endtask
