// processing_unit: interprets the modal instruction stream of one PE.
//
// Commands are narrow (a 3-bit opcode and one nybble), so most of the state
// of an operation is kept here as modes rather than sent with each command:
//   addr      base object address, set nybble by nybble: AddrFirst writes the
//             low nybble, each AddrNext the next higher one (addr_off counts
//             them); nybbles beyond ADDR_NYB are ignored. Higher nybbles keep
//             their old value, so nearby addresses need only the low nybbles.
//   mem_off   offset of the next nybble of the object; MemNext/MemLast act on
//             mem[addr + mem_off]. It is kept apart from addr_off so that
//             address setting and memory sequencing do not disturb each other.
//   func, lk  the modal memory function and lock flag set by SetFunc.
//   carry     this PE's carry between nybbles (Add) or "decided" flag (Min).
//   lock      this PE's lock register {valid, address}.
// Actions (after the return value, as in the document's operation table):
//   BarOr(d)     unlock all; carry=0; off=0; wait at the barrier; return OR.
//   AddrFirst(d) unlock all; carry=0; off=0; addr[0]=d.   AddrNext(d): addr[k]=d.
//   SetFunc(d)   unlock all; carry=0; off=0; func=d[2:0]; lk=d[3].
//   MemNext(d)   [lock addr+off]; return old; Func(mem,d); [lock addr+off+1
//                then release addr+off]; ++off.
//   MemLast(d)   [lock addr+off]; return old; Func(mem,d); unlock; carry=0; off=0.
// A locked access waits while another PE's lock register holds the target
// address, so a PE walking an object from low to high nybble can never
// overtake one that is ahead of it. Unlocked functions ignore locks.
// Lock acquisition and memory access need the arbiter's grant, which
// serialises them across PEs. This design's own choice: while waiting for
// the lock on the next nybble, if the next buffered command is not a memory
// command (it would release all locks anyway) the lock is dropped instead,
// which avoids a deadlock with a PE waiting at a barrier.
//
// The LED is dark until the first command, red while waiting at the barrier
// or for a lock, green otherwise.
//
// Timing: one command is taken from the FIFO per clock when idle. A memory
// command takes one clock after the grant; its result is loaded into the
// output stage in the clock the memory is accessed.
module processing_unit
  import kapers_pkg::*;
#(
  parameter int unsigned NPE      = 4,
  parameter int unsigned PE_ID    = 0,
  parameter int unsigned ADDR_NYB = 2,
  parameter int unsigned ADDR_W   = 4 * ADDR_NYB
) (
  input  logic              clk,
  input  logic              rst_n,
  // command FIFO head
  input  logic              cmd_valid,
  input  cmd_t              cmd,
  output logic              cmd_pop,
  // shared memory through the arbiter
  output logic              mem_req,
  output logic              mem_op,
  output logic [ADDR_W-1:0] mem_addr,
  output memfunc_e          mem_fn,
  output logic [NYB_W-1:0]  mem_din,
  output logic              mem_cin,
  input  logic              mem_grant,
  input  logic [NYB_W-1:0]  mem_old,
  input  logic              mem_cout,
  // lock registers: this PE's and all PEs' (own entry is ignored)
  output logic              lock_valid,
  output logic [ADDR_W-1:0] lock_addr,
  input  logic [NPE-1:0]    all_lock_valid,
  input  logic [ADDR_W-1:0] all_lock_addr [NPE],
  // barrier
  output logic              bar_req,
  output logic [NYB_W-1:0]  bar_data,
  input  logic              bar_go,
  input  logic [NYB_W-1:0]  bar_result,
  // result towards the PE
  output logic              res_load,
  output logic [NYB_W-1:0]  res_data,
  // status
  output logic              lock_wait,
  output logic              led_r,
  output logic              led_g
);

  localparam int unsigned AOW = $clog2(ADDR_NYB + 1);

  typedef enum logic [1:0] {ST_IDLE, ST_BAR, ST_MEM, ST_LOCKNEXT} state_e;

  state_e            state;
  logic [ADDR_W-1:0] addr;
  logic [AOW-1:0]    addr_off;
  logic [ADDR_W-1:0] mem_off;
  memfunc_e          func;
  logic              lk;
  logic              carry;
  logic              last;
  logic [NYB_W-1:0]  data;
  logic              active;

  logic [ADDR_W-1:0] target;
  logic              blocked;
  logic              head_is_mem;

  assign target = addr + mem_off;

  always_comb begin
    blocked = 1'b0;
    for (int j = 0; j < NPE; j++)
      if (j != PE_ID && all_lock_valid[j] && all_lock_addr[j] == target) blocked = 1'b1;
  end

  assign head_is_mem = cmd_valid && (cmd.op == OP_MEMNEXT || cmd.op == OP_MEMLAST);

  assign cmd_pop  = (state == ST_IDLE) && cmd_valid;
  assign mem_addr = target;
  assign mem_fn   = func;
  assign mem_din  = data;
  assign mem_cin  = carry;
  assign mem_op   = (state == ST_MEM);
  assign mem_req  = ((state == ST_MEM) && !(lk && blocked)) ||
                    ((state == ST_LOCKNEXT) && !blocked);
  assign bar_req  = (state == ST_BAR);
  assign bar_data = data;

  assign lock_wait = ((state == ST_MEM) && lk && blocked) || ((state == ST_LOCKNEXT) && blocked);
  assign led_r     = active && (lock_wait || state == ST_BAR);
  assign led_g     = active && !led_r;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= ST_IDLE;
      addr       <= '0;
      addr_off   <= '0;
      mem_off    <= '0;
      func       <= FN_XCHG;
      lk         <= 1'b0;
      carry      <= 1'b0;
      last       <= 1'b0;
      data       <= '0;
      active     <= 1'b0;
      lock_valid <= 1'b0;
      lock_addr  <= '0;
      res_load   <= 1'b0;
      res_data   <= '0;
    end else begin
      res_load <= 1'b0;
      unique case (state)
        ST_IDLE: if (cmd_valid) begin
          active <= 1'b1;
          data   <= cmd.d;
          unique case (cmd.op)
            OP_BAROR: begin
              lock_valid <= 1'b0;
              carry      <= 1'b0;
              mem_off    <= '0;
              state      <= ST_BAR;
            end
            OP_SETFUNC: begin
              lock_valid <= 1'b0;
              carry      <= 1'b0;
              mem_off    <= '0;
              func       <= memfunc_e'(cmd.d[2:0]);
              lk         <= cmd.d[3];
            end
            OP_ADDRFIRST: begin
              lock_valid <= 1'b0;
              carry      <= 1'b0;
              mem_off    <= '0;
              addr[NYB_W-1:0] <= cmd.d;
              addr_off   <= AOW'(1);
            end
            OP_ADDRNEXT: begin
              for (int k = 1; k < ADDR_NYB; k++)
                if (addr_off == AOW'(k)) addr[k*NYB_W +: NYB_W] <= cmd.d;
              if (addr_off < AOW'(ADDR_NYB)) addr_off <= addr_off + AOW'(1);
            end
            OP_MEMNEXT, OP_MEMLAST: begin
              last  <= (cmd.op == OP_MEMLAST);
              state <= ST_MEM;
            end
            default: ;   // reserved opcodes are ignored
          endcase
        end

        ST_BAR: if (bar_go) begin
          res_load <= 1'b1;
          res_data <= bar_result;
          state    <= ST_IDLE;
        end

        ST_MEM: if (mem_grant) begin
          res_load <= 1'b1;
          res_data <= mem_old;
          if (last) begin
            carry      <= 1'b0;
            mem_off    <= '0;
            lock_valid <= 1'b0;
            state      <= ST_IDLE;
          end else begin
            carry   <= mem_cout;
            mem_off <= mem_off + ADDR_W'(1);
            if (lk) begin
              lock_valid <= 1'b1;
              lock_addr  <= target;
              state      <= ST_LOCKNEXT;
            end else begin
              state <= ST_IDLE;
            end
          end
        end

        ST_LOCKNEXT: begin
          if (mem_grant) begin
            lock_addr <= target;   // lock the next nybble, release this one
            state     <= ST_IDLE;
          end else if (blocked && cmd_valid && !head_is_mem) begin
            lock_valid <= 1'b0;
            state      <= ST_IDLE;
          end
        end

        default: state <= ST_IDLE;
      endcase
    end
  end

  // A granted unit always asked for the grant.
  a_grant_req : assert property (@(posedge clk) disable iff (!rst_n) mem_grant |-> mem_req);

endmodule
