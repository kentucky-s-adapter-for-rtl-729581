// kapers_top: KAPERS aggregate-function network adapter.
//
// NPE processing elements (PCs) are connected by their parallel ports. Each
// port writes a command byte {strobe, opcode, nybble} and polls a 5-bit reply
// {ready toggle, nybble}. Inside, every port has its own chain
//   inp_detect -> nxt_seq -> cmd_fifo -> processing_unit -> pe_output
// and all processing units share one ALU memory (alu_memory) through the
// arbiter (mem_arbiter) and one OR-barrier (barrier_or). The processing
// units also see each other's lock registers, which is how a locked
// multi-nybble access keeps other PEs from overtaking it.
//
// Defaults are those of the document's FPGA build: 4 PEs, 256 nybbles of
// memory addressed by 2 address nybbles, FIFOs 8 deep, a 3-state stability
// filter, ready raised 2 clocks (40 ns at 50 MHz) after the data, and
// round-robin arbitration. The reset input and the overflow flags are this
// design's additions.
//
// Ports: pe_in[i] is PE i's data lines D7..D0, pe_out[i] its status lines
// O4..O0, led_r/led_g drive PE i's bi-colour status LED.
//
// The FIFOs' full/count and the units' lock_wait outputs are status signals
// for testing and are left unconnected here on purpose: flow control is
// the overflow flag, and lock_wait already shows on the red LED.
module kapers_top
  import kapers_pkg::*;
#(
  parameter int unsigned NPE         = 4,
  parameter int unsigned MEM_SIZE    = 256,
  parameter int unsigned ADDR_NYB    = 2,
  parameter int unsigned FIFO_DEPTH  = 8,
  parameter int unsigned STABLE      = 3,
  parameter int unsigned READY_DELAY = 2,
  parameter bit          TOKEN_RING  = 1'b0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [7:0]     pe_in  [NPE],
  output logic [4:0]     pe_out [NPE],
  output logic [NPE-1:0] led_r,
  output logic [NPE-1:0] led_g,
  output logic [NPE-1:0] fifo_overflow
);

  localparam int unsigned ADDR_W = 4 * ADDR_NYB;

  // per-PE wiring
  logic [7:0]        det      [NPE];
  logic [CMD_W-1:0]  seq_cmd  [NPE];
  logic [NPE-1:0]    seq_en;
  logic [CMD_W-1:0]  head     [NPE];
  logic [NPE-1:0]    fifo_empty, fifo_pop;

  logic [NPE-1:0]    mem_req, mem_op, mem_cin, grant;
  logic [ADDR_W-1:0] mem_addr [NPE];
  memfunc_e          mem_fn   [NPE];
  logic [NYB_W-1:0]  mem_din  [NPE];

  logic [NPE-1:0]    lock_valid;
  logic [ADDR_W-1:0] lock_addr [NPE];

  logic [NPE-1:0]    bar_req;
  logic [NYB_W-1:0]  bar_data [NPE];
  logic              bar_go;
  logic [NYB_W-1:0]  bar_result;

  logic [NPE-1:0]    res_load;
  logic [NYB_W-1:0]  res_data [NPE];

  // shared memory port
  logic              m_en, m_cin, m_cout;
  logic [ADDR_W-1:0] m_addr;
  memfunc_e          m_fn;
  logic [NYB_W-1:0]  m_din, m_old;

  for (genvar i = 0; i < NPE; i++) begin : g_pe
    inp_detect #(.WIDTH(8), .STABLE(STABLE)) u_det (
      .clk, .rst_n, .din(pe_in[i]), .dout(det[i]));

    nxt_seq u_seq (
      .clk, .rst_n, .a(det[i]), .x(seq_cmd[i]), .enable(seq_en[i]));

    cmd_fifo #(.WIDTH(CMD_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n, .push(seq_en[i]), .din(seq_cmd[i]), .pop(fifo_pop[i]),
      .dout(head[i]), .empty(fifo_empty[i]), .full(),
      .overflow(fifo_overflow[i]), .count());

    processing_unit #(.NPE(NPE), .PE_ID(i), .ADDR_NYB(ADDR_NYB)) u_pu (
      .clk, .rst_n,
      .cmd_valid(!fifo_empty[i]), .cmd(cmd_t'(head[i])), .cmd_pop(fifo_pop[i]),
      .mem_req(mem_req[i]), .mem_op(mem_op[i]), .mem_addr(mem_addr[i]),
      .mem_fn(mem_fn[i]), .mem_din(mem_din[i]), .mem_cin(mem_cin[i]),
      .mem_grant(grant[i]), .mem_old(m_old), .mem_cout(m_cout),
      .lock_valid(lock_valid[i]), .lock_addr(lock_addr[i]),
      .all_lock_valid(lock_valid), .all_lock_addr(lock_addr),
      .bar_req(bar_req[i]), .bar_data(bar_data[i]), .bar_go, .bar_result,
      .res_load(res_load[i]), .res_data(res_data[i]),
      .lock_wait(), .led_r(led_r[i]), .led_g(led_g[i]));

    pe_output #(.READY_DELAY(READY_DELAY)) u_out (
      .clk, .rst_n, .load(res_load[i]), .din(res_data[i]), .o(pe_out[i]));
  end

  barrier_or #(.NPE(NPE)) u_bar (
    .clk, .rst_n, .req(bar_req), .data(bar_data), .go(bar_go), .result(bar_result));

  mem_arbiter #(.NPE(NPE), .ADDR_W(ADDR_W), .TOKEN_RING(TOKEN_RING)) u_arb (
    .clk, .rst_n, .req(mem_req), .op(mem_op), .addr_i(mem_addr), .fn_i(mem_fn),
    .din_i(mem_din), .cin_i(mem_cin), .grant,
    .m_en, .m_addr, .m_fn, .m_din, .m_cin);

  alu_memory #(.SIZE(MEM_SIZE), .ADDR_W(ADDR_W)) u_mem (
    .clk, .rst_n, .en(m_en), .addr(m_addr), .fn(m_fn), .din(m_din), .cin(m_cin),
    .old(m_old), .cout(m_cout));

endmodule
