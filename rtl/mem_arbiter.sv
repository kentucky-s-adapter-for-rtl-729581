// mem_arbiter: access control for the single shared ALU memory.
//
// Each processing unit asks for the memory with req. At most one unit is
// granted per clock; the granted unit's address, function, nybble and carry
// are routed to the memory, and it takes the memory's reply in the same clock.
// A grant is also what serialises lock acquisition, so req is raised for a
// lock-only step (op = 0) as well; the memory is written only when the
// granted unit has op = 1.
//
// Two policies from the document are selectable:
//   TOKEN_RING = 0: round-robin scheduling. A modulo-NPE counter advances
//     every clock and the unit whose number matches it may access the memory
//     in that clock, whether it needs it or not. This is the arbitration that
//     was built and simulated in the document, and is the default.
//   TOKEN_RING = 1: token ring. The token goes straight to the next unit
//     that is requesting, skipping idle ones, so no clock is wasted; with no
//     requests it stays where it is.
//
// Timing: grant is combinational from req and the registered pointer.
module mem_arbiter
  import kapers_pkg::*;
#(
  parameter int unsigned NPE        = 4,
  parameter int unsigned ADDR_W     = 8,
  parameter bit          TOKEN_RING = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPE-1:0]    req,
  input  logic [NPE-1:0]    op,
  input  logic [ADDR_W-1:0] addr_i [NPE],
  input  memfunc_e          fn_i   [NPE],
  input  logic [NYB_W-1:0]  din_i  [NPE],
  input  logic [NPE-1:0]    cin_i,
  output logic [NPE-1:0]    grant,
  output logic              m_en,
  output logic [ADDR_W-1:0] m_addr,
  output memfunc_e          m_fn,
  output logic [NYB_W-1:0]  m_din,
  output logic              m_cin
);

  localparam int unsigned PW = (NPE > 1) ? $clog2(NPE) : 1;

  logic [PW-1:0] ptr;
  logic [PW-1:0] sel;
  logic          any;

  function automatic logic [PW-1:0] wrap(input int unsigned v);
    return PW'(v % NPE);
  endfunction

  always_comb begin
    sel = ptr;
    any = 1'b0;
    if (TOKEN_RING) begin
      for (int k = NPE - 1; k >= 0; k--) begin
        if (req[wrap(int'(ptr) + k)]) begin
          sel = wrap(int'(ptr) + k);
          any = 1'b1;
        end
      end
    end else begin
      any = req[ptr];
    end
    grant = '0;
    if (any) grant[sel] = 1'b1;
    m_en   = any && op[sel];
    m_addr = addr_i[sel];
    m_fn   = fn_i[sel];
    m_din  = din_i[sel];
    m_cin  = cin_i[sel];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr <= '0;
    end else if (TOKEN_RING) begin
      if (any) ptr <= wrap(int'(sel) + 1);
    end else begin
      ptr <= wrap(int'(ptr) + 1);
    end
  end

  // Only one unit may own the memory port in a clock.
  a_onehot : assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));

endmodule
