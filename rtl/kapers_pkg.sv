// kapers_pkg: types and constants shared by the KAPERS aggregate-function
// network adapter.
//
// A PE talks to the adapter through an 8-bit command byte
//   D7      strobe: a new command is signalled by flipping this bit
//   D6..D4  opcode (opcode_e)
//   D3..D0  data nybble, or for SetFunc: D3 = lock flag, D2..D0 = memory function
// and reads back a 5-bit status: O4 toggles when O3..O0 holds a new result.
// The opcode and memory-function encodings are the ones of the host library
// (BarOr 0x00, SetFunc 0x20, AddrFirst 0x40, AddrNext 0x50, MemNext 0x60,
// MemLast 0x70; Xchg 0, Or 1, Xor 2, Add 3, Min 4, lock 0x08).
// Opcodes 001 and 011 are reserved and ignored by this design.
// CMD_W is used by kapers_top; compiled on its own, the package reports it
// as unused.
package kapers_pkg;

  localparam int unsigned NYB_W = 4;   // the datapath is one nybble wide
  localparam int unsigned CMD_W = 7;   // opcode + nybble, strobe removed

  typedef enum logic [2:0] {
    OP_BAROR     = 3'b000,
    OP_RSVD1     = 3'b001,
    OP_SETFUNC   = 3'b010,
    OP_RSVD3     = 3'b011,
    OP_ADDRFIRST = 3'b100,
    OP_ADDRNEXT  = 3'b101,
    OP_MEMNEXT   = 3'b110,
    OP_MEMLAST   = 3'b111
  } opcode_e;

  typedef enum logic [2:0] {
    FN_XCHG = 3'b000,
    FN_OR   = 3'b001,
    FN_XOR  = 3'b010,
    FN_ADD  = 3'b011,
    FN_MIN  = 3'b100
  } memfunc_e;

  typedef struct packed {
    opcode_e          op;
    logic [NYB_W-1:0] d;
  } cmd_t;

  // Result of one ALU-memory operation: the old nybble and the new carry.
  typedef struct packed {
    logic [NYB_W-1:0] old;
    logic             carry;
  } mem_rsp_t;

  // Func(m, d, carry) of the memory functions: new memory value and new carry.
  // Unknown codes (101..111) leave memory and carry unchanged.
  function automatic logic [NYB_W:0] alu_op(input memfunc_e fn, input logic [NYB_W-1:0] m,
                                            input logic [NYB_W-1:0] d, input logic c);
    logic [NYB_W:0]   sum;
    logic [NYB_W-1:0] mn;
    logic [NYB_W:0]   r;   // {carry, m}
    r = {c, m};
    unique case (fn)
      FN_XCHG: r = {c, d};
      FN_OR:   r = {c, m | d};
      FN_XOR:  r = {c, m ^ d};
      FN_ADD: begin
        sum = {1'b0, m} + {1'b0, d} + {{NYB_W{1'b0}}, c};
        r   = sum;
      end
      FN_MIN: begin
        if (!c) begin
          mn = (d < m) ? d : m;
          r  = {(mn != d), mn};
        end
      end
      default: r = {c, m};
    endcase
    return r;
  endfunction

endpackage
