// alu_memory: the shared nybble memory with its ALU.
//
// Rather than giving each PE an ALU that reads, modifies and writes back the
// shared memory in three steps, the ALU sits in the memory port: a request
// carries the address, the memory function, the PE's nybble and the PE's
// carry, and in a single clock the old nybble is read, Func(m, d) is computed
// and the new nybble is written at the clock edge. The old value and the new
// carry are returned combinationally in the same clock, which is what the
// "mixed-port read-during-write" of a block RAM would also give. The memory is
// a register array of SIZE nybbles (256 in the document's flip-flop build).
//
// Functions (kapers_pkg::alu_op): Xchg m=d; Or m|=d; Xor m^=d;
// Add (carry,m)=m+carry+d; Min: if carry==0 {m=min(m,d); carry=(m!=d)}.
// Every function returns the old m. The carry is kept per PE by the
// processing units, so it is an input and an output here, not state.
//
// Interface: en performs the operation this clock; old/cout are valid in the
// same clock whenever addr is driven. Reset clears every nybble to zero
// (this design's choice; the host library clears locations it uses anyway).
module alu_memory
  import kapers_pkg::*;
#(
  parameter int unsigned SIZE   = 256,
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [ADDR_W-1:0] addr,
  input  memfunc_e          fn,
  input  logic [NYB_W-1:0]  din,
  input  logic              cin,
  output logic [NYB_W-1:0]  old,
  output logic              cout
);

  logic [NYB_W-1:0] mem [SIZE];
  logic [NYB_W:0]   nxt;
  logic             in_range;

  assign in_range = (32'(addr) < SIZE);
  assign old      = in_range ? mem[addr] : '0;
  assign nxt      = alu_op(fn, old, din, cin);
  assign cout     = nxt[NYB_W];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < SIZE; i++) mem[i] <= '0;
    end else if (en && in_range) begin
      mem[addr] <= nxt[NYB_W-1:0];
    end
  end

endmodule
