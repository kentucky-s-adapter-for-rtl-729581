// cmd_fifo: command buffer between the sequence detector and the processing
// unit of one PE.
//
// Commands arrive at most once per microsecond but a processing unit can be
// held up for longer, waiting for a barrier or for a memory nybble locked by
// another PE. The FIFO absorbs the commands a PE may issue without waiting
// for a reply (address, SetFunc, and memory operations whose reply it has not
// yet polled). DEPTH = 8 is the document's depth. It is built from a register
// array with read and write pointers and an occupancy counter.
//
// Interface: push/din write one entry (ignored when full; overflow then pulses
// for one clock so that a lost command is visible). dout always shows the
// head entry; pop removes it and is ignored when empty. Writes appear on dout
// the clock after push. Reset empties the FIFO (this design's choice).
module cmd_fifo #(
  parameter int unsigned WIDTH = 7,
  parameter int unsigned DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic             overflow,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wptr, rptr;

  logic do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == CW'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rptr];

  function automatic logic [PW-1:0] incr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + PW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= push && full;
      if (do_push) wptr <= incr(wptr);
      if (do_pop)  rptr <= incr(rptr);
      if (do_push && !do_pop)      count <= count + CW'(1);
      else if (do_pop && !do_push) count <= count - CW'(1);
    end
  end

  // Storage needs no reset: an entry is only read after it was written.
  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= din;
  end

endmodule
