// pe_output: result port towards one PE.
//
// Each operation that returns a value (BarOr, MemNext, MemLast) produces one
// result nybble. It is driven on O3..O0 at once, and the ready bit O4 is
// toggled READY_DELAY clocks later, so the PE, which polls for a change of
// O4, only samples O3..O0 after they have settled. The document gives about
// 40 ns for that delay, two clocks at its 50 MHz clock. O4 toggles rather than
// pulses, matching the host library's "(ti ^ p_inlast) & ready" test.
//
// Interface: load/din from the processing unit (one clock pulse per result);
// o[3:0] is the registered result, o[4] the ready toggle. If a second result
// arrived before the first was flagged, the delay restarts with the new one;
// the protocol never does this because a PE waits for each reply.
module pe_output #(
  parameter int unsigned READY_DELAY = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic [3:0] din,
  output logic [4:0] o
);

  localparam int unsigned CW = $clog2(READY_DELAY + 1);

  logic [CW-1:0] cnt;
  logic          pending;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      o       <= '0;
      cnt     <= '0;
      pending <= 1'b0;
    end else if (load) begin
      o[3:0]  <= din;
      cnt     <= CW'(READY_DELAY);
      pending <= 1'b1;
    end else if (pending) begin
      if (cnt <= CW'(1)) begin
        o[4]    <= ~o[4];
        pending <= 1'b0;
        cnt     <= '0;
      end else begin
        cnt <= cnt - CW'(1);
      end
    end
  end

endmodule
