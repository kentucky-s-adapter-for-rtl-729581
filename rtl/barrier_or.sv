// barrier_or: the BarOr barrier shared by all processing units.
//
// A processing unit that executes BarOr(d) raises req and holds its nybble d
// on data until it sees go. When every unit is waiting, the barrier fires:
// go is high for one clock and result holds the bitwise OR of all the
// nybbles. All units leave the barrier on the same clock, so there is no
// separate anti-barrier phase. Only the function (wait for all, return the OR)
// comes from the document; the all-PE AND and the registered one-clock go are
// this design's choice, and every PE port always takes part.
//
// Timing: go and result are registered and appear one clock after the last
// req rises. go cannot fire on two consecutive clocks, which gives the units
// one clock to drop req.
module barrier_or #(
  parameter int unsigned NPE = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NPE-1:0] req,
  input  logic [3:0]     data [NPE],
  output logic           go,
  output logic [3:0]     result
);

  logic [3:0] ored;

  always_comb begin
    ored = '0;
    for (int i = 0; i < NPE; i++) ored |= data[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      go     <= 1'b0;
      result <= '0;
    end else begin
      go <= (&req) && !go;
      if ((&req) && !go) result <= ored;
    end
  end

endmodule
