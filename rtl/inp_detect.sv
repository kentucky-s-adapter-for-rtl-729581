// inp_detect: input stability filter for one PE port.
//
// The PE's parallel port changes at most about once per microsecond and its
// lines may take hundreds of nanoseconds to settle, while the adapter clock
// runs at 50 MHz. This block compares the port with its value one clock
// earlier and only forwards a value that has been seen unchanged on
// at least STABLE+1 consecutive clock edges (STABLE+2 after a clean step from a
// stable value), so glitches and slow edges never reach the
// sequence detector.
//
// The state machine follows the four-state diagram of the design: s0 samples,
// s1 and s2 count equal samples, s3 is "stable" and updates the output every
// clock while the input stays equal; any difference returns to s0. STABLE is
// the number of states after s0 (3 in the diagram). With STABLE=3 a new value
// appears on dout four clocks after the first clock edge that samples it on
// din.
//
// Interface: din is the raw port (asynchronous), dout is the filtered value.
// The synchronous active-low reset and the zero reset value of dout are this
// design's choice; no extra metastability synchroniser is added, the equality
// check across clocks plays that role.
module inp_detect #(
  parameter int unsigned WIDTH  = 8,
  parameter int unsigned STABLE = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  localparam int unsigned CW = $clog2(STABLE + 1);

  logic [WIDTH-1:0] prev;
  logic [CW-1:0]    state;   // 0 = s0 ... STABLE = s3

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prev  <= '0;
      state <= '0;
      dout  <= '0;
    end else begin
      prev <= din;
      if (state == '0) begin
        state <= CW'(1);
      end else if (din != prev) begin
        state <= '0;
      end else if (state == CW'(STABLE)) begin
        dout <= din;
      end else begin
        state <= state + CW'(1);
      end
    end
  end

endmodule
