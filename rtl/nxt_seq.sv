// nxt_seq: next-sequence detector for one PE port.
//
// A PE marks each new command by flipping the strobe bit D7 in the same port
// write that carries the opcode and nybble. This block tracks the level of D7
// in two states (s0: D7 low, s1: D7 high); each change of state is a new
// command, and D6..D0 are then registered on x together with a one-clock
// enable pulse. After reset the first value seen only sets the state, so the
// idle level of the port is never taken for a command. The three states and
// the outputs on the s0<->s1 transitions are those of the design's state
// diagram.
//
// Interface: a is the filtered port byte from inp_detect; x and enable are
// registered, enable is high for exactly one clock per strobe flip, one clock
// after the flip appears on a.
module nxt_seq
  import kapers_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [7:0]       a,
  output logic [CMD_W-1:0] x,
  output logic             enable
);

  typedef enum logic [1:0] {ST_RESET, ST_S0, ST_S1} state_e;
  state_e state;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= ST_RESET;
      x      <= '0;
      enable <= 1'b0;
    end else begin
      enable <= 1'b0;
      unique case (state)
        ST_RESET: state <= a[7] ? ST_S1 : ST_S0;
        ST_S0: if (a[7]) begin
          state  <= ST_S1;
          x      <= a[6:0];
          enable <= 1'b1;
        end
        ST_S1: if (!a[7]) begin
          state  <= ST_S0;
          x      <= a[6:0];
          enable <= 1'b1;
        end
        default: state <= ST_RESET;
      endcase
    end
  end

endmodule
