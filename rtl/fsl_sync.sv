// fsl_sync - handshake synchroniser (AND with hysteresis, a Muller C-element).
//
// Combines the c_done lines of several downstream registers (or of several
// register slices forming one wide register) into one pass line. The output
// goes to 1 when all (optionally inverted) inputs are 1, goes to 0 when all are
// 0, and keeps its value otherwise. INV_MASK bit i inverts input i; a handshake
// line is inverted wherever its data path carries a phase inverter.
//
// Timing: the hold state is a flip-flop of the clocked emulation; the output
// follows an agreeing input set in the same cycle. Reset loads INIT.
module fsl_sync #(
  parameter int unsigned   N        = 2,
  parameter logic [N-1:0]  INV_MASK = '0,
  parameter logic          INIT     = 1'b0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] hs_i,
  output logic         hs_o
);

  logic [N-1:0] v;
  logic         held_q;

  assign v    = hs_i ^ INV_MASK;
  assign hs_o = (&v) ? 1'b1 : (~|v) ? 1'b0 : held_q;

  always_ff @(posedge clk) begin
    if (rst) held_q <= INIT;
    else     held_q <= hs_o;
  end

endmodule
