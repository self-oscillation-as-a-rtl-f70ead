// fsl_gate2 - two-input FSL combinational gate.
//
// Evaluates its logical function only when both inputs are in the same phase
// and then drives the result in that phase; with inputs in different phases it
// holds the last output. OP selects OR (the truth table given for FSL gates),
// AND or XOR; the hold rule is the same for all. An FSL inverter needs no
// module: it inverts both rails, which keeps the phase.
//
// Timing: the hold element is a flip-flop of the clocked emulation (one clock
// edge per gate delay); a consistent input pair reaches y in the same cycle.
// Reset loads INIT_VALUE in phase 0.
module fsl_gate2
  import fsl_pkg::*;
#(
  parameter fsl_op_e OP         = FSL_OR,
  parameter logic    INIT_VALUE = 1'b0
) (
  input  logic clk,
  input  logic rst,
  input  fsl_t x1,
  input  fsl_t x2,
  output fsl_t y
);

  fsl_t held_q;
  logic f;

  always_comb begin
    case (OP)
      FSL_AND: f = x1.a & x2.a;
      FSL_XOR: f = x1.a ^ x2.a;
      default: f = x1.a | x2.a;
    endcase
  end

  assign y = (fsl_phase(x1) == fsl_phase(x2)) ? fsl_enc(f, fsl_phase(x1)) : held_q;

  always_ff @(posedge clk) begin
    if (rst) held_q <= fsl_enc(INIT_VALUE, 1'b0);
    else     held_q <= y;
  end

endmodule
