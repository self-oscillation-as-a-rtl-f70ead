// fsl_phase_det - phase detector for an FSL word.
//
// When all W bits of the input word are in the same phase (the word is
// consistent) the detector reports that phase; while the word is inconsistent
// it keeps reporting the phase it saw last. This is the phi-detection used at
// the inputs and outputs of every FSL register and at the inputs of every
// component.
//
// Timing: the design is an emulation of the delay-insensitive circuit in which
// one clock edge stands for one gate delay. The held phase is a flip-flop
// updated on each edge; phase_o follows a consistent input in the same cycle.
// Reset loads INIT_PHASE.
module fsl_phase_det
  import fsl_pkg::*;
#(
  parameter int unsigned W          = 8,
  parameter logic        INIT_PHASE = 1'b0
) (
  input  logic           clk,
  input  logic           rst,
  input  fsl_t [W-1:0]   d,
  output logic           consistent_o,
  output logic           phase_o
);

  logic held_q;
  logic all0, all1;

  always_comb begin
    all0 = 1'b1;
    all1 = 1'b1;
    for (int i = 0; i < W; i++) begin
      if (fsl_phase(d[i])) all0 = 1'b0;
      else                 all1 = 1'b0;
    end
  end

  assign consistent_o = all0 | all1;
  assign phase_o      = consistent_o ? all1 : held_q;

  always_ff @(posedge clk) begin
    if (rst) held_q <= INIT_PHASE;
    else     held_q <= phase_o;
  end

endmodule
