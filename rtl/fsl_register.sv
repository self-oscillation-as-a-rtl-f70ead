// fsl_register - FSL pipeline register with handshake.
//
// A W-bit latch with a phase detector on its input word, a phase detector on
// its output word and a small control block. The latch takes a new word only
// when both switching conditions hold:
//   1. the (last consistent) input phase differs from the stored phase, so a
//      new data wave is waiting, and
//   2. pass equals the stored phase, so every downstream register has already
//      captured the word that is about to be overwritten.
// c_done is the phase of the stored word and is sent upstream as handshake.
//
// Clocked emulation: the delay-insensitive circuit is modelled with one clock
// edge per gate delay. The latch is a flip-flop that loads d on an edge where
// the switching conditions hold. The stall input (this design's addition)
// postpones a capture by whole cycles and stands for an arbitrary extra delay;
// a correct FSL circuit must work for any stall pattern.
//
// Reset loads INIT in phase INIT_PHASE, like the initial-value generic of the
// original register. The 31-bit width limit of the original register came from
// its synthesis tool and does not apply here; one wide instance evaluates the
// switching condition for all its bits together, which avoids the lock-up of
// stacked register slices.
module fsl_register
  import fsl_pkg::*;
#(
  parameter int unsigned  W          = 8,
  parameter logic [W-1:0] INIT       = '0,
  parameter logic         INIT_PHASE = 1'b0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         stall,
  input  fsl_t [W-1:0] d,
  output fsl_t [W-1:0] q,
  input  logic         pass,
  output logic         c_done,
  output logic         fire_o     // high in the cycle the latch captures
);

  logic phi_in, phi_out;
  logic in_cons, out_cons;
  logic en;

  fsl_phase_det #(.W(W), .INIT_PHASE(INIT_PHASE)) u_phi_in (
    .clk, .rst, .d(d), .consistent_o(in_cons), .phase_o(phi_in)
  );

  fsl_phase_det #(.W(W), .INIT_PHASE(INIT_PHASE)) u_phi_out (
    .clk, .rst, .d(q), .consistent_o(out_cons), .phase_o(phi_out)
  );

  // ctrl: the latch enable
  assign en     = !stall && (phi_in != phi_out) && (pass == phi_out);
  assign c_done = phi_out;
  assign fire_o = en;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < W; i++) q[i] <= fsl_enc(INIT[i], INIT_PHASE);
    end else if (en) begin
      q <= d;
    end
  end

  // The stored word is always a whole wave.
  a_out_consistent: assert property (@(posedge clk) disable iff (rst) out_cons);
  // A capture only ever takes a consistent word.
  a_in_consistent:  assert property (@(posedge clk) disable iff (rst) en |-> in_cons);

endmodule
