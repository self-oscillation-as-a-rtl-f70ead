// fsl_phase_inv - FSL phase inverter.
//
// Converts every bit of an FSL word to the other code set while keeping its
// logical value (rail b of each bit is inverted). Phase inverters sit on
// feedback paths and on forward paths that must be brought into the phase of
// the other inputs of a logic cloud. Whether the accompanying handshake line
// is inverted too is decided where the handshake is wired (see fsl_sync).
// Purely combinational, no timing of its own.
module fsl_phase_inv
  import fsl_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  fsl_t [W-1:0] d,
  output fsl_t [W-1:0] q
);

  always_comb begin
    for (int i = 0; i < W; i++) q[i] = fsl_flip(d[i]);
  end

endmodule
