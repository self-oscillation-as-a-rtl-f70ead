// tb_fsl_util.svh - helpers shared by the unit testbenches.
//
// TB_FSL_CODEC(W, ENC, DEC) declares two functions for W-bit words:
//   ENC(v, p) encodes the single-rail word v in FSL phase p,
//   DEC(x)    returns the logical value (rail a) of an FSL word.
// The unit testbenches play all neighbours of one aEUART unit: they present
// the neighbour outputs as one wave in the phase opposite to the unit's
// c_done and answer with pass = c_done, so each firing of the unit is one
// tick of the oscillation.
`ifndef TB_FSL_UTIL_SVH
`define TB_FSL_UTIL_SVH
`define TB_FSL_CODEC(W, ENC, DEC) \
  function automatic fsl_pkg::fsl_t [(W)-1:0] ENC(input logic [(W)-1:0] v, input logic p); \
    fsl_pkg::fsl_t [(W)-1:0] x; \
    for (int i = 0; i < (W); i++) x[i] = fsl_pkg::fsl_enc(v[i], p); \
    return x; \
  endfunction \
  function automatic logic [(W)-1:0] DEC(input fsl_pkg::fsl_t [(W)-1:0] x); \
    logic [(W)-1:0] v; \
    for (int i = 0; i < (W); i++) v[i] = x[i].a; \
    return v; \
  endfunction
`endif
