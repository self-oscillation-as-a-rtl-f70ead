// fsl_pkg - types and helper functions for Four State Logic (FSL).
//
// FSL carries every logical bit on two rails, a and b. Rail a is the logical
// value; the XOR of both rails is the phase (code set). Phase 0 codes LOW as
// (0,0) and HIGH as (1,1); phase 1 codes LOW as (0,1) and HIGH as (1,0).
// Consecutive data waves use alternating phases, so going from one wave to the
// next changes exactly one rail per bit. A word is consistent when all its bits
// are in the same phase. These encodings follow the coding table of the FSL
// scheme; the helper functions are this design's own.
package fsl_pkg;

  // One FSL bit: two rails.
  typedef struct packed {
    logic a;  // logical value
    logic b;  // a ^ b is the phase
  } fsl_t;

  // Function of a two-input FSL gate
  typedef enum logic [1:0] {FSL_OR = 2'd0, FSL_AND = 2'd1, FSL_XOR = 2'd2} fsl_op_e;

  // Encode a logical value in a given phase.
  function automatic fsl_t fsl_enc(input logic value, input logic phase);
    fsl_t r;
    r.a = value;
    r.b = value ^ phase;
    return r;
  endfunction

  // Phase of one FSL bit.
  function automatic logic fsl_phase(input fsl_t x);
    return x.a ^ x.b;
  endfunction

  // Same logical value, other code set: only rail b changes.
  function automatic fsl_t fsl_flip(input fsl_t x);
    fsl_t r;
    r.a = x.a;
    r.b = ~x.b;
    return r;
  endfunction

endpackage
