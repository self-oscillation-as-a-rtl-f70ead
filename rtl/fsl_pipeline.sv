// fsl_pipeline - linear pipeline of FSL registers.
//
// STAGES registers of W bits in a row; stage i reads stage i-1 directly and
// its pass input is the c_done of stage i+1 (the sink's handshake for the last
// stage). Stage 0 reads the source word src_d, and its c_done goes back to the
// source as src_pass. There is no logic cloud between the stages.
//
// Initialisation decides how the pipeline starts:
//   INIT_FULL = 0 (empty): all stages hold the same phase, i.e. the same data
//     wave. A new wave from the source runs straight through to the sink
//     (push behaviour, the source sets the pace).
//   INIT_FULL = 1 (full): neighbouring stages hold opposite phases, so each
//     stage holds a wave its successor has not taken yet. The sink first
//     receives those STAGES initial waves; stages refill from the sink end
//     backwards (pull behaviour, the sink sets the pace).
// Stage i is reset to the word INIT_WORD + i.
//
// The sink is expected to start with c_done equal to the last stage's phase in
// an empty pipeline and different from it in a full one. The four-stage
// default and the full-pipeline phases (phi1, phi0, phi1, phi0 from the source
// side, sink c_done 1) follow the original's full-pipeline example; stall_i
// (one bit per stage) emulates extra delay as in fsl_register.
module fsl_pipeline
  import fsl_pkg::*;
#(
  parameter int unsigned  STAGES    = 4,
  parameter int unsigned  W         = 8,
  parameter bit           INIT_FULL = 1'b0,
  parameter logic [W-1:0] INIT_WORD = '0
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [STAGES-1:0] stall_i,
  input  fsl_t [W-1:0]      src_d,
  output logic              src_pass,
  output fsl_t [W-1:0]      snk_q,
  input  logic              snk_c_done,
  output logic [STAGES-1:0] fire_o
);

  fsl_t [STAGES:0][W-1:0] data;
  logic [STAGES:0]        cd;

  assign data[0]     = src_d;
  assign cd[STAGES]  = snk_c_done;
  assign snk_q       = data[STAGES];
  assign src_pass    = cd[0];

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    // full: the last stage has phase 0, its predecessor 1, and so on
    localparam logic PH = INIT_FULL ? logic'((STAGES - 1 - i) % 2 == 1) : 1'b0;
    fsl_register #(.W(W), .INIT(INIT_WORD + W'(i)), .INIT_PHASE(PH)) u_reg (
      .clk, .rst, .stall(stall_i[i]), .d(data[i]), .q(data[i+1]),
      .pass(cd[i+1]), .c_done(cd[i]), .fire_o(fire_o[i])
    );
  end

endmodule
