// fsl_unit - shell of one aEUART component: logic cloud, register and
// feedback path.
//
// Every component of the aEUART is built the same way: a logic cloud reads
// the outputs of other components (already brought into the right phase by the
// wiring around it) and its own stored state through a phase inverter on the
// feedback path, and a single FSL register stores the result. This module holds
// everything except the cloud's function: it detects the phase of all cloud
// inputs together (phi-detection), hands the logical values to the component,
// and encodes the component's next state in that phase for the register.
//
// Ports: in_i are the FSL inputs from other components, in_val_o/own_val_o
// their logical values and the logical value of the stored state, next_i the
// next state computed by the component. q_o, c_done, pass, stall and fire_o are
// those of the contained fsl_register. Timing is that of fsl_register: the
// register fires on the first clock edge where the inputs form a new
// consistent wave and pass agrees.
module fsl_unit
  import fsl_pkg::*;
#(
  parameter int unsigned   NI         = 4,
  parameter int unsigned   NS         = 4,
  parameter logic [NS-1:0] INIT       = '0,
  parameter logic          INIT_PHASE = 1'b0
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          stall,
  input  fsl_t [NI-1:0] in_i,
  output logic [NI-1:0] in_val_o,
  output logic [NS-1:0] own_val_o,
  input  logic [NS-1:0] next_i,
  output fsl_t [NS-1:0] q_o,
  input  logic          pass,
  output logic          c_done,
  output logic          fire_o
);

  fsl_t [NS-1:0]    fb;      // phase-inverted feedback
  fsl_t [NS-1:0]    d;
  logic             phi, cons;

  fsl_phase_inv #(.W(NS)) u_fb_inv (.d(q_o), .q(fb));

  // phi-detection over every input of the logic cloud
  fsl_phase_det #(.W(NI + NS), .INIT_PHASE(INIT_PHASE)) u_phi (
    .clk, .rst, .d({in_i, fb}), .consistent_o(cons), .phase_o(phi)
  );

  always_comb begin
    for (int i = 0; i < NI; i++) in_val_o[i]  = in_i[i].a;
    for (int i = 0; i < NS; i++) own_val_o[i] = fb[i].a;
    for (int i = 0; i < NS; i++) d[i]         = fsl_enc(next_i[i], phi);
  end

  fsl_register #(.W(NS), .INIT(INIT), .INIT_PHASE(INIT_PHASE)) u_reg (
    .clk, .rst, .stall, .d(d), .q(q_o), .pass, .c_done, .fire_o
  );

  // The register only ever takes a wave computed from consistent inputs.
  a_fire_consistent: assert property (@(posedge clk) disable iff (rst) fire_o |-> cons);

endmodule
