// aeuart_busdriver - bus sampler and three-sample spike filter.
//
// A stand-alone 3-bit FSL register keeps the last three samples of the serial
// bus line: bit 0 takes the bus input, bit 1 takes bit 0 and bit 2 takes
// bit 1, both through phase inverters. The register's c_done is fed straight
// back to its own pass input, so the register switches as fast as it can and
// samples the bus continuously, independent of the oscillation of the other
// units. The bus input is an ordinary single-rail signal that is converted to
// FSL all the time, always in the phase the register expects next.
//
// The recognised bus level is the majority of the three samples, built from
// FSL AND and OR gates, so a spike shorter than two samples never reaches the
// receiver. The majority rule is this design's reading of "three samples
// constitute the recognised bus level"; the register structure follows the
// description of the busdriver.
//
// bus_o is the single-rail value of the filter output (rail a); the units
// that read it convert it into their own phase. stall delays the sampler like
// any FSL register of this design. Reset loads the idle level (all ones).
module aeuart_busdriver
  import fsl_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic stall,
  input  logic bus_in,
  output logic [2:0] samples_o,   // bus_in(n), bus_in(n-1), bus_in(n-2)
  output logic bus_o,
  output logic c_done,
  output logic sample_o           // high in the cycle a sample is taken
);

  fsl_t [2:0] d, q;
  fsl_t [1:0] fb;
  fsl_t       ab, bc, ac, o1, m;

  fsl_phase_inv #(.W(2)) u_inv (.d(q[1:0]), .q(fb));

  assign d[0] = fsl_enc(bus_in, ~c_done);
  assign d[1] = fb[0];
  assign d[2] = fb[1];

  fsl_register #(.W(3), .INIT(3'b111), .INIT_PHASE(1'b0)) u_reg (
    .clk, .rst, .stall, .d(d), .q(q), .pass(c_done), .c_done(c_done), .fire_o(sample_o)
  );

  fsl_gate2 #(.OP(FSL_AND), .INIT_VALUE(1'b1)) u_ab (.clk, .rst, .x1(q[0]), .x2(q[1]), .y(ab));
  fsl_gate2 #(.OP(FSL_AND), .INIT_VALUE(1'b1)) u_bc (.clk, .rst, .x1(q[1]), .x2(q[2]), .y(bc));
  fsl_gate2 #(.OP(FSL_AND), .INIT_VALUE(1'b1)) u_ac (.clk, .rst, .x1(q[0]), .x2(q[2]), .y(ac));
  fsl_gate2 #(.OP(FSL_OR),  .INIT_VALUE(1'b1)) u_o1 (.clk, .rst, .x1(ab),   .x2(bc),   .y(o1));
  fsl_gate2 #(.OP(FSL_OR),  .INIT_VALUE(1'b1)) u_o2 (.clk, .rst, .x1(o1),   .x2(ac),   .y(m));

  always_comb begin
    for (int i = 0; i < 3; i++) samples_o[i] = q[i].a;
  end
  assign bus_o = m.a;

  // The filter output follows the register phase once the gates have settled.
  a_filter_phase: assert property (@(posedge clk) disable iff (rst)
                                   $stable(q) |-> fsl_phase(m) == c_done);

endmodule
