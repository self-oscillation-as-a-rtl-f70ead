// aeuart_timing - timing unit of the aEUART.
//
// A 16-bit timer that advances once per bit time (on the bit tick of the baud
// rate generator), so it measures time in bit cells of the synchronised bus.
// The control unit may load it (timer_wr with wval). While the control unit
// has a match value armed, the unit raises match for one tick when the timer
// equals that value; the control unit uses it for scheduled transmissions and
// copies the timer into its time stamp on a start edge.
//
// The document names the timers and their use for time stamps and scheduled
// events; counting bit times, the width and the single match comparator are
// this design's choices. The unit fires once per tick, after the transmitter:
// tx_i arrives directly (same tick), ctrl_i and ebr_i through phase inverters
// (previous tick). tx_i carries no information the timer needs; it takes part
// in the phase detection only, which places the unit after the transmitter in
// the firing order.
module aeuart_timing
  import fsl_pkg::*;
  import aeuart_pkg::*;
#(
  parameter logic INIT_PHASE = 1'b0
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                stall,
  input  fsl_t [TX_W-1:0]     tx_i,
  input  fsl_t [CTRL_W-1:0]   ctrl_i,
  input  fsl_t [EBR_W-1:0]    ebr_i,
  output fsl_t [TIM_W-1:0]    q_o,
  input  logic                pass,
  output logic                c_done,
  output logic                fire_o
);

  logic [TX_W+CTRL_W+EBR_W-1:0] in_val;
  tx_t   tx;
  ctrl_t ctrl;
  ebr_t  ebr;
  tim_t  cur, nxt;

  fsl_unit #(.NI(TX_W + CTRL_W + EBR_W), .NS(TIM_W), .INIT('0), .INIT_PHASE(INIT_PHASE)) u_unit (
    .clk, .rst, .stall, .in_i({tx_i, ctrl_i, ebr_i}), .in_val_o(in_val), .own_val_o(cur),
    .next_i(nxt), .q_o, .pass, .c_done, .fire_o
  );

  assign {tx, ctrl, ebr} = in_val;

  always_comb begin
    nxt = cur;
    if (ctrl.timer_wr)      nxt.timer = ctrl.wval;
    else if (ebr.bit_tick)  nxt.timer = cur.timer + 16'd1;
    nxt.match = ctrl.tm_armed && (cur.timer == ctrl.tm_val);
  end

endmodule
