// aeuart_errctr - error control unit of the aEUART.
//
// Watches the serial bus while the transmitter is sending: in the middle of
// every bit time (tx_mid pulse of the baud rate generator) it compares the
// filtered bus level with the level the transmitter drives. A difference means
// another node (or a fault) disturbed the bus and sets the sticky coll flag,
// which the control unit shows in the status register and clears with
// clr_err. Parity and framing errors of received frames are detected by the
// receiver itself.
//
// The document says only that this unit checks the communication and signals
// errors on the bus line; the read-back comparison is this design's choice.
// Fires once per tick after the transmitter: tx_i direct, ctrl_i and ebr_i
// through phase inverters; bus_i is the busdriver's standard-logic level,
// converted into the unit's phase as it is read.
module aeuart_errctr
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
  input  logic                bus_i,
  output fsl_t [ERR_W-1:0]    q_o,
  input  logic                pass,
  output logic                c_done,
  output logic                fire_o
);

  logic [TX_W+CTRL_W+EBR_W-1:0] in_val;
  tx_t   tx;
  ctrl_t ctrl;
  ebr_t  ebr;
  err_t  cur, nxt;

  fsl_unit #(.NI(TX_W + CTRL_W + EBR_W), .NS(ERR_W), .INIT('0), .INIT_PHASE(INIT_PHASE)) u_unit (
    .clk, .rst, .stall, .in_i({tx_i, ctrl_i, ebr_i}), .in_val_o(in_val), .own_val_o(cur),
    .next_i(nxt), .q_o, .pass, .c_done, .fire_o
  );

  assign {tx, ctrl, ebr} = in_val;

  always_comb begin
    nxt = cur;
    nxt.chk = tx.busy && ebr.tx_mid;
    if (ctrl.clr_err)                                    nxt.coll = 1'b0;
    else if (tx.busy && ebr.tx_mid && (bus_i != tx.txd)) nxt.coll = 1'b1;
  end

endmodule
