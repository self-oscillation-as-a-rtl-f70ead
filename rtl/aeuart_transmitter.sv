// aeuart_transmitter - transmitter unit of the aEUART.
//
// On a go pulse from the control unit the transmitter builds a frame from the
// message register and the UART configuration: one start bit (0), 1..16 data
// bits LSB first, an optional even or odd parity bit and one or two stop bits
// (1). It then puts one bit on txd per bit tick of the baud rate generator;
// the first bit goes out on the first bit tick after go, so every bit lasts
// one whole bit time. After the last stop bit it raises done for one tick.
// A go pulse while busy is ignored (the control unit holds a request until
// the transmitter is idle).
//
// The frame layout is the usual UART frame; parity and stop-bit options are
// the ones the UART configuration register selects. Everything is expressed in
// ticks of the self-oscillation: the unit's register fires once per tick.
// Inputs: ctrl_i and ebr_i come from units that fire later in the tick and
// therefore arrive through phase inverters (they carry the previous tick's
// values).
module aeuart_transmitter
  import fsl_pkg::*;
  import aeuart_pkg::*;
#(
  parameter logic INIT_PHASE = 1'b0
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                stall,
  input  fsl_t [CTRL_W-1:0]   ctrl_i,
  input  fsl_t [EBR_W-1:0]    ebr_i,
  output fsl_t [TX_W-1:0]     q_o,
  input  logic                pass,
  output logic                c_done,
  output logic                fire_o
);

  localparam tx_t TX_RESET = '{txd: 1'b1, busy: 1'b0, done: 1'b0, nbits: '0, shreg: '1};

  logic [CTRL_W+EBR_W-1:0] in_val;
  ctrl_t ctrl;
  ebr_t  ebr;
  tx_t   cur, nxt;
  ucfg_t cfg;

  fsl_unit #(.NI(CTRL_W + EBR_W), .NS(TX_W), .INIT(TX_RESET), .INIT_PHASE(INIT_PHASE)) u_unit (
    .clk, .rst, .stall, .in_i({ctrl_i, ebr_i}), .in_val_o(in_val), .own_val_o(cur),
    .next_i(nxt), .q_o, .pass, .c_done, .fire_o
  );

  assign {ctrl, ebr} = in_val;
  assign cfg = ucfg_t'(ctrl.ucfg);

  // Frame builder: start bit, data, parity, stop bits; unused positions are 1.
  function automatic logic [FRAME_W-1:0] build_frame(input logic [DATA_W-1:0] data,
                                                     input ucfg_t c,
                                                     output logic [4:0] nbits);
    logic [FRAME_W-1:0] f;
    logic [4:0] len;
    logic par;
    int unsigned pos;
    len = (c.len == 5'd0) ? 5'd1 : (c.len > 5'd16) ? 5'd16 : c.len;
    f = '1;
    f[0] = 1'b0;
    par = 1'b0;
    for (int i = 0; i < DATA_W; i++) begin
      if (i < int'(len)) begin
        f[i+1] = data[i];
        par    = par ^ data[i];
      end
    end
    pos = int'(len) + 1;
    if (c.parity == 2'd1 || c.parity == 2'd2) begin
      f[pos] = (c.parity == 2'd2) ? ~par : par;   // even: total ones even
      pos = pos + 1;
    end
    pos = pos + (c.two_stop ? 2 : 1);
    nbits = 5'(pos);
    return f;
  endfunction

  always_comb begin
    logic [4:0] nb;
    nb  = '0;
    nxt = cur;
    nxt.done = 1'b0;
    if (!cur.busy) begin
      nxt.txd = 1'b1;
      if (ctrl.go) begin
        nxt.shreg = build_frame(ctrl.tx_data, cfg, nb);
        nxt.nbits = nb;
        nxt.busy  = 1'b1;
      end
    end else if (ebr.bit_tick) begin
      if (cur.nbits != 5'd0) begin
        nxt.txd   = cur.shreg[0];
        nxt.shreg = {1'b1, cur.shreg[FRAME_W-1:1]};
        nxt.nbits = cur.nbits - 5'd1;
      end else begin
        nxt.txd  = 1'b1;
        nxt.busy = 1'b0;
        nxt.done = 1'b1;
      end
    end
  end

endmodule
