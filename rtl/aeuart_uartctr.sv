// aeuart_uartctr - control unit of the aEUART.
//
// Holds the eight 16-bit registers of the memory-mapped interface and the
// SYNC/READY state, takes one host request per tick and coordinates the other
// units with one-tick control pulses.
//
// Registers (address: read / write):
//   0 STATUS : {txpend, ready, coll, txbusy, ovr, ferr, perr, rxfull} /
//              any write clears rxfull, perr, ferr, ovr and the collision flag
//   1 CONFIG : bit 0 enables the receiver (reset 1); other bits are stored
//   2 MSG    : last received message, reading clears rxfull /
//              message to transmit; starts a transmission (see CMD bit 0)
//   3 EUBRS  : baud rate setting of the baud rate generator / loads it
//   4 TIMER  : timer value / loads the timer
//   5 TSTM   : time stamp of the last start edge / timer match value, arms it
//   6 UCFG   : data length [4:0] (1..16), parity [6:5] (0 none, 1 even,
//              2 odd), two stop bits [7]
//   7 CMD    : bit 0: a written message waits for the next timer match;
//              bit 1 (write only): return to SYNC and wait for a new sync pattern
//
// State: after reset the unit is in SYNC; the receiver is idle until the baud
// rate generator reports an accepted synchronisation pattern, then READY.
// Later patterns re-synchronise in READY as well.
//
// The register set, the SYNC/READY states and the event/action idea (start a
// transmission at a point in time) follow the description of the enhanced
// UART; addresses, bit positions and reset values are this design's choice.
// This unit fires last in every tick: all other units and the host request
// arrive directly; only its own state comes back through the phase inverter.
// The answer to a read is stored in rdata in the tick that consumes the
// request.
module aeuart_uartctr
  import fsl_pkg::*;
  import aeuart_pkg::*;
#(
  parameter logic INIT_PHASE = 1'b0
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                stall,
  input  fsl_t [REQ_W-1:0]    req_i,
  input  fsl_t [TX_W-1:0]     tx_i,
  input  fsl_t [TIM_W-1:0]    tim_i,
  input  fsl_t [ERR_W-1:0]    err_i,
  input  fsl_t [RX_W-1:0]     rx_i,
  input  fsl_t [EBR_W-1:0]    ebr_i,
  output fsl_t [CTRL_W-1:0]   q_o,
  input  logic                pass,
  output logic                c_done,
  output logic                fire_o
);

  localparam ctrl_t CTRL_RESET = '{state: ST_SYNC, config_r: 16'h0001, ucfg: 16'(UCFG_RESET),
                                   cmd: '0, msg: '0, tx_data: '0, tm_val: '0, ts: '0,
                                   rx_full: 1'b0, perr: 1'b0, ferr: 1'b0, ovr: 1'b0,
                                   tx_req: 1'b0, tx_wait: 1'b0, tm_armed: 1'b0, go: 1'b0,
                                   timer_wr: 1'b0, eubrs_wr: 1'b0, clr_err: 1'b0,
                                   wval: '0, rdata: '0};

  localparam int unsigned NI = REQ_W + TX_W + TIM_W + ERR_W + RX_W + EBR_W;

  logic [NI-1:0] in_val;
  req_t  req;
  tx_t   tx;
  tim_t  tim;
  err_t  err;
  rx_t   rx;
  ebr_t  ebr;
  ctrl_t cur, nxt;

  fsl_unit #(.NI(NI), .NS(CTRL_W), .INIT(CTRL_RESET), .INIT_PHASE(INIT_PHASE)) u_unit (
    .clk, .rst, .stall, .in_i({req_i, tx_i, tim_i, err_i, rx_i, ebr_i}), .in_val_o(in_val),
    .own_val_o(cur), .next_i(nxt), .q_o, .pass, .c_done, .fire_o
  );

  assign {req, tx, tim, err, rx, ebr} = in_val;

  function automatic logic [DATA_W-1:0] status_word(input ctrl_t c, input tx_t t, input err_t e);
    logic [DATA_W-1:0] s;
    s = '0;
    s[S_RXFULL] = c.rx_full;
    s[S_PERR]   = c.perr;
    s[S_FERR]   = c.ferr;
    s[S_OVR]    = c.ovr;
    s[S_TXBUSY] = t.busy;
    s[S_COLL]   = e.coll;
    s[S_READY]  = (c.state == ST_READY);
    s[S_TXPEND] = c.tx_req | c.tx_wait;
    return s;
  endfunction

  always_comb begin
    nxt = cur;
    nxt.go       = 1'b0;
    nxt.timer_wr = 1'b0;
    nxt.eubrs_wr = 1'b0;
    nxt.clr_err  = 1'b0;
    nxt.cmd[C_RESYNC] = 1'b0;

    // synchronisation state
    if (ebr.sync_done) nxt.state = ST_READY;

    // timer match: scheduled transmission
    if (tim.match) begin
      nxt.tm_armed = 1'b0;
      if (cur.tx_wait) begin
        nxt.tx_wait = 1'b0;
        nxt.tx_req  = 1'b1;
      end
    end

    // host request
    if (req.valid) begin
      case (addr_e'(req.addr))
        A_STATUS: nxt.rdata = status_word(cur, tx, err);
        A_CONFIG: nxt.rdata = cur.config_r;
        A_MSG:    nxt.rdata = cur.msg;
        A_EUBRS:  nxt.rdata = ebr.eubrs;
        A_TIMER:  nxt.rdata = tim.timer;
        A_TSTM:   nxt.rdata = cur.ts;
        A_UCFG:   nxt.rdata = cur.ucfg;
        default:  nxt.rdata = cur.cmd;
      endcase
      if (req.we) begin
        nxt.wval = req.wdata;
        case (addr_e'(req.addr))
          A_STATUS: begin
            nxt.rx_full = 1'b0;
            nxt.perr    = 1'b0;
            nxt.ferr    = 1'b0;
            nxt.ovr     = 1'b0;
            nxt.clr_err = 1'b1;
          end
          A_CONFIG: nxt.config_r = req.wdata;
          A_MSG: begin
            nxt.tx_data = req.wdata;
            if (cur.cmd[C_TXMATCH]) nxt.tx_wait = 1'b1;
            else                    nxt.tx_req  = 1'b1;
          end
          A_EUBRS: nxt.eubrs_wr = 1'b1;
          A_TIMER: nxt.timer_wr = 1'b1;
          A_TSTM: begin
            nxt.tm_val   = req.wdata;
            nxt.tm_armed = 1'b1;
          end
          A_UCFG: nxt.ucfg = req.wdata;
          default: begin
            nxt.cmd = {req.wdata[DATA_W-1:2], 1'b0, req.wdata[0]};
            if (req.wdata[C_RESYNC]) nxt.state = ST_SYNC;
          end
        endcase
      end else if (addr_e'(req.addr) == A_MSG) begin
        nxt.rx_full = 1'b0;
      end
    end

    // start the transmitter once it is idle
    if (cur.tx_req && !tx.busy && !cur.go) begin
      nxt.go     = 1'b1;
      nxt.tx_req = 1'b0;
    end

    // receiver events (win over a concurrent read of MSG)
    if (rx.start) nxt.ts = tim.timer;
    if (rx.done) begin
      nxt.msg     = rx.data;
      nxt.ovr     = cur.ovr | cur.rx_full;
      nxt.rx_full = 1'b1;
      nxt.perr    = cur.perr | rx.perr;
      nxt.ferr    = cur.ferr | rx.ferr;
    end
  end

endmodule
