// aeuart_receiver - receiver unit of the aEUART.
//
// While the control unit is in the READY state and the module is enabled, the
// receiver waits for a falling edge of the filtered bus level, raises start
// for one tick (the baud rate generator restarts its receive channel on it and
// the control unit takes a time stamp), and then samples every bit three times
// at the oversampling pulses of the baud rate generator (7/16, 8/16 and 9/16
// of the bit time). The majority of the three samples is the bit. A start bit
// that reads 1 is a false start and is dropped. After the data bits, the
// optional parity bit and the first stop bit it raises done for one tick with
// the data, a parity error flag and a framing error flag (stop bit read 0).
// A start edge counts only if the receiver was already enabled in the previous
// tick, so the falling edge that completes a synchronisation pattern (seen by
// the baud rate generator later in the same tick) is not taken for a start.
// When the baud rate generator accepts a synchronisation pattern, a frame in
// progress is dropped: it was the pattern itself, measured with the old rate.
//
// Oversampling and the majority decision follow the description of the
// enhanced UART; three samples per bit and their positions are this design's
// choice. Fires once per tick after the transmitter: tx_i direct, ctrl_i and
// ebr_i through phase inverters; bus_i is the busdriver's level, converted into
// the unit's phase as it is read. tx_i carries nothing the receiver needs; it
// takes part in the phase detection only, which places the unit after the
// transmitter in the firing order.
module aeuart_receiver
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
  output fsl_t [RX_W-1:0]     q_o,
  input  logic                pass,
  output logic                c_done,
  output logic                fire_o
);

  localparam rx_t RX_RESET = '{busy: 1'b0, bitidx: '0, smp: '0, shreg: '0, bus_prev: 1'b1, en_prev: 1'b0,
                               start: 1'b0, done: 1'b0, data: '0, perr: 1'b0, ferr: 1'b0};

  logic [TX_W+CTRL_W+EBR_W-1:0] in_val;
  tx_t   tx;
  ctrl_t ctrl;
  ebr_t  ebr;
  rx_t   cur, nxt;
  ucfg_t cfg;

  fsl_unit #(.NI(TX_W + CTRL_W + EBR_W), .NS(RX_W), .INIT(RX_RESET), .INIT_PHASE(INIT_PHASE)) u_unit (
    .clk, .rst, .stall, .in_i({tx_i, ctrl_i, ebr_i}), .in_val_o(in_val), .own_val_o(cur),
    .next_i(nxt), .q_o, .pass, .c_done, .fire_o
  );

  assign {tx, ctrl, ebr} = in_val;
  assign cfg = ucfg_t'(ctrl.ucfg);

  always_comb begin
    logic [4:0] len, last_idx, par_idx;
    logic       has_par, b, par;
    logic       enabled;
    len      = (cfg.len == 5'd0) ? 5'd1 : (cfg.len > 5'd16) ? 5'd16 : cfg.len;
    has_par  = (cfg.parity == 2'd1) || (cfg.parity == 2'd2);
    par_idx  = len + 5'd1;
    last_idx = len + 5'd1 + {4'd0, has_par};        // index of the stop bit
    enabled  = (ctrl.state == ST_READY) && ctrl.config_r[0];
    par      = 1'b0;
    b        = maj3(cur.smp[0], cur.smp[1], bus_i);

    nxt = cur;
    nxt.start    = 1'b0;
    nxt.done     = 1'b0;
    nxt.bus_prev = bus_i;
    nxt.en_prev  = enabled;

    if (ebr.sync_done) begin
      nxt.busy = 1'b0;                              // the frame was a sync pattern
    end else if (!cur.busy) begin
      if (enabled && cur.en_prev && cur.bus_prev && !bus_i) begin
        nxt.busy   = 1'b1;
        nxt.bitidx = '0;
        nxt.start  = 1'b1;
        nxt.shreg  = '0;
      end
    end else if (ebr.rx_smp[0]) begin
      nxt.smp[0] = bus_i;
    end else if (ebr.rx_smp[1]) begin
      nxt.smp[1] = bus_i;
    end else if (ebr.rx_smp[2]) begin
      if (cur.bitidx == 5'd0) begin
        if (b) nxt.busy = 1'b0;                     // false start
        else   nxt.bitidx = 5'd1;
      end else if (cur.bitidx == last_idx) begin
        nxt.busy = 1'b0;
        nxt.done = 1'b1;
        nxt.ferr = !b;
        par = ^(cur.shreg[15:0] & 16'((17'h1 << len) - 17'h1));
        if (has_par)
          nxt.perr = (cur.shreg[par_idx-1] != ((cfg.parity == 2'd2) ? ~par : par));
        else
          nxt.perr = 1'b0;
        nxt.data = cur.shreg[15:0] & 16'((17'h1 << len) - 17'h1);
      end else begin
        nxt.shreg[cur.bitidx-1] = b;
        nxt.bitidx = cur.bitidx + 5'd1;
      end
    end
  end

endmodule
