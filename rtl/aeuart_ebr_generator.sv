// aeuart_ebr_generator - enhanced baud rate generator of the aEUART.
//
// Time base. The unit knows no real time: it counts ticks of the
// self-oscillation (one firing of the register ring). The enhanced baud rate
// setting EUBRS is a 16-bit fixed-point number, 12 integer and 4 fraction
// bits, with t_bit = EUBRS/16 * 1/2 ticks, i.e. EUBRS = 32 * (ticks per bit).
// Bit times are produced by an accumulator that gains 32 per tick and wraps
// at EUBRS; a wrap is a bit tick. The fraction of EUBRS is thus honoured on
// average: some bit times are one tick shorter than others, which is the
// effect of suppressing single ticks of the sample counter.
//
// Two channels use this accumulator scheme: a free-running one (bit_tick for
// the transmitter and timer, tx_mid in the middle of each bit for the error
// unit) and a receive channel restarted by the receiver's start pulse, which
// gives three oversampling pulses per bit at 7/16, 8/16 and 9/16 of the bit.
//
// Synchronisation. On a falling edge of the bus the unit starts to measure
// bit cells (ticks between successive edges). Each cell must match the
// previous one within 1/16 (6.25 %); a cell that does not, or that runs past
// that tolerance without an edge, aborts the measurement (a falling edge then
// starts a new one). After eight equidistant cells EUBRS is set to 4 times
// their sum (= 32 times the mean cell) and sync_done pulses for one tick. The
// measurement runs all the time, so every later synchronisation pattern on the
// bus re-synchronises the unit and compensates oscillation drift. The control
// unit can also load EUBRS directly (eubrs_wr).
//
// The formula, the 12.4 split, the eight equidistant transitions and the
// 6.25 % tolerance follow the description of the enhanced UART; the
// accumulator realisation and the sample positions are this design's choice.
// Firing order: after the receiver (rx_i direct, so a start edge restarts the
// receive channel in the same tick), before the control unit (ctrl_i through
// a phase inverter).
module aeuart_ebr_generator
  import fsl_pkg::*;
  import aeuart_pkg::*;
#(
  parameter logic              INIT_PHASE  = 1'b0,
  parameter logic [DATA_W-1:0] EUBRS_RESET = '0     // no baud rate before sync
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                stall,
  input  fsl_t [RX_W-1:0]     rx_i,
  input  fsl_t [CTRL_W-1:0]   ctrl_i,
  input  logic                bus_i,
  output fsl_t [EBR_W-1:0]    q_o,
  input  logic                pass,
  output logic                c_done,
  output logic                fire_o
);

  localparam ebr_t EBR_RESET = '{eubrs: EUBRS_RESET, sync_done: 1'b0, meas: 1'b0, ncells: '0,
                                 cnt: '0, prev: '0, total: '0, bus_prev: 1'b1, tacc: '0,
                                 bit_tick: 1'b0, tx_mid: 1'b0, racc: '0, rx_smp: '0};

  logic [RX_W+CTRL_W-1:0] in_val;
  rx_t   rx;
  ctrl_t ctrl;
  ebr_t  cur, nxt;

  fsl_unit #(.NI(RX_W + CTRL_W), .NS(EBR_W), .INIT(EBR_RESET), .INIT_PHASE(INIT_PHASE)) u_unit (
    .clk, .rst, .stall, .in_i({rx_i, ctrl_i}), .in_val_o(in_val), .own_val_o(cur),
    .next_i(nxt), .q_o, .pass, .c_done, .fire_o
  );

  assign {rx, ctrl} = in_val;

  // True when the accumulator passes threshold th on its way from a to b.
  function automatic logic crossed(input logic [ACC_W-1:0] a, input logic [ACC_W-1:0] b,
                                   input logic [ACC_W-1:0] th);
    return (a < th) && (b >= th);
  endfunction

  always_comb begin
    logic [ACC_W-1:0]    e, t_new, r_new, r_old;
    logic [ACC_W-1:0]    th7, th8, th9;
    logic                edge_s, fall, valid_rate;
    logic [CELL_W-1:0]   len, tol;
    logic [CELL_W+2:0]   sum;
    logic [CELL_W+4:0]   eub;

    sum = '0;
    eub = '0;
    nxt = cur;
    nxt.sync_done = 1'b0;
    nxt.bit_tick  = 1'b0;
    nxt.tx_mid    = 1'b0;
    nxt.rx_smp    = '0;
    nxt.bus_prev  = bus_i;

    // ---- baud rate channels ----
    e          = {1'b0, cur.eubrs};
    valid_rate = (cur.eubrs >= 16'd64);            // at least two ticks per bit
    th7 = (e * 17'd7) >> 4;
    th8 = e >> 1;
    th9 = (e * 17'd9) >> 4;

    t_new = cur.tacc + ACC_STEP;
    if (valid_rate) begin
      if (crossed(cur.tacc, t_new, th8)) nxt.tx_mid = 1'b1;
      if (t_new >= e) begin
        t_new = t_new - e;
        nxt.bit_tick = 1'b1;
      end
      nxt.tacc = t_new;
    end else begin
      nxt.tacc = '0;
    end

    r_old = rx.start ? '0 : cur.racc;
    r_new = r_old + ACC_STEP;
    if (valid_rate) begin
      if (crossed(r_old, r_new, th7)) nxt.rx_smp[0] = 1'b1;
      else if (crossed(r_old, r_new, th8)) nxt.rx_smp[1] = 1'b1;
      else if (crossed(r_old, r_new, th9)) nxt.rx_smp[2] = 1'b1;
      if (r_new >= e) r_new = r_new - e;
      nxt.racc = r_new;
    end else begin
      nxt.racc = '0;
    end

    // ---- synchronisation pattern measurement ----
    edge_s = (bus_i != cur.bus_prev);
    fall   = cur.bus_prev && !bus_i;
    len    = cur.cnt + CELL_W'(1);
    tol    = cur.prev >> TOL_SHIFT;
    nxt.cnt = (&cur.cnt) ? cur.cnt : len;
    if (edge_s) nxt.cnt = '0;

    if (cur.meas) begin
      if (edge_s) begin
        if (cur.ncells == 4'd0 ||
            ((len >= cur.prev) ? (len - cur.prev <= tol) : (cur.prev - len <= tol))) begin
          sum        = cur.total + (CELL_W+3)'(len);
          nxt.total  = sum;
          nxt.prev   = len;
          nxt.ncells = cur.ncells + 4'd1;
          if (cur.ncells == 4'(SYNC_CELLS - 1)) begin
            eub          = {sum, 2'b00};
            nxt.eubrs    = (|eub[CELL_W+4:DATA_W]) ? '1 : eub[DATA_W-1:0];
            nxt.sync_done = 1'b1;
            nxt.meas     = 1'b0;
          end
        end else begin
          nxt.meas   = fall;                       // a falling edge starts anew
          nxt.ncells = '0;
          nxt.total  = '0;
        end
      end else if ((cur.ncells != 4'd0 && len > cur.prev + tol) || (&cur.cnt)) begin
        nxt.meas = 1'b0;                           // no edge within tolerance
      end
    end else if (fall) begin
      nxt.meas   = 1'b1;
      nxt.ncells = '0;
      nxt.total  = '0;
    end

    if (ctrl.eubrs_wr) nxt.eubrs = ctrl.wval;
  end

endmodule
