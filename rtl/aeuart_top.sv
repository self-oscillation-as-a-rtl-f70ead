// aeuart_top - asynchronous enhanced UART (aEUART) with its host wrapper.
//
// A UART whose only time reference is its own self-oscillation. Six units,
// each a logic cloud plus one FSL register with a feedback path, form a ring
// that never stops switching: the transmitter fires first, then the timing
// unit, the error control unit and the receiver together, then the enhanced
// baud rate generator, then the control unit, and the sequence starts over.
// One pass of this sequence is one tick. The baud rate generator measures the
// synchronisation pattern on the bus in ticks and from then on produces bit
// times in ticks, so the UART runs at the baud rate of the bus master however
// fast or slow (and however jittery) the ring happens to oscillate, as long as
// the drift between two synchronisation patterns stays within half a bit over
// a frame.
//
// Ring wiring. A unit reads units that fire before it in the tick directly and
// units that fire at or after it (itself included) through phase inverters;
// then all inputs of a unit are in one phase exactly when it is its turn. The
// handshake into each register (pass) is the C-element combination (fsl_sync)
// of the c_done lines of all units reading it, inverted where the data path
// carries a phase inverter. All registers start in phase 0.
//
// The busdriver oscillates on its own and feeds the filtered bus level, as a
// single-rail value, to the receiver, the baud rate generator and the error
// control unit.
//
// Host wrapper. The host side is synchronous to clk: a request (host_valid,
// host_we, host_addr, host_wdata) is held until host_ready is high for one
// cycle; host_rdata then holds the register read. The wrapper presents the
// request to the control unit always in the phase it expects next (the
// complement of its c_done), so it never blocks the ring, and recognises that
// the request has been consumed when c_done changes.
//
// Emulation. The delay-insensitive circuit is modelled with one clock edge
// per gate delay, so one tick takes at least four clk cycles. stall_i (one bit
// per register: 0 tx, 1 timing, 2 errctr, 3 rx, 4 ebr, 5 uartctr, 6 busdriver)
// holds a register back for arbitrary cycles, standing in for varying gate
// delays; the design works for any stall pattern, with the tick rate varying
// like the jitter of the real circuit. tick_o is the control unit's c_done,
// which toggles once per tick. fire_o shows which registers capture in a
// cycle (same bit order as stall_i).
//
// Beside the UART, and unconnected to it, the top holds a four-stage FSL
// pipeline initialised full (pl_* ports): a source writes words in
// alternating phases when pl_src_pass equals the phase of its last word, and
// a sink takes each new wave on pl_snk_q and answers on pl_snk_c_done (start
// value 1). It shows the register handshake on a plain chain.
module aeuart_top
  import fsl_pkg::*;
  import aeuart_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [6:0]        stall_i,
  // serial bus
  input  logic              rxd,
  output logic              txd,
  // host interface
  input  logic              host_valid,
  input  logic              host_we,
  input  logic [2:0]        host_addr,
  input  logic [DATA_W-1:0] host_wdata,
  output logic              host_ready,
  output logic [DATA_W-1:0] host_rdata,
  // self-oscillation
  output logic              tick_o,
  output logic [6:0]        fire_o,   // register i captured in this cycle
  // stand-alone FSL pipeline (demonstration, not connected to the UART)
  input  logic [3:0]        pl_stall_i,
  input  fsl_t [7:0]        pl_src_d,
  output logic              pl_src_pass,
  output fsl_t [7:0]        pl_snk_q,
  input  logic              pl_snk_c_done,
  output logic [3:0]        pl_fire_o
);

  fsl_t [TX_W-1:0]   tx_q;
  fsl_t [TIM_W-1:0]  tim_q;
  fsl_t [ERR_W-1:0]  err_q;
  fsl_t [RX_W-1:0]   rx_q;
  fsl_t [EBR_W-1:0]  ebr_q, ebr_inv;
  fsl_t [CTRL_W-1:0] ctrl_q, ctrl_inv;
  fsl_t [REQ_W-1:0]  req_fsl;

  logic cd_tx, cd_tim, cd_err, cd_rx, cd_ebr, cd_ctrl;
  logic ps_tx, ps_rx, ps_ebr, ps_ctrl;
  logic bus, bus_cd;

  // ---------------- busdriver ----------------
  aeuart_busdriver u_bus (
    .clk, .rst, .stall(stall_i[6]), .bus_in(rxd), .samples_o(), .bus_o(bus),
    .c_done(bus_cd), .sample_o(fire_o[6])
  );

  // ---------------- phase inverters on paths against the firing order ----------------
  fsl_phase_inv #(.W(EBR_W))  u_inv_ebr  (.d(ebr_q),  .q(ebr_inv));
  fsl_phase_inv #(.W(CTRL_W)) u_inv_ctrl (.d(ctrl_q), .q(ctrl_inv));

  // ---------------- the ring ----------------
  aeuart_transmitter u_tx (
    .clk, .rst, .stall(stall_i[0]), .ctrl_i(ctrl_inv), .ebr_i(ebr_inv),
    .q_o(tx_q), .pass(ps_tx), .c_done(cd_tx), .fire_o(fire_o[0])
  );

  aeuart_timing u_tim (
    .clk, .rst, .stall(stall_i[1]), .tx_i(tx_q), .ctrl_i(ctrl_inv), .ebr_i(ebr_inv),
    .q_o(tim_q), .pass(cd_ctrl), .c_done(cd_tim), .fire_o(fire_o[1])
  );

  aeuart_errctr u_err (
    .clk, .rst, .stall(stall_i[2]), .tx_i(tx_q), .ctrl_i(ctrl_inv), .ebr_i(ebr_inv),
    .bus_i(bus), .q_o(err_q), .pass(cd_ctrl), .c_done(cd_err), .fire_o(fire_o[2])
  );

  aeuart_receiver u_rx (
    .clk, .rst, .stall(stall_i[3]), .tx_i(tx_q), .ctrl_i(ctrl_inv), .ebr_i(ebr_inv),
    .bus_i(bus), .q_o(rx_q), .pass(ps_rx), .c_done(cd_rx), .fire_o(fire_o[3])
  );

  aeuart_ebr_generator u_ebr (
    .clk, .rst, .stall(stall_i[4]), .rx_i(rx_q), .ctrl_i(ctrl_inv), .bus_i(bus),
    .q_o(ebr_q), .pass(ps_ebr), .c_done(cd_ebr), .fire_o(fire_o[4])
  );

  aeuart_uartctr u_ctrl (
    .clk, .rst, .stall(stall_i[5]), .req_i(req_fsl), .tx_i(tx_q), .tim_i(tim_q),
    .err_i(err_q), .rx_i(rx_q), .ebr_i(ebr_q), .q_o(ctrl_q), .pass(ps_ctrl),
    .c_done(cd_ctrl), .fire_o(fire_o[5])
  );

  // ---------------- handshake synchronisers ----------------
  // transmitter is read directly by timing, errctr, receiver and uartctr
  fsl_sync #(.N(4), .INV_MASK(4'b0000)) u_sync_tx (
    .clk, .rst, .hs_i({cd_tim, cd_err, cd_rx, cd_ctrl}), .hs_o(ps_tx)
  );
  // receiver is read directly by ebr_generator and uartctr
  fsl_sync #(.N(2), .INV_MASK(2'b00)) u_sync_rx (
    .clk, .rst, .hs_i({cd_ebr, cd_ctrl}), .hs_o(ps_rx)
  );
  // ebr_generator is read through inverters by tx, timing, errctr, receiver,
  // directly by uartctr
  fsl_sync #(.N(5), .INV_MASK(5'b11110)) u_sync_ebr (
    .clk, .rst, .hs_i({cd_tx, cd_tim, cd_err, cd_rx, cd_ctrl}), .hs_o(ps_ebr)
  );
  // uartctr is read through inverters by every other unit
  fsl_sync #(.N(5), .INV_MASK(5'b11111)) u_sync_ctrl (
    .clk, .rst, .hs_i({cd_tx, cd_tim, cd_err, cd_rx, cd_ebr}), .hs_o(ps_ctrl)
  );

  // ---------------- host wrapper ----------------
  typedef enum logic [1:0] {H_IDLE, H_PRESENT, H_WAIT} hstate_e;
  hstate_e hstate;
  req_t    req;
  logic    ref_cd;
  ctrl_t   ctrl_val;

  always_comb begin
    for (int i = 0; i < REQ_W; i++) req_fsl[i] = fsl_enc(req[i], ~cd_ctrl);
    for (int i = 0; i < CTRL_W; i++) ctrl_val[i] = ctrl_q[i].a;
  end

  assign host_ready = (hstate == H_WAIT) && (cd_ctrl != ref_cd);

  always_ff @(posedge clk) begin
    if (rst) begin
      hstate     <= H_IDLE;
      req        <= '0;
      ref_cd     <= 1'b0;
      host_rdata <= '0;
    end else begin
      case (hstate)
        H_IDLE: if (host_valid) begin
          req    <= '{valid: 1'b1, we: host_we, addr: host_addr, wdata: host_wdata};
          hstate <= H_PRESENT;
        end
        H_PRESENT: begin
          ref_cd <= cd_ctrl;
          hstate <= H_WAIT;
        end
        default: if (host_ready) begin
          host_rdata <= ctrl_val.rdata;
          req.valid  <= 1'b0;
          hstate     <= H_IDLE;
        end
      endcase
    end
  end

  tx_t tx_val;
  always_comb begin
    for (int i = 0; i < TX_W; i++) tx_val[i] = tx_q[i].a;
  end
  assign txd = tx_val.txd;
  assign tick_o = cd_ctrl;

  // ---------------- FSL pipeline demonstration ----------------
  // Four registers initialised as a full pipeline; it shares nothing with the
  // UART except clk and rst and has its own source and sink ports.
  fsl_pipeline #(.STAGES(4), .W(8), .INIT_FULL(1'b1), .INIT_WORD(8'h10)) u_pipeline (
    .clk, .rst, .stall_i(pl_stall_i), .src_d(pl_src_d), .src_pass(pl_src_pass),
    .snk_q(pl_snk_q), .snk_c_done(pl_snk_c_done), .fire_o(pl_fire_o)
  );

endmodule
