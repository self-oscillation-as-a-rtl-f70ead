// tb_aeuart_uartctr - the control unit on its own. The testbench plays the
// host request source and the five other units. Each host request is one
// tick; the answer of a read appears in rdata after that tick. Checks reset
// values, SYNC -> READY on sync_done and back on the CMD resync bit, read and
// write of every register, the control pulses (eubrs_wr, timer_wr, clr_err,
// go), a transmission that waits for an idle transmitter, a transmission that
// waits for a timer match, the time stamp on a start edge, rxfull, overrun,
// sticky parity/framing flags and clearing them through STATUS.
`include "tb_fsl_util.svh"
module tb_aeuart_uartctr;
  import fsl_pkg::*;
  import aeuart_pkg::*;
  `TB_FSL_CODEC(REQ_W, enc_req, dec_req)
  `TB_FSL_CODEC(TX_W, enc_tx, dec_tx)
  `TB_FSL_CODEC(TIM_W, enc_tim, dec_tim)
  `TB_FSL_CODEC(ERR_W, enc_err, dec_err)
  `TB_FSL_CODEC(RX_W, enc_rx, dec_rx)
  `TB_FSL_CODEC(EBR_W, enc_ebr, dec_ebr)
  `TB_FSL_CODEC(CTRL_W, enc_ctrl, dec_ctrl)

  logic clk = 0, rst = 1, stall = 0, pass, c_done, fire;
  fsl_t [REQ_W-1:0]  req_i;
  fsl_t [TX_W-1:0]   tx_i;
  fsl_t [TIM_W-1:0]  tim_i;
  fsl_t [ERR_W-1:0]  err_i;
  fsl_t [RX_W-1:0]   rx_i;
  fsl_t [EBR_W-1:0]  ebr_i;
  fsl_t [CTRL_W-1:0] q;
  req_t  rq;
  tx_t   tx;
  tim_t  tm;
  err_t  er;
  rx_t   r;
  ebr_t  e;
  ctrl_t c;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  always @(negedge clk) stall <= ($urandom_range(0, 3) == 0);

  aeuart_uartctr dut (.clk, .rst, .stall, .req_i, .tx_i, .tim_i, .err_i, .rx_i, .ebr_i, .q_o(q),
                      .pass, .c_done, .fire_o(fire));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic step();
    logic ph;
    ph = c_done;
    req_i = enc_req(rq, ~ph); tx_i = enc_tx(tx, ~ph); tim_i = enc_tim(tm, ~ph);
    err_i = enc_err(er, ~ph); rx_i = enc_rx(r, ~ph); ebr_i = enc_ebr(e, ~ph);
    pass = ph;
    do @(posedge clk); while (!fire);
    #1;
    c = ctrl_t'(dec_ctrl(q));
  endtask

  task automatic wr(input addr_e a, input logic [15:0] d);
    rq = '{valid: 1'b1, we: 1'b1, addr: a, wdata: d};
    step();
    rq = '0;
  endtask

  task automatic rd(input addr_e a, output logic [15:0] d);
    rq = '{valid: 1'b1, we: 1'b0, addr: a, wdata: '0};
    step();
    rq = '0;
    d = c.rdata;
  endtask

  initial begin
    logic [15:0] v;
    int gos;
    rq = '0; tx = '0; tm = '0; er = '0; r = '0; e = '0;
    req_i = enc_req(rq, 1'b0); tx_i = enc_tx(tx, 1'b0); tim_i = enc_tim(tm, 1'b0);
    err_i = enc_err(er, 1'b0); rx_i = enc_rx(r, 1'b0); ebr_i = enc_ebr(e, 1'b0); pass = 1'b0;
    repeat (3) @(posedge clk);
    rst <= 0;
    step();
    // reset values
    rd(A_CONFIG, v); chk(v == 16'h0001, "CONFIG reset 0x0001");
    rd(A_UCFG, v);   chk(v == 16'(UCFG_RESET), "UCFG reset: 8 data bits");
    rd(A_STATUS, v); chk(v == 16'h0000, "STATUS reset");
    chk(c.state == ST_SYNC, "SYNC after reset");
    // sync
    e.sync_done = 1'b1; e.eubrs = 16'd640; step(); e.sync_done = 1'b0;
    chk(c.state == ST_READY, "READY after sync_done");
    rd(A_STATUS, v); chk(v[S_READY], "STATUS ready bit");
    rd(A_EUBRS, v);  chk(v == 16'd640, "EUBRS read");
    // plain registers
    wr(A_CONFIG, 16'h00F1); rd(A_CONFIG, v); chk(v == 16'h00F1, "CONFIG write");
    wr(A_UCFG, 16'h00A7);   rd(A_UCFG, v);   chk(v == 16'h00A7, "UCFG write");
    wr(A_CMD, 16'h1230);    rd(A_CMD, v);    chk(v == 16'h1230, "CMD write");
    // control pulses
    wr(A_EUBRS, 16'd999); chk(c.eubrs_wr && c.wval == 16'd999, "eubrs_wr pulse");
    step(); chk(!c.eubrs_wr, "eubrs_wr one tick");
    wr(A_TIMER, 16'd77); chk(c.timer_wr && c.wval == 16'd77, "timer_wr pulse");
    step(); chk(!c.timer_wr, "timer_wr one tick");
    tm.timer = 16'd1234; rd(A_TIMER, v); chk(v == 16'd1234, "TIMER read");
    // transmission, transmitter idle: go on the next tick
    wr(A_MSG, 16'h00A5);
    chk(c.tx_data == 16'h00A5 && c.tx_req, "message taken");
    step(); chk(c.go && !c.tx_req, "go pulse");
    step(); chk(!c.go, "go one tick");
    // transmitter busy: go waits
    tx.busy = 1'b1;
    wr(A_MSG, 16'h0042);
    gos = 0;
    repeat (10) begin step(); if (c.go) gos++; end
    rd(A_STATUS, v); chk(gos == 0 && v[S_TXPEND] && v[S_TXBUSY], "go waits for the transmitter");
    tx.busy = 1'b0;
    step(); chk(c.go, "go when idle");
    // timer-match transmission
    wr(A_CMD, 16'h0001);
    wr(A_TSTM, 16'd500); chk(c.tm_armed && c.tm_val == 16'd500, "match armed");
    wr(A_MSG, 16'h0099); chk(c.tx_wait && !c.tx_req, "waits for match");
    gos = 0;
    repeat (10) begin step(); if (c.go) gos++; end
    chk(gos == 0, "no go before match");
    tm.match = 1'b1; step(); tm.match = 1'b0;
    chk(!c.tm_armed && !c.tx_wait, "match consumed");
    step(); chk(c.go && c.tx_data == 16'h0099, "go after match");
    wr(A_CMD, 16'h0000);
    // time stamp
    tm.timer = 16'd4321; r.start = 1'b1; step(); r.start = 1'b0;
    rd(A_TSTM, v); chk(v == 16'd4321, "time stamp of the start edge");
    // reception, overrun, error flags
    r.done = 1'b1; r.data = 16'h0011; step(); r.done = 1'b0;
    rd(A_STATUS, v); chk(v == 16'h0041, $sformatf("rxfull only: %h", v));
    r.done = 1'b1; r.data = 16'h0022; r.perr = 1'b1; step(); r.done = 1'b0; r.perr = 1'b0;
    rd(A_STATUS, v); chk(v == 16'h004B, $sformatf("overrun and parity error: %h", v));
    rd(A_MSG, v); chk(v == 16'h0022, "last message");
    wr(A_STATUS, 16'h0000);
    r.done = 1'b1; r.data = 16'h0044; step(); r.done = 1'b0;
    r.done = 1'b1; r.data = 16'h0045; step(); r.done = 1'b0;
    rd(A_STATUS, v); chk(v == 16'h0049, $sformatf("overrun alone: %h", v));
    r.done = 1'b1; r.data = 16'h0022; r.perr = 1'b1; step(); r.done = 1'b0; r.perr = 1'b0;
    rd(A_MSG, v);
    rd(A_STATUS, v); chk(v == 16'h004A, $sformatf("MSG read clears rxfull only: %h", v));
    r.done = 1'b1; r.data = 16'h0033; r.ferr = 1'b1; step(); r.done = 1'b0; r.ferr = 1'b0;
    er.coll = 1'b1;
    rd(A_STATUS, v); chk(v == 16'h006F, $sformatf("framing error, collision: %h", v));
    wr(A_STATUS, 16'h0000); chk(c.clr_err, "clr_err pulse");
    er.coll = 1'b0;
    rd(A_STATUS, v); chk(v[7:0] == 8'h40, $sformatf("flags cleared: %h", v));
    // resync command
    wr(A_CMD, 16'h0002); chk(c.state == ST_SYNC && c.cmd[C_RESYNC] == 1'b0, "CMD resync");
    e.sync_done = 1'b1; step(); e.sync_done = 1'b0;
    chk(c.state == ST_READY, "READY again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
