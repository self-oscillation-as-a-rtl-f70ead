// tb_aeuart_transmitter - the transmitter unit on its own. The testbench
// plays the control unit (go, tx_data, UART configuration) and the baud rate
// generator (a bit_tick every BT ticks) and checks every frame bit by bit
// against an independently built frame: start bit, data LSB first, even/odd
// parity, one or two stop bits, for several data lengths. Also checks busy,
// the done pulse, that a go while busy does not disturb the running frame,
// and that the bit times are whole bit-tick periods. Random stalls emulate
// gate-delay variation.
`include "tb_fsl_util.svh"
module tb_aeuart_transmitter;
  import fsl_pkg::*;
  import aeuart_pkg::*;
  `TB_FSL_CODEC(CTRL_W, enc_ctrl, dec_ctrl)
  `TB_FSL_CODEC(EBR_W, enc_ebr, dec_ebr)
  `TB_FSL_CODEC(TX_W, enc_tx, dec_tx)

  localparam int BT = 3;
  logic clk = 0, rst = 1, stall = 0, pass, c_done, fire;
  fsl_t [CTRL_W-1:0] ctrl_i;
  fsl_t [EBR_W-1:0]  ebr_i;
  fsl_t [TX_W-1:0]   q;
  ctrl_t c;
  ebr_t  e;
  tx_t   t;
  int checks = 0, failures = 0, ticks = 0;
  always #5 clk = ~clk;
  always @(negedge clk) stall <= ($urandom_range(0, 3) == 0);

  aeuart_transmitter dut (.clk, .rst, .stall, .ctrl_i, .ebr_i, .q_o(q), .pass, .c_done, .fire_o(fire));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (tick %0d)", what, ticks); end
  endtask

  // one tick: present the neighbours' wave, wait for the unit to fire
  task automatic step();
    logic ph;
    ph = c_done;
    ctrl_i = enc_ctrl(c, ~ph);
    ebr_i  = enc_ebr(e, ~ph);
    pass   = ph;
    do @(posedge clk); while (!fire);
    #1;
    t = tx_t'(dec_tx(q));
    ticks++;
  endtask

  function automatic int build(input logic [15:0] data, input int len, input int par,
                               input bit two, output bit f[$]);
    bit p;
    f = {};
    f.push_back(0);
    p = 0;
    for (int i = 0; i < len; i++) begin f.push_back(data[i]); p ^= data[i]; end
    if (par == 1) f.push_back(p);
    if (par == 2) f.push_back(~p);
    f.push_back(1);
    if (two) f.push_back(1);
    return f.size();
  endfunction

  task automatic send(input logic [15:0] data, input int len, input int par, input bit two,
                      input bit go_again);
    bit exp[$], got[$];
    int n, since;
    bit done_seen;
    ucfg_t u;
    u = UCFG_RESET; u.len = 5'(len); u.parity = 2'(par); u.two_stop = two;
    n = build(data, len, par, two, exp);
    c.ucfg = 16'(u); c.tx_data = data; c.go = 1; e.bit_tick = 0;
    step();
    chk(t.busy && t.txd, "busy after go, line still idle");
    c.go = 0;
    since = 0; done_seen = 0;
    for (int k = 0; k < 40 * BT * 22 && !done_seen; k++) begin
      since++;
      e.bit_tick = (since == BT);
      if (go_again && k == 5 * BT) begin c.go = 1; c.tx_data = ~data; end
      else c.go = 0;
      step();
      if (e.bit_tick) begin
        since = 0;
        if (t.done) done_seen = 1;
        else got.push_back(t.txd);
      end else begin
        chk(!t.done, "done only on a bit tick");
      end
    end
    e.bit_tick = 0; c.go = 0;
    chk(done_seen && !t.busy && t.txd, "done pulse, idle afterwards");
    chk(got.size() == n, $sformatf("frame length %0d exp %0d", got.size(), n));
    for (int i = 0; i < n && i < got.size(); i++)
      chk(got[i] == exp[i], $sformatf("bit %0d of %h len %0d par %0d", i, data, len, par));
    step();
    chk(!t.done && t.txd, "done lasts one tick");
  endtask

  initial begin
    c = '0; e = '0;
    c.ucfg = 16'(UCFG_RESET);
    ctrl_i = enc_ctrl(c, 1'b0); ebr_i = enc_ebr(e, 1'b0); pass = 1'b0;  // nothing new yet
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    t = tx_t'(dec_tx(q));
    chk(t.txd && !t.busy && c_done == 1'b0, "reset: idle line, phase 0");
    repeat (5) step();
    chk(t.txd && !t.busy, "no go, no frame");
    send(16'h00A5, 8, 0, 0, 0);
    send(16'h0055, 8, 1, 0, 0);
    send(16'h0013, 5, 1, 0, 0);
    send(16'hBEEF, 16, 2, 1, 0);
    send(16'h0071, 7, 2, 1, 0);
    send(16'h0001, 1, 0, 0, 0);
    send(16'h00C3, 8, 0, 0, 1);   // go while busy is ignored
    for (int r = 0; r < 10; r++)
      send(16'($urandom), $urandom_range(1, 16), $urandom_range(0, 2), 1'($urandom), 0);
    $display("ticks=%0d", ticks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
