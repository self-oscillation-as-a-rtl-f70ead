// tb_aeuart_receiver - the receiver unit on its own. The testbench drives
// the filtered bus level tick by tick with frames of P ticks per bit and
// plays the baud rate generator's receive channel: after the receiver's start
// pulse it issues the three oversampling pulses at ticks 7, 8 and 9 of every
// bit. It checks received data for several lengths, even/odd parity with good
// and bad parity bits (perr), a zero stop bit (ferr), majority voting over a
// one-tick glitch, rejection of a short low pulse (false start), that a
// disabled receiver (CONFIG bit 0 clear or SYNC state) ignores the bus, and
// that a sync_done pulse aborts a frame.
`include "tb_fsl_util.svh"
module tb_aeuart_receiver;
  import fsl_pkg::*;
  import aeuart_pkg::*;
  `TB_FSL_CODEC(TX_W, enc_tx, dec_tx)
  `TB_FSL_CODEC(CTRL_W, enc_ctrl, dec_ctrl)
  `TB_FSL_CODEC(EBR_W, enc_ebr, dec_ebr)
  `TB_FSL_CODEC(RX_W, enc_rx, dec_rx)

  localparam int P = 16;
  logic clk = 0, rst = 1, stall = 0, pass, c_done, fire, bus;
  fsl_t [TX_W-1:0]   tx_i;
  fsl_t [CTRL_W-1:0] ctrl_i;
  fsl_t [EBR_W-1:0]  ebr_i;
  fsl_t [RX_W-1:0]   q;
  tx_t   tx;
  ctrl_t c;
  ebr_t  e;
  rx_t   r;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  always @(negedge clk) stall <= ($urandom_range(0, 3) == 0);

  aeuart_receiver dut (.clk, .rst, .stall, .tx_i, .ctrl_i, .ebr_i, .bus_i(bus), .q_o(q), .pass,
                       .c_done, .fire_o(fire));

  initial begin
    repeat (400000) @(posedge clk);
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
    tx_i = enc_tx(tx, ~ph); ctrl_i = enc_ctrl(c, ~ph); ebr_i = enc_ebr(e, ~ph);
    pass = ph;
    do @(posedge clk); while (!fire);
    #1;
    r = rx_t'(dec_rx(q));
  endtask

  // Plays a waveform (one level per tick) and the sample pulses; returns the
  // receiver state after the done pulse (or after the waveform).
  task automatic play(input bit wave[$], input int glitch_at, input int abort_at,
                      output bit started, output bit done, output rx_t res);
    int k;   // ticks since the start pulse, -1 before
    k = -1; started = 0; done = 0;
    for (int n = 0; n < wave.size() + 4 * P; n++) begin
      bus = (n < wave.size()) ? wave[n] : 1'b1;
      if (n == glitch_at) bus = ~bus;
      e.rx_smp = '0;
      if (k >= 0) begin
        if (k % P == 7) e.rx_smp[0] = 1'b1;
        if (k % P == 8) e.rx_smp[1] = 1'b1;
        if (k % P == 9) e.rx_smp[2] = 1'b1;
      end
      e.sync_done = (n == abort_at);
      step();
      if (k >= 0) k++;
      if (r.start) begin started = 1; k = 1; end
      if (r.done) begin done = 1; res = r; end
      if (k >= 0 && !r.busy && !r.start) k = -1;
    end
    e = '0;
  endtask

  function automatic void frame(input logic [15:0] d, input int len, input int par, input bit bad_par,
                                input bit stop0, output bit w[$]);
    bit p;
    w = {};
    repeat (5) for (int i = 0; i < P; i++) w.push_back(1);
    for (int i = 0; i < P; i++) w.push_back(0);
    p = 0;
    for (int b = 0; b < len; b++) begin
      for (int i = 0; i < P; i++) w.push_back(d[b]);
      p ^= d[b];
    end
    if (par != 0) begin
      p = (par == 2) ? ~p : p;
      if (bad_par) p = ~p;
      for (int i = 0; i < P; i++) w.push_back(p);
    end
    for (int i = 0; i < P; i++) w.push_back(!stop0);
  endfunction

  task automatic rx_case(input logic [15:0] d, input int len, input int par, input bit bad_par,
                         input bit stop0, input int glitch);
    bit w[$], s, dn;
    rx_t res;
    ucfg_t u;
    u = UCFG_RESET; u.len = 5'(len); u.parity = 2'(par);
    c.ucfg = 16'(u);
    frame(d, len, par, bad_par, stop0, w);
    play(w, (glitch > 0) ? 5 * P + glitch : -1, -1, s, dn, res);
    chk(s && dn, $sformatf("frame %h received", d));
    if (dn) begin
      chk(res.data == (d & 16'((32'h1 << len) - 1)), $sformatf("data %h exp %h", res.data, d));
      chk(res.perr == (bad_par && par != 0), $sformatf("perr %b", res.perr));
      chk(res.ferr == stop0, $sformatf("ferr %b", res.ferr));
    end
  endtask

  initial begin
    bit w[$], s, dn;
    rx_t res;
    tx = '0; c = '0; e = '0; bus = 1'b1;
    c.ucfg = 16'(UCFG_RESET);
    tx_i = enc_tx(tx, 1'b0); ctrl_i = enc_ctrl(c, 1'b0); ebr_i = enc_ebr(e, 1'b0); pass = 1'b0;
    repeat (3) @(posedge clk);
    rst <= 0;
    // SYNC state: bus activity is ignored
    frame(16'h0012, 8, 0, 0, 0, w);
    play(w, -1, -1, s, dn, res);
    chk(!s && !dn, "ignored in SYNC state");
    c.state = ST_READY; c.config_r = 16'h0000;
    play(w, -1, -1, s, dn, res);
    chk(!s && !dn, "ignored while disabled");
    c.config_r = 16'h0001;
    repeat (2) step();
    rx_case(16'h00A5, 8, 0, 0, 0, 0);
    rx_case(16'h005A, 8, 1, 0, 0, 0);
    rx_case(16'h005B, 8, 1, 1, 0, 0);   // bad even parity
    rx_case(16'h0033, 7, 2, 0, 0, 0);
    rx_case(16'h0034, 7, 2, 1, 0, 0);   // bad odd parity
    rx_case(16'h00F0, 8, 0, 0, 1, 0);   // stop bit 0
    rx_case(16'hC0DE, 16, 1, 0, 0, 0);
    rx_case(16'h0015, 5, 0, 0, 0, 0);
    rx_case(16'h0001, 1, 0, 0, 0, 0);
    rx_case(16'h0069, 8, 0, 0, 0, 3 * P + 8);   // glitch on the middle sample of bit 2
    for (int i = 0; i < 8; i++) rx_case(16'($urandom), $urandom_range(1, 16), $urandom_range(0, 2), 1'($urandom), 0, 0);
    // false start: a low pulse shorter than half a bit
    w = {};
    repeat (3 * P) w.push_back(1);
    repeat (4) w.push_back(0);
    repeat (3 * P) w.push_back(1);
    play(w, -1, -1, s, dn, res);
    chk(s && !dn && !r.busy, "false start rejected");
    // sync_done in the middle of a frame aborts it
    c.ucfg = 16'(UCFG_RESET);
    frame(16'h0000, 8, 0, 0, 0, w);   // no falling edge after the start bit
    play(w, -1, 5 * P + 3 * P, s, dn, res);
    chk(s && !dn && !r.busy, "sync_done aborts the frame");
    rx_case(16'h0081, 8, 0, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
