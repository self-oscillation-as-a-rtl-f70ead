// tb_aeuart_ebr_generator - the enhanced baud rate generator on its own.
// The testbench drives the bus tick by tick and plays the receiver and the
// control unit. Checks: no bit ticks before a baud rate exists; a sync
// pattern (0x55 frame, C ticks per cell) sets EUBRS = 32*C with one
// sync_done pulse; bit ticks then come every C ticks with tx_mid in between;
// after a start pulse the three oversampling pulses come at 7/16, 8/16 and
// 9/16 of every bit; cells that differ by more than 1/16 are rejected, cells
// within 1/16 are accepted and averaged (EUBRS = 4 * sum); a later pattern
// re-synchronises to a new rate; a control write loads EUBRS directly.
`include "tb_fsl_util.svh"
module tb_aeuart_ebr_generator;
  import fsl_pkg::*;
  import aeuart_pkg::*;
  `TB_FSL_CODEC(RX_W, enc_rx, dec_rx)
  `TB_FSL_CODEC(CTRL_W, enc_ctrl, dec_ctrl)
  `TB_FSL_CODEC(EBR_W, enc_ebr, dec_ebr)

  logic clk = 0, rst = 1, stall = 0, pass, c_done, fire, bus;
  fsl_t [RX_W-1:0]   rx_i;
  fsl_t [CTRL_W-1:0] ctrl_i;
  fsl_t [EBR_W-1:0]  q;
  rx_t   r;
  ctrl_t c;
  ebr_t  e;
  int checks = 0, failures = 0, ticks = 0, n_sync = 0;
  always #5 clk = ~clk;
  always @(negedge clk) stall <= ($urandom_range(0, 3) == 0);

  aeuart_ebr_generator dut (.clk, .rst, .stall, .rx_i, .ctrl_i, .bus_i(bus), .q_o(q), .pass,
                            .c_done, .fire_o(fire));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (tick %0d)", what, ticks); end
  endtask

  task automatic step();
    logic ph;
    ph = c_done;
    rx_i = enc_rx(r, ~ph); ctrl_i = enc_ctrl(c, ~ph);
    pass = ph;
    do @(posedge clk); while (!fire);
    #1;
    e = ebr_t'(dec_ebr(q));
    ticks++;
    if (e.sync_done) n_sync++;
  endtask

  task automatic level(input bit v, input int n);
    bus = v;
    repeat (n) step();
  endtask

  // 0x55 frame: start 0, then 1,0,1,0,1,0,1,0, stop 1; cell lengths from cells[]
  task automatic pattern(input int cells[9]);
    for (int i = 0; i < 9; i++) level(i % 2 == 1, cells[i]);
    level(1, 40);
  endtask

  task automatic check_rate(input int C);
    int last, d, mids;
    // bit ticks every C ticks, one tx_mid between two of them
    last = -1; mids = 0;
    for (int n = 0; n < 6 * C; n++) begin
      step();
      if (e.tx_mid) mids++;
      if (e.bit_tick) begin
        if (last >= 0) begin
          chk(ticks - last == C, $sformatf("bit period %0d exp %0d", ticks - last, C));
          chk(mids == 1, "one tx_mid per bit");
        end
        last = ticks; mids = 0;
      end
    end
    chk(last >= 0, "bit ticks present");
  endtask

  task automatic check_samples(input int C);
    int k, got[3][$];
    r.start = 1'b1; step(); r.start = 1'b0;
    k = 1;
    chk(e.rx_smp == 3'b000 || C < 3, "no sample on the start tick");
    for (int n = 0; n < 3 * C; n++) begin
      step(); k++;
      for (int j = 0; j < 3; j++) if (e.rx_smp[j]) got[j].push_back(k);
    end
    for (int j = 0; j < 3; j++) begin
      chk(got[j].size() == 3, "three bits sampled");
      for (int b = 0; b < got[j].size(); b++) begin
        // expected: first tick whose accumulator passes (7+j)/16 of the bit
        int exp;
        exp = b * C + ((7 + j) * 2 * C + 31) / 32;
        if (j == 1) exp = b * C + (16 * C + 31) / 32;
        chk(got[j][b] == exp, $sformatf("sample %0d of bit %0d at %0d exp %0d", j, b, got[j][b], exp));
      end
    end
  endtask

  initial begin
    int ns;
    r = '0; c = '0; bus = 1'b1;
    rx_i = enc_rx(r, 1'b0); ctrl_i = enc_ctrl(c, 1'b0); pass = 1'b0;
    repeat (3) @(posedge clk);
    rst <= 0;
    // no rate: no bit ticks
    for (int n = 0; n < 100; n++) begin
      step();
      chk(!e.bit_tick && !e.tx_mid && e.rx_smp == 0 && e.eubrs == 0, "silent without a rate");
    end
    // sync pattern, 20 ticks per cell
    ns = n_sync;
    pattern('{20, 20, 20, 20, 20, 20, 20, 20, 20});
    chk(n_sync == ns + 1, "one sync_done");
    chk(e.eubrs == 16'd640, $sformatf("EUBRS %0d exp 640", e.eubrs));
    check_rate(20);
    check_samples(20);
    // a cell 15 % longer is rejected
    ns = n_sync;
    pattern('{20, 20, 20, 23, 20, 20, 20, 20, 20});
    chk(n_sync == ns, "cell out of tolerance rejected");
    chk(e.eubrs == 16'd640, "rate kept");
    // cells within 1/16 are accepted; EUBRS = 4 * sum of the 8 cells
    ns = n_sync;
    pattern('{21, 20, 21, 20, 21, 20, 21, 20, 21});
    chk(n_sync == ns + 1, "cells within tolerance accepted");
    chk(e.eubrs == 16'(4 * (4 * 21 + 4 * 20)), $sformatf("EUBRS %0d exp 656", e.eubrs));
    // drift: resync to 24 ticks per cell
    pattern('{24, 24, 24, 24, 24, 24, 24, 24, 24});
    chk(e.eubrs == 16'd768, "resync to the new rate");
    check_rate(24);
    check_samples(24);
    // direct load by the control unit
    c.eubrs_wr = 1'b1; c.wval = 16'd320; step(); c.eubrs_wr = 1'b0;
    chk(e.eubrs == 16'd320, "EUBRS loaded");
    check_rate(10);
    // fractional rate: 10.5 ticks per bit, bit times of 10 and 11 ticks
    c.eubrs_wr = 1'b1; c.wval = 16'd336; step(); c.eubrs_wr = 1'b0;
    begin
      int last, n10, n11, other;
      last = -1; n10 = 0; n11 = 0; other = 0;
      for (int n = 0; n < 400; n++) begin
        step();
        if (e.bit_tick) begin
          if (last >= 0) begin
            if (ticks - last == 10) n10++; else if (ticks - last == 11) n11++; else other++;
          end
          last = ticks;
        end
      end
      chk(other == 0 && n10 > 0 && (n10 - n11 <= 1) && (n11 - n10 <= 1), "fraction honoured on average");
    end
    $display("ticks=%0d", ticks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
