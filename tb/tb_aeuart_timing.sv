// tb_aeuart_timing - the timing unit on its own against a reference model.
// The testbench plays the transmitter, control unit and baud rate generator
// with random bit ticks, random timer loads and random (often hitting) match
// values, and after every tick compares timer and the match pulse with the
// model: the timer counts bit ticks, a load wins over counting, and match
// pulses for one tick while the armed match value equals the timer.
`include "tb_fsl_util.svh"
module tb_aeuart_timing;
  import fsl_pkg::*;
  import aeuart_pkg::*;
  `TB_FSL_CODEC(TX_W, enc_tx, dec_tx)
  `TB_FSL_CODEC(CTRL_W, enc_ctrl, dec_ctrl)
  `TB_FSL_CODEC(EBR_W, enc_ebr, dec_ebr)
  `TB_FSL_CODEC(TIM_W, enc_tim, dec_tim)

  logic clk = 0, rst = 1, stall = 0, pass, c_done, fire;
  fsl_t [TX_W-1:0]   tx_i;
  fsl_t [CTRL_W-1:0] ctrl_i;
  fsl_t [EBR_W-1:0]  ebr_i;
  fsl_t [TIM_W-1:0]  q;
  tx_t   tx;
  ctrl_t c;
  ebr_t  e;
  tim_t  t, m;
  int checks = 0, failures = 0, n_match = 0, n_load = 0, n_cnt = 0;
  always #5 clk = ~clk;
  always @(negedge clk) stall <= ($urandom_range(0, 3) == 0);

  aeuart_timing dut (.clk, .rst, .stall, .tx_i, .ctrl_i, .ebr_i, .q_o(q), .pass, .c_done,
                     .fire_o(fire));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    logic ph;
    ph = c_done;
    tx_i = enc_tx(tx, ~ph); ctrl_i = enc_ctrl(c, ~ph); ebr_i = enc_ebr(e, ~ph);
    pass = ph;
    do @(posedge clk); while (!fire);
    #1;
    t = tim_t'(dec_tim(q));
  endtask

  initial begin
    tx = '0; c = '0; e = '0;
    tx_i = enc_tx(tx, 1'b0); ctrl_i = enc_ctrl(c, 1'b0); ebr_i = enc_ebr(e, 1'b0); pass = 1'b0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    m = '0;
    checks++; if (tim_t'(dec_tim(q)) != m) failures++;
    for (int n = 0; n < 3000; n++) begin
      tx.busy     = 1'($urandom);
      e.bit_tick  = ($urandom_range(0, 2) == 0);
      c.timer_wr  = ($urandom_range(0, 19) == 0);
      c.wval      = (n % 500 == 0) ? 16'hFFFE : 16'($urandom);
      c.tm_armed  = 1'($urandom);
      c.tm_val    = ($urandom_range(0, 1) == 0) ? m.timer : 16'($urandom);
      // model
      m.match = c.tm_armed && (c.tm_val == m.timer);
      if (c.timer_wr) begin m.timer = c.wval; n_load++; end
      else if (e.bit_tick) begin m.timer = m.timer + 16'd1; n_cnt++; end
      if (m.match) n_match++;
      step();
      checks++;
      if (t != m) begin
        failures++;
        $display("tick %0d: timer %h match %b, expected %h %b", n, t.timer, t.match, m.timer, m.match);
      end
    end
    checks++; if (n_match == 0 || n_load == 0 || n_cnt == 0) failures++;
    $display("matches=%0d loads=%0d counts=%0d", n_match, n_load, n_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
