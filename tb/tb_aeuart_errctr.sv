// tb_aeuart_errctr - the error control unit on its own against a reference
// model. Random transmitter state (busy, driven level), random tx_mid pulses,
// a random bus level that mostly agrees with the driven one, and occasional
// clear commands. After every tick the collision flag and the check pulse are
// compared with the model: a difference between bus and driven level at
// tx_mid while busy sets the sticky flag, clr_err clears it.
`include "tb_fsl_util.svh"
module tb_aeuart_errctr;
  import fsl_pkg::*;
  import aeuart_pkg::*;
  `TB_FSL_CODEC(TX_W, enc_tx, dec_tx)
  `TB_FSL_CODEC(CTRL_W, enc_ctrl, dec_ctrl)
  `TB_FSL_CODEC(EBR_W, enc_ebr, dec_ebr)
  `TB_FSL_CODEC(ERR_W, enc_err, dec_err)

  logic clk = 0, rst = 1, stall = 0, pass, c_done, fire, bus;
  fsl_t [TX_W-1:0]   tx_i;
  fsl_t [CTRL_W-1:0] ctrl_i;
  fsl_t [EBR_W-1:0]  ebr_i;
  fsl_t [ERR_W-1:0]  q;
  tx_t   tx;
  ctrl_t c;
  ebr_t  e;
  err_t  t, m;
  int checks = 0, failures = 0, n_set = 0, n_clr = 0, n_noset = 0;
  always #5 clk = ~clk;
  always @(negedge clk) stall <= ($urandom_range(0, 3) == 0);

  aeuart_errctr dut (.clk, .rst, .stall, .tx_i, .ctrl_i, .ebr_i, .bus_i(bus), .q_o(q), .pass,
                     .c_done, .fire_o(fire));

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
    t = err_t'(dec_err(q));
  endtask

  initial begin
    tx = '0; c = '0; e = '0; bus = 1'b1;
    tx_i = enc_tx(tx, 1'b0); ctrl_i = enc_ctrl(c, 1'b0); ebr_i = enc_ebr(e, 1'b0); pass = 1'b0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    m = '0;
    checks++; if (err_t'(dec_err(q)) != m) failures++;
    for (int n = 0; n < 3000; n++) begin
      tx.busy   = ($urandom_range(0, 3) != 0);
      tx.txd    = 1'($urandom);
      e.tx_mid  = ($urandom_range(0, 3) == 0);
      bus       = ($urandom_range(0, 15) == 0) ? ~tx.txd : tx.txd;
      c.clr_err = ($urandom_range(0, 29) == 0);
      m.chk = tx.busy && e.tx_mid;
      if (c.clr_err) begin m.coll = 1'b0; n_clr++; end
      else if (tx.busy && e.tx_mid && bus != tx.txd) begin m.coll = 1'b1; n_set++; end
      else if (bus != tx.txd) n_noset++;   // difference outside a check point
      step();
      checks++;
      if (t != m) begin
        failures++;
        $display("tick %0d: coll %b chk %b, expected %b %b", n, t.coll, t.chk, m.coll, m.chk);
      end
    end
    checks++; if (n_set == 0 || n_clr == 0 || n_noset == 0) failures++;
    $display("sets=%0d clears=%0d ignored=%0d", n_set, n_clr, n_noset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
