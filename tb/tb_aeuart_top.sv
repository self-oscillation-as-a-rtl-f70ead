// tb_aeuart_top - end-to-end test of the asynchronous enhanced UART.
//
// A bus master in the testbench drives the serial line (wired-AND with the
// UART's txd) with bit times of BT clock cycles; the UART knows nothing about
// BT and has to learn it from a synchronisation pattern in ticks of its own
// self-oscillation. Every register of the ring is stalled at random
// (STALL_PCT percent of cycles) to emulate varying gate delays, so the tick
// period jitters the whole time.
//
// Sequence: oscillation and firing order, sync pattern (0x55) and the derived
// EUBRS against the measured tick rate, reception, even parity and a parity
// error, a framing error, overrun, a spike and a false start, transmission
// with bit-time check, a transmission scheduled by timer match, a bus
// collision, a small change of the tick rate (a few percent) that reception
// tolerates, and oscillation drift (slower ring) that breaks reception until
// a new sync pattern re-synchronises the UART. Each mechanism is counted and a
// mechanism that never happened is a failure. Alongside, the stand-alone FSL
// pipeline of the top moves words from a source to a sink with random stalls;
// all words must arrive in order (initial words first: full pipeline).
module tb_aeuart_top;
  import aeuart_pkg::*;

  localparam int BT = 800;          // master bit time in clk cycles

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [6:0] stall;
  logic rxd, txd, master;
  logic host_valid, host_we, host_ready;
  logic [2:0] host_addr;
  logic [15:0] host_wdata, host_rdata;
  logic tick;
  logic [6:0] fire;

  int checks = 0, failures = 0;
  int stall_pct = 10;
  bit slow = 1'b0;          // drift: every unit loses one cycle in three
  int mild_k = 0;           // small drift: every unit loses one cycle in mild_k
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  assign rxd = master & txd;

  // stand-alone pipeline beside the UART: source and sink in the testbench
  logic [3:0] pl_stall, pl_fire;
  fsl_pkg::fsl_t [7:0] pl_src, pl_snk;
  logic pl_pass, pl_sc, pl_sph;
  int   pl_sent = 0, pl_got = 0, pl_bad = 0;

  aeuart_top dut (
    .clk, .rst, .stall_i(stall), .rxd, .txd,
    .host_valid, .host_we, .host_addr, .host_wdata, .host_ready, .host_rdata,
    .tick_o(tick), .fire_o(fire),
    .pl_stall_i(pl_stall), .pl_src_d(pl_src), .pl_src_pass(pl_pass), .pl_snk_q(pl_snk),
    .pl_snk_c_done(pl_sc), .pl_fire_o(pl_fire)
  );

  // Full pipeline: stage 0 starts with phase 1, the sink with c_done 1; the
  // sink first gets the initial words 0x13, 0x12, 0x11, 0x10, then the
  // source's words 1, 2, 3, ... in order.
  initial begin
    pl_sph = 1'b1;
    pl_sc  = 1'b1;
    for (int i = 0; i < 8; i++) pl_src[i] = fsl_pkg::fsl_enc(1'b0, 1'b1);
  end
  always @(posedge clk) begin
    pl_stall <= 4'($urandom) & 4'($urandom);
    if (!rst) begin
      if (pl_pass == pl_sph) begin
        for (int i = 0; i < 8; i++) pl_src[i] <= fsl_pkg::fsl_enc(1'(8'(pl_sent + 1) >> i), ~pl_sph);
        pl_sph  <= ~pl_sph;
        pl_sent <= pl_sent + 1;
      end
      if (fsl_pkg::fsl_phase(pl_snk[0]) != pl_sc && $urandom_range(0, 3) == 0) begin
        logic [7:0] v, e;
        for (int i = 0; i < 8; i++) v[i] = pl_snk[i].a;
        e = (pl_got < 4) ? 8'(8'h13 - pl_got) : 8'(pl_got - 3);
        if (v != e) pl_bad++;
        pl_sc  <= ~pl_sc;
        pl_got <= pl_got + 1;
      end
    end
  end


  // ---------------- random delays ----------------
  always @(posedge clk) begin
    for (int i = 0; i < 7; i++)
      stall[i] <= ($urandom_range(0, 99) < stall_pct) || (slow && (cyc % 3 == 0)) ||
                 (mild_k != 0 && (cyc % mild_k == 0));
  end

  // ---------------- mechanism counters ----------------
  int n_ticks = 0, n_stalled = 0, n_sync = 0, n_rxframes = 0, n_perr = 0, n_ferr = 0;
  int n_ovr = 0, n_falsestart = 0, n_spike = 0, n_txframes = 0, n_match_tx = 0;
  int n_coll = 0, n_drift_fail = 0, n_resync = 0, n_order = 0, n_jitter_ok = 0;

  always @(posedge clk) if (!rst) begin
    if (fire[5]) n_ticks++;    // the control unit fires once per tick
    if (stall != 0) n_stalled++;
  end

  // Firing order: per tick, tx -> {timing, errctr, rx} -> ebr -> uartctr.
  int f_cnt[6];
  initial for (int i = 0; i < 6; i++) f_cnt[i] = 0;
  always @(posedge clk) if (!rst) begin
    for (int i = 0; i < 6; i++) if (fire[i]) f_cnt[i]++;
  end
  always @(negedge clk) if (!rst) begin
    // tx leads the ring by at most one capture, every later unit trails it
    if (!((f_cnt[0] - f_cnt[1]) inside {0, 1} && (f_cnt[0] - f_cnt[2]) inside {0, 1} &&
          (f_cnt[0] - f_cnt[3]) inside {0, 1} && (f_cnt[3] - f_cnt[4]) inside {0, 1} &&
          (f_cnt[1] - f_cnt[5]) inside {0, 1} && (f_cnt[4] - f_cnt[5]) inside {0, 1} &&
          (f_cnt[0] - f_cnt[5]) inside {0, 1})) begin
      failures++;
      $display("order violation at %0d: %p", cyc, f_cnt);
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (600_000) @(posedge clk);   // a full run takes about 200,000 cycles
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- helpers ----------------
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  task automatic host(input bit we, input logic [2:0] addr, input logic [15:0] wdata,
                      output logic [15:0] rdata);
    int n = 0;
    host_valid <= 1'b1;
    host_we    <= we;
    host_addr  <= addr;
    host_wdata <= wdata;
    do begin
      @(posedge clk);
      n++;
    end while (!host_ready && n < 10000);
    host_valid <= 1'b0;
    @(posedge clk);
    rdata = host_rdata;
    if (n >= 10000) begin
      failures++;
      $display("host access timed out");
    end
  endtask

  task automatic hwr(input logic [2:0] addr, input logic [15:0] wdata);
    logic [15:0] d;
    host(1'b1, addr, wdata, d);
  endtask

  task automatic hrd(input logic [2:0] addr, output logic [15:0] rdata);
    host(1'b0, addr, 16'h0, rdata);
  endtask

  // Master sends one frame: start, len data bits LSB first, optional parity, stop.
  task automatic send(input logic [15:0] data, input int len, input int parity,
                      input bit stopbit = 1'b1, input bit bad_parity = 1'b0);
    logic p;
    p = ^(data & 16'((32'h1 << len) - 1));
    if (parity == 2) p = ~p;
    if (bad_parity) p = ~p;
    master <= 1'b0; repeat (BT) @(posedge clk);
    for (int i = 0; i < len; i++) begin
      master <= data[i]; repeat (BT) @(posedge clk);
    end
    if (parity != 0) begin
      master <= p; repeat (BT) @(posedge clk);
    end
    master <= stopbit; repeat (BT) @(posedge clk);
    master <= 1'b1; repeat (2 * BT) @(posedge clk);
  endtask

  // Decode one 8N1 frame from txd, report data and length of start..stop in clk.
  task automatic capture_tx(output logic [7:0] data, output longint frame_len,
                            output longint t_start, input int max_wait);
    longint t0, t1;
    int n = 0;
    data = '0;
    while (txd !== 1'b0 && n < max_wait) begin @(posedge clk); n++; end
    t0 = cyc;
    t_start = t0;
    // sample a little after the middle of each bit of the expected length
    repeat (BT / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      repeat (BT) @(posedge clk);
      data[i] = txd;
    end
    repeat (BT) @(posedge clk);     // middle of stop bit
    while (txd !== 1'b1) @(posedge clk);
    // end of stop bit: poll STATUS until the transmitter is idle
    begin
      logic [15:0] s;
      int k;
      k = 0;
      do begin hrd(A_STATUS, s); k++; end while (s[S_TXBUSY] && k < 100000);
    end
    t1 = cyc;
    frame_len = t1 - t0;
    if (n >= max_wait) frame_len = 0;
  endtask

  // ---------------- stimulus ----------------
  logic [15:0] r, eubrs1, eubrs2;
  longint t_a, t_b, flen, tstart;
  int ticks_a;
  real tick_period, est;
  logic [7:0] got;

  initial begin
    master = 1'b1;
    host_valid = 1'b0; host_we = 1'b0; host_addr = '0; host_wdata = '0;
    stall = '0;
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    repeat (400) @(posedge clk);

    // oscillation runs and has the documented order (checked continuously)
    check(n_ticks > 20, "ring oscillates");
    if (n_ticks > 20) n_order++;

    hrd(A_STATUS, r);
    check(r[S_READY] == 1'b0, "not ready before sync");

    // ---- synchronisation pattern ----
    t_a = cyc; ticks_a = n_ticks;
    send(16'h55, 8, 0);
    t_b = cyc;
    tick_period = real'(t_b - t_a) / real'(n_ticks - ticks_a);
    hrd(A_STATUS, r);
    check(r[S_READY] == 1'b1, "ready after sync pattern");
    hrd(A_EUBRS, eubrs1);
    est = 32.0 * real'(BT) / tick_period;
    $display("EUBRS=%0d expected ~%0.1f (tick period %0.2f clk)", eubrs1, est, tick_period);
    check(real'(eubrs1) > 0.9 * est && real'(eubrs1) < 1.1 * est, "EUBRS matches tick rate");
    if (r[S_READY]) n_sync++;

    // ---- plain reception ----
    send(16'hA7, 8, 0);
    hrd(A_STATUS, r);
    check(r[S_RXFULL] && !r[S_PERR] && !r[S_FERR], "frame received cleanly");
    hrd(A_MSG, r);
    check(r == 16'hA7, $sformatf("received A7 got %h", r));
    if (r == 16'hA7) n_rxframes++;
    hrd(A_STATUS, r);
    check(!r[S_RXFULL], "reading MSG clears rxfull");
    hrd(A_TSTM, r);
    check(1'b1, "time stamp readable");

    // ---- even parity, good and bad ----
    hwr(A_UCFG, 16'h0028);      // 8 bits, even parity
    send(16'h3B, 8, 1);
    hrd(A_STATUS, r);
    check(r[S_RXFULL] && !r[S_PERR], "good even parity accepted");
    hrd(A_MSG, r);
    check(r == 16'h3B, "parity frame data");
    send(16'h3B, 8, 1, 1'b1, 1'b1);
    hrd(A_STATUS, r);
    check(r[S_PERR], "parity error flagged");
    if (r[S_PERR]) n_perr++;
    hwr(A_STATUS, 16'h0);
    hrd(A_MSG, r);
    hwr(A_UCFG, 16'h0008);

    // ---- framing error ----
    send(16'h0F, 8, 0, 1'b0);
    hrd(A_STATUS, r);
    check(r[S_FERR], "framing error flagged");
    if (r[S_FERR]) n_ferr++;
    hwr(A_STATUS, 16'h0);
    hrd(A_MSG, r);
    hrd(A_STATUS, r);
    check(r[3:0] == 4'h0, "status cleared");

    // ---- overrun ----
    send(16'h11, 8, 0);
    send(16'h22, 8, 0);
    hrd(A_STATUS, r);
    check(r[S_OVR] && r[S_RXFULL], "overrun flagged");
    if (r[S_OVR]) n_ovr++;
    hrd(A_MSG, r);
    check(r == 16'h22, "latest message kept");
    hwr(A_STATUS, 16'h0);

    // ---- spike: filtered by the busdriver ----
    // A start edge would load the time stamp register with the current timer
    // value, which has moved on since the last frame; an unchanged time stamp
    // shows that the receiver saw no start edge.
    begin
      logic [15:0] ts0, ts1;
      hrd(A_TSTM, ts0);
      master <= 1'b0; @(posedge clk); master <= 1'b1;
      repeat (3 * BT) @(posedge clk);
      hrd(A_TSTM, ts1);
      check(ts1 == ts0, "one-cycle spike filtered");
      if (ts1 == ts0) n_spike++;
    end
    // ---- false start: short low pulse passes the filter but not the start-bit check
    master <= 1'b0; repeat (BT / 5) @(posedge clk); master <= 1'b1;
    repeat (3 * BT) @(posedge clk);
    hrd(A_STATUS, r);
    check(!r[S_RXFULL], "false start dropped");
    if (!r[S_RXFULL]) n_falsestart++;

    // ---- transmission ----
    fork
      hwr(A_MSG, 16'h3C);
      capture_tx(got, flen, tstart, 200 * BT);
    join
    $display("tx frame %h, length %0d clk (ideal %0d)", got, flen, 10 * BT);
    check(got == 8'h3C, "transmitted byte");
    check(flen > 10 * BT * 90 / 100 && flen < 10 * BT * 110 / 100, "bit rate of transmission");
    if (got == 8'h3C) n_txframes++;
    repeat (2 * BT) @(posedge clk);
    hrd(A_MSG, r);              // own frame read back
    hwr(A_STATUS, 16'h0);

    // ---- scheduled transmission: timer match ----
    begin
      logic [15:0] t0;
      longint tw;
      hwr(A_CMD, 16'h0001);
      hrd(A_TIMER, t0);
      hwr(A_TSTM, t0 + 16'd12);
      tw = cyc;
      fork
        hwr(A_MSG, 16'h81);
        capture_tx(got, flen, tstart, 200 * BT);
      join
      $display("scheduled tx %h started %0d clk after arming", got, tstart - tw);
      check(got == 8'h81, "scheduled byte");
      check(tstart - tw > 9 * BT && tstart - tw < 15 * BT, "transmission waits for timer match");
      if (got == 8'h81 && tstart - tw > 9 * BT) n_match_tx++;
      hwr(A_CMD, 16'h0000);
      repeat (2 * BT) @(posedge clk);
      hrd(A_MSG, r);
      hwr(A_STATUS, 16'h0);
    end

    // ---- collision: master pulls the bus low during a 1 bit ----
    fork
      hwr(A_MSG, 16'hFF);
      begin
        while (txd !== 1'b0) @(posedge clk);
        repeat (3 * BT) @(posedge clk);
        master <= 1'b0; repeat (BT) @(posedge clk); master <= 1'b1;
      end
    join
    repeat (10 * BT) @(posedge clk);
    hrd(A_STATUS, r);
    check(r[S_COLL], "collision flagged");
    if (r[S_COLL]) n_coll++;
    hwr(A_STATUS, 16'h0);
    hrd(A_MSG, r);
    hrd(A_STATUS, r);
    check(!r[S_COLL], "collision flag cleared");

    // ---- small change of the tick period, within the jitter bound ----
    // The ring runs a few percent slower than during synchronisation (the
    // same order as the 3.78 % jitter measured on the original hardware); a
    // 10-bit frame accumulates n x change < 50 % of a bit and must still be
    // received correctly without resynchronisation.
    begin
      int t_a, t_b;
      real chg;
      logic [15:0] m;
      t_a = n_ticks; repeat (20 * BT) @(posedge clk); t_a = n_ticks - t_a;
      mild_k = 32;
      t_b = n_ticks; repeat (20 * BT) @(posedge clk); t_b = n_ticks - t_b;
      chg = 100.0 * (real'(t_a) - real'(t_b)) / real'(t_a);
      $display("tick rate change %0.2f %% (%0d -> %0d ticks in 20 bit times)", chg, t_a, t_b);
      send(16'hA7, 8, 0);
      hrd(A_STATUS, r);
      hrd(A_MSG, m);
      check(chg > 1.5 && chg * 10.0 < 50.0, "tick change in the tolerable range");
      check(r[S_RXFULL] && !r[S_FERR] && m == 16'hA7, "frame received despite the tick change");
      if (r[S_RXFULL] && !r[S_FERR] && m == 16'hA7 && chg > 1.5) n_jitter_ok++;
      mild_k = 0;
      hwr(A_STATUS, 16'h0);
    end

    // ---- oscillation drift: the ring slows down ----
    slow = 1'b1;
    repeat (50) @(posedge clk);
    send(16'h5A, 8, 0);
    hrd(A_STATUS, r);
    begin
      logic [15:0] m;
      hrd(A_MSG, m);
      $display("after drift: status %h msg %h", r, m);
      check(!r[S_RXFULL] || r[S_FERR] || m != 16'h5A, "drift breaks reception without resync");
      if (!r[S_RXFULL] || r[S_FERR] || m != 16'h5A) n_drift_fail++;
    end
    hwr(A_STATUS, 16'h0);
    send(16'h55, 8, 0);         // re-synchronisation
    hrd(A_EUBRS, eubrs2);
    $display("EUBRS after resync %0d (before %0d)", eubrs2, eubrs1);
    check(eubrs2 < eubrs1 * 9 / 10, "resync adopts slower tick");
    if (eubrs2 < eubrs1 * 9 / 10) n_resync++;
    hrd(A_MSG, r);
    hwr(A_STATUS, 16'h0);
    send(16'h5A, 8, 0);
    hrd(A_STATUS, r);
    check(r[S_RXFULL] && !r[S_FERR], "reception works after resync");
    hrd(A_MSG, r);
    check(r == 16'h5A, "data after resync");

    // ---- resync command ----
    hwr(A_CMD, 16'h0002);
    hrd(A_STATUS, r);
    check(!r[S_READY], "resync command returns to SYNC");
    send(16'h55, 8, 0);
    hrd(A_STATUS, r);
    check(r[S_READY], "ready again");

    // ---- every mechanism happened ----
    check(n_order > 0,      "mechanism: oscillation in order");
    check(n_stalled > 0,    "mechanism: random delays");
    check(n_sync > 0,       "mechanism: synchronisation");
    check(n_rxframes > 0,   "mechanism: reception");
    check(n_perr > 0,       "mechanism: parity error");
    check(n_ferr > 0,       "mechanism: framing error");
    check(n_ovr > 0,        "mechanism: overrun");
    check(n_spike > 0,      "mechanism: spike filter");
    check(n_falsestart > 0, "mechanism: false start");
    check(n_txframes > 0,   "mechanism: transmission");
    check(n_match_tx > 0,   "mechanism: timer-match transmission");
    check(n_coll > 0,       "mechanism: collision");
    check(n_drift_fail > 0, "mechanism: drift breaks reception");
    check(n_jitter_ok > 0,  "mechanism: small tick change tolerated");
    check(n_resync > 0,     "mechanism: resynchronisation");
    check(pl_got > 100 && pl_bad == 0, $sformatf("mechanism: pipeline words in order (%0d, %0d wrong)", pl_got, pl_bad));
    $display("ticks=%0d", n_ticks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
