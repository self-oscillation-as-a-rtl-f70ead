// tb_fsl_pipeline - empty and full four-stage pipelines between a source and
// a sink in the testbench, both with random stalls and random sink delays.
// The source issues numbered words as fast as the handshake allows; the sink
// takes each new wave. Checks: no word lost or duplicated (losslessness); the
// empty pipeline delivers the source words first (push), the full pipeline
// first delivers the four initial words, last stage first (pull); and the
// empty pipeline's first word reaches the sink in STAGES cycles when nothing
// stalls.
module tb_fsl_pipeline;
  import fsl_pkg::*;
  localparam int S = 4, W = 8;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // ---- two pipelines ----
  fsl_t [W-1:0] src_e, src_f, snk_e, snk_f;
  logic pass_e, pass_f, sc_e, sc_f;
  logic [S-1:0] st_e, st_f, fire_e, fire_f;
  bit   stall_on = 0;

  fsl_pipeline #(.STAGES(S), .W(W), .INIT_FULL(1'b0), .INIT_WORD(8'h10)) u_empty (
    .clk, .rst, .stall_i(st_e), .src_d(src_e), .src_pass(pass_e), .snk_q(snk_e),
    .snk_c_done(sc_e), .fire_o(fire_e)
  );
  fsl_pipeline #(.STAGES(S), .W(W), .INIT_FULL(1'b1), .INIT_WORD(8'h10)) u_full (
    .clk, .rst, .stall_i(st_f), .src_d(src_f), .src_pass(pass_f), .snk_q(snk_f),
    .snk_c_done(sc_f), .fire_o(fire_f)
  );

  always @(posedge clk) begin
    st_e <= stall_on ? S'($urandom) & S'($urandom) : '0;
    st_f <= stall_on ? S'($urandom) & S'($urandom) : '0;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] val(input fsl_t [W-1:0] x);
    logic [W-1:0] v;
    for (int i = 0; i < W; i++) v[i] = x[i].a;
    return v;
  endfunction

  function automatic fsl_t [W-1:0] enc(input logic [W-1:0] v, input logic p);
    fsl_t [W-1:0] x;
    for (int i = 0; i < W; i++) x[i] = fsl_enc(v[i], p);
    return x;
  endfunction

  // source: a new word whenever stage 0 has taken the current one
  int   sent_e = 0, sent_f = 0;
  logic sph_e, sph_f;
  always @(posedge clk) if (!rst) begin
    if (pass_e == sph_e) begin sph_e <= ~sph_e; src_e <= enc(W'(sent_e + 1), ~sph_e); sent_e <= sent_e + 1; end
    if (pass_f == sph_f) begin sph_f <= ~sph_f; src_f <= enc(W'(sent_f + 1), ~sph_f); sent_f <= sent_f + 1; end
  end

  // sink: takes a wave whose phase differs from its c_done, after a random delay
  logic [W-1:0] got_e[$], got_f[$];
  int   first_e = -1;
  int   cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (!rst) begin
    if (fsl_phase(snk_e[0]) != sc_e && (!stall_on || $urandom_range(0, 2) == 0)) begin
      sc_e <= ~sc_e; got_e.push_back(val(snk_e));
      if (first_e < 0) first_e = cyc;
    end
    if (fsl_phase(snk_f[0]) != sc_f && (!stall_on || $urandom_range(0, 2) == 0)) begin
      sc_f <= ~sc_f; got_f.push_back(val(snk_f));
    end
  end

  initial begin
    int start_cyc;
    // the source starts with a phase-0 word that stage 0 already holds
    sph_e = 1'b0; src_e = enc(8'h00, 1'b0); // current word equals stage 0: consumed
    sph_f = 1'b1; src_f = enc(8'h00, 1'b1);   // full: stage 0 holds phase 1
    sc_e = 1'b0;     // empty: sink has taken the last stage's wave (phase 0)
    sc_f = 1'b1;     // full: last stage holds phase 0, not yet taken
    repeat (2) @(posedge clk);
    rst <= 0;
    start_cyc = cyc;
    repeat (60) @(posedge clk);
    checks++;
    if (first_e - start_cyc > S + 2) begin failures++; $display("empty latency %0d", first_e - start_cyc); end
    stall_on = 1;
    repeat (3000) @(posedge clk);
    // empty: 1, 2, 3, ...
    for (int i = 0; i < got_e.size(); i++) begin
      checks++; if (got_e[i] != W'(i + 1)) failures++;
    end
    // full: initial words of stages 3, 2, 1, 0, then the source words
    for (int i = 0; i < got_f.size(); i++) begin
      logic [W-1:0] exp;
      exp = (i < S) ? W'(8'h10 + S - 1 - i) : W'(i - S + 1);
      checks++; if (got_f[i] != exp) begin failures++; $display("full[%0d]=%h exp %h", i, got_f[i], exp); end
    end
    checks++; if (got_e.size() < 100 || got_f.size() < 100) failures++;
    $display("delivered: empty %0d, full %0d", got_e.size(), got_f.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
