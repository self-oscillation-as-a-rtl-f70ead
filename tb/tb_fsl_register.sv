// tb_fsl_register - the FSL register against a reference model of its two
// switching conditions. Random input words (consistent in either phase or
// inconsistent), random pass values and random stalls; the model keeps its
// own stored word and held input phase and predicts every capture. Also
// checks the reset word and that c_done is the stored phase.
module tb_fsl_register;
  import fsl_pkg::*;
  localparam int W = 8;
  localparam logic [W-1:0] INIT = 8'hA5;
  logic clk = 0, rst = 1, stall, pass, c_done, fire;
  fsl_t [W-1:0] d, q, m_q;
  logic m_in;
  int checks = 0, failures = 0;
  int n_cap = 0, n_blk_pass = 0, n_blk_phase = 0, n_blk_stall = 0, n_incons = 0;
  always #5 clk = ~clk;

  fsl_register #(.W(W), .INIT(INIT), .INIT_PHASE(1'b1)) dut (
    .clk, .rst, .stall, .d, .q, .pass, .c_done, .fire_o(fire)
  );

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic word_phase(input fsl_t [W-1:0] x, output logic cons);
    logic p0 = fsl_phase(x[0]);
    cons = 1'b1;
    for (int i = 1; i < W; i++) if (fsl_phase(x[i]) != p0) cons = 1'b0;
    return p0;
  endfunction

  initial begin
    logic p, cons, en, out_ph;
    stall = 0; pass = 1; d = '0;
    for (int i = 0; i < W; i++) d[i] = fsl_enc(INIT[i], 1'b1);
    @(posedge clk); rst <= 0; #1;
    for (int i = 0; i < W; i++) m_q[i] = fsl_enc(INIT[i], 1'b1);
    m_in = 1'b1;
    checks++; if (q != m_q || c_done != 1'b1) failures++;
    for (int n = 0; n < 5000; n++) begin
      // drive: the source obeys the protocol and only moves on once the
      // register has taken its current wave; a moving word may be caught
      // half-way (inconsistent), which must never be captured
      if (m_in == fsl_phase(m_q[0])) begin
        case ($urandom_range(0, 3))
          0: ;  // keep
          1: begin  // part of the next wave has arrived
            p = ~m_in;
            for (int i = 0; i < W; i++) d[i] = fsl_enc(1'($urandom), (i < W/2) ? p : m_in);
          end
          default: begin
            p = ~m_in;
            for (int i = 0; i < W; i++) d[i] = fsl_enc(1'($urandom), p);
          end
        endcase
      end
      pass  = 1'($urandom);
      stall = ($urandom_range(0, 3) == 0);
      #1;
      // model
      p = word_phase(d, cons);
      if (cons) m_in = p; else n_incons++;
      out_ph = fsl_phase(m_q[0]);
      en = !stall && (m_in != out_ph) && (pass == out_ph);
      if (m_in != out_ph && pass != out_ph && !stall) n_blk_pass++;
      if (m_in == out_ph) n_blk_phase++;
      if (stall && m_in != out_ph && pass == out_ph) n_blk_stall++;
      checks++; if (fire != en) failures++;
      @(posedge clk);
      if (en) begin m_q = d; n_cap++; end
      #1;
      checks++;
      if (q != m_q || c_done != fsl_phase(m_q[0])) begin
        failures++;
        $display("mismatch at %0d", n);
      end
    end
    checks++;
    if (n_cap == 0 || n_blk_pass == 0 || n_blk_phase == 0 || n_blk_stall == 0 || n_incons == 0)
      failures++;
    $display("captures=%0d blocked(pass)=%0d blocked(phase)=%0d stalled=%0d", n_cap, n_blk_pass,
             n_blk_phase, n_blk_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
