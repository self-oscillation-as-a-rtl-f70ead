// tb_fsl_phase_det - random FSL words, consistent and inconsistent, against a
// reference model of the phase detector (report the phase of a consistent
// word, hold the last one otherwise).
module tb_fsl_phase_det;
  import fsl_pkg::*;
  localparam int W = 5;
  logic clk = 0, rst = 1;
  fsl_t [W-1:0] d;
  logic cons, ph, ref_held;
  int checks = 0, failures = 0, n_cons = 0, n_incons = 0;
  always #5 clk = ~clk;

  fsl_phase_det #(.W(W), .INIT_PHASE(1'b1)) dut (.clk, .rst, .d, .consistent_o(cons), .phase_o(ph));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    ref_held = 1'b1;
    @(posedge clk); rst <= 0; @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      logic p;
      bit mixed;
      p = 1'($urandom);
      mixed = ($urandom_range(0, 2) == 0);
      for (int i = 0; i < W; i++) d[i] = fsl_enc(1'($urandom), p);
      if (mixed) begin
        int k = $urandom_range(0, W - 1);
        d[k] = fsl_flip(d[k]);
      end
      #1;
      checks++;
      if (mixed) begin
        n_incons++;
        if (cons || ph != ref_held) failures++;
      end else begin
        n_cons++;
        if (!cons || ph != p) failures++;
        ref_held = p;
      end
      @(posedge clk);
    end
    checks++; if (n_cons == 0 || n_incons == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
