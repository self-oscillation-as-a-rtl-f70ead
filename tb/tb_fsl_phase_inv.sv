// tb_fsl_phase_inv - every bit keeps its logical value and changes its phase;
// exhaustive over all four FSL states per bit.
module tb_fsl_phase_inv;
  import fsl_pkg::*;
  localparam int W = 4;
  fsl_t [W-1:0] d, q;
  int checks = 0, failures = 0;

  fsl_phase_inv #(.W(W)) dut (.d, .q);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      d = 8'(v);
      #1;
      for (int i = 0; i < W; i++) begin
        checks++;
        if (q[i].a != d[i].a || fsl_phase(q[i]) == fsl_phase(d[i])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
