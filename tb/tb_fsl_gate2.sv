// tb_fsl_gate2 - the OR gate against the FSL truth table (same phase:
// OR of the values in that phase; different phases: hold), plus AND and XOR
// instances on the same random inputs.
module tb_fsl_gate2;
  import fsl_pkg::*;
  logic clk = 0, rst = 1;
  fsl_t x1, x2, y_or, y_and, y_xor, r_or, r_and, r_xor;
  int checks = 0, failures = 0, n_hold = 0, n_eval = 0;
  always #5 clk = ~clk;

  fsl_gate2 #(.OP(FSL_OR))  u_or  (.clk, .rst, .x1, .x2, .y(y_or));
  fsl_gate2 #(.OP(FSL_AND)) u_and (.clk, .rst, .x1, .x2, .y(y_and));
  fsl_gate2 #(.OP(FSL_XOR)) u_xor (.clk, .rst, .x1, .x2, .y(y_xor));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x1 = fsl_enc(0, 1); x2 = fsl_enc(0, 0);
    r_or = fsl_enc(0, 0); r_and = r_or; r_xor = r_or;
    @(posedge clk); rst <= 0; @(posedge clk);
    // a few points of the table written out
    x1 = 2'b10; x2 = 2'b01; #1;  // H, L (phase 1) -> H
    checks++; if (y_or != 2'b10) failures++;
    r_or = y_or; r_and = y_and; r_xor = y_xor;
    @(posedge clk);
    x1 = 2'b11; #1;              // h with L: inconsistent -> hold H
    checks++; if (y_or != 2'b10) failures++;
    @(posedge clk);
    x2 = 2'b00; #1;              // h, l -> h
    checks++; if (y_or != 2'b11) failures++;
    r_or = y_or; r_and = y_and; r_xor = y_xor;
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      x1 = 2'($urandom); x2 = 2'($urandom);
      #1;
      if (fsl_phase(x1) == fsl_phase(x2)) begin
        r_or  = fsl_enc(x1.a | x2.a, fsl_phase(x1));
        r_and = fsl_enc(x1.a & x2.a, fsl_phase(x1));
        r_xor = fsl_enc(x1.a ^ x2.a, fsl_phase(x1));
        n_eval++;
      end else n_hold++;
      checks += 3;
      if (y_or != r_or) failures++;
      if (y_and != r_and) failures++;
      if (y_xor != r_xor) failures++;
      @(posedge clk);
    end
    checks++; if (n_eval == 0 || n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
