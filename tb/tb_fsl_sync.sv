// tb_fsl_sync - C-element behaviour with an inverted input: the output
// follows an agreeing input set and holds otherwise; random sequences against
// a reference model.
module tb_fsl_sync;
  localparam int N = 3;
  logic clk = 0, rst = 1;
  logic [N-1:0] hs;
  logic o, ref_o;
  int checks = 0, failures = 0, n_hold = 0, n_set = 0, n_clr = 0;
  always #5 clk = ~clk;

  fsl_sync #(.N(N), .INV_MASK(3'b010), .INIT(1'b0)) dut (.clk, .rst, .hs_i(hs), .hs_o(o));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] v;
    hs = 3'b010;
    ref_o = 1'b0;
    @(posedge clk); rst <= 0; @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      hs = 3'($urandom);
      #1;
      v = hs ^ 3'b010;
      if (&v) begin ref_o = 1'b1; n_set++; end
      else if (~|v) begin ref_o = 1'b0; n_clr++; end
      else n_hold++;
      checks++;
      if (o != ref_o) failures++;
      @(posedge clk);
    end
    checks++; if (n_set == 0 || n_clr == 0 || n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
