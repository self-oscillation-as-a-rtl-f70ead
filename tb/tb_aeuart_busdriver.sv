// tb_aeuart_busdriver - the bus sampler and spike filter on its own.
// Part 1: random bus levels with random stalls. A model shift register
// records the bus value at every sample (sample_o) and the three sample
// outputs are compared with it after each sample; whenever the sampler has
// been stalled for two cycles (filter settled) bus_o must equal the majority
// of the samples. Part 2: without stalls, one-cycle spikes on an idle bus
// must never reach bus_o, while a level held for several cycles must.
module tb_aeuart_busdriver;
  logic clk = 0, rst = 1, stall = 0, bus_in = 1, bus_o, c_done, sample;
  logic [2:0] samples, m;
  bit   stall_on = 1;
  int   checks = 0, failures = 0, n_settled = 0, n_zero = 0;
  always #5 clk = ~clk;

  aeuart_busdriver dut (.clk, .rst, .stall, .bus_in, .samples_o(samples), .bus_o, .c_done,
                        .sample_o(sample));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic maj(input logic [2:0] x);
    return (x[0] & x[1]) | (x[1] & x[2]) | (x[0] & x[2]);
  endfunction

  // model and checks
  int quiet = 0;
  always @(posedge clk) if (!rst) begin
    if (sample) begin m <= {m[1:0], bus_in}; quiet <= 0; end
    else quiet <= quiet + 1;
  end
  always @(negedge clk) if (!rst) begin
    checks++;
    if (samples != m) begin failures++; $display("samples %b exp %b", samples, m); end
    if (quiet >= 3) begin
      n_settled++;
      checks++;
      if (bus_o != maj(m)) begin failures++; $display("bus_o %b exp %b", bus_o, maj(m)); end
    end
  end

  initial begin
    m = 3'b111;
    @(posedge clk); rst <= 0;
    // part 1
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      stall  = ($urandom_range(0, 2) != 0);
      if ($urandom_range(0, 5) == 0) bus_in = ~bus_in;
      if (n % 50 == 0) begin stall = 1; repeat (4) @(negedge clk); end
    end
    // part 2
    @(negedge clk); stall = 0; bus_in = 1;
    repeat (10) @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      @(negedge clk); bus_in = (n % 7 == 3) ? 1'b0 : 1'b1;
      checks++; if (!bus_o) begin failures++; n_zero++; end
    end
    bus_in = 0;
    repeat (8) @(negedge clk);
    checks++; if (bus_o) failures++;
    checks++; if (n_settled < 100) failures++;
    $display("settled checks=%0d spikes passed=%0d", n_settled, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
