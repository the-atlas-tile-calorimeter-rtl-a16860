// Checks the walking pattern: seed after load, one-bit rotation per clock,
// lane offsets and inverted low-gain lanes.
module tdmu_pattern_gen_tb;
  import tdmu_pkg::*;
  logic clk = 0, rst_n = 1, load = 0;
  adc_t seed;
  sample_t pattern;
  int checks = 0, failures = 0;

  tdmu_pattern_gen dut (.*);
  always #5 clk = ~clk;

  initial #1 rst_n = 1'b0;  // falling edge for the asynchronous reset

  initial begin
    repeat (2000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [19:0] dbl;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int s = 0; s < 4; s++) begin
      seed = (s == 0) ? 10'h001 : 10'($urandom);
      @(negedge clk); load = 1; @(negedge clk); load = 0;
      for (int t = 0; t < 25; t++) begin
        for (int c = 0; c < 3; c++) begin
          // expected: seed rotated left by (t + c) bits
          dbl = {seed, seed} << ((t + c) % 10);
          checks++;
          if (pattern.hg[c] !== dbl[19:10] || pattern.lg[c] !== ~dbl[19:10]) begin
            failures++;
            if (failures < 5) $display("t=%0d c=%0d got %h exp %h", t, c, pattern.hg[c], dbl[19:10]);
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
