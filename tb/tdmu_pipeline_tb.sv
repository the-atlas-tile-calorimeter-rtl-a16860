// Checks that the pipeline output equals its input `len` clocks earlier,
// for several lengths including the 2.5 us latency (100) and the full depth.
module tdmu_pipeline_tb;
  logic clk = 0, rst_n = 1;
  logic [7:0] len;
  logic [63:0] din, dout;
  logic dyn_par;
  logic [63:0] hist [$];
  int checks = 0, failures = 0;

  tdmu_pipeline dut (.*);
  always #5 clk = ~clk;

  initial #1 rst_n = 1'b0;  // falling edge for the asynchronous reset

  initial begin
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int lens [5] = '{2, 3, 17, 100, 128};
    din = 0; len = 2;
    repeat (2) @(negedge clk); rst_n = 1;
    foreach (lens[i]) begin
      len = 8'(lens[i]);
      hist.delete();
      for (int t = 0; t < 400; t++) begin
        din = {$urandom, $urandom};
        hist.push_front(din);
        @(negedge clk);
        // hist[0] was written at the last edge; a word written at edge k shows at dout
        // after edge k+len-1, i.e. len clocks after it left a register at edge k-1
        if (t >= lens[i] + 2) begin
          checks++;
          if (dout !== hist[lens[i]-1]) begin
            failures++;
            if (failures < 5) $display("len=%0d t=%0d got %h exp %h", lens[i], t, dout, hist[lens[i]-1]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
