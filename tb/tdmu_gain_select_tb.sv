// Checks per-sample limit comparison and the frame-long OR of the flags for
// several frame lengths, against a reference history kept in the testbench.
module tdmu_gain_select_tb;
  import tdmu_pkg::*;
  logic clk = 0, rst_n = 1;
  adc_t [2:0] hg;
  adc_t thr_lo = 10'd20, thr_hi = 10'd1000;
  logic [3:0] frame_len_m1;
  logic [2:0] sample_flags, frame_flags;
  logic [2:0] ref_hist [$];
  int checks = 0, failures = 0;

  tdmu_gain_select dut (.*);
  always #5 clk = ~clk;

  initial #1 rst_n = 1'b0;  // falling edge for the asynchronous reset

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    hg = '{default: 10'd500}; frame_len_m1 = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int f = 0; f < 16; f += 3) begin
      frame_len_m1 = 4'(f);
      for (int t = 0; t < 300; t++) begin
        logic [2:0] exp_s, exp_f;
        for (int c = 0; c < 3; c++) begin
          int r;
          r = $urandom_range(0, 99);
          hg[c] = (r < 4) ? 10'($urandom_range(0, 19)) : (r < 8) ? 10'($urandom_range(1001, 1023))
                : (r < 10) ? ((r == 8) ? 10'd20 : 10'd1000) : 10'($urandom_range(21, 999));
          exp_s[c] = (hg[c] < 20) || (hg[c] > 1000);
        end
        ref_hist.push_front(exp_s);
        exp_f = '0;
        if (t >= 16)
          for (int j = 0; j <= f; j++) exp_f |= ref_hist[j];
        #1;
        if (t >= 16) begin
          checks++;
          if (sample_flags !== exp_s || frame_flags !== exp_f) begin
            failures++;
            if (failures < 5) $display("f=%0d t=%0d s=%b/%b f=%b/%b", f, t, sample_flags, exp_s, frame_flags, exp_f);
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
