// Checks the majority vote over 16 copies of four lines against a count
// made here: a line changes only when more than 8 copies show the new value.
module ctrl_vote_tb;
  logic clk = 0, rst_n = 1;
  logic [3:0] lines_in [16];
  logic [3:0] lines_out, expv;
  int checks = 0, failures = 0, n_tie = 0;

  ctrl_vote dut (.*);
  always #5 clk = ~clk;

  initial #1 rst_n = 1'b0;  // falling edge for the asynchronous reset

  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (lines_in[i]) lines_in[i] = '0;
    expv = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int target;
      // a chosen number of faulty copies disagree with the others
      for (int l = 0; l < 4; l++) begin
        int ones;
        target = $urandom_range(0, 16);
        for (int i = 0; i < 16; i++) lines_in[i][l] = (i < target);
        ones = target;
        if (ones > 8) expv[l] = 1'b1;
        else if (ones < 8) expv[l] = 1'b0;
        else n_tie++;
      end
      @(negedge clk);
      checks++;
      if (lines_out !== expv) begin
        failures++;
        if (failures < 5) $display("t=%0d got %b exp %b", t, lines_out, expv);
      end
    end
    checks++; if (n_tie == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
