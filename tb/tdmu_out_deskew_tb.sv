// Checks the programmable output delay (0..7 clocks) and the last stage on
// the deskewed clock, here running at the system frequency with a 3 ns phase
// offset: the output follows the input by delay clocks plus that offset.
module tdmu_out_deskew_tb;
  logic clk = 0, ro_clk = 0, rst_n = 1;
  logic [2:0] delay;
  logic [5:0] din = 0, dout;
  logic [5:0] hist [$];
  int checks = 0, failures = 0;

  tdmu_out_deskew dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;  // falling edge for the asynchronous reset

  initial begin #3; forever #5 ro_clk = ~ro_clk; end

  initial begin
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    delay = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int d = 0; d < 8; d++) begin
      delay = 3'(d);
      hist.delete();
      for (int t = 0; t < 60; t++) begin
        // din changes just after a rising edge, like a register output; the
        // ro_clk edge 3 ns after that rising edge captures the value din had
        // d clocks earlier
        @(posedge clk); #1;
        din = 6'($urandom);
        hist.push_front(din);
        #3;
        if (t > 10) begin
          checks++;
          if (dout !== hist[d]) begin
            failures++;
            if (failures < 5) $display("d=%0d t=%0d got %h exp %h", d, t, dout, hist[d]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
