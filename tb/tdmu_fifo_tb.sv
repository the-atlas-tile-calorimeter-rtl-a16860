// Random push/pop against a queue model; checks data order, count, empty and full.
module tdmu_fifo_tb;
  logic clk = 0, rst_n = 1, push = 0, pop = 0;
  logic [7:0] wdata = 0, rdata;
  logic empty, full, dyn_par;
  logic [5:0] count;
  logic [7:0] q [$];
  int checks = 0, failures = 0;

  tdmu_fifo #(.WIDTH(8), .DEPTH(32)) dut (.*);
  always #5 clk = ~clk;

  initial #1 rst_n = 1'b0;  // falling edge for the asynchronous reset

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit saw_full = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      int bias;
      bias = (t / 500) % 2 ? 30 : 70;   // phases that fill and that drain
      @(negedge clk);
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == 32) || count !== 6'(q.size()) ||
          (q.size() != 0 && rdata !== q[0])) begin
        failures++;
        if (failures < 5) $display("t=%0d size=%0d count=%0d rdata=%h", t, q.size(), count, rdata);
      end
      if (full) saw_full = 1;
      push = ($urandom_range(0, 99) < bias) && (q.size() < 32);
      pop  = ($urandom_range(0, 99) < 50) && (q.size() > 0);
      wdata = 8'($urandom);
      @(posedge clk); #1;
      if (pop) void'(q.pop_front());
      if (push) q.push_back(wdata);
      push = 0; pop = 0;
    end
    checks++; if (!saw_full) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
