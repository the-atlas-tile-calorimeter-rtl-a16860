// Checks that a new mode is taken over only while the Tile-DMU is quiet, that
// the derived outputs follow the active mode, and the seed reload on entry to
// test mode.
module tdmu_mode_ctrl_tb;
  import tdmu_pkg::*;
  logic clk = 0, rst_n = 1;
  mode_e cfg_mode = MODE_NORMAL, mode;
  logic quiet = 0, use_pattern, link_test, pattern_load, switched;
  int checks = 0, failures = 0, n_switch = 0, n_load = 0;

  tdmu_mode_ctrl dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (switched) n_switch++;
    if (pattern_load) n_load++;
  end

  initial #1 rst_n = 1'b0;  // falling edge for the asynchronous reset

  initial begin
    repeat (2000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input string what, input logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    chk("reset normal", mode == MODE_NORMAL);
    cfg_mode = MODE_CALIB; quiet = 0;
    repeat (10) @(negedge clk);
    chk("held while busy", mode == MODE_NORMAL && n_switch == 0);
    quiet = 1; @(negedge clk); quiet = 0;
    chk("switch to calib", mode == MODE_CALIB && switched && !use_pattern && !link_test);
    cfg_mode = MODE_TEST;
    repeat (5) @(negedge clk);
    chk("test held", mode == MODE_CALIB);
    quiet = 1; @(negedge clk);
    chk("switch to test", mode == MODE_TEST && use_pattern && link_test);
    @(negedge clk);
    chk("seed loaded once", n_load == 1 && n_switch == 2);
    cfg_mode = MODE_NORMAL; @(negedge clk); @(negedge clk);
    chk("back to normal", mode == MODE_NORMAL && !use_pattern && n_load == 1 && n_switch == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
