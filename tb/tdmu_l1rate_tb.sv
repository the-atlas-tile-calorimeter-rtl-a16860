// Sustained readout at the level-1 trigger rate, one Tile-DMU at its default
// sizes: 7-sample frames in normal mode, pipeline length 100 (2.5 us), and
// accepts at random intervals with a mean of 400 clocks (100 kHz at 40 MHz),
// never closer than 5 clocks. Each event occupies the line for 138 clocks, so
// the buffers must absorb the bursts and no accept may be refused. Every
// event is checked by tdmu_checker; the peak buffer use is reported.
module tdmu_l1rate_tb;
  import tdmu_pkg::*;
  import tdmu_tb_pkg::*;
  localparam int N_ACCEPTS = 400;
  logic clk = 0, ro_clk = 0, rst_n = 1;
  logic [7:0] ttc_sub_addr = 0, ttc_data = 0;
  logic ttc_strobe = 0, ttc_sin_err = 0, ttc_dbl_err = 0, l1a = 0, link_full = 0;
  adc_t [2:0] adc_hg, adc_lg;
  logic [1:0] data_out;
  logic link_reset, link_ctrl, link_test, link_wen, reg_parity, dyn_parity, evt_lost, mem_par_err;
  logic [7:0] ped_dac;
  longint cyc = 0;
  int checks = 0, failures = 0;
  int pipe_len = 100, n_smp = 7;
  mode_e exp_mode = MODE_NORMAL;
  int n_events, n_flagged, n_overlap, n_errors, n_checks, pending, n_lost_hdr, n_ttc_hdr;
  longint last_gap;
  int n_lost = 0, peak = 0;
  longint t_first = 0, t_last = 0;

  tdmu dut (.*);
  tdmu_checker #(.BOARD(0), .DMU(0)) chk_u (.clk, .ro_clk, .rst_n, .cyc, .l1a, .evt_lost,
    .sdata(data_out), .pipe_len, .n_smp, .exp_mode, .n_events, .n_flagged, .n_overlap,
    .n_errors, .n_checks, .pending, .n_lost_hdr, .n_ttc_hdr, .last_gap);

  always #5 clk = ~clk;
  initial begin #3; forever #5 ro_clk = ~ro_clk; end
  initial #1 rst_n = 1'b0;  // falling edge for the asynchronous reset

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (l1a && evt_lost) n_lost++;
    if (pending > peak) peak = pending;
  end
  always @(negedge clk)
    for (int c = 0; c < 3; c++) begin
      adc_hg[c] = tdmu_tb_pkg::adc_hg(0, c, cyc);
      adc_lg[c] = tdmu_tb_pkg::adc_lg(0, c, cyc);
    end

  initial begin
    repeat (400000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks + n_checks, failures + n_errors); $finish;
  end

  task automatic chk(input string what, input logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s @%0d", what, cyc); end
  endtask
  task automatic wr(input logic [5:0] r, input logic [7:0] d);
    @(negedge clk); ttc_sub_addr = {2'b10, r}; ttc_data = d; ttc_strobe = 1;
    @(negedge clk); ttc_strobe = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    wr(REG_THR_LO_L, 8'(THR_LO)); wr(REG_THR_LO_H, 8'(THR_LO >> 8));
    wr(REG_THR_HI_L, 8'(THR_HI)); wr(REG_THR_HI_H, 8'(THR_HI >> 8));
    wr(REG_FRAME_LEN, 8'(n_smp - 1));
    repeat (200) @(negedge clk);
    t_first = cyc;
    for (int i = 0; i < N_ACCEPTS; i++) begin
      int gap;
      // exponential spacing, mean 400 clocks, at least 5
      gap = 5 + int'(-395.0 * $ln(1.0 - real'($urandom_range(0, 999999)) / 1000000.0));
      @(negedge clk); l1a = 1; @(negedge clk); l1a = 0;
      repeat (gap) @(negedge clk);
    end
    t_last = cyc;
    wait (pending == 0);
    repeat (200) @(negedge clk);
    chk("no accept refused", n_lost == 0);
    chk("all events read", n_events == N_ACCEPTS);
    chk("mean spacing near 400 clocks", (t_last - t_first) / N_ACCEPTS > 300 && (t_last - t_first) / N_ACCEPTS < 500);
    $display("accepts %0d, mean spacing %0d clocks, peak events waiting %0d, refused %0d",
             N_ACCEPTS, (t_last - t_first) / N_ACCEPTS, peak, n_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks + n_checks, failures + n_errors);
    $finish;
  end
endmodule
