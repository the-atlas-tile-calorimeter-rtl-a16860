// Tile-DMU end-to-end test at its default sizes (128-word pipeline, 256-word
// buffer memory, 32 buffers), pipeline length 100 (2.5 us). Registers are
// written over the TTCrx command bus; ADC codes come from tdmu_tb_pkg and
// every event is checked by tdmu_checker. Phases: normal mode with 7-sample
// frames, overlapping accepts and gain switching; a burst of accepts with
// 16-sample frames that fills all 16 buffers so accepts are refused;
// calibration mode; test mode; a programmed delay between readout cycles;
// external flow control holding the readout back.
module tdmu_tb;
  import tdmu_pkg::*;
  import tdmu_tb_pkg::*;
  logic clk = 0, ro_clk = 0, rst_n = 1;
  logic [7:0] ttc_sub_addr = 0, ttc_data = 0;
  logic ttc_strobe = 0, ttc_sin_err = 0, ttc_dbl_err = 0, l1a = 0, link_full = 0;
  adc_t [2:0] adc_hg, adc_lg;
  logic [1:0] data_out;
  logic link_reset, link_ctrl, link_test, link_wen, reg_parity, dyn_parity, evt_lost, mem_par_err;
  logic [7:0] ped_dac;
  longint cyc = 0;
  int checks = 0, failures = 0;
  int pipe_len = 100, n_smp = 16;
  mode_e exp_mode = MODE_NORMAL;
  int n_events, n_flagged, n_overlap, n_errors, n_checks, pending, n_lost_hdr, n_ttc_hdr;
  longint last_gap;
  int n_lost = 0, n_wen = 0, n_ctrl = 0, n_test = 0;

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
  end
  always @(posedge ro_clk) begin
    if (link_wen) n_wen++;
    if (link_ctrl) n_ctrl++;
    if (link_test) n_test++;
  end
  always @(negedge clk) begin
    for (int c = 0; c < 3; c++) begin
      adc_hg[c] = tdmu_tb_pkg::adc_hg(0, c, cyc);
      adc_lg[c] = tdmu_tb_pkg::adc_lg(0, c, cyc);
    end
  end

  initial begin
    repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks + n_checks, failures + n_errors); $finish;
  end

  task automatic chk(input string what, input logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s @%0d", what, cyc); end
  endtask
  task automatic wr(input logic [5:0] r, input logic [7:0] d);
    @(negedge clk); ttc_sub_addr = {2'b10, r}; ttc_data = d; ttc_strobe = 1;
    @(negedge clk); ttc_strobe = 0;
  endtask
  task automatic trig(input int gap);
    @(negedge clk); l1a = 1; @(negedge clk); l1a = 0;
    repeat (gap) @(negedge clk);
  endtask
  task automatic drain();
    wait (pending == 0); repeat (50) @(negedge clk);
  endtask

  initial begin
    int ev0;
    repeat (3) @(negedge clk); rst_n = 1;
    wr(REG_THR_LO_L, 8'(THR_LO)); wr(REG_THR_LO_H, 8'(THR_LO >> 8));
    wr(REG_THR_HI_L, 8'(THR_HI)); wr(REG_THR_HI_H, 8'(THR_HI >> 8));
    wr(REG_FRAME_LEN, 8'd6); n_smp = 7;
    wr(REG_PED_DAC, 8'h5A);
    chk("pedestal dac", ped_dac == 8'h5A);
    repeat (200) @(negedge clk);
    // normal mode, some accepts inside running frames
    for (int i = 0; i < 40; i++) trig((i % 4 == 0) ? 3 : $urandom_range(20, 150));
    drain();
    chk("overlapping frames seen", n_overlap >= 5);
    chk("gain switching seen", n_flagged >= 3);
    // burst: 16-sample frames, 16 buffers, accepts every 12 clocks
    wr(REG_FRAME_LEN, 8'd15); n_smp = 16;
    repeat (200) @(negedge clk);
    for (int i = 0; i < 40; i++) trig(11);
    drain();
    chk("accepts refused when full", n_lost > 5);
    chk("lost event reported in a header", n_lost_hdr >= 1);
    // calibration mode
    wr(REG_MODE, 8'(MODE_CALIB)); exp_mode = MODE_CALIB;
    wr(REG_FRAME_LEN, 8'd3); n_smp = 4;
    repeat (300) @(negedge clk);
    for (int i = 0; i < 10; i++) trig($urandom_range(5, 100));
    drain();
    // test mode
    wr(REG_SEED_L, 8'h23); wr(REG_MODE, 8'(MODE_TEST)); exp_mode = MODE_TEST;
    wr(REG_FRAME_LEN, 8'd4); n_smp = 5;
    repeat (300) @(negedge clk);
    for (int i = 0; i < 10; i++) trig($urandom_range(5, 100));
    drain();
    chk("test line raised in test mode", n_test > 0);
    // readout delay: three accepts at once, events must be 200 clocks apart
    wr(REG_MODE, 8'(MODE_NORMAL)); exp_mode = MODE_NORMAL;
    wr(REG_FRAME_LEN, 8'd1); n_smp = 2;
    wr(REG_RO_DELAY, 8'd200);
    repeat (300) @(negedge clk);
    ev0 = n_events;
    trig(2); trig(2); trig(2);
    wait (n_events == ev0 + 2);
    chk($sformatf("readout delay (gap %0d)", last_gap), last_gap >= 200 && last_gap <= 206);
    drain();
    wr(REG_RO_DELAY, 8'd0);
    // external flow control
    wr(REG_FC_EN, 8'd1);
    link_full = 1;
    ev0 = n_events;
    trig(3); trig(3);
    repeat (600) @(negedge clk);
    chk("flow control holds readout", n_events == ev0);
    link_full = 0;
    drain();
    chk("readout resumes", n_events == ev0 + 2);
    chk($sformatf("one ctrl per event (%0d, %0d)", n_ctrl, n_events), n_ctrl == n_events && n_wen > n_events);
    chk("events read", n_events > 70);
    $display("events %0d flagged %0d overlap %0d lost %0d", n_events, n_flagged, n_overlap, n_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks + n_checks, failures + n_errors);
    $finish;
  end
endmodule
