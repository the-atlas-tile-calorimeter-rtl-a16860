// End-to-end test of a full drawer at the default sizes: 8 digitizer boards,
// 16 Tile-DMUs, 128-word pipelines at length 100 (2.5 us), 256-word buffer
// memories, majority vote over 16 copies of the link control lines. All
// boards see the same level-1 accepts; each of the 16 output streams is
// decoded and checked by its own tdmu_checker against ADC codes that differ
// per board and channel. Board 7 runs a longer readout delay and boards
// 6 and 7 a different output deskew, so the control lines of four Tile-DMUs
// disagree with the rest and the vote must follow the majority.
// Each mechanism is counted and must occur: overlapping frames, gain
// switching, refused accepts with full buffers, calibration and test modes,
// mode switches, readout delay, flow-control stall, vote disagreement, TTC
// error strobes reported in the headers of one board's streams. The dynamic
// parity of all Tile-DMUs programmed alike must agree in every clock.
module tile_drawer_tb;
  import tdmu_pkg::*;
  import tdmu_tb_pkg::*;
  localparam int NB = 8;
  localparam int ND = 2 * NB;
  logic clk = 0, rst_n = 1, link_full = 0;
  logic ro_clk [NB];
  logic [7:0] ttc_sub_addr [NB], ttc_data [NB];
  logic ttc_strobe [NB], ttc_sin_err [NB], ttc_dbl_err [NB], l1a [NB];
  adc_t [5:0] adc_hg [NB], adc_lg [NB];
  logic [1:0] data_out [ND];
  logic [7:0] ped_dac [ND];
  logic [ND-1:0] dmu_reg_parity, dmu_dyn_parity, dmu_evt_lost, dmu_mem_par_err;
  logic link_reset, link_ctrl, link_test, link_wen;
  logic rclk = 0;
  logic l1a_all = 0;
  longint cyc = 0;
  int checks = 0, failures = 0;
  int pipe_len = 100, n_smp = 16;
  mode_e exp_mode = MODE_NORMAL;
  int n_events [ND], n_flagged [ND], n_overlap [ND], n_errors [ND], n_checks [ND], pending [ND];
  int n_lost_hdr [ND], n_ttc_hdr [ND];
  int n_dyn_checked = 0;
  longint last_gap [ND];
  int n_lost = 0, n_disagree = 0, n_vote_checked = 0, n_mode_switch = 0, n_stall = 0;
  int n_wen_voted = 0;
  logic [3:0] exp_vote;

  tile_drawer dut (.*);

  for (genvar k = 0; k < ND; k++) begin : g_chk
    tdmu_checker #(.BOARD(k / 2), .DMU(k % 2)) u (.clk, .ro_clk(rclk), .rst_n, .cyc,
      .l1a(l1a_all), .evt_lost(dmu_evt_lost[k]), .sdata(data_out[k]), .pipe_len, .n_smp,
      .exp_mode, .n_events(n_events[k]), .n_flagged(n_flagged[k]), .n_overlap(n_overlap[k]),
      .n_errors(n_errors[k]), .n_checks(n_checks[k]), .pending(pending[k]),
      .n_lost_hdr(n_lost_hdr[k]), .n_ttc_hdr(n_ttc_hdr[k]), .last_gap(last_gap[k]));
  end

  always #5 clk = ~clk;
  initial begin #3; forever #5 rclk = ~rclk; end
  always_comb for (int b = 0; b < NB; b++) begin ro_clk[b] = rclk; l1a[b] = l1a_all; end
  initial #1 rst_n = 1'b0;  // falling edge for the asynchronous reset

  always @(negedge clk)
    for (int b = 0; b < NB; b++)
      for (int c = 0; c < 6; c++) begin
        adc_hg[b][c] = tdmu_tb_pkg::adc_hg(b, c, cyc);
        adc_lg[b][c] = tdmu_tb_pkg::adc_lg(b, c, cyc);
      end

  // majority reference for the voted control lines, one clock behind
  always @(posedge clk) begin
    logic [3:0] lines [ND];
    int ones;
    cyc <= cyc + 1;
    if (l1a_all && dmu_evt_lost[0]) n_lost++;
    // Tile-DMUs programmed alike (boards 0..6; board 7 has another readout
    // delay) must show the same dynamic parity in every clock
    if (rst_n && cyc > 5) begin
      n_dyn_checked++;
      checks++;
      if (dmu_dyn_parity[13:0] != {14{dmu_dyn_parity[0]}}) begin
        failures++;
        if (failures < 5) $display("dynamic parity differs @%0d: %b", cyc, dmu_dyn_parity);
      end
    end
    if (link_full && pending[0] != 0) n_stall++;
    if (link_wen) n_wen_voted++;
    if (rst_n && cyc > 5) begin
      n_vote_checked++;
      if ({link_reset, link_ctrl, link_test, link_wen} !== exp_vote) begin
        failures++;
        if (failures < 5) $display("vote mismatch @%0d: %b vs %b", cyc, {link_reset, link_ctrl, link_test, link_wen}, exp_vote);
      end
      checks++;
    end
    for (int k = 0; k < ND; k++) lines[k] = dut.lines[k];
    for (int l = 0; l < 4; l++) begin
      ones = 0;
      for (int k = 0; k < ND; k++) ones += int'(lines[k][l]);
      if (ones != 0 && ones != ND) n_disagree++;
      if (2 * ones > ND) exp_vote[l] <= 1'b1;
      else if (2 * ones < ND) exp_vote[l] <= 1'b0;
    end
    if (!rst_n) exp_vote <= 4'b1000;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_report();
  end

  function automatic int total(input int a [ND]);
    int s = 0;
    foreach (a[i]) s += a[i];
    return s;
  endfunction

  task automatic finish_report();
    $display("TB_RESULT checks=%0d failures=%0d", checks + total(n_checks), failures + total(n_errors));
    $finish;
  endtask

  task automatic chk(input string what, input logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s @%0d", what, cyc); end
  endtask
  // write a register; board < 0 broadcasts to all boards
  task automatic wr(input logic [5:0] r, input logic [7:0] d, input int board = -1);
    @(negedge clk);
    for (int b = 0; b < NB; b++) begin
      ttc_sub_addr[b] = {2'b10, r}; ttc_data[b] = d; ttc_strobe[b] = (board < 0 || board == b);
    end
    @(negedge clk);
    for (int b = 0; b < NB; b++) ttc_strobe[b] = 0;
  endtask
  task automatic trig(input int gap);
    @(negedge clk); l1a_all = 1; @(negedge clk); l1a_all = 0;
    repeat (gap) @(negedge clk);
  endtask
  task automatic drain();
    for (int k = 0; k < ND; k++) wait (pending[k] == 0);
    repeat (80) @(negedge clk);
  endtask
  task automatic set_mode(input mode_e m);
    wr(REG_MODE, 8'(m)); exp_mode = m; n_mode_switch++;
  endtask

  initial begin
    int ev0;
    for (int b = 0; b < NB; b++) begin
      ttc_sub_addr[b] = 0; ttc_data[b] = 0; ttc_strobe[b] = 0; ttc_sin_err[b] = 0; ttc_dbl_err[b] = 0;
    end
    repeat (3) @(negedge clk); rst_n = 1;
    wr(REG_THR_LO_L, 8'(THR_LO)); wr(REG_THR_LO_H, 8'(THR_LO >> 8));
    wr(REG_THR_HI_L, 8'(THR_HI)); wr(REG_THR_HI_H, 8'(THR_HI >> 8));
    for (int b = 6; b < NB; b++) wr(REG_DESKEW, 8'(b - 3), b);
    wr(REG_RO_DELAY, 8'd40, 7);
    wr(REG_FRAME_LEN, 8'd6); n_smp = 7;
    for (int b = 0; b < NB; b++) wr(REG_PED_DAC, 8'(16 * b + 1), b);
    repeat (200) @(negedge clk);
    for (int k = 0; k < ND; k++) chk("pedestal dac per board", ped_dac[k] == 8'(16 * (k / 2) + 1));
    chk("same registers, same parity", dmu_reg_parity[0] == dmu_reg_parity[1]);
    // normal mode, random accepts, some inside running frames
    for (int i = 0; i < 30; i++) begin
      trig((i % 5 == 0) ? 2 : $urandom_range(30, 200));
      if (i == 10) begin   // TTCrx error strobes on board 3 only
        @(negedge clk); ttc_sin_err[3] = 1; ttc_dbl_err[3] = 1;
        @(negedge clk); ttc_sin_err[3] = 0; ttc_dbl_err[3] = 0;
      end
    end
    drain();
    for (int k = 0; k < ND; k++)
      chk($sformatf("TTC errors reported on stream %0d", k), n_ttc_hdr[k] == ((k / 2 == 3) ? 1 : 0));
    // burst with 16-sample frames: buffers fill, accepts are refused
    wr(REG_FRAME_LEN, 8'd15); n_smp = 16;
    repeat (200) @(negedge clk);
    for (int i = 0; i < 36; i++) trig(13);
    drain();
    // calibration mode
    set_mode(MODE_CALIB);
    wr(REG_FRAME_LEN, 8'd4); n_smp = 5;
    repeat (300) @(negedge clk);
    for (int i = 0; i < 8; i++) trig($urandom_range(10, 150));
    drain();
    // test mode
    wr(REG_SEED_L, 8'h35); wr(REG_SEED_H, 8'h01);
    set_mode(MODE_TEST);
    repeat (300) @(negedge clk);
    for (int i = 0; i < 8; i++) trig($urandom_range(10, 150));
    drain();
    // back to normal, readout delay on all boards
    set_mode(MODE_NORMAL);
    wr(REG_FRAME_LEN, 8'd2); n_smp = 3;
    wr(REG_RO_DELAY, 8'd150);
    repeat (300) @(negedge clk);
    ev0 = n_events[0];
    trig(2); trig(2);
    wait (n_events[0] == ev0 + 2);
    chk($sformatf("readout delay (gap %0d)", last_gap[0]), last_gap[0] >= 150 && last_gap[0] <= 156);
    drain();
    wr(REG_RO_DELAY, 8'd0);
    // external flow control
    wr(REG_FC_EN, 8'd1);
    link_full = 1;
    ev0 = n_events[0];
    trig(4); trig(4);
    repeat (500) @(negedge clk);
    chk("flow control holds readout", n_events[0] == ev0);
    link_full = 0;
    drain();
    chk("readout resumes", n_events[0] == ev0 + 2);
    // every mechanism must have happened
    for (int k = 0; k < ND; k++) chk("events on every stream", n_events[k] == n_events[0] && n_events[0] > 60);
    chk("overlapping frames", n_overlap[0] >= 3);
    chk("gain switching", total(n_flagged) >= 16);
    chk("refused accepts", n_lost > 5);
    chk("lost event in header", n_lost_hdr[0] >= 1);
    chk("mode switches", n_mode_switch >= 3);
    chk("flow-control stall", n_stall > 400);
    chk("vote disagreement", n_disagree > 10);
    chk("voted write strobes", n_wen_voted > 100);
    chk("dynamic parity compared", n_dyn_checked > 10000);
    $display("events/stream %0d, flagged %0d, overlap %0d, lost %0d, stall %0d, disagree %0d, votes %0d",
             n_events[0], total(n_flagged), n_overlap[0], n_lost, n_stall, n_disagree, n_vote_checked);
    finish_report();
  end
endmodule
