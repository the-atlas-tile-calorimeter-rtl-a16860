// Digitizer board test: the two Tile-DMUs share the TTCrx bus and the level-1
// accepts but are programmed apart through sub-address bit 6 (different
// pipeline lengths, 100 and 60, and different frame lengths would break the
// shared accept, so the frame is broadcast). Each stream is checked by its own
// tdmu_checker against the channels it serves (0-2 and 3-5).
module digitizer_board_tb;
  import tdmu_pkg::*;
  import tdmu_tb_pkg::*;
  logic clk = 0, ro_clk = 0, rst_n = 1, link_full = 0;
  logic [7:0] ttc_sub_addr = 0, ttc_data = 0;
  logic ttc_strobe = 0, ttc_sin_err = 0, ttc_dbl_err = 0, l1a = 0;
  adc_t [5:0] adc_hg, adc_lg;
  logic [1:0] data_out [2];
  logic [3:0] link_lines [2];
  logic [7:0] ped_dac [2];
  logic [1:0] reg_parity, dyn_parity, evt_lost, mem_par_err;
  longint cyc = 0;
  int checks = 0, failures = 0;
  int pipe_len [2] = '{100, 60};
  int n_smp = 16;
  mode_e exp_mode = MODE_NORMAL;
  int n_events [2], n_flagged [2], n_overlap [2], n_errors [2], n_checks [2], pending [2], n_lost_hdr [2], n_ttc_hdr [2];
  longint last_gap [2];

  digitizer_board dut (.*);
  for (genvar d = 0; d < 2; d++) begin : g_chk
    tdmu_checker #(.BOARD(0), .DMU(d)) u (.clk, .ro_clk, .rst_n, .cyc, .l1a, .evt_lost(evt_lost[d]),
      .sdata(data_out[d]), .pipe_len(pipe_len[d]), .n_smp, .exp_mode, .n_events(n_events[d]),
      .n_flagged(n_flagged[d]), .n_overlap(n_overlap[d]), .n_errors(n_errors[d]),
      .n_checks(n_checks[d]), .pending(pending[d]), .n_lost_hdr(n_lost_hdr[d]), .n_ttc_hdr(n_ttc_hdr[d]), .last_gap(last_gap[d]));
  end

  always #5 clk = ~clk;
  initial begin #3; forever #5 ro_clk = ~ro_clk; end
  initial #1 rst_n = 1'b0;  // falling edge for the asynchronous reset
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk)
    for (int c = 0; c < 6; c++) begin
      adc_hg[c] = tdmu_tb_pkg::adc_hg(0, c, cyc);
      adc_lg[c] = tdmu_tb_pkg::adc_lg(0, c, cyc);
    end

  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks + n_checks[0] + n_checks[1], failures + n_errors[0] + n_errors[1]);
    $finish;
  end

  task automatic chk(input string what, input logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s @%0d", what, cyc); end
  endtask
  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    @(negedge clk); ttc_sub_addr = a; ttc_data = d; ttc_strobe = 1;
    @(negedge clk); ttc_strobe = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    wr(8'h80 | REG_THR_LO_L, 8'(THR_LO)); wr(8'h80 | REG_THR_LO_H, 8'(THR_LO >> 8));
    wr(8'h80 | REG_THR_HI_L, 8'(THR_HI)); wr(8'h80 | REG_THR_HI_H, 8'(THR_HI >> 8));
    wr(8'h80 | REG_FRAME_LEN, 8'd5); n_smp = 6;
    wr(8'h40 | REG_PIPE_LEN, 8'd60);          // Tile-DMU 1 only
    wr(8'h00 | REG_PED_DAC, 8'h11);           // Tile-DMU 0 only
    wr(8'h40 | REG_PED_DAC, 8'h22);           // Tile-DMU 1 only
    chk("pedestal settings apart", ped_dac[0] == 8'h11 && ped_dac[1] == 8'h22);
    repeat (200) @(negedge clk);
    for (int i = 0; i < 25; i++) begin
      @(negedge clk); l1a = 1; @(negedge clk); l1a = 0;
      repeat ($urandom_range(20, 300)) @(negedge clk);
    end
    wait (pending[0] == 0 && pending[1] == 0);
    repeat (50) @(negedge clk);
    chk("both streams complete", n_events[0] == 25 && n_events[1] == 25);
    chk("link lines agree", link_lines[0] == link_lines[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks + n_checks[0] + n_checks[1], failures + n_errors[0] + n_errors[1]);
    $finish;
  end
endmodule
