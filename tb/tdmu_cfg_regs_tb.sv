// Checks register writes, DMU selection, broadcast and register parity.
module tdmu_cfg_regs_tb;
  import tdmu_pkg::*;
  logic clk = 0, rst_n = 1;
  logic [7:0] sub_addr = 0, wdata = 0;
  logic wstrobe = 0;
  cfg_t cfg;
  logic reg_parity;
  int checks = 0, failures = 0;

  tdmu_cfg_regs #(.DMU_INDEX(1'b1)) dut (.*);
  always #5 clk = ~clk;

  initial #1 rst_n = 1'b0;  // falling edge for the asynchronous reset

  initial begin
    repeat (1000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    @(negedge clk); sub_addr = a; wdata = d; wstrobe = 1;
    @(negedge clk); wstrobe = 0;
  endtask
  task automatic chk(input string what, input logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    chk("reset pipe_len", cfg.pipe_len == 8'd100);
    chk("reset frame", cfg.frame_len_m1 == 4'd15);
    chk("reset mode", cfg.mode == MODE_NORMAL);
    wr(8'h40 | 8'd0, 8'd77);                 // DMU 1: pipeline length
    chk("pipe_len", cfg.pipe_len == 8'd77);
    wr(8'h00 | 8'd0, 8'd33);                 // DMU 0 only: ignored here
    chk("other dmu ignored", cfg.pipe_len == 8'd77);
    wr(8'h80 | 8'd1, 8'd6);                  // broadcast: frame length 7
    chk("broadcast frame", cfg.frame_len_m1 == 4'd6);
    wr(8'h40 | 8'd2, 8'd1);
    chk("mode calib", cfg.mode == MODE_CALIB);
    wr(8'h40 | 8'd2, 8'd3);
    chk("mode 3 -> normal", cfg.mode == MODE_NORMAL);
    wr(8'h40 | 8'd3, 8'd42);  chk("ro_delay", cfg.ro_delay == 8'd42);
    wr(8'h40 | 8'd4, 8'd1);   chk("fc_en", cfg.fc_en == 1'b1);
    wr(8'h40 | 8'd5, 8'h34); wr(8'h40 | 8'd6, 8'h01); chk("thr_lo", cfg.thr_lo == 10'h134);
    wr(8'h40 | 8'd7, 8'h21); wr(8'h40 | 8'd8, 8'h03); chk("thr_hi", cfg.thr_hi == 10'h321);
    wr(8'h40 | 8'd9, 8'h5A); wr(8'h40 | 8'd10, 8'h02); chk("seed", cfg.seed == 10'h25A);
    wr(8'h40 | 8'd11, 8'd5);  chk("deskew", cfg.deskew == 3'd5);
    wr(8'h40 | 8'd12, 8'hC3); chk("ped_dac", cfg.ped_dac == 8'hC3);
    chk("reg parity", reg_parity == ^{8'd77, 4'd6, 2'd0, 8'd42, 1'b1, 10'h134, 10'h321, 10'h25A, 3'd5, 8'hC3});
    wr(8'h40 | 8'd3, 8'd43);
    chk("reg parity flips", reg_parity == ~^{8'd77, 4'd6, 2'd0, 8'd42, 1'b1, 10'h134, 10'h321, 10'h25A, 3'd5, 8'hC3});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
