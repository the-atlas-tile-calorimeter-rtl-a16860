// Tile-DMU: digital readout of three calorimeter channels.
//
// Each clock (40 MHz) the high- and low-gain 10-bit codes of three channels
// are registered, or, in test mode, replaced by the walking test pattern.
// Four overlapping parity bits are added and the 64-bit word enters the
// pipeline memory, which delays it by the programmed level-1 latency. At the
// pipeline output the high-gain codes are checked against the gain limits.
// A level-1 accept copies a time frame of up to 16 samples into the
// derandomizer buffer memory, recording its start address and its gain flags
// in the address and flag FIFOs. The readout controller turns each waiting
// event into a header and data words (one word per sample in normal mode,
// two in calibration and test modes); the serializer sends them two bits per
// clock framed by "11" ... CRC-16, "00"; a register chain ending in the
// deskewed TTCrx clock sets the output phase. The block structure is that of
// the document's block diagram; the detailed choices are described in each
// sub-module.
//
// Interface: TTCrx command bus (sub-address, data, strobe) for the registers;
// `l1a` level-1 accept, aligned with the sample that leaves the pipeline in
// the same clock (the frame starts there); TTCrx single/double error strobes;
// `link_full` for external flow control. Outputs: the 2-bit stream and the
// four S-link control lines (all through the deskew chain, on ro_clk), the
// pedestal DAC setting, the register and dynamic parity test points.
// Timing: an ADC code captured at clock edge k leaves the pipeline after edge
// k + pipe_len; a level-1 accept high in that clock starts the frame there.
module tdmu
  import tdmu_pkg::*;
#(
  parameter bit          DMU_INDEX  = 1'b0,
  parameter int unsigned PIPE_DEPTH = 128,
  parameter int unsigned MEM_DEPTH  = 256,
  parameter int unsigned N_BUF      = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ro_clk,
  input  logic [7:0]      ttc_sub_addr,
  input  logic [7:0]      ttc_data,
  input  logic            ttc_strobe,
  input  logic            ttc_sin_err,
  input  logic            ttc_dbl_err,
  input  logic            l1a,
  input  adc_t [N_CH-1:0] adc_hg,
  input  adc_t [N_CH-1:0] adc_lg,
  input  logic            link_full,
  output logic [1:0]      data_out,
  output logic            link_reset,
  output logic            link_ctrl,
  output logic            link_test,
  output logic            link_wen,
  output logic [7:0]      ped_dac,
  output logic            reg_parity,
  output logic            dyn_parity,
  output logic            evt_lost,
  output logic            mem_par_err
);
  localparam int unsigned AW = $clog2(MEM_DEPTH);

  cfg_t    cfg;
  mode_e   mode;
  logic    use_pattern, mode_test, pattern_load, mode_switched;
  sample_t sampled, pattern, selected;
  stored_t to_pipe;
  logic [WORD_BITS-1:0] from_pipe;
  stored_t from_pipe_s;
  logic [N_CH-1:0] sample_flags, frame_flags;
  logic            pipe_par, der_par;

  logic            evt_avail, evt_pop, release_evt, der_busy;
  logic [AW-1:0]   evt_addr, rd_addr;
  logic [N_CH-1:0] evt_flags;
  logic [WORD_BITS-1:0] rd_data;
  logic [$clog2(N_BUF):0] occupied;

  logic [RO_BITS-1:0] word;
  logic word_valid, word_ctrl, word_last, word_ready, ro_idle;
  logic [1:0] sdata;
  logic ser_wen, ser_ctrl, ser_busy, ser_underrun;
  logic rst_flag;

  tdmu_cfg_regs #(.DMU_INDEX(DMU_INDEX)) u_cfg (
    .clk, .rst_n, .sub_addr(ttc_sub_addr), .wdata(ttc_data), .wstrobe(ttc_strobe),
    .cfg, .reg_parity);
  assign ped_dac = cfg.ped_dac;

  tdmu_mode_ctrl u_mode (
    .clk, .rst_n, .cfg_mode(cfg.mode),
    .quiet(ro_idle && !der_busy && !evt_avail && !ser_busy && !l1a),
    .mode, .use_pattern, .link_test(mode_test), .pattern_load, .switched(mode_switched));

  tdmu_pattern_gen u_pat (.clk, .rst_n, .load(pattern_load), .seed(cfg.seed), .pattern);

  // input register for the ADC codes
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sampled <= '0;
    else begin
      sampled.hg <= adc_hg;
      sampled.lg <= adc_lg;
    end
  end

  assign selected     = use_pattern ? pattern : sampled;
  assign to_pipe.data = selected;
  tdmu_parity4 u_addpar (.data(selected), .par(to_pipe.par));

  tdmu_pipeline #(.WIDTH(WORD_BITS), .DEPTH(PIPE_DEPTH)) u_pipe (
    .clk, .rst_n, .len(cfg.pipe_len), .din(to_pipe), .dout(from_pipe), .dyn_par(pipe_par));
  assign from_pipe_s = stored_t'(from_pipe);

  tdmu_gain_select u_gain (
    .clk, .rst_n, .hg(from_pipe_s.data.hg), .thr_lo(cfg.thr_lo), .thr_hi(cfg.thr_hi),
    .frame_len_m1(cfg.frame_len_m1), .sample_flags, .frame_flags);

  tdmu_derand #(.MEM_DEPTH(MEM_DEPTH), .N_BUF(N_BUF)) u_der (
    .clk, .rst_n, .frame_len_m1(cfg.frame_len_m1), .l1a, .sample(from_pipe),
    .frame_flags, .evt_avail, .evt_addr, .evt_flags, .evt_pop, .release_evt(release_evt),
    .rd_addr, .rd_data, .lost(evt_lost), .occupied, .busy(der_busy), .dyn_par(der_par));

  tdmu_ro_ctrl #(.AW(AW)) u_ro (
    .clk, .rst_n, .mode, .frame_len_m1(cfg.frame_len_m1), .ro_delay(cfg.ro_delay),
    .fc_en(cfg.fc_en), .link_full, .evt_avail, .evt_addr, .evt_flags, .evt_pop,
    .release_evt, .rd_addr, .rd_data, .ttc_sin_err, .ttc_dbl_err, .lost_evt(evt_lost),
    .reg_parity, .dyn_parity, .word, .word_valid, .word_ctrl, .word_last, .word_ready,
    .ser_idle(!ser_busy), .idle(ro_idle), .par_err(mem_par_err));

  tdmu_serializer u_ser (
    .clk, .rst_n, .word, .word_valid, .word_ctrl, .word_last, .word_ready,
    .sdata, .link_wen(ser_wen), .link_ctrl(ser_ctrl), .busy(ser_busy), .underrun(ser_underrun));

  assign dyn_parity = pipe_par ^ der_par ^ (^{ro_idle, ser_busy, mode});

  // link reset: high during reset and the first clock after it
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rst_flag <= 1'b1;
    else        rst_flag <= 1'b0;
  end

  tdmu_out_deskew #(.WIDTH(6), .MAX_DELAY(7)) u_deskew (
    .clk, .rst_n, .ro_clk, .delay(cfg.deskew),
    .din({rst_flag, ser_ctrl, mode_test, ser_wen, sdata}),
    .dout({link_reset, link_ctrl, link_test, link_wen, data_out}));

  a_occupancy:   assert property (@(posedge clk) disable iff (!rst_n) occupied <= ($bits(occupied))'(N_BUF));
  a_no_underrun: assert property (@(posedge clk) disable iff (!rst_n) !ser_underrun);
endmodule
