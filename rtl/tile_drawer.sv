// One TileCal drawer: the digitizer boards and the readout interface.
//
// A drawer holds up to eight digitizer boards in two chains of four, one on
// each side of the readout interface board in the middle (document). Each
// board carries two Tile-DMUs whose 2-bit serial outputs run point-to-point,
// through the other boards without active parts, to the interface, so 16
// streams arrive there. Every Tile-DMU also drives its own copy of the
// S-link control lines; the interface board majority-votes the 16 copies
// into one set (ctrl_vote). The chains are only a physical arrangement and
// have no logic. The TTCrx outputs of each board, the ADC codes and the
// link's flow-control flag are ports; the S-link card itself is outside.
// Stream k = 2*board + dmu.
module tile_drawer
  import tdmu_pkg::*;
#(
  parameter int unsigned N_BOARDS   = 8,
  parameter int unsigned PIPE_DEPTH = 128,
  parameter int unsigned MEM_DEPTH  = 256,
  parameter int unsigned N_BUF      = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ro_clk       [N_BOARDS],
  input  logic [7:0]      ttc_sub_addr [N_BOARDS],
  input  logic [7:0]      ttc_data     [N_BOARDS],
  input  logic            ttc_strobe   [N_BOARDS],
  input  logic            ttc_sin_err  [N_BOARDS],
  input  logic            ttc_dbl_err  [N_BOARDS],
  input  logic            l1a          [N_BOARDS],
  input  adc_t [5:0]      adc_hg       [N_BOARDS],
  input  adc_t [5:0]      adc_lg       [N_BOARDS],
  input  logic            link_full,
  output logic [1:0]      data_out     [2*N_BOARDS],
  output logic [7:0]      ped_dac      [2*N_BOARDS],
  output logic [2*N_BOARDS-1:0] dmu_reg_parity,
  output logic [2*N_BOARDS-1:0] dmu_dyn_parity,
  output logic [2*N_BOARDS-1:0] dmu_evt_lost,
  output logic [2*N_BOARDS-1:0] dmu_mem_par_err,
  output logic            link_reset,
  output logic            link_ctrl,
  output logic            link_test,
  output logic            link_wen
);
  logic [3:0] lines [2*N_BOARDS];

  for (genvar b = 0; b < N_BOARDS; b++) begin : g_board
    logic [1:0] d_out [2];
    logic [3:0] l_out [2];
    logic [7:0] p_dac [2];
    digitizer_board #(.PIPE_DEPTH(PIPE_DEPTH), .MEM_DEPTH(MEM_DEPTH), .N_BUF(N_BUF)) u_board (
      .clk, .rst_n, .ro_clk(ro_clk[b]), .ttc_sub_addr(ttc_sub_addr[b]), .ttc_data(ttc_data[b]),
      .ttc_strobe(ttc_strobe[b]), .ttc_sin_err(ttc_sin_err[b]), .ttc_dbl_err(ttc_dbl_err[b]),
      .l1a(l1a[b]), .adc_hg(adc_hg[b]), .adc_lg(adc_lg[b]), .link_full,
      .data_out(d_out), .link_lines(l_out), .ped_dac(p_dac),
      .reg_parity(dmu_reg_parity[2*b +: 2]), .dyn_parity(dmu_dyn_parity[2*b +: 2]),
      .evt_lost(dmu_evt_lost[2*b +: 2]), .mem_par_err(dmu_mem_par_err[2*b +: 2]));
    for (genvar d = 0; d < 2; d++) begin : g_d
      assign data_out[2*b+d] = d_out[d];
      assign lines[2*b+d]    = l_out[d];
      assign ped_dac[2*b+d]  = p_dac[d];
    end
  end

  logic [3:0] voted;
  ctrl_vote #(.N(2*N_BOARDS), .LINES(4)) u_vote (
    .clk, .rst_n, .lines_in(lines), .lines_out(voted));
  assign {link_reset, link_ctrl, link_test, link_wen} = voted;
endmodule
