// One digitizer board: six channels read out by two Tile-DMUs.
//
// A board digitizes six calorimeter channels with twelve ADCs (high and low
// gain per channel); Tile-DMU 0 takes channels 0-2 and Tile-DMU 1 channels
// 3-5 (document: two Tile-DMUs of three channels each, one TTCrx per board).
// The ADCs, the TTCrx and the pedestal DACs are not logic: the ADC codes
// enter as ports, and the TTCrx outputs (level-1 accept, command bus, error
// strobes, deskewed readout clock) are shared by both Tile-DMUs, which tell
// their register writes apart by sub-address bit 6 (bit 7 writes both).
// Each Tile-DMU has its own point-to-point 2-bit output and link lines.
module digitizer_board
  import tdmu_pkg::*;
#(
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
  input  adc_t [5:0]      adc_hg,
  input  adc_t [5:0]      adc_lg,
  input  logic            link_full,
  output logic [1:0]      data_out   [2],
  output logic [3:0]      link_lines [2],   // {reset, ctrl, test, wen}
  output logic [7:0]      ped_dac    [2],
  output logic [1:0]      reg_parity,
  output logic [1:0]      dyn_parity,
  output logic [1:0]      evt_lost,
  output logic [1:0]      mem_par_err
);
  for (genvar d = 0; d < 2; d++) begin : g_dmu
    tdmu #(.DMU_INDEX(d[0]), .PIPE_DEPTH(PIPE_DEPTH), .MEM_DEPTH(MEM_DEPTH), .N_BUF(N_BUF)) u_dmu (
      .clk, .rst_n, .ro_clk, .ttc_sub_addr, .ttc_data, .ttc_strobe, .ttc_sin_err, .ttc_dbl_err,
      .l1a, .adc_hg(adc_hg[3*d +: 3]), .adc_lg(adc_lg[3*d +: 3]), .link_full,
      .data_out(data_out[d]), .link_reset(link_lines[d][3]), .link_ctrl(link_lines[d][2]),
      .link_test(link_lines[d][1]), .link_wen(link_lines[d][0]), .ped_dac(ped_dac[d]),
      .reg_parity(reg_parity[d]), .dyn_parity(dyn_parity[d]), .evt_lost(evt_lost[d]),
      .mem_par_err(mem_par_err[d]));
  end
endmodule
