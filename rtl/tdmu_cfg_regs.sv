// TTC-programmable registers of one Tile-DMU.
//
// The Tile-DMU is programmed with commands that the TTCrx chip receives on the
// TTC B channel and presents on its parallel bus: an 8-bit sub-address, 8 data
// bits and a strobe. Every item the document lists as programmable has a
// register here: pipeline length, time-frame length, readout mode, readout
// delay, external flow-control enable, the two gain-selection limits, the test
// pattern seed, the output deskew and the pedestal DAC setting. The register
// map, the reset values and the addressing are this design's own: sub-address
// bit 7 writes both Tile-DMUs of a board, bit 6 selects one of them, bits 5:0
// are the register index of tdmu_pkg::reg_e.
//
// reg_parity is the XOR of all register bits, one of the test points the
// document reports in the header. Writes take effect at the next clock edge.
module tdmu_cfg_regs
  import tdmu_pkg::*;
#(
  parameter bit DMU_INDEX = 1'b0   // which of the two Tile-DMUs on the board
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] sub_addr,
  input  logic [7:0] wdata,
  input  logic       wstrobe,
  output cfg_t       cfg,
  output logic       reg_parity
);
  logic sel;
  assign sel = wstrobe && (sub_addr[7] || (sub_addr[6] == DMU_INDEX));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.pipe_len     <= 8'd100;     // 2.5 us at 40 MHz
      cfg.frame_len_m1 <= 4'd15;      // 16 samples
      cfg.mode         <= MODE_NORMAL;
      cfg.ro_delay     <= 8'd0;
      cfg.fc_en        <= 1'b0;
      cfg.thr_lo       <= 10'd8;
      cfg.thr_hi       <= 10'd1015;
      cfg.seed         <= 10'h001;
      cfg.deskew       <= 3'd0;
      cfg.ped_dac      <= 8'd0;
    end else if (sel) begin
      case (reg_e'(sub_addr[5:0]))
        REG_PIPE_LEN:  cfg.pipe_len     <= wdata;
        REG_FRAME_LEN: cfg.frame_len_m1 <= wdata[3:0];
        REG_MODE:      cfg.mode         <= (wdata[1:0] == 2'd3) ? MODE_NORMAL : mode_e'(wdata[1:0]);
        REG_RO_DELAY:  cfg.ro_delay     <= wdata;
        REG_FC_EN:     cfg.fc_en        <= wdata[0];
        REG_THR_LO_L:  cfg.thr_lo[7:0]  <= wdata;
        REG_THR_LO_H:  cfg.thr_lo[9:8]  <= wdata[1:0];
        REG_THR_HI_L:  cfg.thr_hi[7:0]  <= wdata;
        REG_THR_HI_H:  cfg.thr_hi[9:8]  <= wdata[1:0];
        REG_SEED_L:    cfg.seed[7:0]    <= wdata;
        REG_SEED_H:    cfg.seed[9:8]    <= wdata[1:0];
        REG_DESKEW:    cfg.deskew       <= wdata[2:0];
        REG_PED_DAC:   cfg.ped_dac      <= wdata;
        default: ;
      endcase
    end
  end

  assign reg_parity = ^cfg;
endmodule
