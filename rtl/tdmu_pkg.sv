// Tile-DMU shared types and constants.
//
// The Tile-DMU digitizes-side logic handles three calorimeter channels, each
// sampled by a high-gain and a low-gain 10-bit ADC every 25 ns. This package
// holds the sizes that the document gives (10-bit samples, three channels,
// 64-bit stored words made of 60 data bits and 4 parity bits, 32-bit readout
// words, time frames of up to 16 samples), the three readout modes, the
// register map of the TTC-programmable registers (a choice of this design),
// and the CRC-16 step used by the serializer (CRC-16-CCITT, x^16+x^12+x^5+1,
// also a choice of this design: the document only says "CRC-16").
package tdmu_pkg;

  localparam int unsigned ADC_BITS   = 10;  // 10-bit ADCs
  localparam int unsigned N_CH       = 3;   // channels per Tile-DMU
  localparam int unsigned DATA_BITS  = 2 * N_CH * ADC_BITS;  // 60
  localparam int unsigned PAR_BITS   = 4;   // parity bits added before the pipeline
  localparam int unsigned WORD_BITS  = DATA_BITS + PAR_BITS;  // 64
  localparam int unsigned RO_BITS    = 32;  // readout word
  localparam int unsigned MAX_FRAME  = 16;  // samples per time frame, at most

  typedef logic [ADC_BITS-1:0] adc_t;

  // One stored sample: high- and low-gain codes of three channels.
  // Bit layout of the 60 data bits: {lg[2], lg[1], lg[0], hg[2], hg[1], hg[0]}.
  typedef struct packed {
    adc_t [N_CH-1:0] lg;
    adc_t [N_CH-1:0] hg;
  } sample_t;

  typedef struct packed {
    logic [PAR_BITS-1:0] par;
    sample_t             data;
  } stored_t;

  typedef enum logic [1:0] {
    MODE_NORMAL = 2'd0,  // one word per sample, gain chosen per channel
    MODE_CALIB  = 2'd1,  // high- and low-gain words for every sample
    MODE_TEST   = 2'd2   // pattern generator replaces the ADC data
  } mode_e;

  // Register map (6-bit register index on the TTCrx sub-address bus).
  typedef enum logic [5:0] {
    REG_PIPE_LEN  = 6'd0,   // pipeline length in samples (2..PIPE_DEPTH)
    REG_FRAME_LEN = 6'd1,   // time-frame length minus one (0..15)
    REG_MODE      = 6'd2,   // mode_e
    REG_RO_DELAY  = 6'd3,   // idle clocks between readout cycles
    REG_FC_EN     = 6'd4,   // external flow control enable
    REG_THR_LO_L  = 6'd5,   // low limit, bits 7:0
    REG_THR_LO_H  = 6'd6,   // low limit, bits 9:8
    REG_THR_HI_L  = 6'd7,   // high limit, bits 7:0
    REG_THR_HI_H  = 6'd8,   // high limit, bits 9:8
    REG_SEED_L    = 6'd9,   // test pattern seed, bits 7:0
    REG_SEED_H    = 6'd10,  // test pattern seed, bits 9:8
    REG_DESKEW    = 6'd11,  // output delay in clock cycles (0..7)
    REG_PED_DAC   = 6'd12   // pedestal DAC setting
  } reg_e;

  typedef struct packed {
    logic [7:0] pipe_len;
    logic [3:0] frame_len_m1;
    mode_e      mode;
    logic [7:0] ro_delay;
    logic       fc_en;
    adc_t       thr_lo;
    adc_t       thr_hi;
    adc_t       seed;
    logic [2:0] deskew;
    logic [7:0] ped_dac;
  } cfg_t;

  // Header word layout (a choice of this design; the document says the header
  // carries the gains, the error bits and the buffer start address).
  typedef struct packed {
    logic       mem_par_err;   // 31  parity error seen in the memories
    logic       ttc_sin_err;   // 30  TTCrx single-bit error
    logic       ttc_dbl_err;   // 29  TTCrx double-bit error
    logic       lost_event;    // 28  an accept was refused: buffers full
    logic       reg_parity;    // 27  combined parity of the programmable registers
    logic       dyn_parity;    // 26  combined parity of pointers and state
    mode_e      mode;          // 25:24
    logic [2:0] low_gain;      // 23:21 per channel: 1 = low gain read out
    logic [7:0] start_addr;    // 20:13 buffer start address of the frame
    logic [12:0] evt_num;      // 12:0 event number
  } header_t;

  // Two horizontal parity bits over the 30-bit readout payload.
  function automatic logic [1:0] word_parity(input logic [29:0] d);
    word_parity = {^d[29:15], ^d[14:0]};
  endfunction

  // CRC-16-CCITT, two message bits per step, MSB first.
  function automatic logic [15:0] crc16_step2(input logic [15:0] crc, input logic [1:0] bits);
    logic [15:0] c;
    logic        fb;
    c = crc;
    for (int i = 1; i >= 0; i--) begin
      fb = c[15] ^ bits[i];
      c  = {c[14:0], 1'b0};
      if (fb) c = c ^ 16'h1021;
    end
    return c;
  endfunction

endpackage
