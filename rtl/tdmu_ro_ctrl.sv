// Readout controller of the Tile-DMU.
//
// When the address FIFO is not empty the controller pops one event (start
// address and gain flags), sends a header word and then one or two 32-bit
// words per sample of the time frame, read from the buffer memory. In normal
// mode each channel contributes either its high-gain or, when its frame flag
// is set, its low-gain code; in calibration and test modes every sample gives
// a high-gain word followed by a low-gain word. Each data word is 30 bits of
// codes {ch2, ch1, ch0} plus two horizontal parity bits on top (bit 31 over
// bits 29:15, bit 30 over bits 14:0). The four parity bits stored with each
// sample are recomputed and a mismatch is reported in the next header.
// After the event the controller pulses release_evt, waits until the
// serializer has sent the rest of the event (`ser_idle`), then stays idle for
// ro_delay more clocks (programmable readout rate), and, when fc_en is set, does
// not start an event while link_full is high (external flow control). These
// mechanisms follow the document; the state sequence, header layout
// (tdmu_pkg::header_t), word order and parity assignment are this design's.
//
// Words go to the serializer with a valid/ready handshake; word_ctrl marks the
// header and word_last the final data word of an event. A buffer read takes
// one clock, so the next word is ready long before the serializer (16 clocks
// per word) asks for it.
module tdmu_ro_ctrl
  import tdmu_pkg::*;
#(
  parameter int unsigned AW = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  mode_e                mode,
  input  logic [3:0]           frame_len_m1,
  input  logic [7:0]           ro_delay,
  input  logic                 fc_en,
  input  logic                 link_full,
  // derandomizer
  input  logic                 evt_avail,
  input  logic [AW-1:0]        evt_addr,
  input  logic [N_CH-1:0]      evt_flags,
  output logic                 evt_pop,
  output logic                 release_evt,
  output logic [AW-1:0]        rd_addr,
  input  logic [WORD_BITS-1:0] rd_data,
  // status reported in the header
  input  logic                 ttc_sin_err,
  input  logic                 ttc_dbl_err,
  input  logic                 lost_evt,
  input  logic                 reg_parity,
  input  logic                 dyn_parity,
  // serializer
  output logic [RO_BITS-1:0]   word,
  output logic                 word_valid,
  output logic                 word_ctrl,
  output logic                 word_last,
  input  logic                 word_ready,
  input  logic                 ser_idle,
  output logic                 idle,
  output logic                 par_err
);
  typedef enum logic [2:0] {S_IDLE, S_HDR, S_RD, S_WAIT, S_W1, S_W2} state_e;

  state_e          state;
  logic [AW-1:0]   base;
  logic [N_CH-1:0] flags;
  logic [3:0]      idx;
  logic [7:0]      delay_cnt;
  logic [12:0]     evt_num;
  logic            st_par, st_sin, st_dbl, st_lost;
  stored_t         smp;
  logic [PAR_BITS-1:0] par_calc;
  logic [29:0]     payload;
  header_t         hdr;
  logic            last_smp, both;

  assign both     = (mode != MODE_NORMAL);
  assign last_smp = (idx == frame_len_m1);
  assign idle     = (state == S_IDLE);
  assign evt_pop  = (state == S_IDLE) && evt_avail && (delay_cnt == 0) && !(fc_en && link_full);
  assign rd_addr  = base + AW'(idx);

  tdmu_parity4 u_check (.data(rd_data[DATA_BITS-1:0]), .par(par_calc));
  assign par_err = (state == S_WAIT) && (par_calc != rd_data[WORD_BITS-1 -: PAR_BITS]);

  always_comb begin
    hdr.mem_par_err = st_par;
    hdr.ttc_sin_err = st_sin;
    hdr.ttc_dbl_err = st_dbl;
    hdr.lost_event  = st_lost;
    hdr.reg_parity  = reg_parity;
    hdr.dyn_parity  = dyn_parity;
    hdr.mode        = mode;
    hdr.low_gain    = both ? '0 : flags;
    hdr.start_addr  = 8'(base);
    hdr.evt_num     = evt_num;
    for (int c = 0; c < N_CH; c++)
      payload[c*ADC_BITS +: ADC_BITS] =
        (state == S_W2 || (!both && flags[c])) ? smp.data.lg[c] : smp.data.hg[c];
    word       = (state == S_HDR) ? RO_BITS'(hdr) : {word_parity(payload), payload};
    word_valid = (state == S_HDR) || (state == S_W1) || (state == S_W2);
    word_ctrl  = (state == S_HDR);
    word_last  = last_smp && ((state == S_W2) || (state == S_W1 && !both));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      base        <= '0;
      flags       <= '0;
      idx         <= '0;
      delay_cnt   <= '0;
      evt_num     <= '0;
      st_par      <= 1'b0;
      st_sin      <= 1'b0;
      st_dbl      <= 1'b0;
      st_lost     <= 1'b0;
      smp         <= '0;
      release_evt <= 1'b0;
    end else begin
      release_evt <= 1'b0;
      // sticky error flags, cleared when a header carrying them is sent
      if (state == S_HDR && word_ready) begin
        st_par <= par_err; st_sin <= ttc_sin_err; st_dbl <= ttc_dbl_err; st_lost <= lost_evt;
      end else begin
        st_par  <= st_par  | par_err;
        st_sin  <= st_sin  | ttc_sin_err;
        st_dbl  <= st_dbl  | ttc_dbl_err;
        st_lost <= st_lost | lost_evt;
      end
      if (state == S_IDLE && ser_idle && delay_cnt != 0) delay_cnt <= delay_cnt - 1'b1;
      unique case (state)
        S_IDLE: if (evt_pop) begin
          base  <= evt_addr;
          flags <= evt_flags;
          idx   <= '0;
          state <= S_HDR;
        end
        S_HDR: if (word_ready) begin
          evt_num <= evt_num + 1'b1;
          state   <= S_RD;
        end
        S_RD:   state <= S_WAIT;
        S_WAIT: begin
          smp   <= stored_t'(rd_data);
          state <= S_W1;
        end
        S_W1, S_W2: if (word_ready) begin
          if (state == S_W1 && both) state <= S_W2;
          else if (last_smp) begin
            release_evt <= 1'b1;
            delay_cnt   <= ro_delay;
            state       <= S_IDLE;
          end else begin
            idx   <= idx + 1'b1;
            state <= S_RD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
