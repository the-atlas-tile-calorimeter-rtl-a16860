// Scoreboard for one Tile-DMU output stream.
//
// Records every level-1 accept the Tile-DMU took (l1a and not evt_lost, on
// the system clock), decodes the 2-bit stream with tdmu_stream_rx and checks
// each event: header (mode, gain flags recomputed from the ADC function,
// event number, no error flags), every data word (codes and word parity),
// CRC, end pair and duration. In normal and calibration modes the samples
// are recomputed from the ADC function: an accept in clock m reads the codes
// driven in clocks m-1-pipe_len .. m-2-pipe_len+N. In test mode the words
// must form a walking pattern: lanes rotated by their index, low gain the
// inverse of high gain, each sample rotated by one from the previous one.
module tdmu_checker
  import tdmu_pkg::*;
  import tdmu_tb_pkg::*;
#(
  parameter int BOARD = 0,
  parameter int DMU   = 0
) (
  input  logic       clk,
  input  logic       ro_clk,
  input  logic       rst_n,
  input  longint     cyc,
  input  logic       l1a,
  input  logic       evt_lost,
  input  logic [1:0] sdata,
  input  int         pipe_len,
  input  int         n_smp,
  input  mode_e      exp_mode,
  output int         n_events,
  output int         n_flagged,
  output int         n_overlap,
  output int         n_errors,
  output int         n_checks,
  output int         pending,
  output int         n_lost_hdr,
  output int         n_ttc_hdr,
  output longint     last_gap
);
  longint prev_end = 0;
  longint acc_q [$];
  longint last_acc = -1000;
  int     n_words;
  logic   done, crc_ok, end_ok;
  logic [31:0] words [40];
  longint t0, t1;

  assign pending = acc_q.size();
  assign n_words = 1 + ((exp_mode == MODE_NORMAL) ? n_smp : 2 * n_smp);

  tdmu_stream_rx rx (.clk(ro_clk), .rst_n, .sdata, .n_words, .cycle(cyc), .done, .words,
    .crc_ok, .end_ok, .start_cycle(t0), .end_cycle(t1));

  initial begin
    n_events = 0; n_lost_hdr = 0; n_ttc_hdr = 0; last_gap = 0; n_flagged = 0; n_overlap = 0; n_errors = 0; n_checks = 0;
  end

  always @(posedge clk) begin
    if (rst_n && l1a && !evt_lost) begin
      if (cyc - last_acc < longint'(n_smp)) n_overlap++;
      last_acc = cyc;
      acc_q.push_back(cyc);
    end
  end

  task automatic chk(input string what, input logic ok);
    n_checks++;
    if (!ok) begin
      n_errors++;
      if (n_errors < 6) $display("B%0d D%0d event %0d: FAIL %s", BOARD, DMU, n_events, what);
    end
  endtask

  always @(posedge ro_clk) begin
    if (done) begin
      header_t h;
      longint m;
      logic [2:0] flags;
      h = header_t'(words[0]);
      chk("accept recorded", acc_q.size() != 0);
      m = (acc_q.size() != 0) ? acc_q.pop_front() : 0;
      chk("crc", crc_ok);
      chk("end pair", end_ok);
      chk("duration", t1 - t0 == longint'(16 * n_words + 9));
      chk("header mode", h.mode == exp_mode);
      chk("event number", h.evt_num == 13'(n_events));
      chk("no memory parity error", !h.mem_par_err);
      if (h.ttc_sin_err || h.ttc_dbl_err) n_ttc_hdr++;
      if (h.lost_event) n_lost_hdr++;
      if (n_events > 0) last_gap = t0 - prev_end;
      prev_end = t1;
      flags = '0;
      for (int i = 0; i < n_smp; i++)
        for (int c = 0; c < 3; c++) begin
          int v;
          v = int'(adc_hg(BOARD, 3 * DMU + c, m - 1 - pipe_len + i));
          if (v < THR_LO || v > THR_HI) flags[c] = 1'b1;
        end
      if (exp_mode == MODE_NORMAL) begin
        chk("gain flags", h.low_gain == flags);
        if (flags != 0) n_flagged++;
      end
      for (int i = 0; i < n_smp; i++) begin
        longint s;
        logic [29:0] hw, lw, nw;
        s = m - 1 - pipe_len + i;
        for (int c = 0; c < 3; c++) begin
          hw[10*c +: 10] = adc_hg(BOARD, 3 * DMU + c, s);
          lw[10*c +: 10] = adc_lg(BOARD, 3 * DMU + c, s);
          nw[10*c +: 10] = flags[c] ? lw[10*c +: 10] : hw[10*c +: 10];
        end
        case (exp_mode)
          MODE_NORMAL: chk($sformatf("normal word %0d", i), words[1 + i] == mkword(nw));
          MODE_CALIB: begin
            chk($sformatf("calib hg word %0d", i), words[1 + 2*i] == mkword(hw));
            chk($sformatf("calib lg word %0d", i), words[2 + 2*i] == mkword(lw));
          end
          default: begin
            logic [9:0] p0;
            p0 = words[1 + 2*i][9:0];
            chk("test word parity", words[1 + 2*i] == mkword(words[1 + 2*i][29:0]) &&
                                    words[2 + 2*i] == mkword(words[2 + 2*i][29:0]));
            for (int c = 0; c < 3; c++) begin
              chk("test lane rotation", words[1 + 2*i][10*c +: 10] == rotl10(p0, c));
              chk("test inverted low gain", words[2 + 2*i][10*c +: 10] == ~rotl10(p0, c));
            end
            if (i > 0) chk("test walking", p0 == rotl10(words[2*i - 1][9:0], 1));
          end
        endcase
      end
      n_events++;
    end
  end
endmodule
