// Output serializer of the Tile-DMU.
//
// 32-bit readout words are shifted out two bits per 40 MHz clock, most
// significant pair first, so a word takes 16 clocks. An event on the 2-bit
// line is: the pair "11" (start), the header and data words back to back,
// the 16-bit CRC of those words (8 clocks), and the pair "00" (end); the line
// rests at "00" between events. The start and end pairs and the appended
// CRC-16 follow the document; the CRC polynomial (CCITT, x^16+x^12+x^5+1,
// preset to all ones, MSB first, not inverted) is this design's choice.
//
// The serializer also produces the S-link write strobe and control flag:
// link_wen is high for one clock as the last pair of each header or data word
// leaves, and link_ctrl is high with it for the header (a control word).
// Words arrive with valid/ready; ready is high when idle and during the last
// clock of a word, so a following word continues without a gap. If the next
// word is late, "00" pairs fill the gap (the readout controller never lets
// that happen; `underrun` reports it). All outputs are registered.
module tdmu_serializer
  import tdmu_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [RO_BITS-1:0] word,
  input  logic               word_valid,
  input  logic               word_ctrl,
  input  logic               word_last,
  output logic               word_ready,
  output logic [1:0]         sdata,
  output logic               link_wen,
  output logic               link_ctrl,
  output logic               busy,
  output logic               underrun
);
  typedef enum logic [2:0] {S_IDLE, S_WORD, S_GAP, S_CRC, S_END} state_e;

  state_e             state;
  logic [RO_BITS-1:0] sh;
  logic [3:0]         cnt;
  logic               is_ctrl, is_last;
  logic [15:0]        crc, crc_next;

  assign crc_next   = crc16_step2(crc, sh[RO_BITS-1 -: 2]);
  assign word_ready = (state == S_IDLE) || (state == S_GAP) ||
                      (state == S_WORD && cnt == 4'd15 && !is_last);
  assign busy       = (state != S_IDLE);
  assign underrun   = (state == S_GAP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      sh        <= '0;
      cnt       <= '0;
      is_ctrl   <= 1'b0;
      is_last   <= 1'b0;
      crc       <= 16'hFFFF;
      sdata     <= 2'b00;
      link_wen  <= 1'b0;
      link_ctrl <= 1'b0;
    end else begin
      link_wen  <= 1'b0;
      link_ctrl <= 1'b0;
      unique case (state)
        S_IDLE: begin
          sdata <= 2'b00;
          if (word_valid) begin
            sh      <= word;
            is_ctrl <= word_ctrl;
            is_last <= word_last;
            cnt     <= '0;
            crc     <= 16'hFFFF;
            sdata   <= 2'b11;
            state   <= S_WORD;
          end
        end
        S_WORD: begin
          sdata <= sh[RO_BITS-1 -: 2];
          sh    <= sh << 2;
          crc   <= crc_next;
          cnt   <= cnt + 1'b1;
          if (cnt == 4'd15) begin
            link_wen  <= 1'b1;
            link_ctrl <= is_ctrl;
            if (is_last) begin
              sh    <= {crc_next, 16'h0};
              cnt   <= '0;
              state <= S_CRC;
            end else if (word_valid) begin
              sh      <= word;
              is_ctrl <= word_ctrl;
              is_last <= word_last;
              cnt     <= '0;
            end else begin
              state <= S_GAP;
            end
          end
        end
        S_GAP: begin
          sdata <= 2'b00;
          if (word_valid) begin
            sh      <= word;
            is_ctrl <= word_ctrl;
            is_last <= word_last;
            cnt     <= '0;
            state   <= S_WORD;
          end
        end
        S_CRC: begin
          sdata <= sh[RO_BITS-1 -: 2];
          sh    <= sh << 2;
          cnt   <= cnt + 1'b1;
          if (cnt == 4'd7) state <= S_END;
        end
        S_END: begin
          sdata <= 2'b00;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
