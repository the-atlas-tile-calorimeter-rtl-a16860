// Testbench receiver for the Tile-DMU 2-bit output stream.
//
// Waits for the start pair "11", collects `n_words` 32-bit words (two bits
// per clock, MSB first), then the 16-bit CRC, then expects the end pair "00".
// The CRC is recomputed one bit at a time (CRC-16-CCITT, preset all ones)
// independently of the RTL. On completion `done` pulses for one clock with
// the words in `words`, `crc_ok` and `end_ok`; `start_cycle` / `end_cycle`
// give the clock counts of the start pair and of the end pair.
module tdmu_stream_rx #(
  parameter int MAXW = 40
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  sdata,
  input  int          n_words,
  input  longint      cycle,
  output logic        done = 1'b0,
  output logic [31:0] words [MAXW],
  output logic        crc_ok,
  output logic        end_ok,
  output longint      start_cycle,
  output longint      end_cycle
);
  typedef enum {IDLE, DATA, CRC, ENDP} st_t;
  st_t         st;
  int          pairs;
  logic [15:0] crc, rx_crc;

  function automatic logic [15:0] crc_bit(logic [15:0] c, logic b);
    logic fb;
    fb = c[15] ^ b;
    c  = c << 1;
    if (fb) c ^= 16'h1021;
    return c;
  endfunction

  always @(posedge clk) begin
    done <= 1'b0;
    if (!rst_n) st <= IDLE;
    else case (st)
      IDLE: if (sdata == 2'b11) begin
        st <= DATA; pairs <= 0; crc <= 16'hFFFF; start_cycle <= cycle;
      end
      DATA: begin
        words[pairs / 16] <= {words[pairs / 16][29:0], sdata};
        crc <= crc_bit(crc_bit(crc, sdata[1]), sdata[0]);
        if (pairs == n_words * 16 - 1) begin st <= CRC; pairs <= 0; end
        else pairs <= pairs + 1;
      end
      CRC: begin
        rx_crc <= {rx_crc[13:0], sdata};
        if (pairs == 7) st <= ENDP;
        pairs <= pairs + 1;
      end
      ENDP: begin
        crc_ok    <= (rx_crc == crc);
        end_ok    <= (sdata == 2'b00);
        end_cycle <= cycle;
        done      <= 1'b1;
        st        <= IDLE;
      end
    endcase
  end
endmodule
