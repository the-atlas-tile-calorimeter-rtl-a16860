// Gain selection of the Tile-DMU.
//
// The high-gain sample of each of the three channels is compared with two
// programmable limits; a sample below thr_lo (underflow) or above thr_hi
// (overflow) sets that channel's flag, meaning its low-gain data are to be
// read out instead (document). The flag is accumulated over the whole time
// frame (document): here a 16-sample history of per-sample flags is kept and
// `frame_flags` is the OR of the current sample and the previous
// frame_len_m1 samples, i.e. of the frame that ends with the current sample.
// That sliding window lets frames overlap. The comparison is strict (< and >),
// a choice of this design. Combinational from the current sample, one clock
// of history.
module tdmu_gain_select
  import tdmu_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  adc_t [N_CH-1:0] hg,
  input  adc_t            thr_lo,
  input  adc_t            thr_hi,
  input  logic [3:0]      frame_len_m1,
  output logic [N_CH-1:0] sample_flags,
  output logic [N_CH-1:0] frame_flags
);
  logic [MAX_FRAME-2:0] hist [N_CH];  // hist[c][j]: flag of the sample j+1 clocks ago

  always_comb begin
    for (int c = 0; c < N_CH; c++) begin
      sample_flags[c] = (hg[c] < thr_lo) || (hg[c] > thr_hi);
      frame_flags[c]  = sample_flags[c];
      for (int j = 0; j < MAX_FRAME - 1; j++)
        if (j < int'(frame_len_m1)) frame_flags[c] = frame_flags[c] | hist[c][j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CH; c++) hist[c] <= '0;
    end else begin
      for (int c = 0; c < N_CH; c++) hist[c] <= {hist[c][MAX_FRAME-3:0], sample_flags[c]};
    end
  end
endmodule
