// Walking test-pattern generator of the Tile-DMU.
//
// In test mode the sampled ADC data are replaced by walking patterns built
// from a programmable seed, so the readout path and its timing can be checked
// without signals (the document gives the seed and the walking pattern). Here
// a 10-bit register is loaded with the seed and rotated left by one bit every
// clock; high-gain lane c carries the pattern rotated left by c more bits and
// low-gain lane c carries the bitwise inverse of high-gain lane c. These
// details are this design's own. `load` (re)loads the seed; the first pattern
// after a load is the seed itself.
module tdmu_pattern_gen
  import tdmu_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    load,
  input  adc_t    seed,
  output sample_t pattern
);
  adc_t walk;

  function automatic adc_t rotl(adc_t v, int unsigned n);
    adc_t r;
    r = v;
    for (int unsigned i = 0; i < n; i++) r = {r[ADC_BITS-2:0], r[ADC_BITS-1]};
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    walk <= '0;
    else if (load) walk <= seed;
    else           walk <= rotl(walk, 1);
  end

  always_comb begin
    for (int c = 0; c < N_CH; c++) begin
      pattern.hg[c] = rotl(walk, c);
      pattern.lg[c] = ~rotl(walk, c);
    end
  end
endmodule
