// Four overlapping parity bits of a 60-bit sample word.
//
// Before a sample enters the pipeline memory the Tile-DMU adds four parity
// bits, each covering a 20-bit region of the 60 data bits, with the regions
// overlapping (the document gives the count and the 20-bit size). Where the
// regions start is a choice of this design: bits [0 +: 20], [13 +: 20],
// [27 +: 20] and [40 +: 20], so every data bit is covered at least once and
// the bits near each boundary twice. Even parity (XOR of the region).
// The same block is used after the buffer memory to recompute the bits and
// compare them with the stored ones. Purely combinational.
module tdmu_parity4
  import tdmu_pkg::*;
(
  input  logic [DATA_BITS-1:0] data,
  output logic [PAR_BITS-1:0]  par
);
  localparam int unsigned REGION = 20;
  localparam int unsigned START [PAR_BITS] = '{0, 13, 27, 40};

  always_comb begin
    for (int k = 0; k < PAR_BITS; k++)
      par[k] = ^data[START[k] +: REGION];
  end
endmodule
