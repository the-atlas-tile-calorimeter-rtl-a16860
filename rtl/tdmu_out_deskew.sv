// Output deskew register chain of the Tile-DMU.
//
// The boards of a chain sit at different distances from the interface board,
// so their data arrive with different delays; shifting the phase of each
// Tile-DMU's output brings the skew within 1 ns (document). The path passes
// a chain of registers in the system clock domain, of which `delay` (0..7
// clocks, programmable) are used, and a last register clocked by the deskewed
// clock of the TTCrx, whose phase the TTCrx sets in fine steps. The number of
// registers is this design's choice. The last stage samples a signal from
// the same 40 MHz clock at another phase; the phase setting must leave it a
// valid sampling window, which is what the timing-in in test mode is for.
module tdmu_out_deskew #(
  parameter int unsigned WIDTH     = 6,
  parameter int unsigned MAX_DELAY = 7
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         ro_clk,
  input  logic [$clog2(MAX_DELAY+1)-1:0] delay,
  input  logic [WIDTH-1:0]             din,
  output logic [WIDTH-1:0]             dout
);
  logic [WIDTH-1:0] stage [MAX_DELAY+1];  // stage[k]: din delayed by k clocks
  logic [WIDTH-1:0] sel;

  assign stage[0] = din;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k <= MAX_DELAY; k++) stage[k] <= '0;
    end else begin
      for (int k = 1; k <= MAX_DELAY; k++) stage[k] <= stage[k-1];
    end
  end

  assign sel = stage[delay];

  always_ff @(posedge ro_clk or negedge rst_n) begin
    if (!rst_n) dout <= '0;
    else        dout <= sel;
  end
endmodule
