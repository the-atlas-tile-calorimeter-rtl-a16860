// Level-1 pipeline memory of the Tile-DMU.
//
// Every 25 ns clock a 64-bit word (60 sample bits and 4 parity bits) is
// written into a circular memory, and the word written `len` clocks earlier
// is read out, so the output is the input delayed by exactly `len` clocks.
// The document asks for a programmable pipeline length and a level-1 latency
// of up to 2.5 us (100 clocks); the depth of 128 words is this design's
// choice (the smallest power of two that holds 100). `len` is clamped to
// 2..DEPTH. The read is registered, as in a synchronous RAM macro.
// dyn_par is the parity of the write pointer, one of the "dynamic register"
// test points.
module tdmu_pipeline #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [7:0]       len,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout,
  output logic             dyn_par
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp;
  logic [AW-1:0]    ra;
  logic [8:0]       len_c;

  always_comb begin
    len_c = {1'b0, len};
    if (len_c < 9'd2) len_c = 9'd2;
    if (len_c > 9'(DEPTH)) len_c = 9'(DEPTH);
    // The word read now appears at dout next clock: it must be the one
    // written len-1 clocks before this one.
    ra = wp - AW'(len_c - 9'd1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wp <= '0;
    else        wp <= wp + 1'b1;
  end

  always_ff @(posedge clk) begin
    mem[wp] <= din;
    dout    <= mem[ra];
  end

  assign dyn_par = ^wp;
endmodule
