// Synchronous first-in first-out buffer.
//
// Used twice in the Tile-DMU: as the address FIFO, which holds the buffer
// start address of each accepted time frame, and as the flag FIFO, which
// holds the three gain flags of the same frame. Both FIFOs are pushed
// together when a frame has been stored and popped together by the readout
// controller. The document names them only; this is a plain register FIFO
// with count, first-word-fall-through output (`rdata` is the oldest entry
// whenever `empty` is low), push and pop in the same clock allowed. Pushing
// when full or popping when empty is a usage error, checked by assertions.
module tdmu_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   push,
  input  logic [WIDTH-1:0]       wdata,
  input  logic                   pop,
  output logic [WIDTH-1:0]       rdata,
  output logic                   empty,
  output logic                   full,
  output logic [$clog2(DEPTH):0] count,
  output logic                   dyn_par
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;

  assign empty = (count == 0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign rdata = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
      count <= '0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= wdata;
  end

  assign dyn_par = ^{wp, rp};

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);
endmodule
