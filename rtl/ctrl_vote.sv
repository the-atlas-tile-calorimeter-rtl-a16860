// Majority vote over the S-link control lines of all Tile-DMUs.
//
// Every Tile-DMU of a drawer drives its own copy of the four S-link control
// lines (reset, ctrl, test, write enable), although the link needs one set.
// The interface board may combine them with a majority vote so that one
// faulty Tile-DMU cannot act on the link (document). Here each voted line is
// registered and changes only when more than half of the N copies show the
// new value; a tie (possible with an even N) keeps the previous value. The
// hysteresis on ties is this design's choice. One clock of latency.
module ctrl_vote #(
  parameter int unsigned N     = 16,  // copies: Tile-DMUs in a drawer
  parameter int unsigned LINES = 4    // reset, ctrl, test, write enable
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [LINES-1:0] lines_in [N],
  output logic [LINES-1:0] lines_out
);
  localparam int unsigned CW = $clog2(N + 1);

  logic [CW-1:0] ones [LINES];

  always_comb begin
    for (int l = 0; l < LINES; l++) begin
      ones[l] = '0;
      for (int i = 0; i < N; i++) ones[l] = ones[l] + CW'(lines_in[i][l]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lines_out <= '0;
    else begin
      for (int l = 0; l < LINES; l++) begin
        if (2 * int'(ones[l]) > int'(N))            lines_out[l] <= 1'b1;
        else if (2 * (int'(N) - int'(ones[l])) > int'(N)) lines_out[l] <= 1'b0;
      end
    end
  end
endmodule
