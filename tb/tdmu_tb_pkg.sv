// Testbench helpers shared by the Tile-DMU, board and drawer testbenches.
//
// ADC codes are a pure function of board, channel (0..5) and clock number, so
// a checker can recompute any sample the design should have stored. Most
// codes lie well inside the gain limits used by the tests (20..1000); at
// regular clocks a channel's high-gain code is pushed above (1023) or below
// (3) them so that the gain-selection flags are exercised.
package tdmu_tb_pkg;
  localparam int THR_LO = 20;
  localparam int THR_HI = 1000;

  function automatic logic [9:0] adc_hg(int board, int ch, longint cyc);
    longint v;
    if (cyc % 211 == longint'(ch * 7 + board)) return 10'd1023;  // overflow
    if (cyc % 223 == longint'(ch * 5 + board + 3)) return 10'd3; // underflow
    v = (cyc * 7 + ch * 131 + board * 37) % 900 + 50;
    return 10'(v);
  endfunction

  function automatic logic [9:0] adc_lg(int board, int ch, longint cyc);
    return 10'((cyc * 3 + ch * 17 + board * 101) % 1024);
  endfunction

  function automatic logic [9:0] rotl10(logic [9:0] v, int n);
    logic [19:0] d;
    d = {v, v} << (n % 10);
    return d[19:10];
  endfunction

  function automatic logic [31:0] mkword(logic [29:0] p);
    return {^p[29:15], ^p[14:0], p};
  endfunction
endpackage
