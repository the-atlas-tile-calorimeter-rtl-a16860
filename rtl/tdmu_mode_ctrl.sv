// Mode controller of the Tile-DMU.
//
// The Tile-DMU reads out in one of three modes (document): normal (gain
// chosen per channel), calibration (both gains) and test (walking patterns
// from the pattern generator in place of the ADC data). The programmed mode
// is taken over as the active mode only when the Tile-DMU holds no event
// (`quiet`: nothing being copied, waiting or read out), so an event is never
// read out half in one mode and half in another; that rule and the
// re-loading of the pattern seed on every switch into test mode are this
// design's. Outputs are registered; `switched` pulses on each change.
module tdmu_mode_ctrl
  import tdmu_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  mode_e cfg_mode,
  input  logic  quiet,
  output mode_e mode,
  output logic  use_pattern,
  output logic  link_test,
  output logic  pattern_load,
  output logic  switched
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode         <= MODE_NORMAL;
      pattern_load <= 1'b0;
      switched     <= 1'b0;
    end else begin
      pattern_load <= 1'b0;
      switched     <= 1'b0;
      if (quiet && cfg_mode != mode) begin
        mode         <= cfg_mode;
        switched     <= 1'b1;
        pattern_load <= (cfg_mode == MODE_TEST);
      end
    end
  end

  assign use_pattern = (mode == MODE_TEST);
  assign link_test   = (mode == MODE_TEST);
endmodule
