// Bus cycle phase flag for the boundary shift code.
//
// A single flip-flop whose inverted output is fed back to its input, so the
// flag flips on every rising clock edge: even cycle, odd cycle, even, ...
// Encoder and decoder each hold one of these, and the code only works while
// the two agree, so both are cleared by the same reset.
//
// Interface: clk, active-low asynchronous reset rst_n, output phase.
// Timing: phase is PH_EVEN while in reset and in the first cycle after it,
// then alternates every clock. The toggling flip-flop follows the encoder
// and decoder circuits of the code; the reset (absent there) is this
// design's own addition, needed to line the two ends up.
module bsc_phase_toggle
  import bsc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  output phase_e phase
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= PH_EVEN;
    else        phase <= (phase == PH_EVEN) ? PH_ODD : PH_EVEN;
  end

endmodule
