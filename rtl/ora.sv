// Comparison-based output response analyzer (ORA).
//
// Each ORA bit watches one output of the RUT to its left and the same output
// of the RUT to its right. The two are compared with an XOR, the mismatch is
// ORed with the ORA's own latched result and stored in a flip-flop, so a
// single mismatch anywhere in the BIST sequence leaves a sticky failure
// indication (1 = fail). In the FPGA one ORA bit is one LUT plus one
// flip-flop, so a slice holds two (the G and F LUT of the document's slice
// figure); the default N = 2 is that slice, and a PLB used as an ORA
// instantiates N = 8.
//
// Timing: the result is registered; a mismatch presented in cycle t shows
// on fail in cycle t+1. clr (synchronous, has priority) empties the ORA, which
// in the FPGA happens when the BIST configuration is downloaded. en gates the
// compare so that the RUTs can be reconfigured without recording the
// transient; the enable and the synchronous clear are this design's choices.
// Results are NOT cleared between BIST configurations, so failures
// accumulate over a whole test session as in the document.
module ora #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [N-1:0] left_out,
  input  logic [N-1:0] right_out,
  output logic [N-1:0] fail
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    fail <= '0;
    else if (clr)  fail <= '0;
    else if (en)   fail <= fail | (left_out ^ right_out);
  end
endmodule
