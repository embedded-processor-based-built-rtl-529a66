// DSP-based test pattern generator (TPG) for PLB BIST.
//
// A DSP slice is set to accumulate a constant every clock: P <= P + C with
// C = 0x691, and the low 12 bits of P are the test pattern. Because the
// constant is odd, the 12-bit accumulator visits all 4096 states in 4096
// clocks, giving the pseudo-exhaustive pattern set the document relies on.
// Width and constant are the document's; restarting at zero on clear is
// this design's choice.
//
// Interface: clr restarts the sequence at 0 (pattern 0 is shown the cycle
// after clr), run advances it by one constant per clock.
module dsp_tpg
  import bist_pkg::*;
#(
  parameter int unsigned W     = TPG_W,
  parameter logic [47:0] CONST = 48'(TPG_CONST)
) (
  input  logic         clk,
  input  logic         clr,
  input  logic         run,
  output logic [W-1:0] pattern
);
  logic [47:0] p;

  // Accumulate: Z = P, Y = C, X = 0.
  dsp_slice u_dsp (
    .clk    (clk),
    .attr   ('0),
    .fault  ('0),
    .rst    (clr),
    .ce     (run),
    .a      ('0),
    .b      ('0),
    .c      (CONST),
    .opmode (7'b010_11_00),
    .sub    (1'b0),
    .p      (p)
  );

  assign pattern = p[W-1:0];
endmodule
