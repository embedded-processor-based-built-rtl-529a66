// TPG for LUT RAM BIST: a DSP used as a counter addresses a block RAM used
// as a ROM that holds the RAM test (document).
//
// The ROM is 1K x 18 (one block RAM). Its contents are the March Y sequence
// for the LUT RAM mode under test, one lr_op_t per word; in the FPGA they
// are rewritten with the mode between BIST configurations, here the three
// images are computed at elaboration (lr_march_y) and mode selects one. For
// the dual-port mode the document uses an algorithm of its own (March DPR)
// that it does not spell out; this design runs March Y on the write port
// and reads the next-higher address on the second port at every step.
//
// Timing: clr restarts the counter; with run high the counter advances each
// clock, and the ROM (synchronous read) shows step i one cycle after the
// counter held i. op_valid marks cycles that carry a step, done rises after
// the last of the 8n steps and holds the counter until the next clr.
module lutram_tpg
  import bist_pkg::*;
(
  input  logic     clk,
  input  logic     clr,
  input  logic     run,
  input  lr_mode_t mode,
  output lr_op_t   op,
  output logic     op_valid,
  output logic     done
);
  localparam int unsigned DEPTH = 1 << LR_ROM_AW;

  logic [LR_ROM_DW-1:0] rom [LR_CONFIGS][DEPTH];
  logic [47:0]          p;
  logic [LR_ROM_AW-1:0] cnt;
  logic [LR_ROM_DW-1:0] rom_q;
  logic [LR_ROM_AW:0]   len;

  initial begin
    for (int m = 0; m < LR_CONFIGS; m++)
      for (int i = 0; i < DEPTH; i++)
        rom[m][i] = (i < 8 * lr_words(lr_mode_t'(m)))
                  ? LR_ROM_DW'(lr_march_y(lr_mode_t'(m), i)) : '0;
  end

  assign len  = (LR_ROM_AW + 1)'(8 * lr_words(mode));
  assign cnt  = p[LR_ROM_AW-1:0];
  assign done = (p[LR_ROM_AW:0] == len + 1'b1);

  // Counter: P <= P + 1 (Z = P, Y = C = 1, X = 0).
  dsp_slice u_cnt (
    .clk    (clk),
    .attr   ('0),
    .fault  ('0),
    .rst    (clr),
    .ce     (run && !done),
    .a      ('0),
    .b      ('0),
    .c      (48'd1),
    .opmode (7'b010_11_00),
    .sub    (1'b0),
    .p      (p)
  );

  always_ff @(posedge clk)
    rom_q <= rom[mode][cnt];

  assign op_valid = (p[LR_ROM_AW:0] != '0) && (p[LR_ROM_AW:0] <= len);
  assign op       = op_valid ? lr_op_t'(rom_q[$bits(lr_op_t)-1:0]) : '0;
endmodule
