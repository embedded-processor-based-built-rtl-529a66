// Behaviour of one programmable logic block (PLB) while it is a resource
// under test (RUT).
//
// A PLB has four slices, each with two 4-input LUTs and two flip-flops
// (document). Here the eight LUTs take their four inputs from the 12-bit TPG
// pattern through fixed routing: LUT k reads pattern bits k, k+3, k+6 and
// k+9 (mod 12). Each LUT output either leaves the PLB directly or through its
// flip-flop, as the configuration says. The routing stays the same for every
// BIST configuration and only the PLB's mode (its LUT contents and flip-flop
// use) changes, as the document requires for algorithmic reconfiguration;
// the particular routing is this design's choice.
//
// Fault emulation: the document checks the BIST by flipping configuration
// memory bits of a RUT and verifying that the fault is detected. fault.en
// flips bit fault.bit_idx of LUT fault.lut in this PLB's truth tables.
//
// Timing: combinational outputs follow the pattern in the same cycle,
// registered outputs one cycle later when run is high; rst clears the
// flip-flops synchronously (the state after a partial reconfiguration).
module plb_rut
  import bist_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                run,
  input  plb_cfg_t            cfg,
  input  fault_t              fault,
  input  logic [TPG_W-1:0]    pattern,
  output logic [PLB_OUTS-1:0] out
);
  logic [PLB_OUTS-1:0] lut_o, ff_q;

  always_comb begin
    for (int k = 0; k < PLB_OUTS; k++) begin
      logic [15:0] tt;
      logic [3:0]  sel;
      tt = cfg.lut_init[k];
      if (fault.en && fault.lut == 3'(k)) tt[fault.bit_idx] = ~tt[fault.bit_idx];
      sel = {pattern[(k + 9) % TPG_W], pattern[(k + 6) % TPG_W],
             pattern[(k + 3) % TPG_W], pattern[k % TPG_W]};
      lut_o[k] = tt[sel];
    end
  end

  always_ff @(posedge clk) begin
    if (rst)      ff_q <= '0;
    else if (run) ff_q <= lut_o;
  end

  always_comb begin
    for (int k = 0; k < PLB_OUTS; k++)
      out[k] = cfg.use_ff[k] ? ff_q[k] : lut_o[k];
  end
endmodule
