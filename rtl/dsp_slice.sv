// Simplified FPGA DSP slice: 18x18 signed multiplier followed by a 48-bit
// adder/subtractor with an accumulator (P) register.
//
// The document describes the DSP as an 18x18-bit signed multiplier and a
// 48-bit adder/subtractor with registers for accumulator operation, steered
// at run time by seven OPMODE inputs; it uses the accumulator both as a TPG
// (accumulating a constant) and as a counter. The OPMODE encoding below is
// this design's own, modelled on the X/Y/Z multiplexer idea:
//   opmode[1:0] X : 0 = 0, 1 = M (A*B, sign-extended), 2 = P, 3 = {A,B}
//   opmode[3:2] Y : 0 = 0, 1 = 0, 2 = 48'hFFFF_FFFF_FFFF, 3 = C
//   opmode[6:4] Z : 0 = 0, 1 = 0, 2 = P, 3 = C, others 0
//   P_next = sub ? Z - (X + Y) : Z + X + Y
// The programmable attributes come in on attr (they are configuration bits
// in the FPGA, so they only change between BIST configurations): areg, breg
// and mreg each insert an optional pipeline register in front of the
// multiplier inputs or after the multiplier, ce_low and rst_low make the
// clock enable and the reset active low. P is always registered.
// Timing: with all optional registers off, P is valid one cycle after its
// inputs. ce is the clock enable of every register, rst a synchronous reset
// of every register (both at the level attr selects). fault emulates a
// defect for the BIST (see dsp_fault_t); tie it to '0 in normal use.
module dsp_slice
  import bist_pkg::*;
(
  input  logic               clk,
  input  dsp_attr_t          attr,
  input  logic               rst,
  input  logic               ce,
  input  logic signed [17:0] a,
  input  logic signed [17:0] b,
  input  logic        [47:0] c,
  input  logic        [6:0]  opmode,
  input  logic               sub,
  input  dsp_fault_t         fault,
  output logic        [47:0] p
);
  logic signed [17:0] a_q, b_q, a_m, b_m;
  logic signed [35:0] m_d, m_q, m_s;
  logic        [47:0] x, y, z;
  logic               rst_a, ce_a;
  logic        [47:0] fmask, p_d;
  logic signed [35:0] m_f;

  assign fmask = fault.en ? (48'd1 << fault.bit_idx) : '0;
  assign p_d   = sub ? (z - (x + y)) : (z + x + y);

  assign rst_a = rst ^ attr.rst_low;
  assign ce_a  = ce ^ attr.ce_low;

  always_ff @(posedge clk) begin
    if (rst_a) begin
      a_q <= '0; b_q <= '0; m_q <= '0; p <= '0;
    end else if (ce_a) begin
      a_q <= (fault.loc == 2'd2) ? (a | fmask[17:0]) : a;
      b_q <= b;
      m_q <= (fault.loc == 2'd3) ? (m_f & ~fmask[35:0]) : m_f;
      p   <= (fault.loc == 2'd0) ? (p_d & ~fmask) : p_d;
    end
  end

  assign a_m = attr.areg ? a_q : a;
  assign b_m = attr.breg ? b_q : b;
  assign m_d = a_m * b_m;
  assign m_f = (fault.loc == 2'd1) ? (m_d | fmask[35:0]) : m_d;
  assign m_s = attr.mreg ? m_q : m_f;

  always_comb begin
    unique case (opmode[1:0])
      2'd0: x = '0;
      2'd1: x = {{12{m_s[35]}}, m_s};
      2'd2: x = p;
      default: x = {12'd0, a_m, b_m};
    endcase
    unique case (opmode[3:2])
      2'd2:    y = '1;
      2'd3:    y = c;
      default: y = '0;
    endcase
    unique case (opmode[6:4])
      3'd2:    z = p;
      3'd3:    z = c;
      default: z = '0;
    endcase
  end
endmodule
