// Test pattern generator for the DSP BIST, built from PLB logic.
//
// The document says that the DSPs are tested with PLB-based TPGs and ORAs,
// that the modes which are not configuration bits are driven dynamically by
// the TPG through the seven OPMODE inputs, and that the multiplier-
// accumulator is tested by letting it generate patterns and compact its own
// response at the same time. How the patterns are made is not given; this
// design uses:
//   - a 32-bit maximal-length LFSR (x^32 + x^22 + x^2 + x + 1), stepped
//     every cycle, for the A, B and C operands,
//   - a pattern counter whose bits [6:4] pick one of eight OPMODEs (held for
//     16 cycles so that accumulation runs build up) and whose bit 7 drives
//     SUB, so every mode is applied in both add and subtract form,
//   - a clock enable that is inactive in one cycle out of 16 (LFSR bits
//     [3:0] all zero) and a one-cycle reset every 1024 patterns.
// The reset and clock enable go out at the active level given by attr, as
// they would be wired to a DSP configured with those attributes.
//
// Interface and timing: clr (synchronous) reloads the LFSR seed, clears the
// counter and holds the DSP reset asserted. While run is high one pattern
// is produced per clock; done rises after PATTERNS (at most 65535) patterns. While run is
// low the DSP clock enable is inactive so the DSPs under test hold state.
module dsp_bist_tpg
  import bist_pkg::*;
#(
  parameter int unsigned PATTERNS = DSP_PATTERNS
) (
  input  logic               clk,
  input  logic               clr,
  input  logic               run,
  input  dsp_attr_t          attr,
  output logic signed [17:0] a,
  output logic signed [17:0] b,
  output logic        [47:0] c,
  output logic        [6:0]  opmode,
  output logic               sub,
  output logic               ce,
  output logic               rst,
  output logic               done
);
  localparam logic [31:0] SEED = 32'hACE1_2468;
  localparam int unsigned CW   = 16;

  // X / Y / Z selections (see dsp_slice): multiply, multiply-accumulate,
  // constant accumulation, C + M, A:B + C, P - C style, all-ones + P, C.
  localparam logic [6:0] OPS [8] = '{
    7'b000_00_01,   // M
    7'b010_00_01,   // P + M          (MAC)
    7'b010_11_00,   // P + C          (accumulate constant)
    7'b011_00_01,   // C + M
    7'b011_00_11,   // C + A:B
    7'b010_11_10,   // 2P + C
    7'b010_10_00,   // P + all ones
    7'b011_00_00    // C
  };

  logic [31:0]   lfsr;
  logic [CW-1:0] cnt;
  logic          l_ce, l_rst;

  always_ff @(posedge clk) begin
    if (clr) begin
      lfsr <= SEED;
      cnt  <= '0;
    end else if (run && !done) begin
      lfsr <= {lfsr[30:0], lfsr[31] ^ lfsr[21] ^ lfsr[1] ^ lfsr[0]};
      cnt  <= cnt + 1'b1;
    end
  end

  assign done   = (cnt == CW'(PATTERNS));
  assign a      = lfsr[17:0];
  assign b      = {lfsr[13:0], lfsr[31:28]};
  assign c      = {lfsr[15:0], lfsr ^ {lfsr[15:0], lfsr[31:16]}};
  assign opmode = OPS[cnt[6:4]];
  assign sub    = cnt[7];
  assign l_ce   = run && !done && (lfsr[3:0] != 4'd0);
  assign l_rst  = clr || (cnt[9:0] == 10'h3FF);
  assign ce     = l_ce ^ attr.ce_low;
  assign rst    = l_rst ^ attr.rst_low;
endmodule
