// Circular-comparison BIST array for DSP slices.
//
// N_RUT DSP slices under test alternate in a ring with N_RUT ORAs built from
// PLBs. ORA j compares the 48-bit P output of DSP j with that of DSP j+1
// (mod N_RUT), so an error is latched as soon as it appears at a DSP output
// and the accumulator's own response compaction cannot alias it away. Two
// identical PLB-based TPGs (dsp_bist_tpg) drive alternate DSPs (DSP j from
// TPG j mod 2). All DSPs and both TPGs use the attribute set of BIST
// configuration cfg (dsp_attr_for); only this changes between the four
// configurations. Ring size and the TPG assignment follow the document's
// Figure 2 arrangement; the rest is this design's choice.
//
// Timing: tpg_clr restarts the TPGs and resets the DSPs; while run is high
// one pattern is applied per clock and P is compared every cycle while
// ora_en is high. tpg_done rises after the last pattern; P of the last
// pattern is visible one cycle later (ORAs should stay enabled one more
// cycle). fault_cells/fault put an emulated defect into the selected DSPs;
// tpg_fault inverts bit 0 of the A operand from TPG 1.
module dsp_bist_array
  import bist_pkg::*;
#(
  parameter int unsigned N_RUT    = 6,
  parameter int unsigned PATTERNS = DSP_PATTERNS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [1:0]              cfg,
  input  logic                    tpg_clr,
  input  logic                    run,
  input  logic                    ora_clr,
  input  logic                    ora_en,
  input  logic [N_RUT-1:0]        fault_cells,
  input  dsp_fault_t              fault,
  input  logic                    tpg_fault,
  output logic                    tpg_done,
  output logic [N_RUT-1:0]        ora_fail
);
  dsp_attr_t                      attr;
  logic signed [1:0][17:0]        a, b;
  logic        [1:0][47:0]        c;
  logic        [1:0][6:0]         opmode;
  logic        [1:0]              sub, ce, rst, done;
  logic signed [17:0]             a1_raw;
  logic [N_RUT-1:0][47:0]         p;

  assign attr = dsp_attr_for(int'(cfg));

  dsp_bist_tpg #(.PATTERNS(PATTERNS)) u_tpg0 (
    .clk, .clr(tpg_clr), .run, .attr, .a(a[0]), .b(b[0]), .c(c[0]),
    .opmode(opmode[0]), .sub(sub[0]), .ce(ce[0]), .rst(rst[0]), .done(done[0])
  );
  dsp_bist_tpg #(.PATTERNS(PATTERNS)) u_tpg1 (
    .clk, .clr(tpg_clr), .run, .attr, .a(a1_raw), .b(b[1]), .c(c[1]),
    .opmode(opmode[1]), .sub(sub[1]), .ce(ce[1]), .rst(rst[1]), .done(done[1])
  );
  assign a[1]     = {a1_raw[17:1], a1_raw[0] ^ tpg_fault};
  assign tpg_done = done[0];

  for (genvar j = 0; j < N_RUT; j++) begin : g_rut
    logic [47:0] ora_bits;
    dsp_slice u_rut (
      .clk    (clk),
      .attr   (attr),
      .rst    (rst[j % 2]),
      .ce     (ce[j % 2]),
      .a      (a[j % 2]),
      .b      (b[j % 2]),
      .c      (c[j % 2]),
      .opmode (opmode[j % 2]),
      .sub    (sub[j % 2]),
      .fault  (fault_cells[j] ? fault : '0),
      .p      (p[j])
    );
    ora #(.N(48)) u_ora (
      .clk       (clk),
      .rst_n     (rst_n),
      .clr       (ora_clr),
      .en        (ora_en),
      .left_out  (p[j]),
      .right_out (p[(j + 1) % N_RUT]),
      .fail      (ora_bits)
    );
    assign ora_fail[j] = |ora_bits;
  end
endmodule
