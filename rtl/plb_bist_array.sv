// Circular-comparison BIST array for programmable logic blocks.
//
// 2*N_RUT PLB cells form a ring that alternates resources under test (RUTs)
// and output response analyzers (ORAs); every ORA compares the RUT on its
// left with the RUT on its right, so each RUT is watched by two ORAs and each
// ORA by two RUTs (the document's basic BIST architecture figure, with six
// RUTs and six ORAs). Two identical DSP-based TPGs drive alternate RUTs, so
// that a fault in one TPG or its routing makes neighbouring RUTs disagree
// instead of escaping detection.
//
// session selects which half of the cells is under test: in session 0 the
// even cells are RUTs, in session 1 the odd cells (the document's sessions
// #1a/#1b). Logical numbering used on the outputs: RUT j is cell 2j+session,
// ORA j is cell 2j+1+session (mod 2*N_RUT) and compares RUT j with RUT j+1
// (mod N_RUT). RUT j takes its patterns from TPG (j mod 2).
//
// Fault emulation: fault is applied to every physical cell whose bit is set
// in fault_cells (only has an effect while that cell is a RUT; the same fault
// in several cells emulates RUTs with equivalent faults); tpg_fault XORs into the
// pattern of TPG 1 to emulate a TPG or TPG-routing fault.
//
// Timing: tpg_clr restarts both TPGs, run advances TPGs and RUT flip-flops,
// ora_en lets the ORAs record; see ora and plb_rut for the cycle detail.
// ora_fail[j] is the OR of ORA j's eight bits, cell_fail holds all ORA
// flip-flops as they would be read back from the configuration memory.
module plb_bist_array
  import bist_pkg::*;
#(
  parameter int unsigned N_RUT = 6
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               session,
  input  plb_cfg_t                           cfg,
  input  logic                               tpg_clr,
  input  logic                               run,
  input  logic                               rut_rst,
  input  logic                               ora_clr,
  input  logic                               ora_en,
  input  logic [2*N_RUT-1:0]                 fault_cells,
  input  fault_t                             fault,
  input  logic [TPG_W-1:0]                   tpg_fault,
  output logic [N_RUT-1:0]                   ora_fail,
  output logic [2*N_RUT-1:0][PLB_OUTS-1:0]   cell_fail,
  output logic [TPG_W-1:0]                   tpg_pattern
);
  localparam int unsigned NC = 2 * N_RUT;

  logic [1:0][TPG_W-1:0]          tpg;
  logic [TPG_W-1:0]               tpg1_raw;
  logic [NC-1:0][PLB_OUTS-1:0]    rut_out;

  dsp_tpg u_tpg0 (.clk(clk), .clr(tpg_clr), .run(run), .pattern(tpg[0]));
  dsp_tpg u_tpg1 (.clk(clk), .clr(tpg_clr), .run(run), .pattern(tpg1_raw));
  assign tpg[1]      = tpg1_raw ^ tpg_fault;
  assign tpg_pattern = tpg[0];

  for (genvar k = 0; k < NC; k++) begin : g_cell
    localparam int unsigned KL = (k + NC - 1) % NC;
    localparam int unsigned KR = (k + 1) % NC;
    // TPG used by this cell when it is a RUT in session 0 and in session 1.
    localparam int unsigned T0 = (k / 2) % 2;
    localparam int unsigned T1 = (((k + NC - 1) % NC) / 2) % 2;
    logic  is_rut;
    fault_t f;
    assign is_rut = (k % 2 == 0) ? !session : session;
    assign f      = fault_cells[k] ? fault : '0;
    plb_cell u_cell (
      .clk       (clk),
      .rst_n     (rst_n),
      .is_rut    (is_rut),
      .rut_rst   (rut_rst),
      .run       (run),
      .ora_clr   (ora_clr),
      .ora_en    (ora_en),
      .cfg       (cfg),
      .fault     (f),
      .pattern   (session ? tpg[T1] : tpg[T0]),
      .left_out  (rut_out[KL]),
      .right_out (rut_out[KR]),
      .rut_out   (rut_out[k]),
      .fail      (cell_fail[k])
    );
  end

  for (genvar j = 0; j < N_RUT; j++) begin : g_ora
    assign ora_fail[j] = session ? |cell_fail[(2*j + 2) % NC] : |cell_fail[2*j + 1];
  end
endmodule
