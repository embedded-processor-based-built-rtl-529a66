// Embedded-processor-style BIST of FPGA programmable logic blocks, LUT RAMs,
// block RAMs and DSP slices, with circular comparison and on-chip diagnosis.
//
// The BIST sequencer (bist_controller, which plays the part of the embedded
// processor's program) drives a ring of PLBs (plb_bist_array) in which PLBs
// under test alternate with PLBs acting as comparison ORAs, fed by two DSP
// TPGs. It walks through the BIST configurations of both PLB test sessions,
// then runs the LUT RAM session on a second ring (lutram_bist_array: LUT RAMs
// under test, March Y from a DSP-counter/ROM TPG) and the block RAM session
// on a third (bram_bist_array: block RAMs under test in RAM and FIFO modes,
// March TPGs, PLB-style ORAs) and finally the DSP session on a fourth
// (dsp_bist_array: DSP slices under test in four attribute configurations,
// PLB-based TPGs driving operands and OPMODE). After every configuration
// or once per session it reads back the ORA results of the active ring and
// hands them to the diagnosis engine (diag_engine), which marks every RUT
// fault-free, faulty or unknown.
//
// Ports: start/defer/sanity_en control a run (see bist_controller);
// user_fault_cells/user_fault emulate the same configuration-bit fault in a
// set of PLBs (equivalent faults when there are several) and
// tpg_fault a fault on TPG 1's pattern; lr_fault_cells/lr_fault/lr_tpg_fault
// do the same for the LUT RAM ring (a stuck-at cell, inverted write data) and
// br_fault_cells/br_fault/br_tpg_fault for the block RAM ring and
// dsp_fault_cells/dsp_fault/dsp_tpg_fault for the DSP ring. After each
// result_valid pulse the diag_* outputs describe the diagnosis of
// (result_res, result_session, result_cfg), and ora_fail/cell_fail (PLB),
// lr_ora_fail/lr_ora_bits (LUT RAM), br_ora_fail (block RAM) or
// dsp_ora_fail (DSP) the ORA readback; they stay valid until the next
// retrieval starts. PATTERNS is the PLB run length, DSP_PAT the DSP one.
module fpga_bist_top
  import bist_pkg::*;
#(
  parameter int unsigned N_RUT     = 6,
  parameter int unsigned N_CONFIGS = PLB_CONFIGS,
  parameter int unsigned PATTERNS  = 1 << TPG_W,
  parameter int unsigned DSP_PAT   = DSP_PATTERNS
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               start,
  input  logic                               defer,
  input  logic                               sanity_en,
  input  logic [2*N_RUT-1:0]                 user_fault_cells,
  input  fault_t                             user_fault,
  input  logic [TPG_W-1:0]                   tpg_fault,
  input  logic [N_RUT-1:0]                   lr_fault_cells,
  input  lr_fault_t                          lr_fault,
  input  logic                               lr_tpg_fault,
  input  logic [N_RUT-1:0]                   br_fault_cells,
  input  bram_fault_t                        br_fault,
  input  logic                               br_tpg_fault,
  input  logic [N_RUT-1:0]                   dsp_fault_cells,
  input  dsp_fault_t                         dsp_fault,
  input  logic                               dsp_tpg_fault,
  output logic                               busy,
  output logic                               diag_busy,
  output logic                               done,
  output logic                               session,
  output logic                               result_valid,
  output logic                               result_session,
  output res_t                               result_res,
  output logic [$clog2(N_CONFIGS)-1:0]       result_cfg,
  output logic [1:0]                         sanity_ok,
  output logic [15:0]                        configs_applied,
  output logic [15:0]                        retrievals,
  output logic [N_RUT-1:0]                   ora_fail,
  output logic [2*N_RUT-1:0][PLB_OUTS-1:0]   cell_fail,
  output logic [N_RUT-1:0]                   lr_ora_fail,
  output logic [N_RUT-1:0][1:0]              lr_ora_bits,
  output logic [N_RUT-1:0]                   br_ora_fail,
  output logic [N_RUT-1:0]                   dsp_ora_fail,
  output rut_status_t [N_RUT-1:0]            diag_status,
  output logic [$clog2(N_RUT+1)-1:0]         diag_inconsistencies,
  output logic                               diag_unique,
  output logic                               diag_reorder,
  output logic [TPG_W-1:0]                   tpg_pattern
);
  plb_cfg_t                       cfg;
  logic                           tpg_clr, run, rut_rst, ora_clr, ora_en;
  logic [2*N_RUT-1:0]             fault_cells;
  fault_t                         fault;
  logic                           diag_start, diag_done;
  res_t                           res;
  bram_test_t                     br_test;
  logic                           br_tpg_clr, br_run, br_ora_clr, br_ora_en, br_done;
  lr_mode_t                       lr_mode;
  logic                           lr_tpg_clr, lr_run, lr_ora_clr, lr_ora_en, lr_done;
  logic [1:0]                     dsp_cfg;
  logic                           dsp_tpg_clr, dsp_run, dsp_ora_clr, dsp_ora_en, dsp_done;

  bist_controller #(
    .N_RUT(N_RUT), .N_CONFIGS(N_CONFIGS), .PATTERNS(PATTERNS)
  ) u_ctrl (
    .clk, .rst_n, .start, .defer, .sanity_en,
    .user_fault_cells, .user_fault,
    .session, .cfg, .tpg_clr, .run, .rut_rst, .ora_clr, .ora_en,
    .fault_cells, .fault, .ora_fail,
    .res, .lr_mode, .lr_tpg_clr, .lr_run, .lr_ora_clr, .lr_ora_en, .lr_done,
    .br_test, .br_tpg_clr, .br_run, .br_ora_clr, .br_ora_en, .br_done,
    .dsp_cfg, .dsp_tpg_clr, .dsp_run, .dsp_ora_clr, .dsp_ora_en, .dsp_done,
    .diag_start, .diag_done,
    .busy, .done, .result_valid, .result_session, .result_res, .result_cfg,
    .sanity_ok, .configs_applied, .retrievals
  );

  plb_bist_array #(.N_RUT(N_RUT)) u_array (
    .clk, .rst_n, .session, .cfg, .tpg_clr, .run, .rut_rst, .ora_clr, .ora_en,
    .fault_cells, .fault, .tpg_fault, .ora_fail, .cell_fail, .tpg_pattern
  );

  lutram_bist_array #(.N_RUT(N_RUT)) u_lr_array (
    .clk, .rst_n, .mode(lr_mode), .tpg_clr(lr_tpg_clr), .run(lr_run),
    .ora_clr(lr_ora_clr), .ora_en(lr_ora_en), .fault_cells(lr_fault_cells),
    .fault(lr_fault), .tpg_fault(lr_tpg_fault), .tpg_done(lr_done),
    .ora_fail(lr_ora_fail), .ora_bits(lr_ora_bits)
  );

  bram_bist_array #(.N_RUT(N_RUT)) u_br_array (
    .clk, .rst_n, .test(br_test), .tpg_clr(br_tpg_clr), .run(br_run),
    .ora_clr(br_ora_clr), .ora_en(br_ora_en), .fault_cells(br_fault_cells),
    .fault(br_fault), .tpg_fault(br_tpg_fault), .tpg_done(br_done),
    .ora_fail(br_ora_fail)
  );

  dsp_bist_array #(.N_RUT(N_RUT), .PATTERNS(DSP_PAT)) u_dsp_array (
    .clk, .rst_n, .cfg(dsp_cfg), .tpg_clr(dsp_tpg_clr), .run(dsp_run),
    .ora_clr(dsp_ora_clr), .ora_en(dsp_ora_en), .fault_cells(dsp_fault_cells),
    .fault(dsp_fault), .tpg_fault(dsp_tpg_fault), .tpg_done(dsp_done),
    .ora_fail(dsp_ora_fail)
  );

  // The diagnosis reads the ORAs of the ring under test.
  logic [N_RUT-1:0] diag_in;
  always_comb begin
    unique case (res)
      RES_LUTRAM: diag_in = lr_ora_fail;
      RES_BRAM:   diag_in = br_ora_fail;
      RES_DSP:    diag_in = dsp_ora_fail;
      default:    diag_in = ora_fail;
    endcase
  end

  diag_engine #(.N(N_RUT)) u_diag (
    .clk, .rst_n, .start(diag_start), .ora_fail(diag_in),
    .busy(diag_busy), .done(diag_done), .status(diag_status),
    .inconsistencies(diag_inconsistencies), .unique_diag(diag_unique),
    .reorder(diag_reorder)
  );
endmodule
