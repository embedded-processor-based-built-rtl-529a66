// One PLB of the BIST array, acting either as a resource under test or as a
// group of eight ORAs.
//
// In a PLB test session half of the PLBs are under test and the other half
// are ORAs; in the second session of the pair the roles are swapped so that
// every PLB gets tested (document, PLB BIST sessions figure). is_rut selects
// the role. As a RUT the cell runs plb_rut on the TPG pattern; as an ORA it
// compares the outputs of the RUT on its left and the RUT on its right, bit by
// bit, with eight sticky comparators (four slices of two ORAs each).
//
// Timing: as in plb_rut and ora. An ORA-role cell drives rut_out to zero and
// a RUT-role cell never sets fail.
module plb_cell
  import bist_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                is_rut,
  input  logic                rut_rst,
  input  logic                run,
  input  logic                ora_clr,
  input  logic                ora_en,
  input  plb_cfg_t            cfg,
  input  fault_t              fault,
  input  logic [TPG_W-1:0]    pattern,
  input  logic [PLB_OUTS-1:0] left_out,
  input  logic [PLB_OUTS-1:0] right_out,
  output logic [PLB_OUTS-1:0] rut_out,
  output logic [PLB_OUTS-1:0] fail
);
  logic [PLB_OUTS-1:0] r_out;

  plb_rut u_rut (
    .clk     (clk),
    .rst     (rut_rst),
    .run     (run && is_rut),
    .cfg     (cfg),
    .fault   (fault),
    .pattern (pattern),
    .out     (r_out)
  );

  ora #(.N(PLB_OUTS)) u_ora (
    .clk       (clk),
    .rst_n     (rst_n),
    .clr       (ora_clr),
    .en        (ora_en && !is_rut),
    .left_out  (left_out),
    .right_out (right_out),
    .fail      (fail)
  );

  assign rut_out = is_rut ? r_out : '0;
endmodule
