// Circular-comparison BIST array for LUT RAMs.
//
// N_RUT LUT RAMs under test and N_RUT two-bit ORAs alternate in a ring, like
// the PLB array: ORA j compares spo and dpo of RUT j with those of RUT j+1
// (mod N_RUT). Only half of the slices hold LUT RAMs, so the other half act
// as ORAs and one session tests them all; there is no role swap. Two
// identical TPGs (DSP counter + ROM, lutram_tpg) drive alternate RUTs
// (RUT j from TPG j mod 2), as the document builds two TPGs per four PLB
// rows driving alternate columns of LUT RAMs.
//
// Timing: tpg_clr restarts the TPGs; while run is high one March step is
// applied per clock. With ora_en high the ORAs compare the RUT outputs in
// every cycle that carries a March read step (this design's choice: in a
// write cycle the asynchronous read still shows the old contents). tpg_done rises after the last step of the mode.
// fault_cells/fault apply a stuck-at cell to the selected RUTs; tpg_fault
// inverts the write data of TPG 1 to emulate a TPG fault.
module lutram_bist_array
  import bist_pkg::*;
#(
  parameter int unsigned N_RUT = 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  lr_mode_t                mode,
  input  logic                    tpg_clr,
  input  logic                    run,
  input  logic                    ora_clr,
  input  logic                    ora_en,
  input  logic [N_RUT-1:0]        fault_cells,
  input  lr_fault_t               fault,
  input  logic                    tpg_fault,
  output logic                    tpg_done,
  output logic [N_RUT-1:0]        ora_fail,
  output logic [N_RUT-1:0][1:0]   ora_bits
);
  lr_op_t [1:0]         op;
  lr_op_t               op1_raw;
  logic   [1:0]         valid, done;
  logic                 cmp_en;
  logic   [N_RUT-1:0][1:0] rut_out;

  lutram_tpg u_tpg0 (.clk, .clr(tpg_clr), .run, .mode, .op(op[0]), .op_valid(valid[0]), .done(done[0]));
  lutram_tpg u_tpg1 (.clk, .clr(tpg_clr), .run, .mode, .op(op1_raw), .op_valid(valid[1]), .done(done[1]));

  always_comb begin
    op[1]     = op1_raw;
    op[1].din = op1_raw.din ^ tpg_fault;
  end
  assign tpg_done = done[0];
  // Compare only on read steps: during a write the asynchronous read shows
  // the cell's old contents, which need not agree between RUTs.
  assign cmp_en = ora_en && valid[0] && !op[0].we;

  for (genvar j = 0; j < N_RUT; j++) begin : g_rut
    lutram_rut u_rut (
      .clk   (clk),
      .mode  (mode),
      .we    (op[j % 2].we && valid[j % 2] && run),
      .din   (op[j % 2].din),
      .addr  (op[j % 2].addr),
      .dpra  (op[j % 2].dpra),
      .fault (fault_cells[j] ? fault : '0),
      .spo   (rut_out[j][0]),
      .dpo   (rut_out[j][1])
    );
    ora #(.N(2)) u_ora (
      .clk       (clk),
      .rst_n     (rst_n),
      .clr       (ora_clr),
      .en        (cmp_en),
      .left_out  (rut_out[j]),
      .right_out (rut_out[(j + 1) % N_RUT]),
      .fail      (ora_bits[j])
    );
    assign ora_fail[j] = |ora_bits[j];
  end
endmodule
