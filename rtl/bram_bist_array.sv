// Circular-comparison BIST array for block RAMs.
//
// N_RUT block RAMs under test alternate in a ring with N_RUT ORAs built from
// PLBs (the document notes that PLBs suit the ORA role best because a block
// RAM has many outputs). ORA j compares every output of RUT j with RUT j+1
// (mod N_RUT): both 36-bit read ports and the four FIFO flags, 76 bits. Two
// identical March TPGs drive alternate RUTs (RUT j from TPG j mod 2).
// A port's data is compared after every read, and after a write unless the
// RAM is in read-first (or FIFO) mode: there a write shows the old word,
// which after power-up is unknown and differs between RAMs. The write-first
// and no-change outputs are known and are compared. The FIFO flags are
// compared on every cycle. This masking is this design's
// choice (the document does not say how the ORAs treat write cycles). In
// the two-port March test port B reads the cell port A works on in the
// same clock; those reads return the old word and are compared.
//
// Timing: tpg_clr restarts the TPGs and resets the RUT output registers and
// FIFO pointers (the state after reconfiguring the block RAMs); while run is
// high one March operation is applied per clock; ORAs compare every cycle
// while ora_en is high. tpg_done rises after the last operation.
// fault_cells/fault put a stuck-at storage bit into the selected RUTs;
// tpg_fault inverts bit 0 of the write data of TPG 1.
module bram_bist_array
  import bist_pkg::*;
#(
  parameter int unsigned N_RUT = 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  bram_test_t              test,
  input  logic                    tpg_clr,
  input  logic                    run,
  input  logic                    ora_clr,
  input  logic                    ora_en,
  input  logic [N_RUT-1:0]        fault_cells,
  input  bram_fault_t             fault,
  input  logic                    tpg_fault,
  output logic                    tpg_done,
  output logic [N_RUT-1:0]        ora_fail
);
  localparam int unsigned OW = 2 * 36 + 4;

  bram_op_t [1:0]          pa, pb;
  bram_op_t                pa1_raw, pb1_raw;
  logic     [1:0]          done;
  logic [N_RUT-1:0][OW-1:0] rut_out;
  logic                     rd_a_q, rd_b_q;
  logic [OW-1:0]            cmp_mask;
  logic                     old_on_write;

  assign old_on_write = test.cfg.fifo || (test.cfg.wmode == WM_READ_FIRST);

  bram_march_tpg u_tpg0 (.clk, .clr(tpg_clr), .run, .alg(test.alg), .width(test.cfg.width),
                         .pa(pa[0]), .pb(pb[0]), .done(done[0]));
  bram_march_tpg u_tpg1 (.clk, .clr(tpg_clr), .run, .alg(test.alg), .width(test.cfg.width),
                         .pa(pa1_raw), .pb(pb1_raw), .done(done[1]));

  always_comb begin
    pa[1] = pa1_raw;
    pb[1] = pb1_raw;
    pa[1].data[0] = pa1_raw.data[0] ^ tpg_fault;
    pb[1].data[0] = pb1_raw.data[0] ^ tpg_fault;
  end
  assign tpg_done = done[0];

  // Read data appears one clock after the operation; both TPGs issue the
  // same operation kinds, so TPG 0's decide the mask.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_a_q <= 1'b0;
      rd_b_q <= 1'b0;
    end else begin
      rd_a_q <= run && pa[0].en && (!pa[0].we || !old_on_write);
      rd_b_q <= run && pb[0].en && (!pb[0].we || !old_on_write);
    end
  end
  assign cmp_mask = {{36{rd_a_q}}, {36{rd_b_q}}, 4'hF};

  for (genvar j = 0; j < N_RUT; j++) begin : g_rut
    logic [35:0] doa, dob;
    logic        full, empty, afull, aempty;
    logic [OW-1:0] ora_bits;
    bram_rut u_rut (
      .clk    (clk),
      .rst    (tpg_clr),
      .cfg    (test.cfg),
      .pa     (pa[j % 2]),
      .pb     (pb[j % 2]),
      .fault  (fault_cells[j] ? fault : '0),
      .doa, .dob, .full, .empty, .afull, .aempty
    );
    assign rut_out[j] = {doa, dob, full, empty, afull, aempty} & cmp_mask;
    ora #(.N(OW)) u_ora (
      .clk       (clk),
      .rst_n     (rst_n),
      .clr       (ora_clr),
      .en        (ora_en),
      .left_out  (rut_out[j]),
      .right_out (rut_out[(j + 1) % N_RUT]),
      .fail      (ora_bits)
    );
    assign ora_fail[j] = |ora_bits;
  end
endmodule
