// End-to-end test of the BIST system at its default size (six RUTs and six
// ORAs per ring, 12 PLB BIST configurations of 4096 patterns in each of the
// two PLB sessions, the three LUT RAM configurations, then the eight block
// RAM configurations, then the four DSP configurations). Every run goes
// through the sequencer, the array and the
// diagnosis engine; the expected diagnosis is worked out here from which
// cells carry an emulated fault. Scenarios and the mechanisms they exercise:
//   1. fault-free, results after every configuration, sanity check on;
//   2. one faulty PLB, one LUT RAM and one block RAM with a stuck-at cell
//      and one DSP with an input-register defect (only visible in the DSP
//      configurations that use that register), results deferred to the end
//      of the session;
//   3. two neighbouring RUTs with equivalent faults, in the PLB ring and in
//      the LUT RAM, block RAM and DSP rings (the document's worked example: RUT 3 and 4 faulty,
//      unique diagnosis);
//   4. three neighbouring RUTs with equivalent faults: the diagnosis finds
//      inconsistent ORAs and asks for a different comparison order;
//   5. a fault on one TPG's pattern in each ring: every ORA fails, no RUT
//      can be judged.
// Each mechanism is counted and must occur at least once.
module tb_fpga_bist_top;
  import bist_pkg::*;
  localparam int N = 6;
  logic clk = 0, rst_n = 0, start = 0, defer = 0, sanity_en = 0;
  logic [2*N-1:0] user_fault_cells = '0;
  fault_t user_fault = '0;
  logic [11:0] tpg_fault = '0, tpg_pattern;
  logic busy, diag_busy, done, session, result_valid, result_session, diag_unique, diag_reorder;
  res_t result_res;
  logic [N-1:0] br_fault_cells = '0, br_ora_fail;
  bram_fault_t br_fault = '0;
  logic br_tpg_fault = 0;
  int n_bram = 0, n_dsp = 0;
  logic [N-1:0] dsp_fault_cells = '0, dsp_ora_fail;
  dsp_fault_t dsp_fault = '0;
  logic dsp_tpg_fault = 0;
  logic [N-1:0] lr_fault_cells = '0, lr_ora_fail;
  lr_fault_t lr_fault = '0;
  logic lr_tpg_fault = 0;
  logic [N-1:0][1:0] lr_ora_bits;
  int n_lutram = 0;
  logic [3:0] result_cfg;
  logic [1:0] sanity_ok;
  logic [15:0] configs_applied, retrievals;
  logic [N-1:0] ora_fail;
  logic [2*N-1:0][7:0] cell_fail;
  rut_status_t [N-1:0] diag_status;
  logic [2:0] diag_inconsistencies;
  int checks = 0, failures = 0;
  // Mechanism counters.
  int n_session_swap = 0, n_retrieve_each = 0, n_retrieve_deferred = 0, n_sanity_pass = 0,
      n_detected = 0, n_unique = 0, n_equivalent = 0, n_reorder = 0, n_tpg_fault = 0;

  fpga_bist_top dut (.clk, .rst_n, .start, .defer, .sanity_en, .user_fault_cells, .user_fault,
    .tpg_fault, .lr_fault_cells, .lr_fault, .lr_tpg_fault,
    .br_fault_cells, .br_fault, .br_tpg_fault,
    .dsp_fault_cells, .dsp_fault, .dsp_tpg_fault, .busy, .diag_busy, .done, .session,
    .result_valid, .result_session, .result_res, .result_cfg,
    .sanity_ok, .configs_applied, .retrievals, .ora_fail, .cell_fail, .lr_ora_fail, .lr_ora_bits, .br_ora_fail, .dsp_ora_fail,
    .diag_status,
    .diag_inconsistencies, .diag_unique, .diag_reorder, .tpg_pattern);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (5000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic session_d = 0;
  always @(posedge clk) begin
    if (session && !session_d) n_session_swap++;
    session_d <= session;
  end

  // Expected end-of-session ORA vector for a set of faulty logical RUTs
  // carrying the same fault: an ORA fails when exactly one side is faulty.
  function automatic logic [N-1:0] ora_expect(input logic [N-1:0] bad);
    logic [N-1:0] e;
    for (int j = 0; j < N; j++) e[j] = bad[j] ^ bad[(j + 1) % N];
    return e;
  endfunction

  // Logical RUTs of a session that are faulty, from the physical cell mask.
  function automatic logic [N-1:0] bad_ruts(input logic [2*N-1:0] cells, input int s);
    logic [N-1:0] b;
    for (int j = 0; j < N; j++) b[j] = cells[2*j + s];
    return b;
  endfunction

  // Run all five sessions; check every retrieval against the expectation.
  // exp_status/exp_inc: index 0, 1 = PLB sessions, 2 = LUT RAM session,
  // 3 = block RAM session, 4 = DSP session. The block RAM and DSP rings get
  // the same faulty RUTs as the LUT RAM ring (lr_cells, lr_tpgf); dsp_loc
  // selects the DSP defect.
  task automatic run_bist(input string name, input bit d, input bit s,
                          input logic [2*N-1:0] cells, input bit tpgf,
                          input logic [N-1:0] lr_cells, input bit lr_tpgf,
                          input logic [1:0] dsp_loc,
                          input rut_status_t [N-1:0] exp_status [5],
                          input logic [2:0] exp_inc [5]);
    int nres;
    @(negedge clk);
    defer = d; sanity_en = s; user_fault_cells = cells;
    user_fault = '{en: |cells, lut: 3'd5, bit_idx: 4'd9};
    tpg_fault = tpgf ? 12'h004 : '0;
    lr_fault_cells = lr_cells; lr_tpg_fault = lr_tpgf;
    lr_fault = '{en: |lr_cells, addr: 6'd5, val: 1'b1};
    br_fault_cells = lr_cells; br_tpg_fault = lr_tpgf;
    br_fault = '{en: |lr_cells, row: 9'd2, col: 6'd3, val: 1'b0};
    dsp_fault_cells = lr_cells; dsp_tpg_fault = lr_tpgf;
    dsp_fault = '{en: |lr_cells, loc: dsp_loc, bit_idx: 6'd4};
    start = 1; @(negedge clk); start = 0;
    nres = 0;
    while (!done) begin
      @(posedge clk); #1;
      if (result_valid) begin
        int ss;
        logic [N-1:0] exp_ora;
        ss = (result_res == RES_DSP) ? 4 : (result_res == RES_BRAM) ? 3 :
             (result_res == RES_LUTRAM) ? 2 : int'(result_session);
        nres++;
        if (d) n_retrieve_deferred++; else n_retrieve_each++;
        if (result_res != RES_PLB) begin
          if (result_res == RES_LUTRAM) n_lutram++;
          else if (result_res == RES_BRAM) n_bram++;
          else n_dsp++;
          exp_ora = lr_tpgf ? '1 : ora_expect(lr_cells);
        end else begin
          exp_ora = tpgf ? '1 : ora_expect(bad_ruts(cells, ss));
        end
        checks++;
        if (dut.diag_in !== exp_ora ||
            (result_res == RES_PLB ? ora_fail : result_res == RES_LUTRAM ? lr_ora_fail :
             result_res == RES_BRAM ? br_ora_fail : dsp_ora_fail) !== exp_ora) begin
          failures++;
          $display("%s: session %0d cfg %0d ORAs=%b expected %b", name, ss, result_cfg, dut.diag_in, exp_ora);
        end
        checks++;
        if (diag_status !== exp_status[ss]) begin
          failures++;
          $display("%s: session %0d cfg %0d diagnosis %b expected %b", name, ss, result_cfg, diag_status, exp_status[ss]);
        end
        checks++;
        if (diag_inconsistencies !== exp_inc[ss]) begin
          failures++; $display("%s: inconsistencies %0d expected %0d", name, diag_inconsistencies, exp_inc[ss]);
        end
        if (|exp_ora) n_detected++;
        if (diag_unique) n_unique++;
        if (diag_reorder) n_reorder++;
        if ((result_res != RES_PLB ? lr_tpgf : tpgf) && &exp_ora) n_tpg_fault++;
        if (diag_unique && $countones(result_res != RES_PLB ? lr_cells : bad_ruts(cells, ss)) == 2) n_equivalent++;
      end
    end
    checks += 2;
    if (nres != (d ? 5 : 2 * PLB_CONFIGS + LR_CONFIGS + BR_CONFIGS + DSP_CONFIGS)) begin failures++; $display("%s: %0d retrievals", name, nres); end
    if (configs_applied != 16'(2 * PLB_CONFIGS + LR_CONFIGS + BR_CONFIGS + DSP_CONFIGS)) begin failures++; $display("%s: configs %0d", name, configs_applied); end
    if (s) begin
      checks++;
      if (sanity_ok !== 2'b11) begin failures++; $display("%s: sanity check %b", name, sanity_ok); end
      else n_sanity_pass++;
    end
  endtask

  localparam rut_status_t G = ST_GOOD, F = ST_FAULTY, U = ST_UNKNOWN;
  rut_status_t [N-1:0] all_good, st_single, st_pair, st_triple, all_unknown;
  rut_status_t [N-1:0] exp2 [5];
  logic [2:0] inc0 [5];

  initial begin
    all_good    = {G, G, G, G, G, G};
    all_unknown = {U, U, U, U, U, U};
    st_single   = {G, G, G, F, G, G};   // RUT 2 faulty
    st_pair     = {G, G, F, F, G, G};   // RUTs 2 and 3 (document's RUT3, RUT4)
    st_triple   = {G, G, G, G, G, G};   // three equivalent faults look fault-free
    inc0 = '{3'd0, 3'd0, 3'd0, 3'd0, 3'd0};
    repeat (3) @(negedge clk); rst_n = 1;

    // 1. Fault-free, per-configuration retrieval, sanity check.
    exp2 = '{all_good, all_good, all_good, all_good, all_good};
    run_bist("fault-free", 0, 1, '0, 0, '0, 0, 2'd0, exp2, inc0);
    // 2. Faulty PLB in cell 4: RUT 2 in session 0, an ORA in session 1;
    //    LUT RAM RUT 2 stuck at 1, block RAM RUT 2 stuck at 0, DSP RUT 2
    //    with an A input register defect.
    exp2 = '{st_single, all_good, st_single, st_single, st_single};
    run_bist("single fault", 1, 0, 12'b0000_0001_0000, 0, 6'b000100, 0, 2'd2, exp2, inc0);
    // 3. Equivalent faults in cells 4 and 6: RUTs 2 and 3 of session 0;
    //    RUTs 2 and 3 of the memory and DSP rings with the same defect.
    exp2 = '{st_pair, all_good, st_pair, st_pair, st_pair};
    run_bist("equivalent pair", 1, 1, 12'b0000_0101_0000, 0, 6'b001100, 0, 2'd0, exp2, inc0);
    // 4. Equivalent faults in cells 3, 5, 7: RUTs 1, 2, 3 of session 1.
    exp2 = '{all_good, st_triple, all_good, all_good, all_good};
    run_bist("equivalent triple", 1, 0, 12'b0000_1010_1000, 0, '0, 0, 2'd0, exp2,
             '{3'd0, 3'd2, 3'd0, 3'd0, 3'd0});
    // 5. TPG faults: every ORA fails in every session.
    exp2 = '{all_unknown, all_unknown, all_unknown, all_unknown, all_unknown};
    run_bist("TPG fault", 1, 0, '0, 1, '0, 1, 2'd0, exp2, inc0);

    checks += 12;
    if (n_dsp == 0)               begin failures++; $display("no DSP session"); end
    if (n_bram == 0)              begin failures++; $display("no block RAM session"); end
    if (n_lutram == 0)            begin failures++; $display("no LUT RAM session"); end
    if (n_session_swap == 0)      begin failures++; $display("no session swap"); end
    if (n_retrieve_each == 0)     begin failures++; $display("no per-configuration retrieval"); end
    if (n_retrieve_deferred == 0) begin failures++; $display("no deferred retrieval"); end
    if (n_sanity_pass == 0)       begin failures++; $display("no sanity check"); end
    if (n_detected == 0)          begin failures++; $display("no fault detected"); end
    if (n_unique == 0)            begin failures++; $display("no unique diagnosis"); end
    if (n_equivalent == 0)        begin failures++; $display("no equivalent-fault diagnosis"); end
    if (n_reorder == 0)           begin failures++; $display("no reorder request"); end
    if (n_tpg_fault == 0)         begin failures++; $display("no TPG fault detection"); end
    $display("mechanisms: dsp=%0d lutram=%0d bram=%0d swap=%0d retrieve_each=%0d retrieve_deferred=%0d sanity=%0d detected=%0d unique=%0d equivalent=%0d reorder=%0d tpg_fault=%0d",
             n_dsp, n_lutram, n_bram, n_session_swap, n_retrieve_each, n_retrieve_deferred, n_sanity_pass, n_detected,
             n_unique, n_equivalent, n_reorder, n_tpg_fault);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
