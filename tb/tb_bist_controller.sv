// Self-checking test of the BIST sequencer with a behavioural stand-in for
// the PLB array (its ORAs report a failure exactly while an emulated fault
// is applied, when the test enables that), the LUT RAM array (its TPG
// reports done after 8n run cycles for an n-word mode), the block RAM array
// (done after the March cycle count of the configuration), the DSP array
// (done after DSP_PATTERNS run cycles) and the diagnosis
// engine (done three cycles after start). Three runs: per-configuration retrieval with
// the sanity check, deferred retrieval, and a sanity check that must fail.
// Checked: the order of configurations and sessions, the RUT configuration
// and LUT RAM mode presented, exactly PATTERNS run cycles per PLB
// configuration, 8n per LUT RAM one and the DSP attribute sets in order,
// one array running at a time, ORA clears only at session starts
// (and after the sanity check), and the retrieval counts.
module tb_bist_controller;
  import bist_pkg::*;
  localparam int N = 6, NC = PLB_CONFIGS, PAT = 4096;
  logic clk = 0, rst_n = 0, start = 0, defer = 0, sanity_en = 0;
  logic [2*N-1:0] user_fault_cells = 0, fault_cells;
  fault_t user_fault = '0, fault;
  logic session, tpg_clr, run, rut_rst, ora_clr, ora_en, diag_start, diag_done;
  res_t res, result_res;
  logic lr_tpg_clr, lr_run, lr_ora_clr, lr_ora_en, lr_done;
  bram_test_t br_test;
  logic br_tpg_clr, br_run, br_ora_clr, br_ora_en, br_done;
  int br_cnt = 0, br_runs = 0, br_clr_seen = 0;
  logic [1:0] dsp_cfg;
  logic dsp_tpg_clr, dsp_run, dsp_ora_clr, dsp_ora_en, dsp_done;
  int dsp_cnt = 0, dsp_runs = 0, dsp_clr_seen = 0;
  lr_mode_t lr_mode;
  int lr_cnt = 0, lr_runs = 0, lr_clr_seen = 0;
  plb_cfg_t cfg;
  logic [N-1:0] ora_fail;
  logic busy, done, result_valid, result_session;
  logic [3:0] result_cfg;
  logic [1:0] sanity_ok;
  logic [15:0] configs_applied, retrievals;
  int checks = 0, failures = 0;
  bit array_detects = 1;
  int diag_cnt = 0;

  bist_controller #(.N_RUT(N)) dut (.clk, .rst_n, .start, .defer, .sanity_en, .user_fault_cells,
    .user_fault, .session, .cfg, .tpg_clr, .run, .rut_rst, .ora_clr, .ora_en, .fault_cells, .fault,
    .ora_fail, .res, .lr_mode, .lr_tpg_clr, .lr_run, .lr_ora_clr, .lr_ora_en, .lr_done,
    .br_test, .br_tpg_clr, .br_run, .br_ora_clr, .br_ora_en, .br_done,
    .dsp_cfg, .dsp_tpg_clr, .dsp_run, .dsp_ora_clr, .dsp_ora_en, .dsp_done,
    .diag_start, .diag_done, .busy, .done, .result_valid, .result_session, .result_res, .result_cfg,
    .sanity_ok, .configs_applied, .retrievals);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Array stand-in: a latched failure while a fault is applied during a run.
  always_ff @(posedge clk) begin
    if (ora_clr) ora_fail <= '0;
    else if (ora_en && fault.en && array_detects) ora_fail <= 6'b000011;
  end
  // Diagnosis stand-in.
  always_ff @(posedge clk) begin
    if (diag_start) diag_cnt <= 3;
    else if (diag_cnt > 0) diag_cnt <= diag_cnt - 1;
  end
  assign diag_done = (diag_cnt == 0);
  // LUT RAM array stand-in.
  assign lr_done = (lr_cnt >= 8 * lr_words(lr_mode));
  always_ff @(posedge clk) begin
    if (lr_tpg_clr) lr_cnt <= 0;
    else if (lr_run) lr_cnt <= lr_cnt + 1;
  end
  // Block RAM array stand-in.
  assign br_done = (br_cnt >= bram_alg_cycles(br_test.alg, bram_depth(br_test.cfg.width)));
  always_ff @(posedge clk) begin
    if (br_tpg_clr) br_cnt <= 0;
    else if (br_run) br_cnt <= br_cnt + 1;
  end
  // DSP array stand-in.
  assign dsp_done = (dsp_cnt >= DSP_PATTERNS);
  always_ff @(posedge clk) begin
    if (dsp_tpg_clr) dsp_cnt <= 0;
    else if (dsp_run) dsp_cnt <= dsp_cnt + 1;
  end
  logic dsp_run_d = 0;
  always @(posedge clk) begin
    if (dsp_run_d && !dsp_run) begin
      checks++;
      if (dsp_cfg != 2'(dsp_runs) || dsp_cnt != DSP_PATTERNS + 1) begin
        failures++; $display("DSP config %0d: cfg %0d ran %0d cycles", dsp_runs, dsp_cfg, dsp_cnt);
      end
      dsp_runs++;
    end
    if (dsp_ora_clr) dsp_clr_seen++;
    if ((run || lr_run || br_run) && dsp_run) begin failures++; $display("two arrays running"); end
    dsp_run_d <= dsp_run;
  end
  logic br_run_d = 0;
  always @(posedge clk) begin
    if (br_run_d && !br_run) begin
      checks++;
      if (br_test != bram_test_for(br_runs) ||
          br_cnt != bram_alg_cycles(br_test.alg, bram_depth(br_test.cfg.width)) + 1) begin
        failures++; $display("block RAM config %0d: ran %0d cycles", br_runs, br_cnt);
      end
      br_runs++;
    end
    if (br_ora_clr) br_clr_seen++;
    if ((run || lr_run) && br_run) begin failures++; $display("two arrays running"); end
    br_run_d <= br_run;
  end
  logic lr_run_d = 0;
  always @(posedge clk) begin
    if (lr_run_d && !lr_run) begin
      checks++;
      // lr_run stays high for the cycle in which done is seen.
      if (lr_cnt != 8 * lr_words(lr_mode) + 1 || lr_mode != lr_mode_t'(lr_runs)) begin
        failures++; $display("LUT RAM config %0d: mode %0d ran %0d cycles", lr_runs, lr_mode, lr_cnt);
      end
      lr_runs++;
    end
    if (lr_ora_clr) lr_clr_seen++;
    if (run && lr_run) begin failures++; $display("both arrays running"); end
    lr_run_d <= lr_run;
  end

  // Monitor: run lengths, configuration order, results.
  int run_len, cfg_seen, res_seen, clr_seen, sess_cfgs;
  logic run_d;
  always @(posedge clk) begin
    if (rst_n) begin
      if (run) begin
        run_len++;
        if (cfg !== plb_cfg_for(cfg_seen % NC)
            && !fault.en) begin
          failures++; $display("cfg mismatch in config %0d", cfg_seen);
        end
      end
      if (run_d && !run) begin
        checks++;
        if (run_len != PAT) begin failures++; $display("run length %0d", run_len); end
        if (!fault.en) cfg_seen++;
        run_len = 0;
      end
      if (ora_clr) clr_seen++;
      if (result_valid) res_seen++;
      run_d = run;
    end
  end

  task automatic do_run(input bit d, input bit s, input bit detect, input int exp_res,
                        input logic [1:0] exp_sanity);
    @(negedge clk);
    array_detects = detect; defer = d; sanity_en = s;
    cfg_seen = 0; res_seen = 0; clr_seen = 0; run_len = 0; lr_runs = 0; lr_clr_seen = 0;
    br_runs = 0; br_clr_seen = 0; dsp_runs = 0; dsp_clr_seen = 0;
    start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks += 11;
    if (dsp_runs != DSP_CONFIGS) begin failures++; $display("DSP configs run %0d", dsp_runs); end
    if (dsp_clr_seen != 1) begin failures++; $display("DSP ORA clears %0d", dsp_clr_seen); end
    if (br_runs != BR_CONFIGS) begin failures++; $display("block RAM configs run %0d", br_runs); end
    if (br_clr_seen != 1) begin failures++; $display("block RAM ORA clears %0d", br_clr_seen); end
    if (cfg_seen != 2 * NC) begin failures++; $display("configs run %0d", cfg_seen); end
    if (lr_runs != LR_CONFIGS) begin failures++; $display("LUT RAM configs run %0d", lr_runs); end
    if (lr_clr_seen != 1) begin failures++; $display("LUT RAM ORA clears %0d", lr_clr_seen); end
    if (configs_applied != 16'(2 * NC + LR_CONFIGS + BR_CONFIGS + DSP_CONFIGS)) begin failures++; $display("configs_applied %0d", configs_applied); end
    if (res_seen != exp_res || retrievals != 16'(exp_res)) begin
      failures++; $display("retrievals %0d/%0d exp %0d", res_seen, retrievals, exp_res);
    end
    if (clr_seen != (s ? 4 : 2)) begin failures++; $display("ORA clears %0d", clr_seen); end
    if (sanity_ok !== exp_sanity) begin failures++; $display("sanity_ok %b exp %b", sanity_ok, exp_sanity); end
  endtask

  initial begin
    run_d = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    do_run(0, 1, 1, 2 * NC + LR_CONFIGS + BR_CONFIGS + DSP_CONFIGS, 2'b11);
    checks++;
    if (result_res !== RES_DSP || result_cfg !== 4'(DSP_CONFIGS - 1)) begin
      failures++; $display("last result res %0d cfg %0d", result_res, result_cfg);
    end
    do_run(1, 0, 1, 5, 2'b00);
    do_run(0, 1, 0, 2 * NC + LR_CONFIGS + BR_CONFIGS + DSP_CONFIGS, 2'b00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
