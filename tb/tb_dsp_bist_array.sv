// Self-checking test of the DSP BIST ring. For each of the four attribute
// configurations it runs the full pattern sequence and checks the ORA
// readback against the expected circular-comparison result:
//   - fault-free ring: no ORA fails;
//   - P register bit stuck-at-0 or product bit stuck-at-1 in one DSP: the
//     two ORAs next to it fail in every configuration;
//   - A input register defect: detected only in configurations with the
//     input register in use; M register defect: only with MREG in use;
//   - the same defect in every DSP (equivalent faults): not detected;
//   - a fault on TPG 1: every ORA fails (each compares the two TPGs).
module tb_dsp_bist_array;
  import bist_pkg::*;
  localparam int unsigned N = 6;
  localparam int unsigned PATTERNS = DSP_PATTERNS;
  logic clk = 0, rst_n = 0, tpg_clr = 0, run = 0, ora_clr = 0, ora_en = 0, tpg_fault = 0;
  logic [1:0] cfg = 0;
  logic [N-1:0] fault_cells = 0, ora_fail;
  dsp_fault_t fault = '0;
  logic tpg_done;
  int checks = 0, failures = 0;

  dsp_bist_array #(.N_RUT(N), .PATTERNS(PATTERNS)) dut (.clk, .rst_n, .cfg, .tpg_clr, .run,
    .ora_clr, .ora_en, .fault_cells, .fault, .tpg_fault, .tpg_done, .ora_fail);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One BIST configuration, ORAs cleared first.
  task automatic run_cfg(input int c, output logic [N-1:0] res);
    @(negedge clk); cfg = 2'(c); ora_clr = 1; tpg_clr = 1;
    @(negedge clk); ora_clr = 0; tpg_clr = 0; run = 1; ora_en = 1;
    while (!tpg_done) @(negedge clk);
    run = 0;
    @(negedge clk); ora_en = 0;
    res = ora_fail;
  endtask

  task automatic expect_eq(input logic [N-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: ora_fail=%b expected %b", what, got, exp);
    end
  endtask

  function automatic logic [N-1:0] around(input int k);
    logic [N-1:0] m = '0;
    m[k] = 1'b1;
    m[(k + N - 1) % N] = 1'b1;
    return m;
  endfunction

  initial begin
    logic [N-1:0] r;
    dsp_attr_t at;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int c = 0; c < 4; c++) begin
      at = dsp_attr_for(c);
      fault_cells = 0; fault = '0; tpg_fault = 0;
      run_cfg(c, r); expect_eq(r, '0, $sformatf("cfg %0d fault-free", c));
      for (int k = 0; k < N; k += 2) begin
        fault_cells = N'(1) << k;
        fault = '{en: 1'b1, loc: 2'd0, bit_idx: 6'(3 + 7 * k)};
        run_cfg(c, r); expect_eq(r, around(k), $sformatf("cfg %0d P stuck RUT%0d", c, k));
        fault = '{en: 1'b1, loc: 2'd1, bit_idx: 6'(5 * k + 2)};
        run_cfg(c, r); expect_eq(r, around(k), $sformatf("cfg %0d product RUT%0d", c, k));
        fault = '{en: 1'b1, loc: 2'd2, bit_idx: 6'(k + 1)};
        run_cfg(c, r); expect_eq(r, at.areg ? around(k) : '0, $sformatf("cfg %0d areg RUT%0d", c, k));
        fault = '{en: 1'b1, loc: 2'd3, bit_idx: 6'(2 * k + 4)};
        run_cfg(c, r); expect_eq(r, at.mreg ? around(k) : '0, $sformatf("cfg %0d mreg RUT%0d", c, k));
      end
      fault_cells = '1; fault = '{en: 1'b1, loc: 2'd0, bit_idx: 6'd9};
      run_cfg(c, r); expect_eq(r, '0, $sformatf("cfg %0d equivalent faults", c));
      fault_cells = 0; fault = '0; tpg_fault = 1;
      run_cfg(c, r); expect_eq(r, '1, $sformatf("cfg %0d TPG fault", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
