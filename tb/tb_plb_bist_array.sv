// Self-checking test of the circular-comparison PLB array (six RUTs, six
// ORAs). For each session it applies full 4096-pattern BIST configurations:
// fault-free (no ORA may fail), with an emulated configuration-bit fault in
// each physical cell in turn (a RUT cell must fail exactly the two ORAs on
// its sides, an ORA cell must have no effect), and with a fault on TPG 1's
// pattern (every ORA sees RUTs from both TPGs, so all must fail).
module tb_plb_bist_array;
  import bist_pkg::*;
  localparam int N = 6;
  logic clk = 0, rst_n = 0, session = 0, tpg_clr = 0, run = 0, rut_rst = 0, ora_clr = 0, ora_en = 0;
  plb_cfg_t cfg;
  logic [2*N-1:0] fault_cells = 0;
  fault_t fault = '0;
  logic [11:0] tpg_fault = 0, tpg_pattern;
  logic [N-1:0] ora_fail, exp_fail;
  logic [2*N-1:0][7:0] cell_fail;
  int checks = 0, failures = 0;

  plb_bist_array #(.N_RUT(N)) dut (.clk, .rst_n, .session, .cfg, .tpg_clr, .run, .rut_rst,
    .ora_clr, .ora_en, .fault_cells, .fault, .tpg_fault, .ora_fail, .cell_fail, .tpg_pattern);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bist_config(input int c);
    @(negedge clk); cfg = plb_cfg_for(c); tpg_clr = 1; rut_rst = 1;
    @(negedge clk); tpg_clr = 0; rut_rst = 0; run = 1; ora_en = 1;
    repeat (4096) @(negedge clk);
    run = 0; @(negedge clk); ora_en = 0;
  endtask

  task automatic clear_oras();
    @(negedge clk); ora_clr = 1; @(negedge clk); ora_clr = 0;
  endtask

  task automatic expect_fail(input logic [N-1:0] e, input string what);
    checks++;
    if (ora_fail !== e) begin failures++; $display("%s: ora_fail=%b expected %b", what, ora_fail, e); end
  endtask

  initial begin
    cfg = plb_cfg_for(0);
    repeat (2) @(negedge clk); rst_n = 1;
    for (int s = 0; s < 2; s++) begin
      session = s[0];
      clear_oras();
      for (int c = 0; c < PLB_CONFIGS; c++) bist_config(c);
      expect_fail('0, $sformatf("fault-free session %0d", s));
      for (int k = 0; k < 2 * N; k++) begin
        clear_oras();
        fault_cells = (2*N)'(1) << k;
        fault = '{en: 1'b1, lut: 3'($urandom_range(0, 7)), bit_idx: 4'($urandom)};
        bist_config($urandom_range(0, PLB_CONFIGS - 1));
        exp_fail = '0;
        if ((k % 2) == s) begin
          int j;
          j = (k - s) / 2;                      // logical RUT index
          exp_fail[j] = 1'b1;
          exp_fail[(j + N - 1) % N] = 1'b1;
        end
        expect_fail(exp_fail, $sformatf("session %0d fault in cell %0d", s, k));
        // The physical ORA flip-flops must agree with the logical summary.
        for (int j = 0; j < N; j++) begin
          checks++;
          if ((|cell_fail[(2*j + 1 + s) % (2*N)]) !== exp_fail[j]) begin
            failures++; $display("cell_fail mapping wrong for ORA %0d", j);
          end
        end
      end
      fault = '0;
      clear_oras();
      tpg_fault = 12'h010;
      bist_config(3);
      expect_fail('1, $sformatf("TPG fault session %0d", s));
      tpg_fault = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
