// Self-checking test of a PLB cell in both roles. As a RUT (combinational
// configuration) its outputs must equal an independent evaluation of its
// eight LUTs and its ORA must stay clear; as an ORA its outputs must be zero
// and its fail bits must latch every left/right mismatch.
module tb_plb_cell;
  import bist_pkg::*;
  logic clk = 0, rst_n = 0, is_rut = 1, rut_rst = 0, run = 0, ora_clr = 0, ora_en = 0;
  plb_cfg_t cfg;
  fault_t fault;
  logic [11:0] pattern;
  logic [7:0] left_out, right_out, rut_out, fail, exp_fail, exp_out;
  int checks = 0, failures = 0;

  plb_cell dut (.clk, .rst_n, .is_rut, .rut_rst, .run, .ora_clr, .ora_en, .cfg, .fault,
                .pattern, .left_out, .right_out, .rut_out, .fail);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0; fault = '0; pattern = '0; left_out = '0; right_out = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    // RUT role.
    is_rut = 1; ora_en = 1; run = 1;
    for (int i = 0; i < 500; i++) begin
      cfg = plb_cfg_t'({$urandom, $urandom, $urandom, $urandom, 8'h00});
      pattern = 12'($urandom);
      left_out = 8'($urandom); right_out = 8'($urandom);
      #1;
      for (int k = 0; k < 8; k++)
        exp_out[k] = cfg.lut_init[k][{pattern[(k+9)%12], pattern[(k+6)%12], pattern[(k+3)%12], pattern[k]}];
      checks++;
      if (rut_out !== exp_out) begin failures++; $display("rut_out %b exp %b", rut_out, exp_out); end
      @(negedge clk);
    end
    checks++;
    if (fail !== '0) begin failures++; $display("ORA recorded while RUT"); end
    // ORA role.
    is_rut = 0; ora_clr = 1; @(negedge clk); ora_clr = 0; exp_fail = '0;
    for (int i = 0; i < 500; i++) begin
      left_out = 8'($urandom);
      right_out = ($urandom_range(0, 19) == 0) ? left_out ^ (8'd1 << $urandom_range(0, 7)) : left_out;
      #1;
      checks++;
      if (rut_out !== '0) begin failures++; $display("ORA cell drives rut_out"); end
      @(posedge clk); exp_fail |= left_out ^ right_out; #1;
      checks++;
      if (fail !== exp_fail) begin failures++; $display("fail %b exp %b", fail, exp_fail); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
