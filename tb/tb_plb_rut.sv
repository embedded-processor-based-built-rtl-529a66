// Self-checking test of the PLB-under-test model: random truth tables,
// flip-flop selections and injected configuration-bit faults, compared each
// cycle with an independent model of eight 4-input LUTs whose inputs are
// pattern bits k, k+3, k+6, k+9 (mod 12) and whose outputs are optionally
// registered.
module tb_plb_rut;
  import bist_pkg::*;
  logic clk = 0, rst = 1, run = 0;
  plb_cfg_t cfg;
  fault_t fault;
  logic [11:0] pattern;
  logic [7:0] out, comb_ref, ff_ref, exp_out;
  int checks = 0, failures = 0;

  plb_rut dut (.clk, .rst, .run, .cfg, .fault, .pattern, .out);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] lut_ref(input plb_cfg_t c, input fault_t f, input logic [11:0] p);
    logic [7:0] o;
    for (int k = 0; k < 8; k++) begin
      int idx;
      logic [15:0] t;
      idx = p[k % 12] + 2 * p[(k + 3) % 12] + 4 * p[(k + 6) % 12] + 8 * p[(k + 9) % 12];
      t = c.lut_init[k];
      if (f.en && f.lut == k) t = t ^ (16'd1 << f.bit_idx);
      o[k] = t[idx];
    end
    return o;
  endfunction

  initial begin
    cfg = '0; fault = '0; pattern = '0; ff_ref = '0;
    @(negedge clk); rst = 0;
    for (int blkn = 0; blkn < 40; blkn++) begin
      @(negedge clk);
      cfg = (blkn < PLB_CONFIGS) ? plb_cfg_for(blkn)
          : plb_cfg_t'({$urandom, $urandom, $urandom, $urandom, 8'($urandom)});
      fault = '{en: 1'($urandom), lut: 3'($urandom), bit_idx: 4'($urandom)};
      rst = 1; @(negedge clk); rst = 0; ff_ref = '0;
      for (int i = 0; i < 300; i++) begin
        pattern = 12'($urandom);
        run = ($urandom_range(0, 3) != 0);
        #1;
        comb_ref = lut_ref(cfg, fault, pattern);
        for (int k = 0; k < 8; k++) exp_out[k] = cfg.use_ff[k] ? ff_ref[k] : comb_ref[k];
        checks++;
        if (out !== exp_out) begin
          failures++;
          if (failures < 10) $display("cfg %0d step %0d: out=%b exp=%b", blkn, i, out, exp_out);
        end
        @(posedge clk);
        if (run) ff_ref = comb_ref;
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
