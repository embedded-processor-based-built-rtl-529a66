// Self-checking test of the shared BIST definitions:
//   - March Y step tables for the three LUT RAM modes: length 8n, every
//     read expects what the algorithm last wrote, each word written three
//     times and read five times, ascending/descending address order of the
//     four March elements, dual-port read address one word ahead;
//   - PLB configurations: across the 12 configurations every truth-table
//     bit of every LUT takes both values and every output is used both
//     registered and combinational;
//   - block RAM test list: word counts times widths fill the 16 Kbit data
//     array (18 Kbit with parity), algorithms and cycle counts;
//   - DSP attribute sets: each attribute is both on and off somewhere.
module tb_bist_pkg;
  import bist_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  initial begin
    // LUT RAM March Y tables.
    int unsigned exp_words [3] = '{64, 32, 16};
    for (int mi = 0; mi < 3; mi++) begin
      lr_mode_t m;
      int unsigned n;
      logic mem [64];
      int wr [64], rd [64];
      m = lr_mode_t'(mi);
      n = lr_words(m);
      check(n == exp_words[mi], $sformatf("words mode %0d", mi));
      foreach (mem[a]) begin mem[a] = 1'bx; wr[a] = 0; rd[a] = 0; end
      for (int unsigned i = 0; i < 8 * n; i++) begin
        lr_op_t op;
        int unsigned a, e, k;
        op = lr_march_y(m, i);
        a = op.addr;
        // element and position: e0 up w0, e1 up r0 w1 r1, e2 down r1 w0 r0, e3 up r0
        if (i < n) begin e = 0; k = i; end
        else if (i < 4 * n) begin e = 1; k = (i - n) / 3; end
        else if (i < 7 * n) begin e = 2; k = n - 1 - (i - 4 * n) / 3; end
        else begin e = 3; k = i - 7 * n; end
        check(a == k, $sformatf("mode %0d step %0d addr %0d exp %0d (element %0d)", mi, i, a, k, e));
        check(op.dpra == 4'((a + 1) % 16), $sformatf("mode %0d step %0d dpra", mi, i));
        if (op.we) begin
          mem[a] = op.din; wr[a]++;
        end else begin
          check(mem[a] === op.din, $sformatf("mode %0d step %0d read expects %b, memory %b", mi, i, op.din, mem[a]));
          rd[a]++;
        end
      end
      for (int unsigned a = 0; a < n; a++)
        check(wr[a] == 3 && rd[a] == 5, $sformatf("mode %0d addr %0d writes %0d reads %0d", mi, a, wr[a], rd[a]));
    end

    // PLB configurations.
    begin
      logic [PLB_OUTS-1:0][15:0] seen0, seen1;
      logic [PLB_OUTS-1:0] ff0, ff1;
      seen0 = '0; seen1 = '0; ff0 = '0; ff1 = '0;
      for (int c = 0; c < PLB_CONFIGS; c++) begin
        plb_cfg_t cfg;
        cfg = plb_cfg_for(c);
        for (int k = 0; k < PLB_OUTS; k++) begin
          seen0[k] |= ~cfg.lut_init[k];
          seen1[k] |= cfg.lut_init[k];
          if (cfg.use_ff[k]) ff1[k] = 1'b1; else ff0[k] = 1'b1;
        end
      end
      for (int k = 0; k < PLB_OUTS; k++) begin
        check(&seen0[k] && &seen1[k], $sformatf("LUT %0d truth-table bits %h %h", k, seen0[k], seen1[k]));
        check(ff0[k] && ff1[k], $sformatf("output %0d register use", k));
      end
    end

    // Block RAM tests.
    for (int i = 0; i < BR_CONFIGS; i++) begin
      bram_test_t t;
      int unsigned bits, depth;
      t = bram_test_for(i);
      bits = bram_bits(t.cfg.width); depth = bram_depth(t.cfg.width);
      check(bits * depth == ((bits % 9 == 0) ? 18432 : 16384), $sformatf("bram cfg %0d size", i));
      check(t.cfg.fifo == (t.alg == ALG_MARCH_Y_FIFO), $sformatf("bram cfg %0d mode", i));
      check(bram_alg_cycles(t.alg, depth) ==
            depth * ((t.alg == ALG_MARCH_LR || t.alg == ALG_MARCH_S2PF) ? 14 : (t.alg == ALG_MATS_PLUS) ? 10 : 6),
            $sformatf("bram cfg %0d cycles", i));
    end
    check(bram_test_for(0).alg == ALG_MARCH_LR && bram_test_for(0).cfg.width == BW_36, "bram cfg 0");
    check(bram_test_for(1).cfg.width == BW_2 && bram_test_for(2).cfg.width == BW_1, "bram MATS+ widths");
    check(bram_test_for(3).alg == ALG_MARCH_S2PF && bram_test_for(3).cfg.width == BW_36 &&
          bram_test_for(3).cfg.wmode == WM_READ_FIRST, "bram two-port cfg");

    // DSP attribute sets.
    begin
      logic [4:0] on, off;
      on = '0; off = '0;
      for (int i = 0; i < DSP_CONFIGS; i++) begin
        on  |= dsp_attr_for(i);
        off |= ~dsp_attr_for(i);
      end
      check(&on && &off, $sformatf("DSP attributes on %b off %b", on, off));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
