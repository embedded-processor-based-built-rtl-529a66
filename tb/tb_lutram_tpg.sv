// Self-checking test of the LUT RAM TPG: for each mode the sequence of
// valid steps must be March Y for n words (n = 64, 32, 16), rebuilt here
// element by element, exactly 8n steps long, delivered one per clock, with
// done rising right after the last step.
module tb_lutram_tpg;
  import bist_pkg::*;
  logic clk = 0, clr = 1, run = 0, op_valid, done;
  lr_mode_t mode;
  lr_op_t op;
  lr_op_t expq [$];
  int checks = 0, failures = 0;

  lutram_tpg dut (.clk, .clr, .run, .mode, .op, .op_valid, .done);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic lr_op_t mk(input bit w, input bit d, input int a);
    lr_op_t o;
    o.we = w; o.din = d; o.addr = 6'(a); o.dpra = 4'((a + 1) % 16);
    return o;
  endfunction

  initial begin
    for (int m = 0; m < 3; m++) begin
      int n, cyc, got;
      mode = lr_mode_t'(m);
      n = (m == 0) ? 64 : (m == 1) ? 32 : 16;
      expq.delete();
      for (int a = 0; a < n; a++) expq.push_back(mk(1, 0, a));
      for (int a = 0; a < n; a++) begin
        expq.push_back(mk(0, 0, a)); expq.push_back(mk(1, 1, a)); expq.push_back(mk(0, 1, a));
      end
      for (int a = n - 1; a >= 0; a--) begin
        expq.push_back(mk(0, 1, a)); expq.push_back(mk(1, 0, a)); expq.push_back(mk(0, 0, a));
      end
      for (int a = 0; a < n; a++) expq.push_back(mk(0, 0, a));
      @(negedge clk); clr = 1; @(negedge clk); clr = 0; run = 1;
      cyc = 0; got = 0;
      while (!done && cyc < 2000) begin
        #1;
        if (op_valid) begin
          checks++;
          if (got >= expq.size() || op !== expq[got]) begin
            failures++;
            if (failures < 10) $display("mode %0d step %0d: %p", m, got, op);
          end
          got++;
        end
        @(negedge clk); cyc++;
      end
      checks += 2;
      if (got != 8 * n) begin failures++; $display("mode %0d: %0d steps", m, got); end
      if (cyc != 8 * n + 1) begin failures++; $display("mode %0d: %0d cycles to done", m, cyc); end
      run = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
