// Self-checking test of the DSP-based TPG: after a clear the pattern must
// step by 0x691 per clock, hold while run is low, and visit all 4096 12-bit
// values in 4096 clocks before returning to 0 (pseudo-exhaustive coverage).
module tb_dsp_tpg;
  logic clk = 0, clr = 1, run = 0;
  logic [11:0] pattern, expv;
  bit seen [4096];
  int checks = 0, failures = 0, distinct = 0;

  dsp_tpg dut (.clk, .clr, .run, .pattern);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); @(negedge clk); clr = 0; run = 1;
    expv = 12'h000;
    for (int i = 0; i < 4096; i++) begin
      checks++;
      if (pattern !== expv) begin
        failures++;
        if (failures < 10) $display("step %0d: %h expected %h", i, pattern, expv);
      end
      if (!seen[pattern]) begin seen[pattern] = 1; distinct++; end
      expv = expv + 12'h691;
      @(negedge clk);
    end
    checks++;
    if (distinct != 4096) begin failures++; $display("only %0d distinct patterns", distinct); end
    checks++;
    if (pattern !== 12'h000) begin failures++; $display("no wrap to 0 after 4096: %h", pattern); end
    run = 0; repeat (3) @(negedge clk);
    checks++;
    if (pattern !== 12'h000) begin failures++; $display("moved while run low"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
