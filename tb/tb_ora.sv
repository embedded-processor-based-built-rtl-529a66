// Self-checking test of the comparison ORA: random left/right outputs with
// occasional mismatches, enable gaps and clears, against a reference model
// of the sticky XOR/OR flip-flop.
module tb_ora;
  localparam int N = 2;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [N-1:0] l = '0, r = '0, fail, ref_fail;
  int checks = 0, failures = 0;

  ora #(.N(N)) dut (.clk, .rst_n, .clr, .en, .left_out(l), .right_out(r), .fail);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_fail = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      l   = N'($urandom);
      r   = ($urandom_range(0, 9) == 0) ? N'($urandom) : l;
      en  = ($urandom_range(0, 7) != 0);
      clr = ($urandom_range(0, 99) == 0);
      @(posedge clk);
      if (clr) ref_fail = '0;
      else if (en) ref_fail = ref_fail | (l ^ r);
      #1;
      checks++;
      if (fail !== ref_fail) begin
        failures++;
        $display("mismatch at %0d: fail=%b expected=%b", i, fail, ref_fail);
      end
    end
    // A mismatch must stay latched through later matching inputs.
    @(negedge clk); clr = 1; @(negedge clk); clr = 0; en = 1;
    l = 2'b01; r = 2'b00; @(negedge clk);
    l = 2'b00; repeat (5) @(negedge clk);
    checks++;
    if (fail !== 2'b01) begin failures++; $display("not sticky: %b", fail); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
