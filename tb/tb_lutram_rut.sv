// Self-checking test of the LUT RAM model: random writes and reads in the
// three modes with and without a stuck-at cell, against a reference array.
module tb_lutram_rut;
  import bist_pkg::*;
  logic clk = 0;
  lr_mode_t mode;
  logic we = 0, din = 0, spo, dpo, exp_spo, exp_dpo;
  logic [5:0] addr = 0, a;
  logic [3:0] dpra = 0;
  lr_fault_t fault = '0;
  bit refm [64];
  int checks = 0, failures = 0;

  lutram_rut dut (.clk, .mode, .we, .din, .addr, .dpra, .fault, .spo, .dpo);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 3; m++) begin
      mode = lr_mode_t'(m);
      fault = '{en: (m != 1), addr: 6'(3 + m), val: 1'($urandom)};
      // Initialise the whole array through the mode's own address range.
      for (int i = 0; i < 64; i++) begin
        @(negedge clk); we = 1; addr = 6'(i); din = 0;
      end
      @(negedge clk); we = 0;
      for (int i = 0; i < 64; i++) refm[i] = 0;
      for (int i = 0; i < 3000; i++) begin
        @(negedge clk);
        we = 1'($urandom); din = 1'($urandom); addr = 6'($urandom); dpra = 4'($urandom);
        a = (m == 0) ? addr : (m == 1) ? {1'b0, addr[4:0]} : {2'b00, addr[3:0]};
        #1;
        exp_spo = (fault.en && fault.addr == a) ? fault.val : refm[a];
        exp_dpo = (m != 2) ? 1'b0 : (fault.en && fault.addr == {2'b00, dpra}) ? fault.val : refm[dpra];
        checks++;
        if (spo !== exp_spo || dpo !== exp_dpo) begin
          failures++;
          if (failures < 10) $display("mode %0d addr %0d: spo=%b/%b dpo=%b/%b", m, addr, spo, exp_spo, dpo, exp_dpo);
        end
        @(posedge clk);
        if (we) refm[a] = din;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
