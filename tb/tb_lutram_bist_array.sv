// Self-checking test of the LUT RAM BIST ring (six RUTs). Per mode: a
// fault-free March Y run must leave every ORA clear and RUT 0 must return
// the values March Y expects on every read; a stuck-at cell in one RUT must
// fail exactly the two ORAs beside it; a TPG fault must fail every ORA.
module tb_lutram_bist_array;
  import bist_pkg::*;
  localparam int N = 6;
  logic clk = 0, rst_n = 0, tpg_clr = 0, run = 0, ora_clr = 0, ora_en = 0, tpg_fault = 0, tpg_done;
  lr_mode_t mode;
  logic [N-1:0] fault_cells = '0, ora_fail, expf;
  lr_fault_t fault = '0;
  logic [N-1:0][1:0] ora_bits;
  int checks = 0, failures = 0, read_errs;

  lutram_bist_array #(.N_RUT(N)) dut (.clk, .rst_n, .mode, .tpg_clr, .run, .ora_clr, .ora_en,
    .fault_cells, .fault, .tpg_fault, .tpg_done, .ora_fail, .ora_bits);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bist(input int m);
    mode = lr_mode_t'(m);
    @(negedge clk); ora_clr = 1; tpg_clr = 1;
    @(negedge clk); ora_clr = 0; tpg_clr = 0; run = 1; ora_en = 1;
    read_errs = 0;
    while (!tpg_done) begin
      #1;
      if (dut.u_tpg0.op_valid && !dut.u_tpg0.op.we && dut.g_rut[0].u_rut.spo !== dut.u_tpg0.op.din)
        read_errs++;
      @(negedge clk);
    end
    run = 0; ora_en = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int m = 0; m < 3; m++) begin
      fault_cells = '0; fault = '0; tpg_fault = 0;
      bist(m);
      checks += 2;
      if (ora_fail !== '0) begin failures++; $display("mode %0d fault-free: %b", m, ora_fail); end
      if (read_errs != 0) begin failures++; $display("mode %0d: %0d March Y read errors", m, read_errs); end
      for (int j = 0; j < N; j++) begin
        fault_cells = '0; fault_cells[j] = 1'b1;
        fault = '{en: 1'b1, addr: 6'($urandom_range(0, lr_words(lr_mode_t'(m)) - 1)), val: 1'($urandom)};
        bist(m);
        expf = '0; expf[j] = 1'b1; expf[(j + N - 1) % N] = 1'b1;
        checks++;
        if (ora_fail !== expf) begin failures++; $display("mode %0d fault in RUT %0d: %b exp %b", m, j, ora_fail, expf); end
      end
      fault_cells = '0; tpg_fault = 1;
      bist(m);
      checks++;
      if (ora_fail !== '1) begin failures++; $display("mode %0d TPG fault: %b", m, ora_fail); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
