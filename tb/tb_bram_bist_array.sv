// Self-checking test of the block RAM BIST ring (six RUTs). For each of the
// eight configurations a fault-free run must leave every ORA clear, and every
// read of RUT 0 must return the value the March test expects (data of a
// read operation shows one cycle later). A stuck-at storage bit in one RUT
// must fail exactly the two ORAs beside it, and a TPG fault every ORA.
module tb_bram_bist_array;
  import bist_pkg::*;
  localparam int N = 6;
  logic clk = 0, rst_n = 0, tpg_clr = 0, run = 0, ora_clr = 0, ora_en = 0, tpg_fault = 0, tpg_done;
  bram_test_t test;
  logic [N-1:0] fault_cells = '0, ora_fail, expf;
  bram_fault_t fault = '0;
  int checks = 0, failures = 0, read_errs, reads;

  bram_bist_array #(.N_RUT(N)) dut (.clk, .rst_n, .test, .tpg_clr, .run, .ora_clr, .ora_en,
    .fault_cells, .fault, .tpg_fault, .tpg_done, .ora_fail);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (1500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bist(input int t);
    bram_op_t pa_d, pb_d;
    test = bram_test_for(t);
    @(negedge clk); ora_clr = 1; tpg_clr = 1;
    @(negedge clk); ora_clr = 0; tpg_clr = 0; run = 1; ora_en = 1;
    read_errs = 0; reads = 0; pa_d = '0; pb_d = '0;
    while (!tpg_done) begin
      #1;
      if (pa_d.en && !pa_d.we) begin
        reads++; if (dut.g_rut[0].doa !== pa_d.data) read_errs++;
      end
      if (pb_d.en && !pb_d.we) begin
        reads++; if (dut.g_rut[0].dob !== pb_d.data) read_errs++;
      end
      pa_d = dut.pa[0]; pb_d = dut.pb[0];
      @(negedge clk);
    end
    run = 0; @(negedge clk); ora_en = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < BR_CONFIGS; t++) begin
      fault_cells = '0; tpg_fault = 0;
      bist(t);
      checks += 3;
      if (ora_fail !== '0) begin failures++; $display("config %0d fault-free: %b", t, ora_fail); end
      if (reads == 0) begin failures++; $display("config %0d: no reads", t); end
      if (read_errs != 0) begin failures++; $display("config %0d: %0d of %0d reads wrong", t, read_errs, reads); end
    end
    for (int j = 0; j < N; j++) begin
      fault_cells = '0; fault_cells[j] = 1'b1;
      fault = '{en: 1'b1, row: 9'd1, col: 6'd5, val: 1'($urandom)};
      bist((j + 3) % BR_CONFIGS);
      expf = '0; expf[j] = 1'b1; expf[(j + N - 1) % N] = 1'b1;
      checks++;
      if (ora_fail !== expf) begin failures++; $display("fault in RUT %0d: %b exp %b", j, ora_fail, expf); end
    end
    fault_cells = '0; tpg_fault = 1;
    bist(0);
    checks++;
    if (ora_fail !== '1) begin failures++; $display("TPG fault: %b", ora_fail); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
