// Self-checking test of the block RAM model. RAM mode, every aspect ratio
// and each write mode (read-first, write-first, no-change): random reads
// and writes on both ports against a reference array of words (in
// read-first mode also port B reading the word port A writes), one-cycle
// latency, then a stuck-at bit.
// FIFO mode, every FIFO width: random pushes and pops against a reference
// queue, with Full, Empty and the Almost flags checked each cycle.
module tb_bram_rut;
  import bist_pkg::*;
  logic clk = 0, rst = 1;
  bram_cfg_t cfg;
  bram_op_t pa, pb;
  bram_fault_t fault;
  logic [35:0] doa, dob, exp_a, exp_b;
  logic full, empty, afull, aempty;
  logic [35:0] refm [int];
  logic [35:0] q [$];
  int checks = 0, failures = 0;

  bram_rut dut (.clk, .rst, .cfg, .pa, .pb, .fault, .doa, .dob, .full, .empty, .afull, .aempty);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [35:0] wmask(input bram_width_t w);
    return 36'((37'd1 << bram_bits(w)) - 1);
  endfunction

  initial begin
    pa = '0; pb = '0; fault = '0;
    cfg = '{fifo: 1'b0, wmode: WM_READ_FIRST, width: BW_36, afull_off: 14'd3, aempty_off: 14'd2};
    @(negedge clk); rst = 0;
    for (int wi = 0; wi < 18; wi++) begin
      int depth, w;
      w = wi % 6;
      cfg.wmode = bram_wmode_t'(wi / 6);
      cfg.width = bram_width_t'(w);
      depth = bram_depth(cfg.width);
      refm.delete();
      pb = '0;
      // Initialise every word through port A.
      for (int a = 0; a < depth; a++) begin
        @(negedge clk); pa = '{en: 1, we: 1, addr: 14'(a), data: '0}; refm[a] = '0;
      end
      @(negedge clk); pa = '0;
      for (int i = 0; i < 2000; i++) begin
        int aa, ab;
        @(negedge clk);
        aa = $urandom_range(0, depth - 1);
        ab = $urandom_range(0, depth - 1);
        if (ab == aa) ab = (aa + 1) % depth;
        if (i % 7 == 0) ab = aa ^ 1;   // same row, other word
        // Read-first: port B reads the word port A is writing (old word).
        if (i % 11 == 5 && cfg.wmode == WM_READ_FIRST) ab = aa;
        pa = '{en: 1'b1, we: 1'($urandom), addr: 14'(aa), data: {$urandom, 4'($urandom)} & wmask(cfg.width)};
        pb = '{en: 1'b1, we: 1'($urandom), addr: 14'(ab), data: {$urandom, 4'($urandom)} & wmask(cfg.width)};
        if (ab == aa) pb.we = 1'b0;
        exp_a = refm[aa]; exp_b = refm[ab];
        if (cfg.wmode == WM_WRITE_FIRST) begin
          if (pa.we) exp_a = pa.data;
          if (pb.we) exp_b = pb.data;
        end else if (cfg.wmode == WM_NO_CHANGE) begin
          if (pa.we) exp_a = doa;
          if (pb.we) exp_b = dob;
        end
        @(posedge clk);
        if (pa.we) refm[aa] = pa.data;
        if (pb.we) refm[ab] = pb.data;
        #1;
        checks += 2;
        if (doa !== exp_a) begin failures++; if (failures < 10) $display("m%0d w%0d A[%0d]=%h exp %h", cfg.wmode, w, aa, doa, exp_a); end
        if (dob !== exp_b) begin failures++; if (failures < 10) $display("w%0d B[%0d]=%h exp %h", w, ab, dob, exp_b); end
      end
    end
    // Stuck-at bit 7 of row 3 in 512x36 mode.
    @(negedge clk); cfg.width = BW_36; pb = '0;
    fault = '{en: 1'b1, row: 9'd3, col: 6'd7, val: 1'b1};
    pa = '{en: 1, we: 1, addr: 14'd3, data: '0};
    @(negedge clk); pa = '{en: 1, we: 0, addr: 14'd3, data: '0};
    @(negedge clk); checks++;
    if (doa !== 36'h80) begin failures++; $display("stuck-at read %h", doa); end
    fault = '0; pa = '0;
    // FIFO modes.
    cfg.fifo = 1'b1;
    for (int w = 2; w < 6; w++) begin
      int depth;
      cfg.width = bram_width_t'(w);
      depth = bram_depth(cfg.width);
      q.delete();
      @(negedge clk); rst = 1; @(negedge clk); rst = 0;
      for (int i = 0; i < 4 * depth; i++) begin
        bit push, pop, do_push, do_pop;
        logic [35:0] d;
        // Phases: mostly push, then mostly pop, twice.
        push = ((i / depth) % 2 == 0) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
        pop  = !push || ($urandom_range(0, 1) == 0);
        d = {$urandom, 4'($urandom)} & wmask(cfg.width);
        @(negedge clk);
        pa = '{en: push, we: 1'b1, addr: '0, data: d};
        pb = '{en: pop, we: 1'b0, addr: '0, data: '0};
        checks += 4;
        if (full !== (q.size() == depth)) begin failures++; $display("full wrong at %0d", q.size()); end
        if (empty !== (q.size() == 0)) begin failures++; $display("empty wrong at %0d", q.size()); end
        if (afull !== (q.size() >= depth - 3)) begin failures++; $display("afull wrong at %0d", q.size()); end
        if (aempty !== (q.size() <= 2)) begin failures++; $display("aempty wrong at %0d", q.size()); end
        do_push = push && q.size() != depth;
        do_pop  = pop && q.size() != 0;
        exp_b = do_pop ? q[0] : dob;
        @(posedge clk);
        if (do_pop) void'(q.pop_front());
        if (do_push) q.push_back(d);
        #1;
        if (do_pop) begin
          checks++;
          if (dob !== exp_b) begin failures++; if (failures < 20) $display("FIFO w%0d pop %h exp %h", w, dob, exp_b); end
        end
      end
      // Deterministic pass: drain, fill past full, then drain past empty.
      for (int ph = 0; ph < 3; ph++) begin
        int steps;
        steps = (ph == 0) ? q.size() + 1 : depth + 2;
        for (int i = 0; i < steps; i++) begin
          bit push, do_push, do_pop;
          logic [35:0] d;
          push = (ph == 1);
          d = {$urandom, 4'($urandom)} & wmask(cfg.width);
          @(negedge clk);
          pa = '{en: push, we: 1'b1, addr: '0, data: d};
          pb = '{en: !push, we: 1'b0, addr: '0, data: '0};
          checks += 4;
          if (full !== (q.size() == depth)) begin failures++; $display("full wrong at %0d", q.size()); end
          if (empty !== (q.size() == 0)) begin failures++; $display("empty wrong at %0d", q.size()); end
          if (afull !== (q.size() >= depth - 3)) begin failures++; $display("afull wrong at %0d", q.size()); end
          if (aempty !== (q.size() <= 2)) begin failures++; $display("aempty wrong at %0d", q.size()); end
          do_push = push && q.size() != depth;
          do_pop  = !push && q.size() != 0;
          exp_b = do_pop ? q[0] : dob;
          @(posedge clk);
          if (do_pop) void'(q.pop_front());
          if (do_push) q.push_back(d);
          #1;
          checks++;
          if (dob !== exp_b) begin failures++; if (failures < 20) $display("FIFO w%0d pop %h exp %h", w, dob, exp_b); end
        end
      end
      pa = '0; pb = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
