// Self-checking test of the block RAM March TPG. For every configuration it
// rebuilds the expected operation stream from the published element lists
// (MATS+ through port A then port B, March LR, the two-port March s2pf-,
// FIFO March Y) and compares it operation by operation, including the port
// B reads that March s2pf- issues alongside port A, and checks the length
// against the document's cycle counts: 2 x 5 x A for MATS+, 6 x A for the
// FIFO test, and 14 x A for March LR and March s2pf- (the document's 58 x A
// for March LR includes background data sequences that are not generated).
module tb_bram_march_tpg;
  import bist_pkg::*;
  logic clk = 0, clr = 1, run = 0, done;
  bram_alg_t alg;
  bram_width_t width;
  bram_op_t pa, pb;
  typedef struct packed { bit port_b; bit we; int addr; bit val; bit brd; } xop_t;
  xop_t expq [$];
  int checks = 0, failures = 0;

  bram_march_tpg dut (.clk, .clr, .run, .alg, .width, .pa, .pb, .done);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Element: direction (1 = down), port, ops as string of "r0 w1 ...";
  // a "+" in place of the blank adds a port B read of the same cell.
  task automatic add_elem(input int n, input bit down, input bit port_b, input string ops);
    for (int k = 0; k < n; k++) begin
      int a;
      a = down ? n - 1 - k : k;
      for (int o = 0; o < ops.len(); o += 3)
        expq.push_back('{port_b, ops[o] == "w", a, ops[o + 1] == "1", ops[o + 2] == "+"});
    end
  endtask

  initial begin
    for (int t = 0; t < BR_CONFIGS; t++) begin
      bram_test_t tt;
      int n, cyc, got, w, mult;
      tt = bram_test_for(t);
      alg = tt.alg; width = tt.cfg.width;
      n = bram_depth(width); w = bram_bits(width);
      expq.delete();
      case (alg)
        ALG_MATS_PLUS: begin
          for (int p = 0; p < 2; p++) begin
            add_elem(n, 0, p[0], "w0 "); add_elem(n, 0, p[0], "r0 w1 "); add_elem(n, 1, p[0], "r1 w0 ");
          end
          mult = 10;
        end
        ALG_MARCH_LR: begin
          add_elem(n, 0, 0, "w0 "); add_elem(n, 1, 0, "r0 w1 "); add_elem(n, 0, 0, "r1 w0 r0 w1 ");
          add_elem(n, 0, 0, "r1 w0 "); add_elem(n, 0, 0, "r0 w1 r1 w0 "); add_elem(n, 0, 0, "r0 ");
          mult = 14;
        end
        ALG_MARCH_S2PF: begin
          add_elem(n, 0, 0, "w0 ");
          add_elem(n, 0, 0, "r0+r0 w1+"); add_elem(n, 0, 0, "r1+r1 w0+");
          add_elem(n, 1, 0, "r0+r0 w1+"); add_elem(n, 1, 0, "r1+r1 w0+");
          add_elem(n, 0, 0, "r0 ");
          mult = 14;
        end
        default: begin
          string seq [6] = '{"w0 ", "r0 ", "w1 ", "r1 ", "w0 ", "r0 "};
          foreach (seq[i]) for (int k = 0; k < n; k++)
            expq.push_back('{seq[i][0] != "w", seq[i][0] == "w", 0, seq[i][1] == "1", 1'b0});
          mult = 6;
        end
      endcase
      @(negedge clk); clr = 1; @(negedge clk); clr = 0; run = 1;
      cyc = 0; got = 0;
      while (!done && cyc < 300000) begin
        bram_op_t op;
        bit pbsel;
        #1;
        checks++;
        if (alg == ALG_MARCH_S2PF) begin
          // Port A carries the operation; port B reads the same cell and
          // expects the value held before any port A write.
          bit bexp;
          checks++;
          bexp = (got < expq.size()) ? expq[got].brd : 1'b0;
          if (!pa.en || pb.en != bexp || (bexp && (pb.we || pb.addr != pa.addr ||
              pb.data != (pa.we ? ~pa.data & 36'((37'd1 << w) - 1) : pa.data)))) begin
            failures++;
            if (failures < 10) $display("cfg %0d op %0d: port B en %0d we %0d addr %0d", t, got, pb.en, pb.we, pb.addr);
          end
        end else if (pa.en == pb.en) begin failures++; $display("cfg %0d: ports both %b", t, pa.en); end
        pbsel = (alg == ALG_MARCH_S2PF) ? 1'b0 : pb.en;
        op = pbsel ? pb : pa;
        if (got < expq.size()) begin
          xop_t e;
          e = expq[got];
          if (pbsel != e.port_b || op.we != e.we || op.addr != 14'(e.addr) ||
              op.data != (e.val ? 36'((37'd1 << w) - 1) : 36'd0)) begin
            failures++;
            if (failures < 10) $display("cfg %0d op %0d: got port %0d we %0d addr %0d data %h", t, got, pbsel, op.we, op.addr, op.data);
          end
        end
        got++;
        @(negedge clk); cyc++;
      end
      checks += 2;
      if (got != mult * n || expq.size() != mult * n) begin failures++; $display("cfg %0d: %0d ops", t, got); end
      if (cyc != mult * n) begin failures++; $display("cfg %0d: %0d cycles", t, cyc); end
      run = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
