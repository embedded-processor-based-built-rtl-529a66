// Self-checking test of the PLB-based DSP TPG: operands against an
// independent LFSR model, the OPMODE/SUB schedule, clock-enable and reset
// timing and their configured polarity, hold while run is low, and done
// after PATTERNS patterns, for all four DSP attribute sets.
module tb_dsp_bist_tpg;
  import bist_pkg::*;
  localparam int unsigned PATTERNS = 2100;
  logic clk = 0, clr = 1, run = 0;
  dsp_attr_t attr = '0;
  logic signed [17:0] a, b;
  logic [47:0] c;
  logic [6:0] opmode;
  logic sub, ce, rst, done;
  int checks = 0, failures = 0;

  dsp_bist_tpg #(.PATTERNS(PATTERNS)) dut (.clk, .clr, .run, .attr, .a, .b, .c,
    .opmode, .sub, .ce, .rst, .done);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (50000) @(posedge clk);
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
    logic [6:0] ops [8];
    int n_ce_off;
    ops = '{7'b000_00_01, 7'b010_00_01, 7'b010_11_00, 7'b011_00_01,
            7'b011_00_11, 7'b010_11_10, 7'b010_10_00, 7'b011_00_00};
    for (int cfg = 0; cfg < 4; cfg++) begin
      logic [31:0] m;
      attr = dsp_attr_for(cfg);
      @(negedge clk); clr = 1; run = 0;
      @(negedge clk);
      check(rst === !attr.rst_low, "reset active during clr");
      check(ce === attr.ce_low, "ce inactive when not running");
      clr = 0; m = 32'hACE1_2468; n_ce_off = 0;
      for (int i = 0; i < PATTERNS; i++) begin
        // a pause in the middle must hold everything
        if (i == 500) begin
          logic [47:0] c_hold;
          run = 0; c_hold = c;
          repeat (3) @(negedge clk);
          check(c === c_hold && ce === attr.ce_low, "hold while run low");
        end
        run = 1; #1;
        check(a === m[17:0] && b === {m[13:0], m[31:28]}
              && c === {m[15:0], m ^ {m[15:0], m[31:16]}}, $sformatf("operands %0d", i));
        check(opmode === ops[(i >> 4) % 8] && sub === ((i >> 7) & 1), $sformatf("opmode %0d", i));
        check((ce ^ attr.ce_low) === (m[3:0] != 0), $sformatf("ce %0d", i));
        check((rst ^ attr.rst_low) === ((i % 1024) == 1023), $sformatf("rst %0d", i));
        check(done === 1'b0, "done early");
        if (m[3:0] == 0) n_ce_off++;
        @(negedge clk);
        m = {m[30:0], m[31] ^ m[21] ^ m[1] ^ m[0]};
      end
      #1;
      check(done === 1'b1, "done after PATTERNS");
      check(ce === attr.ce_low, "ce inactive after done");
      check(n_ce_off > 50 && n_ce_off < 250, $sformatf("ce off count %0d", n_ce_off));
      run = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
