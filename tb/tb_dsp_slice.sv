// Self-checking test of the DSP slice model. For each of the four DSP BIST
// attribute sets (pipeline registers on/off, clock enable and reset active
// high/low) it drives random operands, OPMODEs, SUB, clock enables and
// occasional resets and compares P every cycle with a cycle-accurate
// reference model kept in the testbench. A fixed product (-3*5) is also
// checked.
module tb_dsp_slice;
  import bist_pkg::*;
  logic clk = 0, rst = 1, ce = 0, sub = 0;
  logic signed [17:0] a = 0, b = 0;
  logic [47:0] c = 0, p;
  logic [6:0] opmode = 0;
  dsp_attr_t attr = '0;
  int checks = 0, failures = 0;

  // reference state
  logic signed [17:0] ra_q, rb_q;
  logic signed [35:0] rm_q;
  logic [47:0] rp;

  dsp_slice dut (.clk, .attr, .rst, .ce, .a, .b, .c, .opmode, .sub, .fault('0), .p);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One clock of the reference model with logical (active-high) rst/ce.
  task automatic ref_step(input logic r, input logic e);
    logic signed [17:0] am, bm;
    logic signed [35:0] md, ms;
    logic [47:0] x, y, z, pn;
    am = attr.areg ? ra_q : a;
    bm = attr.breg ? rb_q : b;
    md = am * bm;
    ms = attr.mreg ? rm_q : md;
    case (opmode[1:0]) 0: x = 0; 1: x = {{12{ms[35]}}, ms}; 2: x = rp; default: x = {12'd0, am, bm}; endcase
    case (opmode[3:2]) 2: y = '1; 3: y = c; default: y = 0; endcase
    case (opmode[6:4]) 2: z = rp; 3: z = c; default: z = 0; endcase
    pn = sub ? z - (x + y) : z + x + y;
    if (r) begin
      ra_q = 0; rb_q = 0; rm_q = 0; rp = 0;
    end else if (e) begin
      ra_q = a; rb_q = b; rm_q = md; rp = pn;
    end
  endtask

  initial begin
    logic [6:0] ops [7];
    ops = '{7'b000_00_01, 7'b010_00_01, 7'b010_11_00, 7'b011_00_01,
            7'b000_00_11, 7'b010_00_01, 7'b011_00_10};
    for (int cfg = 0; cfg < 4; cfg++) begin
      logic lr, le;
      attr = dsp_attr_for(cfg);
      // reset at the configured level
      @(negedge clk); lr = 1; le = 1; rst = lr ^ attr.rst_low; ce = le ^ attr.ce_low;
      @(posedge clk); ref_step(lr, le); #1;
      for (int i = 0; i < 4000; i++) begin
        @(negedge clk);
        a = 18'($urandom); b = 18'($urandom); c = {$urandom, $urandom} & 48'hFFFF_FFFF_FFFF;
        opmode = ops[$urandom_range(0, 6)];
        sub = 1'($urandom);
        lr = ($urandom_range(0, 199) == 0);
        le = ($urandom_range(0, 7) != 0);
        rst = lr ^ attr.rst_low;
        ce  = le ^ attr.ce_low;
        @(posedge clk); ref_step(lr, le); #1;
        checks++;
        if (p !== rp) begin
          failures++;
          if (failures < 10) $display("cfg=%0d op=%b p=%h exp=%h", cfg, opmode, p, rp);
        end
      end
    end
    // Known product: -3 * 5 = -15, all optional registers off.
    attr = '0;
    @(negedge clk); rst = 1; ce = 1; @(negedge clk); rst = 0;
    a = -18'sd3; b = 18'sd5; opmode = 7'b000_00_01; sub = 0;
    @(posedge clk); #1; checks++;
    if (p !== 48'hFFFF_FFFF_FFF1) begin failures++; $display("-3*5 gave %h", p); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
