// Shared types, constants and configuration tables of the FPGA BIST design.
//
// The design tests the logic blocks (PLBs), LUT RAMs, block RAMs and DSP
// slices of an FPGA with a circular-comparison BIST structure: identical
// test pattern generators (TPGs) drive identical resources under test
// (RUTs), and every output response analyzer (ORA) compares the outputs of
// its two neighbouring RUTs in a ring. This package holds the records that
// describe a BIST configuration of each resource type and the functions
// that produce them, standing in for the configuration data an embedded
// processor would write:
//   plb_cfg_for    - the 12 PLB configurations (LUT contents, FF use),
//   lr_march_y     - the March Y step list for each LUT RAM mode,
//   bram_test_for  - the block RAM algorithm and mode of each configuration,
//   dsp_attr_for   - the DSP attribute set of each configuration,
// plus the fault-emulation records and the diagnosis status encoding.
// Numbers from the document: TPG width and constant, 12 PLB, 3 LUT RAM and
// 4 DSP configurations, the block RAM aspect ratios and cycle counts. The
// table contents themselves are this design's choice (the document does not
// list them).
package bist_pkg;

  // 12-bit TPG accumulating 0x691 (document, PLB BIST).
  localparam int unsigned TPG_W         = 12;
  localparam logic [11:0] TPG_CONST     = 12'h691;
  // A PLB has four slices of two 4-input LUTs and two flip-flops (document).
  localparam int unsigned PLB_SLICES    = 4;
  localparam int unsigned PLB_OUTS      = 2 * PLB_SLICES;   // 8 LUT/FF outputs
  // 12 BIST configurations test all PLB logic except the LUT RAM modes.
  localparam int unsigned PLB_CONFIGS   = 12;

  // Configuration of one PLB under test: LUT truth tables and, per output,
  // whether the flip-flop is used (registered) or bypassed (combinational).
  typedef struct packed {
    logic [PLB_OUTS-1:0][15:0] lut_init;
    logic [PLB_OUTS-1:0]       use_ff;
  } plb_cfg_t;

  // Diagnosis status of one RUT: empty table cell, 0 (fault-free), 1 (faulty).
  typedef enum logic [1:0] {
    ST_UNKNOWN = 2'd0,
    ST_GOOD    = 2'd1,
    ST_FAULTY  = 2'd2
  } rut_status_t;

  // Configuration-bit fault injection: flip one LUT bit of one PLB.
  typedef struct packed {
    logic       en;
    logic [2:0] lut;
    logic [3:0] bit_idx;
  } fault_t;

  // LUT RAM BIST (document): three configurations, 64x1 single-port,
  // 32x1 single-port and 16-word dual-port.
  typedef enum logic [1:0] {
    LR_64X1_SP = 2'd0,
    LR_32X1_SP = 2'd1,
    LR_16X2_DP = 2'd2
  } lr_mode_t;
  localparam int unsigned LR_CONFIGS = 3;
  localparam int unsigned LR_ROM_AW  = 10;   // 1K x 18 block RAM used as ROM
  localparam int unsigned LR_ROM_DW  = 18;

  // One LUT RAM test step as stored in the ROM.
  typedef struct packed {
    logic       we;
    logic       din;    // write data; for a read, the value March Y expects
    logic [5:0] addr;
    logic [3:0] dpra;   // second read address (dual-port mode)
  } lr_op_t;

  // Stuck-at fault on one LUT RAM bit.
  typedef struct packed {
    logic       en;
    logic [5:0] addr;
    logic       val;
  } lr_fault_t;

  function automatic int unsigned lr_words(input lr_mode_t m);
    return (m == LR_64X1_SP) ? 64 : (m == LR_32X1_SP) ? 32 : 16;
  endfunction

  // March Y: up/down(w0); up(r0,w1,r1); down(r1,w0,r0); up/down(r0): 8n steps.
  function automatic lr_op_t lr_march_y(input lr_mode_t m, input int unsigned i);
    int unsigned n, k, a;
    lr_op_t op;
    n = lr_words(m);
    op = '0;
    if (i < n) begin
      a = i; op.we = 1'b1; op.din = 1'b0;
    end else if (i < 4 * n) begin
      k = i - n; a = k / 3;
      unique case (k % 3)
        0: op.din = 1'b0;
        1: begin op.we = 1'b1; op.din = 1'b1; end
        default: op.din = 1'b1;
      endcase
    end else if (i < 7 * n) begin
      k = i - 4 * n; a = n - 1 - k / 3;
      unique case (k % 3)
        0: op.din = 1'b1;
        1: begin op.we = 1'b1; op.din = 1'b0; end
        default: op.din = 1'b0;
      endcase
    end else begin
      a = i - 7 * n; op.din = 1'b0;
    end
    op.addr = 6'(a);
    op.dpra = 4'((a + 1) % 16);
    return op;
  endfunction

  // Block RAM BIST. An 18 Kbit block RAM holds 512 rows of 36 bits (32 data
  // + 4 parity); its aspect ratios are 16Kx1, 8Kx2, 4Kx4, 2Kx9, 1Kx18, 512x36.
  typedef enum logic [2:0] {
    BW_1 = 3'd0, BW_2 = 3'd1, BW_4 = 3'd2, BW_9 = 3'd3, BW_18 = 3'd4, BW_36 = 3'd5
  } bram_width_t;

  typedef enum logic [1:0] {
    ALG_MARCH_LR     = 2'd0,
    ALG_MATS_PLUS    = 2'd1,
    ALG_MARCH_Y_FIFO = 2'd2,
    ALG_MARCH_S2PF   = 2'd3
  } bram_alg_t;

  // Write mode of a RAM port: what the port's output shows on a write.
  typedef enum logic [1:0] {
    WM_READ_FIRST  = 2'd0,   // the old word
    WM_WRITE_FIRST = 2'd1,   // the word being written
    WM_NO_CHANGE   = 2'd2    // unchanged (last read)
  } bram_wmode_t;

  typedef struct packed {
    logic        fifo;       // 0: dual-port RAM mode, 1: FIFO mode
    bram_wmode_t wmode;      // RAM mode only
    bram_width_t width;
    logic [13:0] afull_off;  // FIFO almost-full: count >= depth - afull_off
    logic [13:0] aempty_off; // FIFO almost-empty: count <= aempty_off
  } bram_cfg_t;

  // One RAM port operation (or FIFO write/read) presented by the TPG.
  typedef struct packed {
    logic        en;
    logic        we;
    logic [13:0] addr;
    logic [35:0] data;
  } bram_op_t;

  // Stuck-at fault on one of the 512 x 36 storage bits.
  typedef struct packed {
    logic        en;
    logic [8:0]  row;
    logic [5:0]  col;
    logic        val;
  } bram_fault_t;

  function automatic int unsigned bram_bits(input bram_width_t w);
    unique case (w)
      BW_1: return 1;   BW_2: return 2;   BW_4: return 4;
      BW_9: return 9;   BW_18: return 18; default: return 36;
    endcase
  endfunction

  function automatic int unsigned bram_depth(input bram_width_t w);
    unique case (w)
      BW_1: return 16384; BW_2: return 8192; BW_4: return 4096;
      BW_9: return 2048;  BW_18: return 1024; default: return 512;
    endcase
  endfunction

  // The block RAM BIST configurations of the document's table that this
  // design implements (its numbers 1, 2, 3, 4, 6, 7, 8, 9). The RAM-mode
  // configurations also cover the three write modes (this design's
  // assignment; the document only says write/read options are tested). The
  // two-port test runs read-first, so a read on port B of the row port A is
  // writing returns the old word.
  localparam int unsigned BR_CONFIGS = 8;
  typedef struct packed {
    bram_alg_t alg;
    bram_cfg_t cfg;
  } bram_test_t;

  function automatic bram_test_t bram_test_for(input int unsigned i);
    bram_test_t t;
    t.cfg.afull_off  = 14'd4;
    t.cfg.aempty_off = 14'd4;
    t.cfg.wmode      = WM_READ_FIRST;
    unique case (i)
      0: begin t.alg = ALG_MARCH_LR;     t.cfg.fifo = 1'b0; t.cfg.width = BW_36;
               t.cfg.wmode = WM_READ_FIRST;  end
      1: begin t.alg = ALG_MATS_PLUS;    t.cfg.fifo = 1'b0; t.cfg.width = BW_2;
               t.cfg.wmode = WM_WRITE_FIRST; end
      2: begin t.alg = ALG_MATS_PLUS;    t.cfg.fifo = 1'b0; t.cfg.width = BW_1;
               t.cfg.wmode = WM_NO_CHANGE;   end
      3: begin t.alg = ALG_MARCH_S2PF;   t.cfg.fifo = 1'b0; t.cfg.width = BW_36;
               t.cfg.wmode = WM_READ_FIRST;  end
      4: begin t.alg = ALG_MARCH_Y_FIFO; t.cfg.fifo = 1'b1; t.cfg.width = BW_4;  end
      5: begin t.alg = ALG_MARCH_Y_FIFO; t.cfg.fifo = 1'b1; t.cfg.width = BW_9;  end
      6: begin t.alg = ALG_MARCH_Y_FIFO; t.cfg.fifo = 1'b1; t.cfg.width = BW_18; end
      default: begin t.alg = ALG_MARCH_Y_FIFO; t.cfg.fifo = 1'b1; t.cfg.width = BW_36; end
    endcase
    return t;
  endfunction

  // Clock cycles of one run of an algorithm on A words (document's table).
  function automatic int unsigned bram_alg_cycles(input bram_alg_t a, input int unsigned n);
    unique case (a)
      ALG_MARCH_LR, ALG_MARCH_S2PF: return 14 * n;
      ALG_MATS_PLUS: return 2 * 5 * n;
      default:       return 6 * n;
    endcase
  endfunction

  // Resource type under test in a session.
  typedef enum logic [2:0] {
    RES_PLB    = 3'd0,
    RES_LUTRAM = 3'd1,
    RES_BRAM   = 3'd2,
    RES_DSP    = 3'd3
  } res_t;

  // Programmable attributes of a DSP slice (configuration memory bits):
  // optional input and multiplier pipeline registers and the active level
  // of clock enable and reset.
  typedef struct packed {
    logic areg;
    logic breg;
    logic mreg;
    logic ce_low;    // clock enable active low
    logic rst_low;   // reset active low
  } dsp_attr_t;

  // Emulated DSP defect: loc 0 = P register bit stuck-at-0, 1 = multiplier
  // product bit stuck-at-1, 2 = A input register bit stuck-at-1 (visible only
  // when areg is set), 3 = M pipeline register bit stuck-at-0 (visible only
  // when mreg is set).
  typedef struct packed {
    logic       en;
    logic [1:0] loc;
    logic [5:0] bit_idx;
  } dsp_fault_t;

  // Four DSP BIST configurations (document: four are needed); which
  // attributes each one sets is this design's choice.
  localparam int unsigned DSP_CONFIGS  = 4;
  localparam int unsigned DSP_PATTERNS = 4096;
  function automatic dsp_attr_t dsp_attr_for(input int unsigned i);
    unique case (i)
      0: return '{areg: 1'b0, breg: 1'b0, mreg: 1'b0, ce_low: 1'b0, rst_low: 1'b0};
      1: return '{areg: 1'b1, breg: 1'b1, mreg: 1'b0, ce_low: 1'b1, rst_low: 1'b0};
      2: return '{areg: 1'b0, breg: 1'b0, mreg: 1'b1, ce_low: 1'b0, rst_low: 1'b1};
      default: return '{areg: 1'b1, breg: 1'b1, mreg: 1'b1, ce_low: 1'b1, rst_low: 1'b1};
    endcase
  endfunction

  // Algorithmic PLB configuration number c (the controller's stand-in for
  // partial reconfiguration of the RUTs). Configurations 0..9 exercise the
  // LUTs with inverted / shifted truth tables and alternate flip-flop use;
  // 10 and 11 exercise the registered paths of all outputs.
  function automatic plb_cfg_t plb_cfg_for(input int unsigned c);
    plb_cfg_t cfg;
    logic [15:0] base [4];
    base[0] = 16'h6996;   // 4-input XOR
    base[1] = 16'h8000;   // AND
    base[2] = 16'hFFFE;   // OR
    base[3] = 16'hCA35;   // mixed function
    for (int k = 0; k < PLB_OUTS; k++) begin
      logic [15:0] t;
      t = base[(c + k) % 4];
      if (c[0]) t = ~t;
      t = (t << (c % 16)) | (t >> ((16 - (c % 16)) % 16));
      cfg.lut_init[k] = t;
      cfg.use_ff[k]   = (c >= 10) ? 1'b1 : logic'((c + k) % 2);
    end
    return cfg;
  endfunction

endpackage
