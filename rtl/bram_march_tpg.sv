// March test pattern generator for block RAM BIST.
//
// A March test is a list of elements; each element walks all A addresses up
// or down and applies a short list of read/write operations (r0, w1, ...) at
// each address. This engine steps through an element table, one operation
// per clock, so an algorithm of k operations per address takes exactly k*A
// clocks, the figures in the document's block RAM table. The tables are:
//   MATS+ (through port A, then again through port B, 2 x 5 x A):
//     {up/down(w0); up(r0,w1); down(r1,w0)}
//   March LR (port A, 14 x A): {up/down(w0); down(r0,w1); up(r1,w0,r0,w1);
//     up(r1,w0); up(r0,w1,r1,w0); up(r0)}
//   March s2pf- (two-port, 14 x A; "x:y" = port A op x and, in the same
//     clock and at the same address, port B op y):
//     {up/down(w0); up(r0:r0, r0:-, w1:r0); up(r1:r1, r1:-, w0:r1);
//      down(r0:r0, r0:-, w1:r0); down(r1:r1, r1:-, w0:r1); up/down(r0)}
//   March Y for FIFOs (6 x A): w0, r0, w1, r1, w0, r0, each over the whole
//     FIFO (A writes through port A or A reads through port B), i.e. March
//     Y with the second of each pair of back-to-back reads dropped, which a
//     FIFO cannot repeat.
// The element lists of MATS+, March LR and March s2pf- are the published
// algorithms; the FIFO variant, the port assignment and the solid 0/1 data
// backgrounds are this design's reading. The document's background data
// sequences for March LR and its March d2pf test are not included.
//
// Timing: clr restarts the algorithm chosen by alg for a RAM of the given
// width (A = depth of that aspect ratio). While run is high one operation is
// presented on pa/pb per clock (en = 0 on the idle port; in March s2pf- a
// port B read can come with the port A operation); done rises after
// the last operation and holds until clr. An operation's read data appears
// on the RUT outputs one clock later.
module bram_march_tpg
  import bist_pkg::*;
(
  input  logic        clk,
  input  logic        clr,
  input  logic        run,
  input  bram_alg_t   alg,
  input  bram_width_t width,
  output bram_op_t    pa,
  output bram_op_t    pb,
  output logic        done
);
  typedef struct packed {
    logic       last;
    logic       port_b;
    logic       down;
    logic [2:0] nops;
    logic [3:0] wr;    // op k is a write
    logic [3:0] val;   // data value of op k (read: expected value)
    logic [3:0] brd;   // op k has a port B read at the same address
  } elem_t;

  // Element table; op k of an element is bit k of wr/val.
  function automatic elem_t elem_of(input bram_alg_t a, input logic [2:0] i);
    elem_t e;
    e = '0;
    unique case (a)
      ALG_MATS_PLUS: begin
        e.port_b = (i >= 3);
        unique case (i % 3)
          0: begin e.nops = 1; e.wr = 4'b0001; e.val = 4'b0000; end
          1: begin e.nops = 2; e.wr = 4'b0010; e.val = 4'b0010; end
          default: begin e.nops = 2; e.wr = 4'b0010; e.val = 4'b0001; e.down = 1'b1; end
        endcase
        e.last = (i == 5);
      end
      ALG_MARCH_LR: begin
        unique case (i)
          0: begin e.nops = 1; e.wr = 4'b0001; e.val = 4'b0000; end
          1: begin e.nops = 2; e.wr = 4'b0010; e.val = 4'b0010; e.down = 1'b1; end
          2: begin e.nops = 4; e.wr = 4'b1010; e.val = 4'b1001; end
          3: begin e.nops = 2; e.wr = 4'b0010; e.val = 4'b0001; end
          4: begin e.nops = 4; e.wr = 4'b1010; e.val = 4'b0110; end
          default: begin e.nops = 1; e.wr = 4'b0000; e.val = 4'b0000; e.last = 1'b1; end
        endcase
      end
      ALG_MARCH_S2PF: begin
        e.down = (i == 3 || i == 4);
        unique case (i)
          0: begin e.nops = 1; e.wr = 4'b0001; e.val = 4'b0000; end
          1, 3: begin e.nops = 3; e.wr = 4'b0100; e.val = 4'b0100; e.brd = 4'b0101; end
          2, 4: begin e.nops = 3; e.wr = 4'b0100; e.val = 4'b0011; e.brd = 4'b0101; end
          default: begin e.nops = 1; e.wr = 4'b0000; e.val = 4'b0000; e.last = 1'b1; end
        endcase
      end
      default: begin   // March Y for FIFOs: one operation per element
        e.nops = 1;
        e.wr   = {3'b000, ~i[0]};
        e.val  = {3'b000, (i == 2 || i == 3)};
        e.last = (i == 5);
      end
    endcase
    return e;
  endfunction

  logic [2:0]  ei;
  logic [13:0] ac;
  logic [1:0]  oi;
  logic        fin;
  elem_t       e;
  logic [13:0] a_max, addr;
  logic [35:0] ones;
  bram_op_t    op;

  assign e     = elem_of(alg, ei);
  assign a_max = 14'(bram_depth(width) - 1);
  assign ones  = 36'((37'd1 << bram_bits(width)) - 1);
  assign addr  = e.down ? a_max - ac : ac;

  always_comb begin
    op.en   = run && !fin;
    op.we   = e.wr[oi];
    op.addr = (alg == ALG_MARCH_Y_FIFO) ? '0 : addr;
    op.data = e.val[oi] ? ones : '0;
    // FIFO: writes go to port A, reads to port B.
    if (alg == ALG_MARCH_Y_FIFO) begin
      pa = op.we ? op : '0;
      pb = op.we ? '0 : op;
    end else if (alg == ALG_MARCH_S2PF) begin
      // Port B reads the cell port A is working on; its expected value is
      // the one held before a port A write in the same clock.
      pa = op;
      pb = '0;
      pb.en   = op.en && e.brd[oi];
      pb.addr = addr;
      pb.data = (op.we ? !e.val[oi] : e.val[oi]) ? ones : '0;
    end else begin
      pa = e.port_b ? '0 : op;
      pb = e.port_b ? op : '0;
    end
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      ei <= '0; ac <= '0; oi <= '0; fin <= 1'b0;
    end else if (run && !fin) begin
      if (3'(oi) + 1'b1 < e.nops) begin
        oi <= oi + 1'b1;
      end else begin
        oi <= '0;
        if (ac == a_max) begin
          ac <= '0;
          if (e.last) fin <= 1'b1;
          else        ei  <= ei + 1'b1;
        end else begin
          ac <= ac + 1'b1;
        end
      end
    end
  end

  assign done = fin;
endmodule
