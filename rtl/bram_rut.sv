// Behaviour of an 18 Kbit block RAM under test.
//
// The document tests the block RAMs in their dual-port RAM modes with the
// aspect ratios 16Kx1 ... 512x36 and in their FIFO modes with Full, Empty
// and programmable Almost Full / Almost Empty flags. This model stores
// 512 rows of 36 bits. A word of width W lives in a row as follows (this
// layout is this design's choice): W = 1, 2, 4 use only the 32 data bits,
// word a at bit W*a of the flat data space; W = 9, 18, 36 pack 4, 2, 1
// words per row, each with 8, 16, 32 data bits and 1, 2, 4 parity bits.
//
// RAM mode: two independent ports A and B (enable, write enable, word
// address, data in), synchronous outputs doa/dob; on a write a port shows
// the old word, the new word or keeps its last value, as cfg.wmode says
// (read-first, write-first, no-change: the write options of the device).
// A port reading the row the other port writes in the same clock gets the
// old row, which is what the device guarantees when the writing port is
// read-first (the two-port March test relies on it).
// FIFO mode: port A writes (ena & wea) at the write pointer and port B reads
// (enb) at the read pointer into dob; full, empty, afull and aempty come
// from the word count (afull when count >= depth - afull_off, aempty when
// count <= aempty_off). A write to a full or a read from an empty FIFO is
// ignored. ECC mode is not modelled.
//
// Timing: everything is registered on clk; rst (synchronous) clears the
// outputs and the FIFO pointers, not the array. fault makes one storage bit
// read as a constant (stuck-at), emulating a defective cell.
module bram_rut
  import bist_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  bram_cfg_t   cfg,
  input  bram_op_t    pa,
  input  bram_op_t    pb,
  input  bram_fault_t fault,
  output logic [35:0] doa,
  output logic [35:0] dob,
  output logic        full,
  output logic        empty,
  output logic        afull,
  output logic        aempty
);
  logic [35:0] mem [512];
  logic [13:0] wp, rp;
  logic [14:0] count;
  logic [14:0] depth;

  assign depth = 15'(bram_depth(cfg.width));

  // Row, and the 36-bit mask / shift of word address a in that row.
  function automatic logic [8:0] row_of(input bram_width_t w, input logic [13:0] a);
    unique case (w)
      BW_1:  return 9'(a >> 5);
      BW_2:  return 9'(a >> 4);
      BW_4:  return 9'(a >> 3);
      BW_9:  return 9'(a >> 2);
      BW_18: return 9'(a >> 1);
      default: return a[8:0];
    endcase
  endfunction

  // Place word d of width w, slot from address a, into a 36-bit row image,
  // returning the positioned data and the mask of the bits it occupies.
  function automatic logic [71:0] place(input bram_width_t w, input logic [13:0] a,
                                        input logic [35:0] d);
    logic [35:0] m, v;
    m = '0; v = '0;
    unique case (w)
      BW_1:  begin m[a[4:0]] = 1'b1; v[a[4:0]] = d[0]; end
      BW_2:  begin m[{a[3:0], 1'b0} +: 2] = 2'b11;  v[{a[3:0], 1'b0} +: 2] = d[1:0]; end
      BW_4:  begin m[{a[2:0], 2'b0} +: 4] = 4'hF;   v[{a[2:0], 2'b0} +: 4] = d[3:0]; end
      BW_9:  begin
        m[{a[1:0], 3'b0} +: 8] = 8'hFF; v[{a[1:0], 3'b0} +: 8] = d[7:0];
        m[32 + a[1:0]] = 1'b1;          v[32 + a[1:0]] = d[8];
      end
      BW_18: begin
        m[{a[0], 4'b0} +: 16] = 16'hFFFF; v[{a[0], 4'b0} +: 16] = d[15:0];
        m[32 + {a[0], 1'b0} +: 2] = 2'b11; v[32 + {a[0], 1'b0} +: 2] = d[17:16];
      end
      default: begin m = '1; v = d; end
    endcase
    return {m, v};
  endfunction

  // Extract the word at address a from row image r.
  function automatic logic [35:0] extract(input bram_width_t w, input logic [13:0] a,
                                          input logic [35:0] r);
    unique case (w)
      BW_1:  return 36'(r[a[4:0]]);
      BW_2:  return 36'(r[{a[3:0], 1'b0} +: 2]);
      BW_4:  return 36'(r[{a[2:0], 2'b0} +: 4]);
      BW_9:  return 36'({r[32 + a[1:0]], r[{a[1:0], 3'b0} +: 8]});
      BW_18: return 36'({r[32 + {a[0], 1'b0} +: 2], r[{a[0], 4'b0} +: 16]});
      default: return r;
    endcase
  endfunction

  function automatic logic [35:0] rd_row(input logic [8:0] row, input logic [35:0] r,
                                         input bram_fault_t f);
    logic [35:0] v;
    v = r;
    if (f.en && f.row == row) v[f.col] = f.val;
    return v;
  endfunction

  logic [13:0] a_addr, b_addr;
  logic        a_we, b_we, a_en, b_en;
  logic [8:0]  a_row, b_row;
  logic [71:0] a_pl, b_pl;

  // In FIFO mode the pointers replace the port addresses.
  always_comb begin
    if (cfg.fifo) begin
      a_addr = wp;  a_en = pa.en && pa.we && (count != depth); a_we = a_en;
      b_addr = rp;  b_en = pb.en && (count != '0);             b_we = 1'b0;
    end else begin
      a_addr = pa.addr; a_en = pa.en; a_we = pa.en && pa.we;
      b_addr = pb.addr; b_en = pb.en; b_we = pb.en && pb.we;
    end
    a_row = row_of(cfg.width, a_addr);
    b_row = row_of(cfg.width, b_addr);
    a_pl  = place(cfg.width, a_addr, pa.data);
    b_pl  = place(cfg.width, b_addr, pb.data);
  end

  // Two writes into different words of one row are merged; into the same
  // word, port B's data is kept.
  always_ff @(posedge clk) begin
    if (a_we && b_we && a_row == b_row)
      mem[a_row] <= (((mem[a_row] & ~a_pl[71:36]) | a_pl[35:0]) & ~b_pl[71:36]) | b_pl[35:0];
    else begin
      if (a_we) mem[a_row] <= (mem[a_row] & ~a_pl[71:36]) | a_pl[35:0];
      if (b_we) mem[b_row] <= (mem[b_row] & ~b_pl[71:36]) | b_pl[35:0];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      doa <= '0; dob <= '0; wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (a_en) begin
        if (!a_we || cfg.fifo || cfg.wmode == WM_READ_FIRST)
          doa <= extract(cfg.width, a_addr, rd_row(a_row, mem[a_row], fault));
        else if (cfg.wmode == WM_WRITE_FIRST)
          doa <= extract(cfg.width, a_addr, a_pl[35:0]);
      end
      if (b_en) begin
        if (!b_we || cfg.fifo || cfg.wmode == WM_READ_FIRST)
          dob <= extract(cfg.width, b_addr, rd_row(b_row, mem[b_row], fault));
        else if (cfg.wmode == WM_WRITE_FIRST)
          dob <= extract(cfg.width, b_addr, b_pl[35:0]);
      end
      if (cfg.fifo) begin
        if (a_en) wp <= (15'(wp) + 1'b1 == depth) ? '0 : wp + 1'b1;
        if (b_en) rp <= (15'(rp) + 1'b1 == depth) ? '0 : rp + 1'b1;
        count <= count + 15'(a_en) - 15'(b_en);
      end
    end
  end

  assign full   = cfg.fifo && (count == depth);
  assign empty  = cfg.fifo && (count == '0);
  assign afull  = cfg.fifo && (count >= depth - 15'(cfg.afull_off));
  assign aempty = cfg.fifo && (count <= 15'(cfg.aempty_off));
endmodule
