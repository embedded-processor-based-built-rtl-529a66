// Behaviour of a LUT RAM under test.
//
// The LUTs of half of the slices can work as small RAMs; the document tests
// three of their modes: 64x1 single-port, 32x1 single-port and 16-word
// dual-port. The model holds 64 bits. In the single-port modes addr selects
// the bit that is written and read on spo (only addr[4:0] in 32x1 mode) and
// dpo is 0. In dual-port mode addr[3:0] is the write/read address of spo and
// dpra an independent read address shown on dpo; the two outputs make the
// "x2". Reading the dual-port mode as one write port plus two read outputs
// is this design's choice.
//
// Timing: writes are synchronous (we sampled at the clock edge), reads are
// asynchronous, as in a LUT. Fault emulation: fault.en makes the bit at
// fault.addr read as fault.val (a stuck-at cell). The storage is not reset;
// March Y writes every cell before reading it.
module lutram_rut
  import bist_pkg::*;
(
  input  logic      clk,
  input  lr_mode_t  mode,
  input  logic      we,
  input  logic      din,
  input  logic [5:0] addr,
  input  logic [3:0] dpra,
  input  lr_fault_t fault,
  output logic      spo,
  output logic      dpo
);
  logic [63:0] mem;
  logic [5:0]  wa;

  always_comb begin
    unique case (mode)
      LR_64X1_SP: wa = addr;
      LR_32X1_SP: wa = {1'b0, addr[4:0]};
      default:    wa = {2'b00, addr[3:0]};
    endcase
  end

  always_ff @(posedge clk)
    if (we) mem[wa] <= din;

  function automatic logic rd(input logic [63:0] m, input logic [5:0] a, input lr_fault_t f);
    return (f.en && f.addr == a) ? f.val : m[a];
  endfunction

  assign spo = rd(mem, wa, fault);
  assign dpo = (mode == LR_16X2_DP) ? rd(mem, {2'b00, dpra}, fault) : 1'b0;
endmodule
