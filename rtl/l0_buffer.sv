// l0_buffer: the CREAM L0 buffer, holding the samples of every L0-triggered
// event until the PC farm asks for it, and a directory of the events by
// event number.
//
// Data part: a ring of 512-bit time slices; the L0 extractor appends the
// slices of each event one after the other and the ring simply wraps, old
// events being overwritten. The board reserves 255 x 256 Mbit of its DDR3
// module for this buffer (255 x 2^19 slices, 16 s of 8-sample events at a
// 1 MHz L0 rate). A single memory array here is limited to 2^31 bytes, so
// the default is 2^25 - 1 slices (2 GB), 4.2 million events of 8 samples
// or about 4 s at 1 MHz; DEPTH sets the size.
// Directory part: one entry per event number modulo 2^DIR_AW, holding the
// event header and the address of its first slice; the default 2^24 entries
// cover the full event-number range. Both are simple memories whose read
// data appears one cycle after the address. Organising the buffer as a ring
// with a directory is this design's choice.
module l0_buffer
  import cream_pkg::*;
#(
  parameter int unsigned DEPTH  = 2**25 - 1,
  parameter int          DIR_AW = 24,
  parameter int          AW     = $clog2(DEPTH)
) (
  input  logic          clk,
  // data port written by the extractor
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [WORD_W-1:0] wdata,
  // data port read by the packet builder
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [WORD_W-1:0] rdata,
  // directory
  input  logic          dir_we,
  input  logic [DIR_AW-1:0] dir_waddr,
  input  evt_hdr_t      dir_whdr,
  input  logic [AW-1:0] dir_wbase,
  input  logic          dir_re,
  input  logic [DIR_AW-1:0] dir_raddr,
  output evt_hdr_t      dir_rhdr,
  output logic [AW-1:0] dir_rbase
);
  logic [WORD_W-1:0] mem [DEPTH];
  evt_hdr_t          dir_hdr  [2**DIR_AW];
  logic [AW-1:0]     dir_base [2**DIR_AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

  always_ff @(posedge clk) begin
    if (dir_we) begin
      dir_hdr[dir_waddr]  <= dir_whdr;
      dir_base[dir_waddr] <= dir_wbase;
    end
    if (dir_re) begin
      dir_rhdr  <= dir_hdr[dir_raddr];
      dir_rbase <= dir_base[dir_raddr];
    end
  end
endmodule
