// circular_buffer: the CREAM circular sample buffer, continuously written with
// every 25 ns time slice of all 32 channels while the board waits for L0
// triggers.
//
// A time slice (32 channels x 16 bits = 512 bits) is written at the address
// given by the low bits of its timestamp, so the buffer always holds the
// last DEPTH samples; the L0 extractor reads back the slices that lie a
// fixed, configurable latency before a trigger. The default depth, 2^19
// slices of 512 bits, is the 256 Mbit of the description and allows a
// latency of 13.1 ms at 40.08 MHz (the description quotes 12.5 ms as the
// usable maximum, against about 1 ms needed). In the board this region lives
// in the DDR3 module; here it is a simple dual-port memory array with one
// write port and one read port whose data appears one cycle after the
// address.
module circular_buffer
  import cream_pkg::*;
#(
  parameter int AW = 19,
  parameter int W  = WORD_W
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
