// choke_error: drives the CHOKE and ERROR lines that each CREAM has on the
// crate backplane.
//
// CHOKE warns the trigger system that the board's queues are filling up and
// triggers will soon be lost: it goes high when any watched fill level
// reaches its high-water mark and low again only when all levels are back
// at or below their low-water marks (hysteresis). ERROR goes high when a
// trigger or request has actually been lost, or on any other error input,
// and stays high until err_clear. The meaning of the two lines follows the
// description; the watched queues, the water marks and the sticky ERROR are
// this design's choices.
module choke_error #(
  parameter int NLEV = 2,
  parameter int LW   = 8
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [NLEV-1:0][LW-1:0]   level,
  input  logic [NLEV-1:0][LW-1:0]   high_mark,
  input  logic [NLEV-1:0][LW-1:0]   low_mark,
  input  logic                      err_in,
  input  logic                      err_clear,
  output logic                      choke,
  output logic                      error
);
  logic any_high, all_low;
  always_comb begin
    any_high = 1'b0;
    all_low  = 1'b1;
    for (int i = 0; i < NLEV; i++) begin
      if (level[i] >= high_mark[i]) any_high = 1'b1;
      if (level[i] >  low_mark[i])  all_low  = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      choke <= 1'b0;
      error <= 1'b0;
    end else begin
      if (any_high)     choke <= 1'b1;
      else if (all_low) choke <= 1'b0;
      if (err_in)         error <= 1'b1;
      else if (err_clear) error <= 1'b0;
    end
  end
endmodule
