// sync_fifo: single-clock first-in first-out queue with valid/ready ports.
//
// Used for the L0 trigger queue, the pending-trigger-type queue and the L1
// request queue. The head entry is shown combinationally on rd_data while
// rd_valid is high; it leaves when rd_ready is also high. A write with
// wr_valid high is taken when wr_ready (not full) is high; a write to a full
// queue is dropped and flagged on 'overflow' for one cycle. 'level' is the
// number of entries held. Depth is a power of two.
module sync_fifo #(
  parameter int W     = 8,
  parameter int DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       wr_valid,
  output logic                       wr_ready,
  input  logic [W-1:0]               wr_data,
  output logic                       rd_valid,
  input  logic                       rd_ready,
  output logic [W-1:0]               rd_data,
  output logic [$clog2(DEPTH):0]     level,
  output logic                       overflow
);
  localparam int AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW:0]   wp, rp;
  logic          do_wr, do_rd;

  assign wr_ready = (level != (AW+1)'(DEPTH));
  assign rd_valid = (level != '0);
  assign rd_data  = mem[rp[AW-1:0]];
  assign do_wr    = wr_valid && wr_ready;
  assign do_rd    = rd_valid && rd_ready;
  assign level    = wp - rp;

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0;
      rp <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= wr_valid && !wr_ready;
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (do_wr) mem[wp[AW-1:0]] <= wr_data;

endmodule
