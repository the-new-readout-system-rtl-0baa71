// lkr_l0tp: LKr L0 trigger processor. It finds energy maxima in the map of
// tile sums and makes the energy totals that the L0 trigger decision uses.
//
// Every 25 ns (in_valid) it takes the whole ROWS x COLS map of tile sums,
// with the timestamp of that sample. It keeps the last three maps. The map
// one tick old is examined, so that a peak is also a maximum in time: above
// the map before it and not below the map after it. The search runs in two
// pipeline steps:
//   1. horizontal: a tile at or above cfg_threshold is a candidate if it is
//      above its left neighbour and not below its right neighbour;
//   2. vertical: a candidate is a peak if it is also above the tile beneath
//      (row - 1) and not below the tile above (row + 1).
// Tiles outside the map count as 0. Ties therefore go to the tile with the
// lowest column, then the lowest row.
// Outputs, valid for one cycle (out_valid) three clocks after the in_valid
// of the map that follows the examined one:
//   - the peak map, the number of peaks and their total energy;
//   - the total energy of the map and of its four quadrants (quadrant
//     q = {row >= ROWS/2, col >= COLS/2});
//   - the examined map itself, which gives each peak's energy;
//   - its timestamp, which is the peaks' time.
// The document says that maxima are searched first horizontally, then
// vertically, in space and time. It also says the total and quadrant
// energies and the number, energy and time of the peaks are produced. The
// neighbour rule, the tie-breaking, the threshold, the grid size (a 32 x 32
// map of 4x4-cell tiles covers the calorimeter's roughly 13,000 cells) and
// processing the whole map in one unit are this design's choices.
// The map registers are cleared at reset so that the first comparisons in
// time see an empty calorimeter; at the default size these clears are
// 16384-bit fills, which lint tools report as large replications.
module lkr_l0tp
  import cream_pkg::*;
#(
  parameter int ROWS = 32,
  parameter int COLS = 32
) (
  input  logic                                clk,
  input  logic                                rst,
  input  logic                                in_valid,
  input  logic [ROWS-1:0][COLS-1:0][TSL_W-1:0] tiles,
  input  tstamp_t                             in_ts,
  input  logic [TSL_W-1:0]                    cfg_threshold,
  output logic                                out_valid,
  output logic [ROWS-1:0][COLS-1:0]           peak,
  output logic [$clog2(ROWS*COLS):0]          npeaks,
  output logic [TSL_W+$clog2(ROWS*COLS)-1:0]  peak_energy,
  output logic [TSL_W+$clog2(ROWS*COLS)-1:0]  etot,
  output logic [3:0][TSL_W+$clog2(ROWS*COLS)-1:0] equad,
  output logic [ROWS-1:0][COLS-1:0][TSL_W-1:0] emap,
  output tstamp_t                             peak_ts
);
  localparam int EW = TSL_W + $clog2(ROWS * COLS);
  typedef logic [ROWS-1:0][COLS-1:0][TSL_W-1:0] map_t;

  map_t    f0, f1, f2;          // newest, examined, oldest
  tstamp_t ts0, ts1;
  logic    v_in;
  logic [ROWS-1:0][COLS-1:0] hcand;
  map_t    m1;
  tstamp_t t1;
  logic    v1;

  function automatic logic [TSL_W-1:0] at(map_t m, int r, int c);
    if (r < 0 || r >= ROWS || c < 0 || c >= COLS) return '0;
    return m[r][c];
  endfunction

  // map history
  always_ff @(posedge clk) begin
    if (rst) begin
      f0 <= '0; f1 <= '0; f2 <= '0; ts0 <= '0; ts1 <= '0;
      v_in <= 1'b0;
    end else begin
      v_in <= in_valid;
      if (in_valid) begin
        f0 <= tiles; f1 <= f0; f2 <= f1;
        ts0 <= in_ts; ts1 <= ts0;
      end
    end
  end

  // step 1: time and horizontal maxima
  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0; hcand <= '0; m1 <= '0; t1 <= '0;
    end else begin
      v1 <= v_in;
      if (v_in) begin
        m1 <= f1;
        t1 <= ts1;
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++)
            hcand[r][c] <= f1[r][c] >= cfg_threshold && f1[r][c] != '0
                           && f1[r][c] > f2[r][c] && f1[r][c] >= f0[r][c]
                           && f1[r][c] > at(f1, r, c - 1) && f1[r][c] >= at(f1, r, c + 1);
      end
    end
  end

  // step 2: vertical maxima, counts and sums
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0; peak <= '0; npeaks <= '0; peak_energy <= '0;
      etot <= '0; equad <= '0; emap <= '0; peak_ts <= '0;
    end else begin
      out_valid <= v1;
      if (v1) begin
        logic [ROWS-1:0][COLS-1:0] p;
        logic [$clog2(ROWS*COLS):0] np;
        logic [EW-1:0] pe, et;
        logic [3:0][EW-1:0] eq;
        np = '0; pe = '0; et = '0; eq = '0;
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++) begin
            p[r][c] = hcand[r][c] && m1[r][c] > at(m1, r - 1, c) && m1[r][c] >= at(m1, r + 1, c);
            np += ($clog2(ROWS*COLS)+1)'(p[r][c]);
            if (p[r][c]) pe += EW'(m1[r][c]);
            et += EW'(m1[r][c]);
            eq[{r >= ROWS / 2, c >= COLS / 2}] += EW'(m1[r][c]);
          end
        peak <= p; npeaks <= np; peak_energy <= pe;
        etot <= et; equad <= eq; emap <= m1; peak_ts <= t1;
      end
    end
  end
endmodule
