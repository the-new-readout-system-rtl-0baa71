// tb_lkr_l0tp: drives the L0 trigger processor (6 x 8 tiles) with maps of
// small random noise, random clusters and repeated maps (ties in time), one
// map every 18 clocks, and compares each output with a model written here:
// peaks as maxima in time, then along the row, then along the column (ties
// to the lower index), their number and energy, the total and quadrant
// energies, the examined map, its timestamp and the output latency.
`timescale 1ns/1ps
module tb_lkr_l0tp;
  import cream_pkg::*;
  localparam int R = 6, C = 8, EW = TSL_W + $clog2(R * C);
  typedef logic [R-1:0][C-1:0][TSL_W-1:0] map_t;

  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, out_valid;
  map_t tiles, emap;
  tstamp_t in_ts = 0, peak_ts;
  logic [TSL_W-1:0] cfg_threshold = 16'd100;
  logic [R-1:0][C-1:0] peak;
  logic [$clog2(R*C):0] npeaks;
  logic [EW-1:0] peak_energy, etot;
  logic [3:0][EW-1:0] equad;

  lkr_l0tp #(.ROWS(R), .COLS(C)) dut (.*);

  initial begin
    #200_000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  map_t hist[$];                 // maps sent, oldest first
  tstamp_t tsh[$];
  int cyc = 0, last_in = 0, n_peaks = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (in_valid) last_in <= cyc;

  function automatic int unsigned v(map_t m, int r, int c);
    if (r < 0 || r >= R || c < 0 || c >= C) return 0;
    return m[r][c];
  endfunction

  always @(posedge clk) if (!rst && out_valid) check();
  task automatic check();
    map_t a, b, n;            // before, examined, after
    int np = 0;
    int unsigned pe = 0, et = 0, eq[4] = '{0, 0, 0, 0};
    logic [R-1:0][C-1:0] ep;
    if (hist.size() < 2) return;     // the first output examines the reset state
    checks++;
    if (cyc - last_in != 3) begin failures++; $display("latency %0d", cyc - last_in); end
    n = hist[hist.size() - 1]; b = hist[hist.size() - 2];
    a = (hist.size() >= 3) ? hist[hist.size() - 3] : '0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        int unsigned e = b[r][c];
        ep[r][c] = e >= cfg_threshold && e != 0 && e > a[r][c] && e >= n[r][c]
                   && e > v(b, r, c - 1) && e >= v(b, r, c + 1)
                   && e > v(b, r - 1, c) && e >= v(b, r + 1, c);
        if (ep[r][c]) begin np++; pe += e; end
        et += e;
        eq[(r >= R / 2 ? 2 : 0) + (c >= C / 2 ? 1 : 0)] += e;
      end
    checks++;
    if (peak != ep || npeaks != np || peak_energy != pe || etot != et || emap != b
        || peak_ts != tsh[tsh.size() - 2]) begin
      failures++; $display("map mismatch: peaks %0d/%0d", npeaks, np);
    end
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (equad[q] != eq[q]) failures++;
    end
    n_peaks += np;
  endtask

  initial begin
    map_t m;
    repeat (5) @(negedge clk);
    rst = 0;
    m = '0;
    for (int i = 0; i < 300; i++) begin
      int mode;
      mode = $urandom_range(0, 9);
      if (mode != 0) begin          // mode 0 repeats the previous map
        for (int r = 0; r < R; r++)
          for (int c = 0; c < C; c++) m[r][c] = TSL_W'($urandom_range(0, 60));
        repeat ($urandom_range(0, 3)) begin
          int r0, c0, e0;
          r0 = $urandom_range(0, R - 1); c0 = $urandom_range(0, C - 1);
          e0 = $urandom_range(50, 4000);
          for (int dr = -1; dr <= 1; dr++)
            for (int dc = -1; dc <= 1; dc++)
              if (r0 + dr >= 0 && r0 + dr < R && c0 + dc >= 0 && c0 + dc < C)
                m[r0 + dr][c0 + dc] = TSL_W'((dr == 0 && dc == 0) ? e0 :
                                      (mode == 1 ? e0 : e0 / (2 + $urandom_range(0, 3))));
        end
      end
      @(negedge clk);
      tiles = m; in_valid = 1; in_ts = in_ts + 1;
      hist.push_back(m); tsh.push_back(in_ts);
      @(negedge clk);
      in_valid = 0;
      repeat (16) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (n_peaks < 50) begin failures++; $display("only %0d peaks", n_peaks); end
    $display("peaks found %0d", n_peaks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
