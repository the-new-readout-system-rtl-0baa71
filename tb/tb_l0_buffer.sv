// tb_l0_buffer: writes slices and directory entries into a small L0 buffer
// and reads them back in a different order, checking data and directory
// contents and the one-cycle read latency.
module tb_l0_buffer;
  import cream_pkg::*;
  localparam int unsigned DEPTH = 100;
  localparam int DIR_AW = 6;
  localparam int AW = $clog2(DEPTH);
  logic clk = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic we = 0, re = 0, dir_we = 0, dir_re = 0;
  logic [AW-1:0] waddr, raddr, dir_wbase, dir_rbase;
  logic [WORD_W-1:0] wdata, rdata;
  logic [DIR_AW-1:0] dir_waddr, dir_raddr;
  evt_hdr_t dir_whdr, dir_rhdr;

  l0_buffer #(.DEPTH(DEPTH), .DIR_AW(DIR_AW)) dut (.*);

  function automatic logic [WORD_W-1:0] pat(int a);
    logic [WORD_W-1:0] v;
    for (int i = 0; i < 16; i++) v[32*i +: 32] = 32'(a * 977 + i * 13);
    return v;
  endfunction

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = pat(a);
      dir_we = (a < 64); dir_waddr = DIR_AW'(a);
      dir_whdr = '{evt: EVT_W'(a + 1000), ts: TS_W'(a * 40), ttype: TT_W'(a), nsamp: NSAMP_W'(a % 257)};
      dir_wbase = AW'(DEPTH - 1 - a);
    end
    @(negedge clk);
    we = 0; dir_we = 0;
    for (int k = 0; k < DEPTH; k++) begin
      int a;
      a = (k * 37) % DEPTH;
      re = 1; raddr = AW'(a);
      dir_re = 1; dir_raddr = DIR_AW'(a % 64);
      @(negedge clk);
      re = 0; dir_re = 0;
      checks++;
      if (rdata != pat(a)) failures++;
      checks++;
      if (dir_rhdr.evt != EVT_W'(a % 64 + 1000) || dir_rhdr.ts != TS_W'((a % 64) * 40) ||
          dir_rbase != AW'(DEPTH - 1 - a % 64)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
