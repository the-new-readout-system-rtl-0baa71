// tb_l0_extractor: feeds triggers to the extractor with a circular-buffer
// model whose slice at address a is a known pattern of a. Checks, for every
// trigger: the slices written into the L0 buffer (the cfg_nsamp slices that
// start cfg_latency before the trigger, at consecutive, wrapping
// addresses), the directory entry, 'done', trigger types masked out of the
// read-out (no samples), and the N + 3 clocks per trigger (2 without samples).
module tb_l0_extractor;
  import cream_pkg::*;
  localparam int CB_AW = 10;
  localparam int unsigned L0_DEPTH = 50;
  localparam int L0_AW = $clog2(L0_DEPTH);
  localparam int DIR_AW = 8;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic trig_valid = 0, trig_ready;
  trig_t trig;
  logic [18:0] cfg_latency = 19'd100;
  logic [NSAMP_W-1:0] cfg_nsamp = 9'd8;
  logic [63:0] cfg_tt_readout = 64'hFFFF_FFFF_FFFF_FF0F;
  logic cb_re, l0_we, dir_we, done, done_cont;
  logic [CB_AW-1:0] cb_raddr;
  logic [WORD_W-1:0] cb_rdata, l0_wdata;
  logic [L0_AW-1:0] l0_waddr, dir_wbase;
  logic [DIR_AW-1:0] dir_waddr;
  evt_hdr_t dir_whdr;
  evt_num_t done_evt;
  logic [WORD_W-1:0] l0_mem [L0_DEPTH];
  int exp_base = 0, n_done = 0, n_masked = 0;
  trig_t cur_q[$];
  int unsigned cyc = 0, last_take = 0, prev_n = 0;
  logic back2back = 1;

  l0_extractor #(.CB_AW(CB_AW), .L0_DEPTH(L0_DEPTH), .DIR_AW(DIR_AW)) dut (.*);

  function automatic logic [WORD_W-1:0] pat(logic [CB_AW-1:0] a);
    logic [WORD_W-1:0] v;
    for (int i = 0; i < 16; i++) v[32*i +: 32] = {22'(i), a} ^ 32'h5A00_0000;
    return v;
  endfunction

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (cb_re) cb_rdata <= pat(cb_raddr);
    if (l0_we) l0_mem[l0_waddr] <= l0_wdata;
  end

  always @(posedge clk) if (!rst) begin
    if (trig_valid && trig_ready) begin
      if (last_take != 0 && back2back) begin
        checks++;
        if (cyc - last_take != (prev_n ? prev_n + 3 : 2)) begin
          failures++;
          $display("spacing %0d", cyc - last_take);
        end
      end
      last_take = cyc;
      prev_n = (trig.cont || cfg_tt_readout[trig.ttype]) ? 8 : 0;
      cur_q.push_back(trig);
    end
    if (dir_we) begin
      trig_t t;
      int n;
      #0;
      t = cur_q.pop_front();
      n = (t.cont || cfg_tt_readout[t.ttype]) ? 8 : 0;
      if (n == 0) n_masked++;
      checks++;
      if (dir_whdr.evt != t.evt || dir_whdr.ts != t.ts || dir_whdr.ttype != t.ttype ||
          dir_whdr.nsamp != NSAMP_W'(n) || dir_waddr != DIR_AW'(t.evt) || dir_wbase != L0_AW'(exp_base)) begin
        failures++;
        $display("dir entry evt %0d", t.evt);
      end
      for (int i = 0; i < n; i++) begin
        checks++;
        if (l0_mem[(exp_base + i) % L0_DEPTH] != pat(CB_AW'(t.ts - 100 + i))) begin
          failures++;
          $display("slice %0d of evt %0d", i, t.evt);
        end
      end
      exp_base = (exp_base + n) % L0_DEPTH;
    end
    if (done) begin
      n_done++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      trig_valid = 1;
      trig = '{evt: EVT_W'(i), ts: TS_W'(200 + $urandom_range(0, 5000)),
               ttype: TT_W'($urandom_range(0, 63)), cont: ($urandom_range(0, 9) == 0)};
      @(posedge clk);
      while (!trig_ready) @(posedge clk);
      @(negedge clk);
      trig_valid = (i < 150);   // back-to-back for the first half
      if (i >= 150) repeat ($urandom_range(1, 30)) @(negedge clk);
      if (i == 149) back2back = 0;
    end
    trig_valid = 0;
    repeat (30) @(negedge clk);
    checks++;
    if (n_done != 300 || n_masked == 0 || cur_q.size() != 0) failures++;
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
