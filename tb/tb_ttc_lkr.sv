// tb_ttc_lkr: drives the TTC-LKr with a TTC A/B bit stream built here (L0
// bits on channel A, broadcast commands with check bits on channel B) and
// checks the backplane: one bp_l0 per channel-A bit, the trigger types and
// resets of the commands, a corrupted command flagged and ignored, a long-
// format frame skipped. Then checks the front-panel, VME and internal-
// generator sources (generator period counted in strobes), and the ORed,
// masked CHOKE and ERROR lines.
module tb_ttc_lkr;
  import cream_pkg::*;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic strobe, ttc_a = 0, ttc_b = 1, fp_l0 = 0, vme_l0 = 0;
  logic [1:0] cfg_src = 0;
  ttype_t fp_ttype = 0, vme_ttype = 0, cfg_gen_ttype = 6'd33;
  logic [15:0] cfg_gen_period = 16'd40;
  logic [NSLOT-1:0] slot_choke = 0, slot_error = 0, cfg_slot_mask = 16'hFFFF;
  logic bp_l0, bp_tt_valid, bp_ts_reset, bp_ec_reset, l0tp_choke, l0tp_error, ttc_ham_err;
  ttype_t bp_ttype;
  int n_l0 = 0, n_tt = 0, n_tsr = 0, n_ecr = 0, n_ham = 0;
  ttype_t tt_q[$];
  int unsigned k = 0, cyc = 0, last_l0 = 0;
  int gen_ok = 0;

  ttc_lkr dut (.*);

  always_ff @(posedge clk) begin
    k <= (k == 17) ? 0 : k + 1;
    cyc <= cyc + 1;
  end
  assign strobe = (k == 0) && !rst;

  always @(posedge clk) if (!rst) begin
    if (bp_l0) begin
      n_l0++;
      if (cfg_src == 3 && last_l0 != 0) begin
        checks++;
        if (cyc - last_l0 != 40 * 18) failures++; else gen_ok++;
      end
      last_l0 = cyc;
    end
    if (bp_tt_valid) begin
      n_tt++;
      checks++;
      if (tt_q.size() == 0 || bp_ttype != tt_q[0]) begin failures++; $display("type %0d", bp_ttype); end
      if (tt_q.size() != 0) void'(tt_q.pop_front());
    end
    if (bp_ts_reset) n_tsr++;
    if (bp_ec_reset) n_ecr++;
    if (ttc_ham_err) n_ham++;
  end

  function automatic logic [4:0] ham(logic [7:0] d);
    logic [4:0] h;
    h[0] = d[0] ^ d[1] ^ d[2] ^ d[3];
    h[1] = d[0] ^ d[4] ^ d[5] ^ d[6];
    h[2] = d[1] ^ d[2] ^ d[4] ^ d[5] ^ d[7];
    h[3] = d[1] ^ d[3] ^ d[4] ^ d[6] ^ d[7];
    h[4] = ^{d, h[3:0]};
    return h;
  endfunction

  // one TTC bit period: A and B bits presented for one strobe
  task automatic ttc_bit(logic a, logic b);
    @(negedge clk);
    while (k != 0) @(negedge clk);
    ttc_a = a; ttc_b = b;
    @(negedge clk);
    ttc_a = 0; ttc_b = 1;
  endtask
  task automatic bcast(logic [7:0] d, logic corrupt, logic l0_at);
    logic [15:0] fr;
    fr = {1'b0, 1'b0, d, ham(d) ^ {4'b0, corrupt}, 1'b1};
    for (int i = 15; i >= 0; i--) ttc_bit(l0_at && i == 8, fr[i]);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 60; i++) begin
      ttype_t t;
      t = TT_W'($urandom);
      ttc_bit(1, 1);                      // L0 on channel A
      tt_q.push_back(t);
      bcast({t, 2'b00}, 0, (i % 4 == 1)); // its type, sometimes with another L0 inside
      if (i % 4 == 1) tt_q.push_back(6'd0);
      if (i % 4 == 1) bcast({6'd0, 2'b00}, 0, 0);
    end
    bcast(8'b0000_0001, 0, 0);            // timestamp reset
    bcast(8'b0000_0010, 0, 0);            // event-counter reset
    bcast(8'b1010_1000, 1, 0);            // corrupted: no output
    // long-format frame: start 0, format 1, then 40 bits, all ignored
    ttc_bit(0, 0); ttc_bit(0, 1);
    for (int i = 0; i < 40; i++) ttc_bit(0, i % 2);
    repeat (40) @(negedge clk);
    checks++;
    if (n_l0 != 75 || n_tt != 75 || n_tsr != 1 || n_ecr != 1 || n_ham != 1 || tt_q.size() != 0) begin
      failures++; $display("l0 %0d tt %0d tsr %0d ecr %0d ham %0d", n_l0, n_tt, n_tsr, n_ecr, n_ham);
    end
    // front panel
    cfg_src = 1;
    for (int i = 0; i < 10; i++) begin
      @(negedge clk);
      fp_ttype = TT_W'(i + 1); tt_q.push_back(fp_ttype);
      fp_l0 = 1;
      while (k != 0) @(negedge clk);
      @(negedge clk);
      fp_l0 = 0;
      repeat (30) @(negedge clk);
    end
    // VME
    cfg_src = 2;
    for (int i = 0; i < 10; i++) begin
      @(negedge clk);
      vme_ttype = TT_W'(i + 20); tt_q.push_back(vme_ttype);
      vme_l0 = 1;
      @(negedge clk);
      vme_l0 = 0;
      repeat (10) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (n_l0 != 95 || tt_q.size() != 0) begin failures++; $display("local l0 %0d", n_l0); end
    // internal generator
    last_l0 = 0;
    cfg_src = 3;
    for (int i = 0; i < 12; i++) tt_q.push_back(cfg_gen_ttype);
    repeat (40 * 18 * 12 - 30) @(negedge clk);
    cfg_src = 2;
    tt_q.delete();
    checks++;
    if (gen_ok < 10) failures++;
    // CHOKE / ERROR gathering
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      slot_choke = 16'(1 << $urandom_range(0, 15)) & {16{$urandom_range(0, 1) == 1}};
      slot_error = 16'(1 << $urandom_range(0, 15)) & {16{$urandom_range(0, 1) == 1}};
      cfg_slot_mask = 16'($urandom);
      @(negedge clk);
      checks++;
      if (l0tp_choke != |(slot_choke & cfg_slot_mask) || l0tp_error != |(slot_error & cfg_slot_mask)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
