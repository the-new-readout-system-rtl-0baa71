// tb_lkr_readout_top: end-to-end test of the LKr readout chain (TTC-LKr
// crate controller, one CREAM, two TELDES trigger-sum receivers), with
// reduced buffer sizes (circular buffer 2^12 slices, L0 buffer 70000 slices,
// 4096 directory entries; everything else as built).
//
// Triggers enter as a TTC A/B bit stream built here (L0 bits on channel A;
// broadcast commands carrying the trigger type, timestamp reset and event
// counter reset on channel B, with Hamming check bits), from the VME
// register, the internal generator and the front panel. The testbench
// follows the backplane lines to know each event's number, timestamp and
// type. It records every time slice written in the CREAM, and checks the
// SDE packets on the Data Link byte by byte: header fields, samples
// (recorded slice at timestamp - latency + i) and zero-suppression mask. It
// also checks each trigger sum received by the TELDES receivers against the
// sum computed here from the slices, baseline and gains.
// Mechanisms counted (a failure for any that never happens): TTC L0, VME L0,
// generator L0, front-panel L0, timestamp reset, event-counter reset, TTC
// check-bit error, L1 request (MRP) answered, unknown event, trigger type
// without readout, L0-readout mode, zero suppression, continuous mode, IGMP
// join, TELDES lock, trigger sums checked, L0 trigger processor peaks
// (total, quadrant and peak energy checked), CHOKE to the L0 trigger processor
// (stall), ERROR on a lost trigger (overflow), ERROR cleared.
`timescale 1ns/1ps
module tb_lkr_readout_top;
  import cream_pkg::*;
  localparam int CB_AW = 12, L0_DEPTH = 70000, DIR_AW = 12;
  localparam int LAT = 300;          // at least the largest nsamp used

  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic ttc_strobe, ttc_a = 0, ttc_b = 1, fp_l0 = 0, vme_l0 = 0;
  logic [1:0] ttc_cfg_src = 0;
  ttype_t fp_ttype = 0, vme_ttype = 0, gen_ttype = 6'd2;
  logic [15:0] gen_period = 16'd50;
  logic [NSLOT-1:1] other_choke = '0, other_error = '0;
  logic [NSLOT-1:0] slot_mask = '1;
  logic l0tp_choke, l0tp_error, ttc_ham_err;
  logic adc_bit_en, take;
  logic [NADC-1:0] adc_fco;
  logic [NCH-1:0] adc_din;
  logic [NCH-1:0][13:0] smp;
  logic cream_choke, cream_error, cont_start, igmp_join, err_clear, tsl_sync;
  cream_cfg_t cfg;
  logic [7:0] rx_data, txd;
  logic rx_valid, rx_last, phy_byte_en, tx_en;
  tstamp_t timestamp;
  logic cont_active, sde_sent, evt_stored;
  logic [1:0] tile_valid, tile_locked, tile_err;
  logic [1:0][TSL_W-1:0] tile_sum;
  logic [31:0][31:0][TSL_W-1:0] l0tp_tiles = '0;
  logic [TSL_W-1:0] l0tp_threshold = 16'd200;
  logic l0tp_valid;
  logic [31:0][31:0] l0tp_peak;
  logic [10:0] l0tp_npeaks;
  logic [25:0] l0tp_peak_energy, l0tp_etot;
  logic [3:0][25:0] l0tp_equad;
  tstamp_t l0tp_peak_ts;

  lkr_readout_top #(.CB_AW(CB_AW), .L0_DEPTH(L0_DEPTH), .DIR_AW(DIR_AW)) dut (.*);
  adc_model #(.CH(NCH), .NFCO(NADC), .FRAME(18)) u_adc (
    .clk, .rst, .smp, .take, .bit_en(adc_bit_en), .fco(adc_fco), .din(adc_din));

  initial begin
    #80_000_000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // TTC strobe: one per 18 clocks (40 MHz against the 18-bit core clock)
  int unsigned k = 0;
  always_ff @(posedge clk) k <= (k == 17) ? 0 : k + 1;
  assign ttc_strobe = (k == 0) && !rst;

  // ---------------- ADC pattern and recorded slices
  function automatic logic [13:0] pat(int unsigned f, int c);
    if ((f * 13 + c * 7) % 61 == 0) return 14'(2000 + (f * 31 + c) % 8000);
    return 14'(400 + (f + c) % 16);
  endfunction
  int unsigned frame_no = 0;
  int unsigned fq[$];
  logic [WORD_W-1:0] slice_at[int unsigned];
  always @(posedge clk) if (!rst && take) begin
    fq.push_back(frame_no);
    frame_no <= frame_no + 1;
  end
  always_comb for (int c = 0; c < NCH; c++) smp[c] = pat(frame_no, c);
  int slice_bad = 0;

  // expected trigger sums, computed from each slice
  logic [TSL_W-1:0] sum_q[2][$];
  function automatic logic [TSL_W-1:0] tsum(logic [WORD_W-1:0] sl, int t);
    int unsigned acc = 0;
    for (int c = t * 16; c < t * 16 + 16; c++) begin
      int unsigned s, d;
      s = sl[16*c +: 16];
      d = (s > cfg.ped[c]) ? s - cfg.ped[c] : 0;
      acc += (d * cfg.gain[c]) >> 11;
    end
    if (acc > 18'h3FFFF) acc = 18'h3FFFF;
    return TSL_W'(acc >> 2);
  endfunction

  always @(posedge clk) if (!rst && dut.u_cream.tick) begin
    int unsigned f;
    logic [WORD_W-1:0] e;
    f = fq.pop_front();
    for (int c = 0; c < NCH; c++) e[16*c +: 16] = 16'(pat(f, c));
    checks++;
    if (dut.u_cream.slice != e) begin failures++; slice_bad++; end
    slice_at[timestamp] = dut.u_cream.slice;
    for (int t = 0; t < 2; t++) begin
      if (tsl_sync) sum_q[t].delete();   // sums of these ticks are not sent
      sum_q[t].push_back(tsum(dut.u_cream.slice, t));
    end
  end

  // TELDES: first received sum aligns the queue, then every sum must match
  int n_tsum = 0, n_lock = 0;
  logic [1:0] aligned = 0;
  always @(posedge clk) if (!rst) for (int t = 0; t < 2; t++) if (tile_valid[t]) begin
    if (!aligned[t]) begin
      int d = 0;
      while (sum_q[t].size() > 1 && sum_q[t][0] != tile_sum[t] && d < 8) begin
        void'(sum_q[t].pop_front()); d++;
      end
      aligned[t] = 1;
      n_lock++;
    end
    checks++;
    if (sum_q[t].size() == 0 || sum_q[t][0] != tile_sum[t]) begin
      failures++;
      if (failures < 10) $display("tile %0d sum %h", t, tile_sum[t]);
    end else n_tsum++;
    if (sum_q[t].size() != 0) void'(sum_q[t].pop_front());
  end

  // L0 trigger processor: only this CREAM's tiles carry energy, at row 0,
  // columns 0 and 1, so the total is the sum of the two received values of
  // the map before the newest, and all of it is in quadrant 0
  logic [1:0][TSL_W-1:0] tsum_d1, tsum_d2;
  int n_l0tp = 0, n_l0tp_peaks = 0;
  always @(posedge clk) if (!rst) begin
    if (tile_valid[0]) begin tsum_d2 <= tsum_d1; tsum_d1 <= tile_sum; end
    if (l0tp_valid && aligned == 2'b11 && n_l0tp++ > 2) begin
      checks++;
      if (l0tp_etot != 26'(tsum_d2[0]) + 26'(tsum_d2[1]) || l0tp_equad[0] != l0tp_etot
          || l0tp_npeaks > 1 || (l0tp_npeaks == 1 && l0tp_peak_energy
             != 26'(tsum_d2[0] >= tsum_d2[1] ? tsum_d2[0] : tsum_d2[1]))) begin
        failures++;
        if (failures < 10) $display("L0TP etot %0d peaks %0d", l0tp_etot, l0tp_npeaks);
      end
      n_l0tp_peaks += l0tp_npeaks;
    end
  end

  // ---------------- backplane monitor: event numbers, timestamps, types
  int unsigned ev_n = 0;
  int unsigned pend[$];
  int n_src[4] = '{0, 0, 0, 0};
  int n_tsr = 0, n_ecr = 0, n_ham = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.bp_ec_reset) begin ev_n = 0; n_ecr++; end
    if (dut.bp_ts_reset) n_tsr++;
    if (ttc_ham_err) n_ham++;
    if (dut.bp_l0 && !cont_active) begin
      exp_evt[ev_n] = '{ts: timestamp, tt: 0};
      pend.push_back(ev_n);
      ev_n++;
      n_src[ttc_cfg_src]++;
    end
    if (dut.u_cream.u_trig.cont_push) ev_n++;
    if (dut.bp_tt_valid && pend.size() != 0) exp_evt[pend.pop_front()].tt = dut.bp_ttype;
  end

  // ---------------- Data Link receiver
  mac_addr_t expected_mac;
  logic dut_be_hold = 0;
  typedef struct { tstamp_t ts; ttype_t tt; } exp_t;
  exp_t exp_evt[int unsigned];
  int n_sde = 0, n_sde_data = 0, n_zs = 0, n_notfound = 0, n_nodata = 0, n_igmp = 0;
  int n_cont = 0, n_l0ro = 0, n_l1 = 0;
  logic [7:0] rx[$];
  logic be_d;
  always @(posedge clk) be_d <= phy_byte_en;
  always @(posedge clk) if (!rst && be_d) begin
    if (tx_en) rx.push_back(txd);
    else if (rx.size() != 0) begin check_frame(); rx.delete(); end
  end

  function automatic int unsigned be(int p, int n);
    int unsigned v = 0;
    for (int i = 0; i < n; i++) v = (v << 8) | rx[p + i];
    return v;
  endfunction

  task automatic check_frame();
    logic [31:0] crc = '1;
    int p, nch, nsamp;
    int unsigned evt, ts, mask, emask;
    logic [7:0] flags, tt;
    checks++;
    for (int i = 0; i < 7; i++) if (rx[i] != 8'h55) begin failures++; return; end
    if (rx[7] != 8'hD5) begin failures++; return; end
    for (int i = 8; i < rx.size() - 4; i++) crc = crc32_byte(crc, rx[i]);
    crc = ~crc;
    if ({rx[rx.size()-1], rx[rx.size()-2], rx[rx.size()-3], rx[rx.size()-4]} != crc) begin
      failures++; $display("CRC error"); return;
    end
    p = 8;
    if (be(p + 12, 2) != 16'h0800) begin failures++; return; end
    if (rx[p + 23] == 8'd2) begin
      checks++;
      if (be(p + 30, 4) != cfg.mcast_ip || rx[p + 34] != 8'h16) failures++;
      n_igmp++;
      return;
    end
    checks++;
    if (rx[p + 23] != 8'd17 || be(p + 36, 2) != cfg.sde_port || {16'(be(p, 2)), be(p + 2, 4)} != expected_mac)
      begin failures++; $display("bad UDP header %0d %0d %h %h", rx[p + 23], be(p + 36, 2), be(p, 2), be(p + 2, 4)); return; end
    n_sde++;
    p = p + 42;
    flags = rx[p]; evt = be(p + 1, 3); ts = be(p + 4, 4); tt = rx[p + 8];
    nsamp = be(p + 10, 2); mask = be(p + 12, 4);
    p = p + 16;
    if (!flags[0]) begin
      n_notfound++;
      checks++;
      if (nsamp != 0 || exp_evt.exists(evt)) failures++;
      return;
    end
    if (exp_evt.exists(evt)) begin
      checks++;
      if (exp_evt[evt].ts != ts || exp_evt[evt].tt != tt[5:0]) begin
        failures++; $display("evt %0d ts %0d/%0d tt %0d", evt, ts, exp_evt[evt].ts, tt);
      end
      exp_evt.delete(evt);
    end else n_cont++;
    if (nsamp == 0) begin n_nodata++; return; end
    n_sde_data++;
    emask = '1;
    if (flags[1]) begin
      n_zs++;
      emask = 0;
      for (int i = 0; i < nsamp; i++)
        for (int c = 0; c < NCH; c++)
          if (slice_at[ts - LAT + i][16*c +: 16] > 16'(cfg.zs_threshold)) emask[c] = 1;
      checks++;
      if (mask != emask) begin failures++; $display("ZS mask %h exp %h", mask, emask); end
    end
    nch = $countones(mask);
    checks++;
    if (rx.size() - 4 < p + 2 * nch * nsamp) begin failures++; return; end
    for (int i = 0; i < nsamp; i++)
      for (int c = 0; c < NCH; c++)
        if (mask[c]) begin
          checks++;
          if (!slice_at.exists(ts - LAT + i) ||
              be(p, 2) != slice_at[ts - LAT + i][16*c +: 16]) begin
            failures++;
            if (failures < 10) $display("evt %0d sample %0d ch %0d bad", evt, i, c);
          end
          p += 2;
        end
  endtask

  // ---------------- stimulus helpers
  function automatic logic [4:0] ham(logic [7:0] d);
    logic [4:0] h;
    h[0] = d[0] ^ d[1] ^ d[2] ^ d[3];
    h[1] = d[0] ^ d[4] ^ d[5] ^ d[6];
    h[2] = d[1] ^ d[2] ^ d[4] ^ d[5] ^ d[7];
    h[3] = d[1] ^ d[3] ^ d[4] ^ d[6] ^ d[7];
    h[4] = ^{d, h[3:0]};
    return h;
  endfunction
  task automatic ttc_bit(logic a, logic b);
    @(negedge clk);
    while (k != 0) @(negedge clk);
    ttc_a = a; ttc_b = b;
    @(negedge clk);
    ttc_a = 0; ttc_b = 1;
  endtask
  task automatic bcast(logic [7:0] d, logic corrupt);
    logic [15:0] fr;
    fr = {1'b0, 1'b0, d, ham(d) ^ {4'b0, corrupt}, 1'b1};
    for (int i = 15; i >= 0; i--) ttc_bit(0, fr[i]);
  endtask
  task automatic ttc_trigger(ttype_t tt);
    ttc_bit(1, 1);
    repeat ($urandom_range(0, 20)) ttc_bit(0, 1);
    bcast({tt, 2'b00}, 0);
  endtask

  task automatic send_mrp(int unsigned evts[$], ip_addr_t sip, mac_addr_t smac);
    logic [7:0] f[$];
    for (int i = 0; i < 6; i++) f.push_back(8'hFF);
    for (int i = 0; i < 6; i++) f.push_back(smac[47-8*i -: 8]);
    f.push_back(8'h08); f.push_back(8'h00); f.push_back(8'h45); f.push_back(8'h00);
    for (int i = 0; i < 6; i++) f.push_back(8'h00);
    f.push_back(8'd64); f.push_back(8'd17); f.push_back(8'h00); f.push_back(8'h00);
    for (int i = 0; i < 4; i++) f.push_back(sip[31-8*i -: 8]);
    for (int i = 0; i < 4; i++) f.push_back(cfg.mcast_ip[31-8*i -: 8]);
    f.push_back(8'h12); f.push_back(8'h34);
    f.push_back(cfg.mrp_port[15:8]); f.push_back(cfg.mrp_port[7:0]);
    for (int i = 0; i < 4; i++) f.push_back(8'h00);
    f.push_back(8'(evts.size() >> 8)); f.push_back(8'(evts.size()));
    foreach (evts[r]) begin
      f.push_back(8'h00); f.push_back(8'(evts[r] >> 16));
      f.push_back(8'(evts[r] >> 8)); f.push_back(8'(evts[r]));
    end
    foreach (f[i]) begin
      @(negedge clk);
      rx_valid = 1; rx_data = f[i]; rx_last = (i == f.size() - 1);
    end
    @(negedge clk);
    rx_valid = 0; rx_last = 0;
  endtask

  task automatic wait_idle(int cyc);
    int q = 0;
    while (q < cyc) begin
      @(negedge clk);
      if (tx_en || dut.u_cream.rq_valid || dut.u_cream.u_sde.state != 0) q = 0; else q++;
    end
  endtask

  // byte strobe: at most every third clock (the 1 Gbit/s byte rate), with
  // occasional extra gaps
  int be_gap = 0;
  always @(negedge clk) begin
    phy_byte_en = !rst && be_gap == 0 && !dut_be_hold;
    if (phy_byte_en) be_gap = ($urandom_range(0, 7) == 0) ? 3 : 2;
    else if (be_gap != 0) be_gap--;
  end

  int n_cont_seen = 0, n_choke = 0, n_error = 0, n_clear = 0, n_l1_evt = 0;
  always @(posedge clk) if (!rst) begin
    if (l0tp_choke) n_choke++;
    if (l0tp_error && n_error == 0) n_error++;
  end

  task automatic count(string what, int n, int lo);
    checks++;
    if (n < lo) begin failures++; $display("%s: %0d, expected at least %0d", what, n, lo); end
  endtask

  initial begin
    int unsigned l[$];
    cont_start = 0; igmp_join = 0; err_clear = 0; tsl_sync = 1;
    rx_valid = 0; rx_last = 0; rx_data = 0;
    cfg = '0;
    for (int c = 0; c < NCH; c++) begin
      cfg.ped[c] = 14'd400; cfg.gain[c] = 12'($urandom_range(1500, 2600));
    end
    cfg.latency = 19'(LAT); cfg.nsamp = 9'd8;
    cfg.tt_readout = ~64'h20;           // trigger type 5 extracts no samples
    cfg.zs_threshold = 14'd600;
    cfg.my_mac = 48'h02_00_00_00_00_11; cfg.my_ip = 32'h0A00_0011;
    cfg.mcast_ip = 32'hEF00_0001; cfg.mrp_port = 16'd5000; cfg.sde_port = 16'd6000;
    cfg.dest_mac = 48'h02_00_00_00_00_99; cfg.dest_ip = 32'h0A00_0099;
    repeat (10) @(negedge clk);
    rst = 0;
    repeat (18 * 20) @(negedge clk);
    tsl_sync = 0;                        // trigger sum links: sync pattern, then data
    repeat (18 * (LAT + 20)) @(negedge clk);

    // 1. TTC: timestamp and event-counter resets, L0s with types, one
    //    corrupted command; three VME triggers; then one MRP asks for all
    bcast(8'b0000_0001, 0);
    bcast(8'b0000_0010, 0);
    repeat (18 * (LAT + 20)) @(negedge clk);
    for (int i = 0; i < 12; i++) ttc_trigger(ttype_t'(i == 4 ? 5 : $urandom_range(0, 40)));
    bcast(8'b1010_1000, 1);
    ttc_cfg_src = 2;
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); vme_ttype = ttype_t'(i + 1); vme_l0 = 1;
      @(negedge clk); vme_l0 = 0;
      repeat (500) @(negedge clk);
    end
    repeat (2000) @(negedge clk);
    expected_mac = 48'h02_00_00_00_00_A1;
    for (int i = 0; i < 15; i++) l.push_back(i);
    l.push_back(4000);
    send_mrp(l, 32'h0A00_00A1, 48'h02_00_00_00_00_A1);
    l.delete();
    wait_idle(200);
    n_l1_evt = n_sde;

    // 2. internal generator in L0-readout mode with zero suppression
    expected_mac = cfg.dest_mac;
    cfg.l0_readout = 1; cfg.zs_enable = 1; cfg.nsamp = 9'd32;
    ttc_cfg_src = 3;
    repeat (18 * 50 * 20) @(negedge clk);
    ttc_cfg_src = 2;
    wait_idle(200);
    n_l0ro = n_sde - n_l1_evt;

    // 3. IGMP join
    igmp_join = 1; @(negedge clk); igmp_join = 0;
    wait_idle(200);

    // 4. continuous mode, 256 samples per event, no zero suppression
    cfg.zs_enable = 0; cfg.nsamp = 9'd256;
    cont_start = 1; @(negedge clk); cont_start = 0;
    @(negedge clk);
    while (cont_active) @(negedge clk);
    wait_idle(500);
    n_cont_seen = n_cont;

    // 5. front-panel trigger at every strobe with the Data Link stopped:
    //    CHOKE to the L0 trigger processor, then a lost trigger and ERROR
    cfg.nsamp = 9'd64;
    ttc_cfg_src = 1;
    dut_be_hold = 1;
    for (int i = 0; i < 400 && !l0tp_error; i++) begin
      @(negedge clk);
      fp_ttype = ttype_t'(3); fp_l0 = 1;
      while (k != 0) @(negedge clk);
      @(negedge clk);
      fp_l0 = 0;
    end
    dut_be_hold = 0;
    ttc_cfg_src = 2;
    repeat (18 * 40) @(negedge clk);
    exp_evt.delete();                   // lost events are not checked by number
    wait_idle(2000);
    checks++;
    if (l0tp_choke) begin failures++; $display("CHOKE stuck"); end
    err_clear = 1; @(negedge clk); err_clear = 0; repeat (4) @(negedge clk);
    if (!l0tp_error) n_clear++;

    $display("sources TTC %0d FP %0d VME %0d gen %0d; TSR %0d ECR %0d ham %0d",
             n_src[0], n_src[1], n_src[2], n_src[3], n_tsr, n_ecr, n_ham);
    $display("L1 %0d L0-readout %0d ZS %0d notfound %0d nodata %0d IGMP %0d cont %0d",
             n_l1_evt, n_l0ro, n_zs, n_notfound, n_nodata, n_igmp, n_cont_seen);
    $display("choke cycles %0d error %0d clear %0d TELDES lock %0d sums %0d L0TP maps %0d peaks %0d",
             n_choke, n_error, n_clear, n_lock, n_tsum, n_l0tp, n_l0tp_peaks);
    count("TTC L0", n_src[0], 12);
    count("front-panel L0", n_src[1], 1);
    count("VME L0", n_src[2], 3);
    count("generator L0", n_src[3], 15);
    count("timestamp reset", n_tsr, 1);
    count("event-counter reset", n_ecr, 1);
    count("check-bit error", n_ham, 1);
    count("L1 request packets", n_l1_evt, 16);
    count("unknown event", n_notfound, 1);
    count("type without readout", n_nodata, 1);
    count("L0-readout packets", n_l0ro, 15);
    count("zero suppression", n_zs, 15);
    count("continuous events", n_cont_seen, 256);
    count("IGMP", n_igmp, 1);
    count("TELDES lock", n_lock, 2);
    count("trigger sums", n_tsum, 1000);
    count("L0TP peaks", n_l0tp_peaks, 1);
    count("CHOKE", n_choke, 1);
    count("ERROR", n_error, 1);
    count("ERROR cleared", n_clear, 1);
    checks++; if (n_l1_evt != 16) failures++;
    checks++; if (n_cont_seen != 256) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
