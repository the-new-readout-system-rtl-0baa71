// tb_cream: board-level test of the CREAM firmware with reduced buffer sizes
// (circular buffer 2^12 slices, L0 buffer 70000 slices, 4096 directory
// entries; queue depths and all other sizes as built).
//
// An ADC model drives a known pattern (a low baseline with sparse large
// pulses). Every slice written into the circular buffer is recorded by
// timestamp, and checked against the pattern. Triggers arrive on the backplane
// lines (strobe, then later the type), L1 requests arrive as Multi-Request
// Packets on the receive side, and a receiver on the transmit side takes the
// Data Link bytes at each phy_byte_en. It checks preamble and CRC and decodes
// the UDP/SDE and IGMP frames. For each SDE packet it checks that the event
// number, timestamp and trigger type are as triggered, and that each sample
// equals the recorded slice at timestamp - latency + i. With zero suppression
// on it also checks that the channel mask is the set of channels above the
// threshold. Phases: L1 requests; L0-readout mode with zero suppression;
// an unknown event; a trigger type without readout; continuous mode; an
// IGMP join; a trigger burst that raises CHOKE and then ERROR; err_clear.
// Each mechanism is counted; one that never happens counts a failure.
`timescale 1ns/1ps
module tb_cream;
  import cream_pkg::*;
  localparam int CB_AW = 12, L0_DEPTH = 70000, DIR_AW = 12;
  localparam int LAT = 300;          // at least the largest nsamp used

  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic adc_bit_en, take;
  logic [NADC-1:0] adc_fco;
  logic [NCH-1:0] adc_din;
  logic [NCH-1:0][13:0] smp;
  logic bp_l0, bp_tt_valid, bp_ts_reset, bp_ec_reset;
  ttype_t bp_ttype;
  logic choke, error, cont_start, igmp_join, err_clear, tsl_sync;
  cream_cfg_t cfg;
  logic [7:0] rx_data, txd;
  logic rx_valid, rx_last, phy_byte_en, tx_en;
  logic [1:0] tsl_out;
  tstamp_t timestamp;
  logic cont_active, sde_sent, evt_stored;

  cream #(.CB_AW(CB_AW), .L0_DEPTH(L0_DEPTH), .DIR_AW(DIR_AW)) dut (.*);
  adc_model #(.CH(NCH), .NFCO(NADC), .FRAME(18)) u_adc (
    .clk, .rst, .smp, .take, .bit_en(adc_bit_en), .fco(adc_fco), .din(adc_din));

  initial begin
    #80_000_000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

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
  always @(posedge clk) if (!rst && dut.tick) begin
    int unsigned f;
    logic [WORD_W-1:0] e;
    f = fq.pop_front();
    for (int c = 0; c < NCH; c++) e[16*c +: 16] = 16'(pat(f, c));
    checks++;
    if (dut.slice != e) begin failures++; slice_bad++; end
    slice_at[timestamp] = dut.slice;
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
  int unsigned n_trig = 0;

  task automatic trigger(ttype_t tt, int delay_type);
    @(negedge clk);
    bp_l0 = 1;
    exp_evt[n_trig] = '{ts: timestamp, tt: tt};
    n_trig++;
    @(negedge clk);
    bp_l0 = 0;
    repeat (delay_type) @(negedge clk);
    bp_tt_valid = 1; bp_ttype = tt;
    @(negedge clk);
    bp_tt_valid = 0;
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
      if (tx_en || dut.rq_valid || dut.u_sde.state != 0) q = 0; else q++;
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

  // ---------------- trigger sum link: count frames (content checked in the top test)
  int n_tsl = 0;
  always @(posedge clk) if (!rst && dut.g_tsl[0].sv) n_tsl++;

  int n_cont_seen = 0;
  int n_choke = 0, n_error = 0, n_clear = 0;
  initial begin
    int unsigned l[$];
    bp_l0 = 0; bp_tt_valid = 0; bp_ttype = 0; bp_ts_reset = 0; bp_ec_reset = 0;
    cont_start = 0; igmp_join = 0; err_clear = 0; tsl_sync = 0;
    rx_valid = 0; rx_last = 0; rx_data = 0;
    cfg = '0;
    for (int c = 0; c < NCH; c++) begin cfg.ped[c] = 14'd400; cfg.gain[c] = 12'd2048; end
    cfg.latency = 19'(LAT); cfg.nsamp = 9'd8;
    cfg.tt_readout = ~64'h20;           // trigger type 5 extracts no samples
    cfg.zs_threshold = 14'd600;
    cfg.my_mac = 48'h02_00_00_00_00_11; cfg.my_ip = 32'h0A00_0011;
    cfg.mcast_ip = 32'hEF00_0001; cfg.mrp_port = 16'd5000; cfg.sde_port = 16'd6000;
    cfg.dest_mac = 48'h02_00_00_00_00_99; cfg.dest_ip = 32'h0A00_0099;
    repeat (10) @(negedge clk);
    rst = 0;
    repeat (18 * (LAT + 20)) @(negedge clk);

    // 1. triggers, then L1 requests in two MRPs (plus one unknown event)
    for (int i = 0; i < 20; i++) begin
      trigger(ttype_t'(i == 7 ? 5 : i % 4), $urandom_range(0, 40));
      repeat ($urandom_range(18, 400)) @(negedge clk);
    end
    repeat (2000) @(negedge clk);
    expected_mac = 48'h02_00_00_00_00_A1;
    for (int i = 0; i < 10; i++) l.push_back(i);
    send_mrp(l, 32'h0A00_00A1, 48'h02_00_00_00_00_A1);
    l.delete();
    wait_idle(200);
    n_l1 = n_sde;
    expected_mac = 48'h02_00_00_00_00_A2;
    for (int i = 10; i < 20; i++) l.push_back(i);
    l.push_back(3000);
    send_mrp(l, 32'h0A00_00A2, 48'h02_00_00_00_00_A2);
    l.delete();
    wait_idle(200);
    n_l1 = n_sde;

    // 2. L0-readout mode with zero suppression
    expected_mac = cfg.dest_mac;
    cfg.l0_readout = 1; cfg.zs_enable = 1; cfg.nsamp = 9'd32;
    for (int i = 0; i < 20; i++) begin
      trigger(ttype_t'($urandom_range(0, 3)), $urandom_range(0, 40));
      repeat ($urandom_range(18, 3000)) @(negedge clk);
    end
    wait_idle(200);
    n_l0ro = n_sde - n_l1;

    // 3. IGMP join
    igmp_join = 1; @(negedge clk); igmp_join = 0;
    wait_idle(200);

    // 4. continuous mode, 256 samples per event, no zero suppression
    cfg.zs_enable = 0; cfg.nsamp = 9'd256;
    cont_start = 1; @(negedge clk); cont_start = 0;
    while (cont_active) begin
      @(negedge clk);
      if (($urandom & 1023) == 0) begin bp_l0 = 1; @(negedge clk); bp_l0 = 0; end
    end
    wait_idle(500);
    n_cont_seen = n_cont;

    // 5. trigger burst with the Data Link stopped: CHOKE, then a lost trigger
    cfg.nsamp = 9'd16;
    dut_be_hold = 1;
    for (int i = 0; i < 300 && !error; i++) begin
      trigger(ttype_t'(1), 0);
      if (choke) n_choke++;
    end
    if (error) n_error++;
    dut_be_hold = 0;
    exp_evt.delete();                   // lost or late events are not checked by number
    wait_idle(2000);
    checks++;
    if (choke) failures++;
    err_clear = 1; @(negedge clk); err_clear = 0; @(negedge clk);
    if (!error) n_clear++;

    checks++; if (n_l1 != 21) begin failures++; $display("L1 packets %0d", n_l1); end
    checks++; if (n_notfound != 1) begin failures++; $display("not found %0d", n_notfound); end
    checks++; if (n_nodata < 1) begin failures++; $display("no-data events %0d", n_nodata); end
    checks++; if (n_l0ro != 20) begin failures++; $display("L0 readout %0d", n_l0ro); end
    checks++; if (n_zs != 20) begin failures++; $display("ZS %0d", n_zs); end
    checks++; if (n_igmp != 1) begin failures++; $display("IGMP %0d", n_igmp); end
    checks++; if (n_cont_seen != 256) begin failures++; $display("continuous %0d", n_cont_seen); end
    checks++; if (n_choke == 0) begin failures++; $display("no CHOKE"); end
    checks++; if (n_error == 0) begin failures++; $display("no ERROR"); end
    checks++; if (n_clear == 0) begin failures++; $display("no clear"); end
    checks++; if (n_tsl == 0) begin failures++; $display("no trigger sums"); end
    checks++; if (slice_bad != 0) $display("bad slices %0d", slice_bad);
    $display("L1 %0d L0-readout %0d ZS %0d notfound %0d nodata %0d IGMP %0d cont %0d choke %0d error %0d",
             n_l1, n_l0ro, n_zs, n_notfound, n_nodata, n_igmp, n_cont_seen, n_choke, n_error);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
