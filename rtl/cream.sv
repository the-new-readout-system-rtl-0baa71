// cream: firmware of the CREAM readout board (Calorimeter REAdout Module) of
// the liquid-krypton calorimeter, 32 channels.
//
// Data path: four ADC receivers deliver a 32-channel time slice every 25 ns
// (the tick of the whole board). Every slice is written into the circular
// buffer at its timestamp. An L0 trigger from the backplane is numbered and
// time-stamped; the extractor then copies cfg.nsamp slices taken
// cfg.latency ticks before the trigger into the L0 buffer and records the
// event in the directory. An event leaves the board as an SDE UDP packet on
// the Data Link when the PC farm asks for it in a Multi-Request Packet (L1
// request), or at once in L0-readout mode (cfg.l0_readout) and in
// continuous mode (cont_start: 65536 consecutive samples per channel cut
// into events of cfg.nsamp samples; these events are queued for sending
// from a count of pending event numbers). Zero suppression (cfg.zs_enable) keeps
// only channels with a sample above cfg.zs_threshold. igmp_join makes the
// board join the multicast group of the MRPs.
// Trigger path: every tick, two trigger sums (channels 0-15 and 16-31),
// baseline-subtracted and gain-corrected, leave on the two Trigger Sum Link
// lines, one 18-bit DS92LV16-style frame each per tick.
// Backplane: CHOKE rises when the trigger queue or the request queue is
// three-quarters full (falls at one quarter); ERROR when a trigger or an L1
// request was lost, until err_clear.
// Clocking: one clock; the ADC lines and the trigger sum links carry one bit
// per clock, so the clock runs at 18 bits per 25 ns tick (721 MHz for the
// 40.08 MHz sampling clock) and the ADC sends its 14 bits in 14 of the 18
// clocks. phy_byte_en sets the 1 Gbit/s byte rate of the Data Link. The
// block structure follows the description; the single-clock organisation is
// this design's own. The request queue's overflow output is left unused: an
// MRP request waits for space (mrp_rx reports one it has to drop), and an
// automatic request that finds the queue full is reported here.
module cream
  import cream_pkg::*;
#(
  parameter int          CB_AW    = 19,                 // circular buffer: 2^19 slices
  parameter int unsigned L0_DEPTH = 2**25 - 1,      // L0 buffer slices
  parameter int          DIR_AW   = 24,                 // event directory entries
  parameter int          TQ_DEPTH = 16,                 // L0 trigger queue
  parameter int          RQ_DEPTH = 128                 // read-out request queue
) (
  input  logic              clk,
  input  logic              rst,
  // ADC serial outputs
  input  logic              adc_bit_en,
  input  logic [NADC-1:0]   adc_fco,
  input  logic [NCH-1:0]    adc_din,
  // backplane from the TTC-LKr
  input  logic              bp_l0,
  input  logic              bp_tt_valid,
  input  ttype_t            bp_ttype,
  input  logic              bp_ts_reset,
  input  logic              bp_ec_reset,
  output logic              choke,
  output logic              error,
  // configuration and commands
  input  cream_cfg_t        cfg,
  input  logic              cont_start,
  input  logic              igmp_join,
  input  logic              err_clear,
  input  logic              tsl_sync,
  // Data Link
  input  logic [7:0]        rx_data,
  input  logic              rx_valid,
  input  logic              rx_last,
  input  logic              phy_byte_en,
  output logic [7:0]        txd,
  output logic              tx_en,
  // Trigger Sum Link
  output logic [1:0]        tsl_out,
  // status
  output tstamp_t           timestamp,
  output logic              cont_active,
  output logic              sde_sent,
  output logic              evt_stored
);
  localparam int L0_AW = $clog2(L0_DEPTH);

  // ---------------- ADC receivers
  logic [NADC-1:0]                       adc_v;
  logic [NADC-1:0][ADC_CH-1:0][ADC_BITS-1:0] adc_s;
  logic [NCH-1:0][ADC_BITS-1:0]          smp;
  logic                                  tick;
  logic [WORD_W-1:0]                     slice;

  for (genvar a = 0; a < NADC; a++) begin : g_adc
    adc_deser u_adc (
      .clk, .rst, .bit_en(adc_bit_en), .fco(adc_fco[a]),
      .din(adc_din[a*ADC_CH +: ADC_CH]), .sample(adc_s[a]), .valid(adc_v[a]));
  end
  assign tick = adc_v[0];
  always_comb
    for (int c = 0; c < NCH; c++) begin
      smp[c] = adc_s[c / ADC_CH][c % ADC_CH];
      slice[SAMPLE_W*c +: SAMPLE_W] = SAMPLE_W'(smp[c]);
    end

  // ---------------- triggers
  logic     trig_valid, trig_ready, lost;
  trig_t    trig;
  logic [$clog2(TQ_DEPTH):0] tq_level;

  l0_trigger_ctrl #(.QDEPTH(TQ_DEPTH)) u_trig (
    .clk, .rst, .sample_tick(tick), .bp_l0, .bp_tt_valid, .bp_ttype,
    .ts_reset(bp_ts_reset), .ec_reset(bp_ec_reset), .cont_start,
    .cfg_nsamp(cfg.nsamp), .timestamp, .trig_valid, .trig_ready, .trig,
    .level(tq_level), .cont_active, .lost);

  // ---------------- circular buffer
  logic               cb_re;
  logic [CB_AW-1:0]   cb_raddr;
  logic [WORD_W-1:0]  cb_rdata;

  circular_buffer #(.AW(CB_AW)) u_cb (
    .clk, .we(tick), .waddr(timestamp[CB_AW-1:0]), .wdata(slice),
    .re(cb_re), .raddr(cb_raddr), .rdata(cb_rdata));

  // ---------------- extractor and L0 buffer
  logic               l0_we, l0_re, dir_we, dir_re, ex_done, ex_cont;
  logic [L0_AW-1:0]   l0_waddr, l0_raddr, dir_wbase, dir_rbase;
  logic [WORD_W-1:0]  l0_wdata, l0_rdata;
  logic [DIR_AW-1:0]  dir_waddr, dir_raddr;
  evt_hdr_t           dir_whdr, dir_rhdr;
  evt_num_t           ex_evt;

  l0_extractor #(.CB_AW(CB_AW), .L0_DEPTH(L0_DEPTH), .DIR_AW(DIR_AW)) u_ex (
    .clk, .rst, .trig_valid, .trig_ready, .trig,
    .cfg_latency(cfg.latency), .cfg_nsamp(cfg.nsamp), .cfg_tt_readout(cfg.tt_readout),
    .cb_re, .cb_raddr, .cb_rdata,
    .l0_we, .l0_waddr, .l0_wdata, .dir_we, .dir_waddr, .dir_whdr, .dir_wbase,
    .done(ex_done), .done_evt(ex_evt), .done_cont(ex_cont));
  assign evt_stored = ex_done;

  l0_buffer #(.DEPTH(L0_DEPTH), .DIR_AW(DIR_AW)) u_l0 (
    .clk, .we(l0_we), .waddr(l0_waddr), .wdata(l0_wdata),
    .re(l0_re), .raddr(l0_raddr), .rdata(l0_rdata),
    .dir_we, .dir_waddr, .dir_whdr, .dir_wbase,
    .dir_re, .dir_raddr, .dir_rhdr, .dir_rbase);

  // ---------------- read-out requests
  logic     mrp_valid, mrp_ready, mrp_drop, mrp_seen;
  l1_req_t  mrp_req;
  logic     auto_push, auto_lost, rq_wr_valid, rq_wr_ready, rq_valid, rq_ready, rq_ovf;
  l1_req_t  rq_in, rq_out;
  logic [$clog2(RQ_DEPTH):0] rq_level;

  mrp_rx u_mrp (
    .clk, .rst, .rx_data, .rx_valid, .rx_last,
    .cfg_my_ip(cfg.my_ip), .cfg_mcast_ip(cfg.mcast_ip), .cfg_mrp_port(cfg.mrp_port),
    .req_valid(mrp_valid), .req_ready(mrp_ready), .req(mrp_req),
    .drop(mrp_drop), .mrp_seen);

  // Continuous-mode events are fed into the request queue from a count of
  // pending events (their numbers are consecutive), so that the 65536/N
  // events of one acquisition need no queue space of their own. The feed
  // stops at half the queue, below the CHOKE mark, so that a continuous
  // acquisition does not choke the experiment's triggers.
  logic        cont_feed;
  logic [16:0] cont_pending;
  evt_num_t    cont_next;

  assign auto_push   = ex_done && cfg.l0_readout && !ex_cont;
  assign cont_feed   = (cont_pending != '0) && !auto_push &&
                       (rq_level < ($clog2(RQ_DEPTH)+1)'(RQ_DEPTH / 2));
  assign rq_wr_valid = auto_push || cont_feed || mrp_valid;
  always_comb begin
    if (auto_push)      rq_in = '{evt: ex_evt,    ip: cfg.dest_ip, mac: cfg.dest_mac};
    else if (cont_feed) rq_in = '{evt: cont_next, ip: cfg.dest_ip, mac: cfg.dest_mac};
    else                rq_in = mrp_req;
  end
  assign mrp_ready   = !auto_push && !cont_feed && rq_wr_ready;
  // an automatic request finding the queue full is lost (an MRP request
  // waits instead, and mrp_rx reports it if it has to be dropped)
  assign auto_lost   = auto_push && !rq_wr_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      cont_pending <= '0;
      cont_next    <= '0;
    end else begin
      case ({ex_done && ex_cont, cont_feed})
        2'b10: begin
          cont_pending <= cont_pending + 1'b1;
          if (cont_pending == '0) cont_next <= ex_evt;
        end
        2'b01: begin
          cont_pending <= cont_pending - 1'b1;
          cont_next    <= cont_next + 1'b1;
        end
        2'b11: cont_next <= cont_next + 1'b1;
        default: ;
      endcase
    end
  end

  sync_fifo #(.W($bits(l1_req_t)), .DEPTH(RQ_DEPTH)) u_rq (
    .clk, .rst, .wr_valid(rq_wr_valid), .wr_ready(rq_wr_ready), .wr_data(rq_in),
    .rd_valid(rq_valid), .rd_ready(rq_ready), .rd_data(rq_out),
    .level(rq_level), .overflow(rq_ovf));

  // ---------------- packet builders and MAC
  logic [7:0] sde_d, igmp_d;
  logic       sde_v, sde_l, sde_r, igmp_v, igmp_l, igmp_r, igmp_sent, frame_done;

  sde_tx #(.L0_DEPTH(L0_DEPTH), .DIR_AW(DIR_AW)) u_sde (
    .clk, .rst, .req_valid(rq_valid), .req_ready(rq_ready), .req(rq_out),
    .cfg_zs_enable(cfg.zs_enable), .cfg_zs_threshold(cfg.zs_threshold),
    .cfg_my_mac(cfg.my_mac), .cfg_my_ip(cfg.my_ip),
    .cfg_src_port(cfg.mrp_port), .cfg_dst_port(cfg.sde_port),
    .dir_re, .dir_raddr, .dir_rhdr, .dir_rbase, .l0_re, .l0_raddr, .l0_rdata,
    .tx_data(sde_d), .tx_valid(sde_v), .tx_last(sde_l), .tx_ready(sde_r), .sent(sde_sent));

  igmp_tx u_igmp (
    .clk, .rst, .join_req(igmp_join), .cfg_my_mac(cfg.my_mac), .cfg_my_ip(cfg.my_ip),
    .cfg_group(cfg.mcast_ip), .tx_data(igmp_d), .tx_valid(igmp_v), .tx_last(igmp_l),
    .tx_ready(igmp_r), .sent(igmp_sent));

  eth_mac_tx u_mac (
    .clk, .rst, .byte_en(phy_byte_en),
    .s0_data(igmp_d), .s0_valid(igmp_v), .s0_last(igmp_l), .s0_ready(igmp_r),
    .s1_data(sde_d),  .s1_valid(sde_v),  .s1_last(sde_l),  .s1_ready(sde_r),
    .txd, .tx_en, .frame_done);

  // ---------------- trigger sums
  for (genvar t = 0; t < 2; t++) begin : g_tsl
    logic             sv, fs;
    logic [TSL_W-1:0] sum;
    trigger_sum u_sum (
      .clk, .rst, .in_valid(tick),
      .sample(smp[t*TILE_CH +: TILE_CH]), .ped(cfg.ped[t*TILE_CH +: TILE_CH]),
      .gain(cfg.gain[t*TILE_CH +: TILE_CH]), .out_valid(sv), .sum);
    ds92lv16_ser u_ser (
      .clk, .rst, .load(sv), .data(sum), .sync(tsl_sync),
      .sout(tsl_out[t]), .frame_start(fs));
  end

  // ---------------- CHOKE and ERROR
  choke_error #(.NLEV(2), .LW(8)) u_ce (
    .clk, .rst,
    .level({8'(rq_level), 8'(tq_level)}),
    .high_mark({8'(RQ_DEPTH * 3 / 4), 8'(TQ_DEPTH * 3 / 4)}),
    .low_mark({8'(RQ_DEPTH / 4), 8'(TQ_DEPTH / 4)}),
    .err_in(lost || mrp_drop || auto_lost), .err_clear,
    .choke, .error);
endmodule
