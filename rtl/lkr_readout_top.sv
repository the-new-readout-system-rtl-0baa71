// lkr_readout_top: one slice of the liquid-krypton calorimeter readout: the
// TTC-LKr crate controller, one CREAM board in crate slot 0, and the two
// TELDES deserializer channels that receive that board's trigger sums.
//
// The TTC-LKr turns the TTC signal (or its front-panel, VME or internal
// source) into L0 strobes, trigger types and resets on the backplane; the
// CREAM digitises, buffers and extracts events, answers L1 requests arriving
// on its Data Link with SDE packets, and sends two tile sums every 25 ns on
// the Trigger Sum Link, which the TELDES channels deserialize for the LKr L0
// trigger processor. That processor (lkr_l0tp) sees the whole calorimeter
// as a map of tile sums: the two received here are placed at row TILE_ROW,
// columns TILE_COL and TILE_COL+1, and the rest of the map, from the other
// CREAMs, comes in on l0tp_tiles. It is updated whenever the TELDES
// channels deliver a sum, time-stamped with the CREAM's timestamp, and its
// results (peaks, their number and energy, total and quadrant energies)
// are outputs; its copy of the examined map is not brought out. The CHOKE and ERROR lines of slots 1 to 15, whose
// boards are not part of this slice, are inputs; the ORed CHOKE and ERROR
// go to the central L0 trigger processor. Same single clock and 25 ns
// strobes as in 'cream': ttc_strobe is the TTC bunch clock enable, and the
// ADC frames define the CREAM's sampling tick. The parameters are those of
// the CREAM memories and queues, and the size of the L0 trigger processor's
// tile map with the place of this CREAM's tiles in it. Placing one CREAM,
// not a crate of them, in the slice is this design's choice.
module lkr_readout_top
  import cream_pkg::*;
#(
  parameter int          CB_AW    = 19,
  parameter int unsigned L0_DEPTH = 2**25 - 1,
  parameter int          DIR_AW   = 24,
  parameter int          TQ_DEPTH = 16,
  parameter int          RQ_DEPTH = 128,
  parameter int          L0TP_ROWS = 32,                // L0 trigger processor tile map
  parameter int          L0TP_COLS = 32,
  parameter int          TILE_ROW  = 0,                 // where this CREAM's two tiles sit
  parameter int          TILE_COL  = 0
) (
  input  logic              clk,
  input  logic              rst,
  // TTC-LKr inputs
  input  logic              ttc_strobe,
  input  logic              ttc_a,
  input  logic              ttc_b,
  input  logic [1:0]        ttc_cfg_src,
  input  logic              fp_l0,
  input  ttype_t            fp_ttype,
  input  logic              vme_l0,
  input  ttype_t            vme_ttype,
  input  logic [15:0]       gen_period,
  input  ttype_t            gen_ttype,
  input  logic [NSLOT-1:1]  other_choke,
  input  logic [NSLOT-1:1]  other_error,
  input  logic [NSLOT-1:0]  slot_mask,
  output logic              l0tp_choke,
  output logic              l0tp_error,
  output logic              ttc_ham_err,
  // CREAM
  input  logic              adc_bit_en,
  input  logic [NADC-1:0]   adc_fco,
  input  logic [NCH-1:0]    adc_din,
  input  cream_cfg_t        cfg,
  input  logic              cont_start,
  input  logic              igmp_join,
  input  logic              err_clear,
  input  logic              tsl_sync,
  input  logic [7:0]        rx_data,
  input  logic              rx_valid,
  input  logic              rx_last,
  input  logic              phy_byte_en,
  output logic [7:0]        txd,
  output logic              tx_en,
  output logic              cream_choke,
  output logic              cream_error,
  output tstamp_t           timestamp,
  output logic              cont_active,
  output logic              sde_sent,
  output logic              evt_stored,
  // TELDES outputs towards the LKr L0 trigger processor
  output logic [1:0]        tile_valid,
  output logic [1:0][TSL_W-1:0] tile_sum,
  output logic [1:0]        tile_locked,
  output logic [1:0]        tile_err,
  // LKr L0 trigger processor: tile sums of the other CREAMs, results
  input  logic [L0TP_ROWS-1:0][L0TP_COLS-1:0][TSL_W-1:0] l0tp_tiles,
  input  logic [TSL_W-1:0]  l0tp_threshold,
  output logic              l0tp_valid,
  output logic [L0TP_ROWS-1:0][L0TP_COLS-1:0] l0tp_peak,
  output logic [$clog2(L0TP_ROWS*L0TP_COLS):0] l0tp_npeaks,
  output logic [TSL_W+$clog2(L0TP_ROWS*L0TP_COLS)-1:0] l0tp_peak_energy,
  output logic [TSL_W+$clog2(L0TP_ROWS*L0TP_COLS)-1:0] l0tp_etot,
  output logic [3:0][TSL_W+$clog2(L0TP_ROWS*L0TP_COLS)-1:0] l0tp_equad,
  output tstamp_t           l0tp_peak_ts
);
  logic   bp_l0, bp_tt_valid, bp_ts_reset, bp_ec_reset;
  ttype_t bp_ttype;
  logic [1:0] tsl;

  ttc_lkr u_ttc (
    .clk, .rst, .strobe(ttc_strobe), .ttc_a, .ttc_b, .cfg_src(ttc_cfg_src),
    .fp_l0, .fp_ttype, .vme_l0, .vme_ttype,
    .cfg_gen_period(gen_period), .cfg_gen_ttype(gen_ttype),
    .slot_choke({other_choke, cream_choke}), .slot_error({other_error, cream_error}),
    .cfg_slot_mask(slot_mask),
    .bp_l0, .bp_tt_valid, .bp_ttype, .bp_ts_reset, .bp_ec_reset,
    .l0tp_choke, .l0tp_error, .ttc_ham_err);

  cream #(.CB_AW(CB_AW), .L0_DEPTH(L0_DEPTH), .DIR_AW(DIR_AW),
          .TQ_DEPTH(TQ_DEPTH), .RQ_DEPTH(RQ_DEPTH)) u_cream (
    .clk, .rst, .adc_bit_en, .adc_fco, .adc_din,
    .bp_l0, .bp_tt_valid, .bp_ttype, .bp_ts_reset, .bp_ec_reset,
    .choke(cream_choke), .error(cream_error),
    .cfg, .cont_start, .igmp_join, .err_clear, .tsl_sync,
    .rx_data, .rx_valid, .rx_last, .phy_byte_en, .txd, .tx_en,
    .tsl_out(tsl), .timestamp, .cont_active, .sde_sent, .evt_stored);

  for (genvar t = 0; t < 2; t++) begin : g_teldes
    teldes_deser u_des (
      .clk, .rst, .sin(tsl[t]), .locked(tile_locked[t]), .valid(tile_valid[t]),
      .data(tile_sum[t]), .frame_err(tile_err[t]));
  end

  // L0 trigger processor: this CREAM's two tiles placed in the map
  logic [L0TP_ROWS-1:0][L0TP_COLS-1:0][TSL_W-1:0] map, emap;
  always_comb begin
    map = l0tp_tiles;
    map[TILE_ROW][TILE_COL]     = tile_sum[0];
    map[TILE_ROW][TILE_COL + 1] = tile_sum[1];
  end
  lkr_l0tp #(.ROWS(L0TP_ROWS), .COLS(L0TP_COLS)) u_l0tp (
    .clk, .rst, .in_valid(tile_valid[0]), .tiles(map), .in_ts(timestamp),
    .cfg_threshold(l0tp_threshold), .out_valid(l0tp_valid), .peak(l0tp_peak),
    .npeaks(l0tp_npeaks), .peak_energy(l0tp_peak_energy), .etot(l0tp_etot),
    .equad(l0tp_equad), .emap, .peak_ts(l0tp_peak_ts));
endmodule
