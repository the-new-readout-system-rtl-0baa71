// ttc_lkr: firmware of the TTC-LKr crate board, which feeds clock-synchronous
// L0 triggers, trigger types and resets to the 16 CREAMs of a VME crate over
// the custom backplane, and gathers their CHOKE and ERROR lines.
//
// Trigger source, chosen by cfg_src:
//   0  the TTC optical signal, decoded by ttc_decoder: a channel-A bit is an
//      L0, and a broadcast command on channel B either carries resets (bit 0
//      timestamp reset, bit 1 event-counter reset) or, when both are 0, the
//      6-bit trigger type (bits 7..2) of the oldest L0 not yet typed;
//   1  the front-panel input (fp_l0 sampled at each 25 ns strobe, type fp_ttype);
//   2  the VME bus (vme_l0 pulse with vme_ttype);
//   3  the internal generator: an L0 every cfg_gen_period strobes, type
//      cfg_gen_ttype.
// The backplane carries bp_l0 (one-cycle strobe) and, later, bp_tt_valid
// with bp_ttype; for sources 1 to 3 the type follows the L0 on the next
// cycle. CHOKE and ERROR of the slots enabled in cfg_slot_mask are ORed and
// sent to the L0 trigger processor. The sources, the separation of L0 and
// the other TTC information, and the CHOKE/ERROR gathering follow the
// description; signal timing and command encoding are this design's choices.
module ttc_lkr
  import cream_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              strobe,        // 25 ns bunch clock enable
  input  logic              ttc_a,
  input  logic              ttc_b,
  input  logic [1:0]        cfg_src,
  input  logic              fp_l0,
  input  ttype_t            fp_ttype,
  input  logic              vme_l0,
  input  ttype_t            vme_ttype,
  input  logic [15:0]       cfg_gen_period,
  input  ttype_t            cfg_gen_ttype,
  input  logic [NSLOT-1:0]  slot_choke,
  input  logic [NSLOT-1:0]  slot_error,
  input  logic [NSLOT-1:0]  cfg_slot_mask,
  output logic              bp_l0,
  output logic              bp_tt_valid,
  output ttype_t            bp_ttype,
  output logic              bp_ts_reset,
  output logic              bp_ec_reset,
  output logic              l0tp_choke,
  output logic              l0tp_error,
  output logic              ttc_ham_err
);
  logic       dec_l0, bc_valid;
  logic [7:0] bc_data;
  logic       loc_l0, loc_l0_d;
  ttype_t     loc_tt, loc_tt_d;
  logic [15:0] gen_cnt;

  ttc_decoder u_dec (
    .clk, .rst, .strobe, .a_bit(ttc_a), .b_bit(ttc_b),
    .l0(dec_l0), .bc_valid, .bc_data, .ham_err(ttc_ham_err));

  // local sources
  always_comb begin
    loc_l0 = 1'b0;
    loc_tt = '0;
    case (cfg_src)
      2'd1: begin loc_l0 = strobe && fp_l0; loc_tt = fp_ttype; end
      2'd2: begin loc_l0 = vme_l0;          loc_tt = vme_ttype; end
      2'd3: begin loc_l0 = strobe && gen_cnt == '0; loc_tt = cfg_gen_ttype; end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      gen_cnt <= '0;
      loc_l0_d <= 1'b0;
      loc_tt_d <= '0;
      bp_l0 <= 1'b0;
      bp_tt_valid <= 1'b0;
      bp_ttype <= '0;
      bp_ts_reset <= 1'b0;
      bp_ec_reset <= 1'b0;
      l0tp_choke <= 1'b0;
      l0tp_error <= 1'b0;
    end else begin
      if (strobe) gen_cnt <= (gen_cnt >= cfg_gen_period - 1'b1) ? '0 : gen_cnt + 1'b1;
      loc_l0_d <= loc_l0;
      loc_tt_d <= loc_tt;
      bp_l0       <= 1'b0;
      bp_tt_valid <= 1'b0;
      bp_ts_reset <= 1'b0;
      bp_ec_reset <= 1'b0;
      if (cfg_src == 2'd0) begin
        bp_l0 <= dec_l0;
        if (bc_valid) begin
          if (bc_data[1:0] == 2'b00) begin
            bp_tt_valid <= 1'b1;
            bp_ttype    <= bc_data[7:2];
          end
          bp_ts_reset <= bc_data[0];
          bp_ec_reset <= bc_data[1];
        end
      end else begin
        bp_l0 <= loc_l0;
        if (loc_l0_d) begin
          bp_tt_valid <= 1'b1;
          bp_ttype    <= loc_tt_d;
        end
      end
      l0tp_choke <= |(slot_choke & cfg_slot_mask);
      l0tp_error <= |(slot_error & cfg_slot_mask);
    end
  end
endmodule
