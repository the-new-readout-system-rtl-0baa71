// sde_tx: builds the Sub-Detector Event (SDE) packet that answers one
// read-out request.
//
// For a request {event number, destination IP and MAC} it reads the event's
// directory entry from the L0 buffer. With zero suppression enabled it first
// scans the event's samples and keeps only the channels that have at least
// one sample above cfg_zs_threshold; otherwise all 32 channels are kept.
// It then sends, as a byte stream with valid/ready handshake: Ethernet,
// IPv4 and UDP headers (42 bytes, IPv4 header checksum computed, UDP
// checksum 0), a 16-byte event header, and the samples, time slice after
// time slice, two bytes (big-endian) per kept channel. Inside a packet a
// byte is ready every cycle except for two cycles per time slice. Event header layout:
//   byte 0     flags: bit 0 event found, bit 1 zero suppression applied
//   bytes 1-3  event number        bytes 4-7   timestamp (25 ns units)
//   byte 8     trigger type        byte 9      0
//   bytes 10-11 samples per channel bytes 12-15 kept-channel mask
// An event not (or no longer) in the buffer is answered with a header only.
// One SDE per requested event, the UDP transport, zero suppression by a
// configurable threshold and answering the requesting PC follow the
// description; the byte layout and the one-packet-per-event framing (up to
// 16 kB for 256 samples, a jumbo frame) are this design's choices.
module sde_tx
  import cream_pkg::*;
#(
  parameter int unsigned L0_DEPTH = 2**25 - 1,
  parameter int L0_AW  = $clog2(L0_DEPTH),
  parameter int DIR_AW = 24
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              req_valid,
  output logic              req_ready,
  input  l1_req_t           req,
  input  logic              cfg_zs_enable,
  input  logic [ADC_BITS-1:0] cfg_zs_threshold,
  input  mac_addr_t         cfg_my_mac,
  input  ip_addr_t          cfg_my_ip,
  input  logic [15:0]       cfg_src_port,
  input  logic [15:0]       cfg_dst_port,
  // L0 buffer read ports
  output logic              dir_re,
  output logic [DIR_AW-1:0] dir_raddr,
  input  evt_hdr_t          dir_rhdr,
  input  logic [L0_AW-1:0]  dir_rbase,
  output logic              l0_re,
  output logic [L0_AW-1:0]  l0_raddr,
  input  logic [WORD_W-1:0] l0_rdata,
  // packet byte stream
  output logic [7:0]        tx_data,
  output logic              tx_valid,
  output logic              tx_last,
  input  logic              tx_ready,
  output logic              sent            // pulses when a packet is complete
);
  localparam int HDR_BYTES = 42 + 16;
  typedef enum logic [2:0] {S_IDLE, S_DIR, S_LAT, S_ZS, S_LEN, S_HDR, S_RD, S_CH} state_t;
  state_t state;

  l1_req_t              cur;
  evt_hdr_t             hdr;
  logic                 found;
  logic [L0_AW-1:0]     base;
  logic [NSAMP_W-1:0]   n, s;
  logic [NCH-1:0]       mask;
  logic [HDR_BYTES-1:0][7:0] hb;
  logic [6:0]           hi;        // header byte index
  logic [4:0]           c;         // channel index
  logic                 lo;        // second byte of a sample
  logic                 rdw;       // read data pending
  logic                 zs_pend;
  logic [WORD_W-1:0]    word;
  logic [NSAMP_W-1:0]   zs_s;
  logic                 zs_done;

  function automatic logic [L0_AW-1:0] wrap(logic [L0_AW-1:0] b, logic [NSAMP_W-1:0] off);
    logic [L0_AW:0] a;
    a = {1'b0, b} + (L0_AW+1)'(off);
    if (a >= (L0_AW+1)'(L0_DEPTH)) a = a - (L0_AW+1)'(L0_DEPTH);
    return a[L0_AW-1:0];
  endfunction

  function automatic logic [5:0] popcnt(logic [NCH-1:0] m);
    logic [5:0] k;
    k = '0;
    for (int i = 0; i < NCH; i++) k += 6'(m[i]);
    return k;
  endfunction

  assign req_ready = (state == S_IDLE);
  assign dir_re    = (state == S_IDLE) && req_valid;
  assign dir_raddr = DIR_AW'(req.evt);

  // read port: zero-suppression scan or data slice
  always_comb begin
    l0_re    = 1'b0;
    l0_raddr = wrap(base, (state == S_ZS) ? zs_s : s);
    if (state == S_ZS && !zs_done) l0_re = 1'b1;
    if (state == S_RD && !rdw)     l0_re = 1'b1;
  end

  // output byte
  logic [15:0] smp;
  assign smp = word[16*c +: 16];

  // next kept channel at or above 'from'; bit 5 set when there is none
  function automatic logic [5:0] next_ch(logic [NCH-1:0] m, logic [5:0] from);
    logic [5:0] r;
    r = 6'd32;
    for (int i = NCH-1; i >= 0; i--)
      if (m[i] && 6'(i) >= from) r = 6'(i);
    return r;
  endfunction
  logic [5:0] nxt;
  assign nxt = next_ch(mask, {1'b0, c} + 6'd1);

  always_comb begin
    tx_data  = 8'h00;
    tx_valid = 1'b0;
    tx_last  = 1'b0;
    if (state == S_HDR) begin
      tx_data  = hb[hi];
      tx_valid = 1'b1;
      tx_last  = (hi == 7'(HDR_BYTES-1)) && (n == '0 || mask == '0);
    end else if (state == S_CH) begin
      tx_data  = lo ? smp[7:0] : smp[15:8];
      tx_valid = 1'b1;
      tx_last  = lo && (s == n - 1'b1) && nxt[5];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      sent <= 1'b0;
      cur <= '0; hdr <= '0; found <= 1'b0; base <= '0; n <= '0; s <= '0;
      mask <= '0; hb <= '0; hi <= '0; c <= '0; lo <= 1'b0; rdw <= 1'b0;
      zs_pend <= 1'b0; word <= '0; zs_s <= '0; zs_done <= 1'b0;
    end else begin
      sent <= 1'b0;
      case (state)
        S_IDLE: if (req_valid) begin
          cur   <= req;
          state <= S_DIR;
        end
        S_DIR: state <= S_LAT;      // directory read data arrives
        S_LAT: begin
          hdr   <= dir_rhdr;
          base  <= dir_rbase;
          found <= (dir_rhdr.evt == cur.evt);
          n     <= (dir_rhdr.evt == cur.evt) ? dir_rhdr.nsamp : '0;
          mask  <= cfg_zs_enable ? '0 : '1;
          zs_s  <= '0;
          zs_done <= 1'b0;
          zs_pend <= 1'b0;
          if (cfg_zs_enable && dir_rhdr.evt == cur.evt && dir_rhdr.nsamp != '0)
            state <= S_ZS;
          else
            state <= S_LEN;
        end
        S_ZS: begin
          zs_pend <= !zs_done;
          if (!zs_done) begin
            zs_s <= zs_s + 1'b1;
            if (zs_s == n - 1'b1) zs_done <= 1'b1;
          end
          if (zs_pend)
            for (int k = 0; k < NCH; k++)
              if (l0_rdata[16*k +: 16] > {2'b00, cfg_zs_threshold}) mask[k] <= 1'b1;
          if (zs_done && !zs_pend) state <= S_LEN;
        end
        S_LEN: begin
          logic [15:0] udp_len;
          udp_len = 16'd8 + 16'd16 + 16'(popcnt(mask)) * 16'(n) * 16'd2;
          hb[41:0] <= udp_headers(cur.mac, cfg_my_mac, cfg_my_ip, cur.ip,
                                  cfg_src_port, cfg_dst_port, udp_len, cur.evt[15:0]);
          hb[42] <= {6'd0, cfg_zs_enable && found, found};
          hb[43] <= cur.evt[23:16]; hb[44] <= cur.evt[15:8]; hb[45] <= cur.evt[7:0];
          hb[46] <= hdr.ts[31:24];  hb[47] <= hdr.ts[23:16]; hb[48] <= hdr.ts[15:8];
          hb[49] <= hdr.ts[7:0];
          hb[50] <= {2'b00, found ? hdr.ttype : 6'd0};
          hb[51] <= 8'h00;
          hb[52] <= 8'(16'(n) >> 8); hb[53] <= 8'(n);
          hb[54] <= mask[31:24]; hb[55] <= mask[23:16]; hb[56] <= mask[15:8]; hb[57] <= mask[7:0];
          hi    <= '0;
          s     <= '0;
          state <= S_HDR;
        end
        S_HDR: if (tx_ready) begin
          if (hi == 7'(HDR_BYTES-1)) begin
            if (n == '0 || mask == '0) begin
              sent  <= 1'b1;
              state <= S_IDLE;
            end else begin
              rdw   <= 1'b0;
              state <= S_RD;
            end
          end
          hi <= hi + 1'b1;
        end
        S_RD: begin
          rdw <= 1'b1;
          if (rdw) begin
            word  <= l0_rdata;
            c     <= next_ch(mask, 6'd0) == 6'd32 ? 5'd0 : 5'(next_ch(mask, 6'd0));
            lo    <= 1'b0;
            state <= S_CH;
          end
        end
        S_CH: begin
          if (tx_ready && !lo) begin
            lo <= 1'b1;
          end else if (tx_ready && lo) begin
            lo <= 1'b0;
            if (nxt[5]) begin
              if (s == n - 1'b1) begin
                sent  <= 1'b1;
                state <= S_IDLE;
              end else begin
                s     <= s + 1'b1;
                rdw   <= 1'b0;
                state <= S_RD;
              end
            end else begin
              c <= nxt[4:0];
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
