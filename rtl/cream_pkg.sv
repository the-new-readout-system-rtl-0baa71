// cream_pkg: types, sizes and helper functions shared by the CREAM readout
// firmware, the TTC-LKr crate controller and the TELDES trigger-sum receiver.
//
// The sizes that come from the readout system description are: 32 channels
// per board, 14-bit ADC samples, 6-bit trigger type, up to 256 samples per
// trigger, 65536 samples per channel in continuous mode, 16 crate slots and
// 16-bit trigger sums framed like a DS92LV16 serializer. Samples are stored
// as 16-bit words so that one time slice of all 32 channels is a 512-bit
// memory word; the widths of event number and timestamp, the configuration
// record and the packet layouts are this design's own choices.
package cream_pkg;

  localparam int NCH          = 32;          // channels per CREAM
  localparam int ADC_BITS     = 14;          // AD9257 resolution
  localparam int ADC_CH       = 8;           // channels per ADC chip
  localparam int NADC         = NCH / ADC_CH;
  localparam int SAMPLE_W     = 16;          // stored sample width
  localparam int WORD_W       = NCH * SAMPLE_W;  // one time slice of all channels
  localparam int TT_W         = 6;           // L0 trigger type
  localparam int EVT_W        = 24;          // event number
  localparam int TS_W         = 32;          // timestamp, 25 ns units
  localparam int MAX_SAMPLES  = 256;         // samples per trigger, maximum
  localparam int NSAMP_W      = 9;           // holds 1..256
  localparam int CONT_SAMPLES = 65536;       // continuous-mode samples per channel
  localparam int NSLOT        = 16;          // CREAM slots served by one TTC-LKr
  localparam int TILE_CH      = 16;          // channels per trigger sum
  localparam int TSL_W        = 16;          // transmitted trigger sum bits
  localparam int TSL_FRAME    = TSL_W + 2;   // start bit + data + stop bit
  localparam int MAX_L1_REQ   = 100;         // L1 requests per multi-request packet

  typedef logic [ADC_BITS-1:0] adc_sample_t;
  typedef logic [EVT_W-1:0]    evt_num_t;
  typedef logic [TS_W-1:0]     tstamp_t;
  typedef logic [TT_W-1:0]     ttype_t;
  typedef logic [47:0]         mac_addr_t;
  typedef logic [31:0]         ip_addr_t;

  // A trigger waiting for its samples to be copied into the L0 buffer.
  typedef struct packed {
    evt_num_t evt;
    tstamp_t  ts;
    ttype_t   ttype;
    logic     cont;      // generated internally by continuous mode
  } trig_t;

  // Header of an event held in the L0 buffer.
  typedef struct packed {
    evt_num_t              evt;
    tstamp_t               ts;
    ttype_t                ttype;
    logic [NSAMP_W-1:0]    nsamp;   // 0 when the trigger type asks for no data
  } evt_hdr_t;

  // A read-out request: which event, and where to send it.
  typedef struct packed {
    evt_num_t  evt;
    ip_addr_t  ip;
    mac_addr_t mac;
  } l1_req_t;

  // Run configuration of one CREAM (written over VME in the real system).
  typedef struct packed {
    logic [NCH-1:0][ADC_BITS-1:0] ped;          // per-channel baseline
    logic [NCH-1:0][11:0]         gain;         // per-channel gain, 2048 = 1.0
    logic [18:0]                  latency;      // L0 latency in samples
    logic [NSAMP_W-1:0]           nsamp;        // samples per trigger, 1..256
    logic [63:0]                  tt_readout;   // per trigger type: extract samples
    logic                         l0_readout;   // send every event without L1 request
    logic                         zs_enable;    // zero suppression
    logic [ADC_BITS-1:0]          zs_threshold;
    mac_addr_t                    my_mac;
    ip_addr_t                     my_ip;
    ip_addr_t                     mcast_ip;     // multicast group of the MRPs
    logic [15:0]                  mrp_port;
    logic [15:0]                  sde_port;
    mac_addr_t                    dest_mac;     // destination without a request
    ip_addr_t                     dest_ip;
  } cream_cfg_t;

  // Ones'-complement checksum of a 20-byte IPv4 header without options.
  function automatic logic [15:0] ipv4_csum(logic [15:0] tot_len, logic [15:0] id,
                                            logic [7:0] ttl, logic [7:0] proto,
                                            ip_addr_t src, ip_addr_t dst);
    logic [19:0] s;
    s = 20'h04500 + 20'(tot_len) + 20'(id) + 20'h04000 + 20'({ttl, proto})
        + 20'(src[31:16]) + 20'(src[15:0]) + 20'(dst[31:16]) + 20'(dst[15:0]);
    s = {4'd0, s[15:0]} + {16'd0, s[19:16]};
    s = {4'd0, s[15:0]} + {16'd0, s[19:16]};
    return ~s[15:0];
  endfunction

  // Ethernet, IPv4 (no options) and UDP headers: 42 bytes, byte 0 first.
  function automatic logic [41:0][7:0] udp_headers(mac_addr_t dmac, mac_addr_t smac,
                                                   ip_addr_t sip, ip_addr_t dip,
                                                   logic [15:0] sport, logic [15:0] dport,
                                                   logic [15:0] udp_len, logic [15:0] id);
    logic [41:0][7:0] h;
    logic [15:0] tot, cs;
    tot = udp_len + 16'd20;
    cs  = ipv4_csum(tot, id, 8'd64, 8'd17, sip, dip);
    for (int i = 0; i < 6; i++) begin
      h[i]   = dmac[47-8*i -: 8];
      h[6+i] = smac[47-8*i -: 8];
    end
    h[12] = 8'h08; h[13] = 8'h00;
    h[14] = 8'h45; h[15] = 8'h00; h[16] = tot[15:8]; h[17] = tot[7:0];
    h[18] = id[15:8]; h[19] = id[7:0]; h[20] = 8'h40; h[21] = 8'h00;
    h[22] = 8'd64; h[23] = 8'd17; h[24] = cs[15:8]; h[25] = cs[7:0];
    for (int i = 0; i < 4; i++) begin
      h[26+i] = sip[31-8*i -: 8];
      h[30+i] = dip[31-8*i -: 8];
    end
    h[34] = sport[15:8]; h[35] = sport[7:0]; h[36] = dport[15:8]; h[37] = dport[7:0];
    h[38] = udp_len[15:8]; h[39] = udp_len[7:0]; h[40] = 8'h00; h[41] = 8'h00;
    return h;
  endfunction

  // Ethernet CRC-32 (reflected polynomial 0xEDB88320), one byte.
  function automatic logic [31:0] crc32_byte(logic [31:0] crc, logic [7:0] d);
    logic [31:0] c;
    c = crc;
    for (int i = 0; i < 8; i++)
      c = (c[0] ^ d[i]) ? ((c >> 1) ^ 32'hEDB88320) : (c >> 1);
    return c;
  endfunction

endpackage
