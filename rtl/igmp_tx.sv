// igmp_tx: joins the CREAM to the multicast group on which the PC farm sends
// its Multi-Request Packets.
//
// On a 'join' pulse it sends one IGMP version 2 membership report for group
// cfg_group as a byte stream with valid/ready handshake: Ethernet header to
// the group's multicast MAC address (01:00:5e followed by the low 23 bits of
// the group address), IPv4 header (time-to-live 1, protocol 2, checksum
// computed, no router-alert option) and the 8-byte IGMP message (type 0x16,
// checksum computed). The frame is 42 bytes; the MAC pads it to the Ethernet
// minimum. Joining a multicast group with an IGMP packet follows the
// description; the IGMP version and header details are this design's
// choice.
module igmp_tx
  import cream_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       join_req,
  input  mac_addr_t  cfg_my_mac,
  input  ip_addr_t   cfg_my_ip,
  input  ip_addr_t   cfg_group,
  output logic [7:0] tx_data,
  output logic       tx_valid,
  output logic       tx_last,
  input  logic       tx_ready,
  output logic       sent
);
  localparam int NB = 42;
  logic [NB-1:0][7:0] fb;
  logic [5:0]         idx;
  logic               busy;

  function automatic logic [NB-1:0][7:0] build(mac_addr_t smac, ip_addr_t sip, ip_addr_t grp);
    logic [NB-1:0][7:0] f;
    logic [47:0] dmac;
    logic [15:0] ics;
    logic [19:0] a;
    logic [19:0] ip_s;
    dmac = {24'h01005e, 1'b0, grp[22:0]};
    // IPv4 header checksum: total length 28, TTL 1, protocol 2
    ip_s = 20'h04500 + 20'd28 + 20'h00000 + 20'h00000 + 20'h00102
           + 20'(sip[31:16]) + 20'(sip[15:0]) + 20'(grp[31:16]) + 20'(grp[15:0]);
    ip_s = {4'd0, ip_s[15:0]} + {16'd0, ip_s[19:16]};
    ip_s = {4'd0, ip_s[15:0]} + {16'd0, ip_s[19:16]};
    // IGMP checksum over type/max-resp and group
    a = 20'h01600 + 20'(grp[31:16]) + 20'(grp[15:0]);
    a = {4'd0, a[15:0]} + {16'd0, a[19:16]};
    a = {4'd0, a[15:0]} + {16'd0, a[19:16]};
    ics = ~a[15:0];
    for (int i = 0; i < 6; i++) begin
      f[i]   = dmac[47-8*i -: 8];
      f[6+i] = smac[47-8*i -: 8];
    end
    f[12] = 8'h08; f[13] = 8'h00;
    f[14] = 8'h45; f[15] = 8'h00; f[16] = 8'h00; f[17] = 8'd28;
    f[18] = 8'h00; f[19] = 8'h00; f[20] = 8'h00; f[21] = 8'h00;
    f[22] = 8'd1;  f[23] = 8'd2;
    f[24] = ~ip_s[15:8]; f[25] = ~ip_s[7:0];
    for (int i = 0; i < 4; i++) begin
      f[26+i] = sip[31-8*i -: 8];
      f[30+i] = grp[31-8*i -: 8];
      f[38+i] = grp[31-8*i -: 8];
    end
    f[34] = 8'h16; f[35] = 8'h00; f[36] = ics[15:8]; f[37] = ics[7:0];
    return f;
  endfunction

  assign tx_valid = busy;
  assign tx_data  = fb[idx];
  assign tx_last  = busy && (idx == 6'(NB-1));

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      idx  <= '0;
      sent <= 1'b0;
      fb   <= '0;
    end else begin
      sent <= 1'b0;
      if (!busy) begin
        if (join_req) begin
          fb   <= build(cfg_my_mac, cfg_my_ip, cfg_group);
          idx  <= '0;
          busy <= 1'b1;
        end
      end else if (tx_ready) begin
        if (idx == 6'(NB-1)) begin
          busy <= 1'b0;
          sent <= 1'b1;
        end
        idx <= idx + 1'b1;
      end
    end
  end
endmodule
