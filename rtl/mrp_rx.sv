// mrp_rx: receive side of the CREAM Data Link for L1 requests.
//
// The PC farm sends its L1 decisions as Multi-Request Packets (MRPs): UDP
// datagrams addressed either to the board's own IP address or to the
// multicast group the board has joined. This block parses received Ethernet
// frames byte by byte (destination MAC first; preamble and frame check
// sequence already removed by the MAC), keeps frames that are IPv4 without
// options, UDP, for cfg_mrp_port and for cfg_my_ip or cfg_mcast_ip, and
// takes the sender's IP and MAC addresses from the headers. The MRP payload
// is read as a 16-bit request count followed by one 32-bit event number per
// request (big-endian, low 24 bits used); at most 100 requests per packet
// are taken. Each request leaves as soon as its last byte arrives, tagged
// with the sender's addresses so that the answer goes back to the
// requesting PC. A request that finds the request queue full is dropped and
// flagged on 'drop'. The 100-request limit, multicast delivery and use of
// the sender's address follow the description; the payload layout is this
// design's own.
module mrp_rx
  import cream_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  rx_data,
  input  logic        rx_valid,
  input  logic        rx_last,
  input  ip_addr_t    cfg_my_ip,
  input  ip_addr_t    cfg_mcast_ip,
  input  logic [15:0] cfg_mrp_port,
  output logic        req_valid,
  input  logic        req_ready,
  output l1_req_t     req,
  output logic        drop,
  output logic        mrp_seen       // pulses at the end of each accepted MRP
);
  logic [15:0] pos;          // byte index in the frame
  logic        ok;           // frame still matches
  mac_addr_t   smac;
  ip_addr_t    sip, dip;
  logic [15:0] dport, nreq;
  logic [31:0] evsh;
  logic [15:0] reqi;         // requests parsed
  logic [1:0]  bi;           // byte within a request

  always_ff @(posedge clk) begin
    if (rst) begin
      pos <= '0;
      ok <= 1'b1;
      req_valid <= 1'b0;
      drop <= 1'b0;
      mrp_seen <= 1'b0;
      reqi <= '0;
      bi <= '0;
      nreq <= '0;
      smac <= '0; sip <= '0; dip <= '0; dport <= '0; evsh <= '0;
      req <= '0;
    end else begin
      drop <= 1'b0;
      mrp_seen <= 1'b0;
      if (req_valid && req_ready) req_valid <= 1'b0;
      if (rx_valid) begin
        pos <= rx_last ? '0 : pos + 1'b1;
        case (pos)
          16'd6, 16'd7, 16'd8, 16'd9, 16'd10, 16'd11: smac <= {smac[39:0], rx_data};
          16'd12: if (rx_data != 8'h08) ok <= 1'b0;
          16'd13: if (rx_data != 8'h00) ok <= 1'b0;
          16'd14: if (rx_data != 8'h45) ok <= 1'b0;
          16'd23: if (rx_data != 8'd17) ok <= 1'b0;
          16'd26, 16'd27, 16'd28, 16'd29: sip <= {sip[23:0], rx_data};
          16'd30, 16'd31, 16'd32, 16'd33: dip <= {dip[23:0], rx_data};
          16'd36: dport[15:8] <= rx_data;
          16'd37: dport[7:0]  <= rx_data;
          16'd38: if ((dip != cfg_my_ip && dip != cfg_mcast_ip) || dport != cfg_mrp_port) ok <= 1'b0;
          16'd42: nreq[15:8] <= rx_data;
          16'd43: nreq[7:0]  <= rx_data;
          default: ;
        endcase
        if (pos >= 16'd44 && ok && reqi < nreq && reqi < 16'(MAX_L1_REQ)) begin
          evsh <= {evsh[23:0], rx_data};
          bi   <= bi + 1'b1;
          if (bi == 2'd3) begin
            reqi <= reqi + 1'b1;
            if (req_valid && !req_ready) begin
              drop <= 1'b1;
            end else begin
              req_valid <= 1'b1;
              req <= '{evt: EVT_W'({evsh[23:0], rx_data}), ip: sip, mac: smac};
            end
          end
        end
        if (rx_last) begin
          mrp_seen <= ok && pos >= 16'd43;
          ok <= 1'b1;
          reqi <= '0;
          bi <= '0;
        end
      end
    end
  end
endmodule
