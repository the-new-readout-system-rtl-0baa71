// eth_mac_tx: transmit side of the CREAM Data Link, a 1 Gbit/s Ethernet port.
//
// Two frame sources share the link: port 0 (IGMP reports, served first) and
// port 1 (SDE packets). Each source offers a whole frame from its
// destination MAC address on, as a byte stream with valid/ready handshake.
// The block picks a source between frames, sends the 7-byte preamble and
// the start-of-frame byte, passes the frame through while computing the
// CRC-32 frame check sequence, pads frames shorter than 60 bytes with
// zeros, appends the FCS (least significant byte first) and keeps the line
// idle for the 12-byte inter-frame gap. The PHY side is a GMII-like byte
// interface: one byte (txd, tx_en) per cycle in which byte_en is high,
// which sets the 1 Gbit/s byte rate. A source must have its next byte
// ready at each byte_en inside a frame; the SDE and IGMP builders do when
// byte_en comes at most every third clock. Only the existence of the 1 Gbit/s
// Ethernet link comes from the description; the MAC itself is the usual
// IEEE 802.3 framing.
module eth_mac_tx
  import cream_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       byte_en,
  input  logic [7:0] s0_data,
  input  logic       s0_valid,
  input  logic       s0_last,
  output logic       s0_ready,
  input  logic [7:0] s1_data,
  input  logic       s1_valid,
  input  logic       s1_last,
  output logic       s1_ready,
  output logic [7:0] txd,
  output logic       tx_en,
  output logic       frame_done
);
  typedef enum logic [2:0] {S_IDLE, S_PRE, S_DATA, S_PAD, S_FCS, S_IFG} state_t;
  state_t      state;
  logic        sel;
  logic [3:0]  cnt;
  logic [15:0] len;
  logic [31:0] crc;
  logic [7:0]  in_data;
  logic        in_valid, in_last;

  assign in_data  = sel ? s1_data  : s0_data;
  assign in_valid = sel ? s1_valid : s0_valid;
  assign in_last  = sel ? s1_last  : s0_last;
  assign s0_ready = byte_en && state == S_DATA && !sel;
  assign s1_ready = byte_en && state == S_DATA &&  sel;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      sel <= 1'b0;
      cnt <= '0;
      len <= '0;
      crc <= '1;
      txd <= '0;
      tx_en <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (byte_en) begin
        tx_en <= 1'b0;
        txd   <= 8'h00;
        case (state)
          S_IDLE: if (s0_valid || s1_valid) begin
            sel   <= !s0_valid;
            state <= S_PRE;
            cnt   <= '0;
          end
          S_PRE: begin
            tx_en <= 1'b1;
            txd   <= (cnt == 4'd7) ? 8'hD5 : 8'h55;
            cnt   <= cnt + 1'b1;
            if (cnt == 4'd7) begin
              state <= S_DATA;
              len <= '0;
              crc <= '1;
            end
          end
          S_DATA: if (in_valid) begin
            tx_en <= 1'b1;
            txd   <= in_data;
            crc   <= crc32_byte(crc, in_data);
            len   <= len + 1'b1;
            if (in_last) begin
              state <= (len < 16'd59) ? S_PAD : S_FCS;
              cnt   <= '0;
            end
          end
          S_PAD: begin
            tx_en <= 1'b1;
            txd   <= 8'h00;
            crc   <= crc32_byte(crc, 8'h00);
            len   <= len + 1'b1;
            if (len == 16'd59) begin
              state <= S_FCS;
              cnt   <= '0;
            end
          end
          S_FCS: begin
            tx_en <= 1'b1;
            txd   <= ~crc[8*cnt[1:0] +: 8];
            cnt   <= cnt + 1'b1;
            if (cnt == 4'd3) begin
              state <= S_IFG;
              cnt   <= '0;
              frame_done <= 1'b1;
            end
          end
          S_IFG: begin
            cnt <= cnt + 1'b1;
            if (cnt == 4'd11) state <= S_IDLE;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule
