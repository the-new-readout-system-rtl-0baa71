// ttc_decoder: decodes the two time-multiplexed channels of the TTC optical
// signal after clock and data recovery.
//
// Once per 25 ns (strobe) the recovered stream gives one bit of channel A
// and one of channel B. Channel A carries only the L0 trigger: a 1 is an L0
// accept. Channel B is idle at 1 and carries broadcast commands: a 0 start
// bit, a 0 format bit, 8 data bits (MSB first), 5 Hamming check bits and a
// 1 stop bit. A command that passes the check is delivered on bc_valid and
// bc_data; one that fails pulses ham_err. Frames with format bit 1 (the
// individually addressed format) are skipped, 40 bits. The split into an
// L0-only channel and a channel for resets, trigger type and other
// information follows the description; the frame layout and the check-bit
// equations below are this design's choices:
//   h0 = d0^d1^d2^d3     h1 = d0^d4^d5^d6     h2 = d1^d2^d4^d5^d7
//   h3 = d1^d3^d4^d6^d7  h4 = parity of d7..d0 and h3..h0
module ttc_decoder (
  input  logic       clk,
  input  logic       rst,
  input  logic       strobe,
  input  logic       a_bit,
  input  logic       b_bit,
  output logic       l0,
  output logic       bc_valid,
  output logic [7:0] bc_data,
  output logic       ham_err
);
  typedef enum logic [1:0] {S_IDLE, S_FMT, S_SHORT, S_LONG} state_t;
  state_t      state;
  logic [5:0]  cnt;
  logic [13:0] sh;   // 8 data + 5 check + stop

  function automatic logic [4:0] ham(logic [7:0] d);
    logic [4:0] h;
    h[0] = d[0]^d[1]^d[2]^d[3];
    h[1] = d[0]^d[4]^d[5]^d[6];
    h[2] = d[1]^d[2]^d[4]^d[5]^d[7];
    h[3] = d[1]^d[3]^d[4]^d[6]^d[7];
    h[4] = (^d) ^ (^h[3:0]);
    return h;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      cnt <= '0;
      sh <= '0;
      l0 <= 1'b0;
      bc_valid <= 1'b0;
      bc_data <= '0;
      ham_err <= 1'b0;
    end else begin
      l0 <= 1'b0;
      bc_valid <= 1'b0;
      ham_err <= 1'b0;
      if (strobe) begin
        l0 <= a_bit;
        case (state)
          S_IDLE: if (!b_bit) state <= S_FMT;
          S_FMT: begin
            cnt   <= '0;
            state <= b_bit ? S_LONG : S_SHORT;
          end
          S_SHORT: begin
            sh  <= {sh[12:0], b_bit};
            cnt <= cnt + 1'b1;
            if (cnt == 6'd13) begin
              state <= S_IDLE;
              if (b_bit && ham(sh[12:5]) == sh[4:0]) begin
                bc_valid <= 1'b1;
                bc_data  <= sh[12:5];
              end else begin
                ham_err <= 1'b1;
              end
            end
          end
          S_LONG: begin
            cnt <= cnt + 1'b1;
            if (cnt == 6'd39) state <= S_IDLE;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule
