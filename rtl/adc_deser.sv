// adc_deser: receiver for the serial outputs of one 8-channel, 14-bit ADC
// (AD9257 type) on the CREAM daughterboard.
//
// Each channel has its own serial data line. A frame line (fco) is high
// during the most significant bit of each sample and bit_en marks the clock
// cycles that carry a bit (the data clock of the ADC, here a clock enable of
// the core clock). Bits arrive MSB first; after the 14th bit the eight
// samples appear together on 'sample' with 'valid' high for one cycle, which
// is also the 25 ns sampling tick of the whole board. Serial transmission
// of the samples to the FPGA follows the readout description; the bit order,
// the frame marker and the one-bit-per-enable timing are this design's own.
module adc_deser
  import cream_pkg::*;
#(
  parameter int CH   = ADC_CH,
  parameter int BITS = ADC_BITS
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  bit_en,
  input  logic                  fco,
  input  logic [CH-1:0]         din,
  output logic [CH-1:0][BITS-1:0] sample,
  output logic                  valid
);
  logic [CH-1:0][BITS-1:0] sh;
  logic [$clog2(BITS)-1:0] cnt;
  logic                    locked;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt    <= '0;
      locked <= 1'b0;
      valid  <= 1'b0;
      sample <= '0;
    end else begin
      valid <= 1'b0;
      if (bit_en) begin
        for (int c = 0; c < CH; c++) sh[c] <= {sh[c][BITS-2:0], din[c]};
        if (fco) begin
          cnt    <= 1;
          locked <= 1'b1;
        end else if (locked) begin
          if (cnt == ($clog2(BITS))'(BITS-1)) begin
            cnt   <= '0;
            valid <= 1'b1;
            for (int c = 0; c < CH; c++) sample[c] <= {sh[c][BITS-2:0], din[c]};
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
      end
    end
  end
endmodule
