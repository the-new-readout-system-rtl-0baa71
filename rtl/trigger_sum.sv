// trigger_sum: one trigger tile sum of the CREAM, computed every 25 ns.
//
// For each of the 16 channels of a tile the sample has its baseline
// (pedestal) subtracted and is multiplied by a per-channel gain factor; the
// 16 corrected values are then added and the two least significant bits of
// the 18-bit sum are dropped, so that 16 bits go to the serializer. Baseline
// subtraction, gain correction, the sum and dropping two LSBs follow the
// readout description. This design's choices: the gain is unsigned with 11
// fractional bits (2048 = 1.0), negative corrected samples count as zero,
// and a sum above 18 bits saturates. Two pipeline stages: 'sum' is valid
// two cycles after 'in_valid'.
module trigger_sum
  import cream_pkg::*;
#(
  parameter int N = TILE_CH
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        in_valid,
  input  logic [N-1:0][ADC_BITS-1:0]  sample,
  input  logic [N-1:0][ADC_BITS-1:0]  ped,
  input  logic [N-1:0][11:0]          gain,
  output logic                        out_valid,
  output logic [TSL_W-1:0]            sum
);
  localparam int CW = ADC_BITS + 1;   // corrected sample, gain up to 2x
  logic [N-1:0][CW-1:0] corr;
  logic                 v1;

  // stage 1: per-channel correction
  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0;
      corr <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid)
        for (int c = 0; c < N; c++) begin
          logic [ADC_BITS-1:0] d;
          logic [ADC_BITS+11:0] p;
          d = (sample[c] > ped[c]) ? sample[c] - ped[c] : '0;
          p = d * gain[c];
          corr[c] <= CW'(p >> 11);
        end
    end
  end

  // stage 2: sum, saturate to 18 bits, drop two LSBs
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      sum <= '0;
    end else begin
      out_valid <= v1;
      if (v1) begin
        logic [CW+$clog2(N)-1:0] acc;
        acc = '0;
        for (int c = 0; c < N; c++) acc += (CW+$clog2(N))'(corr[c]);
        if (acc > (CW+$clog2(N))'(18'h3FFFF)) sum <= '1;
        else sum <= acc[17:2];
      end
    end
  end
endmodule
