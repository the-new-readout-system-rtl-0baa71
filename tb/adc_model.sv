// adc_model: behavioural model of the serial outputs of the CREAM ADCs for
// the testbenches. Every FRAME clocks it takes the samples on 'smp' (one
// per channel; 'take' pulses in that cycle) and sends them MSB first, one
// bit per clock over the first 14 clocks of the frame, with the frame line
// high during the MSB and bit_en high during the 14 data clocks.
module adc_model #(
  parameter int CH    = 32,
  parameter int NFCO  = 4,
  parameter int FRAME = 18
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [CH-1:0][13:0]  smp,
  output logic                 take,
  output logic                 bit_en,
  output logic [NFCO-1:0]      fco,
  output logic [CH-1:0]        din
);
  int unsigned k;
  logic [CH-1:0][13:0] cur;
  assign take = !rst && (k == 0);
  always_ff @(posedge clk) begin
    if (rst) begin
      k <= 0;
      cur <= '0;
    end else begin
      k <= (k == FRAME-1) ? 0 : k + 1;
      if (k == 0) cur <= smp;
    end
  end
  // outputs lag the frame counter by one clock: bit i of the frame is
  // on the lines while k == i + 1 (mod FRAME)
  always_comb begin
    int unsigned b;
    b = (k == 0) ? FRAME - 1 : k - 1;
    bit_en = !rst && (b < 14) && !(k == 0 && b == FRAME-1 && FRAME <= 14);
    fco    = (!rst && b == 0) ? '1 : '0;
    for (int c = 0; c < CH; c++) din[c] = (b < 14) ? cur[c][13-b] : 1'b0;
  end
endmodule
