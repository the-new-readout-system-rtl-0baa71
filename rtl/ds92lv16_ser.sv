// ds92lv16_ser: FPGA serializer of the Trigger Sum Link.
//
// Sends one 16-bit tile sum per frame in the format of a DS92LV16
// serializer: a start bit (1), the 16 data bits LSB first, and a stop bit
// (0), 18 bits in all, one bit per clock. Frames follow each other without
// gaps; the word sent is the last one loaded before the frame starts, so a
// core clock of 18 bits per 25 ns sample carries one sum per sample. While
// 'sync' is high the line carries the lock pattern instead (nine ones then
// nine zeros) so that the receiver can find the frame boundary. Using the
// DS92LV16 format follows the readout description; its bit-level details
// are taken from the serializer's usual format and are this design's choice.
module ds92lv16_ser
  import cream_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [TSL_W-1:0] data,
  input  logic             sync,
  output logic             sout,
  output logic             frame_start   // high while the start bit is sent
);
  logic [TSL_W-1:0]     hold;
  logic [TSL_FRAME-1:0] sh;      // bit 0 goes out first
  logic [4:0]           bitn;

  always_ff @(posedge clk) begin
    if (rst) begin
      hold <= '0;
      sh   <= '0;
      bitn <= '0;
      frame_start <= 1'b0;
    end else begin
      if (load) hold <= data;
      frame_start <= (bitn == 5'd0);
      if (bitn == 5'd0) begin
        if (sync) sh <= {{9{1'b0}}, {9{1'b1}}};
        else      sh <= {1'b0, (load ? data : hold), 1'b1};
      end else begin
        sh <= sh >> 1;
      end
      bitn <= (bitn == 5'(TSL_FRAME-1)) ? 5'd0 : bitn + 5'd1;
    end
  end
  assign sout = sh[0];
endmodule
