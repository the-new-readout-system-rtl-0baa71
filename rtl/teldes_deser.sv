// teldes_deser: one DS92LV16-style deserializer channel of the TELDES board,
// which receives a CREAM tile sum every 25 ns.
//
// The receiver first hunts for the lock pattern (nine ones followed by nine
// zeros) in the last 18 bits received; the bit after it starts a frame.
// Once locked it checks the start (1) and stop (0) bits of every 18-bit
// frame and delivers the 16 data bits (sent LSB first) with 'valid' high for
// one cycle. A frame with a wrong start or stop bit drops the lock and
// raises 'frame_err' for one cycle; lock patterns received while locked are
// not delivered as data. Deserializing one tile sum per 25 ns follows the
// readout description; the lock procedure is this design's choice.
module teldes_deser
  import cream_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             sin,
  output logic             locked,
  output logic             valid,
  output logic [TSL_W-1:0] data,
  output logic             frame_err
);
  localparam logic [TSL_FRAME-1:0] SYNC_PAT = {{9{1'b1}}, {9{1'b0}}}; // oldest bit in MSB
  logic [TSL_FRAME-1:0] win;     // last bits, newest in bit 0
  logic [TSL_FRAME-1:0] nwin;
  logic [4:0]           bitn;

  assign nwin = {win[TSL_FRAME-2:0], sin};

  always_ff @(posedge clk) begin
    if (rst) begin
      win <= '0;
      bitn <= '0;
      locked <= 1'b0;
      valid <= 1'b0;
      data <= '0;
      frame_err <= 1'b0;
    end else begin
      win <= nwin;
      valid <= 1'b0;
      frame_err <= 1'b0;
      if (!locked) begin
        if (nwin == SYNC_PAT) begin
          locked <= 1'b1;
          bitn <= '0;
        end
      end else begin
        if (bitn == 5'(TSL_FRAME-1)) begin
          bitn <= '0;
          if (nwin == SYNC_PAT) begin
            // lock pattern: stay locked, no data
          end else if (nwin[TSL_FRAME-1] == 1'b1 && nwin[0] == 1'b0) begin
            valid <= 1'b1;
            for (int i = 0; i < TSL_W; i++) data[i] <= nwin[TSL_FRAME-2-i];
          end else begin
            locked <= 1'b0;
            frame_err <= 1'b1;
          end
        end else begin
          bitn <= bitn + 5'd1;
        end
      end
    end
  end
endmodule
