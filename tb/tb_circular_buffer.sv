// tb_circular_buffer: writes one slice per tick at its timestamp, as the
// board does, over several wraps of a small buffer, and reads back slices a
// fixed latency in the past; each must equal the value the testbench wrote
// for that timestamp. Also checks that a slice older than the depth has
// been overwritten.
module tb_circular_buffer;
  localparam int AW = 8;
  logic clk = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic we = 0, re = 0;
  logic [AW-1:0] waddr, raddr;
  logic [511:0] wdata, rdata;

  circular_buffer #(.AW(AW)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  function automatic logic [511:0] pat(int ts);
    logic [511:0] v;
    for (int i = 0; i < 16; i++) v[32*i +: 32] = 32'(ts * 16 + i) ^ 32'hA5A5_0000;
    return v;
  endfunction

  initial begin
    int lat;
    for (int ts = 0; ts < 1000; ts++) begin
      @(negedge clk);
      we = 1; waddr = AW'(ts); wdata = pat(ts);
      lat = 1 + (ts % 200);
      re = (ts >= lat);
      raddr = AW'(ts - lat);
      @(negedge clk);
      we = 0;
      if (ts >= lat) begin
        checks++;
        if (rdata != pat(ts - lat)) begin
          failures++;
          $display("ts %0d lat %0d wrong", ts, lat);
        end
      end
    end
    // slice written 300 ticks ago has been overwritten (depth 256)
    @(negedge clk);
    re = 1; raddr = AW'(999 - 300);
    @(negedge clk);
    checks++;
    if (rdata != pat(999 - 300 + 256)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
