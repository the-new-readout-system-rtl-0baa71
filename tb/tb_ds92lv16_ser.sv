// tb_ds92lv16_ser: loads a new random word every 18 clocks and decodes the
// serial line here: after sync, each 18-bit frame must be start bit 1, the
// word LSB first, stop bit 0, and the words must come out in order with
// one frame per 18 clocks. Also checks the lock pattern while 'sync' is high.
module tb_ds92lv16_ser;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic load = 0, sync = 1, sout, frame_start;
  logic [15:0] data;
  logic [15:0] exp_q[$];
  logic [17:0] fr;
  int bitn = -1;
  int nsync = 0;

  ds92lv16_ser dut (.clk, .rst, .load, .data, .sync, .sout, .frame_start);

  always @(posedge clk) if (!rst) begin
    if (frame_start) bitn = 0;
    if (bitn >= 0) begin
      fr[bitn] = sout;
      bitn++;
      if (bitn == 18) begin
        bitn = -1;
        if (fr == 18'b000000000111111111) nsync++;
        else if (exp_q.size() != 0) begin
          // frames before the first load carry the reset value
          checks++;
          if (fr[0] !== 1'b1 || fr[17] !== 1'b0 || fr[16:1] != exp_q[0]) begin
            failures++;
            $display("frame %b exp %h q=%0d", fr, exp_q.size() ? exp_q[0] : 0, exp_q.size());
          end
          if (exp_q.size() != 0) void'(exp_q.pop_front());
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (18 * 5) @(posedge clk);
    @(negedge clk);
    // align loads so that each load precedes its frame
    wait (frame_start == 1'b1);
    @(negedge clk);
    sync = 0;
    for (int i = 0; i < 300; i++) begin
      repeat (16) @(negedge clk);
      data = 16'($urandom);
      exp_q.push_back(data);
      load = 1;
      @(negedge clk);
      load = 0;
      @(negedge clk);
    end
    repeat (40) @(posedge clk);
    checks++;
    if (nsync < 3) failures++;
    checks++;
    if (exp_q.size() > 1) failures++;
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
