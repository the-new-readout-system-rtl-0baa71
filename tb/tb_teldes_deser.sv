// tb_teldes_deser: builds a DS92LV16-style bit stream here (random idle
// bits, lock patterns, data frames with start 1 / data LSB first / stop 0,
// and one corrupted frame) and checks lock, every recovered word, one word
// per 18 clocks, the error on the corrupted frame and relocking afterwards.
module tb_teldes_deser;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic sin = 0, locked, valid, frame_err;
  logic [15:0] data;
  logic [15:0] exp_q[$];
  int n_err = 0, n_valid = 0;
  int unsigned cyc = 0, last_v = 0;

  teldes_deser dut (.clk, .rst, .sin, .locked, .valid, .data, .frame_err);

  always_ff @(posedge clk) cyc <= cyc + 1;

  task automatic send_bit(logic b);
    sin = b;
    @(negedge clk);
  endtask
  task automatic send_sync();
    for (int i = 0; i < 9; i++) send_bit(1);
    for (int i = 0; i < 9; i++) send_bit(0);
  endtask
  task automatic send_word(logic [15:0] w, logic good);
    send_bit(1);
    for (int i = 0; i < 16; i++) send_bit(w[i]);
    send_bit(good ? 1'b0 : 1'b1);
  endtask

  always @(posedge clk) if (!rst) begin
    if (valid) begin
      n_valid++;
      checks++;
      if (exp_q.size() == 0 || data != exp_q[0]) begin
        failures++;
        $display("got %h", data);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
      if (last_v != 0 && exp_q.size() != 0) begin
        checks++;
        if (cyc - last_v != 18) failures++;
      end
      last_v = cyc;
    end
    if (frame_err) n_err++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // idle line with random bits: no lock may be taken from a random pattern
    // that cannot contain nine ones followed by nine zeros
    for (int i = 0; i < 100; i++) send_bit(i % 3 == 0);
    checks++;
    if (locked) failures++;
    send_sync(); send_sync();
    checks++;
    if (!locked) failures++;
    for (int i = 0; i < 200; i++) begin
      logic [15:0] w;
      w = 16'($urandom);
      exp_q.push_back(w);
      send_word(w, 1);
    end
    send_word(16'h1234, 0);       // corrupted stop bit
    repeat (3) @(negedge clk);
    checks++;
    if (locked || n_err != 1) failures++;
    last_v = 0;
    send_sync();
    for (int i = 0; i < 50; i++) begin
      logic [15:0] w;
      w = 16'($urandom);
      exp_q.push_back(w);
      send_word(w, 1);
    end
    repeat (20) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || n_valid != 250) failures++;
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
