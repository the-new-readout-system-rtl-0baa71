// tb_trigger_sum: drives random samples, baselines and gains into one tile
// sum and compares each result, two clocks later, with a reference computed
// here: sum over 16 channels of max(0, s - p) * g / 2048 (each term
// truncated), saturated at 2^18 - 1, divided by 4.
module tb_trigger_sum;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, out_valid;
  logic [15:0][13:0] sample, ped;
  logic [15:0][11:0] gain;
  logic [15:0] sum;
  int exp_q[$];
  int unsigned cyc = 0, sent_cyc_q[$];
  int n_sat = 0;

  trigger_sum dut (.clk, .rst, .in_valid, .sample, .ped, .gain, .out_valid, .sum);

  function automatic int ref_sum(logic [15:0][13:0] s, logic [15:0][13:0] p, logic [15:0][11:0] g);
    longint acc = 0;
    for (int c = 0; c < 16; c++)
      if (s[c] > p[c]) acc += ((longint'(s[c]) - longint'(p[c])) * longint'(g[c])) >>> 11;
    if (acc > 262143) acc = 262143;
    return int'(acc >> 2);
  endfunction

  always_ff @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (!rst && out_valid) begin
    checks++;
    if (exp_q.size() == 0) failures++;
    else begin
      if (sum != 16'(exp_q[0])) begin
        failures++;
        $display("sum %0d expected %0d", sum, exp_q[0]);
      end
      checks++;
      if (cyc - sent_cyc_q[0] != 2) failures++;
      void'(exp_q.pop_front());
      void'(sent_cyc_q.pop_front());
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      for (int c = 0; c < 16; c++) begin
        ped[c]    = 14'(380 + $urandom_range(0, 40));
        sample[c] = (t % 4 == 3) ? 14'($urandom) : 14'(300 + $urandom_range(0, 3000));
        gain[c]   = (t % 7 == 0) ? 12'hFFF : 12'(1800 + $urandom_range(0, 500));
      end
      if (ref_sum(sample, ped, gain) == 65535) n_sat++;
      exp_q.push_back(ref_sum(sample, ped, gain));
      sent_cyc_q.push_back(cyc);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || n_sat == 0) failures++;
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
