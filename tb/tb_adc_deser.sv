// tb_adc_deser: sends random 14-bit samples on eight serial lines through the
// ADC model and checks that each sample word is recovered, with 'valid'
// exactly once per 18-clock frame, one clock after the 14th bit.
module tb_adc_deser;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0][13:0] smp, sent_q[$];
  logic take, bit_en, valid;
  logic [0:0] fco;
  logic [7:0] din;
  logic [7:0][13:0] sample;
  int unsigned cyc = 0, last_valid = 0;

  adc_model #(.CH(8), .NFCO(1), .FRAME(18)) u_m (
    .clk, .rst, .smp, .take, .bit_en, .fco, .din);
  adc_deser dut (.clk, .rst, .bit_en, .fco(fco[0]), .din, .sample, .valid);

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (take) begin
      sent_q.push_back(smp);
      for (int c = 0; c < 8; c++) smp[c] <= 14'($urandom);
    end
    if (valid && !rst) begin
      checks++;
      if (sent_q.size() == 0 || sample != sent_q[0]) begin
        failures++;
        $display("mismatch at cycle %0d", cyc);
      end
      if (sent_q.size() != 0) void'(sent_q.pop_front());
      if (last_valid != 0) begin
        checks++;
        if (cyc - last_valid != 18) begin
          failures++;
          $display("frame period %0d", cyc - last_valid);
        end
      end
      last_valid <= cyc;
    end
  end

  initial begin
    smp = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (18 * 200) @(posedge clk);
    checks++;
    if (sent_q.size() > 2) failures++;
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
