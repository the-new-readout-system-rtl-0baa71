// tb_eth_mac_tx: offers frames of random length (some shorter than the
// Ethernet minimum) on both source ports and records the byte interface at
// random byte_en strobes. Checks for each frame: the preamble and
// start-of-frame byte, the payload bytes in order and from the right source
// (port 0 first when both wait), zero padding to 60 bytes, the CRC-32 frame
// check sequence (computed here bit by bit; the routine is first checked on
// the standard "123456789" vector) and at least 12 idle bytes between frames.
module tb_eth_mac_tx;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic byte_en;
  logic [7:0] s0_data, s1_data, txd;
  logic s0_valid = 0, s0_last, s0_ready, s1_valid = 0, s1_last, s1_ready, tx_en, frame_done;
  logic [7:0] f0[$], f1[$];     // frames being offered
  int i0 = 0, i1 = 0;
  logic [7:0] exp_frames[$][$];
  logic [7:0] rx[$];
  int idle = 100, n_frames = 0, n_pad = 0;

  eth_mac_tx dut (.*);

  function automatic logic [31:0] crc_ref(logic [7:0] b[$]);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (b[i])
      for (int k = 0; k < 8; k++) begin
        logic fb;
        fb = c[0] ^ b[i][k];
        c = c >> 1;
        if (fb) c = c ^ 32'hEDB8_8320;
      end
    return ~c;
  endfunction

  assign s0_data = (i0 < f0.size()) ? f0[i0] : 8'h00;
  assign s0_last = (i0 == f0.size() - 1);
  assign s1_data = (i1 < f1.size()) ? f1[i1] : 8'h00;
  assign s1_last = (i1 == f1.size() - 1);

  always @(negedge clk) byte_en = !rst && ($urandom_range(0, 2) == 0);

  always @(posedge clk) if (!rst) begin
    if (s0_valid && s0_ready) begin
      if (i0 == 0) exp_frames.push_back(f0);
      i0 <= i0 + 1;
      if (i0 == f0.size() - 1) s0_valid <= 0;
    end
    if (s1_valid && s1_ready) begin
      if (i1 == 0) exp_frames.push_back(f1);
      i1 <= i1 + 1;
      if (i1 == f1.size() - 1) s1_valid <= 0;
    end
  end

  // receiver: one byte per byte_en, as a PHY would take it
  logic be_d;
  always @(posedge clk) be_d <= byte_en;
  always @(posedge clk) if (!rst && be_d) begin
    if (tx_en) begin
      if (rx.size() == 0) begin
        checks++;
        if (idle < 12) begin failures++; $display("gap %0d", idle); end
      end
      rx.push_back(txd);
      idle = 0;
    end else begin
      if (rx.size() != 0) check_frame();
      idle++;
    end
  end

  task automatic check_frame();
    logic [7:0] e[$], body[$];
    logic [31:0] fcs;
    n_frames++;
    checks++;
    if (rx.size() < 8 + 64) begin failures++; $display("short %0d", rx.size()); rx.delete(); return; end
    for (int i = 0; i < 7; i++) if (rx[i] != 8'h55) begin failures++; break; end
    if (rx[7] != 8'hD5) failures++;
    e = exp_frames.pop_front();
    if (e.size() < 60) n_pad++;
    for (int i = 8; i < rx.size() - 4; i++) body.push_back(rx[i]);
    checks++;
    if (body.size() != ((e.size() < 60) ? 60 : e.size())) begin failures++; $display("len %0d exp %0d", body.size(), e.size()); end
    foreach (body[i]) begin
      checks++;
      if (body[i] != ((i < e.size()) ? e[i] : 8'h00)) begin failures++; $display("byte %0d", i); break; end
    end
    fcs = {rx[rx.size()-1], rx[rx.size()-2], rx[rx.size()-3], rx[rx.size()-4]};
    checks++;
    if (fcs != crc_ref(body)) begin failures++; $display("fcs %h exp %h", fcs, crc_ref(body)); end
    rx.delete();
  endtask

  initial begin
    logic [7:0] v[$];
    v = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    checks++;
    if (crc_ref(v) != 32'hCBF4_3926) failures++;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 60; k++) begin
      int n;
      @(negedge clk);
      if (!s0_valid && $urandom_range(0, 1)) begin
        f0.delete(); n = $urandom_range(20, 120);
        for (int i = 0; i < n; i++) f0.push_back(8'($urandom));
        i0 = 0; s0_valid = 1;
      end
      if (!s1_valid && $urandom_range(0, 1)) begin
        f1.delete(); n = $urandom_range(40, 300);
        for (int i = 0; i < n; i++) f1.push_back(8'($urandom));
        i1 = 0; s1_valid = 1;
      end
      while (s0_valid && s1_valid) @(negedge clk);
      repeat ($urandom_range(0, 200)) @(negedge clk);
    end
    while (s0_valid || s1_valid) @(negedge clk);
    repeat (200) @(negedge clk);
    checks++;
    if (exp_frames.size() != 0 || n_frames < 30 || n_pad == 0) begin failures++; $display("frames %0d pad %0d left %0d", n_frames, n_pad, exp_frames.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
