// tb_igmp_tx: requests membership reports for several groups and checks each
// 42-byte frame: multicast destination MAC derived from the group, source
// MAC and IP, IPv4 header checksum and IGMP checksum (each must add up to
// 0xFFFF), time-to-live 1, protocol 2, report type 0x16 and the group
// address. The ready signal is random.
module tb_igmp_tx;
  import cream_pkg::*;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic join_req = 0, tx_valid, tx_last, tx_ready, sent;
  mac_addr_t cfg_my_mac = 48'h0002_1234_5678;
  ip_addr_t cfg_my_ip = 32'h0A00_0105, cfg_group;
  logic [7:0] tx_data;
  logic [7:0] f[$];
  int n = 0;

  igmp_tx dut (.*);

  always @(negedge clk) tx_ready = ($urandom_range(0, 2) != 0);

  function automatic logic [15:0] csum(logic [7:0] b[$], int from, int len);
    logic [31:0] s = 0;
    for (int i = 0; i < len; i += 2) s += {b[from+i], b[from+i+1]};
    s = (s & 32'hFFFF) + (s >> 16);
    s = (s & 32'hFFFF) + (s >> 16);
    return s[15:0];
  endfunction

  always @(posedge clk) if (!rst && tx_valid && tx_ready) begin
    f.push_back(tx_data);
    if (tx_last) begin
      n++;
      checks++;
      if (f.size() != 42) failures++;
      else begin
        checks++;
        if ({f[0], f[1], f[2], f[3], f[4], f[5]} != {24'h01005E, 1'b0, cfg_group[22:0]} ||
            {f[6], f[7], f[8], f[9], f[10], f[11]} != cfg_my_mac ||
            {f[26], f[27], f[28], f[29]} != cfg_my_ip ||
            {f[30], f[31], f[32], f[33]} != cfg_group ||
            {f[38], f[39], f[40], f[41]} != cfg_group) begin failures++; $display("addresses"); end
        checks++;
        if (csum(f, 14, 20) != 16'hFFFF || csum(f, 34, 8) != 16'hFFFF) begin failures++; $display("checksum"); end
        checks++;
        if (f[22] != 8'd1 || f[23] != 8'd2 || f[34] != 8'h16 || f[12] != 8'h08 || {f[16], f[17]} != 16'd28) failures++;
      end
      f.delete();
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 20; k++) begin
      cfg_group = {4'hE, 28'($urandom)};
      @(negedge clk);
      join_req = 1;
      @(negedge clk);
      join_req = 0;
      wait (sent);
      @(negedge clk);
    end
    checks++;
    if (n != 20) failures++;
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
