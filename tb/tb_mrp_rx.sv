// tb_mrp_rx: builds Ethernet/IPv4/UDP frames here and feeds them byte by
// byte: MRPs to the board's own address and to its multicast group (must
// produce one request per event number, tagged with the sender's IP and
// MAC), frames for another address, another port or another protocol (must
// produce nothing), an MRP with 120 requests (only 100 taken), and requests
// arriving while the consumer is stalled (dropped and flagged).
module tb_mrp_rx;
  import cream_pkg::*;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] rx_data;
  logic rx_valid = 0, rx_last = 0, req_valid, req_ready = 1, drop, mrp_seen;
  ip_addr_t cfg_my_ip = 32'h0A00_0105, cfg_mcast_ip = 32'hEF01_0203;
  logic [15:0] cfg_mrp_port = 16'd5000;
  l1_req_t req;
  l1_req_t exp_q[$];
  int n_drop = 0, n_seen = 0;

  mrp_rx dut (.*);

  always @(posedge clk) if (!rst) begin
    if (req_valid && req_ready) begin
      checks++;
      if (exp_q.size() == 0 || req != exp_q[0]) begin
        failures++;
        $display("request evt %0d", req.evt);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
    if (drop) n_drop++;
    if (mrp_seen) n_seen++;
  end

  task automatic send_frame(ip_addr_t dip, logic [15:0] dport, logic [7:0] proto,
                            ip_addr_t sip, mac_addr_t smac, int nreq, logic expect_it);
    logic [7:0] f[$];
    evt_num_t e;
    for (int i = 0; i < 6; i++) f.push_back(8'hFF);
    for (int i = 0; i < 6; i++) f.push_back(smac[47-8*i -: 8]);
    f.push_back(8'h08); f.push_back(8'h00);
    f.push_back(8'h45); f.push_back(8'h00);
    for (int i = 0; i < 6; i++) f.push_back(8'h00);
    f.push_back(8'd64); f.push_back(proto); f.push_back(8'h00); f.push_back(8'h00);
    for (int i = 0; i < 4; i++) f.push_back(sip[31-8*i -: 8]);
    for (int i = 0; i < 4; i++) f.push_back(dip[31-8*i -: 8]);
    f.push_back(8'h12); f.push_back(8'h34);
    f.push_back(dport[15:8]); f.push_back(dport[7:0]);
    f.push_back(8'h00); f.push_back(8'h00); f.push_back(8'h00); f.push_back(8'h00);
    f.push_back(8'(nreq >> 8)); f.push_back(8'(nreq));
    for (int r = 0; r < nreq; r++) begin
      e = EVT_W'($urandom);
      f.push_back(8'h00); f.push_back(e[23:16]); f.push_back(e[15:8]); f.push_back(e[7:0]);
      if (expect_it && r < 100) exp_q.push_back('{evt: e, ip: sip, mac: smac});
    end
    foreach (f[i]) begin
      @(negedge clk);
      rx_valid = 1; rx_data = f[i]; rx_last = (i == f.size() - 1);
    end
    @(negedge clk);
    rx_valid = 0; rx_last = 0;
    repeat ($urandom_range(1, 10)) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 40; k++) begin
      ip_addr_t sip;
      mac_addr_t smac;
      sip = 32'h0A00_0200 + 32'(k);
      smac = {16'h0002, 32'($urandom)};
      case (k % 5)
        0, 1: send_frame(cfg_my_ip, 16'd5000, 8'd17, sip, smac, $urandom_range(1, 100), 1);
        2:    send_frame(cfg_mcast_ip, 16'd5000, 8'd17, sip, smac, $urandom_range(1, 100), 1);
        3:    send_frame(32'h0A00_0106, 16'd5000, 8'd17, sip, smac, 5, 0);
        4:    send_frame(cfg_my_ip, (k % 2) ? 16'd5001 : 16'd5000, (k % 2) ? 8'd17 : 8'd6, sip, smac, 5, 0);
      endcase
    end
    send_frame(cfg_my_ip, 16'd5000, 8'd17, 32'h0A00_0300, 48'h1, 120, 1);
    checks++;
    if (exp_q.size() != 0 || n_seen != 25) begin failures++; $display("left %0d seen %0d", exp_q.size(), n_seen); end
    // stalled consumer: first request waits, the other two are dropped
    req_ready = 0;
    send_frame(cfg_my_ip, 16'd5000, 8'd17, 32'h0A00_0301, 48'h2, 3, 1);
    req_ready = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (n_drop != 2 || exp_q.size() != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
