// tb_sde_tx: holds a small L0 buffer model (directory and slices) and sends
// read-out requests; parses every packet coming out under a random ready
// signal and checks: Ethernet addresses, IPv4 header checksum (the header
// words must add up to 0xFFFF), IP and UDP lengths against the byte count,
// the event header, and every sample, with and without zero suppression
// (only channels with a sample above threshold, and the right mask), and
// the header-only answer to an event that is not in the buffer.
module tb_sde_tx;
  import cream_pkg::*;
  localparam int unsigned L0_DEPTH = 300;
  localparam int L0_AW = $clog2(L0_DEPTH);
  localparam int DIR_AW = 6;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic req_valid = 0, req_ready, cfg_zs_enable = 0;
  l1_req_t req;
  logic [ADC_BITS-1:0] cfg_zs_threshold = 14'd600;
  mac_addr_t cfg_my_mac = 48'h0002_0000_0042;
  ip_addr_t cfg_my_ip = 32'h0A00_0142;
  logic [15:0] cfg_src_port = 16'd5000, cfg_dst_port = 16'd5001;
  logic dir_re, l0_re, tx_valid, tx_last, tx_ready, sent;
  logic [DIR_AW-1:0] dir_raddr;
  evt_hdr_t dir_rhdr;
  logic [L0_AW-1:0] dir_rbase, l0_raddr;
  logic [WORD_W-1:0] l0_rdata;
  logic [7:0] tx_data;

  evt_hdr_t dir_h [64];
  logic [L0_AW-1:0] dir_b [64];
  logic [WORD_W-1:0] mem [L0_DEPTH];
  logic [7:0] pkt[$];
  int n_pkts = 0, n_zs = 0, n_missing = 0;

  sde_tx #(.L0_DEPTH(L0_DEPTH), .DIR_AW(DIR_AW)) dut (.*);

  always_ff @(posedge clk) begin
    if (dir_re) begin dir_rhdr <= dir_h[dir_raddr]; dir_rbase <= dir_b[dir_raddr]; end
    if (l0_re) l0_rdata <= mem[l0_raddr];
  end
  always @(negedge clk) tx_ready = ($urandom_range(0, 3) != 0);

  task automatic check_pkt(l1_req_t r, logic zs);
    int p;
    logic [31:0] sum;
    logic [15:0] udp_len, ip_len, nsamp;
    logic [31:0] mask, exp_mask;
    logic found;
    evt_hdr_t h;
    int nk;
    n_pkts++;
    h = dir_h[DIR_AW'(r.evt)];
    found = (h.evt == r.evt);
    checks++;
    if ({pkt[0], pkt[1], pkt[2], pkt[3], pkt[4], pkt[5]} != r.mac ||
        {pkt[6], pkt[7], pkt[8], pkt[9], pkt[10], pkt[11]} != cfg_my_mac ||
        {pkt[30], pkt[31], pkt[32], pkt[33]} != r.ip || {pkt[36], pkt[37]} != cfg_dst_port) begin
      failures++; $display("addresses");
    end
    sum = 0;
    for (int i = 0; i < 10; i++) sum += {pkt[14+2*i], pkt[15+2*i]};
    sum = (sum & 32'hFFFF) + (sum >> 16);
    checks++;
    if (sum[15:0] != 16'hFFFF) begin failures++; $display("ip checksum"); end
    ip_len = {pkt[16], pkt[17]};
    udp_len = {pkt[38], pkt[39]};
    checks++;
    if (int'(ip_len) != pkt.size() - 14 || int'(udp_len) != pkt.size() - 34) begin
      failures++; $display("lengths %0d %0d size %0d", ip_len, udp_len, pkt.size());
    end
    nsamp = {pkt[52], pkt[53]};
    mask = {pkt[54], pkt[55], pkt[56], pkt[57]};
    checks++;
    if (pkt[42][0] != found || {pkt[43], pkt[44], pkt[45]} != r.evt ||
        (found && ({pkt[46], pkt[47], pkt[48], pkt[49]} != h.ts || pkt[50] != {2'b0, h.ttype} ||
                   nsamp != 16'(h.nsamp))) || (!found && nsamp != 0)) begin
      failures++; $display("event header");
    end
    if (!found) begin n_missing++; return; end
    exp_mask = zs ? 0 : 32'hFFFF_FFFF;
    if (zs)
      for (int s = 0; s < h.nsamp; s++)
        for (int c = 0; c < 32; c++)
          if (mem[(dir_b[DIR_AW'(r.evt)] + s) % L0_DEPTH][16*c +: 16] > 16'(cfg_zs_threshold)) exp_mask[c] = 1;
    checks++;
    if (mask != exp_mask) begin failures++; $display("mask %h exp %h", mask, exp_mask); end
    if (zs && mask != 32'hFFFF_FFFF) n_zs++;
    p = 58;
    for (int s = 0; s < h.nsamp; s++)
      for (int c = 0; c < 32; c++)
        if (exp_mask[c]) begin
          checks++;
          if (p + 1 >= pkt.size() ||
              {pkt[p], pkt[p+1]} != mem[(dir_b[DIR_AW'(r.evt)] + s) % L0_DEPTH][16*c +: 16]) begin
            failures++;
            $display("sample s%0d c%0d", s, c);
          end
          p += 2;
        end
    checks++;
    if (p != pkt.size()) begin failures++; $display("size"); end
  endtask

  l1_req_t sent_q[$];
  logic zs_q[$];
  always @(posedge clk) if (!rst) begin
    if (tx_valid && tx_ready) begin
      pkt.push_back(tx_data);
      if (tx_last) begin
        check_pkt(sent_q.pop_front(), zs_q.pop_front());
        pkt.delete();
      end
    end
  end

  initial begin
    int base;
    base = 0;
    for (int e = 0; e < 64; e++) begin
      int n;
      n = (e % 8 == 7) ? 0 : $urandom_range(1, 12);
      dir_h[e] = '{evt: EVT_W'(e + 64 * (e % 3 == 2 ? 1 : 0)), ts: TS_W'($urandom),
                   ttype: TT_W'($urandom), nsamp: NSAMP_W'(n)};
      dir_b[e] = L0_AW'(base);
      for (int s = 0; s < n; s++)
        for (int c = 0; c < 32; c++)
          mem[(base + s) % L0_DEPTH][16*c +: 16] =
            16'((($urandom_range(0, 40) == 0) ? 700 + $urandom_range(0, 5000) : 380 + $urandom_range(0, 100)));
      base = (base + n) % L0_DEPTH;
    end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 120; k++) begin
      @(negedge clk);
      cfg_zs_enable = (k >= 60);
      req_valid = 1;
      req = '{evt: EVT_W'($urandom_range(0, 63) + ((k % 11 == 0) ? 64 : 0)),
              ip: 32'h0A00_0200 + 32'(k), mac: {16'h0002, 32'($urandom)}};
      sent_q.push_back(req);
      zs_q.push_back(cfg_zs_enable);
      @(posedge clk);
      while (!req_ready) @(posedge clk);
      @(negedge clk);
      req_valid = 0;
      while (sent_q.size() != 0) @(negedge clk);
    end
    checks++;
    if (n_pkts != 120 || n_zs == 0 || n_missing == 0) begin failures++; $display("pkts %0d zs %0d miss %0d", n_pkts, n_zs, n_missing); end
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
