// tb_l0_trigger_ctrl: sends L0 strobes with their trigger types a few clocks
// later and checks every trigger leaving the queue (event number in order,
// timestamp of the strobe, type). Then stalls the consumer to overflow the
// queue ('lost' expected), checks the timestamp and event-counter resets,
// and runs continuous mode with 256 samples per trigger: 256 triggers whose
// timestamps are 256 ticks apart must come out.
module tb_l0_trigger_ctrl;
  import cream_pkg::*;
  logic clk = 0, rst = 1;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;

  logic sample_tick;
  logic bp_l0 = 0, bp_tt_valid = 0, ts_reset = 0, ec_reset = 0, cont_start = 0;
  ttype_t bp_ttype = '0;
  logic [NSAMP_W-1:0] cfg_nsamp = 9'd8;
  tstamp_t timestamp;
  logic trig_valid, trig_ready = 1, cont_active, lost;
  trig_t trig;
  logic [4:0] level;
  trig_t exp_q[$];
  int n_lost = 0, n_cont = 0;
  tstamp_t last_cont_ts;
  evt_num_t ev = 0;

  l0_trigger_ctrl #(.QDEPTH(16)) dut (.*);

  int unsigned k = 0;
  always_ff @(posedge clk) begin
    k <= (k == 17) ? 0 : k + 1;
  end
  assign sample_tick = (k == 17) && !rst;

  always @(posedge clk) if (!rst) begin
    if (lost) n_lost++;
    if (trig_valid && trig_ready) begin
      if (trig.cont) begin
        n_cont++;
        if (n_cont > 1) begin
          checks++;
          if (trig.ts - last_cont_ts != 256) failures++;
        end
        last_cont_ts = trig.ts;
      end else begin
        checks++;
        if (exp_q.size() == 0 || trig != exp_q[0]) begin
          failures++;
          $display("trigger evt %0d ts %0d tt %0d", trig.evt, trig.ts, trig.ttype);
        end
        if (exp_q.size() != 0) void'(exp_q.pop_front());
      end
    end
  end

  task automatic l0(ttype_t tt, int gap);
    @(negedge clk);
    bp_l0 = 1;
    exp_q.push_back('{evt: ev, ts: timestamp, ttype: tt, cont: 1'b0});
    ev++;
    @(negedge clk);
    bp_l0 = 0;
    repeat (gap) @(negedge clk);
    bp_tt_valid = 1; bp_ttype = tt;
    @(negedge clk);
    bp_tt_valid = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 200; i++) begin
      l0(TT_W'($urandom), $urandom_range(0, 5));
      repeat ($urandom_range(0, 40)) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || n_lost != 0) failures++;
    // overflow: consumer stalled, 20 triggers into a 16-deep queue
    trig_ready = 0;
    for (int i = 0; i < 20; i++) l0(6'd5, 1);
    repeat (2) @(negedge clk);
    checks++;
    if (n_lost != 4) begin failures++; $display("lost %0d", n_lost); end
    trig_ready = 1;
    repeat (20) @(negedge clk);
    exp_q.delete();
    // resets
    ts_reset = 1; ec_reset = 1;
    @(negedge clk);
    ts_reset = 0; ec_reset = 0;
    checks++;
    if (timestamp != 0) failures++;
    ev = 0;
    l0(6'd9, 2);
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    // continuous mode, 256 samples per trigger
    cfg_nsamp = 9'd256;
    cont_start = 1;
    @(negedge clk);
    cont_start = 0;
    wait (!cont_active);
    repeat (40) @(negedge clk);
    checks++;
    if (n_cont != 256) begin failures++; $display("cont %0d", n_cont); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
