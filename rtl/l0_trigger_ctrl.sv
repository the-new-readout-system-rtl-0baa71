// l0_trigger_ctrl: turns the L0 trigger signals of the crate backplane into
// numbered, time-stamped triggers for the L0 extractor.
//
// A free-running timestamp counts 25 ns sampling ticks; an event counter
// numbers the triggers. On a backplane L0 strobe the current timestamp and
// the next event number are put in a pending queue; the 6-bit trigger type
// that the TTC-LKr sends right after the strobe (bp_tt_valid) completes the
// oldest pending trigger, which then enters the trigger queue towards the
// extractor (valid/ready). In continuous mode (cont_start) the block
// generates its own triggers, one every cfg_nsamp ticks, until 65536
// samples per channel have been covered, so that the extracted windows are
// contiguous; backplane strobes are ignored meanwhile, which keeps the
// continuous events consecutively numbered. A trigger that finds a queue full is lost: 'lost' pulses, which
// raises the board's ERROR line. The reset strobes clear the timestamp and
// the event counter. Event number, timestamp and trigger type per trigger
// and the continuous-mode sample count follow the description; queue depths,
// counter widths and the pending-type mechanism are this design's choices.
module l0_trigger_ctrl
  import cream_pkg::*;
#(
  parameter int QDEPTH = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               sample_tick,
  input  logic               bp_l0,
  input  logic               bp_tt_valid,
  input  ttype_t             bp_ttype,
  input  logic               ts_reset,
  input  logic               ec_reset,
  input  logic               cont_start,
  input  logic [NSAMP_W-1:0] cfg_nsamp,
  output tstamp_t            timestamp,
  output logic               trig_valid,
  input  logic               trig_ready,
  output trig_t              trig,
  output logic [$clog2(QDEPTH):0] level,
  output logic               cont_active,
  output logic               lost
);
  typedef struct packed { evt_num_t evt; tstamp_t ts; } pend_t;

  evt_num_t  evt_cnt;
  logic      pend_rd_valid, pend_wr_ready, pend_ovf, q_ovf, q_wr_ready;
  pend_t     pend_head;
  logic      l0_acc, tt_push, cont_push;
  logic      cont_req;
  tstamp_t   cont_ts;
  logic [16:0] cont_left;      // samples per channel still to cover
  logic [NSAMP_W-1:0] cont_wait;
  trig_t     q_in;
  logic      q_push;
  logic [$clog2(8):0] pend_level;

  // --- timestamp and event counters
  always_ff @(posedge clk) begin
    if (rst || ts_reset) timestamp <= '0;
    else if (sample_tick) timestamp <= timestamp + 1'b1;
  end

  // backplane strobes are ignored while a continuous acquisition runs
  assign l0_acc    = bp_l0 && !cont_active;
  assign tt_push   = bp_tt_valid && pend_rd_valid;
  assign cont_push = cont_req && !tt_push;

  always_ff @(posedge clk) begin
    if (rst || ec_reset) evt_cnt <= '0;
    else evt_cnt <= evt_cnt + EVT_W'(l0_acc) + EVT_W'(cont_push);
  end

  // --- pending triggers waiting for their type
  sync_fifo #(.W($bits(pend_t)), .DEPTH(8)) u_pend (
    .clk, .rst,
    .wr_valid(l0_acc), .wr_ready(pend_wr_ready),
    .wr_data(pend_t'{evt: evt_cnt, ts: timestamp}),
    .rd_valid(pend_rd_valid), .rd_ready(bp_tt_valid), .rd_data(pend_head),
    .level(pend_level), .overflow(pend_ovf));

  // --- continuous-mode trigger generator
  always_ff @(posedge clk) begin
    if (rst) begin
      cont_active <= 1'b0;
      cont_req    <= 1'b0;
      cont_left   <= '0;
      cont_wait   <= '0;
      cont_ts     <= '0;
    end else begin
      if (cont_push) cont_req <= 1'b0;
      if (cont_start && !cont_active) begin
        cont_active <= 1'b1;
        cont_left   <= 17'(CONT_SAMPLES);
        cont_wait   <= '0;
      end else if (cont_active && sample_tick) begin
        if (cont_wait == '0) begin
          cont_req  <= 1'b1;
          cont_ts   <= timestamp;
          cont_wait <= cfg_nsamp - 1'b1;
          if (cont_left <= 17'(cfg_nsamp)) begin
            cont_left   <= '0;
            cont_active <= 1'b0;
          end else begin
            cont_left <= cont_left - 17'(cfg_nsamp);
          end
        end else begin
          cont_wait <= cont_wait - 1'b1;
        end
      end
    end
  end

  // --- trigger queue towards the extractor
  always_comb begin
    q_push = tt_push || cont_push;
    if (tt_push) q_in = '{evt: pend_head.evt, ts: pend_head.ts, ttype: bp_ttype, cont: 1'b0};
    else         q_in = '{evt: evt_cnt + EVT_W'(l0_acc), ts: cont_ts, ttype: '0, cont: 1'b1};
  end

  sync_fifo #(.W($bits(trig_t)), .DEPTH(QDEPTH)) u_q (
    .clk, .rst,
    .wr_valid(q_push), .wr_ready(q_wr_ready), .wr_data(q_in),
    .rd_valid(trig_valid), .rd_ready(trig_ready), .rd_data(trig),
    .level(level), .overflow(q_ovf));

  assign lost = pend_ovf || q_ovf;
endmodule
