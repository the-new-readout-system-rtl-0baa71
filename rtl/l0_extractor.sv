// l0_extractor: copies the samples of each L0 trigger from the circular
// buffer into the L0 buffer.
//
// For a trigger with timestamp T it reads the cfg_nsamp time slices that
// start at T - cfg_latency (the fixed, configurable L0 latency), one read
// per clock, and appends them to the L0 buffer ring; then it writes the
// event's directory entry (header and first address) and pulses 'done' with
// the event number. Trigger types whose bit in cfg_tt_readout is clear get a
// directory entry with no samples (a different action per trigger type);
// continuously generated triggers are always read out. The latency must be
// at least cfg_nsamp so that every slice read is already written. A trigger
// with N samples occupies the block for N + 3 clocks (2 clocks when
// no samples are taken). Extracting up to 256
// samples at fixed latency per trigger follows the description; the
// per-type readout mask and the timing are this design's choices.
module l0_extractor
  import cream_pkg::*;
#(
  parameter int CB_AW  = 19,
  parameter int unsigned L0_DEPTH = 2**25 - 1,
  parameter int L0_AW  = $clog2(L0_DEPTH),
  parameter int DIR_AW = 24
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               trig_valid,
  output logic               trig_ready,
  input  trig_t              trig,
  input  logic [18:0]        cfg_latency,
  input  logic [NSAMP_W-1:0] cfg_nsamp,
  input  logic [63:0]        cfg_tt_readout,
  // circular buffer read port
  output logic               cb_re,
  output logic [CB_AW-1:0]   cb_raddr,
  input  logic [WORD_W-1:0]  cb_rdata,
  // L0 buffer write ports
  output logic               l0_we,
  output logic [L0_AW-1:0]   l0_waddr,
  output logic [WORD_W-1:0]  l0_wdata,
  output logic               dir_we,
  output logic [DIR_AW-1:0]  dir_waddr,
  output evt_hdr_t           dir_whdr,
  output logic [L0_AW-1:0]   dir_wbase,
  // completion
  output logic               done,
  output evt_num_t           done_evt,
  output logic               done_cont
);
  typedef enum logic [1:0] {S_IDLE, S_COPY, S_LAST, S_DIR} state_t;
  state_t             state;
  trig_t              cur;
  logic [NSAMP_W-1:0] n, rd_i;
  logic [CB_AW-1:0]   rd_addr;
  logic [L0_AW-1:0]   wptr, base;
  logic               rd_pend;

  assign trig_ready = (state == S_IDLE);
  assign cb_re      = (state == S_COPY);
  assign cb_raddr   = rd_addr;
  assign l0_wdata   = cb_rdata;
  assign l0_we      = rd_pend;
  assign l0_waddr   = wptr;

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      wptr    <= '0;
      rd_pend <= 1'b0;
      done    <= 1'b0;
      dir_we  <= 1'b0;
      rd_i    <= '0;
      n       <= '0;
      cur     <= '0;
      base    <= '0;
      rd_addr <= '0;
      done_evt <= '0;
      done_cont <= 1'b0;
    end else begin
      done    <= 1'b0;
      dir_we  <= 1'b0;
      rd_pend <= (state == S_COPY);
      if (rd_pend) wptr <= (wptr == L0_AW'(L0_DEPTH - 1)) ? '0 : wptr + 1'b1;
      case (state)
        S_IDLE: if (trig_valid) begin
          cur     <= trig;
          base    <= wptr;
          rd_i    <= '0;
          rd_addr <= CB_AW'(trig.ts - TS_W'(cfg_latency));
          if (trig.cont || cfg_tt_readout[trig.ttype]) begin
            n     <= cfg_nsamp;
            state <= S_COPY;
          end else begin
            n     <= '0;
            state <= S_DIR;
          end
        end
        S_COPY: begin
          rd_addr <= rd_addr + 1'b1;
          rd_i    <= rd_i + 1'b1;
          if (rd_i == n - 1'b1) state <= S_LAST;
        end
        S_LAST: state <= S_DIR;       // last slice is being written
        S_DIR: begin
          dir_we    <= 1'b1;
          dir_waddr <= DIR_AW'(cur.evt);
          dir_whdr  <= '{evt: cur.evt, ts: cur.ts, ttype: cur.ttype, nsamp: n};
          dir_wbase <= base;
          done      <= 1'b1;
          done_evt  <= cur.evt;
          done_cont <= cur.cont;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
