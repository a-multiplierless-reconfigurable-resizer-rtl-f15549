// section_ctrl: sequencer of one overlap-save section on one lane, with the
// concurrent register reset.
//
// After `start` it requests the SEC_N (= 11) samples of the section, one per
// cycle, from the data source (req, req_idx); the source answers RD_LAT
// cycles later, when lane_valid marks the sample for the filter lane. For
// interpolation by U/D it requests D samples and then leaves U-D cycles free,
// which the rate switch fills with zero padding; for decimation it requests a
// sample every cycle. After the last sample it waits for that sample to run
// through the lane (RD_LAT + 2*S cycles, plus U-D for the trailing zero
// padding) and then raises lane_clr for one cycle, clearing all registers of
// the lane at once, and pulses `done`.
// It also counts the post-processed outputs of the section: the first
// cfg.discard outputs are thrown away and the rest are flagged by `keep`
// with their index keep_idx, so that the sections join seamlessly.
// Cycles per section: interpolation 11 + U-D idle per group of D, decimation
// 11, each plus RD_LAT + 2S + (U-D for interpolation) flush cycles and one
// clear cycle.
// Flush-then-clear follows the published concurrent register reset; the
// request interface and the exact cycle counts are this design's own.
module section_ctrl
  import resizer_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  lane_cfg_t cfg,
  output logic      busy,
  output logic      done,
  output logic      req,
  output logic [3:0] req_idx,
  output logic      lane_valid,
  output logic      lane_clr,
  input  logic      pp_valid,
  output logic      keep,
  output logic [5:0] keep_idx
);

  typedef enum logic [1:0] {S_IDLE, S_FEED, S_FLUSH, S_CLEAR} state_e;

  state_e     state;
  logic [1:0] gpos;
  logic [3:0] k;
  logic [3:0] flush_cnt;
  logic [5:0] ocnt;
  logic [RD_LAT-1:0] vpipe;

  assign busy     = (state != S_IDLE);
  assign done     = (state == S_CLEAR);
  assign lane_clr = (state == S_CLEAR);
  assign req_idx  = k;
  assign req      = (state == S_FEED) && (!cfg.interp || gpos < cfg.d);
  assign lane_valid = vpipe[RD_LAT-1];
  assign keep     = pp_valid && (ocnt >= 6'(cfg.discard));
  assign keep_idx = ocnt - 6'(cfg.discard);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      gpos      <= '0;
      k         <= '0;
      flush_cnt <= '0;
      ocnt      <= '0;
      vpipe     <= '0;
    end else begin
      vpipe <= RD_LAT'({vpipe, req});
      if (pp_valid) ocnt <= ocnt + 6'd1;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_FEED;
          gpos  <= '0;
          k     <= '0;
          ocnt  <= '0;
        end
        S_FEED: begin
          if (cfg.interp) gpos <= (gpos + 2'd1 >= cfg.u) ? 2'd0 : gpos + 2'd1;
          if (req) begin
            k <= k + 4'd1;
            if (k == 4'(SEC_N - 1)) begin
              state     <= S_FLUSH;
              flush_cnt <= 4'(RD_LAT) + {cfg.nstages, 1'b0}
                           + (cfg.interp ? 4'(cfg.u - cfg.d) : 4'd0);
            end
          end
        end
        S_FLUSH: begin
          flush_cnt <= flush_cnt - 4'd1;
          if (flush_cnt == 4'd1) state <= S_CLEAR;
        end
        default: state <= S_IDLE;  // S_CLEAR
      endcase
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> state == S_IDLE);

endmodule
