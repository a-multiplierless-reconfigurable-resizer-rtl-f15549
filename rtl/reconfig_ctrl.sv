// reconfig_ctrl: filter reconfiguration controller.
//
// At the start of a frame the host gives, for each of the four windows, a
// resizing rate code and a requested stage count for the horizontal and for
// the vertical pass. This block decodes them into the lane control words of
// both passes and allocates the seven filter stages:
//   * every decimation (1/3, 1/2, 2/3) and the 3/2 interpolation use one
//     stage; integer interpolation (2, 3) uses the requested 1..3 stages;
//   * a window needs max(stages_h, stages_v) stages, because both passes run
//     on the same lane one after the other; windows get contiguous runs of
//     stages in window order (base = sum of the earlier windows' counts);
//   * cfg_ok is low when the windows together need more than seven stages.
// Per rate it also gives the comb delay, the post-process gain code, the
// overlap of consecutive overlap-save sections and the number of leading
// section outputs to discard. The chip does this with a PLA; here it is a
// combinational decode of the configuration registers.
// Timing: the host presents its configuration and pulses `load` when a new
// frame begins; the inputs are registered on that clock edge and the outputs
// follow from the registers in the next cycle, holding until the next load.
// Rates, stage limits and gains follow the published design; the control
// word, the allocation rule and the overlap/discard values are own choices.
module reconfig_ctrl
  import resizer_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic       win_en  [NUM_LANES],
  input  rate_e      rate_h  [NUM_LANES],
  input  rate_e      rate_v  [NUM_LANES],
  input  chain_t     req_h   [NUM_LANES],
  input  chain_t     req_v   [NUM_LANES],
  output lane_cfg_t  cfg_h   [NUM_LANES],
  output lane_cfg_t  cfg_v   [NUM_LANES],
  output stage_idx_t base    [NUM_LANES],
  output logic       cfg_ok
);

  function automatic lane_cfg_t decode(rate_e rate, chain_t req);
    lane_cfg_t c;
    chain_t    s;
    s = (req == '0) ? 2'd1 : req;
    c = '0;
    c.nstages = 2'd1;
    c.kdelay  = 2'd1;
    unique case (rate)
      RATE_1_3: begin c.u = 2'd1; c.d = 2'd3; c.gain = GAIN_3; c.overlap = 2'd2; c.discard = 4'd1; end
      RATE_1_2: begin c.u = 2'd1; c.d = 2'd2; c.gain = GAIN_2; c.overlap = 2'd1; c.discard = 4'd1; end
      RATE_2_3: begin c.u = 2'd2; c.d = 2'd3; c.kdelay = 2'd2; c.gain = GAIN_3;
                      c.overlap = 2'd2; c.discard = 4'd2; end
      RATE_3_2: begin c.interp = 1'b1; c.u = 2'd3; c.d = 2'd2; c.kdelay = 2'd2; c.gain = GAIN_2;
                      c.overlap = 2'd1; c.discard = 4'd1; end
      RATE_2: begin
        c.interp = 1'b1; c.u = 2'd2; c.d = 2'd1; c.nstages = s;
        // gain 2^(S-1); overlap ceil(S/2); discard 2*overlap
        unique case (s)
          2'd1:    begin c.gain = GAIN_1; c.overlap = 2'd1; c.discard = 4'd2; end
          2'd2:    begin c.gain = GAIN_2; c.overlap = 2'd1; c.discard = 4'd2; end
          default: begin c.gain = GAIN_4; c.overlap = 2'd2; c.discard = 4'd4; end
        endcase
      end
      default: begin  // RATE_3
        c.interp = 1'b1; c.u = 2'd3; c.d = 2'd1; c.nstages = s;
        // gain 3^(S-1); overlap ceil(2S/3); discard 3*overlap
        unique case (s)
          2'd1:    begin c.gain = GAIN_1; c.overlap = 2'd1; c.discard = 4'd3; end
          2'd2:    begin c.gain = GAIN_3; c.overlap = 2'd2; c.discard = 4'd6; end
          default: begin c.gain = GAIN_9; c.overlap = 2'd2; c.discard = 4'd6; end
        endcase
      end
    endcase
    return c;
  endfunction

  logic   en_q  [NUM_LANES];
  rate_e  rh_q  [NUM_LANES], rv_q [NUM_LANES];
  chain_t sh_q  [NUM_LANES], sv_q [NUM_LANES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < NUM_LANES; l++) begin
        en_q[l] <= 1'b0;
        rh_q[l] <= RATE_2;
        rv_q[l] <= RATE_2;
        sh_q[l] <= 2'd1;
        sv_q[l] <= 2'd1;
      end
    end else if (load) begin
      for (int l = 0; l < NUM_LANES; l++) begin
        en_q[l] <= win_en[l];
        rh_q[l] <= rate_h[l];
        rv_q[l] <= rate_v[l];
        sh_q[l] <= req_h[l];
        sv_q[l] <= req_v[l];
      end
    end
  end

  always_comb begin
    int unsigned total;
    total  = 0;
    for (int l = 0; l < NUM_LANES; l++) begin
      cfg_h[l] = decode(rh_q[l], sh_q[l]);
      cfg_v[l] = decode(rv_q[l], sv_q[l]);
      base[l]  = stage_idx_t'(total);
      if (!en_q[l]) begin
        cfg_h[l].nstages = '0;
        cfg_v[l].nstages = '0;
      end else begin
        total += (cfg_h[l].nstages > cfg_v[l].nstages) ? int'(cfg_h[l].nstages)
                                                      : int'(cfg_v[l].nstages);
      end
    end
    cfg_ok = (total <= NUM_STAGES);
  end

endmodule
