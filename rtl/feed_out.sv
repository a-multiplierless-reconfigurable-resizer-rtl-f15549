// feed_out: output router of the filter set (feed_out).
//
// For each lane it takes the last stage of the lane's chain
// (base + nstages - 1). In interpolation the last integrator is the lane
// output and the last comb feeds the rate switch; in decimation the last comb
// is the lane output and the last integrator feeds the rate switch. A lane
// with no stages outputs nothing. Purely combinational.
// Its role follows the published Filter Set diagram; the selection rule is
// this design's own.
module feed_out
  import resizer_pkg::*;
(
  input  lane_cfg_t  cfg      [NUM_LANES],
  input  stage_idx_t base     [NUM_LANES],
  input  samp_t      comb_out [NUM_STAGES],
  input  samp_t      integ_out[NUM_STAGES],
  output samp_t      lane_out [NUM_LANES],   // out0..out3
  output samp_t      sw_in    [NUM_LANES]    // to the rate switches
);

  always_comb begin
    for (int l = 0; l < NUM_LANES; l++) begin
      lane_out[l] = '0;
      sw_in[l]    = '0;
      for (int i = 0; i < NUM_STAGES; i++) begin
        if (cfg[l].nstages != '0 && i == int'(base[l]) + int'(cfg[l].nstages) - 1) begin
          lane_out[l] = cfg[l].interp ? integ_out[i] : comb_out[i];
          sw_in[l]    = cfg[l].interp ? comb_out[i] : integ_out[i];
        end
      end
    end
  end

endmodule
