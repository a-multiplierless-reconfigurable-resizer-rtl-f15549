// filter_set: the seven reconfigurable CIC filter stages shared by the four
// resizing lanes.
//
// Every stage is one comb and one integrator. The host allocates each lane a
// contiguous run of stages (base, nstages); in_idmux chains the combs and the
// integrators of that run and feed_out picks the lane output and the path
// into the lane's rate switch, whose output is fed back into the other
// section. Interpolation by U/D therefore runs
//   lane_in -> comb x S -> zero padding -> integrator x S -> lane_out
// and decimation by U/D runs
//   lane_in -> integrator x S -> subsample -> comb x S -> lane_out.
// Each comb and each integrator is one register, the switch is combinational,
// so a lane's latency is 2*S cycles. Lane clears are concurrent: lane_clr
// zeroes every register of that lane's stages and its switch in one cycle.
// Samples are REG_W-bit two's complement; the gain is removed later by the
// post process. The allocation must keep lanes disjoint and inside 7 stages;
// the reconfiguration controller guarantees that.
// Seven stages and the two routers follow the published design; the lane
// abstraction (base, nstages) is this design's own.
module filter_set
  import resizer_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  lane_cfg_t  cfg      [NUM_LANES],
  input  stage_idx_t base     [NUM_LANES],
  input  logic       lane_clr [NUM_LANES],
  input  samp_t      lane_in  [NUM_LANES],
  output samp_t      lane_out [NUM_LANES]
);

  samp_t      comb_in  [NUM_STAGES];
  samp_t      comb_out [NUM_STAGES];
  samp_t      integ_in [NUM_STAGES];
  samp_t      integ_out[NUM_STAGES];
  logic [1:0] kdelay   [NUM_STAGES];
  logic       stage_clr[NUM_STAGES];
  samp_t      sw_in    [NUM_LANES];
  samp_t      fb       [NUM_LANES];

  in_idmux u_in_idmux (
    .cfg, .base, .lane_clr, .lane_in, .fb,
    .comb_out, .integ_out, .comb_in, .integ_in, .kdelay, .stage_clr
  );

  for (genvar i = 0; i < NUM_STAGES; i++) begin : g_stage
    cic_comb u_comb (
      .clk, .rst_n, .clr(stage_clr[i]), .kdelay(kdelay[i]),
      .in_s(comb_in[i]), .out_s(comb_out[i])
    );
    cic_integrator u_integ (
      .clk, .rst_n, .clr(stage_clr[i]),
      .in_s(integ_in[i]), .out_s(integ_out[i])
    );
  end

  feed_out u_feed_out (
    .cfg, .base, .comb_out, .integ_out, .lane_out, .sw_in
  );

  for (genvar l = 0; l < NUM_LANES; l++) begin : g_switch
    rate_switch u_switch (
      .clk, .rst_n, .clr(lane_clr[l]), .cfg(cfg[l]),
      .in_s(sw_in[l]), .out_s(fb[l])
    );
  end

endmodule
