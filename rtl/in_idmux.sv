// in_idmux: input router of the filter set (IN_IDmux).
//
// Each lane owns the contiguous stages base .. base+nstages-1. For each stage
// the router finds its owning lane and selects what enters its comb and its
// integrator:
//   interpolation: lane input -> first comb; comb i-1 -> comb i;
//                  rate-switch output (feedback F) -> first integrator;
//                  integrator i-1 -> integrator i
//   decimation:    lane input -> first integrator; integrator chain;
//                  rate-switch output (feedback F) -> first comb; comb chain
// It also hands each stage its lane's clear and comb delay. An unowned stage
// gets no samples and is held cleared. Purely combinational.
// The router's role follows the published Filter Set diagram; the contiguous
// stage allocation it implements is this design's own choice.
module in_idmux
  import resizer_pkg::*;
(
  input  lane_cfg_t  cfg      [NUM_LANES],
  input  stage_idx_t base     [NUM_LANES],
  input  logic       lane_clr [NUM_LANES],
  input  samp_t      lane_in  [NUM_LANES],
  input  samp_t      fb       [NUM_LANES],   // rate switch outputs F0..F3
  input  samp_t      comb_out [NUM_STAGES],
  input  samp_t      integ_out[NUM_STAGES],
  output samp_t      comb_in  [NUM_STAGES],
  output samp_t      integ_in [NUM_STAGES],
  output logic [1:0] kdelay   [NUM_STAGES],
  output logic       stage_clr[NUM_STAGES]
);

  always_comb begin
    for (int i = 0; i < NUM_STAGES; i++) begin
      comb_in[i]   = '0;
      integ_in[i]  = '0;
      kdelay[i]    = 2'd1;
      stage_clr[i] = 1'b1;
      for (int l = 0; l < NUM_LANES; l++) begin
        if (cfg[l].nstages != '0 && i >= int'(base[l]) &&
            i < int'(base[l]) + int'(cfg[l].nstages)) begin
          kdelay[i]    = cfg[l].kdelay;
          stage_clr[i] = lane_clr[l];
          if (i == int'(base[l])) begin
            comb_in[i]  = cfg[l].interp ? lane_in[l] : fb[l];
            integ_in[i] = cfg[l].interp ? fb[l] : lane_in[l];
          end else begin
            comb_in[i]  = comb_out[i-1];
            integ_in[i] = integ_out[i-1];
          end
        end
      end
    end
  end

endmodule
