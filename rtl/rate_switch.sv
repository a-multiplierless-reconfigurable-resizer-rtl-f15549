// rate_switch: the sampling-rate switch between the comb and the integrator
// section of one lane (switch R of a CIC filter, generalised to U/D).
//
// Interpolation (cfg.interp = 1): samples from the comb section pass through;
// after every D of them the switch emits U-D zero samples in the following
// cycles (zero padding). The section controller leaves those cycles free.
// Decimation (cfg.interp = 0): of every D valid samples from the integrator
// section the first U are passed and the other D-U are dropped.
// Integer interpolation by R is U=R, D=1; integer decimation by R is U=1, D=R.
// The path is combinational; only the group position counter is a register.
// `clr` restarts the group count with the lane's concurrent register reset.
// The zero-padding and subsampling patterns follow the published poly-phase
// derivation; the counter implementation is this design's own.
module rate_switch
  import resizer_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clr,
  input  lane_cfg_t cfg,
  input  samp_t     in_s,
  output samp_t     out_s
);

  logic [1:0] gpos;    // position in the current group of D input samples
  logic [1:0] zleft;   // zero samples still to insert (interpolation)

  always_comb begin
    out_s = '0;
    if (cfg.interp) begin
      if (in_s.valid)       out_s = in_s;
      else if (zleft != '0) out_s = '{valid: 1'b1, data: '0};
    end else begin
      out_s.data  = in_s.data;
      out_s.valid = in_s.valid && (gpos < cfg.u);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gpos  <= '0;
      zleft <= '0;
    end else if (clr) begin
      gpos  <= '0;
      zleft <= '0;
    end else if (in_s.valid) begin
      if (gpos + 2'd1 >= cfg.d) begin
        gpos  <= '0;
        zleft <= cfg.interp ? cfg.u - cfg.d : 2'd0;
      end else begin
        gpos <= gpos + 2'd1;
      end
    end else if (zleft != '0) begin
      zleft <= zleft - 2'd1;
    end
  end

  // The controller must leave the zero-padding cycles free of new samples.
  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n || clr)
    cfg.interp && zleft != '0 |-> !in_s.valid);

endmodule
