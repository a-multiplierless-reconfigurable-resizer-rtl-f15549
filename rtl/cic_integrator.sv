// cic_integrator: one CIC integrator stage, y[n] = y[n-1] + x[n] (1/(1-z^-1)).
//
// The accumulator is the stage's only register and is also its output, so
// the stage has one cycle of latency. It advances only on a valid sample;
// out.valid follows in.valid by one cycle. `clr` is the concurrent register
// reset of the lane: it zeroes the accumulator and the valid flag in the same
// cycle as every other register of the lane. Arithmetic wraps at REG_W bits
// (two's complement), as a CIC filter requires. Zero padding reaches the
// integrator as valid samples of value 0.
// The integrator itself follows the published CIC structure; the valid flag
// and the asynchronous power-up reset are this implementation's choices.
module cic_integrator
  import resizer_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clr,
  input  samp_t in_s,
  output samp_t out_s
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_s <= '0;
    end else if (clr) begin
      out_s <= '0;
    end else begin
      out_s.valid <= in_s.valid;
      if (in_s.valid) out_s.data <= out_s.data + in_s.data;
    end
  end

endmodule
