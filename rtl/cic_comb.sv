// cic_comb: one CIC comb stage, y[n] = x[n] - x[n-K] (1 - z^-K).
//
// K is chosen at run time (1..MAX_DELAY): K = 1 for integer-ratio resizing,
// and K = D (interpolation U/D) or K = U (decimation U/D) for the rational
// ratios 3/2 and 2/3, where the two poly-phase comb branches collapse into a
// single comb with a two-sample delay line. The output is registered (one
// cycle of latency) and the delay line advances only on a valid sample.
// `clr` clears the delay line and the output register in the same cycle as
// every other register of the lane (concurrent register reset).
// The comb and its two-register delay line follow the published poly-phase
// derivation; the selectable delay and the valid flag are own choices.
module cic_comb
  import resizer_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  logic [1:0] kdelay,     // differential delay K, 1..MAX_DELAY
  input  samp_t      in_s,
  output samp_t      out_s
);

  cic_word_t dline [MAX_DELAY];  // dline[0] = x[n-1], dline[1] = x[n-2]
  cic_word_t delayed;

  always_comb begin
    delayed = (kdelay == 2'd2) ? dline[1] : dline[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MAX_DELAY; i++) dline[i] <= '0;
      out_s <= '0;
    end else if (clr) begin
      for (int i = 0; i < MAX_DELAY; i++) dline[i] <= '0;
      out_s <= '0;
    end else begin
      out_s.valid <= in_s.valid;
      if (in_s.valid) begin
        out_s.data <= in_s.data - delayed;
        dline[0]   <= in_s.data;
        for (int i = 1; i < MAX_DELAY; i++) dline[i] <= dline[i-1];
      end
    end
  end

endmodule
