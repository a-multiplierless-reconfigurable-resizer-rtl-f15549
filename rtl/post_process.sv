// post_process: removes the CIC filter gain without a multiplier.
//
// Gains 1, 2 and 4 are removed by shifting. Gain 3 is scaled by 3/8,
// computed as (v - v/4) / 2, and gain 9 by 1/8, both with shifts and one
// subtraction only. The scaled value is saturated to an 8-bit pixel
// (0..255): 3/8 is larger than 1/3, so a bright area can exceed 255.
// The result is registered: one cycle of latency, out_valid follows in.valid.
// The 3/8 and 1/8 factors follow the published scheme; saturation is an own
// addition.
module post_process
  import resizer_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  gain_e gain,
  input  samp_t in_s,
  output logic  out_valid,
  output pix_t  out_pix
);

  cic_word_t scaled;

  always_comb begin
    unique case (gain)
      GAIN_2:  scaled = in_s.data >>> 1;
      GAIN_4:  scaled = in_s.data >>> 2;
      GAIN_3:  scaled = (in_s.data - (in_s.data >>> 2)) >>> 1;
      GAIN_9:  scaled = in_s.data >>> 3;
      default: scaled = in_s.data;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= in_s.valid;
      if (in_s.valid) begin
        if (scaled < 0)                          out_pix <= '0;
        else if (scaled > cic_word_t'(8'd255))   out_pix <= 8'd255;
        else                                     out_pix <= scaled[PIX_W-1:0];
      end
    end
  end

endmodule
