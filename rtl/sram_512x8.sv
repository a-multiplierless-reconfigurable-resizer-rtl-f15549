// sram_512x8: internal buffer of one resizing process, a 512 x 8 single-port
// synchronous SRAM (the SRAM512 macro of the chip, written as an array).
//
// One access per cycle: with `we` the byte is written, otherwise `en` reads
// it and rdata holds the word one cycle later (RD_LAT = 1). Only 363 bytes
// are used: an 11-row x 33-column block of horizontally filtered pixels
// waiting for the vertical pass. The contents are not reset.
// The 512 x 8 size follows the published chip; the port protocol is assumed.
module sram_512x8
  import resizer_pkg::*;
#(
  parameter int unsigned DEPTH = BUF_DEPTH
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  pix_t                     wdata,
  output pix_t                     rdata
);

  pix_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
