// resizer_pkg: widths, sizes and the per-lane control word shared by the
// multiplierless CIC image resizer.
//
// Pixels are 8-bit. Filter registers are 13 bits: 9 bits for a signed pixel
// plus ceil(3*log2(3)) = 5 bits of growth for the largest gain (9, three
// stages of interpolation by 3). Arithmetic wraps in two's complement, which
// keeps the final CIC result exact as long as it fits in 13 bits.
// Overlap-save sections are N = 11 samples long (N = 6n+5, n = 1), so the
// intermediate block of one resizing process is at most 3*N*N = 363 bytes.
package resizer_pkg;

  localparam int unsigned PIX_W      = 8;   // pixel width
  localparam int unsigned REG_W      = 13;  // CIC register width
  localparam int unsigned SEC_N      = 11;  // overlap-save section length
  localparam int unsigned NUM_STAGES = 7;   // CIC filter stages in the filter set
  localparam int unsigned NUM_LANES  = 4;   // concurrent resizing processes (windows)
  localparam int unsigned MAX_CHAIN  = 3;   // stages one interpolation may use
  localparam int unsigned MAX_DELAY  = 2;   // largest comb differential delay
  localparam int unsigned BUF_ROW    = 3 * SEC_N;          // 33 bytes per buffer row
  localparam int unsigned BUF_BYTES  = BUF_ROW * SEC_N;    // 363 bytes used per buffer
  localparam int unsigned BUF_DEPTH  = 512;                // SRAM512 macro depth

  typedef logic signed [REG_W-1:0] cic_word_t;
  typedef logic [PIX_W-1:0]        pix_t;
  typedef logic [2:0]              stage_idx_t;  // 0..6
  typedef logic [1:0]              chain_t;      // 0..3 stages

  // Resizing rate codes sent by the host (output size / input size).
  typedef enum logic [2:0] {
    RATE_1_3 = 3'd0,
    RATE_1_2 = 3'd1,
    RATE_2_3 = 3'd2,
    RATE_3_2 = 3'd3,
    RATE_2   = 3'd4,
    RATE_3   = 3'd5
  } rate_e;

  // Gain scale-down selection of the post process.
  typedef enum logic [2:0] {
    GAIN_1 = 3'd0,
    GAIN_2 = 3'd1,
    GAIN_4 = 3'd2,
    GAIN_3 = 3'd3,   // scaled by 3/8
    GAIN_9 = 3'd4    // scaled by 1/8
  } gain_e;

  // One sample on a filter path: a valid flag and a CIC register value.
  typedef struct packed {
    logic      valid;
    cic_word_t data;
  } samp_t;

  // Synchronous read latency of the source frame memory and of the internal
  // buffer, in cycles.
  localparam int unsigned RD_LAT = 1;

  // Control word of one lane for one filtering pass, produced by the
  // reconfiguration controller.
  typedef struct packed {
    logic       interp;    // 1: comb -> zero padding -> integrator; 0: integrator -> subsample -> comb
    logic [1:0] u;         // output samples per group (1..3)
    logic [1:0] d;         // input samples per group (1..3)
    logic [1:0] kdelay;    // comb differential delay (interp: D, decim: U)
    chain_t     nstages;   // stages in the chain (1..3)
    gain_e      gain;      // post-process gain code
    logic [1:0] overlap;   // input samples shared with the next section (M-1)
    logic [3:0] discard;   // leading section outputs that are thrown away
  } lane_cfg_t;

endpackage
