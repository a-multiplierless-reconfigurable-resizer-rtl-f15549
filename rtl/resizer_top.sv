// resizer_top: multiplierless reconfigurable image resizer for four windows.
//
// Four resizing processes (resize_engine), each with its own 512 x 8 internal
// buffer, share one filter set of seven CIC filter stages. At the start of a
// frame the host gives each window its source size, a resizing rate code
// (1/3, 1/2, 2/3, 3/2, 2 or 3) and a requested stage count for the horizontal
// and the vertical pass, and pulses cfg_load; the reconfiguration controller
// registers them and turns them into lane control words and a stage
// allocation, valid from the next cycle. frame_start is ignored unless the
// loaded allocation fits (cfg_ok) and the window is enabled in it. Each
// window reads its source image through its own block-in read port (data
// RD_LAT = 1 cycle after the request) and emits
// resized pixels with their output coordinates. Windows run independently;
// frame_done pulses per window when its frame is finished.
// Source images live outside the chip; their read ports are top-level ports.
// The composition follows the published chip; port names and the
// independent scheduling of the windows are this design's own.
module resizer_top
  import resizer_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // host configuration, registered by cfg_load
  input  logic        cfg_load,
  input  logic        win_en     [NUM_LANES],
  input  rate_e       rate_h     [NUM_LANES],
  input  rate_e       rate_v     [NUM_LANES],
  input  chain_t      stages_h   [NUM_LANES],
  input  chain_t      stages_v   [NUM_LANES],
  input  logic [9:0]  src_w      [NUM_LANES],
  input  logic [9:0]  src_h      [NUM_LANES],
  input  logic        frame_start[NUM_LANES],
  output logic        cfg_ok,
  output logic        busy       [NUM_LANES],
  output logic        frame_done [NUM_LANES],
  // source image read ports
  output logic        src_rd     [NUM_LANES],
  output logic [9:0]  src_x      [NUM_LANES],
  output logic [9:0]  src_y      [NUM_LANES],
  input  pix_t        src_data   [NUM_LANES],
  // resized pixels
  output logic        out_valid  [NUM_LANES],
  output logic [10:0] out_x      [NUM_LANES],
  output logic [10:0] out_y      [NUM_LANES],
  output pix_t        out_pix    [NUM_LANES]
);

  logic       en_q    [NUM_LANES];
  lane_cfg_t  cfg_h   [NUM_LANES];
  lane_cfg_t  cfg_v   [NUM_LANES];
  stage_idx_t base    [NUM_LANES];
  lane_cfg_t  lane_cfg[NUM_LANES];
  logic       lane_clr[NUM_LANES];
  samp_t      lane_in [NUM_LANES];
  samp_t      lane_out[NUM_LANES];

  reconfig_ctrl u_reconfig (
    .clk, .rst_n, .load(cfg_load), .win_en, .rate_h, .rate_v, .req_h(stages_h), .req_v(stages_v),
    .cfg_h, .cfg_v, .base, .cfg_ok
  );

  filter_set u_filter_set (
    .clk, .rst_n, .cfg(lane_cfg), .base, .lane_clr, .lane_in, .lane_out
  );

  for (genvar l = 0; l < NUM_LANES; l++) begin : g_win
    assign en_q[l] = (cfg_h[l].nstages != '0);
    resize_engine u_engine (
      .clk, .rst_n,
      .frame_start(frame_start[l] && en_q[l] && cfg_ok),
      .src_w(src_w[l]), .src_h(src_h[l]),
      .cfg_h(cfg_h[l]), .cfg_v(cfg_v[l]),
      .busy(busy[l]), .frame_done(frame_done[l]),
      .src_rd(src_rd[l]), .src_x(src_x[l]), .src_y(src_y[l]), .src_data(src_data[l]),
      .lane_cfg(lane_cfg[l]), .lane_clr(lane_clr[l]),
      .lane_in(lane_in[l]), .lane_out(lane_out[l]),
      .out_valid(out_valid[l]), .out_x(out_x[l]), .out_y(out_y[l]), .out_pix(out_pix[l])
    );
  end

endmodule
