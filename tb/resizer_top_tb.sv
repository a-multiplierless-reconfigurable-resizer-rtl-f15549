// resizer_top_tb: end-to-end test of the four-window resizer at its default
// sizes. Each window has a behavioural source frame memory (one-cycle read)
// holding a random image. Three phases:
//   1. four small windows with a seven-stage allocation covering every rate;
//   2. an over-allocated configuration (eight stages): cfg_ok must drop and
//      frame_start must be ignored;
// The configuration is loaded with cfg_load before each frame, and the host
// inputs are changed while the frame runs to show that the loaded
// configuration holds.
//   3. four 320 x 200 windows (the chip's workload size) with another
//      allocation, run concurrently, including the slowest window (x3 both
//      ways, three stages); the frame must fit 30 frames/s at 55 MHz.
// Every output pixel of every window is compared with the block-in
// reference frame, and each expected pixel must appear exactly once.
// Mechanisms counted (each must occur): concurrent lane clears, zero padding
// and subsampling in the rate switches, cascaded chains, clamped edge reads,
// 3/8 and 1/8 gain scaling, output saturation, horizontal/vertical
// reconfiguration of a lane, and a rejected configuration.
module resizer_top_tb;
  import resizer_pkg::*;
  import resize_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        win_en [NUM_LANES];
  rate_e       rate_h [NUM_LANES], rate_v [NUM_LANES];
  chain_t      stages_h [NUM_LANES], stages_v [NUM_LANES];
  logic [9:0]  src_w [NUM_LANES], src_h [NUM_LANES];
  logic        frame_start [NUM_LANES];
  logic        cfg_load;
  logic        cfg_ok;
  logic        busy [NUM_LANES], frame_done [NUM_LANES];
  logic        src_rd [NUM_LANES];
  logic [9:0]  src_x [NUM_LANES], src_y [NUM_LANES];
  pix_t        src_data [NUM_LANES];
  logic        out_valid [NUM_LANES];
  logic [10:0] out_x [NUM_LANES], out_y [NUM_LANES];
  pix_t        out_pix [NUM_LANES];

  int checks = 0, failures = 0;
  int img0 [], img1 [], img2 [], img3 [];
  int exp0 [int], exp1 [int], exp2 [int], exp3 [int];
  int seen0 [int], seen1 [int], seen2 [int], seen3 [int];
  int bad [NUM_LANES];
  int dup [NUM_LANES];
  int npix [NUM_LANES];
  logic done_seen [NUM_LANES];

  // mechanism counters
  int n_clr, n_zero, n_drop, n_chain, n_clamp, n_g38, n_g18, n_sat, n_reconf, n_reject;

  resizer_top dut (.*);

  always #5 clk = ~clk;

  // behavioural source frame memories
  int a [NUM_LANES];
  for (genvar l = 0; l < NUM_LANES; l++) begin : g_mem
    assign a[l] = 32'(src_y[l]) * 32'(src_w[l]) + 32'(src_x[l]);
  end
  always @(posedge clk) begin
    if (src_rd[0]) src_data[0] <= pix_t'(img0[a[0]]);
    if (src_rd[1]) src_data[1] <= pix_t'(img1[a[1]]);
    if (src_rd[2]) src_data[2] <= pix_t'(img2[a[2]]);
    if (src_rd[3]) src_data[3] <= pix_t'(img3[a[3]]);
  end

  // output checkers
  task automatic take(int l, ref int e [int], ref int s [int]);
    int key;
    key = 32'(out_y[l]) * 2048 + 32'(out_x[l]);
    npix[l]++;
    if (!e.exists(key) || e[key] != int'(out_pix[l])) begin
      bad[l]++;
      if (bad[l] < 4) $display("window %0d pixel (%0d,%0d) = %0d expected %0d", l,
                               out_x[l], out_y[l], out_pix[l], e.exists(key) ? e[key] : -1);
    end
    if (s.exists(key)) dup[l]++;
    s[key] = 1;
  endtask

  always @(negedge clk) begin
    if (out_valid[0]) take(0, exp0, seen0);
    if (out_valid[1]) take(1, exp1, seen1);
    if (out_valid[2]) take(2, exp2, seen2);
    if (out_valid[3]) take(3, exp3, seen3);
    for (int l = 0; l < NUM_LANES; l++) if (frame_done[l]) done_seen[l] = 1'b1;
  end

  // mechanism observation
  for (genvar l = 0; l < NUM_LANES; l++) begin : g_obs
    always @(posedge clk) if (rst_n) begin
      if (dut.g_win[l].u_engine.lane_clr) n_clr++;
      if (dut.u_filter_set.g_switch[l].u_switch.out_s.valid &&
          !dut.u_filter_set.g_switch[l].u_switch.in_s.valid) n_zero++;
      if (!dut.u_filter_set.g_switch[l].u_switch.out_s.valid &&
          dut.u_filter_set.g_switch[l].u_switch.in_s.valid) n_drop++;
      if (dut.g_win[l].u_engine.lane_clr && dut.g_win[l].u_engine.lane_cfg.nstages > 2'd1) n_chain++;
      if (src_rd[l] && 11'(dut.g_win[l].u_engine.bx0) + 11'(dut.g_win[l].u_engine.sc_idx) >= 11'(src_w[l])) n_clamp++;
      if (dut.g_win[l].u_engine.u_post.in_s.valid) begin
        if (dut.g_win[l].u_engine.u_post.gain == GAIN_3) n_g38++;
        if (dut.g_win[l].u_engine.u_post.gain == GAIN_9) n_g18++;
        if (dut.g_win[l].u_engine.u_post.scaled > 13'sd255) n_sat++;
      end
      if (dut.g_win[l].u_engine.state == 3'd3 &&
          dut.g_win[l].u_engine.cfg_h != dut.g_win[l].u_engine.cfg_v) n_reconf++;
    end
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic setup(int l, int w, int h, rate_e rh, int sh, rate_e rv, int sv);
    int ow, oh;
    win_en[l] = 1'b1;
    rate_h[l] = rh; rate_v[l] = rv;
    stages_h[l] = chain_t'(sh); stages_v[l] = chain_t'(sv);
    src_w[l] = 10'(w); src_h[l] = 10'(h);
    bad[l] = 0; dup[l] = 0; npix[l] = 0; done_seen[l] = 1'b0;
    unique case (l)
      0: begin img0 = new[w*h]; foreach (img0[i]) img0[i] = $urandom_range(0, 255);
               ref_frame(img0, w, h, rh, sh, rv, sv, exp0, ow, oh); seen0.delete(); end
      1: begin img1 = new[w*h]; foreach (img1[i]) img1[i] = $urandom_range(0, 255);
               ref_frame(img1, w, h, rh, sh, rv, sv, exp1, ow, oh); seen1.delete(); end
      2: begin img2 = new[w*h]; foreach (img2[i]) img2[i] = $urandom_range(0, 255);
               ref_frame(img2, w, h, rh, sh, rv, sv, exp2, ow, oh); seen2.delete(); end
      default: begin img3 = new[w*h]; foreach (img3[i]) img3[i] = $urandom_range(0, 255);
               ref_frame(img3, w, h, rh, sh, rv, sv, exp3, ow, oh); seen3.delete(); end
    endcase
    $display("window %0d: %0dx%0d %s(S=%0d) x %s(S=%0d) -> %0dx%0d", l, w, h,
             rh.name(), sh, rv.name(), sv, ow, oh);
  endtask

  task automatic load_cfg();
    @(negedge clk);
    cfg_load = 1'b1;
    @(negedge clk);
    cfg_load = 1'b0;
  endtask

  task automatic run_frame(string name);
    int t;
    rate_e  keep_rh [NUM_LANES], keep_rv [NUM_LANES];
    chain_t keep_sh [NUM_LANES], keep_sv [NUM_LANES];
    load_cfg();
    check(cfg_ok, {name, ": configuration accepted"});
    for (int l = 0; l < NUM_LANES; l++) frame_start[l] = 1'b1;
    @(negedge clk);
    for (int l = 0; l < NUM_LANES; l++) frame_start[l] = 1'b0;
    // the host may change its inputs once the frame has started; the loaded
    // configuration must hold until the next cfg_load
    for (int l = 0; l < NUM_LANES; l++) begin
      keep_rh[l] = rate_h[l]; keep_rv[l] = rate_v[l];
      keep_sh[l] = stages_h[l]; keep_sv[l] = stages_v[l];
      rate_h[l] = RATE_1_3; rate_v[l] = RATE_3; stages_h[l] = 2'd3; stages_v[l] = 2'd3;
    end
    t = 0;
    while (!(done_seen[0] && done_seen[1] && done_seen[2] && done_seen[3]) && t < 2900000) begin
      @(negedge clk);
      t++;
    end
    for (int l = 0; l < NUM_LANES; l++) begin
      rate_h[l] = keep_rh[l]; rate_v[l] = keep_rv[l];
      stages_h[l] = keep_sh[l]; stages_v[l] = keep_sv[l];
    end
    $display("%s: frame done after %0d cycles", name, t);
    // 30 frames/s at a 55 MHz clock leaves 55e6/30 = 1,833,333 cycles per frame
    check(t <= 1833333, {name, ": frame fits 30 frames/s at 55 MHz"});
    check(seen0.size() == exp0.size() && bad[0] == 0 && dup[0] == 0, {name, ": window 0 image"});
    check(seen1.size() == exp1.size() && bad[1] == 0 && dup[1] == 0, {name, ": window 1 image"});
    check(seen2.size() == exp2.size() && bad[2] == 0 && dup[2] == 0, {name, ": window 2 image"});
    check(seen3.size() == exp3.size() && bad[3] == 0 && dup[3] == 0, {name, ": window 3 image"});
    for (int l = 0; l < NUM_LANES; l++) begin
      checks += npix[l];
      failures += bad[l];
    end
  endtask

  initial begin
    n_clr = 0; n_zero = 0; n_drop = 0; n_chain = 0; n_clamp = 0;
    n_g38 = 0; n_g18 = 0; n_sat = 0; n_reconf = 0; n_reject = 0;
    for (int l = 0; l < NUM_LANES; l++) begin
      win_en[l] = 1'b0; frame_start[l] = 1'b0; cfg_load = 1'b0; src_w[l] = 10'd1; src_h[l] = 10'd1;
      rate_h[l] = RATE_2; rate_v[l] = RATE_2; stages_h[l] = 2'd1; stages_v[l] = 2'd1;
      src_data[l] = '0;
    end
    img0 = new[1]; img1 = new[1]; img2 = new[1]; img3 = new[1];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. small windows, seven stages, every rate
    setup(0, 23, 19, RATE_2, 3, RATE_3, 3);
    setup(1, 21, 17, RATE_2, 2, RATE_3_2, 1);
    setup(2, 30, 25, RATE_1_2, 1, RATE_2_3, 1);
    setup(3, 26, 14, RATE_1_3, 1, RATE_3, 1);
    run_frame("small");

    // 2. eight stages requested: rejected
    rate_h[2] = RATE_2; stages_h[2] = 2'd2;
    load_cfg();
    check(!cfg_ok, "over-allocation flagged");
    for (int l = 0; l < NUM_LANES; l++) frame_start[l] = 1'b1;
    @(negedge clk);
    for (int l = 0; l < NUM_LANES; l++) frame_start[l] = 1'b0;
    repeat (5) @(negedge clk);
    if (!busy[0] && !busy[1] && !busy[2] && !busy[3]) n_reject++;
    check(!busy[0] && !busy[1] && !busy[2] && !busy[3], "frame_start ignored");

    // 3. four 320 x 200 windows
    setup(0, 320, 200, RATE_3, 3, RATE_3, 3);
    setup(1, 320, 200, RATE_3_2, 1, RATE_3_2, 1);
    setup(2, 320, 200, RATE_2_3, 1, RATE_1_2, 1);
    setup(3, 320, 200, RATE_3, 1, RATE_1_3, 1);
    run_frame("320x200");

    $display("mechanisms: clears=%0d zero_pads=%0d drops=%0d chained=%0d clamped=%0d g3/8=%0d g1/8=%0d sat=%0d reconf=%0d reject=%0d",
             n_clr, n_zero, n_drop, n_chain, n_clamp, n_g38, n_g18, n_sat, n_reconf, n_reject);
    check(n_clr > 0, "concurrent clear");
    check(n_zero > 0, "zero padding");
    check(n_drop > 0, "subsampling");
    check(n_chain > 0, "cascaded stages");
    check(n_clamp > 0, "edge clamping");
    check(n_g38 > 0, "3/8 scaling");
    check(n_g18 > 0, "1/8 scaling");
    check(n_sat > 0, "saturation");
    check(n_reconf > 0, "pass reconfiguration");
    check(n_reject > 0, "rejected configuration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
