// resize_engine_tb: one resizing process on lane 0 of a filter set, reading a
// random source image from a behavioural frame memory (one-cycle read). For
// several horizontal/vertical rate pairs it runs a whole frame and checks
// every output pixel and coordinate against the block-in reference frame,
// that each expected pixel appears exactly once, that frame_done pulses, and
// the frame's cycle count: per block 11 horizontal and keep_h vertical
// sections of 2 + feed + RD_LAT + 2S (+U-D) cycles each.
module resize_engine_tb;
  import resizer_pkg::*;
  import resize_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, frame_start = 1'b0;
  logic [9:0]  src_w, src_h;
  lane_cfg_t   cfg_h, cfg_v;
  logic        busy, frame_done, src_rd;
  logic [9:0]  src_x, src_y;
  pix_t        src_data;
  lane_cfg_t   lane_cfg [NUM_LANES];
  stage_idx_t  base     [NUM_LANES];
  logic        lane_clr [NUM_LANES];
  samp_t       lane_in  [NUM_LANES];
  samp_t       lane_out [NUM_LANES];
  logic        out_valid;
  logic [10:0] out_x, out_y;
  pix_t        out_pix;
  int          checks = 0, failures = 0;
  int          img [];
  int          exp_px [int];
  int          seen [int];
  int          cyc = 0;

  resize_engine dut (
    .clk, .rst_n, .frame_start, .src_w, .src_h, .cfg_h, .cfg_v, .busy, .frame_done,
    .src_rd, .src_x, .src_y, .src_data,
    .lane_cfg(lane_cfg[0]), .lane_clr(lane_clr[0]), .lane_in(lane_in[0]), .lane_out(lane_out[0]),
    .out_valid, .out_x, .out_y, .out_pix
  );

  filter_set u_fs (.clk, .rst_n, .cfg(lane_cfg), .base, .lane_clr, .lane_in, .lane_out);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // behavioural source frame memory
  int rd_addr;
  assign rd_addr = 32'(src_y) * 32'(src_w) + 32'(src_x);
  always @(posedge clk) if (src_rd) src_data <= pix_t'(img[rd_addr]);

  always @(negedge clk) begin
    if (out_valid) begin
      int key;
      key = 32'(out_y) * 2048 + 32'(out_x);
      checks++;
      if (!exp_px.exists(key) || exp_px[key] != int'(out_pix) || seen.exists(key)) begin
        failures++;
        if (failures < 10) $display("pixel (%0d,%0d) = %0d, expected %0d", out_x, out_y, out_pix,
                                    exp_px.exists(key) ? exp_px[key] : -1);
      end
      seen[key] = 1;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sec_cycles(rate_e r, int s);
    int u = rate_u(r), d = rate_d(r);
    if (u > d) return 2 + (10 / d) * u + 10 % d + 1 + int'(RD_LAT) + 2 * s + (u - d);
    return 2 + 11 + int'(RD_LAT) + 2 * s;
  endfunction

  task automatic run(int w, int h, rate_e rh, int sh, rate_e rv, int sv);
    int ow, oh, t0, nblk, kh, exp_cyc;
    src_w = 10'(w); src_h = 10'(h);
    cfg_h = mk_cfg(rh, sh); cfg_v = mk_cfg(rv, sv);
    lane_cfg[1] = '0; lane_cfg[2] = '0; lane_cfg[3] = '0;
    img = new[w * h];
    foreach (img[i]) img[i] = $urandom_range(0, 255);
    ref_frame(img, w, h, rh, sh, rv, sv, exp_px, ow, oh);
    seen.delete();
    @(negedge clk);
    frame_start = 1'b1;
    t0 = cyc;
    @(negedge clk);
    frame_start = 1'b0;
    while (!frame_done) @(negedge clk);
    // cycle count
    kh = (y_len(rh, sh)) - discard(rh, sh);
    nblk = 0;
    for (int y0 = 0; ; y0 += 11 - overlap(rv, eff_stages(rv, sv))) begin
      for (int x0 = 0; ; x0 += 11 - overlap(rh, eff_stages(rh, sh))) begin
        nblk++;
        if (!(x0 + 11 < w)) break;
      end
      if (!(y0 + 11 < h)) break;
    end
    exp_cyc = nblk * (11 * sec_cycles(rh, eff_stages(rh, sh)) + kh * sec_cycles(rv, eff_stages(rv, sv)));
    checks++;
    if (cyc - t0 != exp_cyc + 1) begin
      failures++;
      $display("%s/%s frame took %0d cycles, expected %0d", rh.name(), rv.name(), cyc - t0, exp_cyc + 1);
    end
    checks++;
    if (seen.size() != exp_px.size() || exp_px.size() != ow * oh) begin
      failures++;
      $display("%s/%s: %0d pixels written, %0d expected (%0dx%0d)", rh.name(), rv.name(),
               seen.size(), exp_px.size(), ow, oh);
    end
    @(negedge clk);
    checks++;
    if (busy) failures++;
  endtask

  // raw outputs of one section of a mode
  function automatic int y_len(rate_e r, int s);
    sec_t x = new[SEC_N];
    outq_t y;
    y = section_out(r, eff_stages(r, s), x);
    return y.size();
  endfunction

  initial begin
    for (int l = 0; l < NUM_LANES; l++) begin base[l] = '0; lane_cfg[l] = '0; end
    src_w = 10'd1; src_h = 10'd1; cfg_h = '0; cfg_v = '0;
    img = new[1];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(25, 23, RATE_3, 3, RATE_2, 2);
    run(31, 24, RATE_1_2, 1, RATE_1_3, 1);
    run(22, 27, RATE_3_2, 1, RATE_2_3, 1);
    run(20, 13, RATE_2, 1, RATE_3, 1);
    run(17, 19, RATE_2, 3, RATE_3, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
