// filter_set_tb: allocates the seven stages to the four lanes in three
// different ways, covering every rate and every stage count, and drives all
// lanes at once with random 11-sample sections (D samples then U-D free
// cycles per group for interpolation), a flush and a lane clear after each.
// Each lane's raw output samples are compared with the closed-form section
// outputs of resize_ref_pkg, and the first output must leave 2*S cycles after
// the first input.
module filter_set_tb;
  import resizer_pkg::*;
  import resize_ref_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  lane_cfg_t  cfg      [NUM_LANES];
  stage_idx_t base     [NUM_LANES];
  logic       lane_clr [NUM_LANES];
  samp_t      lane_in  [NUM_LANES];
  samp_t      lane_out [NUM_LANES];
  int         checks = 0, failures = 0;
  int         cyc = 0;
  int         got [NUM_LANES][$];
  int         first_out [NUM_LANES];

  filter_set dut (.clk, .rst_n, .cfg, .base, .lane_clr, .lane_in, .lane_out);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // collect every valid lane output
  always @(negedge clk) begin
    for (int l = 0; l < NUM_LANES; l++)
      if (lane_out[l].valid) begin
        if (got[l].size() == 0) first_out[l] = cyc;
        got[l].push_back(int'(lane_out[l].data));
      end
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive_lane(int l, rate_e rate, int s);
    sec_t  x = new[SEC_N];
    outq_t y;
    int    u, d, first_in;
    u = rate_u(rate); d = rate_d(rate);
    for (int sec = 0; sec < 3; sec++) begin
      for (int k = 0; k < int'(SEC_N); k++) x[k] = $urandom_range(0, 255);
      y = section_out(rate, s, x);
      got[l] = {};
      @(negedge clk);
      first_in = cyc;
      for (int k = 0; k < int'(SEC_N); k++) begin
        lane_in[l] = '{valid: 1'b1, data: cic_word_t'(x[k])};
        @(negedge clk);
        lane_in[l] = '0;
        if (u > d && (k % d) == d - 1 && k != int'(SEC_N) - 1) repeat (u - d) @(negedge clk);
      end
      repeat (2 * s + u + 1) @(negedge clk);
      check(got[l].size() == y.size(), $sformatf("lane %0d %s S=%0d: %0d outputs, expected %0d",
                                                 l, rate.name(), s, got[l].size(), y.size()));
      for (int i = 0; i < y.size() && i < got[l].size(); i++)
        check(got[l][i] == y[i], $sformatf("lane %0d %s S=%0d out %0d: %0d expected %0d",
                                           l, rate.name(), s, i, got[l][i], y[i]));
      check(first_out[l] - first_in == 2 * s, $sformatf("lane %0d latency %0d", l, first_out[l] - first_in));
      lane_clr[l] = 1'b1;
      @(negedge clk);
      lane_clr[l] = 1'b0;
    end
  endtask

  task automatic round(rate_e r0, int s0, int b0, rate_e r1, int s1, int b1,
                       rate_e r2, int s2, int b2, rate_e r3, int s3, int b3);
    rate_e rr [4] = '{r0, r1, r2, r3};
    int    ss [4] = '{s0, s1, s2, s3};
    int    bb [4] = '{b0, b1, b2, b3};
    for (int l = 0; l < NUM_LANES; l++) begin
      cfg[l]  = mk_cfg(rr[l], ss[l]);
      if (ss[l] == 0) cfg[l].nstages = '0;
      base[l] = stage_idx_t'(bb[l]);
      lane_clr[l] = 1'b1;
      got[l] = {};
    end
    @(negedge clk);
    for (int l = 0; l < NUM_LANES; l++) lane_clr[l] = 1'b0;
    fork
      if (ss[0] != 0) drive_lane(0, rr[0], ss[0]);
      if (ss[1] != 0) drive_lane(1, rr[1], ss[1]);
      if (ss[2] != 0) drive_lane(2, rr[2], ss[2]);
      if (ss[3] != 0) drive_lane(3, rr[3], ss[3]);
    join
    // an unused lane must stay silent
    for (int l = 0; l < NUM_LANES; l++)
      if (ss[l] == 0) check(got[l].size() == 0, "idle lane silent");
  endtask

  initial begin
    for (int l = 0; l < NUM_LANES; l++) begin
      lane_in[l] = '0; lane_clr[l] = 1'b0; cfg[l] = '0; base[l] = '0; first_out[l] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    round(RATE_3, 3, 0,  RATE_2, 2, 3,  RATE_3_2, 1, 5,  RATE_2_3, 1, 6);
    round(RATE_1_2, 1, 0,  RATE_1_3, 1, 1,  RATE_2, 3, 2,  RATE_3, 2, 5);
    round(RATE_2, 1, 1,  RATE_3, 1, 4,  RATE_2_3, 1, 6,  RATE_1_2, 0, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
