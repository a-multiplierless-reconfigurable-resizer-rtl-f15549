// section_ctrl_tb: runs one section per resizing mode and stage count and
// checks the request pattern (11 requests, indexes 0..10, U-D free cycles
// after every D requests for interpolation), lane_valid one cycle after each
// request, the cycle count from start to the single lane_clr/done pulse
// (feed + RD_LAT + 2S (+U-D) flush + 1 clear), and that of P post-process
// outputs the first `discard` are dropped and the rest numbered 0..P-discard-1.
module section_ctrl_tb;
  import resizer_pkg::*;
  import resize_ref_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0, pp_valid = 1'b0;
  lane_cfg_t  cfg = '0;
  logic       busy, done, req, lane_valid, lane_clr, keep;
  logic [3:0] req_idx;
  logic [5:0] keep_idx;
  int         checks = 0, failures = 0;

  section_ctrl dut (.clk, .rst_n, .start, .cfg, .busy, .done, .req, .req_idx,
                    .lane_valid, .lane_clr, .pp_valid, .keep, .keep_idx);

  always #5 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(rate_e rate, int sreq);
    int cyc, nreq, last_req, nclr, nkeep, u, d, s, exp_feed, exp_total, p;
    logic req_d;
    cfg = mk_cfg(rate, sreq);
    u = rate_u(rate); d = rate_d(rate); s = int'(cfg.nstages);
    p = 8 + $urandom_range(0, 3);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0; nreq = 0; nclr = 0; nkeep = 0; req_d = 1'b0; last_req = -1;
    while (1) begin
      // cycle `cyc` after the one in which start was seen
      pp_valid = (cyc >= 3 && cyc < 3 + p);
      #1;
      check(lane_valid == req_d, $sformatf("%s lane_valid cyc %0d", rate.name(), cyc));
      if (req) begin
        int exp_cyc = (nreq / d) * u + (nreq % d);
        if (!cfg.interp) exp_cyc = nreq;
        check(int'(req_idx) == nreq, $sformatf("%s req_idx", rate.name()));
        check(cyc == exp_cyc, $sformatf("%s req %0d at cycle %0d, expected %0d",
                                        rate.name(), nreq, cyc, exp_cyc));
        nreq++;
        last_req = cyc;
      end
      if (keep) begin
        check(int'(keep_idx) == nkeep, $sformatf("%s keep_idx", rate.name()));
        nkeep++;
      end
      req_d = req;
      if (lane_clr) begin
        nclr++;
        check(done, "done with lane_clr");
        break;
      end
      @(negedge clk);
      cyc++;
      if (cyc > 200) break;
    end
    exp_feed  = last_req + 1;
    exp_total = exp_feed + int'(RD_LAT) + 2*s + (cfg.interp ? u - d : 0);
    check(nreq == int'(SEC_N), $sformatf("%s %0d requests", rate.name(), nreq));
    check(nclr == 1 && cyc == exp_total,
          $sformatf("%s S=%0d clear at cycle %0d, expected %0d", rate.name(), s, cyc, exp_total));
    check(exp_feed == (cfg.interp ? (10 / d) * u + 10 % d + 1 : 11), "feed length");
    @(negedge clk);
    pp_valid = 1'b0;
    check(nkeep == p - int'(cfg.discard),
          $sformatf("%s kept %0d of %0d", rate.name(), nkeep, p));
    check(!busy, "idle after the section");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 6; r++)
      for (int s = 1; s <= 3; s++)
        run(rate_e'(r), s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
