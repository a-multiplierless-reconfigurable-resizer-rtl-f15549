// reconfig_ctrl_tb: applies random window enables, rate codes and requested
// stage counts and checks every lane control word against the expected
// per-rate values, the contiguous stage allocation (base = sum of the earlier
// windows' max(stages_h, stages_v)) and cfg_ok (at most seven stages).
// Each configuration is registered with a load pulse; the inputs are then
// changed without a load and the outputs must not move.
module reconfig_ctrl_tb;
  import resizer_pkg::*;
  import resize_ref_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic       win_en [NUM_LANES];
  rate_e      rate_h [NUM_LANES], rate_v [NUM_LANES];
  chain_t     req_h  [NUM_LANES], req_v  [NUM_LANES];
  lane_cfg_t  cfg_h  [NUM_LANES], cfg_v  [NUM_LANES];
  stage_idx_t base   [NUM_LANES];
  logic       cfg_ok;
  int         checks = 0, failures = 0;
  int         n_ok = 0, n_over = 0;

  always #5 clk = ~clk;

  reconfig_ctrl dut (.clk, .rst_n, .load, .win_en, .rate_h, .rate_v, .req_h, .req_v, .cfg_h, .cfg_v, .base, .cfg_ok);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_hold = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      int total;
      lane_cfg_t was_h, was_v;
      stage_idx_t was_b;
      for (int l = 0; l < NUM_LANES; l++) begin
        win_en[l] = ($urandom_range(0, 4) != 0);
        rate_h[l] = rate_e'($urandom_range(0, 5));
        rate_v[l] = rate_e'($urandom_range(0, 5));
        req_h[l]  = chain_t'($urandom_range(0, 3));
        req_v[l]  = chain_t'($urandom_range(0, 3));
      end
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      total = 0;
      for (int l = 0; l < NUM_LANES; l++) begin
        lane_cfg_t eh, ev;
        eh = mk_cfg(rate_h[l], int'(req_h[l]));
        ev = mk_cfg(rate_v[l], int'(req_v[l]));
        if (!win_en[l]) begin eh.nstages = '0; ev.nstages = '0; end
        check(cfg_h[l] == eh, $sformatf("cfg_h lane %0d rate %s req %0d: %h vs %h",
                                       l, rate_h[l].name(), req_h[l], cfg_h[l], eh));
        check(cfg_v[l] == ev, $sformatf("cfg_v lane %0d", l));
        check(int'(base[l]) == total % 8, $sformatf("base lane %0d", l));
        total += (eh.nstages > ev.nstages) ? int'(eh.nstages) : int'(ev.nstages);
      end
      check(cfg_ok == (total <= 7), "cfg_ok");
      if (total <= 7) n_ok++; else n_over++;
      // change the inputs without a load: outputs must hold
      was_h = cfg_h[1]; was_v = cfg_v[2]; was_b = base[3];
      for (int l = 0; l < NUM_LANES; l++) begin
        win_en[l] = ~win_en[l];
        rate_h[l] = rate_e'((int'(rate_h[l]) + 1) % 6);
        rate_v[l] = rate_e'((int'(rate_v[l]) + 2) % 6);
      end
      @(negedge clk);
      check(cfg_h[1] == was_h && cfg_v[2] == was_v && base[3] == was_b,
            "outputs hold without load");
      n_hold++;
    end
    check(n_hold == 3000, "hold checks run");
    check(n_ok > 0 && n_over > 0, "both legal and oversubscribed allocations seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
