// post_process_tb: applies every gain code to a sweep of filter values and
// compares the registered pixel with the reference scale-down (1, 1/2, 1/4,
// 3/8, 1/8, saturated to 0..255), checking the one-cycle latency.
module post_process_tb;
  import resizer_pkg::*;
  import resize_ref_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  gain_e gain = GAIN_1;
  samp_t in_s = '0;
  logic  out_valid;
  pix_t  out_pix;
  int    checks = 0, failures = 0;
  gain_e codes [5] = '{GAIN_1, GAIN_2, GAIN_4, GAIN_3, GAIN_9};
  int    gains [5] = '{1, 2, 4, 3, 9};

  post_process dut (.clk, .rst_n, .gain, .in_s, .out_valid, .out_pix);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int gi = 0; gi < 5; gi++) begin
      for (int v = -40; v < 2400; v += 1) begin
        @(negedge clk);
        gain = codes[gi];
        in_s = '{valid: 1'b1, data: cic_word_t'(v)};
        @(negedge clk);
        in_s.valid = 1'b0;
        checks++;
        if (!out_valid || int'(out_pix) != scale(v, gains[gi])) begin
          failures++;
          if (failures < 10) $display("gain %0d v=%0d got %0d exp %0d", gains[gi], v, out_pix, scale(v, gains[gi]));
        end
      end
    end
    @(negedge clk);
    checks++;
    if (out_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
