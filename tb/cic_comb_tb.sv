// cic_comb_tb: feeds random samples, with idle cycles and clears, through one
// comb stage with differential delay 1 and 2, and compares each output with
// x[n] - x[n-K] taken from the list of valid samples since the last clear.
module cic_comb_tb;
  import resizer_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  logic [1:0] kdelay = 2'd1;
  samp_t      in_s = '0, out_s;
  int         checks = 0, failures = 0;
  int         hist [$];
  int         expv = 0;
  logic       expvalid = 1'b0;

  cic_comb dut (.clk, .rst_n, .clr, .kdelay, .in_s, .out_s);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int kd = 1; kd <= 2; kd++) begin
      @(negedge clk);
      kdelay = 2'(kd);
      clr = 1'b1; in_s = '0; hist = {}; expvalid = 1'b0;
      for (int n = 0; n < 1000; n++) begin
        @(negedge clk);
        if (n > 0) begin
          checks++;
          if (out_s.valid !== expvalid || (expvalid && int'(out_s.data) != expv)) begin
            failures++;
            if (failures < 10) $display("K=%0d n=%0d got %0d exp %0d", kd, n, out_s.data, expv);
          end
        end
        clr = ($urandom_range(0, 60) == 0);
        in_s.valid = ($urandom_range(0, 2) != 0);
        in_s.data  = cic_word_t'($urandom_range(0, 255));
        expvalid = in_s.valid && !clr;
        if (clr) hist = {};
        else if (in_s.valid) begin
          int old;
          hist.push_back(int'(in_s.data));
          old  = (hist.size() > kd) ? hist[hist.size()-1-kd] : 0;
          expv = int'(cic_word_t'(int'(in_s.data) - old));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
