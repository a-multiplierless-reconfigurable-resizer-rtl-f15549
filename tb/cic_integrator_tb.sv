// cic_integrator_tb: drives random valid/idle samples into one integrator and
// compares its output with a running sum (wrapped to 13 bits); checks that
// idle cycles hold the sum, the one-cycle latency of out.valid, and that clr
// zeroes the accumulator.
module cic_integrator_tb;
  import resizer_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  samp_t in_s = '0, out_s;
  int    checks = 0, failures = 0;
  int    model = 0;
  logic  vprev = 1'b0;

  cic_integrator dut (.clk, .rst_n, .clr, .in_s, .out_s);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int wrap13(int v);
    return int'(cic_word_t'(v));
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // check the result of the previous edge
      checks++;
      if (out_s.valid !== vprev || int'(out_s.data) != wrap13(model)) begin
        failures++;
        if (failures < 10) $display("mismatch n=%0d got %0d/%0b exp %0d/%0b",
                                    n, out_s.data, out_s.valid, wrap13(model), vprev);
      end
      clr = ($urandom_range(0, 99) == 0);
      in_s.valid = ($urandom_range(0, 3) != 0);
      in_s.data  = cic_word_t'($urandom_range(0, 600) - 100);
      vprev = in_s.valid && !clr;
      if (clr) model = 0;
      else if (in_s.valid) model = wrap13(model + int'(in_s.data));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
