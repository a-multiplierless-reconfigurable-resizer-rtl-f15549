// sram_512x8_tb: writes random bytes to every address, reads them back in a
// shuffled order with the one-cycle read latency, and checks that a cycle
// without `en` holds the read data.
module sram_512x8_tb;
  import resizer_pkg::*;

  logic       clk = 1'b0, en = 1'b0, we = 1'b0;
  logic [8:0] addr = '0;
  pix_t       wdata = '0, rdata;
  pix_t       model [512];
  int         checks = 0, failures = 0;

  sram_512x8 dut (.clk, .en, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 512; a++) begin
      @(negedge clk);
      en = 1'b1; we = 1'b1; addr = 9'(a);
      wdata = pix_t'($urandom_range(0, 255));
      model[a] = wdata;
    end
    for (int n = 0; n < 1500; n++) begin
      int a = $urandom_range(0, 511);
      @(negedge clk);
      en = 1'b1; we = 1'b0; addr = 9'(a);
      @(negedge clk);
      en = 1'b0; addr = 9'($urandom_range(0, 511));
      checks++;
      if (rdata != model[a]) begin
        failures++;
        if (failures < 10) $display("addr %0d got %0h exp %0h", a, rdata, model[a]);
      end
      @(negedge clk);
      checks++;
      if (rdata != model[a]) failures++;   // held while not enabled
      if (n % 7 == 0) begin
        en = 1'b1; we = 1'b1; wdata = pix_t'($urandom_range(0, 255)); model[addr] = wdata;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
