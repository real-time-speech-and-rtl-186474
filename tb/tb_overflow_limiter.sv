// tb_overflow_limiter -- every 12-bit total through the limiter.
// Expected: in-range totals (-128..127 in units of 2^-7) pass as their low
// 8 bits, larger ones give 0x7f, smaller ones 0x80; the flag marks limiting.
// The output must not change without a latch pulse.
module tb_overflow_limiter;
  logic clk = 0, rst = 1, latch = 0;
  logic signed [11:0] total = 0;
  logic signed [7:0]  dac_data;
  logic overflow;
  int checks = 0, failures = 0;

  overflow_limiter #(.IN_W(12), .OUT_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic signed [7:0] exp_d; bit exp_o;
    repeat (2) @(posedge clk); rst <= 0;
    for (int t = -2048; t < 2048; t++) begin
      total <= 12'(t); latch <= 1; @(posedge clk); latch <= 0; #1;
      exp_o = (t > 127) || (t < -128);
      exp_d = (t > 127) ? 8'sh7f : (t < -128) ? 8'sh80 : 8'(t);
      checks++;
      if (dac_data !== exp_d || overflow !== exp_o) begin
        failures++;
        if (failures < 10) $display("t=%0d got %0d/%b exp %0d/%b", t, dac_data, overflow, exp_d, exp_o);
      end
      total <= 12'($urandom); @(posedge clk); #1;
      checks++;
      if (dac_data !== exp_d) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
