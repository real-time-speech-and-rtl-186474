// tb_serial_multiplier -- exhaustive check of the bit-serial multiplier.
// Every pair of 8-bit operands is multiplied with the clear + 8 step
// schedule of the filter; the product is compared with the exact product's
// bits 14..3. Each product must be ready 9 clocks after the clear.
module tb_serial_multiplier;
  import ccdf_tb_pkg::*;
  logic clk = 0, rst = 1, clear = 0, step = 0, sign_step = 0, mbit = 0;
  logic signed [7:0]  mcand = 0;
  logic signed [11:0] product;
  int checks = 0, failures = 0;

  serial_multiplier #(.W(8), .PROD_W(12)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] cf;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int a = -128; a < 128; a++) begin
      for (int b = -128; b < 128; b++) begin
        cf = 8'(b);
        mcand <= 8'(a);
        clear <= 1; @(posedge clk); clear <= 0;
        for (int i = 0; i < 8; i++) begin
          step <= 1; mbit <= cf[i]; sign_step <= (i == 7);
          @(posedge clk);
        end
        step <= 0; sign_step <= 0;
        #1;
        checks++;
        if (product !== ref_product(8'(a), 8'(b))) begin
          failures++;
          if (failures < 10) $display("mismatch %0d*%0d: got %0d exp %0d", a, b, product, ref_product(8'(a), 8'(b)));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
