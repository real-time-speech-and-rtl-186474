// tb_filter_accumulator -- random sums of ten 12-bit products.
// Checks the top 12 bits of the 16-bit sum after each latch, that clear
// empties the register, and that an idle cycle holds it.
module tb_filter_accumulator;
  logic clk = 0, rst = 1, clear = 0, latch = 0;
  logic signed [11:0] product = 0;
  logic signed [11:0] total;
  int checks = 0, failures = 0;
  logic signed [15:0] model;

  filter_accumulator #(.IN_W(12), .ACC_W(16), .OUT_W(12)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input string what);
    checks++;
    if (total !== model[15:4]) begin
      failures++;
      if (failures < 10) $display("%s: got %0d exp %0d", what, total, model[15:4]);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst <= 0;
    for (int r = 0; r < 2000; r++) begin
      clear <= 1; @(posedge clk); clear <= 0; #1; model = 0; chk("clear");
      for (int k = 0; k < 10; k++) begin
        // bias toward extremes to exercise the guard bits
        product <= (r % 3 == 0) ? ((r % 2) ? 12'sh7ff : 12'sh800) : 12'($urandom);
        latch <= 1; @(posedge clk); latch <= 0; #1;
        model = model + 16'(product);
        chk("add");
        @(posedge clk); #1; chk("hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
