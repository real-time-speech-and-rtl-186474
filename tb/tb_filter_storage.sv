// tb_filter_storage -- data loop and coefficient loop against a model.
// The filter's own control module provides the timing. Each period a new
// random ADC datum is applied. In interval j of a period the multiplicand
// must be x(n-10+j) (the newest datum in the last interval) and the
// multiplying bits must be h(10-j), LSB first. A new coefficient set is
// shifted in during one period and must be in use from the next.
module tb_filter_storage;
  import ccdf_pkg::*;
  logic clk = 0, rst = 1;
  filter_ctrl_t ctrl;
  logic [3:0] cnt_a, cnt_b;
  logic [7:0] adc_data = 0, mcand;
  logic coef_load = 0, coef_in = 0, mult_bit;
  int checks = 0, failures = 0;

  filter_control #(.N_COEF(10), .TICKS(10), .COEF_W(8)) u_ctrl (.*);
  filter_storage #(.N_COEF(10), .DATA_W(8), .COEF_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [7:0] xin [$];        // datum applied in each period
  logic [7:0] h_act [10];     // coefficients in use, h_act[k-1] = h(k)
  logic [7:0] h_new [10];

  initial begin
    int m;
    for (int k = 0; k < 10; k++) h_act[k] = 0;
    for (int i = 0; i < 12; i++) xin.push_back(8'h00);  // loop starts cleared
    repeat (2) @(posedge clk); rst <= 0;
    m = 0;
    for (int period = 0; period < 40; period++) begin
      bit loading;
      int nbit;
      loading = (period % 7 == 3);
      if (loading) for (int k = 0; k < 10; k++) h_new[k] = 8'($urandom);
      nbit = 0;
      for (int p = 0; p < 100; p++) begin
        @(negedge clk);
        if (p == 1) begin
          adc_data = 8'($urandom);
          xin.push_back(adc_data);
          coef_load = loading;
        end
        if (ctrl.mul_step) begin
          int j, i;
          j = p / 10; i = (p % 10) - 1;
          // multiplicand of interval j: x(n-10+j); newest is xin[$]
          checks++;
          if (mcand !== xin[xin.size() - 10 + j]) begin
            failures++;
            if (failures < 10) $display("per %0d int %0d mcand %h exp %h", period, j, mcand, xin[xin.size()-10+j]);
          end
          checks++;
          if (mult_bit !== h_act[9 - j][i]) begin
            failures++;
            if (failures < 10) $display("per %0d int %0d bit %0d got %b", period, j, i, mult_bit);
          end
          if (loading) begin
            coef_in = h_new[9 - nbit / 8][nbit % 8];
            nbit++;
          end
        end
      end
      coef_load = 0;
      if (loading) h_act = h_new;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
