// tb_filter_unit -- the transversal filter end to end, bit-true.
// Coefficient sets are shifted in over one sampling period after READY, as
// the loader does. Random and full-scale inputs are applied once per period;
// each output, latched at the start of the next period, must equal the
// reference y(n) = sum h(k) x(n-k) with 12-bit products and output limiting,
// and appear exactly 100 clocks after the previous one. Limiting in both
// directions and a coefficient change while running must each occur.
module tb_filter_unit;
  import ccdf_tb_pkg::*;
  logic clk = 0, rst = 1;
  logic [7:0] adc_data = 0, dac_data;
  logic coef_load = 0, coef_in = 0;
  logic sh_track, adc_start, overflow, ready, sr_clk, fs_clk;
  int checks = 0, failures = 0;
  int n_pos_lim = 0, n_neg_lim = 0, n_loads = 0;

  filter_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic signed [7:0] xin [$];
  logic signed [7:0] h_act [10], h_new [10], h_chk [10], xv [10], yexp;

  initial begin
    int last_ready, nbit;
    bit loading;
    for (int k = 0; k < 10; k++) begin h_act[k] = 0; h_chk[k] = 0; end
    for (int i = 0; i < 10; i++) xin.push_back(0);
    repeat (2) @(posedge clk); rst <= 0;
    last_ready = -1;
    for (int period = 0; period < 300; period++) begin
      // wait for pulse #0
      do @(negedge clk); while (!ready);
      loading = (period % 25 == 1);
      if (loading) begin
        for (int k = 0; k < 10; k++)
          h_new[k] = (period % 50 == 1) ? 8'($urandom) : ((period % 100 == 26) ? 8'sh80 : 8'sh7f);
        n_loads++;
      end
      nbit = 0;
      for (int p = 1; p < 100; p++) begin
        @(negedge clk);
        if (p == 1) begin
          // output of the previous period
          for (int k = 0; k < 10; k++) xv[k] = xin[xin.size() - 1 - k];
          yexp = ref_filter(h_chk, xv);
          checks++;
          if (dac_data !== yexp || overflow !== ref_overflow(h_chk, xv)) begin
            failures++;
            if (failures < 10) $display("period %0d y=%0d exp %0d ovf %b exp %b", period, $signed(dac_data), yexp, overflow, ref_overflow(h_chk, xv));
          end
          if (overflow && yexp == 8'sh7f) n_pos_lim++;
          if (overflow && yexp == 8'sh80) n_neg_lim++;
          h_chk = h_act;  // coefficients used during this period
          adc_data = (period % 10 < 5) ? 8'($urandom) : ((period % 2) ? 8'sh80 : 8'sh7f);
          xin.push_back(adc_data);
          coef_load = loading;
        end
        if (loading && sr_clk) begin
          coef_in = h_new[9 - nbit / 8][nbit % 8];
          nbit++;
        end
      end
      coef_load = 0;
      if (loading) h_act = h_new;
    end
    checks++;
    if (n_pos_lim == 0 || n_neg_lim == 0 || n_loads < 2) begin
      failures++;
      $display("mechanisms: pos limit %0d neg limit %0d loads %0d", n_pos_lim, n_neg_lim, n_loads);
    end
    $display("limits +%0d -%0d, coefficient loads %0d", n_pos_lim, n_neg_lim, n_loads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  // one output per 100 clocks
  int cyc = 0, last = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && ready) begin
      if (last >= 0) begin
        checks++;
        if (cyc - last != 100) failures++;
      end
      last <= cyc;
    end
  end
endmodule
