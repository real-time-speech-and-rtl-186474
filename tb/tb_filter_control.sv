// tb_filter_control -- decode of the 100-clock sampling period.
// An independent cycle counter gives the pulse number p; each control output
// is checked against the schedule every clock, and the number of pulses per
// period is counted (80 shift clocks, 10 multiplicand loads, one READY).
module tb_filter_control;
  import ccdf_pkg::*;
  logic clk = 0, rst = 1;
  filter_ctrl_t ctrl;
  logic [3:0] cnt_a, cnt_b;
  int checks = 0, failures = 0;

  filter_control #(.N_COEF(10), .TICKS(10), .COEF_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic expect_bit(input logic got, input logic want, input string name, input int p);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 20) $display("p=%0d %s got %b want %b", p, name, got, want);
    end
  endtask

  initial begin
    int n_sr, n_par, n_ready;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int period = 0; period < 5; period++) begin
      n_sr = 0; n_par = 0; n_ready = 0;
      for (int p = 0; p < 100; p++) begin
        int a, b;
        @(negedge clk);
        a = p % 10; b = p / 10;
        expect_bit(ctrl.ready,       p == 0, "ready", p);
        expect_bit(ctrl.out_latch,   p == 0, "out_latch", p);
        expect_bit(ctrl.acc_clear,   p == 0, "acc_clear", p);
        expect_bit(ctrl.sh_track,    p == 0, "sh_track", p);
        expect_bit(ctrl.fs_clk,      p == 0, "fs_clk", p);
        expect_bit(ctrl.adc_start,   p == 1, "adc_start", p);
        expect_bit(ctrl.mul_clear,   a == 0, "mul_clear", p);
        expect_bit(ctrl.mul_step,    a >= 1 && a <= 8, "mul_step", p);
        expect_bit(ctrl.sr_clk,      a >= 1 && a <= 8, "sr_clk", p);
        expect_bit(ctrl.sign_bit,    a == 8, "sign_bit", p);
        expect_bit(ctrl.par_in,      a == 9, "par_in", p);
        expect_bit(ctrl.st_latch,    p == 79, "st_latch", p);
        expect_bit(ctrl.data_insert, p == 89, "data_insert", p);
        checks++;
        if (cnt_a != 4'(a) || cnt_b != 4'(b)) failures++;
        n_sr += ctrl.sr_clk; n_par += ctrl.par_in; n_ready += ctrl.ready;
        @(posedge clk);
      end
      checks++;
      if (n_sr != 80 || n_par != 10 || n_ready != 1) begin
        failures++;
        $display("period counts sr=%0d par=%0d ready=%0d", n_sr, n_par, n_ready);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
