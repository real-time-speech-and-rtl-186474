// tb_fir_design -- FIR workload on the whole design at its default
// parameters: 9-coefficient band-pass designs with a pass band from
// 0.0986 to 0.1826 of the sampling rate, windowed by the generalized Hamming
// window W(k) = Q + (1-Q) cos(2 pi k / N), N = 9, k = -4..4, with Q = 1
// (rectangular) and Q = 0.5 (Hanning).
//
// The testbench computes the ideal band-pass impulse response in closed form
// (a difference of two sinc functions), windows it, rounds it to the filter's
// 8-bit coefficients and places it in h(1)..h(9), h(10) = 0. It loads the
// set from the computer side and drives sine waves of amplitude 0.75 at
// several frequencies through the ADC input. Every output sample is compared
// bit for bit with the reference filter arithmetic; in addition the
// amplitude of the output sine, measured by correlating 256 samples with a
// sine and a cosine, must agree within 0.03 with the magnitude response of
// the rounded coefficients, and the pass band must come out above every
// stop-band frequency tried (nine taps give only a broad band-pass).
module tb_fir_design;
  import ccdf_tb_pkg::*;
  localparam int NF = 6;
  localparam real F_LO = 0.0986, F_HI = 0.1826, PI = 3.14159265358979;
  localparam real FREQS [NF] = '{0.02, 0.10, 0.14, 0.18, 0.30, 0.45};
  logic clk = 0, rst = 1;
  logic [15:0] data_bus = 0, keys = 0;
  logic doa = 0, start = 0, iopulse = 0, clear = 0, step_sw = 0, load_sw = 0;
  logic busy, done, left_ind, right_ind, adc_start, sh_track, overflow;
  logic [3:0] left_nib, right_nib, coef_num;
  logic [7:0] adc_data = 0, dac_data;
  logic signed [7:0] exc_value;
  logic exc_pulse, exc_voiced;
  logic [6:0] exc_amp;
  int checks = 0, failures = 0;

  ccdf_top dut (.*);

  always #500 clk = ~clk;

  initial begin
    #20_000_000_000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic signed [7:0] h_model [10], h_pend [10], h_used [10], xhist [10];
  int n_period = 0;
  real freq = 0.0, phase = 0.0;
  real acc_s = 0.0, acc_c = 0.0;
  int n_acc = 0;
  bit measure = 0;
  bit loaded_seen = 0;

  always @(posedge clk) if (dut.loaded) begin loaded_seen <= 1; h_model <= h_pend; end

  initial begin
    logic signed [7:0] x, expd;
    real v;
    for (int k = 0; k < 10; k++) begin h_model[k] = 0; h_pend[k] = 0; h_used[k] = 0; xhist[k] = 0; end
    forever begin
      @(posedge clk iff adc_start); #1;
      n_period++;
      expd = ref_filter(h_used, xhist);
      if (n_period > 3) begin
        checks++;
        if (dac_data !== expd) begin
          failures++;
          if (failures < 10) $display("period %0d: dac %h exp %h", n_period, dac_data, expd);
        end
      end
      // output sample y(m) belongs to the input phase of period m
      if (measure) begin
        acc_s += $itor($signed(dac_data)) / 128.0 * $sin(2.0 * PI * freq * $itor(n_period));
        acc_c += $itor($signed(dac_data)) / 128.0 * $cos(2.0 * PI * freq * $itor(n_period));
        n_acc++;
      end
      h_used = h_model;
      v = 0.75 * $sin(2.0 * PI * freq * $itor(n_period));
      x = 8'($rtoi(v * 128.0 + ((v >= 0) ? 0.5 : -0.5)));
      adc_data = x;
      for (int k = 9; k > 0; k--) xhist[k] = xhist[k-1];
      xhist[0] = x;
    end
  end

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  task automatic byte_out();
    int g;
    pulse(start);
    g = 0;
    while (!done && g < 1000) begin @(negedge clk); g++; end
    checks++;
    if (!done || busy) begin failures++; $display("no COMP"); end
  endtask

  task automatic word_out(input logic [15:0] w);
    @(negedge clk); data_bus = w; doa = 1; @(negedge clk); doa = 0;
    byte_out(); byte_out();
  endtask

  task automatic run_periods(input int n);
    int t;
    t = n_period + n;
    while (n_period < t) @(negedge clk);
  endtask

  // magnitude response of the rounded coefficients
  function automatic real mag(input logic signed [7:0] h [10], input real f);
    real re, im;
    re = 0; im = 0;
    for (int k = 1; k <= 10; k++) begin
      re += $itor(h[k-1]) / 128.0 * $cos(2.0 * PI * f * k);
      im -= $itor(h[k-1]) / 128.0 * $sin(2.0 * PI * f * k);
    end
    return $sqrt(re * re + im * im);
  endfunction

  initial begin
    logic signed [7:0] h [10];
    real q, hd, want, got, pass_gain, stop_gain;
    int n_bands = 0;
    repeat (5) @(negedge clk); rst = 0;
    pulse(clear);
    for (int win = 0; win < 2; win++) begin
      q = (win == 0) ? 1.0 : 0.5;
      // design: tap n = -4..4 goes to h(n + 5)
      for (int k = 0; k < 10; k++) h[k] = 0;
      for (int n = -4; n <= 4; n++) begin
        if (n == 0) hd = 2.0 * (F_HI - F_LO);
        else hd = ($sin(2.0 * PI * F_HI * n) - $sin(2.0 * PI * F_LO * n)) / (PI * n);
        hd = hd * (q + (1.0 - q) * $cos(2.0 * PI * n / 9.0));
        h[n + 4] = 8'($rtoi(hd * 128.0 + ((hd >= 0) ? 0.5 : -0.5)));
      end
      h_pend = h;
      for (int w = 0; w < 5; w++) word_out({h[8 - 2*w], h[9 - 2*w]});
      loaded_seen = 0;
      pulse(iopulse); byte_out();
      checks++;
      if (!loaded_seen) begin failures++; $display("no transfer"); end
      pass_gain = 0; stop_gain = 0;
      for (int i = 0; i < NF; i++) begin
        freq = FREQS[i];
        run_periods(20);               // let the ten-sample memory fill
        acc_s = 0; acc_c = 0; n_acc = 0; measure = 1;
        run_periods(256);
        measure = 0;
        got  = 2.0 * $sqrt(acc_s * acc_s + acc_c * acc_c) / $itor(n_acc);
        want = 0.75 * mag(h, freq);
        $display("Q=%0.1f f=%0.3f fs: measured %0.3f, from coefficients %0.3f", q, freq, got, want);
        checks++;
        if (got - want > 0.03 || want - got > 0.03) begin failures++; $display("amplitude mismatch"); end
        if (freq > F_LO && freq < F_HI && got > pass_gain) pass_gain = got;
        if ((freq < 0.05 || freq > 0.25) && got > stop_gain) stop_gain = got;
      end
      checks++;
      if (pass_gain <= stop_gain) begin failures++; $display("not a band-pass"); end
      else n_bands++;
    end
    checks++;
    if (n_bands != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
