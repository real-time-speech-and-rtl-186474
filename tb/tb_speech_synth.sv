// tb_speech_synth -- the speech-synthesis workload on the whole design at its
// default parameters: ten-coefficient linear-prediction frames of 96 bits,
// one every 150 samples (15 ms at 10 kHz, a 67 Hz update clock), the filter
// closed in the feedback loop with gain 4.
//
// The testbench plays the minicomputer's control program: at each update tick
// (every 150 sampling periods) it sends the six words of the next frame
// (pitch, amplitude + voiced flag, a8..a1, a10, a9; two bytes per word, low
// byte first) and a LOAD, then waits for the next tick. It also plays the
// analog summer: ADC input = excitation + 4 x DAC output, saturated to 8
// bits.
//
// Checks: every DAC sample against the reference all-pole recursion, with the
// coefficient set changing one period after the loader's transfer; the whole
// frame (12 bytes and the load) finishes well inside the 150-sample update
// interval; 96 bits cross the loader per frame; voiced frames give pulses
// exactly 'pitch' samples apart with the frame's amplitude, unvoiced frames
// give +/- amplitude noise. Frames vary in voicing and pitch (40..70
// samples, short enough that a 150-sample frame holds whole pitch periods).
module tb_speech_synth;
  import ccdf_tb_pkg::*;
  localparam int FRAMES = 10, FRAME_LEN = 150;
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
    #5_000_000_000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic signed [7:0] h_model [10], h_pend [10], h_used [10], xhist [10];
  int n_period = 0, bits_moved = 0;
  bit loaded_seen = 0;
  // exciter expectations, switched at the transfer
  logic [7:0] pitch_now = 0, pitch_pend = 0;
  logic [6:0] amp_now = 0, amp_pend = 0;
  bit voiced_now = 0, voiced_pend = 0;
  int last_pulse = -1, n_pulse_gaps = 0, n_noise_pos = 0, n_noise_neg = 0, n_voiced_frames = 0;
  int latch_period = 0;

  always @(posedge clk) begin
    if (dut.loaded) begin
      loaded_seen <= 1; h_model <= h_pend;
      pitch_now <= pitch_pend; amp_now <= amp_pend; voiced_now <= voiced_pend;
      latch_period <= n_period;
    end
    if (dut.u_loader.ext_clk) bits_moved <= bits_moved + 1;
  end

  initial begin
    logic signed [7:0] x, expd;
    int s;
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
      h_used = h_model;
      // the excitation of this period (changed at its start)
      if (n_period > latch_period + 1 && pitch_now != 0) begin
        checks++;
        if (exc_voiced !== voiced_now || exc_amp !== amp_now) begin
          failures++; $display("period %0d: exciter buffers wrong", n_period);
        end else if (voiced_now) begin
          if (exc_value != 0) begin
            if (exc_value !== $signed({1'b0, amp_now})) begin failures++; $display("pulse value %0d", exc_value); end
            if (last_pulse > latch_period + 1) begin
              checks++;
              if (n_period - last_pulse != int'(pitch_now)) begin
                failures++; $display("pulse gap %0d, pitch %0d", n_period - last_pulse, pitch_now);
              end else n_pulse_gaps++;
            end
            last_pulse = n_period;
          end
        end else begin
          if (exc_value == $signed({1'b0, amp_now})) n_noise_pos++;
          else if (exc_value == -$signed({1'b0, amp_now})) n_noise_neg++;
          else begin failures++; $display("noise value %0d", exc_value); end
        end
      end
      s = $signed(exc_value) + 4 * $signed(dac_data);
      x = (s > 127) ? 8'sh7f : (s < -128) ? 8'sh80 : 8'(s);
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

  initial begin
    logic signed [7:0] a [10];
    logic [7:0] pitch;
    logic [6:0] amp;
    bit voiced;
    int t0, used, worst, bits0;
    real r, th;

    repeat (5) @(negedge clk); rst = 0;
    pulse(clear);
    worst = 0;
    for (int f = 0; f < FRAMES; f++) begin
      // wait for the update tick
      while (n_period < f * FRAME_LEN + 2) @(negedge clk);
      t0 = n_period; bits0 = bits_moved;
      // a damped two-pole resonator plus small higher-order terms; the
      // coefficients are a quarter of the real ones (loop gain 4)
      r = 0.80 + 0.01 * $itor(f % 5);
      th = 0.3 + 0.25 * $itor(f % 4);
      for (int k = 0; k < 10; k++) a[k] = 0;
      a[0] = 8'($rtoi(2.0 * r * $cos(th) * 32.0));
      a[1] = 8'($rtoi(-r * r * 32.0));
      a[4] = 8'($signed(4'($urandom)));
      voiced = (f % 3) != 2;
      pitch  = 8'(40 + 10 * (f % 4));
      amp    = voiced ? 7'(40 + f) : 7'(8 + f);
      h_pend = a; pitch_pend = pitch; amp_pend = amp; voiced_pend = voiced;
      if (voiced) n_voiced_frames++;
      word_out({voiced, amp, pitch});
      word_out({a[6], a[7]});
      word_out({a[4], a[5]});
      word_out({a[2], a[3]});
      word_out({a[0], a[1]});
      word_out({a[8], a[9]});
      loaded_seen = 0;
      pulse(iopulse); byte_out();
      checks++;
      if (!loaded_seen) begin failures++; $display("frame %0d: no transfer", f); end
      used = n_period - t0;
      if (used > worst) worst = used;
      checks++;
      if (used >= FRAME_LEN) begin failures++; $display("frame %0d took %0d periods", f, used); end
      checks++;
      if (bits_moved - bits0 != 96) begin failures++; $display("frame %0d moved %0d bits", f, bits_moved - bits0); end
    end
    while (n_period < FRAMES * FRAME_LEN + 2) @(negedge clk);
    $display("frames=%0d worst frame time=%0d of %0d periods, pitch gaps checked=%0d, noise +%0d/-%0d",
             FRAMES, worst, FRAME_LEN, n_pulse_gaps, n_noise_pos, n_noise_neg);
    checks += 2;
    if (n_pulse_gaps == 0) begin failures++; $display("never: voiced pitch pulses"); end
    if (n_noise_pos == 0 || n_noise_neg == 0) begin failures++; $display("never: unvoiced noise"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
