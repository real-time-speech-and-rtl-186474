// tb_ccdf_top -- end-to-end test of the computer controlled filter at its
// default parameters (400 Hz keyboard scan from a 1 MHz master clock).
//
// The testbench plays the minicomputer (I/O bus with DOA, START, IOPULSE,
// CLEAR, watching BUSY/DONE), the operator at the loader panel, the ADC and,
// in the synthesizer phase, the analog summing amplifier that feeds four
// times the DAC output back to the filter input together with the excitation.
//
// Every sampling period (at the ADC start pulse) the DAC word and the
// overflow flag are compared
// with a reference: the 10-tap filter of the previous ten inputs with the
// coefficients that were in force during the previous period. A coefficient
// set becomes the reference one period after the loader reports the
// transfer done.
//
// Phases: (1) coefficients from the computer, open-loop filtering of random
// and full-scale inputs, so both limiter directions occur; a second set
// replaces the first while the filter runs. (2) Panel: the step switch
// walks through the ten coefficients, two key presses change the displayed
// one, the load switch sends the edited set. (3) CLEAR, then 96-bit
// speech frames (pitch, amplitude and voiced flag, then a8..a1, a10, a9):
// a voiced frame with a pitch pulse train and an unvoiced noise frame, the
// filter closed in the feedback loop. Each mechanism is counted and the test
// fails if any count is zero.
module tb_ccdf_top;
  import ccdf_tb_pkg::*;
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

  always #500 clk = ~clk;   // master clock, 1000 time units per period

  initial begin
    #20_000_000_000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // mechanism counters
  int n_bytes = 0, n_loads = 0, n_pos_lim = 0, n_neg_lim = 0, n_replace = 0;
  int n_step = 0, n_key = 0, n_panel = 0, n_clear = 0, n_voiced = 0;
  int n_unv_pos = 0, n_unv_neg = 0, n_closed = 0, n_period = 0;

  // reference state
  logic signed [7:0] h_model [10];   // set delivered by the last transfer
  logic signed [7:0] h_pend  [10];   // set the next transfer will deliver
  logic signed [7:0] h_used  [10];   // set used in the period just ended
  logic signed [7:0] xhist   [10];   // xhist[k-1] = x(n-k)
  logic [1:0] x_mode = 0;            // 0 random, 1 +full scale, 2 -full scale, 3 closed loop
  bit loaded_seen = 0;

  always @(posedge clk) if (dut.loaded) begin loaded_seen <= 1; h_model <= h_pend; end

  // one process per sampling period: check, then drive the next input
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
        end else if (overflow !== ref_overflow(h_used, xhist)) begin
          failures++;
          if (failures < 10) $display("period %0d: overflow flag %b", n_period, overflow);
        end else if (overflow) begin
          if (expd == 8'sh7f) n_pos_lim++; else n_neg_lim++;
        end
      end
      h_used = h_model;
      case (x_mode)
        0: x = 8'($urandom);
        1: x = 8'sh7f;
        2: x = 8'sh80;
        default: begin
          s = $signed(exc_value) + 4 * $signed(dac_data);   // summer with loop gain 4
          x = (s > 127) ? 8'sh7f : (s < -128) ? 8'sh80 : 8'(s);
          n_closed++;
        end
      endcase
      adc_data = x;
      for (int k = 9; k > 0; k--) xhist[k] = xhist[k-1];
      xhist[0] = x;
    end
  end

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  // one START/COMP exchange: a byte from the output buffer to the loader
  task automatic byte_out();
    int g;
    pulse(start);
    checks++;
    if (!busy || done) begin failures++; $display("START did not set BUSY"); end
    g = 0;
    while (!done && g < 1000) begin @(negedge clk); g++; end
    checks++;
    if (!done || busy) begin failures++; $display("no COMP"); end
    else n_bytes++;
  endtask

  task automatic word_out(input logic [15:0] w);
    @(negedge clk); data_bus = w; doa = 1; @(negedge clk); doa = 0;
    byte_out(); byte_out();
  endtask

  // LOAD: the coefficient set goes to the filter in one sampling period
  task automatic load_cmd(input logic signed [7:0] h [10]);
    loaded_seen = 0;
    if (h != h_model) n_replace++;
    h_pend = h;
    pulse(iopulse); byte_out();
    checks++;
    if (!loaded_seen) begin failures++; $display("LOAD without transfer"); end
    else n_loads++;
  endtask

  // ten coefficients, h(10) first, two per word, low byte first
  task automatic send_coefs(input logic signed [7:0] h [10]);
    for (int w = 0; w < 5; w++) word_out({h[8 - 2*w], h[9 - 2*w]});
  endtask

  // speech frame, bytes: pitch, {voiced, amp}, a8..a1, a10, a9
  task automatic send_frame(input logic [7:0] pitch, input logic [6:0] amp, input bit voiced,
                            input logic signed [7:0] a [10]);
    word_out({voiced, amp, pitch});
    word_out({a[6], a[7]});
    word_out({a[4], a[5]});
    word_out({a[2], a[3]});
    word_out({a[0], a[1]});
    word_out({a[8], a[9]});
    load_cmd(a);
  endtask

  task automatic run_periods(input int n);
    int t;
    t = n_period + n;
    while (n_period < t) @(negedge clk);
  endtask

  // panel switches and keys, held long enough for the 400 Hz scan
  task automatic press_step();
    step_sw = 1; repeat (200_000) @(negedge clk); step_sw = 0; repeat (10_000) @(negedge clk);
  endtask
  task automatic press_key(input int k);
    keys[k] = 1; repeat (50_000) @(negedge clk); keys[k] = 0; repeat (50_000) @(negedge clk);
  endtask

  initial begin
    logic signed [7:0] h1 [10], h2 [10], a [10];
    int last_pulse, gap, n_gap_bad;

    repeat (5) @(negedge clk); rst = 0;
    pulse(clear);

    // phase 1: coefficients from the computer, open loop
    for (int k = 0; k < 10; k++) h1[k] = 8'($urandom_range(0, 80)) - 8'sd40;
    send_coefs(h1); load_cmd(h1);
    run_periods(40);
    for (int k = 0; k < 10; k++) h2[k] = 8'sh60;
    send_coefs(h2); load_cmd(h2);
    run_periods(5);
    x_mode = 1; run_periods(15);
    x_mode = 2; run_periods(15);
    x_mode = 0; run_periods(20);

    // phase 2: panel stepping, key entry, panel load
    for (int k = 0; k < 10; k++) h2[k] = 8'($urandom);
    send_coefs(h2); load_cmd(h2);
    for (int p = 1; p <= 10; p++) begin
      press_step();
      checks++;
      if ({left_nib, right_nib} !== h2[p - 1] || coef_num !== 4'(p - 1)) begin
        failures++; $display("step %0d shows %h%h #%0d", p, left_nib, right_nib, coef_num);
      end else n_step++;
    end
    checks++;
    if (!left_ind) begin failures++; $display("left digit not indicated"); end
    press_key(3);
    checks++;
    if (!right_ind) begin failures++; $display("right digit not indicated"); end
    press_key(12);
    checks++;
    if ({left_nib, right_nib} !== 8'h3c) begin failures++; $display("key entry shows %h%h", left_nib, right_nib); end
    else n_key++;
    h2[9] = 8'sh3c;
    h_pend = h2;
    loaded_seen = 0;
    load_sw = 1; repeat (1000) @(negedge clk); load_sw = 0;
    checks++;
    if (!loaded_seen) begin failures++; $display("load switch did nothing"); end
    else n_panel++;
    n_replace++;
    run_periods(20);

    // phase 3: CLEAR, then speech frames in closed loop
    pulse(start);
    pulse(clear);
    checks++;
    if (busy || done) begin failures++; $display("CLEAR left BUSY/DONE set"); end
    else n_clear++;
    for (int k = 0; k < 10; k++) a[k] = 0;
    a[0] = 8'sh33;  a[1] = -8'sh1a;                     // resonator, poles at radius 0.9 with gain 4
    send_frame(8'd25, 7'd60, 1'b1, a);
    run_periods(2);
    x_mode = 3;
    last_pulse = -1; n_gap_bad = 0;
    for (int i = 0; i < 150; i++) begin
      run_periods(1);
      if (exc_value != 0) begin
        checks++;
        if (exc_value !== 8'd60 || !exc_voiced) begin failures++; $display("voiced value %h", exc_value); end
        if (last_pulse >= 0) begin
          checks++;
          gap = n_period - last_pulse;
          if (gap != 25) begin failures++; $display("pitch gap %0d", gap); end
          else n_voiced++;
        end
        last_pulse = n_period;
      end
    end
    // next frame: unvoiced; the computer sends it while the filter runs
    a[0] = 8'sh10; a[1] = 8'sh08;
    send_frame(8'd0, 7'd12, 1'b0, a);
    run_periods(2);
    for (int i = 0; i < 150; i++) begin
      run_periods(1);
      checks++;
      if (exc_voiced) begin failures++; $display("still voiced"); end
      else if (exc_value == 8'd12) n_unv_pos++;
      else if (exc_value == -8'sd12) n_unv_neg++;
      else begin failures++; $display("unvoiced value %h", exc_value); end
    end
    x_mode = 0;
    run_periods(3);

    $display("mechanisms: bytes=%0d loads=%0d replace=%0d poslim=%0d neglim=%0d step=%0d key=%0d panel=%0d clear=%0d voiced=%0d unv+=%0d unv-=%0d closed=%0d",
             n_bytes, n_loads, n_replace, n_pos_lim, n_neg_lim, n_step, n_key, n_panel,
             n_clear, n_voiced, n_unv_pos, n_unv_neg, n_closed);
    if (n_bytes == 0)   begin failures++; $display("never: byte transfer"); end
    if (n_loads == 0)   begin failures++; $display("never: computer LOAD"); end
    if (n_replace == 0) begin failures++; $display("never: coefficient replacement"); end
    if (n_pos_lim == 0) begin failures++; $display("never: positive limiting"); end
    if (n_neg_lim == 0) begin failures++; $display("never: negative limiting"); end
    if (n_step == 0)    begin failures++; $display("never: step switch"); end
    if (n_key == 0)     begin failures++; $display("never: key entry"); end
    if (n_panel == 0)   begin failures++; $display("never: panel load"); end
    if (n_clear == 0)   begin failures++; $display("never: CLEAR"); end
    if (n_voiced == 0)  begin failures++; $display("never: voiced pitch pulse"); end
    if (n_unv_pos == 0 || n_unv_neg == 0) begin failures++; $display("never: unvoiced noise of both signs"); end
    if (n_closed == 0)  begin failures++; $display("never: closed loop"); end
    checks += 12;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
