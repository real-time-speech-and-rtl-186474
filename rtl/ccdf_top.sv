// ccdf_top -- computer controlled transversal filter with speech exciter.
//
// A minicomputer loads ten 8-bit coefficients, byte by byte, into a loader;
// on command the loader moves them into a 10-tap transversal filter in one
// sampling period, so the filter can be time-varying. With the exciter, the
// same path carries 16 more bits per set (pitch, amplitude, voiced flag) and
// the filter, closed in an analog feedback loop, becomes an all-pole
// linear-prediction speech synthesizer.
//
// Units: computer_output (output buffer, BUSY/DONE), loader_unit,
// filter_unit, prbs_noise and exciter. The analog parts are outside: the
// sample-and-hold (sh_track), the ADC (adc_start, adc_data), the DAC
// (dac_data), the summing amplifier that closes the loop, and the multiplying
// DAC of the exciter (exc_pulse, exc_voiced, exc_amp; exc_value is the same
// product in digital form). The computer side is the I/O bus of the
// minicomputer as seen by this device: data_bus with DOA, START, IOPULSE,
// CLEAR strobes and the BUSY/DONE flags. All strobes are one master clock
// wide. Master clock = 100 x sampling rate.
module ccdf_top #(
  parameter int SCAN_DIV = 2500
) (
  input  logic        clk,
  input  logic        rst,
  // computer I/O bus
  input  logic [15:0] data_bus,
  input  logic        doa,
  input  logic        start,
  input  logic        iopulse,
  input  logic        clear,
  output logic        busy,
  output logic        done,
  // loader panel
  input  logic [15:0] keys,
  input  logic        step_sw,
  input  logic        load_sw,
  output logic [3:0]  left_nib,
  output logic [3:0]  right_nib,
  output logic [3:0]  coef_num,
  output logic        left_ind,
  output logic        right_ind,
  // filter analog interface
  input  logic [7:0]  adc_data,
  output logic        adc_start,
  output logic        sh_track,
  output logic [7:0]  dac_data,
  output logic        overflow,
  // exciter
  output logic signed [7:0] exc_value,
  output logic        exc_pulse,
  output logic        exc_voiced,
  output logic [6:0]  exc_amp
);

  logic sr_clk, ready, fs_clk;
  logic comp, xfer, ser_data;
  logic coef_load, ldr_data, ext_clk, loaded;
  logic noise;

  computer_output #(.W(16)) u_cpu_out (
    .clk, .rst, .data_bus, .doa, .start, .clear, .comp, .sr_clk, .xfer,
    .ser_data, .busy, .done
  );

  loader_unit #(.SCAN_DIV(SCAN_DIV)) u_loader (
    .clk, .rst, .sr_clk, .ready, .start, .iopulse, .clear,
    .comp_data(ser_data), .keys, .step_sw, .load_sw,
    .comp, .xfer, .coef_load, .data_out(ldr_data), .ext_clk, .loaded,
    .left_nib, .right_nib, .coef_num, .left_ind, .right_ind
  );

  filter_unit u_filter (
    .clk, .rst, .adc_data, .coef_load, .coef_in(ldr_data),
    .sh_track, .adc_start, .dac_data, .overflow, .ready, .sr_clk, .fs_clk
  );

  prbs_noise #(.LFSR_W(15)) u_noise (
    .clk, .rst, .en(fs_clk), .noise
  );

  exciter #(.PITCH_W(8), .AMP_W(7)) u_exc (
    .clk, .rst, .fs_clk, .ext_clk, .ext_data(ldr_data), .latch(loaded),
    .noise, .exc_value, .pulse(exc_pulse), .voiced(exc_voiced), .amp(exc_amp)
  );

endmodule
