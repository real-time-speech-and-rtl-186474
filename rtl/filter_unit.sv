// filter_unit -- the computer controlled transversal filter.
//
// Computes, once per sampling period of N_COEF*TICKS master clocks,
//   y(n) = h(10)x(n-10) + h(9)x(n-9) + ... + h(1)x(n-1)
// with 8-bit two's complement data and coefficients, 12-bit products, a
// guarded accumulator and an output limiter. The newest datum x(n-1) is the
// ADC conversion started in the same period (start convert at pulse #1,
// datum taken at pulse #79), so the ADC may use up to 80% of the period. The
// result is latched into the output buffer at pulse #0 of the next period:
// one sampling period from sample to output, which is what closed-loop
// (all-pole) use needs.
//
// Blocks: filter_control (timing), filter_storage (data and coefficient
// loops), serial_multiplier, filter_accumulator, overflow_limiter. The
// coefficient loop accepts a new set from the loader (coef_load, coef_in) on
// the sr_clk pulses of one period starting after READY. The structure is the
// document's; the clock schedule is this design's.
module filter_unit
  import ccdf_pkg::filter_ctrl_t;
#(
  parameter int N_COEF = ccdf_pkg::N_COEF,
  parameter int TICKS  = ccdf_pkg::TICKS
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  adc_data,
  input  logic        coef_load,
  input  logic        coef_in,
  output logic        sh_track,
  output logic        adc_start,
  output logic [7:0]  dac_data,
  output logic        overflow,
  output logic        ready,
  output logic        sr_clk,
  output logic        fs_clk
);

  filter_ctrl_t              ctrl;
  logic [ccdf_pkg::DATA_W-1:0] mcand;
  logic                      mult_bit;
  logic signed [ccdf_pkg::PROD_W-1:0] product;
  logic signed [ccdf_pkg::ACC_OUT_W-1:0] total;

  filter_control #(.N_COEF(N_COEF), .TICKS(TICKS), .COEF_W(ccdf_pkg::COEF_W)) u_ctrl (
    .clk, .rst, .ctrl, .cnt_a(), .cnt_b()
  );

  filter_storage #(.N_COEF(N_COEF), .DATA_W(ccdf_pkg::DATA_W), .COEF_W(ccdf_pkg::COEF_W)) u_store (
    .clk, .rst, .ctrl, .adc_data, .coef_load, .coef_in, .mcand, .mult_bit
  );

  serial_multiplier #(.W(ccdf_pkg::DATA_W), .PROD_W(ccdf_pkg::PROD_W)) u_mul (
    .clk, .rst,
    .clear     (ctrl.mul_clear),
    .step      (ctrl.mul_step),
    .sign_step (ctrl.sign_bit),
    .mcand     (mcand),
    .mbit      (mult_bit),
    .product   (product)
  );

  filter_accumulator #(.IN_W(ccdf_pkg::PROD_W), .ACC_W(ccdf_pkg::ACC_W), .OUT_W(ccdf_pkg::ACC_OUT_W)) u_acc (
    .clk, .rst,
    .clear   (ctrl.acc_clear),
    .latch   (ctrl.par_in),
    .product (product),
    .total   (total)
  );

  overflow_limiter #(.IN_W(ccdf_pkg::ACC_OUT_W), .OUT_W(ccdf_pkg::DATA_W)) u_lim (
    .clk, .rst,
    .latch    (ctrl.out_latch),
    .total    (total),
    .dac_data (dac_data),
    .overflow (overflow)
  );

  assign sh_track  = ctrl.sh_track;
  assign adc_start = ctrl.adc_start;
  assign ready     = ctrl.ready;
  assign sr_clk    = ctrl.sr_clk;
  assign fs_clk    = ctrl.fs_clk;

endmodule
