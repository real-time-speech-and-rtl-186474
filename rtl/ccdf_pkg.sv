// ccdf_pkg -- shared constants and the filter control bundle.
//
// The filter computes y(n) = sum_{k=1..10} h(k) x(n-k) with 8-bit two's
// complement data and coefficients (values -1 + n/128). A sampling period is
// 10 intervals of 10 master-clock periods; each interval performs one
// bit-serial multiplication and one accumulation. The numbers below are the
// ones the design follows; the accumulator width (16) is this design's own
// choice, everything else comes from the filter specification.
//
// filter_ctrl_t carries the decoded control pulses of the control module.
// Every field is a one-master-clock-wide enable pulse; the comment gives the
// control output number used in the module descriptions.
package ccdf_pkg;

  localparam int N_COEF     = 10;  // coefficients per filter
  localparam int COEF_W     = 8;   // coefficient word length
  localparam int DATA_W     = 8;   // data word length
  localparam int PROD_W     = 12;  // product bits kept
  localparam int ACC_W      = 16;  // accumulator register (Q5.11)
  localparam int ACC_OUT_W  = 12;  // accumulator bits seen by the limiter (Q5.7)
  localparam int TICKS      = 10;  // master clocks per interval

  typedef struct packed {
    logic ready;       // 6: start of a computation cycle (loader READY)
    logic sh_track;    // 6: sample-and-hold follows its input while high
    logic out_latch;   // 6: limiter loads the output buffer
    logic adc_start;   // 9: ADC start convert
    logic acc_clear;   // 7: accumulator clear
    logic mul_clear;   // 5: multiplier clear
    logic mul_step;    // 3: multiplier latch, one shift-add step
    logic sr_clk;      // 2: coefficient / loader / computer shift clock
    logic sign_bit;    // 10: current multiplying bit is the coefficient MSB
    logic par_in;      // 4: accumulator latch and multiplicand load
    logic st_latch;    // 8: ADC datum into the storage input latch
    logic data_insert; // 4 qualifier: new datum enters loop and multiplicand
    logic fs_clk;      // 11: sampling-rate clock for the exciter
  } filter_ctrl_t;

endpackage
