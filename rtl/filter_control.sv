// filter_control -- master-oscillator timing of the transversal filter.
//
// Two cascaded counters divide the master clock: A counts the TICKS clocks of
// an interval and B counts the N_COEF intervals of a sampling period, so one
// sampling period is N_COEF*TICKS clocks (100 by default). A clock is named by
// its pulse number p = TICKS*B + A, and each control output is a decode of
// (A, B), in the manner of the document's two BCD-to-decimal decoders.
//
// Schedule of one interval (this design's choice; the document's timing
// diagram is not reproduced here):
//   A = 0        clear the multiplier
//   A = 1..COEF_W   multiply steps: multiplier latch + one coefficient shift
//   A = COEF_W   the step uses the coefficient sign bit
//   A = TICKS-1  accumulate the product, load the next multiplicand
// Once per period:
//   p = 0   READY, sample-and-hold track, output latch, accumulator clear,
//           sampling-rate clock for the exciter
//   p = 1   ADC start convert
//   p = TICKS*(N_COEF-2)-1  (#79) ADC datum into the storage input latch,
//           the document's own example for control output 8
//   p = TICKS*(N_COEF-1)-1  (#89) that datum enters the data loop and the
//           multiplicand latch, ready for the last multiplication
// All outputs are combinational decodes of the two counters, valid in
// the cycle they name.
module filter_control
  import ccdf_pkg::filter_ctrl_t;
#(
  parameter int N_COEF = ccdf_pkg::N_COEF,
  parameter int TICKS  = ccdf_pkg::TICKS,
  parameter int COEF_W = ccdf_pkg::COEF_W
) (
  input  logic         clk,
  input  logic         rst,
  output filter_ctrl_t ctrl,
  output logic [3:0]   cnt_a,
  output logic [3:0]   cnt_b
);

  initial assert (TICKS >= COEF_W + 2) else $error("an interval needs COEF_W+2 clocks");

  logic [3:0] a_q, b_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      a_q <= '0;
      b_q <= '0;
    end else if (a_q == 4'(TICKS - 1)) begin
      a_q <= '0;
      b_q <= (b_q == 4'(N_COEF - 1)) ? '0 : b_q + 4'd1;
    end else begin
      a_q <= a_q + 4'd1;
    end
  end

  logic first;
  always_comb begin
    first            = (a_q == 4'd0) && (b_q == 4'd0);
    ctrl             = '0;
    ctrl.ready       = first;
    ctrl.sh_track    = first;
    ctrl.out_latch   = first;
    ctrl.acc_clear   = first;
    ctrl.fs_clk      = first;
    ctrl.adc_start   = (a_q == 4'd1) && (b_q == 4'd0);
    ctrl.mul_clear   = (a_q == 4'd0);
    ctrl.mul_step    = (a_q >= 4'd1) && (a_q <= 4'(COEF_W));
    ctrl.sr_clk      = ctrl.mul_step;
    ctrl.sign_bit    = (a_q == 4'(COEF_W));
    ctrl.par_in      = (a_q == 4'(TICKS - 1));
    ctrl.st_latch    = ctrl.par_in && (b_q == 4'(N_COEF - 3));
    ctrl.data_insert = ctrl.par_in && (b_q == 4'(N_COEF - 2));
  end

  assign cnt_a = a_q;
  assign cnt_b = b_q;

endmodule
