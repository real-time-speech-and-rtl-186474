// filter_storage -- cyclic data and coefficient storage of the filter.
//
// Data loop: N_COEF-1 words of DATA_W bits. At every interval end (par_in)
// the multiplicand latch takes the word at the loop head and the loop rotates
// by one word. The ADC datum, caught in an input latch by st_latch (pulse #79,
// after eight multiplications), replaces this at pulse #89: it goes to the
// multiplicand latch for the last multiplication and enters the loop tail,
// pushing out the oldest datum. The loop therefore shifts N_COEF times per
// period and advances by one datum, so the multiplicands of a period are
// x(n-10), x(n-9), ..., x(n-1) in that order (the multiplicand for interval 0
// is loaded at the end of the previous period).
//
// Coefficient loop: N_COEF*COEF_W bits, shifted once per multiply step
// (sr_clk), so it turns exactly once per sampling period and presents
// h(10), h(9), ..., h(1), each LSB first, as the multiplying bit. While
// coef_load is high its input is the loader's serial data instead of its own
// output; the outgoing bits are still used, so a new set replaces the old one
// within one period without disturbing the current output.
//
// The loop structure follows the document; the input latch and the exact
// pulse numbers are this design's reading of it. Reset clears everything.
module filter_storage
  import ccdf_pkg::filter_ctrl_t;
#(
  parameter int N_COEF = ccdf_pkg::N_COEF,
  parameter int DATA_W = ccdf_pkg::DATA_W,
  parameter int COEF_W = ccdf_pkg::COEF_W
) (
  input  logic              clk,
  input  logic              rst,
  input  filter_ctrl_t      ctrl,
  input  logic [DATA_W-1:0] adc_data,
  input  logic              coef_load,
  input  logic              coef_in,
  output logic [DATA_W-1:0] mcand,
  output logic              mult_bit
);

  localparam int ND = N_COEF - 1;
  localparam int NC = N_COEF * COEF_W;

  logic [DATA_W-1:0] dloop [ND];
  logic [DATA_W-1:0] in_latch;
  logic [DATA_W-1:0] mcand_q;
  logic [NC-1:0]     cloop;

  logic [DATA_W-1:0] next_word;
  assign next_word = ctrl.data_insert ? in_latch : dloop[ND-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < ND; i++) dloop[i] <= '0;
      in_latch <= '0;
      mcand_q  <= '0;
    end else begin
      if (ctrl.st_latch) in_latch <= adc_data;
      if (ctrl.par_in) begin
        mcand_q  <= next_word;
        dloop[0] <= next_word;
        for (int i = 1; i < ND; i++) dloop[i] <= dloop[i-1];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) cloop <= '0;
    else if (ctrl.sr_clk) cloop <= {cloop[NC-2:0], coef_load ? coef_in : cloop[NC-1]};
  end

  assign mcand    = mcand_q;
  assign mult_bit = cloop[NC-1];

endmodule
