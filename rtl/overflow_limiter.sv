// overflow_limiter -- overflow detector and output buffer of the filter.
//
// The IN_W-bit total is Q(IN_W-OUT_W+1).(OUT_W-1); it fits the OUT_W-bit
// output exactly when its IN_W-OUT_W+1 most significant bits (5 by default)
// are all equal. On the latch pulse the output buffer takes the low OUT_W
// bits if they do, and otherwise the most negative value (-1.000 octal) when
// the total is negative or the most positive (0.774 octal) when it is
// positive. This is the document's detector; the overflow flag, registered
// with the buffer, is brought out by this design for observation.
module overflow_limiter #(
  parameter int IN_W  = 12,
  parameter int OUT_W = 8
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    latch,
  input  logic signed [IN_W-1:0]  total,
  output logic signed [OUT_W-1:0] dac_data,
  output logic                    overflow
);

  localparam int NTOP = IN_W - OUT_W + 1;

  logic [NTOP-1:0] top;
  logic            in_range;
  assign top      = total[IN_W-1 -: NTOP];
  assign in_range = (top == '0) || (top == '1);

  always_ff @(posedge clk) begin
    if (rst) begin
      dac_data <= '0;
      overflow <= 1'b0;
    end else if (latch) begin
      overflow <= !in_range;
      if (in_range)          dac_data <= total[OUT_W-1:0];
      else if (total[IN_W-1]) dac_data <= {1'b1, {(OUT_W-1){1'b0}}};
      else                   dac_data <= {1'b0, {(OUT_W-1){1'b1}}};
    end
  end

endmodule
