// filter_accumulator -- clearable adder-latch summing the ten products.
//
// Each latch pulse adds the sign-extended Q1.(IN_W-1) product to an ACC_W-bit
// register; clear (priority) empties it. With ACC_W = 16 the register is
// Q5.11 and holds any sum of ten products without wrapping. The limiter sees
// the OUT_W most significant bits (Q5.7), the range (-16, 15.99), written
// (-20, 17.774) in octal in the document. The 12-bit input and output follow
// the document; the 16-bit internal register is this design's choice.
// Timing: total is valid the clock after a latch or clear.
module filter_accumulator #(
  parameter int IN_W  = 12,
  parameter int ACC_W = 16,
  parameter int OUT_W = 12
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    clear,
  input  logic                    latch,
  input  logic signed [IN_W-1:0]  product,
  output logic signed [OUT_W-1:0] total
);

  logic signed [ACC_W-1:0] acc_q;

  always_ff @(posedge clk) begin
    if (rst || clear) acc_q <= '0;
    else if (latch)   acc_q <= acc_q + ACC_W'(product);
  end

  assign total = acc_q[ACC_W-1 -: OUT_W];

endmodule
