// serial_multiplier -- bit-serial two's complement multiplier.
//
// The coefficient (multiplier) arrives one bit per step, LSB first; the
// multiplicand is held in parallel. Each step the multiplicand passes through
// a zero/one/true/complement selector (zero when the bit is 0, true when it is
// 1, ones' complement plus a carry-in of 1 when the bit is the sign bit) and
// is added to the upper half of the partial product, which is then shifted
// right by one with the sum's sign as the incoming bit. After W steps the
// register holds the exact 2W-bit product; the output is its PROD_W most
// significant bits below the redundant sign bit, i.e. the Q1.(PROD_W-1)
// product truncated toward minus infinity. (-1)*(-1) is out of range and
// wraps to -1, as in the document's product range (-1, 0.774 octal).
//
// Timing: clear, then W step pulses; the product is valid from the clock after
// the last step until the next clear. The algorithm follows the document; the
// 9-bit adder that yields the true sign is this design's choice.
module serial_multiplier #(
  parameter int W      = 8,
  parameter int PROD_W = 12
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     clear,
  input  logic                     step,
  input  logic                     sign_step,
  input  logic signed [W-1:0]      mcand,
  input  logic                     mbit,
  output logic signed [PROD_W-1:0] product
);

  typedef enum logic [1:0] {
    ZOTC_ZERO = 2'b00,
    ZOTC_ONE  = 2'b01,
    ZOTC_TRUE = 2'b10,
    ZOTC_COMP = 2'b11
  } zotc_t;

  logic signed [W:0]   hi_q;   // upper partial product, one guard bit
  logic        [W-1:0] lo_q;   // bits shifted out of the upper half

  zotc_t         sel;
  logic [W-1:0]  zotc_out;
  logic          cin;
  logic signed [W:0] sum;

  always_comb begin
    if (!mbit)          sel = ZOTC_ZERO;
    else if (sign_step) sel = ZOTC_COMP;
    else                sel = ZOTC_TRUE;
    unique case (sel)
      ZOTC_ZERO: zotc_out = '0;
      ZOTC_ONE:  zotc_out = '1;
      ZOTC_TRUE: zotc_out = mcand;
      ZOTC_COMP: zotc_out = ~mcand;
    endcase
    cin = (sel == ZOTC_COMP);
    sum = hi_q + $signed({zotc_out[W-1], zotc_out}) + $signed({{W{1'b0}}, cin});
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      hi_q <= '0;
      lo_q <= '0;
    end else if (step) begin
      hi_q <= sum >>> 1;
      lo_q <= {sum[0], lo_q[W-1:1]};
    end
  end

  // exact product = {hi_q, lo_q} (2W+1 bits); drop the two top sign bits
  logic [2*W:0] full;  // top two and low bits are not part of the output
  assign full    = {hi_q, lo_q};
  assign product = full[2*W-2 -: PROD_W];

endmodule
