// prbs_noise -- pseudo-random binary noise source for unvoiced excitation.
//
// A LFSR_W-bit Fibonacci shift register with feedback from its two top bits
// (x^15 + x^14 + 1 for the default width, a maximal-length sequence of
// 32767 bits) advances once per en pulse, normally the sampling-rate clock.
// noise is its top bit. Reset loads 1. The document only names a
// pseudo-random binary noise generator; polynomial and width are this
// design's.
module prbs_noise #(
  parameter int LFSR_W = 15
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  output logic noise
);

  logic [LFSR_W-1:0] lfsr_q;

  always_ff @(posedge clk) begin
    if (rst)     lfsr_q <= LFSR_W'(1);
    else if (en) lfsr_q <= {lfsr_q[LFSR_W-2:0], lfsr_q[LFSR_W-1] ^ lfsr_q[LFSR_W-2]};
  end

  assign noise = lfsr_q[LFSR_W-1];

endmodule
