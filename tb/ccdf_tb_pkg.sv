// ccdf_tb_pkg -- reference arithmetic for the filter testbenches.
//
// ref_product: exact 8x8 two's complement product, keeping bits 14..3
//   (Q1.11, truncated), the multiplier's output format.
// ref_filter: one filter output from ten coefficients h[k-1] = h(k) and ten
//   inputs x[k-1] = x(n-k): products summed in a 16-bit Q5.11 register, top
//   12 bits taken, limited to 8 bits by the five-top-bits rule.
package ccdf_tb_pkg;

  function automatic logic signed [11:0] ref_product(input logic signed [7:0] a,
                                                     input logic signed [7:0] b);
    logic signed [15:0] p;
    p = 16'(a) * 16'(b);
    return p[14:3];
  endfunction

  function automatic logic signed [7:0] ref_limit(input logic signed [11:0] t);
    if (t > 12'sd127)       return 8'sh7f;
    else if (t < -12'sd128) return 8'sh80;
    else                    return t[7:0];
  endfunction

  function automatic logic signed [7:0] ref_filter(input logic signed [7:0] h [10],
                                                   input logic signed [7:0] x [10]);
    logic signed [15:0] acc;
    acc = '0;
    for (int k = 0; k < 10; k++) acc = acc + 16'(ref_product(h[k], x[k]));
    return ref_limit(acc[15:4]);
  endfunction

  function automatic bit ref_overflow(input logic signed [7:0] h [10],
                                      input logic signed [7:0] x [10]);
    logic signed [15:0] acc;
    acc = '0;
    for (int k = 0; k < 10; k++) acc = acc + 16'(ref_product(h[k], x[k]));
    return ($signed(acc[15:4]) > 12'sd127) || ($signed(acc[15:4]) < -12'sd128);
  endfunction

endpackage
