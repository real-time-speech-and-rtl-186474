// loader_storage -- serial coefficient store of the loader unit.
//
// An N_COEF*W-bit loop holds the ten coefficients. Its last W bits form the
// displayed register: the LSB of the displayed word is the bit at the loop
// output, the left and right hex digits are its high and low nibbles, and the
// keyboard can overwrite either nibble (load_left / load_right with key_code).
//
// The loop shifts by one bit on
//   - an edit clock pulse while the edit control shifts,
//   - a filter shift clock pulse while the load control shifts, or
//   - a filter shift clock pulse during a computer-loader transfer; the input
//     is then the computer's serial data and the bit leaving the loop also
//     enters the exciter's extension register (ext_clk pulses with it).
// Otherwise the loop input is its own output.
//
// Counter A (bit in word, /8) and counter C (word, /10) count every shift, so
// (C, A) = (0, 0) means the LSB of h(10) is at the output; the CLEAR reset
// from the interface control sets them to that state. Counter B counts words
// of an edit step (/9) and is held at 0 outside one. end_of_word,
// end_of_9_words and end_of_seq are high while the output bit is the last of
// a word, of nine words, of the sequence; a controller stops after that
// shift. The displayed coefficient number is 9 - C (h(k) shows as k-1): the
// document forms it by inverting C and adding 1001 binary.
module loader_storage #(
  parameter int N_COEF = 10,
  parameter int W      = 8
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       clr,
  input  logic       sr_clk,
  input  logic       edit_clk,
  input  logic       edit_shift,
  input  logic       load_shift,
  input  logic       xfer,
  input  logic       comp_data,
  input  logic [3:0] key_code,
  input  logic       load_left,
  input  logic       load_right,
  output logic       end_of_word,
  output logic       end_of_9_words,
  output logic       end_of_seq,
  output logic [3:0] coef_num,
  output logic       ext_clk,
  output logic       data_out,
  output logic [3:0] left_nib,
  output logic [3:0] right_nib
);

  localparam int L = N_COEF * W;

  logic [L-1:0] loop_q;
  logic [$clog2(W)-1:0] cnt_a;
  logic [3:0]   cnt_b, cnt_c;
  logic         shift_en;
  logic         in_bit;

  assign shift_en = (edit_shift && edit_clk) || ((load_shift || xfer) && sr_clk);
  assign in_bit   = xfer ? comp_data : loop_q[L-1];

  // displayed word, LSB at the loop output
  logic [W-1:0] disp;
  always_comb
    for (int i = 0; i < W; i++) disp[i] = loop_q[L-1-i];

  always_ff @(posedge clk) begin
    if (rst) begin
      loop_q <= '0;
    end else if (shift_en) begin
      loop_q <= {loop_q[L-2:0], in_bit};
    end else begin
      // keyboard entry into the displayed register
      if (load_left)  for (int i = 0; i < 4; i++) loop_q[L-1-(W-4)-i] <= key_code[i];
      if (load_right) for (int i = 0; i < 4; i++) loop_q[L-1-i]       <= key_code[i];
    end
  end

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      cnt_a <= '0;
      cnt_c <= '0;
    end else if (shift_en) begin
      cnt_a <= cnt_a + 1'b1;
      if (cnt_a == ($clog2(W))'(W - 1)) cnt_c <= (cnt_c == 4'(N_COEF - 1)) ? '0 : cnt_c + 4'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst || clr || !edit_shift) cnt_b <= '0;
    else if (shift_en && cnt_a == ($clog2(W))'(W - 1)) cnt_b <= (cnt_b == 4'(N_COEF - 2)) ? '0 : cnt_b + 4'd1;
  end

  assign end_of_word    = (cnt_a == ($clog2(W))'(W - 1));
  assign end_of_9_words = end_of_word && (cnt_b == 4'(N_COEF - 2));
  assign end_of_seq     = end_of_word && (cnt_c == 4'(N_COEF - 1));
  assign coef_num       = 4'(N_COEF - 1) - cnt_c;
  assign ext_clk        = xfer && sr_clk;
  assign data_out       = loop_q[L-1];
  assign left_nib       = disp[W-1 -: 4];
  assign right_nib      = disp[3:0];

endmodule
