// loader_unit -- coefficient loader between the computer and the filter.
//
// Accepts coefficients one byte at a time from the computer (or from the
// 16-key keyboard, one hex digit per key), lets the operator step through
// and edit them, and on command from the computer or the panel load switch
// moves the whole set into the filter within one sampling period. After the
// transfer it plays no further part; its copy of the coefficients is kept.
//
// Blocks: loader_storage (80-bit loop, counters, display register),
// keyboard_encoder, edit_control, load_control, interface_control. All
// shifting that involves the computer or the filter uses the filter's shift
// clock sr_clk; editing uses the keyboard scan clock. ext_clk/data_out feed
// the exciter's extension register, and loaded latches the exciter. The
// partition is the document's.
module loader_unit #(
  parameter int SCAN_DIV = 2500
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        sr_clk,
  input  logic        ready,
  input  logic        start,
  input  logic        iopulse,
  input  logic        clear,
  input  logic        comp_data,
  input  logic [15:0] keys,
  input  logic        step_sw,
  input  logic        load_sw,
  output logic        comp,
  output logic        xfer,
  output logic        coef_load,
  output logic        data_out,
  output logic        ext_clk,
  output logic        loaded,
  output logic [3:0]  left_nib,
  output logic [3:0]  right_nib,
  output logic [3:0]  coef_num,
  output logic        left_ind,
  output logic        right_ind
);

  logic       edit_clk, edit_shift, load_shift, load_filter, loader_reset;
  logic       end_of_word, end_of_9_words, end_of_seq;
  logic [3:0] key_code;
  logic       load_left, load_right;

  keyboard_encoder #(.N_KEYS(16), .SCAN_DIV(SCAN_DIV)) u_kbd (
    .clk, .rst, .keys, .edit_clk, .key_code, .load_left, .load_right,
    .right_ind, .left_ind
  );

  edit_control u_edit (
    .clk, .rst, .edit_clk, .step_sw, .end_of_9_words, .shift(edit_shift)
  );

  interface_control u_if (
    .clk, .rst, .start, .iopulse, .clear, .load_sw, .end_of_word, .loaded,
    .sr_clk, .load_filter, .xfer, .comp, .loader_reset
  );

  load_control u_load (
    .clk, .rst, .load_cmd(load_filter), .end_of_seq, .ready, .sr_clk,
    .shift(load_shift), .xfer(coef_load), .loaded
  );

  loader_storage #(.N_COEF(10), .W(8)) u_store (
    .clk, .rst, .clr(loader_reset), .sr_clk, .edit_clk, .edit_shift,
    .load_shift, .xfer, .comp_data, .key_code, .load_left, .load_right,
    .end_of_word, .end_of_9_words, .end_of_seq, .coef_num, .ext_clk,
    .data_out, .left_nib, .right_nib
  );

endmodule
