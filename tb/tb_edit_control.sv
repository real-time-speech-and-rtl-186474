// tb_edit_control -- the three-state step machine against the storage
// counters. The loader storage is instantiated with it; a pattern is
// loaded, and each press of the step switch must rotate the data by exactly
// 72 bits (checked on the output word) and then wait for release.
module tb_edit_control;
  logic clk = 0, rst = 1, edit_clk = 0, step_sw = 0;
  logic shift, end_of_word, end_of_9_words, end_of_seq, ext_clk, data_out;
  logic sr_clk = 0, xfer = 0, comp_data = 0;
  logic [3:0] coef_num, left_nib, right_nib;
  int checks = 0, failures = 0;

  edit_control dut (.clk, .rst, .edit_clk, .step_sw, .end_of_9_words, .shift);
  loader_storage #(.N_COEF(10), .W(8)) u_st (
    .clk, .rst, .clr(1'b0), .sr_clk, .edit_clk, .edit_shift(shift), .load_shift(1'b0),
    .xfer, .comp_data, .key_code(4'd0), .load_left(1'b0), .load_right(1'b0),
    .end_of_word, .end_of_9_words, .end_of_seq, .coef_num, .ext_clk, .data_out,
    .left_nib, .right_nib);

  always #5 clk = ~clk;
  // edit clock every 3 master clocks
  int div = 0;
  always @(posedge clk) begin
    div <= (div == 2) ? 0 : div + 1;
    edit_clk <= (div == 2);
  end

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int nshift = 0;
  always @(posedge clk) if (!rst && shift && edit_clk) nshift <= nshift + 1;

  initial begin
    logic [7:0] word [10];
    for (int k = 0; k < 10; k++) word[k] = 8'(16 * k + k + 1);   // 01 12 23 ...
    repeat (2) @(posedge clk); rst <= 0;
    // load 80 bits, word 0 first, LSB first
    for (int i = 0; i < 80; i++) begin
      xfer <= 1; sr_clk <= 1; comp_data <= word[i / 8][i % 8];
      @(posedge clk);
    end
    xfer <= 0; sr_clk <= 0;
    @(posedge clk); #1;
    checks++; if ({left_nib, right_nib} !== word[0]) failures++;
    for (int press = 1; press <= 12; press++) begin
      int n0;
      n0 = nshift;
      step_sw = 1;
      repeat (300) @(posedge clk);
      #1;
      checks++;
      if (shift !== 0) begin failures++; $display("still shifting while held"); end
      step_sw = 0;
      repeat (10) @(posedge clk);
      #1;
      checks++;
      if (nshift - n0 != 72) begin failures++; $display("press %0d shifted %0d", press, nshift - n0); end
      // 72 bits forward = one word back: word index (10 - press) mod 10
      checks++;
      if ({left_nib, right_nib} !== word[(10 * 12 - press) % 10]) begin
        failures++; $display("press %0d shows %h%h", press, left_nib, right_nib);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
