// tb_load_control -- LOAD sequence timing against the real filter timing.
// The filter control module supplies sr_clk and READY, the loader storage
// supplies END OF SEQUENCE. For load commands issued at random moments and
// from random loop positions, checks: alignment leaves the storage counters
// at 0 (LSB of h(10) at the output); the transfer starts on the first shift
// clock after READY, moves exactly 80 bits within one sampling period, and
// the whole sequence takes between 1.01 and 2.99 periods (101..299 clocks).
module tb_load_control;
  import ccdf_pkg::*;
  logic clk = 0, rst = 1, load_cmd = 0;
  logic shift, xfer, loaded;
  filter_ctrl_t ctrl;
  logic [3:0] cnt_a, cnt_b, coef_num, left_nib, right_nib;
  logic end_of_word, end_of_9_words, end_of_seq, ext_clk, data_out;
  logic sr_pre = 0, xfer_pre = 0;
  int checks = 0, failures = 0;

  filter_control #(.N_COEF(10), .TICKS(10), .COEF_W(8)) u_ctrl (.clk, .rst, .ctrl, .cnt_a, .cnt_b);
  load_control dut (.clk, .rst, .load_cmd, .end_of_seq, .ready(ctrl.ready), .sr_clk(ctrl.sr_clk),
                    .shift, .xfer, .loaded);
  loader_storage #(.N_COEF(10), .W(8)) u_st (
    .clk, .rst, .clr(1'b0), .sr_clk(ctrl.sr_clk), .edit_clk(1'b0), .edit_shift(1'b0),
    .load_shift(shift), .xfer(xfer_pre), .comp_data(1'b1), .key_code(4'd0), .load_left(1'b0),
    .load_right(1'b0), .end_of_word, .end_of_9_words, .end_of_seq, .coef_num, .ext_clk,
    .data_out, .left_nib, .right_nib);

  always #5 clk = ~clk;

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (2) @(posedge clk); rst = 0;
    for (int r = 0; r < 30; r++) begin
      int t0, t_x0, t_x1, nbits, pre;
      // move the loop to a random position with computer-style shifts
      pre = $urandom_range(0, 79);
      while (pre > 0) begin
        @(negedge clk);
        xfer_pre = 1;
        if (ctrl.sr_clk) pre--;
      end
      @(negedge clk); xfer_pre = 0;
      repeat ($urandom_range(0, 150)) @(negedge clk);
      load_cmd = 1; t0 = cyc; @(negedge clk); load_cmd = 0;
      while (!xfer) @(negedge clk);
      t_x0 = cyc;
      checks++;
      if (u_st.cnt_a != 0 || u_st.cnt_c != 0) begin failures++; $display("not aligned"); end
      checks++;
      if (u_ctrl.cnt_a != 1 || u_ctrl.cnt_b != 0) begin failures++; $display("transfer not at start of period"); end
      nbits = 0;
      while (!loaded) begin
        if (xfer && ctrl.sr_clk) nbits++;
        @(negedge clk);
      end
      t_x1 = cyc;
      checks++;
      if (nbits != 80) begin failures++; $display("moved %0d bits", nbits); end
      checks++;
      if (t_x1 - t_x0 > 100) begin failures++; $display("transfer took %0d clocks", t_x1 - t_x0); end
      checks++;
      if (t_x1 - t0 < 100 || t_x1 - t0 > 300) begin failures++; $display("sequence took %0d clocks", t_x1 - t0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
