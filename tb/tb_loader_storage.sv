// tb_loader_storage -- the loader's 80-bit loop, counters and display.
// A model loop (queue of bits) is shifted alongside the block by the three
// shift sources (computer transfer, load shift, edit shift) and keyboard
// nibble loads; the output bit, displayed digits, END signals and
// coefficient number are compared every clock, as is the extension clock.
module tb_loader_storage;
  logic clk = 0, rst = 1, clr = 0, sr_clk = 0, edit_clk = 0, edit_shift = 0;
  logic load_shift = 0, xfer = 0, comp_data = 0, load_left = 0, load_right = 0;
  logic [3:0] key_code = 0;
  logic end_of_word, end_of_9_words, end_of_seq, ext_clk, data_out;
  logic [3:0] coef_num, left_nib, right_nib;
  int checks = 0, failures = 0;

  loader_storage #(.N_COEF(10), .W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  bit m [80];          // m[79] is the output end
  int ca, cb, cc;      // model counters

  task automatic compare();
    logic [7:0] d;
    for (int i = 0; i < 8; i++) d[i] = m[79 - i];
    checks++;
    if (data_out !== m[79] || left_nib !== d[7:4] || right_nib !== d[3:0] ||
        end_of_word !== (ca == 7) || end_of_seq !== (ca == 7 && cc == 9) ||
        end_of_9_words !== (ca == 7 && cb == 8) || coef_num !== 4'(9 - cc)) begin
      failures++;
      if (failures < 10) $display("dut a %0d c %0d t=%0t out %b/%b nib %h%h/%h ca %0d cc %0d eow %b eos %b e9 %b num %0d",
        dut.cnt_a, dut.cnt_c, $time, data_out, m[79], left_nib, right_nib, d, ca, cc, end_of_word, end_of_seq, end_of_9_words, coef_num);
    end
  endtask

  // one clock with the given controls; model updated to match
  task automatic tick(input bit s_sr, input bit s_edit, input bit s_es, input bit s_ls,
                      input bit s_x, input bit s_d);
    bit sh, inb;
    sr_clk = s_sr; edit_clk = s_edit; edit_shift = s_es; load_shift = s_ls;
    xfer = s_x; comp_data = s_d;
    #1;
    checks++;
    if (ext_clk !== (s_x && s_sr)) failures++;
    sh  = (s_es && s_edit) || ((s_ls || s_x) && s_sr);
    inb = s_x ? s_d : m[79];
    @(posedge clk); #1;
    if (sh) begin
      for (int i = 79; i > 0; i--) m[i] = m[i-1];
      m[0] = inb;
      if (ca == 7) begin
        cc = (cc == 9) ? 0 : cc + 1;
        if (s_es) cb = (cb == 8) ? 0 : cb + 1;
      end
      ca = (ca + 1) % 8;
    end
    if (!s_es) cb = 0;
    sr_clk = 0; edit_clk = 0;
    compare();
  endtask

  initial begin
    for (int i = 0; i < 80; i++) m[i] = 0;
    ca = 0; cb = 0; cc = 0;
    repeat (2) @(posedge clk); rst <= 0; #1;
    compare();
    // computer transfer of 12 random bytes, gaps between shift clocks
    for (int i = 0; i < 96; i++) begin
      tick(1, 0, 0, 0, 1, 1'($urandom));
      tick(0, 0, 0, 0, 1, 1'($urandom));
    end
    // load shifting
    for (int i = 0; i < 37; i++) tick(1, 0, 0, 1, 0, 0);
    // edit shifting with edit clock, including a gap with shift low
    for (int i = 0; i < 72; i++) begin tick(0, 1, 1, 0, 0, 0); tick(1, 0, 1, 0, 0, 0); end
    tick(0, 1, 0, 0, 0, 0);
    for (int i = 0; i < 20; i++) tick(0, 1, 1, 0, 0, 0);
    tick(0, 0, 0, 0, 0, 0);
    // keyboard entry into the displayed register
    for (int r = 0; r < 20; r++) begin
      logic [3:0] k;
      k = 4'($urandom);
      key_code = k; load_left = r[0]; load_right = !r[0];
      @(posedge clk); #1;
      load_left = 0; load_right = 0;
      for (int i = 0; i < 4; i++) if (r[0]) m[79 - 4 - i] = k[i]; else m[79 - i] = k[i];
      compare();
      tick(1, 0, 0, 1, 0, 0);
    end
    // CLEAR resets the counters, not the data
    clr = 1; @(posedge clk); #1 clr = 0; #1; ca = 0; cc = 0; cb = 0;
    compare();
    for (int i = 0; i < 170; i++) tick(1, 0, 0, 1, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
