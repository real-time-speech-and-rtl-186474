// tb_interface_control -- START / IOPULSE+START / CLEAR / panel load.
// A START must give xfer until the shift made with END OF WORD (8 shift
// clocks, from a model bit counter) and then one COMP. IOPULSE then START
// must give one load_filter and a COMP only after 'loaded'. The panel switch
// gives load_filter without COMP. CLEAR aborts and pulses loader_reset.
module tb_interface_control;
  logic clk = 0, rst = 1, start = 0, iopulse = 0, clear = 0, load_sw = 0;
  logic end_of_word, loaded = 0, sr_clk = 0;
  logic load_filter, xfer, comp, loader_reset;
  int checks = 0, failures = 0;
  int n_comp = 0, n_load = 0, bitcnt = 0;

  interface_control dut (.*);

  always #5 clk = ~clk;
  // shift clock on every other cycle; bit counter like loader counter A
  always @(posedge clk) begin
    sr_clk <= ~sr_clk;
    if (xfer && sr_clk) bitcnt <= (bitcnt + 1) % 8;
    if (comp) n_comp <= n_comp + 1;
    if (load_filter) n_load <= n_load + 1;
  end
  assign end_of_word = (bitcnt == 7);

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  initial begin
    int nsh, c0, l0;
    repeat (2) @(posedge clk); rst = 0;
    // byte transfers
    for (int b = 0; b < 5; b++) begin
      c0 = n_comp;
      pulse(start);
      nsh = 0;
      while (xfer) begin if (sr_clk) nsh++; @(negedge clk); end
      repeat (2) @(negedge clk);
      checks++; if (nsh != 8) begin failures++; $display("byte %0d: %0d shifts", b, nsh); end
      checks++; if (n_comp != c0 + 1) failures++;
    end
    // LOAD: IOPULSE then START
    c0 = n_comp; l0 = n_load;
    pulse(iopulse); repeat (3) @(negedge clk); pulse(start);
    repeat (50) @(negedge clk);
    checks++; if (n_load != l0 + 1 || xfer) failures++;
    checks++; if (n_comp != c0) begin failures++; $display("COMP before loaded"); end
    pulse(loaded); repeat (2) @(negedge clk);
    checks++; if (n_comp != c0 + 1) failures++;
    // panel load
    c0 = n_comp; l0 = n_load;
    @(negedge clk); load_sw = 1; repeat (20) @(negedge clk); load_sw = 0;
    pulse(loaded); repeat (3) @(negedge clk);
    checks++; if (n_load != l0 + 1 || n_comp != c0) failures++;
    // CLEAR aborts a LOAD
    c0 = n_comp;
    pulse(iopulse); pulse(start);
    @(negedge clk); clear = 1; #1;
    checks++; if (!loader_reset) failures++;
    @(negedge clk); clear = 0;
    pulse(loaded); repeat (2) @(negedge clk);
    checks++; if (n_comp != c0) begin failures++; $display("COMP after CLEAR"); end
    // and a byte still works after it
    c0 = n_comp; pulse(start); repeat (40) @(negedge clk);
    checks++; if (n_comp != c0 + 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
