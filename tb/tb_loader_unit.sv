// tb_loader_unit -- the loader between a computer output stage and the
// filter timing. Ten coefficients are sent as five 16-bit words (low byte
// first, h(10) first); the loader must answer each START with COMP. A LOAD
// (IOPULSE, START) must deliver, during one period starting after READY, the
// 80-bit stream h(10)..h(1), LSB first, and then COMP. The step switch must
// show the coefficients in ascending order with their numbers; a keyboard
// edit of one coefficient followed by a panel LOAD must deliver the edited
// set.
module tb_loader_unit;
  import ccdf_pkg::*;
  logic clk = 0, rst = 1;
  filter_ctrl_t ctrl;
  logic [3:0] cnt_a, cnt_b;
  logic [15:0] data_bus = 0, keys = 0;
  logic doa = 0, start = 0, iopulse = 0, clear = 0, step_sw = 0, load_sw = 0;
  logic comp, xfer, coef_load, data_out, ext_clk, loaded, left_ind, right_ind;
  logic ser_data, busy, done;
  logic [3:0] left_nib, right_nib, coef_num;
  int checks = 0, failures = 0;

  filter_control #(.N_COEF(10), .TICKS(10), .COEF_W(8)) u_ctrl (.clk, .rst, .ctrl, .cnt_a, .cnt_b);
  computer_output #(.W(16)) u_cpu (.clk, .rst, .data_bus, .doa, .start, .clear, .comp,
    .sr_clk(ctrl.sr_clk), .xfer, .ser_data, .busy, .done);
  loader_unit #(.SCAN_DIV(4)) dut (.clk, .rst, .sr_clk(ctrl.sr_clk), .ready(ctrl.ready), .start,
    .iopulse, .clear, .comp_data(ser_data), .keys, .step_sw, .load_sw, .comp, .xfer, .coef_load,
    .data_out, .ext_clk, .loaded, .left_nib, .right_nib, .coef_num, .left_ind, .right_ind);

  always #5 clk = ~clk;

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // capture of the stream sent to the filter
  logic [7:0] got [10];
  int nbits = 0, n_comp = 0, t_first = -1, t_last = -1, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (comp) n_comp <= n_comp + 1;
    if (coef_load && ctrl.sr_clk) begin
      got[nbits / 8][nbits % 8] <= data_out;
      if (nbits == 0) t_first <= cyc;
      t_last <= cyc;
      nbits <= nbits + 1;
    end
  end

  task automatic strobe(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  task automatic wait_comp(input int n);
    int guard;
    guard = 0;
    while (n_comp < n && guard < 2000) begin @(negedge clk); guard++; end
    checks++;
    if (n_comp < n) begin failures++; $display("no COMP"); end
  endtask

  task automatic check_stream(input logic [7:0] h [10], input string what);
    for (int k = 0; k < 10; k++) begin
      checks++;
      if (got[k] !== h[9 - k]) begin failures++; $display("%s: word %0d %h exp %h", what, k, got[k], h[9-k]); end
    end
    checks++;
    if (t_last - t_first >= 100) begin failures++; $display("%s: transfer spans %0d clocks", what, t_last - t_first); end
  endtask

  initial begin
    logic [7:0] h [10];   // h[k-1] = h(k)
    int c;
    for (int k = 0; k < 10; k++) h[k] = 8'($urandom);
    repeat (2) @(posedge clk); rst = 0;
    // five words: (h10,h9), (h8,h7), ... low byte first
    c = 0;
    for (int w = 0; w < 5; w++) begin
      @(negedge clk); data_bus = {h[8 - 2*w], h[9 - 2*w]}; doa = 1; @(negedge clk); doa = 0;
      strobe(start); c++; wait_comp(c);
      strobe(start); c++; wait_comp(c);
    end
    // LOAD
    nbits = 0;
    strobe(iopulse); strobe(start); c++; wait_comp(c);
    checks++; if (nbits != 80) begin failures++; $display("load moved %0d bits", nbits); end
    check_stream(h, "computer load");
    // step through the coefficients: after each press h(press) is shown
    for (int press = 1; press <= 10; press++) begin
      step_sw = 1; repeat (600) @(negedge clk); step_sw = 0; repeat (20) @(negedge clk);
      checks++;
      if ({left_nib, right_nib} !== h[press - 1] || coef_num !== 4'(press - 1)) begin
        failures++; $display("press %0d shows %h%h #%0d", press, left_nib, right_nib, coef_num);
      end
    end
    // now h(10) is displayed; type a new value: keys 'a' then '5'
    keys[10] = 1; repeat (200) @(negedge clk); keys[10] = 0; repeat (200) @(negedge clk);
    keys[5]  = 1; repeat (200) @(negedge clk); keys[5]  = 0; repeat (200) @(negedge clk);
    h[9] = 8'ha5;
    checks++; if ({left_nib, right_nib} !== 8'ha5) begin failures++; $display("edit shows %h%h", left_nib, right_nib); end
    // panel load
    nbits = 0;
    @(negedge clk); load_sw = 1; repeat (400) @(negedge clk); load_sw = 0; repeat (10) @(negedge clk);
    checks++; if (nbits != 80) begin failures++; $display("panel load moved %0d bits", nbits); end
    check_stream(h, "panel load");
    checks++; if (n_comp != c) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
