// tb_keyboard_encoder -- scan, edge detection and left/right alternation.
// With SCAN_DIV = 4 the scan clock must pulse every 4 clocks. Each key is
// pressed and held over several scans: exactly one latch pulse must follow,
// carrying the key's number, and pulses must alternate left, right, left...
// A held key must not repeat; two keys held together give two pulses.
module tb_keyboard_encoder;
  logic clk = 0, rst = 1;
  logic [15:0] keys = 0;
  logic edit_clk, load_left, load_right, right_ind, left_ind;
  logic [3:0] key_code;
  int checks = 0, failures = 0;
  int n_pulses = 0, n_left = 0, n_right = 0;
  logic [3:0] codes [$];
  bit sides [$];   // 0 left, 1 right

  keyboard_encoder #(.N_KEYS(16), .SCAN_DIV(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int cyc = 0, last_tick = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && edit_clk) begin
      if (last_tick >= 0) begin checks++; if (cyc - last_tick != 4) failures++; end
      last_tick <= cyc;
    end
    if (!rst && (load_left || load_right)) begin
      codes.push_back(key_code);
      sides.push_back(load_right);
      checks++;
      if (load_left && load_right) failures++;
    end
  end

  task automatic press(input int k, input int scans);
    keys[k] = 1;
    repeat (scans * 16 * 4) @(posedge clk);
    keys[k] = 0;
    repeat (2 * 16 * 4) @(posedge clk);
  endtask

  initial begin
    int order [$];
    repeat (3) @(posedge clk); rst <= 0;
    checks++; if (!left_ind || right_ind) failures++;
    for (int i = 0; i < 12; i++) begin
      int k;
      k = $urandom_range(0, 15);
      order.push_back(k);
      press(k, 1 + i % 3);
    end
    // two keys together
    keys[3] = 1; keys[12] = 1;
    repeat (3 * 64) @(posedge clk);
    keys = 0;
    repeat (3 * 64) @(posedge clk);
    checks++;
    if (codes.size() != 14) begin
      failures++;
      $display("pulses %0d expected 14", codes.size());
    end else begin
      for (int i = 0; i < 12; i++) begin
        checks++;
        if (codes[i] != 4'(order[i])) begin failures++; $display("press %0d code %0d exp %0d", i, codes[i], order[i]); end
      end
      checks++;
      if (!((codes[12] == 3 && codes[13] == 12) || (codes[12] == 12 && codes[13] == 3))) failures++;
      for (int i = 0; i < 14; i++) begin
        checks++;
        if (sides[i] != bit'(i % 2)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
