// tb_computer_output -- output buffer and BUSY/DONE flags.
// Random words are latched with DOA and shifted out with xfer and the shift
// clock; the serial bits must be the word LSB first. DOA during a transfer
// must be ignored. START sets BUSY/clears DONE, COMP the reverse, CLEAR
// clears both.
module tb_computer_output;
  logic clk = 0, rst = 1, doa = 0, start = 0, clear = 0, comp = 0, sr_clk = 0, xfer = 0;
  logic [15:0] data_bus = 0;
  logic ser_data, busy, done;
  int checks = 0, failures = 0;

  computer_output #(.W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input logic got, input logic want, input string what);
    checks++;
    if (got !== want) begin failures++; if (failures < 10) $display("%s got %b", what, got); end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    chk(busy, 0, "busy after reset"); chk(done, 0, "done after reset");
    for (int w = 0; w < 50; w++) begin
      logic [15:0] word;
      word = 16'($urandom);
      data_bus = word; doa = 1; @(posedge clk); #1 doa = 0; data_bus = 16'($urandom);
      start = 1; @(posedge clk); #1 start = 0;
      chk(busy, 1, "busy after START"); chk(done, 0, "done after START");
      xfer = 1;
      for (int i = 0; i < 16; i++) begin
        chk(ser_data, word[i], "serial bit");
        if (i == 5) begin doa = 1; @(posedge clk); #1 doa = 0; end   // ignored
        sr_clk = 1; @(posedge clk); #1 sr_clk = 0;
        @(posedge clk); #1;
      end
      xfer = 0;
      comp = 1; @(posedge clk); #1 comp = 0;
      chk(busy, 0, "busy after COMP"); chk(done, 1, "done after COMP");
    end
    start = 1; @(posedge clk); #1 start = 0;
    clear = 1; @(posedge clk); #1 clear = 0;
    chk(busy, 0, "busy after CLEAR"); chk(done, 0, "done after CLEAR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
