// tb_prbs_noise -- the noise sequence against an independent LFSR model,
// its period (32767 steps) and its balance (16384 ones per period). It must
// not advance without en.
module tb_prbs_noise;
  logic clk = 0, rst = 1, en = 0, noise;
  int checks = 0, failures = 0;

  prbs_noise #(.LFSR_W(15)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [14:0] m;
    int ones;
    m = 15'd1; ones = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 32767; i++) begin
      checks++;
      if (noise !== m[14]) failures++;
      ones += m[14];
      // an idle clock first: the sequence must hold
      @(posedge clk); #1;
      checks++;
      if (noise !== m[14]) failures++;
      en = 1;
      @(posedge clk); #1;
      m = {m[13:0], m[14] ^ m[13]};
      en = 0;
    end
    checks++;
    if (m != 15'd1 || ones != 16384) begin failures++; $display("period end %h ones %0d", m, ones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
