// tb_exciter -- parameter path, pitch pulse train and noise excitation.
// Parameter pairs (pitch byte, then amplitude/voicing byte, each LSB first)
// are shifted into the extension register and latched. In voiced mode the
// pulses must be exactly 'pitch' samples apart with exc_value = +amp on a
// pulse and 0 between; in unvoiced mode exc_value must be +amp or -amp as
// the noise bit applied at that sample says. Extra shifts without a latch
// must not change the running parameters.
module tb_exciter;
  logic clk = 0, rst = 1, fs_clk = 0, ext_clk = 0, ext_data = 0, latch = 0, noise = 0;
  logic signed [7:0] exc_value;
  logic pulse, voiced;
  logic [6:0] amp;
  int checks = 0, failures = 0;
  int n_voiced_pulses = 0, n_noise = 0;

  exciter #(.PITCH_W(8), .AMP_W(7)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic send(input logic [7:0] pitch, input logic [7:0] ampv);
    logic [15:0] w;
    w = {ampv, pitch};
    for (int i = 0; i < 16; i++) begin
      ext_data = w[i]; ext_clk = 1; @(posedge clk); #1 ext_clk = 0;
    end
  endtask

  // one sample: fs_clk pulse with a chosen noise bit; returns the new output
  task automatic sample(input logic nz);
    noise = nz; fs_clk = 1; @(posedge clk); #1 fs_clk = 0;
    repeat (3) @(posedge clk); #1;
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int set = 0; set < 12; set++) begin
      logic [7:0] pitch; logic [6:0] a; bit v;
      int last, gaps;
      pitch = 8'($urandom_range(2, 40));
      a = 7'($urandom_range(1, 127));
      v = (set % 2 == 0);
      send(pitch, {v, a});
      latch = 1; @(posedge clk); #1 latch = 0;
      send(8'($urandom), 8'($urandom));     // not latched: no effect
      checks++;
      if (amp !== a || voiced !== v) failures++;
      last = -1; gaps = 0;
      for (int s = 0; s < 300; s++) begin
        logic nz;
        nz = 1'($urandom);
        sample(nz);
        checks++;
        if (v) begin
          if (pulse) begin
            if (exc_value !== $signed({1'b0, a})) failures++;
            if (last >= 0 && s - last != int'(pitch)) begin
              failures++;
              $display("set %0d: pulse gap %0d, pitch %0d", set, s - last, pitch);
            end
            if (last >= 0) gaps++;
            last = s;
            n_voiced_pulses++;
          end else if (exc_value !== 0) failures++;
        end else begin
          n_noise++;
          if (exc_value !== (nz ? $signed({1'b0, a}) : -$signed({1'b0, a}))) failures++;
        end
      end
      if (v) begin checks++; if (gaps < 5) failures++; end
    end
    checks++;
    if (n_voiced_pulses == 0 || n_noise == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
