// keyboard_encoder -- 16-key hex keyboard scanner of the loader.
//
// A scan counter steps a 16-line selector through the keys, one key per scan
// clock pulse (edit_clk, every SCAN_DIV master clocks; 2500 gives the
// document's 400 Hz at a 1 MHz master clock). A 16-bit shift register,
// rotated with the scan, remembers each key's state from the previous scan.
// When the selected key is down now but was up on the previous scan, the
// encoder puts the key's number on key_code and gives one latch pulse, to
// load_left and load_right alternately (left first after reset), so two key
// presses enter the two hex digits of the displayed coefficient.
// left_ind / right_ind show which digit the next key will set.
//
// Timing: key_code is registered with the load pulse and holds until the next
// press. The scan scheme is the document's; the divider, the left-first order
// and the registered outputs are this design's.
module keyboard_encoder #(
  parameter int N_KEYS   = 16,
  parameter int SCAN_DIV = 2500
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [N_KEYS-1:0] keys,
  output logic              edit_clk,
  output logic [3:0]        key_code,
  output logic              load_left,
  output logic              load_right,
  output logic              right_ind,
  output logic              left_ind
);

  localparam int DW = (SCAN_DIV > 1) ? $clog2(SCAN_DIV) : 1;

  logic [DW-1:0]     div_q;
  logic [3:0]        scan_q;
  logic [N_KEYS-1:0] mem_q;       // previous state, rotated with the scan
  logic              next_right;  // next digit goes to the right half
  logic              tick, sel, was_down, press;

  assign tick     = (div_q == DW'(SCAN_DIV - 1));
  assign sel      = keys[scan_q];
  assign was_down = mem_q[N_KEYS-1];
  assign press    = tick && sel && !was_down;

  always_ff @(posedge clk) begin
    if (rst) begin
      div_q      <= '0;
      scan_q     <= '0;
      mem_q      <= '0;
      next_right <= 1'b0;
      key_code   <= '0;
      load_left  <= 1'b0;
      load_right <= 1'b0;
    end else begin
      div_q      <= tick ? '0 : div_q + 1'b1;
      load_left  <= press && !next_right;
      load_right <= press &&  next_right;
      if (tick) begin
        scan_q <= (scan_q == 4'(N_KEYS - 1)) ? '0 : scan_q + 4'd1;
        mem_q  <= {mem_q[N_KEYS-2:0], sel};
      end
      if (press) begin
        key_code   <= scan_q;
        next_right <= !next_right;
      end
    end
  end

  assign edit_clk  = tick;
  assign right_ind = next_right;
  assign left_ind  = !next_right;

endmodule
