// edit_control -- step-switch controller of the loader.
//
// The loader keeps the coefficients in the order h(10)..h(1). Each press of
// the step switch rotates the data by 72 bits (nine words), so successive
// presses show the coefficients in ascending order h(1)..h(10). A three-state
// machine does it, stepping on edit clock pulses:
//   STEADY -> SHIFT  when the step switch is down
//   SHIFT  -> WAIT   after the shift made while END OF 9 WORDS is high
//   WAIT   -> STEADY when the step switch is up
// shift is high in SHIFT; the storage shifts once per edit clock pulse then.
// States and transitions are the document's; the encoding is this design's.
module edit_control (
  input  logic clk,
  input  logic rst,
  input  logic edit_clk,
  input  logic step_sw,
  input  logic end_of_9_words,
  output logic shift
);

  typedef enum logic [1:0] {STEADY, SHIFT, WAIT} state_t;
  state_t state_q;

  always_ff @(posedge clk) begin
    if (rst) state_q <= STEADY;
    else if (edit_clk) begin
      unique case (state_q)
        STEADY: if (step_sw)        state_q <= SHIFT;
        SHIFT:  if (end_of_9_words) state_q <= WAIT;
        WAIT:   if (!step_sw)       state_q <= STEADY;
        default:                    state_q <= STEADY;
      endcase
    end
  end

  assign shift = (state_q == SHIFT);

endmodule
