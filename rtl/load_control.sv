// load_control -- transfers the loader's coefficients to the filter.
//
// A load command starts a four-state sequence, stepped by the filter shift
// clock (sr_clk) and READY:
//   IDLE  -> ALIGN  on load_cmd
//   ALIGN: shift the loader until the shift made with END OF SEQUENCE high,
//          leaving the LSB of h(10) at the loader output (1 to 80 shifts,
//          .01 to 1 sampling period)
//   WAIT:  wait for READY, the start of a filter computation cycle
//          (0 to .99 period)
//   XFER:  shift 80 bits into the filter's coefficient loop (one period),
//          ending after the shift with END OF SEQUENCE high
// loaded pulses for one clock at the end; it answers the interface control
// and latches the exciter parameters. The sequence is the document's; the
// state encoding is this design's.
module load_control (
  input  logic clk,
  input  logic rst,
  input  logic load_cmd,
  input  logic end_of_seq,
  input  logic ready,
  input  logic sr_clk,
  output logic shift,
  output logic xfer,
  output logic loaded
);

  typedef enum logic [1:0] {IDLE, ALIGN, WAIT, XFER} state_t;
  state_t state_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= IDLE;
      loaded  <= 1'b0;
    end else begin
      loaded <= 1'b0;
      unique case (state_q)
        IDLE:  if (load_cmd) state_q <= ALIGN;
        ALIGN: if (sr_clk && end_of_seq) state_q <= WAIT;
        WAIT:  if (ready) state_q <= XFER;
        XFER:  if (sr_clk && end_of_seq) begin
                 state_q <= IDLE;
                 loaded  <= 1'b1;
               end
        default: state_q <= IDLE;
      endcase
    end
  end

  assign shift = (state_q == ALIGN) || (state_q == XFER);
  assign xfer  = (state_q == XFER);

endmodule
