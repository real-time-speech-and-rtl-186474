// interface_control -- computer side of the loader.
//
// Implements the minicomputer's BUSY/DONE peripheral protocol for the loader:
//   START              -> shift one 8-bit byte from the computer's output
//                         buffer into the loader (xfer high; ends after the
//                         shift made with END OF WORD high), then COMP
//   IOPULSE then START -> start a LOAD sequence (load_filter pulse) and send
//                         COMP when the load control reports it done
//   CLEAR              -> back to idle, and reset of the loader counters
// The loader's panel load switch (rising edge, while idle) also starts a
// LOAD sequence; no COMP is sent for it. A START that arrives while a task is
// running is ignored. The protocol is the document's; the treatment of the
// panel switch and of early STARTs is this design's.
module interface_control (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  logic iopulse,
  input  logic clear,
  input  logic load_sw,
  input  logic end_of_word,
  input  logic loaded,
  input  logic sr_clk,
  output logic load_filter,
  output logic xfer,
  output logic comp,
  output logic loader_reset
);

  typedef enum logic [2:0] {IDLE, ARMED, BYTE, LOAD_CPU, LOAD_PANEL} state_t;
  state_t state_q;
  logic   sw_q;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      state_q     <= IDLE;
      comp        <= 1'b0;
      load_filter <= 1'b0;
      sw_q        <= load_sw;
    end else begin
      comp        <= 1'b0;
      load_filter <= 1'b0;
      sw_q        <= load_sw;
      unique case (state_q)
        IDLE: begin
          if (start)                    state_q <= BYTE;
          else if (iopulse)             state_q <= ARMED;
          else if (load_sw && !sw_q) begin
            state_q     <= LOAD_PANEL;
            load_filter <= 1'b1;
          end
        end
        ARMED: if (start) begin
          state_q     <= LOAD_CPU;
          load_filter <= 1'b1;
        end
        BYTE: if (sr_clk && end_of_word) begin
          state_q <= IDLE;
          comp    <= 1'b1;
        end
        LOAD_CPU: if (loaded) begin
          state_q <= IDLE;
          comp    <= 1'b1;
        end
        LOAD_PANEL: if (loaded) state_q <= IDLE;
        default: state_q <= IDLE;
      endcase
    end
  end

  assign xfer         = (state_q == BYTE);
  assign loader_reset = clear;

endmodule
