// computer_output -- the minicomputer's output stage for the loader.
//
// A W-bit parallel-in/serial-out buffer: while xfer (computer-loader
// transfer) is low, a DOA pulse latches the I/O data bus; while xfer is high,
// each filter shift clock pulse shifts it one place towards the LSB, which
// is the serial output, so a 16-bit word leaves as its low byte, LSB first,
// then its high byte (two START/COMP exchanges). Zeros enter at the top.
//
// The device's BUSY and DONE flip-flops follow the minicomputer's rules:
// START sets BUSY and clears DONE, COMP clears BUSY and sets DONE, CLEAR
// clears both. Reset clears both too. The buffer and the flags are the
// document's; the LSB-first order is inferred from its parameter format.
module computer_output #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] data_bus,
  input  logic         doa,
  input  logic         start,
  input  logic         clear,
  input  logic         comp,
  input  logic         sr_clk,
  input  logic         xfer,
  output logic         ser_data,
  output logic         busy,
  output logic         done
);

  logic [W-1:0] buf_q;

  always_ff @(posedge clk) begin
    if (rst)                  buf_q <= '0;
    else if (!xfer && doa)    buf_q <= data_bus;
    else if (xfer && sr_clk)  buf_q <= {1'b0, buf_q[W-1:1]};
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      busy <= 1'b0;
      done <= 1'b0;
    end else if (start) begin
      busy <= 1'b1;
      done <= 1'b0;
    end else if (comp) begin
      busy <= 1'b0;
      done <= 1'b1;
    end
  end

  assign ser_data = buf_q[0];

endmodule
