// exciter -- excitation source of the linear-prediction speech synthesizer.
//
// The vocal-tract filter (the transversal filter in a feedback loop) is
// driven either by a pulse train at the pitch period (voiced speech) or by
// noise (unvoiced), scaled by a 7-bit amplitude.
//
// Parameters arrive through a 16-bit extension of the loader's store: each
// ext_clk pulse shifts ext_data in at the top, so the first 16 bits of a
// 96-bit parameter set end up as pitch in bits 7..0 and amplitude in bits
// 14..8 with the voiced flag in bit 15. The latch pulse (end of a coefficient
// transfer) copies them into the buffers, so filter and exciter change
// together.
//
// Once per sample (fs_clk) a down counter steps; when it would reach zero it
// is reloaded from the pitch buffer and a one-sample pulse is produced, giving
// a period of 'pitch' samples (2..255). exc_value is the excitation as an
// 8-bit two's complement sample (units of 1/128), updated on fs_clk:
//   voiced:   +amp on a pulse, 0 otherwise
//   unvoiced: +amp when the noise bit is 1, -amp when it is 0
// In the original hardware an analog multiplexer and a multiplying DAC form
// this product; pulse, voiced and amp are that DAC's digital inputs and are
// brought out as well. Field layout and pulse generator follow the document;
// the sign convention of the noise and the digital product are this design's.
module exciter #(
  parameter int PITCH_W = 8,
  parameter int AMP_W   = 7
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    fs_clk,
  input  logic                    ext_clk,
  input  logic                    ext_data,
  input  logic                    latch,
  input  logic                    noise,
  output logic signed [AMP_W:0]   exc_value,
  output logic                    pulse,
  output logic                    voiced,
  output logic [AMP_W-1:0]        amp
);

  localparam int EXT_W = PITCH_W + AMP_W + 1;

  logic [EXT_W-1:0]   ext_q;
  logic [PITCH_W-1:0] pitch_q, cnt_q;

  always_ff @(posedge clk) begin
    if (rst)          ext_q <= '0;
    else if (ext_clk) ext_q <= {ext_data, ext_q[EXT_W-1:1]};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pitch_q <= '0;
      amp     <= '0;
      voiced  <= 1'b0;
    end else if (latch) begin
      pitch_q <= ext_q[PITCH_W-1:0];
      amp     <= ext_q[PITCH_W +: AMP_W];
      voiced  <= ext_q[EXT_W-1];
    end
  end

  logic reload;
  assign reload = (cnt_q <= PITCH_W'(1));

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt_q     <= '0;
      pulse     <= 1'b0;
      exc_value <= '0;
    end else if (fs_clk) begin
      cnt_q <= reload ? pitch_q : cnt_q - 1'b1;
      pulse <= reload;
      if (voiced) exc_value <= reload ? $signed({1'b0, amp}) : '0;
      else        exc_value <= noise  ? $signed({1'b0, amp}) : -$signed({1'b0, amp});
    end
  end

endmodule
