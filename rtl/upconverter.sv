// upconverter: numerically controlled oscillator and mixer that put the envelope on the
// 13.56 MHz carrier for the DAC.
//
// A 32-bit phase accumulator advances by `ftw` each cycle; its top LUT_BITS bits address a
// full-cycle sine table of signed 16-bit values (amplitude 32767), computed at elaboration as
// round(32767 * sin(2*pi*i / 2^LUT_BITS)). The mixer multiplies the envelope amplitude
// (0..32767) by the sine and keeps bits [30:15] of the product, a signed 16-bit DAC sample.
// The default tuning word gives 13.56 MHz at the 40 MHz clock. Oscillator and table size are
// this design's choice; the document shows only a mixer fed by an oscillator.
//
// Timing: two registers; `dac` at cycle n is amp[n-2] * sin(phase[n-2]), where phase[n] is
// the accumulator value in cycle n (0 after reset).
module upconverter
  import rfid_pkg::*;
#(
  parameter int unsigned LUT_BITS = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [15:0]        amp,
  input  logic [31:0]        ftw,
  output logic signed [15:0] dac
);

  localparam int unsigned LUT_N = 2 ** LUT_BITS;
  typedef logic signed [15:0] lut_t [LUT_N];

  function automatic lut_t make_sine();
    lut_t t;
    for (int i = 0; i < LUT_N; i++) begin
      t[i] = 16'($rtoi($floor(32767.0 * $sin(2.0 * 3.14159265358979323846 * i / LUT_N) + 0.5)));
    end
    return t;
  endfunction

  localparam lut_t SINE = make_sine();

  logic [31:0]        phase;
  logic signed [15:0] sin_q;
  logic [15:0]        amp_q;
  logic signed [32:0] prod;

  assign prod = signed'({1'b0, amp_q}) * sin_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= '0;
      sin_q <= '0;
      amp_q <= '0;
      dac   <= '0;
    end else begin
      phase <= phase + ftw;
      sin_q <= SINE[phase[31 -: LUT_BITS]];
      amp_q <= amp;
      dac   <= prod[30:15];
    end
  end

endmodule
