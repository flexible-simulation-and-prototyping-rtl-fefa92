// rx_filter: receive low-pass filter of order 8 (9 taps) ahead of the moving average.
//
// It removes out-of-band noise from the envelope-detected ADC signal. The order is the
// document's; the coefficients are this design's: a Hamming-windowed sinc with a 2.5 MHz
// cutoff at the 40 MHz sample rate, rounded to integers summing to 256 so that the DC gain
// is one: 3 11 30 53 62 53 30 11 3. Signed 16-bit in and out, saturating; latency two
// registers plus the 4-cycle group delay.
module rx_filter (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [15:0] x,
  output logic signed [15:0] y
);

  fir_filter #(
    .W(16), .N(9), .SHIFT(8),
    .COEF('{3, 11, 30, 53, 62, 53, 30, 11, 3, 0, 0, 0, 0, 0, 0, 0})
  ) u_fir (
    .clk  (clk),
    .rst_n(rst_n),
    .x    (x),
    .y    (y)
  );

endmodule
