// tx_filter: transmission filter that shapes the edges of the ASK envelope.
//
// It sets the slew rate of the modulation pulses before upconversion, in two stages. First a
// slew-rate limiter moves its output towards the input by at most `slew` * 16 counts per
// cycle (`slew` = 0: no limit), so the rise and fall times of the pulses are programmable at
// run time. Then the binomial 8-tap low-pass (1 7 21 35 35 21 7 1)/128 rounds the corners: on
// its own it turns a step into an S-shaped ramp of 7 cycles (175 ns) with no overshoot and
// unity DC gain. The document names the filter and counts the slew rate among the parameters
// the reader controls, without giving a response; both stages are this design's choice.
// Input and output are unsigned amplitudes up to 32767; latency is three registers (limiter,
// delay line, output) plus the 3.5-cycle group delay.
module tx_filter (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  slew,
  input  logic [15:0] x,
  output logic [15:0] y
);

  // slew-rate limiter
  logic [15:0]        lim;
  logic signed [16:0] diff;
  logic [15:0]        step;
  assign diff = signed'({1'b0, x}) - signed'({1'b0, lim});
  assign step = {4'd0, slew, 4'd0};

  always_ff @(posedge clk) begin
    if (!rst_n)                             lim <= '0;
    else if (slew == 8'd0)                  lim <= x;
    else if (diff > signed'({1'b0, step}))  lim <= lim + step;
    else if (diff < -signed'({1'b0, step})) lim <= lim - step;
    else                                    lim <= x;
  end

  logic signed [15:0] ys;

  fir_filter #(
    .W(16), .N(8), .SHIFT(7),
    .COEF('{1, 7, 21, 35, 35, 21, 7, 1, 0, 0, 0, 0, 0, 0, 0, 0})
  ) u_fir (
    .clk  (clk),
    .rst_n(rst_n),
    .x    (signed'(lim)),
    .y    (ys)
  );

  // A non-negative input cannot produce a negative output: all coefficients are positive.
  assign y = unsigned'(ys);

endmodule
