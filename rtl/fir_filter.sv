// fir_filter: direct-form FIR filter with constant integer coefficients.
//
// y[n] = saturate( sum_k COEF[k] * x[n-k] >> SHIFT ). With the coefficients summing to
// 2^SHIFT the DC gain is one. Input and output are signed, W bits. The delay line and the
// output are registered, so y follows x by two cycles plus the filter's group delay.
// N is at most 16. Used by the transmit filter and by the receive filter, which supply the coefficients.
module fir_filter #(
  parameter int unsigned W     = 16,
  parameter int unsigned N     = 9,
  parameter int unsigned SHIFT = 8,
  // Coefficients in the first N of 16 entries; the rest are ignored.
  parameter int          COEF [16] = '{3, 11, 30, 53, 62, 53, 30, 11, 3, 0, 0, 0, 0, 0, 0, 0}
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);

  localparam int unsigned ACC_W = W + 16 + $clog2(N);

  logic signed [W-1:0]     taps [N];
  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W-1:0] scaled;

  always_comb begin
    acc = '0;
    for (int k = 0; k < N; k++) begin
      acc += ACC_W'(signed'(COEF[k])) * ACC_W'(taps[k]);
    end
    scaled = acc >>> SHIFT;
  end

  localparam logic signed [ACC_W-1:0] MAXV = ACC_W'((2 ** (W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] MINV = -ACC_W'(2 ** (W - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) taps[k] <= '0;
      y <= '0;
    end else begin
      taps[0] <= x;
      for (int k = 1; k < N; k++) taps[k] <= taps[k-1];
      if (scaled > MAXV)      y <= MAXV[W-1:0];
      else if (scaled < MINV) y <= MINV[W-1:0];
      else                    y <= scaled[W-1:0];
    end
  end

endmodule
