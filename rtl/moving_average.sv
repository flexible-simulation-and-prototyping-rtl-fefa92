// moving_average: the receiver's integrator, a running mean over `len` samples.
//
// The source sets the length to half a period of the tag's link frequency: 24 cycles for the
// 847 kHz FM0 reply at 40 MHz, the reset value. This design makes the length a run-time input
// (1..MAX_LEN) so the same chain also takes the ISO 15693 answer: set to one period of its
// 423.75 kHz subcarrier (94 cycles), the mean turns a burst of subcarrier into a steady level
// and an unmodulated stretch into another, which the slicer then separates.
//
// A running sum adds the newest sample and subtracts the one `len` samples old, read from a
// circular buffer of MAX_LEN entries (a power of two). The mean is
// sum * round(2^24/len) >> 24, with the reciprocals in a table computed at elaboration, so
// the output stays on the input's scale (the slicer threshold refers to it). When `len`
// changes the sum restarts from zero and samples older than the restart count as zero, so
// the output is the mean over the samples seen so far until `len` of them have arrived.
// Signed 16-bit in and out; the output is registered, one cycle after the sum it reflects.
module moving_average #(
  parameter int unsigned MAX_LEN = 128
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [7:0]         len,
  input  logic signed [15:0] x,
  output logic signed [15:0] y
);

  localparam int unsigned AW    = $clog2(MAX_LEN);
  localparam int unsigned SUM_W = 16 + AW + 1;

  typedef logic [24:0] recip_t [MAX_LEN + 1];

  function automatic recip_t make_recip();
    recip_t t;
    t[0] = 25'd0;
    for (int k = 1; k <= MAX_LEN; k++) t[k] = 25'(((1 << 24) + k / 2) / k);
    return t;
  endfunction

  localparam recip_t RECIP = make_recip();

  // lengths outside 1..MAX_LEN are clamped
  logic [AW:0] len_eff;
  always_comb begin
    if (len == 8'd0)                  len_eff = (AW + 1)'(1);
    else if (32'(len) > MAX_LEN)      len_eff = (AW + 1)'(MAX_LEN);
    else                              len_eff = (AW + 1)'(len);
  end

  logic signed [15:0]       ring [MAX_LEN];
  logic [AW-1:0]            wp;         // next entry to write
  logic [AW:0]              fill;       // samples summed since the last restart, up to len
  logic [AW:0]              len_q;
  logic signed [SUM_W-1:0]  sum;
  logic [24:0]              recip_q;
  logic signed [15:0]       old;
  logic signed [SUM_W+26:0] prod;

  // the sample leaving the window, or zero while the window is still filling
  assign old  = (fill == len_eff) ? ring[wp - AW'(len_eff)] : 16'sd0;

  // samples in the window after this cycle, which selects the reciprocal
  logic restart;
  logic [AW:0] n_next;
  assign restart = (len_eff != len_q);
  always_comb begin
    if (restart)              n_next = (AW + 1)'(1);
    else if (fill != len_eff) n_next = fill + (AW + 1)'(1);
    else                      n_next = len_eff;
  end

  assign prod = (SUM_W + 27)'(sum) * signed'((SUM_W + 27)'(recip_q));

  always_ff @(posedge clk) begin
    ring[wp] <= x;
    if (!rst_n) begin
      wp      <= '0;
      fill    <= '0;
      len_q   <= '0;
      sum     <= '0;
      recip_q <= '0;
      y       <= '0;
    end else begin
      wp      <= wp + AW'(1);
      len_q   <= len_eff;
      y       <= 16'(prod >>> 24);
      fill    <= n_next;
      recip_q <= RECIP[n_next];
      // a new length restarts the window with this sample
      if (restart) sum <= SUM_W'(x);
      else         sum <= sum + SUM_W'(x) - SUM_W'(old);
    end
  end

endmodule
