// slicer: hard decision of the integrated receive signal.
//
// `bit_out` is 1 when the moving average exceeds the programmable threshold (default 4096 on
// the int16 scale). Strictly greater, registered: one cycle of latency.
module slicer (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [15:0] x,
  input  logic signed [15:0] thresh,
  output logic               bit_out
);

  always_ff @(posedge clk) begin
    if (!rst_n) bit_out <= 1'b0;
    else        bit_out <= (x > thresh);
  end

endmodule
