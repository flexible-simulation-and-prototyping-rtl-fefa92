// rx_reg_ir: receive register and interrupt source towards the DSP.
//
// Decoded bits are shifted into a 32-bit register, first received bit towards the MSB. Every
// 32 bits the word is pushed out (`word_valid`). When the reply ends (`frame_done`) any partial
// word is pushed with its bits in the low end, `bit_count` and `violation` of the reply are
// latched, and `rx_done` pulses to raise the receive interrupt. The bit order and word size are
// this design's own.
//
// Timing: `word_valid` is registered, one cycle after the bit that fills the word, or one
// cycle after `frame_done`.
module rx_reg_ir (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        frame_start,
  input  logic        bit_valid,
  input  logic        bit_in,
  input  logic        frame_done,
  input  logic        violation_in,
  output logic        word_valid,
  output logic [31:0] word,
  output logic [15:0] bit_count,
  output logic        violation,
  output logic        rx_done
);

  logic [31:0] shreg;
  logic [4:0]  fill;     // bits in shreg
  logic [15:0] nbits;    // bits in the current reply

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shreg      <= '0;
      fill       <= '0;
      nbits      <= '0;
      word_valid <= 1'b0;
      word       <= '0;
      bit_count  <= '0;
      violation  <= 1'b0;
      rx_done    <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      rx_done    <= 1'b0;
      if (frame_start) begin
        shreg <= '0;
        fill  <= '0;
        nbits <= '0;
      end else if (frame_done) begin
        if (fill != 5'd0) begin
          word_valid <= 1'b1;
          word       <= shreg;
        end
        shreg     <= '0;
        fill      <= '0;
        bit_count <= nbits;
        violation <= violation_in;
        rx_done   <= 1'b1;
      end else if (bit_valid) begin
        nbits <= nbits + 16'd1;
        if (fill == 5'd31) begin
          word_valid <= 1'b1;
          word       <= {shreg[30:0], bit_in};
          shreg      <= '0;
          fill       <= '0;
        end else begin
          shreg <= {shreg[30:0], bit_in};
          fill  <= fill + 5'd1;
        end
      end
    end
  end

endmodule
