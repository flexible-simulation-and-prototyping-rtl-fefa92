// symbol_decoder: turns pairs of half-symbol samples into bits.
//
// FM0 (tag reply of the UHF and HF EPC standards): the first half sample after `frame_start`
// opens the first symbol and each following pair forms one symbol (h0, h1). Equal halves give
// 1, a change in the middle gives 0, and the level must change at every symbol boundary
// (h0 != previous h1); a missing boundary change is a coding violation. A half sample left
// unpaired when `frame_end` arrives is dropped. A symbol of two low halves is held back until
// the next half sample arrives: if the reply ends first, it was the line returning to its idle
// level after a reply that ended high, and it is dropped.
//
// Manchester (ISO/IEC 15693 answer, modulated = high): the answer opens with a start of frame
// of three high halves followed by a logic 1 (low, high). The decoder checks and strips these
// five halves; a mismatch is a violation. Then high-low gives 0 and low-high gives 1, and two
// low halves are a violation (reported as 0). A pair of two high halves can only be the end
// of frame, which is a logic 0 followed by three high halves: to strip that logic 0, every bit
// is held back until the next pair has been seen, and dropped when that pair is high-high.
// Halves after the end of frame are ignored. A reply that ends without one sets the violation
// flag, and its held-back last bit is dropped.
//
// The frame rules are those of the two standards; the hold-back scheme is this design's own.
// `violation` is sticky until the next `frame_start`; `done` follows `frame_end` by one cycle.
// `bit_valid` is registered: one cycle after the half that completes the symbol, or the half
// (FM0) or pair (Manchester) that releases a held-back symbol.
module symbol_decoder
  import rfid_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  rx_code_e code,
  input  logic     frame_start,
  input  logic     frame_end,
  input  logic     half_valid,
  input  logic     half_val,
  output logic     bit_valid,
  output logic     bit_out,
  output logic     violation,
  output logic     done
);

  // position in an ISO 15693 answer
  typedef enum logic [1:0] {M_SOF, M_DATA, M_EOF} mframe_e;

  logic    have_h0;    // first half of the current symbol held
  logic    h0;
  logic    prev_h1;    // second half of the previous symbol
  logic    first_sym;  // no previous symbol in this frame
  logic    pend;       // a symbol is held back
  logic    pend_bit, pend_viol;
  mframe_e mframe;
  logic [2:0] sof_idx; // halves of the start of frame seen

  // FM0 decode of the symbol completed by this half
  logic fm0_bit, fm0_viol;
  assign fm0_bit  = (h0 == half_val);
  assign fm0_viol = !first_sym && (h0 == prev_h1);

  // start of frame: high, high, high, low, high
  logic sof_expect;
  assign sof_expect = (sof_idx != 3'd3);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      have_h0   <= 1'b0;
      h0        <= 1'b0;
      prev_h1   <= 1'b0;
      first_sym <= 1'b1;
      pend      <= 1'b0;
      pend_bit  <= 1'b0;
      pend_viol <= 1'b0;
      mframe    <= M_SOF;
      sof_idx   <= '0;
      bit_valid <= 1'b0;
      bit_out   <= 1'b0;
      violation <= 1'b0;
      done      <= 1'b0;
    end else begin
      bit_valid <= 1'b0;
      done      <= frame_end;
      if (frame_start) begin
        have_h0   <= 1'b0;
        first_sym <= 1'b1;
        pend      <= 1'b0;
        violation <= 1'b0;
        mframe    <= M_SOF;
        sof_idx   <= '0;
      end else if (frame_end) begin
        have_h0 <= 1'b0;
        pend    <= 1'b0;
        // an ISO 15693 answer must close with its end of frame
        if (code == CODE_MANCHESTER && mframe != M_EOF) violation <= 1'b1;
      end else if (half_valid && code == CODE_FM0) begin
        if (!have_h0) begin
          have_h0 <= 1'b1;
          h0      <= half_val;
          // the reply goes on: a held-back symbol was real
          if (pend) begin
            pend      <= 1'b0;
            bit_valid <= 1'b1;
            bit_out   <= pend_bit;
            if (pend_viol) violation <= 1'b1;
          end
        end else begin
          have_h0   <= 1'b0;
          prev_h1   <= half_val;
          first_sym <= 1'b0;
          if (!h0 && !half_val) begin
            pend      <= 1'b1;
            pend_bit  <= fm0_bit;
            pend_viol <= fm0_viol;
          end else begin
            bit_valid <= 1'b1;
            bit_out   <= fm0_bit;
            if (fm0_viol) violation <= 1'b1;
          end
        end
      end else if (half_valid) begin
        unique case (mframe)
          M_SOF: begin
            if (half_val != sof_expect) violation <= 1'b1;
            sof_idx <= sof_idx + 3'd1;
            if (sof_idx == 3'd4) mframe <= M_DATA;
          end
          M_DATA: begin
            if (!have_h0) begin
              have_h0 <= 1'b1;
              h0      <= half_val;
            end else begin
              have_h0 <= 1'b0;
              if (h0 && half_val) begin
                // end of frame: the held-back bit was its logic 0
                mframe <= M_EOF;
                pend   <= 1'b0;
                if (!pend || pend_bit) violation <= 1'b1;
              end else begin
                if (pend) begin
                  bit_valid <= 1'b1;
                  bit_out   <= pend_bit;
                  if (pend_viol) violation <= 1'b1;
                end
                pend      <= 1'b1;
                pend_bit  <= half_val;
                pend_viol <= (h0 == half_val);
              end
            end
          end
          default: ;   // after the end of frame
        endcase
      end
    end
  end

endmodule
