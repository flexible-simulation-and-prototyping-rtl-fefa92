// ask_modulator: amplitude shift keying of the transmit envelope.
//
// Maps the level from the MUX to an amplitude: off gives 0, full gives `amp_full`, low gives
// `amp_full * (1 - depth_q8/256)`. The modulation depth is programmable (the HF query
// measurements used 30 % and 15 %; 77/256 and 38/256 here). Expressing the depth in 1/256
// steps is this design's choice. The low amplitude is recomputed from the registers each
// cycle; the output is registered, one cycle after `level`.
module ask_modulator
  import rfid_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  tx_level_e   level,
  input  logic [15:0] amp_full,   // unsigned, at most 32767 for the signed mixer
  input  logic [7:0]  depth_q8,
  output logic [15:0] amp
);

  logic [23:0] drop;   // amp_full * depth; bits [7:0] are the truncated fraction
  logic [15:0] amp_low;
  assign drop    = amp_full * depth_q8;
  assign amp_low = amp_full - drop[23:8];

  always_ff @(posedge clk) begin
    if (!rst_n) amp <= '0;
    else begin
      unique case (level)
        LVL_FULL: amp <= amp_full;
        LVL_LOW:  amp <= amp_low;
        default:  amp <= '0;
      endcase
    end
  end

endmodule
