// tx_mux: the transmit MUX, which also holds the continuous carrier source.
//
// It selects, under TX control, the envelope level handed to the ASK modulator: off (no
// field), full (the continuous carrier, a constant full level) or the pulse interval encoded
// envelope, whose low cycles become the reduced level. The output is registered: one cycle
// of latency from `src`/`env` to `level`.
module tx_mux
  import rfid_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  tx_src_e   src,
  input  logic      env,
  output tx_level_e level
);

  always_ff @(posedge clk) begin
    if (!rst_n) level <= LVL_OFF;
    else begin
      unique case (src)
        SRC_CW:   level <= LVL_FULL;
        SRC_DATA: level <= env ? LVL_FULL : LVL_LOW;
        default:  level <= LVL_OFF;
      endcase
    end
  end

endmodule
