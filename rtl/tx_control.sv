// tx_control: transmit state machine of the reader.
//
// It decides what the antenna carries: nothing, the continuous carrier, or the pulse
// interval encoded frame, and it hands frames from the DSP interface to the encoder.
// With `carrier_on` low the field is off. With it high the MUX sends the continuous carrier
// until the DSP requests a frame (`start`, with `preamble` choosing preamble or frame-sync):
// the encoder is started and the MUX switched to the encoded envelope until the encoder
// reports `enc_done`, after which the carrier continues unmodulated (the tag is powered by
// it while it replies), `tx_done` pulses and `rx_arm` pulses to start listening for the
// reply. A start request while the carrier is off is ignored. The states and the arming of
// the receiver are this design's own; the document names the unit and its two jobs
// (controlling the interface, switching to continuous carrier mode).
//
// Timing: `enc_start` is registered, one cycle after `start`; `src` changes in the same cycle.
module tx_control
  import rfid_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    carrier_on,
  input  logic    start,
  input  logic    preamble,
  input  logic    enc_done,
  input  logic    enc_underrun,
  output tx_src_e src,
  output logic    enc_start,
  output logic    enc_preamble,
  output logic    tx_done,
  output logic    tx_underrun,
  output logic    rx_arm
);

  typedef enum logic [1:0] {T_OFF, T_CW, T_SEND} state_e;
  state_e state;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= T_OFF;
      enc_start    <= 1'b0;
      enc_preamble <= 1'b0;
      tx_done      <= 1'b0;
      tx_underrun  <= 1'b0;
      rx_arm       <= 1'b0;
    end else begin
      enc_start   <= 1'b0;
      tx_done     <= 1'b0;
      tx_underrun <= 1'b0;
      rx_arm      <= 1'b0;
      unique case (state)
        T_OFF: if (carrier_on) state <= T_CW;
        T_CW: begin
          if (!carrier_on) state <= T_OFF;
          else if (start) begin
            state        <= T_SEND;
            enc_start    <= 1'b1;
            enc_preamble <= preamble;
          end
        end
        T_SEND: begin
          // The frame always completes; dropping the carrier mid-frame would strand the tag.
          if (enc_done) begin
            state       <= carrier_on ? T_CW : T_OFF;
            tx_done     <= 1'b1;
            tx_underrun <= enc_underrun;
            rx_arm      <= !enc_underrun;
          end
        end
        default: state <= T_OFF;
      endcase
    end
  end

  always_comb begin
    unique case (state)
      T_CW:    src = SRC_CW;
      T_SEND:  src = SRC_DATA;
      default: src = SRC_OFF;
    endcase
  end

endmodule
