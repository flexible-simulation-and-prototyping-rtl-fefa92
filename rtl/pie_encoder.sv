// pie_encoder: pulse interval encoder of the reader's transmit path.
//
// A frame starts with a delimiter (envelope low for `delim` cycles), then a data-0 symbol and
// an RTCal symbol, and, when `preamble` is set, a TRCal symbol; without it the opening is the
// shorter frame-sync. Then every bit of the stream becomes a symbol: data-0 lasts `tari`
// cycles, data-1 lasts `rtcal - tari`. Each symbol is high (carrier) for its length minus
// `pw` and then low (modulated) for `pw`. The symbol rules follow EPC Class-1 Gen-2; the
// timing values are run-time inputs so the whole range of the standards can be explored.
//
// Interface: pulse `start` (with `preamble`) while idle. Bits come on a valid/ready stream
// (`bit_valid`, `bit_data`, `bit_last`; `bit_ready` pulses when a bit is taken at the start of
// its symbol). `env` is 1 for carrier and 0 for a modulation pulse, registered. `done`
// pulses one cycle after the last symbol ends. If no bit is ready when a symbol must begin,
// the frame is cut short and `underrun` pulses together with `done`.
module pie_encoder
  import rfid_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  pie_timing_t timing,
  input  logic        start,
  input  logic        preamble,
  input  logic        bit_valid,
  input  logic        bit_data,
  input  logic        bit_last,
  output logic        bit_ready,
  output logic        env,
  output logic        busy,
  output logic        done,
  output logic        underrun
);

  typedef enum logic [2:0] {S_IDLE, S_DELIM, S_DATA0, S_RTCAL, S_TRCAL, S_BITS} state_e;

  state_e      state;
  logic [15:0] cnt;       // cycles left in the current symbol
  logic [15:0] sym_len;   // length of the current symbol
  logic        last_sym;  // current symbol is the last of the frame
  logic        with_trcal;

  logic [15:0] data1_len;
  assign data1_len = timing.rtcal - timing.tari;

  // A bit symbol begins when the previous symbol has reached its final cycle.
  logic sym_end;
  assign sym_end = (state != S_IDLE) && (cnt == 16'd1);

  logic need_bit;
  assign need_bit = sym_end && !last_sym &&
                    ((state == S_TRCAL) || (state == S_BITS) ||
                     (state == S_RTCAL && !with_trcal));
  assign bit_ready = need_bit && bit_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cnt        <= '0;
      sym_len    <= '0;
      last_sym   <= 1'b0;
      with_trcal <= 1'b0;
      env        <= 1'b1;
      done       <= 1'b0;
      underrun   <= 1'b0;
    end else begin
      done     <= 1'b0;
      underrun <= 1'b0;
      unique case (state)
        S_IDLE: begin
          env <= 1'b1;
          if (start) begin
            state      <= S_DELIM;
            with_trcal <= preamble;
            last_sym   <= 1'b0;
            cnt        <= timing.delim;
            sym_len    <= timing.delim;
            env        <= 1'b0;
          end
        end
        default: begin
          if (sym_end) begin
            if (last_sym) begin
              state <= S_IDLE;
              env   <= 1'b1;
              done  <= 1'b1;
            end else if (state == S_DELIM) begin
              state   <= S_DATA0;
              cnt     <= timing.tari;
              sym_len <= timing.tari;
              env     <= (timing.tari > timing.pw);
            end else if (state == S_DATA0) begin
              state   <= S_RTCAL;
              cnt     <= timing.rtcal;
              sym_len <= timing.rtcal;
              env     <= (timing.rtcal > timing.pw);
            end else if (state == S_RTCAL && with_trcal) begin
              state   <= S_TRCAL;
              cnt     <= timing.trcal;
              sym_len <= timing.trcal;
              env     <= (timing.trcal > timing.pw);
            end else if (bit_valid) begin
              state    <= S_BITS;
              last_sym <= bit_last;
              cnt      <= bit_data ? data1_len : timing.tari;
              sym_len  <= bit_data ? data1_len : timing.tari;
              env      <= ((bit_data ? data1_len : timing.tari) > timing.pw);
            end else begin
              state    <= S_IDLE;
              env      <= 1'b1;
              done     <= 1'b1;
              underrun <= 1'b1;
            end
          end else begin
            cnt <= cnt - 16'd1;
            // The delimiter is low throughout; every other symbol drops for its last pw cycles.
            if (state != S_DELIM) env <= ((cnt - 16'd1) > timing.pw);
          end
        end
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // A symbol must be longer than its pulse for the encoding to be meaningful.
  a_sym_len : assert property (@(posedge clk) disable iff (!rst_n)
    (busy && state != S_DELIM) |-> (sym_len > timing.pw));

endmodule
