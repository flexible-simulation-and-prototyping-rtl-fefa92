// ppm4_encoder: "1 out of 4" pulse position encoder for ISO/IEC 15693 reader commands.
//
// Each pair of bits (first bit the less significant) becomes one symbol of eight slots of
// `slot` cycles (9.44 us, 378 cycles at 40 MHz); the envelope drops for one whole slot at
// position 2*value+1 and is high in the other seven. A frame opens with the start-of-frame
// pattern (slots: pulse, 4 high, pulse, 2 high) and closes with the end-of-frame pattern
// (2 high, pulse, high). The 1-out-of-4 coding itself is named by the document; the slot
// patterns follow ISO/IEC 15693-2.
//
// Interface: as pie_encoder. `start` while idle opens a frame; bits come from the same
// valid/ready stream, two per symbol: the first is taken two cycles and the second one cycle
// before the symbol begins, so symbols follow each other without gaps. A pair whose first bit
// carries `bit_last` is completed with a 0. If the stream has no bit when one is needed, the
// end-of-frame is sent at once and `underrun` pulses with `done`. `env` is registered.
module ppm4_encoder (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] slot,
  input  logic        start,
  input  logic        bit_valid,
  input  logic        bit_data,
  input  logic        bit_last,
  output logic        bit_ready,
  output logic        env,
  output logic        busy,
  output logic        done,
  output logic        underrun
);

  typedef enum logic [1:0] {P_IDLE, P_SOF, P_DATA, P_EOF} state_e;

  localparam logic [7:0] SOF_PAT = 8'b1101_1110;   // slot 0 in bit 0: pulse, 4 high, pulse, 2 high
  localparam logic [3:0] EOF_PAT = 4'b1011;        // high, high, pulse, high

  state_e      state;
  logic [15:0] cnt;        // cycles left in the current slot
  logic [2:0]  sidx;       // slot index within the symbol
  logic [2:0]  nslots_m1;  // slots in the symbol, minus one
  logic [7:0]  pat;        // envelope of each slot
  logic        b0, b0_last, have_b0;
  logic        more;       // the stream has not ended: another pair follows
  logic        dry;        // the stream ran dry

  logic sym_last_cycle, sym_2nd_last;
  assign sym_last_cycle = (state != P_IDLE) && (cnt == 16'd1) && (sidx == nslots_m1);
  // two cycles before the symbol ends (slot >= 2 assumed)
  assign sym_2nd_last   = (state != P_IDLE) && (cnt == 16'd2) && (sidx == nslots_m1);

  // bits are fetched during the last slot of SOF or of a data symbol
  logic fetch_phase;
  assign fetch_phase = (state == P_SOF || state == P_DATA) && more;

  logic take_b0, take_b1;
  assign take_b0 = fetch_phase && sym_2nd_last && bit_valid;
  assign take_b1 = fetch_phase && sym_last_cycle && have_b0 && !b0_last && bit_valid;
  assign bit_ready = take_b0 || take_b1;

  function automatic logic [7:0] data_pat(logic [1:0] v);
    logic [7:0] p = 8'hFF;
    p[{v, 1'b1}] = 1'b0;
    return p;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= P_IDLE;
      cnt       <= '0;
      sidx      <= '0;
      nslots_m1 <= '0;
      pat       <= '1;
      b0        <= 1'b0;
      b0_last   <= 1'b0;
      have_b0   <= 1'b0;
      more      <= 1'b0;
      dry       <= 1'b0;
      env       <= 1'b1;
      done      <= 1'b0;
      underrun  <= 1'b0;
    end else begin
      done     <= 1'b0;
      underrun <= 1'b0;
      if (take_b0) begin
        b0      <= bit_data;
        b0_last <= bit_last;
        have_b0 <= 1'b1;
      end
      if (state == P_IDLE) begin
        env <= 1'b1;
        if (start) begin
          state     <= P_SOF;
          pat       <= SOF_PAT;
          nslots_m1 <= 3'd7;
          sidx      <= '0;
          cnt       <= slot;
          env       <= SOF_PAT[0];
          more      <= 1'b1;
          dry       <= 1'b0;
          have_b0   <= 1'b0;
        end
      end else if (cnt != 16'd1) begin
        cnt <= cnt - 16'd1;
      end else if (sidx != nslots_m1) begin
        sidx <= sidx + 3'd1;
        cnt  <= slot;
        env  <= pat[sidx + 3'd1];
      end else begin
        // symbol complete: choose the next one
        sidx    <= '0;
        cnt     <= slot;
        have_b0 <= 1'b0;
        if (state == P_EOF) begin
          state    <= P_IDLE;
          env      <= 1'b1;
          done     <= 1'b1;
          underrun <= dry;
        end else if (more && have_b0 && (b0_last || bit_valid)) begin
          logic [1:0] v;
          v         = {(b0_last ? 1'b0 : bit_data), b0};
          state     <= P_DATA;
          pat       <= data_pat(v);
          nslots_m1 <= 3'd7;
          env       <= data_pat(v)[0];
          more      <= !(b0_last || bit_last);
        end else begin
          state     <= P_EOF;
          pat       <= {4'hF, EOF_PAT};
          nslots_m1 <= 3'd3;
          env       <= EOF_PAT[0];
          dry       <= more;
        end
      end
    end
  end

  assign busy = (state != P_IDLE);

endmodule
