// sync_rx_ctrl: receive state machine and symbol synchronisation.
//
// After `arm` the unit waits for a reply: the line idles low and the first rising edge of the
// slicer output marks the start of the first half symbol (`frame_start`). From then on a
// phase counter runs over the half period `half`; every edge of the slicer output resets it,
// so the timing follows the tag's clock. The slicer output is sampled in the middle of each
// half symbol and passed on as `half_valid`/`half_val`. FM0 changes level at least every
// second half symbol, so in FM0 a third half period without an edge means the tag has
// stopped: `frame_end` pulses and the unit returns to idle without emitting that sample.
// The ISO 15693 answer (`code` = Manchester) opens and closes with three modulated half
// symbols in a row (start and end of frame), so there the reply ends at the fourth half
// period without an edge.
// If no edge arrives within `timeout` cycles after `arm`, `timeout_evt` pulses instead.
// The method is this design's own; the document names the unit and its role only.
//
// Timing: `half_val` for a half symbol starting with an edge seen in cycle e is the input
// sampled at cycle e + half/2 and is presented one cycle later.
module sync_rx_ctrl
  import rfid_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  rx_code_e    code,
  input  logic        arm,
  input  logic        din,
  input  logic [15:0] half,
  input  logic [23:0] timeout,
  output logic        half_valid,
  output logic        half_val,
  output logic        frame_start,
  output logic        frame_end,
  output logic        timeout_evt,
  output logic        busy
);

  typedef enum logic [1:0] {R_IDLE, R_WAIT, R_RUN} state_e;

  state_e      state;
  logic        din_q;
  logic [15:0] ph;      // cycles since the current half symbol began
  logic [23:0] wait_cnt;
  logic [1:0]  quiet;   // half symbols sampled since the last edge

  logic edge_seen;
  assign edge_seen = (din != din_q);

  // half symbols without an edge that a reply can contain
  logic [1:0] max_quiet;
  assign max_quiet = (code == CODE_MANCHESTER) ? 2'd3 : 2'd2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= R_IDLE;
      din_q       <= 1'b0;
      ph          <= '0;
      wait_cnt    <= '0;
      quiet       <= '0;
      half_valid  <= 1'b0;
      half_val    <= 1'b0;
      frame_start <= 1'b0;
      frame_end   <= 1'b0;
      timeout_evt <= 1'b0;
    end else begin
      din_q       <= din;
      half_valid  <= 1'b0;
      frame_start <= 1'b0;
      frame_end   <= 1'b0;
      timeout_evt <= 1'b0;
      unique case (state)
        R_IDLE: begin
          if (arm) begin
            state    <= R_WAIT;
            wait_cnt <= timeout;
          end
        end
        R_WAIT: begin
          if (din && !din_q) begin
            state       <= R_RUN;
            frame_start <= 1'b1;
            ph          <= 16'd1;
            quiet       <= '0;
          end else if (wait_cnt == 24'd0) begin
            state       <= R_IDLE;
            timeout_evt <= 1'b1;
          end else begin
            wait_cnt <= wait_cnt - 24'd1;
          end
        end
        R_RUN: begin
          if (edge_seen) begin
            ph    <= 16'd1;
            quiet <= '0;
          end else begin
            ph <= (ph == half - 16'd1) ? 16'd0 : ph + 16'd1;
            if (ph == (half >> 1)) begin
              if (quiet == max_quiet) begin
                state     <= R_IDLE;
                frame_end <= 1'b1;
              end else begin
                quiet      <= quiet + 2'd1;
                half_valid <= 1'b1;
                half_val   <= din;
              end
            end
          end
        end
        default: state <= R_IDLE;
      endcase
    end
  end

  assign busy = (state != R_IDLE);

endmodule
