// tb_symbol_decoder: feeds half-symbol pairs built from random bits in FM0 and in Manchester,
// with gaps of varying length between samples, and checks every decoded bit and the violation
// flag (clean replies and replies with an injected coding error).
// FM0: a dangling half at the end of a reply yields no bit, and a final low-low symbol (the
// line returning to idle) is dropped while a low-low symbol inside a reply is kept.
// Manchester: each answer is framed as in ISO 15693 (start of frame, data, end of frame,
// optionally followed by idle halves); the frame halves yield no bits. A corrupted start of
// frame and an answer cut off before its end of frame must set the violation flag.
module tb_symbol_decoder;
  import rfid_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  rx_code_e code;
  logic frame_start, frame_end, half_valid, half_val;
  logic bit_valid, bit_out, violation, done;

  symbol_decoder dut (.*);

  int checks = 0, failures = 0;
  int n_dropped = 0;
  logic got_q [$];
  always_ff @(posedge clk) if (bit_valid) got_q.push_back(bit_out);

  task automatic send_half(logic v);
    half_valid = 1; half_val = v;
    @(negedge clk);
    half_valid = 0;
    repeat ($urandom_range(0, 5)) @(negedge clk);
  endtask

  // ISO 15693 answer options
  bit sof_bad = 0, no_eof = 0;
  int n_eof = 0;

  task automatic run(rx_code_e c, int nb, int bad_at, bit dangling);
    logic bits [$];
    logic lvl;
    logic h0_last, h1_last;
    int nexp;
    got_q.delete();
    code = c;
    frame_start = 1; @(negedge clk); frame_start = 0;
    lvl = 1'b0;
    if (c == CODE_MANCHESTER) begin
      send_half(1'b1); send_half(1'b1); send_half(!sof_bad);
      send_half(1'b0); send_half(1'b1);
    end
    for (int b = 0; b < nb; b++) begin
      logic v = 1'($urandom_range(0, 1));
      logic h0, h1;
      bits.push_back(v);
      if (c == CODE_FM0) begin
        h0 = (b == bad_at) ? lvl : !lvl;     // an error drops the boundary change
        h1 = v ? h0 : !h0;
        lvl = h1;
      end else begin
        h0 = !v; h1 = v;
        // two low halves (two high ones would read as the end of frame)
        if (b == bad_at) begin h0 = 1'b0; h1 = 1'b0; end
      end
      send_half(h0);
      send_half(h1);
      h0_last = h0; h1_last = h1;
    end
    if (c == CODE_FM0) begin
      // a final low-low symbol is taken as the return to idle and yields no bit
      if (!dangling && h0_last == 1'b0 && h1_last == 1'b0) begin nexp = nb - 1; n_dropped++; end
      else nexp = nb;
      if (dangling) send_half(1'b1);
    end else if (no_eof) begin
      nexp = nb - 1;         // the last bit is held back and then dropped
    end else begin
      send_half(1'b1); send_half(1'b0);
      repeat (3) send_half(1'b1);
      if (dangling) repeat (3) send_half(1'b0);
      nexp = nb;
      n_eof++;
    end
    frame_end = 1; @(negedge clk); frame_end = 0;
    @(negedge clk);
    checks++;
    if (got_q.size() != nexp) begin failures++; $display("%0d bits, expected %0d", got_q.size(), nexp); end
    for (int b = 0; b < nexp && b < got_q.size(); b++) begin
      if (b == bad_at) continue;
      checks++;
      if (got_q[b] !== bits[b]) begin
        failures++;
        if (failures < 10) $display("code %0d bit %0d: %b expected %b", c, b, got_q[b], bits[b]);
      end
    end
    checks++;
    if (violation !== (bad_at >= 0 || (c == CODE_MANCHESTER && (sof_bad || no_eof)))) begin
      failures++; $display("code %0d: violation %b unexpected", c, violation);
    end
  endtask

  initial begin
    code = CODE_FM0; frame_start = 0; frame_end = 0; half_valid = 0; half_val = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(CODE_FM0, 32, -1, 0);
    run(CODE_FM0, 17, -1, 1);
    run(CODE_FM0, 20, 9, 0);
    run(CODE_MANCHESTER, 32, -1, 0);
    run(CODE_MANCHESTER, 15, -1, 1);
    run(CODE_MANCHESTER, 20, 4, 0);
    sof_bad = 1; run(CODE_MANCHESTER, 12, -1, 0); sof_bad = 0;
    no_eof = 1;  run(CODE_MANCHESTER, 12, -1, 0); no_eof = 0;
    run(CODE_FM0, 16, -1, 0);
    for (int r = 0; r < 12; r++) run(rx_code_e'(r % 2), 8 + r, -1, r % 3 == 0);
    checks++;
    if (n_dropped == 0) begin failures++; $display("no reply ended in a low-low symbol"); end
    checks++;
    if (n_eof < 8) begin failures++; $display("only %0d framed answers", n_eof); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
