// tb_pie_encoder: checks the pulse interval encoder against an independent model of the
// envelope. Short symbol timings keep the run brief. Covers a preamble frame, a frame-sync
// frame, both data symbols, the single-cycle `done`, and an underrun (FIFO runs dry mid-frame).
module tb_pie_encoder;
  import rfid_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pie_timing_t timing;
  logic start, preamble;
  logic bit_valid, bit_data, bit_last, bit_ready;
  logic env, busy, done, underrun;

  pie_encoder dut (.*);

  int checks = 0, failures = 0;

  // bit source
  logic bits [64];
  int   nbits, idx;
  assign bit_valid = (idx < nbits);
  assign bit_data  = bits[idx];
  assign bit_last  = (idx == nbits - 1);
  always_ff @(posedge clk) if (bit_ready) idx <= idx + 1;

  // expected envelope
  logic exp_env [$];
  task automatic add_sym(int len);
    for (int k = 0; k < len; k++) exp_env.push_back(k < len - int'(timing.pw));
  endtask

  task automatic run_frame(bit pre, int n, bit cut_short);
    int cyc;
    logic got;
    exp_env.delete();
    for (int k = 0; k < int'(timing.delim); k++) exp_env.push_back(1'b0);
    add_sym(timing.tari);
    add_sym(timing.rtcal);
    if (pre) add_sym(timing.trcal);
    for (int b = 0; b < n; b++) add_sym(bits[b] ? timing.rtcal - timing.tari : timing.tari);
    @(negedge clk);
    start = 1; preamble = pre;
    @(negedge clk);
    start = 0;
    cyc = 0;
    while (!done && cyc < 5000) begin
      got = env;
      if (cyc < exp_env.size()) begin
        checks++;
        if (got !== exp_env[cyc]) begin
          failures++;
          if (failures < 10) $display("env mismatch at %0d: got %b exp %b", cyc, got, exp_env[cyc]);
        end
      end
      cyc++;
      @(negedge clk);
    end
    checks++;
    if (cyc != exp_env.size()) begin
      failures++; $display("frame length %0d, expected %0d", cyc, exp_env.size());
    end
    checks++;
    if (underrun !== cut_short) begin failures++; $display("underrun %b expected %b", underrun, cut_short); end
    checks++;
    if (env !== 1'b1) begin failures++; $display("env not high after frame"); end
    @(negedge clk);
    checks++;
    if (busy || done) begin failures++; $display("done not single / busy after frame"); end
  endtask

  initial begin
    timing = '{tari: 16'd10, pw: 16'd4, rtcal: 16'd26, trcal: 16'd30, delim: 16'd7};
    start = 0; preamble = 0; idx = 0; nbits = 0;
    for (int i = 0; i < 64; i++) bits[i] = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // preamble frame, 22 random bits
    nbits = 22;
    for (int i = 0; i < nbits; i++) bits[i] = 1'($urandom_range(0, 1));
    bits[0] = 1'b0; bits[1] = 1'b1;
    idx = 0;
    run_frame(1'b1, nbits, 1'b0);
    // frame-sync frame with other timing
    timing = '{tari: 16'd12, pw: 16'd5, rtcal: 16'd30, trcal: 16'd40, delim: 16'd9};
    nbits = 9;
    for (int i = 0; i < nbits; i++) bits[i] = 1'($urandom_range(0, 1));
    idx = 0;
    run_frame(1'b0, nbits, 1'b0);
    // underrun: bits with no last flag -> frame ends when the source runs dry
    nbits = 5;
    idx = 0;
    // the source would flag the 5th bit as last; make it run dry by presenting only 4
    nbits = 4;
    force bit_last = 1'b0;
    run_frame(1'b1, 4, 1'b1);
    release bit_last;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
