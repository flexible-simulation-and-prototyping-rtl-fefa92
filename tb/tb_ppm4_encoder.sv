// tb_ppm4_encoder: checks the 1-out-of-4 encoder cycle by cycle against an envelope built
// here from the ISO/IEC 15693 rules: start-of-frame slots 0 1 1 1 1 0 1 1 (0 = pulse), one
// pulse per bit pair at slot 2*value+1 of 8 with the first bit as the low one, end-of-frame
// slots 1 1 0 1. Covers an even frame, an odd frame (last pair completed with 0), all four
// pulse positions, back-to-back symbols without gaps, and an underrun.
module tb_ppm4_encoder;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [15:0] slot;
  logic start, bit_valid, bit_data, bit_last, bit_ready;
  logic env, busy, done, underrun;

  ppm4_encoder dut (.*);

  int checks = 0, failures = 0;
  int pos_seen [4];

  logic bits [64];
  int   nbits, idx;
  bit   no_last;
  assign bit_valid = (idx < nbits);
  assign bit_data  = bits[idx];
  assign bit_last  = (idx == nbits - 1) && !no_last;
  always_ff @(posedge clk) if (bit_ready) idx <= idx + 1;

  logic exp_env [$];
  task automatic add_slots(logic [7:0] p, int n);
    for (int s = 0; s < n; s++)
      for (int c = 0; c < int'(slot); c++) exp_env.push_back(p[s]);
  endtask

  task automatic run_frame(int n, bit cut_short);
    int cyc;
    exp_env.delete();
    add_slots(8'b1101_1110, 8);
    for (int b = 0; b + 1 < n || (b < n && !cut_short); b += 2) begin
      int v = bits[b] + 2 * ((b + 1 < n) ? bits[b+1] : 0);
      logic [7:0] p = 8'hFF;
      p[2 * v + 1] = 1'b0;
      pos_seen[v]++;
      add_slots(p, 8);
    end
    add_slots(8'b0000_1011, 4);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;
    while (!done && cyc < 20000) begin
      if (cyc < exp_env.size()) begin
        checks++;
        if (env !== exp_env[cyc]) begin
          failures++;
          if (failures < 10) $display("env mismatch at %0d: got %b exp %b", cyc, env, exp_env[cyc]);
        end
      end
      cyc++;
      @(negedge clk);
    end
    checks++;
    if (cyc != exp_env.size()) begin failures++; $display("frame length %0d, expected %0d", cyc, exp_env.size()); end
    checks++;
    if (underrun !== cut_short) begin failures++; $display("underrun %b expected %b", underrun, cut_short); end
    checks++;
    if (idx != n) begin failures++; $display("%0d bits taken, expected %0d", idx, n); end
    @(negedge clk);
    checks++;
    if (busy || done || env !== 1'b1) begin failures++; $display("not idle after frame"); end
  endtask

  initial begin
    slot = 16'd6; start = 0; idx = 0; nbits = 0; no_last = 0;
    for (int i = 0; i < 4; i++) pos_seen[i] = 0;
    for (int i = 0; i < 64; i++) bits[i] = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // all four positions, then random pairs
    nbits = 24;
    for (int i = 0; i < nbits; i++) bits[i] = 1'($urandom_range(0, 1));
    bits[0] = 0; bits[1] = 0; bits[2] = 1; bits[3] = 0; bits[4] = 0; bits[5] = 1; bits[6] = 1; bits[7] = 1;
    idx = 0;
    run_frame(nbits, 0);
    // odd number of bits, other slot length
    slot = 16'd9;
    nbits = 7;
    for (int i = 0; i < nbits; i++) bits[i] = 1'($urandom_range(0, 1));
    idx = 0;
    run_frame(nbits, 0);
    // underrun: four bits, none flagged last
    slot = 16'd5;
    nbits = 4; no_last = 1;
    idx = 0;
    run_frame(nbits, 1);
    for (int v = 0; v < 4; v++) begin
      checks++;
      if (pos_seen[v] == 0) begin failures++; $display("position %0d never sent", v); end
    end
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
