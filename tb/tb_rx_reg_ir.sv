// tb_rx_reg_ir: replies of 32, 70, 5 and 0 random bits, then 30 of random length up to
// 130 bits with random violation flags; checks every pushed word (first bit in
// the MSB, a final partial word right-aligned), the latched bit count and violation flag, and
// the single-cycle rx_done.
module tb_rx_reg_ir;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic frame_start, bit_valid, bit_in, frame_done, violation_in;
  logic word_valid, violation, rx_done;
  logic [31:0] word;
  logic [15:0] bit_count;

  rx_reg_ir dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] got_q [$];
  int n_done;
  always_ff @(posedge clk) begin
    if (word_valid) got_q.push_back(word);
    if (rx_done) n_done++;
  end

  task automatic run(int nb, logic viol);
    logic [31:0] expv [$];
    logic [31:0] w;
    int f;
    got_q.delete(); n_done = 0;
    frame_start = 1; @(negedge clk); frame_start = 0;
    w = 0; f = 0;
    for (int b = 0; b < nb; b++) begin
      logic v = 1'($urandom_range(0, 1));
      w = {w[30:0], v}; f++;
      if (f == 32) begin expv.push_back(w); w = 0; f = 0; end
      bit_valid = 1; bit_in = v; @(negedge clk); bit_valid = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    if (f != 0) expv.push_back(w);
    violation_in = viol;
    frame_done = 1; @(negedge clk); frame_done = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (got_q.size() != expv.size()) begin failures++; $display("%0d words, expected %0d", got_q.size(), expv.size()); end
    for (int i = 0; i < expv.size() && i < got_q.size(); i++) begin
      checks++;
      if (got_q[i] !== expv[i]) begin failures++; $display("word %0d: %h expected %h", i, got_q[i], expv[i]); end
    end
    checks++;
    if (bit_count != 16'(nb) || violation !== viol || n_done != 1) begin
      failures++; $display("count %0d viol %b done %0d, expected %0d %b 1", bit_count, violation, n_done, nb, viol);
    end
  endtask

  initial begin
    frame_start = 0; bit_valid = 0; bit_in = 0; frame_done = 0; violation_in = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(32, 0);
    run(70, 1);
    run(5, 0);
    run(0, 0);                                  // a reply with no bits pushes no word
    for (int r = 0; r < 30; r++) run($urandom_range(1, 130), 1'($urandom_range(0, 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
