// tb_sync_rx_ctrl: builds slicer waveforms from half-symbol sequences (FM0 replies, and ISO
// 15693 Manchester answers with start and end of frame, with random bits), stretches every
// half by -1, 0 or +1 cycle of jitter around the half period, and checks that the unit emits
// exactly the expected half samples: those of the reply plus trailing idle halves until a
// third (FM0) or fourth (Manchester) half without an edge. Also checks the timing of
// frame_start, the end of the reply and the timeout when no reply comes.
module tb_sync_rx_ctrl;
  import rfid_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  rx_code_e    code;
  logic        arm, din;
  logic [15:0] half;
  logic [23:0] timeout;
  logic half_valid, half_val, frame_start, frame_end, timeout_evt, busy;

  sync_rx_ctrl dut (.*);

  int checks = 0, failures = 0;

  logic got_q [$];
  int   n_start, n_end, n_tmo;
  always_ff @(posedge clk) begin
    if (half_valid) got_q.push_back(half_val);
    if (frame_start) n_start++;
    if (frame_end) n_end++;
    if (timeout_evt) n_tmo++;
  end

  logic halves [$];

  task automatic fm0_halves(int nb);
    logic lvl = 1'b0;
    halves.delete();
    for (int b = 0; b < nb; b++) begin
      logic v = 1'($urandom_range(0, 1));
      lvl = !lvl;
      halves.push_back(lvl);
      if (!v) lvl = !lvl;
      halves.push_back(lvl);
    end
  endtask

  task automatic manchester_halves(int nb);
    halves.delete();
    // start of frame: three modulated halves, then a logic 1
    repeat (3) halves.push_back(1'b1);
    halves.push_back(1'b0); halves.push_back(1'b1);
    for (int b = 0; b < nb; b++) begin
      logic v = 1'($urandom_range(0, 1));
      halves.push_back(!v); halves.push_back(v);
    end
    // end of frame: a logic 0, then three modulated halves
    halves.push_back(1'b1); halves.push_back(1'b0);
    repeat (3) halves.push_back(1'b1);
  endtask

  task automatic run_reply(int h);
    logic ext [$];
    logic expv [$];
    int run;
    ext = halves;
    repeat (6) ext.push_back(1'b0);
    run = 0;
    for (int j = 0; j < ext.size(); j++) begin
      if (j == 0 || ext[j] != ext[j-1]) run = 1; else run++;
      if (run == (code == CODE_MANCHESTER ? 4 : 3)) break;
      expv.push_back(ext[j]);
    end
    got_q.delete();
    n_start = 0; n_end = 0;
    half = 16'(h);
    @(negedge clk); arm = 1; @(negedge clk); arm = 0;
    repeat (20) @(negedge clk);
    foreach (ext[j]) begin
      int len = h + $urandom_range(0, 2) - 1;
      din = ext[j];
      repeat (len) @(negedge clk);
    end
    din = 0;
    repeat (4 * h) @(negedge clk);
    checks++;
    if (n_start != 1 || n_end != 1) begin
      failures++; $display("starts %0d ends %0d", n_start, n_end);
    end
    checks++;
    if (got_q.size() != expv.size()) begin
      failures++; $display("got %0d halves, expected %0d", got_q.size(), expv.size());
    end
    for (int j = 0; j < expv.size() && j < got_q.size(); j++) begin
      checks++;
      if (got_q[j] !== expv[j]) begin
        failures++;
        if (failures < 10) $display("half %0d: %b expected %b", j, got_q[j], expv[j]);
      end
    end
    checks++;
    if (busy) begin failures++; $display("still busy after reply"); end
  endtask

  initial begin
    int t0;
    arm = 0; din = 0; half = 16'd16; timeout = 24'd300; code = CODE_FM0;
    n_tmo = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) begin fm0_halves(24); run_reply(16); end
    fm0_halves(12); run_reply(24);
    code = CODE_MANCHESTER;
    repeat (2) begin manchester_halves(20); run_reply(16); end
    manchester_halves(7); run_reply(30);
    code = CODE_FM0;
    // no reply: timeout
    n_tmo = 0;
    @(negedge clk); arm = 1; @(negedge clk); arm = 0;
    t0 = 0;
    while (n_tmo == 0 && t0 < 1000) begin @(negedge clk); t0++; end
    checks++;
    if (t0 < 300 || t0 > 303) begin failures++; $display("timeout after %0d cycles, expected ~301", t0); end
    checks++;
    if (busy) begin failures++; $display("busy after timeout"); end
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
