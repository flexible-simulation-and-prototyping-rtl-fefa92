// tb_moving_average: the running mean against sum/n computed here from the sample history,
// allowed to differ by one count from the reciprocal multiplication. The window length runs
// through the 24-sample default, the 94-sample ISO 15693 subcarrier period, the 128-sample
// maximum, 1, and out-of-range values (0 and 200, clamped to 1 and 128; the 0 therefore
// causes no restart). After each change the window restarts, so the expected value is the
// mean over the samples since the change until the window is full. The output lags the input by two cycles (sum, then output register).
module tb_moving_average;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0]         len;
  logic signed [15:0] x, y;
  moving_average dut (.*);

  int checks = 0, failures = 0;
  int hist [$];          // samples since the last length change, newest first
  int exp_q [$];
  int cur_len;
  int n_restart = 0;
  int lens [6] = '{24, 94, 128, 1, 0, 200};

  function automatic int eff_len(int l);
    if (l == 0) return 1;
    if (l > 128) return 128;
    return l;
  endfunction

  initial begin
    int sum, n, seg;
    x = 0;
    len = 8'd24;
    cur_len = -1;
    exp_q.push_back(0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      seg = i / 500;
      len = 8'(lens[seg]);
      if (i % 500 < 60)       x = 16'sd7000;
      else if (i % 500 < 200) x = -16'sd5000;
      else                    x = 16'($urandom_range(0, 65535));
      if (eff_len(int'(len)) != cur_len) begin
        cur_len = eff_len(int'(len));
        hist.delete();
        n_restart++;
      end
      hist.push_front(int'(x));
      if (hist.size() > cur_len) void'(hist.pop_back());
      sum = 0;
      foreach (hist[k]) sum += hist[k];
      n = hist.size();
      exp_q.push_back($rtoi($floor(real'(sum) / n)));
      @(negedge clk);
      if (exp_q.size() > 2) begin
        int e;
        void'(exp_q.pop_front());
        e = exp_q[0];
        checks++;
        if (int'(y) < e - 1 || int'(y) > e + 1) begin
          failures++;
          if (failures < 10) $display("cycle %0d len %0d: y %0d expected %0d", i, len, y, e);
        end
      end
    end
    checks++;
    if (n_restart != 5) begin
      failures++;
      $display("expected 5 window restarts, saw %0d", n_restart);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
