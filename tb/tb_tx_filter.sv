// tb_tx_filter: a step, a single pulse and random envelope values through the transmit
// filter, without a slew limit and with limits of 320 and 128 counts per cycle. The expected
// output is computed here: the slew-rate limiter is modelled as a ramp towards the input,
// then convolved with the binomial kernel (1 7 21 35 35 21 7 1)/128. The output follows the
// newest input by three registers (limiter, delay line, output register). With a limit the
// 0 to 30000 step must take 30000/step cycles to settle.
module tb_tx_filter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0]  slew;
  logic [15:0] x, y;
  tx_filter dut (.*);

  int checks = 0, failures = 0;
  int kern [8] = '{1, 7, 21, 35, 35, 21, 7, 1};
  int hist [8];
  int exp_q [$];
  int lim = 0;
  int slews [3] = '{0, 20, 8};

  initial begin
    int acc, step;
    x = 0;
    slew = 0;
    for (int k = 0; k < 8; k++) hist[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (slews[s]) begin
      int settle;
      settle = -1;
      slew = 8'(slews[s]);
      step = 16 * slews[s];
      for (int i = 0; i < 2400; i++) begin
        if (i < 1600 && i % 800 < 600)  x = (i % 800 < 300) ? 16'd0 : 16'd30000;  // steps
        else if (i < 1600)              x = (i % 800 == 650) ? 16'd12800 : 16'd0;  // pulse
        else                            x = 16'($urandom_range(0, 32767));
        // limiter model
        if (step == 0 || (int'(x) - lim <= step && lim - int'(x) <= step)) lim = int'(x);
        else if (int'(x) > lim) lim += step;
        else lim -= step;
        if (i >= 300 && i < 600 && settle < 0 && lim == 30000) settle = i - 300 + 1;
        for (int k = 7; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = lim;
        acc = 0;
        for (int k = 0; k < 8; k++) acc += kern[k] * hist[k];
        exp_q.push_back(acc >>> 7);
        @(negedge clk);
        if (exp_q.size() > 2) begin
          checks++;
          if (int'(y) != exp_q[0]) begin
            failures++;
            if (failures < 10) $display("slew %0d cycle %0d: y %0d expected %0d", slew, i, y, exp_q[0]);
          end
          void'(exp_q.pop_front());
        end
      end
      checks++;
      if (step != 0 && settle != (30000 + step - 1) / step) begin
        failures++;
        $display("slew %0d: step settled after %0d cycles, expected %0d", slew, settle, (30000 + step - 1) / step);
      end
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
