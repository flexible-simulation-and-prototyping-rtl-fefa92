// tb_rx_filter: random and full-scale signed samples through the order-8 receive filter,
// compared with the convolution by (3 11 30 53 62 53 30 11 3)/256 computed here, with
// saturation to int16 and an arithmetic shift (floor) as in the filter's definition.
module tb_rx_filter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic signed [15:0] x, y;
  rx_filter dut (.*);

  int checks = 0, failures = 0;
  int kern [9] = '{3, 11, 30, 53, 62, 53, 30, 11, 3};
  int hist [9];
  int exp_q [$];

  initial begin
    int acc, e;
    x = 0;
    for (int k = 0; k < 9; k++) hist[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      if (i < 30)       x = 16'sd20000;
      else if (i < 60)  x = -16'sd32768;
      else              x = 16'($urandom_range(0, 65535));
      for (int k = 8; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = x;
      acc = 0;
      for (int k = 0; k < 9; k++) acc += kern[k] * hist[k];
      e = acc >>> 8;
      if (e > 32767) e = 32767;
      if (e < -32768) e = -32768;
      exp_q.push_back(e);
      @(negedge clk);
      if (exp_q.size() > 1) begin
      checks++;
      if (int'(y) != exp_q[0]) begin
        failures++;
        if (failures < 10) $display("cycle %0d: y %0d expected %0d", i, y, exp_q[0]);
      end
      void'(exp_q.pop_front());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
