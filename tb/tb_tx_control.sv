// tb_tx_control: drives the transmit state machine through carrier off, continuous carrier,
// a preamble frame, a frame-sync frame that underruns, an ignored start while the carrier is
// off, and a carrier drop during a frame (the frame completes, then the field goes off).
module tb_tx_control;
  import rfid_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic carrier_on, start, preamble, enc_done, enc_underrun;
  tx_src_e src;
  logic enc_start, enc_preamble, tx_done, tx_underrun, rx_arm;

  tx_control dut (.*);

  int checks = 0, failures = 0;

  task automatic expect_src(tx_src_e e, string what);
    checks++;
    if (src !== e) begin failures++; $display("%s: src %0d expected %0d", what, src, e); end
  endtask

  task automatic expect_bits(logic s, logic p, logic d, logic u, logic a, string what);
    checks++;
    if ({enc_start, enc_preamble, tx_done, tx_underrun, rx_arm} !== {s, p, d, u, a}) begin
      failures++;
      $display("%s: start/pre/done/under/arm = %b%b%b%b%b expected %b%b%b%b%b", what,
               enc_start, enc_preamble, tx_done, tx_underrun, rx_arm, s, p, d, u, a);
    end
  endtask

  initial begin
    carrier_on = 0; start = 0; preamble = 0; enc_done = 0; enc_underrun = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_src(SRC_OFF, "after reset");
    // start while the carrier is off is ignored
    start = 1; @(negedge clk); start = 0; @(negedge clk);
    expect_src(SRC_OFF, "start with carrier off");
    expect_bits(0, 0, 0, 0, 0, "start with carrier off");
    carrier_on = 1; @(negedge clk);
    expect_src(SRC_CW, "carrier on");
    // preamble frame
    start = 1; preamble = 1; @(negedge clk); start = 0; preamble = 0;
    expect_src(SRC_DATA, "frame started");
    expect_bits(1, 1, 0, 0, 0, "encoder start");
    repeat (5) begin @(negedge clk); expect_src(SRC_DATA, "during frame"); end
    enc_done = 1; @(negedge clk); enc_done = 0;
    expect_src(SRC_CW, "after frame");
    expect_bits(0, 1, 1, 0, 1, "frame done");
    @(negedge clk);
    expect_bits(0, 1, 0, 0, 0, "pulses are single");
    // frame-sync frame that underruns: no receive arming
    start = 1; preamble = 0; @(negedge clk); start = 0;
    expect_bits(1, 0, 0, 0, 0, "frame-sync start");
    enc_done = 1; enc_underrun = 1; @(negedge clk); enc_done = 0; enc_underrun = 0;
    expect_bits(0, 0, 1, 1, 0, "underrun");
    expect_src(SRC_CW, "after underrun");
    // carrier dropped during a frame
    start = 1; @(negedge clk); start = 0;
    carrier_on = 0;
    repeat (3) begin @(negedge clk); expect_src(SRC_DATA, "frame continues"); end
    enc_done = 1; @(negedge clk); enc_done = 0;
    expect_src(SRC_OFF, "field off after frame");
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
