// tb_ask_modulator: random full amplitudes and depths, including the 30 % and 15 % settings
// of the HF query measurements; the reduced level is checked against
// floor(full * (1 - depth/256)) computed in real arithmetic, one cycle after the level.
module tb_ask_modulator;
  import rfid_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  tx_level_e   level;
  logic [15:0] amp_full, amp;
  logic [7:0]  depth_q8;

  ask_modulator dut (.*);

  int checks = 0, failures = 0;

  function automatic int model(tx_level_e l, int full, int d);
    if (l == LVL_FULL) return full;
    if (l == LVL_LOW) return full - $rtoi($floor(real'(full) * real'(d) / 256.0));
    return 0;
  endfunction

  initial begin
    int expv;
    level = LVL_OFF; amp_full = 0; depth_q8 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      level    = tx_level_e'($urandom_range(0, 2));
      amp_full = 16'($urandom_range(0, 32767));
      case (i % 4)
        0: depth_q8 = 8'd77;    // 30 %
        1: depth_q8 = 8'd38;    // 15 %
        default: depth_q8 = 8'($urandom_range(0, 255));
      endcase
      expv = model(level, amp_full, depth_q8);
      @(negedge clk);
      checks++;
      if (int'(amp) != expv) begin
        failures++;
        $display("level %0d full %0d depth %0d: amp %0d expected %0d", level, amp_full, depth_q8, amp, expv);
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
