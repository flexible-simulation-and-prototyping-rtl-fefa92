// tb_tx_mux: every source and envelope value, checked one cycle later against the table
// off -> LVL_OFF, carrier -> LVL_FULL, data -> LVL_FULL / LVL_LOW by the envelope.
module tb_tx_mux;
  import rfid_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  tx_src_e   src;
  logic      env;
  tx_level_e level;

  tx_mux dut (.*);

  int checks = 0, failures = 0;

  function automatic tx_level_e model(tx_src_e s, logic e);
    if (s == SRC_CW) return LVL_FULL;
    if (s == SRC_DATA) return e ? LVL_FULL : LVL_LOW;
    return LVL_OFF;
  endfunction

  initial begin
    tx_level_e expv;
    src = SRC_OFF; env = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      src = tx_src_e'($urandom_range(0, 2));
      env = 1'($urandom_range(0, 1));
      expv = model(src, env);
      @(negedge clk);
      checks++;
      if (level !== expv) begin
        failures++;
        $display("src %0d env %b: level %0d expected %0d", src, env, level, expv);
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
