// tb_upconverter: the DAC samples against amp * sin(2*pi*phase/2^32) computed here in real
// arithmetic (phase truncated to the table's 10 bits), within 2 counts. Also checks that the
// default tuning word gives 13.56 MHz: the zero crossings over 4000 cycles (100 us) must
// number 2 * 1356 within one.
module tb_upconverter;
  import rfid_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [15:0] amp;
  logic [31:0] ftw;
  logic signed [15:0] dac;

  upconverter dut (.*);

  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979323846;

  initial begin
    longint unsigned phase;
    int amp_hist [3];
    longint unsigned ph_hist [3];
    int crossings;
    logic signed [15:0] prev;
    amp = 0; ftw = FTW_13M56;
    repeat (2) @(negedge clk);
    rst_n = 1;
    phase = 0;
    for (int k = 0; k < 3; k++) begin amp_hist[k] = 0; ph_hist[k] = 0; end
    crossings = 0; prev = 0;
    for (int i = 0; i < 4000; i++) begin
      amp = (i < 2000) ? 16'd32767 : 16'($urandom_range(0, 32767));
      if (i >= 1000 && i < 1100) ftw = 32'($urandom);
      else ftw = FTW_13M56;
      for (int k = 2; k > 0; k--) begin amp_hist[k] = amp_hist[k-1]; ph_hist[k] = ph_hist[k-1]; end
      amp_hist[0] = amp; ph_hist[0] = phase;
      @(negedge clk);
      phase = (phase + ftw) % 64'h1_0000_0000;
      if (i >= 2) begin
        real s;
        int  e;
        s = $floor(32767.0 * $sin(2.0 * PI * real'(ph_hist[1] >> 22) / 1024.0) + 0.5);
        e = $rtoi($floor(real'(amp_hist[1]) * s / 32768.0));
        checks++;
        if (int'(dac) < e - 2 || int'(dac) > e + 2) begin
          failures++;
          if (failures < 10) $display("cycle %0d: dac %0d expected %0d", i, dac, e);
        end
      end
      if (i < 1000) begin
        if ((prev < 0) != (dac < 0)) crossings++;
      end
      prev = dac;
    end
    // 1000 cycles = 25 us at 40 MHz: 13.56 MHz gives 339 periods, 678 sign changes
    checks++;
    if (crossings < 676 || crossings > 680) begin
      failures++; $display("sign changes %0d in 25 us, expected 678", crossings);
    end
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
