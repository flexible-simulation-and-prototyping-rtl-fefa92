// tb_slicer: random samples around the default threshold 4096 and around random thresholds,
// including equality (which must decide 0), checked one cycle later.
module tb_slicer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic signed [15:0] x, thresh;
  logic bit_out;
  slicer dut (.*);

  int checks = 0, failures = 0;

  initial begin
    logic expv;
    x = 0; thresh = 16'sd4096;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      thresh = (i < 100) ? 16'sd4096 : 16'($urandom_range(0, 65535));
      case (i % 3)
        0: x = thresh;
        1: x = 16'(int'(thresh) + $urandom_range(0, 2) - 1);
        default: x = 16'($urandom_range(0, 65535));
      endcase
      expv = (int'(x) > int'(thresh));
      @(negedge clk);
      checks++;
      if (bit_out !== expv) begin
        failures++;
        $display("x %0d thresh %0d: %b expected %b", x, thresh, bit_out, expv);
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
