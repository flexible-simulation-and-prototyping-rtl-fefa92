// tb_dsp_if: register writes and read-back, reset values, the transmit bit FIFO (order, last
// flag, count, pop by the encoder), the start command pulse, the receive word FIFO (order,
// pop on read, overflow flag), interrupt flags with enable and write-1-to-clear.
// Small FIFO depths keep the run short.
module tb_dsp_if;
  import rfid_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        bus_cs, bus_we;
  logic [3:0]  bus_addr;
  logic [31:0] bus_wdata, bus_rdata;
  logic        irq, carrier_on;
  tx_code_e    tx_code;
  logic [15:0] ppm_slot;
  pie_timing_t pie_timing;
  logic [15:0] amp_full;
  logic [7:0]  depth_q8, slew;
  logic [31:0] ftw;
  rx_cfg_t     rx_cfg;
  logic tx_start, tx_preamble, txb_valid, txb_data, txb_last, txb_ready;
  logic ev_tx_done, ev_tx_underrun, ev_rx_done, ev_rx_timeout;
  logic rxw_valid;
  logic [31:0] rxw_data;
  logic [15:0] rx_bits;
  logic rx_violation;

  dsp_if #(.TX_DEPTH(16), .RX_DEPTH(4)) dut (.*);

  int checks = 0, failures = 0;

  task automatic wr(logic [3:0] a, logic [31:0] d);
    bus_cs = 1; bus_we = 1; bus_addr = a; bus_wdata = d;
    @(negedge clk);
    bus_cs = 0; bus_we = 0;
  endtask

  task automatic rd(logic [3:0] a, output logic [31:0] d);
    bus_cs = 1; bus_we = 0; bus_addr = a;
    @(negedge clk);
    bus_cs = 0;
    d = bus_rdata;
  endtask

  task automatic check(logic [31:0] got, logic [31:0] e, string what);
    checks++;
    if (got !== e) begin failures++; $display("%s: %h expected %h", what, got, e); end
  endtask

  initial begin
    logic [31:0] d;
    bus_cs = 0; bus_we = 0; bus_addr = 0; bus_wdata = 0; txb_ready = 0;
    ev_tx_done = 0; ev_tx_underrun = 0; ev_rx_done = 0; ev_rx_timeout = 0;
    rxw_valid = 0; rxw_data = 0; rx_bits = 16'd37; rx_violation = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // reset values: the 8 us / 4 us / 20 us timing, 30 % depth, 13.56 MHz, threshold 4096
    rd(REG_TARI, d);   check(d, {16'd160, 16'd320}, "reset tari/pw");
    rd(REG_RTCAL, d);  check(d, {16'd800, 16'd800}, "reset rtcal/trcal");
    rd(REG_ASK, d);    check(d, {8'd0, 8'd77, 16'd30000}, "reset ask");
    rd(REG_FTW, d);    check(d, 32'd1455993913, "reset ftw");
    rd(REG_RXTHR, d);  check(d, 32'd4096, "reset threshold");
    rd(REG_RXHALF, d); check(d, 32'h0018_0018, "reset half and average length");
    // writes reach the outputs and read back
    rd(REG_SLOT, d);   check(d, 32'd378, "reset slot");
    wr(REG_CTRL, 32'h7);
    check({31'd0, tx_code}, 1, "1 out of 4");
    wr(REG_SLOT, 32'd400);
    rd(REG_SLOT, d);   check(d, 32'd400, "slot read back");
    check(32'(ppm_slot), 32'd400, "slot out");
    wr(REG_CTRL, 32'h3);
    check({31'd0, tx_code}, 0, "PIE");
    check({31'd0, carrier_on}, 1, "carrier on");
    check({31'd0, rx_cfg.code}, 1, "manchester");
    wr(REG_TARI, {16'd480, 16'd1000});
    wr(REG_RTCAL, {16'd3000, 16'd3000});
    wr(REG_DELIM, 32'd600);
    checks++;
    if (pie_timing != '{tari: 16'd1000, pw: 16'd480, rtcal: 16'd3000, trcal: 16'd3000, delim: 16'd600}) begin
      failures++; $display("pie timing %p", pie_timing);
    end
    wr(REG_ASK, {8'd5, 8'd38, 16'd20000});
    check({slew, depth_q8, amp_full}, {8'd5, 8'd38, 16'd20000}, "ask out");
    rd(REG_ASK, d); check(d, {8'd5, 8'd38, 16'd20000}, "ask read back");
    wr(REG_RXTHR, 32'hFFFF_F000);
    check(32'(signed'(rx_cfg.thresh)), 32'hFFFF_F000, "negative threshold");
    rd(REG_RXTHR, d); check(d, 32'hFFFF_F000, "threshold read back");
    wr(REG_RXTMO, 32'd12345);
    check(32'(rx_cfg.timeout), 32'd12345, "timeout out");
    wr(REG_RXHALF, {8'd0, 8'd94, 16'd755});
    check({16'(rx_cfg.ma_len), rx_cfg.half}, {16'd94, 16'd755}, "half and average length out");
    rd(REG_RXHALF, d); check(d, {8'd0, 8'd94, 16'd755}, "half and average length read back");
    // transmit FIFO
    check({31'd0, txb_valid}, 0, "tx fifo empty");
    wr(REG_TXBIT, 32'd1); wr(REG_TXBIT, 32'd0); wr(REG_TXBIT, 32'd3);
    rd(REG_STATUS, d); check(d[31:16], 3, "tx fifo count");
    check({txb_valid, txb_data, txb_last}, 3'b110, "head 1");
    txb_ready = 1; @(negedge clk);
    check({txb_valid, txb_data, txb_last}, 3'b100, "head 2");
    @(negedge clk);
    check({txb_valid, txb_data, txb_last}, 3'b111, "head 3 last");
    @(negedge clk); txb_ready = 0;
    check({31'd0, txb_valid}, 0, "tx fifo drained");
    // start command
    bus_cs = 1; bus_we = 1; bus_addr = REG_TXCMD; bus_wdata = 32'd3;
    @(negedge clk); bus_cs = 0; bus_we = 0;
    check({30'd0, tx_start, tx_preamble}, 2'b11, "start pulse");
    @(negedge clk);
    check({30'd0, tx_start, tx_preamble}, 2'b01, "start is one cycle");
    // interrupts
    wr(REG_IRQEN, 32'h2);
    ev_tx_done = 1; @(negedge clk); ev_tx_done = 0; @(negedge clk);
    check({31'd0, irq}, 0, "masked flag gives no irq");
    rd(REG_STATUS, d); check(d[4:0], 5'b00001, "tx done flag");
    ev_rx_done = 1; @(negedge clk); ev_rx_done = 0; @(negedge clk);
    check({31'd0, irq}, 1, "rx done irq");
    wr(REG_STATUS, 32'h3); @(negedge clk);
    check({31'd0, irq}, 0, "irq cleared");
    rd(REG_STATUS, d); check(d[4:0], 0, "flags cleared");
    // receive FIFO: five words into four entries
    for (int i = 0; i < 5; i++) begin
      rxw_valid = 1; rxw_data = 32'hA000_0000 + i; @(negedge clk);
    end
    rxw_valid = 0;
    rd(REG_RXINFO, d); check(d, {8'd4, 7'd0, 1'b1, 16'd37}, "rx info");
    rd(REG_STATUS, d); check(d[ST_RX_OVERFLOW], 1, "overflow flag");
    for (int i = 0; i < 4; i++) begin
      rd(REG_RXWORD, d); check(d, 32'hA000_0000 + i, "rx word");
    end
    rd(REG_RXWORD, d); check(d, 0, "empty rx fifo reads 0");
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
