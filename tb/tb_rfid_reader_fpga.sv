// tb_rfid_reader_fpga: end-to-end test of the reader's FPGA signal processing at its default
// parameters, acting as the DSP on the register bus and as the RF front end on DAC and ADC.
//
// Transmit side: the envelope is recovered from the DAC samples here (each sample divided by
// the sine of the carrier phase it was mixed with) and the modulation pulses are measured:
// the delimiter and pulse widths and the spacing of the pulses (which carries the data),
// against the timing that was programmed. This is done for the 8 us tari / 30 % setting and
// the 25 us tari / 15 % setting of the HF query measurements, with preamble and with
// frame-sync, and for an ISO/IEC 15693 inventory command in 1-out-of-4 coding (10 % and
// near 100 % modulation).
// Receive side: after each frame a tag reply is played into the ADC with noise: FM0 at
// 847 kHz (half symbol 23.6 cycles) as a baseband envelope, or an ISO 15693 answer (start of
// frame, Manchester data with 18.88 us half symbols, end of frame) whose modulated halves are
// bursts of the 423.75 kHz subcarrier, received with the moving average set to one
// subcarrier period. The words read from the receive FIFO are compared with the sent bits.
// Mechanisms exercised and counted: continuous carrier, carrier off, preamble and frame-sync
// frames, data-0 and data-1 symbols, 1-out-of-4 frames with all four pulse positions, FIFO
// underrun, reply timeout, FM0 and Manchester decoding, coding violation, interrupt, and a
// frame with a slew-rate limit whose falling edge time is measured.
module tb_rfid_reader_fpga;
  import rfid_pkg::*;

  logic clk = 0, rst_n = 0;
  always #12.5ns clk = ~clk;   // 40 MHz

  logic        bus_cs, bus_we;
  logic [3:0]  bus_addr;
  logic [31:0] bus_wdata, bus_rdata;
  logic        irq;
  logic signed [15:0] dac_data;
  logic signed [13:0] adc_data;

  rfid_reader_fpga dut (.*);

  int checks = 0, failures = 0;
  int m_cw = 0, m_off = 0, m_pre = 0, m_fsync = 0, m_d0 = 0, m_d1 = 0, m_underrun = 0;
  int m_ppm = 0;
  int m_ppm_pos [4] = '{0, 0, 0, 0};
  int m_timeout = 0, m_fm0 = 0, m_manch = 0, m_viol = 0, m_irq = 0, m_slew = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- DSP bus ----------------
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

  // wait for the interrupt, return and clear the flags
  task automatic wait_irq(output logic [4:0] fl, input int limit);
    logic [31:0] d;
    int t = 0;
    while (!irq && t < limit) begin @(negedge clk); t++; end
    if (irq) m_irq++;
    rd(REG_STATUS, d);
    fl = d[4:0];
    wr(REG_STATUS, 32'h1F);
    repeat (2) @(negedge clk);
  endtask

  // ---------------- transmit envelope monitor ----------------
  // The oscillator starts at phase 0 when reset is released and advances by the tuning word
  // every cycle; a DAC sample is the envelope times the sine of the phase two cycles earlier.
  // Where that sine is large the envelope is the sample divided by it; elsewhere the last
  // estimate is held.
  localparam real PI = 3.14159265358979323846;
  longint unsigned ph = 0;
  longint unsigned ph_hist [3];
  int   env_pk = 0;
  int   thr_lo = 0;           // decision level between full and reduced amplitude
  bit   mon_on = 0;
  bit   in_low = 0;
  int   cyc = 0, low_start = 0;
  int   low_starts [$], low_lens [$];
  // duration of the first falling edge of a frame, between 7/8 and 1/8 of the amplitude step
  int   fall_hi = 0, fall_lo = 0, fall_t0 = -1, fall_len = -1;

  always @(posedge clk) begin
    real sn;
    cyc++;
    ph_hist[2] = ph_hist[1];
    ph_hist[1] = ph_hist[0];
    ph_hist[0] = ph;
    ph = rst_n ? (ph + 64'(FTW_13M56)) % 64'h1_0000_0000 : 0;
    sn = $floor(32767.0 * $sin(2.0 * PI * real'(ph_hist[2] >> 22) / 1024.0) + 0.5) / 32768.0;
    if (sn > 0.5 || sn < -0.5) env_pk = $rtoi(real'(dac_data) / sn + 0.5);
    if (mon_on) begin
      if (fall_t0 < 0 && env_pk < fall_hi) fall_t0 = cyc;
      if (fall_t0 >= 0 && fall_len < 0 && env_pk < fall_lo) fall_len = cyc - fall_t0;
      if (!in_low && env_pk < thr_lo) begin in_low = 1; low_start = cyc; end
      else if (in_low && env_pk >= thr_lo) begin
        in_low = 0;
        low_starts.push_back(low_start);
        low_lens.push_back(cyc - low_start);
      end
    end
  end

  // ---------------- one reader frame ----------------
  task automatic send_frame(bit pre, int nb, int tari, int pw, int rtcal, int trcal, int delim,
                            int amp, int depth, int slew);
    logic bits [$];
    logic [4:0] fl;
    int exp_gap [$];
    int exp_len [$];
    int low_amp;
    for (int b = 0; b < nb; b++) bits.push_back(1'($urandom_range(0, 1)));
    if (nb > 1) begin bits[0] = 0; bits[1] = 1; end
    wr(REG_TARI, {16'(pw), 16'(tari)});
    wr(REG_RTCAL, {16'(trcal), 16'(rtcal)});
    wr(REG_DELIM, 32'(delim));
    wr(REG_ASK, {8'(slew), 8'(depth), 16'(amp)});
    foreach (bits[b]) wr(REG_TXBIT, {30'd0, (b == nb - 1), bits[b]});
    low_amp = amp - (amp * depth) / 256;
    thr_lo = (amp + low_amp) / 2;
    fall_hi = amp - (amp - low_amp) / 8;
    fall_lo = low_amp + (amp - low_amp) / 8;
    fall_t0 = -1; fall_len = -1;
    low_starts.delete(); low_lens.delete();
    mon_on = 1;
    wr(REG_TXCMD, {30'd0, pre, 1'b1});
    // expected pulse pattern
    exp_len.push_back(delim);
    exp_gap.push_back(delim + tari - pw);      // delimiter start to data-0 pulse
    exp_len.push_back(pw);
    exp_gap.push_back(rtcal);                  // data-0 pulse to RTCal pulse
    exp_len.push_back(pw);
    if (pre) begin exp_gap.push_back(trcal); exp_len.push_back(pw); end
    foreach (bits[b]) begin
      exp_gap.push_back(bits[b] ? rtcal - tari : tari);
      exp_len.push_back(pw);
    end
    wait_irq(fl, 200000);
    // the DAC lags the encoder by about ten cycles, plus the slewed edge
    repeat (30 + (slew == 0 ? 0 : 32768 / (16 * slew))) @(negedge clk);
    mon_on = 0;
    check(fl[ST_TX_DONE] == 1'b1, "tx done flag");
    if (pre) m_pre++; else m_fsync++;
    // edge time: the limiter ramps 3/4 of the step at 16 * slew per cycle; without a limit
    // only the 7-cycle binomial ramp remains
    if (slew == 0) begin
      check(fall_len >= 1 && fall_len <= 6, $sformatf("unlimited fall time %0d cycles", fall_len));
    end else begin
      int ef = ((amp - low_amp) * 3 / 4) / (16 * slew);
      check(fall_len >= ef - 3 && fall_len <= ef + 6,
            $sformatf("fall time %0d cycles at slew %0d, expected about %0d", fall_len, slew, ef));
      m_slew++;
    end
    check(low_lens.size() == exp_len.size(),
          $sformatf("pulse count %0d, expected %0d", low_lens.size(), exp_len.size()));
    for (int i = 0; i < exp_len.size() && i < low_lens.size(); i++) begin
      check(low_lens[i] >= exp_len[i] - 6 && low_lens[i] <= exp_len[i] + 6,
            $sformatf("pulse %0d width %0d, expected %0d", i, low_lens[i], exp_len[i]));
      if (i + 1 < low_starts.size()) begin
        int g = low_starts[i+1] - low_starts[i];
        check(g >= exp_gap[i] - 3 && g <= exp_gap[i] + 3,
              $sformatf("pulse %0d to %0d spacing %0d, expected %0d", i, i + 1, g, exp_gap[i]));
        if (i >= (pre ? 3 : 2)) begin
          if (exp_gap[i] == tari) m_d0++; else m_d1++;
        end
      end
    end
  endtask

  // ISO/IEC 15693 command in 1-out-of-4 coding: bytes sent least significant bit first,
  // followed by the CRC-16 of ISO/IEC 13239 (reflected polynomial 0x8408, preset 0xFFFF,
  // complemented). The pulse positions seen on the DAC envelope must be: start-of-frame
  // pulses in slots 0 and 5, one pulse per bit pair at slot 2*value+1, end-of-frame pulse in
  // slot 2 of its four.
  task automatic send_ppm_frame(logic [7:0] bytes [$], int slot, int amp, int depth);
    logic bits [$];
    logic [15:0] crc = 16'hFFFF;
    logic [4:0] fl;
    int exp_start [$];
    int t, low_amp;
    foreach (bytes[i]) begin
      for (int b = 0; b < 8; b++) begin
        logic x = bytes[i][b] ^ crc[0];
        crc = crc >> 1;
        if (x) crc = crc ^ 16'h8408;
      end
    end
    crc = ~crc;
    bytes.push_back(crc[7:0]);
    bytes.push_back(crc[15:8]);
    foreach (bytes[i]) for (int b = 0; b < 8; b++) bits.push_back(bytes[i][b]);
    exp_start.push_back(0);
    exp_start.push_back(5 * slot);
    t = 8 * slot;
    for (int b = 0; b < bits.size(); b += 2) begin
      int v = bits[b] + 2 * bits[b+1];
      exp_start.push_back(t + (2 * v + 1) * slot);
      m_ppm_pos[v]++;
      t += 8 * slot;
    end
    exp_start.push_back(t + 2 * slot);
    wr(REG_SLOT, 32'(slot));
    wr(REG_ASK, {8'd0, 8'(depth), 16'(amp)});
    foreach (bits[b]) wr(REG_TXBIT, {30'd0, (b == bits.size() - 1), bits[b]});
    low_amp = amp - (amp * depth) / 256;
    thr_lo = (amp + low_amp) / 2;
    low_starts.delete(); low_lens.delete();
    mon_on = 1;
    wr(REG_TXCMD, 32'd1);
    wait_irq(fl, 400000);
    repeat (30) @(negedge clk);
    mon_on = 0;
    check(fl[ST_TX_DONE] == 1'b1, "1-out-of-4 tx done flag");
    m_ppm++;
    check(low_starts.size() == exp_start.size(),
          $sformatf("1-out-of-4: %0d pulses, expected %0d", low_starts.size(), exp_start.size()));
    for (int i = 0; i < exp_start.size() && i < low_starts.size(); i++) begin
      int d = low_starts[i] - low_starts[0];
      check(d >= exp_start[i] - 3 && d <= exp_start[i] + 3,
            $sformatf("1-out-of-4 pulse %0d at %0d, expected %0d", i, d, exp_start[i]));
      check(low_lens[i] >= slot - 6 && low_lens[i] <= slot + 6,
            $sformatf("1-out-of-4 pulse %0d width %0d, expected %0d", i, low_lens[i], slot));
    end
  endtask

  // amplitude of the carrier at the moment: largest envelope estimate over 30 cycles
  task automatic measure_amp(output int pk);
    pk = 0;
    repeat (30) begin @(negedge clk); if (env_pk > pk) pk = env_pk; end
  endtask

  // ---------------- tag reply into the ADC ----------------
  logic reply_halves [$];
  int   noise_amp = 500;
  int   adc_high  = 1800;   // 14-bit counts, left-aligned to 7200 in the int16 datapath

  // modulated halves of an ISO 15693 answer carry the 423.75 kHz subcarrier
  bit   subcarrier = 0;

  task automatic play_reply(real hp);
    int n = 0;
    foreach (reply_halves[j]) begin
      int end_cyc = $rtoi((j + 1) * hp + 0.5);
      while (n < end_cyc) begin
        real sc_phase = n * 423.75e3 / 40.0e6;
        bit  on = reply_halves[j] && (!subcarrier || (sc_phase - $floor(sc_phase)) < 0.5);
        adc_data = 14'((on ? adc_high : 0) + $urandom_range(0, 2 * noise_amp) - noise_amp);
        @(negedge clk);
        n++;
      end
    end
    repeat (6 * $rtoi(hp)) begin
      adc_data = 14'($urandom_range(0, 2 * noise_amp) - noise_amp);
      @(negedge clk);
    end
  endtask

  // halves the receiver takes and the bits it makes of them (reply followed by idle low)
  task automatic expected_bits(rx_code_e code, output logic bits [$], output bit viol);
    logic ext [$];
    logic hv [$];
    int run = 0;
    ext = reply_halves;
    repeat (6) ext.push_back(1'b0);
    for (int j = 0; j < ext.size(); j++) begin
      if (j == 0 || ext[j] != ext[j-1]) run = 1; else run++;
      if (run == (code == CODE_FM0 ? 3 : 4)) break;
      hv.push_back(ext[j]);
    end
    bits.delete();
    viol = 0;
    if (code == CODE_MANCHESTER) begin
      // ISO 15693: start of frame 1 1 1 0 1, Manchester pairs, end of frame 1 0 1 1 1
      bit eof = 0;
      for (int j = 0; j < 5; j++) if (j >= hv.size() || hv[j] != (j != 3)) viol = 1;
      for (int j = 5; j + 1 < hv.size(); j += 2) begin
        if (hv[j] && hv[j+1]) begin eof = 1; break; end
        bits.push_back(hv[j+1]);
        if (hv[j] == hv[j+1]) viol = 1;
      end
      if (!eof) viol = 1;
      if (bits.size() > 0) void'(bits.pop_back());   // the end of frame's logic 0, or cut off
      return;
    end
    // a final low-low symbol is the line returning to idle
    if (hv.size() % 2 == 0 && hv.size() >= 2 && !hv[hv.size()-1] && !hv[hv.size()-2]) begin
      void'(hv.pop_back()); void'(hv.pop_back());
    end
    for (int j = 0; j + 1 < hv.size(); j += 2) begin
      if (code == CODE_FM0) begin
        bits.push_back(hv[j] == hv[j+1]);
        if (j > 0 && hv[j] == hv[j-1]) viol = 1;
      end else begin
        bits.push_back(hv[j+1]);
        if (hv[j] == hv[j+1]) viol = 1;
      end
    end
  endtask

  task automatic check_reply(rx_code_e code, real hp, string what);
    logic ebits [$];
    bit   eviol;
    logic [4:0] fl;
    logic [31:0] d, info;
    int nw;
    bit is_fm0;
    is_fm0 = (code == CODE_FM0);
    expected_bits(code, ebits, eviol);
    fork
      play_reply(hp);
      wait_irq(fl, 200000);
    join
    check(fl[ST_RX_DONE] == 1'b1, {what, ": rx done flag"});
    rd(REG_RXINFO, info);
    check(int'(info[15:0]) == ebits.size(),
          $sformatf("%s: %0d bits received, expected %0d", what, info[15:0], ebits.size()));
    check(info[16] == eviol, $sformatf("%s: violation %b expected %b", what, info[16], eviol));
    if (info[16]) m_viol++;
    nw = (ebits.size() + 31) / 32;
    check(int'(info[31:24]) == nw, $sformatf("%s: %0d words queued, expected %0d", what, info[31:24], nw));
    for (int w = 0; w < nw; w++) begin
      logic [31:0] ew = 0;
      for (int b = w * 32; b < ebits.size() && b < (w + 1) * 32; b++) ew = {ew[30:0], ebits[b]};
      rd(REG_RXWORD, d);
      check(d == ew, $sformatf("%s: word %0d %h expected %h", what, w, d, ew));
    end
    if (info[15:0] != 0 && !eviol) begin
      if (is_fm0) m_fm0++; else m_manch++;
    end
  endtask

  task automatic make_fm0(int nb, int err_at);
    logic lvl = 0;
    reply_halves.delete();
    for (int b = 0; b < nb; b++) begin
      // the error and the bit before it are data-0, so the line still changes within two halves
      logic v = (b == err_at || b == err_at - 1) ? 1'b0 : 1'($urandom_range(0, 1));
      logic h0 = (b == err_at) ? lvl : !lvl;   // a missing boundary change before a data-0
      logic h1 = v ? h0 : !h0;
      reply_halves.push_back(h0); reply_halves.push_back(h1);
      lvl = h1;
    end
    // dummy data-1 that closes an FM0 reply
    lvl = !lvl; reply_halves.push_back(lvl); reply_halves.push_back(lvl);
  endtask

  task automatic make_manchester(int nb, int err_at);
    reply_halves.delete();
    // start of frame: three modulated halves and a logic 1
    repeat (3) reply_halves.push_back(1'b1);
    reply_halves.push_back(1'b0); reply_halves.push_back(1'b1);
    for (int b = 0; b < nb; b++) begin
      // the error is a low-low symbol between a 1 and a 0, so the line never rests three halves
      logic v = (b == err_at - 1) ? 1'b1 : (b == err_at || b == err_at + 1) ? 1'b0 : 1'($urandom_range(0, 1));
      reply_halves.push_back((b == err_at) ? v : !v); reply_halves.push_back(v);
    end
    // end of frame: a logic 0 and three modulated halves
    reply_halves.push_back(1'b1); reply_halves.push_back(1'b0);
    repeat (3) reply_halves.push_back(1'b1);
  endtask

  initial begin
    logic [4:0] fl;
    logic [31:0] d;
    int pk;
    bus_cs = 0; bus_we = 0; bus_addr = 0; bus_wdata = 0; adc_data = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    wr(REG_IRQEN, 32'h1F);

    // carrier off: silent DAC
    measure_amp(pk);
    check(pk == 0, $sformatf("carrier off: amplitude %0d", pk));
    m_off++;
    // continuous carrier at the reset amplitude 30000
    wr(REG_CTRL, 32'h1);
    repeat (20) @(negedge clk);
    measure_amp(pk);
    check(pk > 29900 && pk < 30100, $sformatf("continuous carrier amplitude %0d", pk));
    m_cw++;

    // HF query, 8 us tari, 30 % depth, with preamble, then an FM0 reply at 847 kHz
    send_frame(1'b1, 22, 320, 160, 800, 800, 500, 30000, 77, 0);
    make_fm0(16, -1);
    check_reply(CODE_FM0, 40.0 / 0.847 / 2.0, "FM0 reply");

    // frame-sync frame with the 25 us tari / 15 % setting, FM0 reply with a coding error
    // with the edges slowed to 64 counts per cycle (about 1.3 us for the 15 % step)
    send_frame(1'b0, 12, 1000, 480, 3000, 3000, 500, 30000, 38, 4);
    make_fm0(20, 7);
    check_reply(CODE_FM0, 40.0 / 0.847 / 2.0, "FM0 reply with error");

    // no reply: timeout
    send_frame(1'b0, 4, 320, 160, 800, 800, 500, 30000, 77, 0);
    wait_irq(fl, 20000);
    check(fl[ST_RX_TIMEOUT] == 1'b1, "reply timeout flag");
    if (fl[ST_RX_TIMEOUT]) m_timeout++;

    // ISO/IEC 15693: inventory command (flags 0x26, command 0x01, mask length 0) in
    // 1-out-of-4 coding with 10 % modulation, answer on the subcarrier with 18.88 us half
    // symbols: average over one subcarrier period (94 cycles), whose mean for a burst is half
    // the burst amplitude, so the threshold is set to half of that
    wr(REG_CTRL, 32'h7);
    wr(REG_RXHALF, {8'd0, 8'd94, 16'd755});
    wr(REG_RXTHR, 32'd1800);
    subcarrier = 1;
    wr(REG_RXTMO, 32'd40000);
    send_ppm_frame('{8'h26, 8'h01, 8'h00}, 378, 30000, 26);
    // inventory answer size: flags, DSFID, 64-bit UID and CRC-16 = 96 bits
    make_manchester(96, -1);
    check_reply(CODE_MANCHESTER, 755.2, "Manchester reply");
    send_ppm_frame('{8'h26, 8'h01, 8'h00}, 378, 30000, 256 - 1);
    make_manchester(40, 13);
    check_reply(CODE_MANCHESTER, 755.2, "Manchester reply with error");

    // underrun: bits without a last flag, the frame stops when the FIFO runs dry
    wr(REG_CTRL, 32'h3);
    wr(REG_TXBIT, 32'd1); wr(REG_TXBIT, 32'd0);
    wr(REG_TXCMD, 32'd1);
    wait_irq(fl, 20000);
    check(fl[ST_TX_UNDERRUN] == 1'b1 && fl[ST_TX_DONE] == 1'b1, "underrun flags");
    if (fl[ST_TX_UNDERRUN]) m_underrun++;

    // carrier off again
    wr(REG_CTRL, 32'h0);
    repeat (20) @(negedge clk);
    measure_amp(pk);
    check(pk == 0, $sformatf("carrier off again: amplitude %0d", pk));

    $display("1-out-of-4 frames=%0d positions=%0d %0d %0d %0d", m_ppm, m_ppm_pos[0], m_ppm_pos[1], m_ppm_pos[2], m_ppm_pos[3]);
    $display("mechanisms: cw=%0d off=%0d preamble=%0d frame_sync=%0d data0=%0d data1=%0d underrun=%0d timeout=%0d fm0=%0d manchester=%0d violation=%0d irq=%0d",
             m_cw, m_off, m_pre, m_fsync, m_d0, m_d1, m_underrun, m_timeout, m_fm0, m_manch, m_viol, m_irq);
    $display("slew-limited frames=%0d", m_slew);
    check(m_cw > 0, "continuous carrier never seen");
    check(m_off > 0, "carrier off never seen");
    check(m_pre > 0, "no preamble frame");
    check(m_fsync > 0, "no frame-sync frame");
    check(m_d0 > 0 && m_d1 > 0, "data-0 and data-1 symbols");
    check(m_underrun > 0, "no underrun");
    check(m_timeout > 0, "no timeout");
    check(m_fm0 > 0, "no FM0 reply decoded");
    check(m_manch > 0, "no Manchester reply decoded");
    check(m_viol > 0, "no coding violation detected");
    check(m_irq > 0, "no interrupt");
    check(m_slew > 0, "no frame with a slew-rate limit");
    check(m_ppm > 0, "no 1-out-of-4 frame");
    for (int v = 0; v < 4; v++) check(m_ppm_pos[v] > 0, $sformatf("1-out-of-4 position %0d never sent", v));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
