// rfid_reader_fpga: signal processing of a multi-standard RFID reader, between the DSP that
// runs the protocol stack and the DAC/ADC of the RF front end.
//
// Transmit path: the DSP loads the bits of a command into the interface FIFO and starts the
// frame. TX control switches the MUX from the continuous carrier to the data encoder (pulse
// interval encoding for the EPC standards or 1-out-of-4 pulse position for ISO/IEC 15693),
// whose envelope is ASK-modulated with a programmable depth, shaped by the transmit filter
// (programmable slew rate) and mixed onto a 13.56 MHz carrier from a numerically controlled
// oscillator for the 16-bit DAC.
// Receive path: after the frame the receiver is armed. The 14-bit ADC sample (the envelope of
// the tag's reply) is left-aligned into int16, low-pass filtered (order 8), averaged over a
// programmable length (half a link-frequency period for FM0, one subcarrier period for the
// ISO 15693 answer) and sliced against a programmable threshold. The synchronisation
// unit recovers the half-symbol timing, the symbol decoder turns half symbols into FM0 or
// Manchester bits, and the receive register packs them into words for the DSP and raises the
// interrupt. The block structure follows the reader's FPGA transmit and receive paths; the
// register bus, widths and the choices listed in each block are this design's own.
//
// Interface: one 40 MHz clock for FPGA, DAC and ADC; synchronous active-low reset; the DSP
// register bus of dsp_if; `irq`; `dac_data` (signed 16 bit) and `adc_data` (signed 14 bit).
// Latency from the encoder's envelope to the DAC is 1 (MUX) + 1 (ASK) + 3 (transmit filter)
// + 2 (mixer) cycles plus the filter's 3.5-cycle group delay. The receive chain adds 2 + 4
// (filter), 2 + 11.5 (moving average) and 1 (slicer) cycles before the synchronisation unit.
module rfid_reader_fpga
  import rfid_pkg::*;
#(
  parameter int unsigned MA_MAX_LEN = 128,  // longest moving average (power of two)
  parameter int unsigned TX_DEPTH = 512,
  parameter int unsigned RX_DEPTH = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               bus_cs,
  input  logic               bus_we,
  input  logic [3:0]         bus_addr,
  input  logic [31:0]        bus_wdata,
  output logic [31:0]        bus_rdata,
  output logic               irq,
  output logic signed [15:0] dac_data,
  input  logic signed [13:0] adc_data
);

  // ---- configuration from the DSP ----
  logic        carrier_on;
  tx_code_e    tx_code;
  logic [15:0] ppm_slot;
  pie_timing_t pie_timing;
  logic [15:0] amp_full;
  logic [7:0]  depth_q8;
  logic [7:0]  slew;
  logic [31:0] ftw;
  rx_cfg_t     rx_cfg;

  logic tx_start, tx_preamble;
  logic txb_valid, txb_data, txb_last, txb_ready;
  logic tx_done, tx_underrun, rx_arm;
  logic rx_done, rx_timeout;
  logic rxw_valid;
  logic [31:0] rxw_data;
  logic [15:0] rx_bits;
  logic rx_violation;

  dsp_if #(.TX_DEPTH(TX_DEPTH), .RX_DEPTH(RX_DEPTH)) u_dsp_if (
    .clk, .rst_n,
    .bus_cs, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .irq,
    .carrier_on, .tx_code, .ppm_slot, .pie_timing, .amp_full, .depth_q8, .slew, .ftw, .rx_cfg,
    .tx_start, .tx_preamble,
    .txb_valid, .txb_data, .txb_last, .txb_ready,
    .ev_tx_done(tx_done), .ev_tx_underrun(tx_underrun),
    .ev_rx_done(rx_done), .ev_rx_timeout(rx_timeout),
    .rxw_valid, .rxw_data, .rx_bits, .rx_violation
  );

  // ---- transmit path ----
  tx_src_e   src;
  logic      enc_start, enc_preamble, enc_done, enc_underrun, env;
  // the two data encoders; the transmit code selects which one runs and feeds the MUX
  logic      pie_start, pie_ready, pie_env, pie_busy, pie_done, pie_underrun;
  logic      ppm_start, ppm_ready, ppm_env, ppm_busy, ppm_done, ppm_underrun;
  logic      use_ppm;
  assign use_ppm   = (tx_code == TXC_PPM4);
  assign pie_start = enc_start && !use_ppm;
  assign ppm_start = enc_start && use_ppm;
  assign txb_ready = pie_ready || ppm_ready;
  // only one encoder is busy at a time, so the idle one's outputs are neutral
  assign env          = pie_env && ppm_env;
  assign enc_done     = pie_done || ppm_done;
  assign enc_underrun = pie_underrun || ppm_underrun;
  tx_level_e level;
  logic [15:0] amp, amp_shaped;

  tx_control u_tx_control (
    .clk, .rst_n,
    .carrier_on, .start(tx_start), .preamble(tx_preamble),
    .enc_done, .enc_underrun,
    .src, .enc_start, .enc_preamble,
    .tx_done, .tx_underrun, .rx_arm
  );

  pie_encoder u_pie (
    .clk, .rst_n,
    .timing(pie_timing), .start(pie_start), .preamble(enc_preamble),
    .bit_valid(txb_valid && !use_ppm), .bit_data(txb_data), .bit_last(txb_last), .bit_ready(pie_ready),
    .env(pie_env), .busy(pie_busy), .done(pie_done), .underrun(pie_underrun)
  );

  ppm4_encoder u_ppm (
    .clk, .rst_n,
    .slot(ppm_slot), .start(ppm_start),
    .bit_valid(txb_valid && use_ppm), .bit_data(txb_data), .bit_last(txb_last), .bit_ready(ppm_ready),
    .env(ppm_env), .busy(ppm_busy), .done(ppm_done), .underrun(ppm_underrun)
  );

  a_one_encoder : assert property (@(posedge clk) disable iff (!rst_n) !(pie_busy && ppm_busy));

  tx_mux u_mux (.clk, .rst_n, .src, .env, .level);

  ask_modulator u_ask (.clk, .rst_n, .level, .amp_full, .depth_q8, .amp);

  tx_filter u_tx_filter (.clk, .rst_n, .slew, .x(amp), .y(amp_shaped));

  upconverter u_upconv (.clk, .rst_n, .amp(amp_shaped), .ftw, .dac(dac_data));

  // ---- receive path ----
  logic signed [15:0] rx_in, rx_filt, rx_avg;
  logic               sliced;
  logic half_valid, half_val, frame_start, frame_end, rx_busy;
  logic bit_valid, bit_val, dec_violation, dec_done;

  assign rx_in = {adc_data, 2'b00};

  rx_filter u_rx_filter (.clk, .rst_n, .x(rx_in), .y(rx_filt));

  moving_average #(.MAX_LEN(MA_MAX_LEN)) u_ma (
    .clk, .rst_n, .len(rx_cfg.ma_len), .x(rx_filt), .y(rx_avg)
  );

  slicer u_slicer (.clk, .rst_n, .x(rx_avg), .thresh(rx_cfg.thresh), .bit_out(sliced));

  sync_rx_ctrl u_sync (
    .clk, .rst_n,
    .code(rx_cfg.code), .arm(rx_arm), .din(sliced), .half(rx_cfg.half), .timeout(rx_cfg.timeout),
    .half_valid, .half_val, .frame_start, .frame_end, .timeout_evt(rx_timeout), .busy(rx_busy)
  );

  symbol_decoder u_dec (
    .clk, .rst_n,
    .code(rx_cfg.code), .frame_start, .frame_end, .half_valid, .half_val,
    .bit_valid, .bit_out(bit_val), .violation(dec_violation), .done(dec_done)
  );

  rx_reg_ir u_rxreg (
    .clk, .rst_n,
    .frame_start, .bit_valid, .bit_in(bit_val), .frame_done(dec_done), .violation_in(dec_violation),
    .word_valid(rxw_valid), .word(rxw_data), .bit_count(rx_bits), .violation(rx_violation),
    .rx_done
  );

endmodule
