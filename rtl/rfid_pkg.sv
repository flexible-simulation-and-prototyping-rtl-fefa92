// rfid_pkg: types and constants shared by the RFID reader signal-processing blocks.
//
// All timing values are counts of the 40 MHz system clock that the FPGA, DAC and ADC share.
// The default PIE timing is the 8 us tari / 4 us pulse / 20 us RTCal and TRCal setting of
// the HF query measurement; the delimiter length and the register layout are this design's
// own choices.
package rfid_pkg;

  localparam int unsigned CLK_HZ  = 40_000_000;
  localparam int unsigned SAMPLE_W = 16;          // int16 datapath of the receiver

  // Transmit source selected by TX control and applied by the MUX.
  typedef enum logic [1:0] {
    SRC_OFF  = 2'd0,   // no field
    SRC_CW   = 2'd1,   // continuous (unmodulated) carrier
    SRC_DATA = 2'd2    // pulse-interval encoded data
  } tx_src_e;

  // Envelope level fed to the ASK modulator.
  typedef enum logic [1:0] {
    LVL_OFF  = 2'd0,
    LVL_FULL = 2'd1,
    LVL_LOW  = 2'd2
  } tx_level_e;

  // Reader-to-tag coding.
  typedef enum logic {
    TXC_PIE  = 1'b0,   // pulse interval encoding (EPC HF / UHF)
    TXC_PPM4 = 1'b1    // 1 out of 4 pulse position (ISO/IEC 15693)
  } tx_code_e;

  // Line code of the tag reply.
  typedef enum logic {
    CODE_FM0        = 1'b0,
    CODE_MANCHESTER = 1'b1
  } rx_code_e;

  // Pulse interval encoding timing, in clock cycles.
  typedef struct packed {
    logic [15:0] tari;    // data-0 length
    logic [15:0] pw;      // low pulse at the end of each symbol
    logic [15:0] rtcal;   // reader-to-tag calibration symbol = data-0 + data-1
    logic [15:0] trcal;   // tag-to-reader calibration symbol (preamble only)
    logic [15:0] delim;   // delimiter (low) that opens every frame
  } pie_timing_t;

  localparam pie_timing_t PIE_DEFAULT = '{
    tari:  16'd320,    // 8 us
    pw:    16'd160,    // 4 us
    rtcal: 16'd800,    // 20 us
    trcal: 16'd800,    // 20 us
    delim: 16'd500     // 12.5 us
  };

  // Receiver settings.
  typedef struct packed {
    logic signed [15:0] thresh;   // slicer threshold
    logic [15:0]        half;     // half symbol period in cycles
    logic [23:0]        timeout;  // cycles to wait for the first edge of a reply
    logic [7:0]         ma_len;   // moving-average length in samples
    rx_code_e           code;
  } rx_cfg_t;

  localparam rx_cfg_t RX_DEFAULT = '{
    thresh:  16'sd4096,
    half:    16'd24,          // 40 MHz / (2 * 847 kHz)
    timeout: 24'd4000,        // 100 us
    ma_len:  8'd24,           // half period of the 847 kHz link frequency
    code:    CODE_FM0
  };

  // 1-out-of-4 slot: 128 carrier periods, 9.44 us = 377.6 cycles, rounded.
  localparam logic [15:0] PPM_SLOT_DEFAULT = 16'd378;

  // 13.56 MHz at 40 MHz with a 32-bit phase accumulator: round(13.56/40 * 2^32).
  localparam logic [31:0] FTW_13M56 = 32'd1455993913;

  // Register map of the DSP interface (word addresses).
  localparam logic [3:0] REG_CTRL    = 4'h0;  // [0] carrier on, [1] rx code (1 = Manchester), [2] tx code (1 = 1 out of 4)
  localparam logic [3:0] REG_TXCMD   = 4'h1;  // write: [0] start frame, [1] preamble (else frame-sync)
  localparam logic [3:0] REG_TXBIT   = 4'h2;  // write: [0] bit, [1] last bit of the frame
  localparam logic [3:0] REG_TARI    = 4'h3;  // [15:0] tari, [31:16] pw
  localparam logic [3:0] REG_RTCAL   = 4'h4;  // [15:0] rtcal, [31:16] trcal
  localparam logic [3:0] REG_DELIM   = 4'h5;  // [15:0] delimiter
  localparam logic [3:0] REG_ASK     = 4'h6;  // [15:0] full amplitude, [23:16] depth / 256, [31:24] slew / 16 (0: none)
  localparam logic [3:0] REG_FTW     = 4'h7;  // oscillator tuning word
  localparam logic [3:0] REG_RXTHR   = 4'h8;  // [15:0] signed slicer threshold
  localparam logic [3:0] REG_RXHALF  = 4'h9;  // [15:0] half symbol period, [23:16] moving-average length
  localparam logic [3:0] REG_RXTMO   = 4'hA;  // [23:0] reply timeout
  localparam logic [3:0] REG_RXWORD  = 4'hB;  // read: pops one received word
  localparam logic [3:0] REG_STATUS  = 4'hC;  // [4:0] flags (write 1 to clear), [15] tx FIFO full, [31:16] tx FIFO bits
  localparam logic [3:0] REG_IRQEN   = 4'hD;  // interrupt enables, same bits as the flags
  localparam logic [3:0] REG_SLOT    = 4'hF;  // [15:0] 1-out-of-4 slot length
  localparam logic [3:0] REG_RXINFO  = 4'hE;  // read: [15:0] bits of last reply, [16] violation, [31:24] words queued

  // Status flag bits.
  localparam int ST_TX_DONE    = 0;
  localparam int ST_RX_DONE    = 1;
  localparam int ST_RX_TIMEOUT = 2;
  localparam int ST_TX_UNDERRUN = 3;
  localparam int ST_RX_OVERFLOW = 4;
  localparam int ST_NFLAGS     = 5;

endpackage
