// dsp_if: the interface between the DSP, which runs the protocol stack, and the FPGA's
// signal processing.
//
// Towards the FPGA it holds every link parameter in a register (PIE timing, ASK amplitude,
// depth and slew rate, oscillator tuning word, slicer threshold, half-symbol period, moving-average length,
// reply timeout, line codes, 1-out-of-4 slot length, carrier on/off), so the whole parameter
// range of a standard can be set at run time, and it buffers the bits of the next frame in a
// FIFO. Towards the DSP it queues the received 32-bit words in a second FIFO, keeps the
// result of the last reply and raises an interrupt.
//
// Bus: synchronous, one access per cycle with `bus_cs`; a write takes `bus_wdata` at the
// clock edge; a read returns `bus_rdata` in the next cycle. Reading REG_RXWORD pops the
// receive FIFO. The register map (rfid_pkg::REG_*) and the interrupt scheme (flags set by
// events, cleared by writing 1 to REG_STATUS, `irq` = any enabled flag) are this design's own.
// Bits written while the transmit FIFO is full and words arriving while the receive FIFO is
// full are lost; the latter sets the overflow flag.
module dsp_if
  import rfid_pkg::*;
#(
  parameter int unsigned TX_DEPTH = 512,
  parameter int unsigned RX_DEPTH = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  // DSP bus
  input  logic        bus_cs,
  input  logic        bus_we,
  input  logic [3:0]  bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output logic        irq,
  // configuration
  output logic        carrier_on,
  output tx_code_e    tx_code,
  output logic [15:0] ppm_slot,
  output pie_timing_t pie_timing,
  output logic [15:0] amp_full,
  output logic [7:0]  depth_q8,
  output logic [7:0]  slew,
  output logic [31:0] ftw,
  output rx_cfg_t     rx_cfg,
  // transmit
  output logic        tx_start,
  output logic        tx_preamble,
  output logic        txb_valid,
  output logic        txb_data,
  output logic        txb_last,
  input  logic        txb_ready,
  // events
  input  logic        ev_tx_done,
  input  logic        ev_tx_underrun,
  input  logic        ev_rx_done,
  input  logic        ev_rx_timeout,
  // receive
  input  logic        rxw_valid,
  input  logic [31:0] rxw_data,
  input  logic [15:0] rx_bits,
  input  logic        rx_violation
);

  logic wr, rd;
  assign wr = bus_cs && bus_we;
  assign rd = bus_cs && !bus_we;

  // ---- configuration registers ----
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      carrier_on <= 1'b0;
      tx_code    <= TXC_PIE;
      ppm_slot   <= PPM_SLOT_DEFAULT;
      pie_timing <= PIE_DEFAULT;
      amp_full   <= 16'd30000;
      depth_q8   <= 8'd77;
      slew       <= 8'd0;
      ftw        <= FTW_13M56;
      rx_cfg     <= RX_DEFAULT;
    end else if (wr) begin
      unique case (bus_addr)
        REG_CTRL: begin
          carrier_on  <= bus_wdata[0];
          rx_cfg.code <= rx_code_e'(bus_wdata[1]);
          tx_code     <= tx_code_e'(bus_wdata[2]);
        end
        REG_TARI: begin
          pie_timing.tari <= bus_wdata[15:0];
          pie_timing.pw   <= bus_wdata[31:16];
        end
        REG_RTCAL: begin
          pie_timing.rtcal <= bus_wdata[15:0];
          pie_timing.trcal <= bus_wdata[31:16];
        end
        REG_DELIM:  pie_timing.delim <= bus_wdata[15:0];
        REG_ASK: begin
          amp_full <= bus_wdata[15:0];
          depth_q8 <= bus_wdata[23:16];
          slew     <= bus_wdata[31:24];
        end
        REG_FTW:    ftw            <= bus_wdata;
        REG_SLOT:   ppm_slot       <= bus_wdata[15:0];
        REG_RXTHR:  rx_cfg.thresh  <= signed'(bus_wdata[15:0]);
        REG_RXHALF: begin
          rx_cfg.half   <= bus_wdata[15:0];
          rx_cfg.ma_len <= bus_wdata[23:16];
        end
        REG_RXTMO:  rx_cfg.timeout <= bus_wdata[23:0];
        default: ;
      endcase
    end
  end

  // ---- transmit command ----
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tx_start    <= 1'b0;
      tx_preamble <= 1'b0;
    end else begin
      tx_start <= wr && (bus_addr == REG_TXCMD) && bus_wdata[0];
      if (wr && (bus_addr == REG_TXCMD)) tx_preamble <= bus_wdata[1];
    end
  end

  // ---- transmit bit FIFO: {last, bit} ----
  logic [1:0] txf_rdata;
  logic       txf_empty, txf_full;
  logic [$clog2(TX_DEPTH+1)-1:0] txf_count;

  sync_fifo #(.W(2), .DEPTH(TX_DEPTH)) u_txfifo (
    .clk  (clk),
    .rst_n(rst_n),
    .push (wr && (bus_addr == REG_TXBIT)),
    .wdata(bus_wdata[1:0]),
    .pop  (txb_ready),
    .rdata(txf_rdata),
    .empty(txf_empty),
    .full (txf_full),
    .count(txf_count)
  );

  assign txb_valid = !txf_empty;
  assign txb_data  = txf_rdata[0];
  assign txb_last  = txf_rdata[1];

  // ---- receive word FIFO ----
  logic [31:0] rxf_rdata;
  logic        rxf_empty, rxf_full;
  logic [$clog2(RX_DEPTH+1)-1:0] rxf_count;
  logic        rx_pop;
  assign rx_pop = rd && (bus_addr == REG_RXWORD);

  sync_fifo #(.W(32), .DEPTH(RX_DEPTH)) u_rxfifo (
    .clk  (clk),
    .rst_n(rst_n),
    .push (rxw_valid),
    .wdata(rxw_data),
    .pop  (rx_pop),
    .rdata(rxf_rdata),
    .empty(rxf_empty),
    .full (rxf_full),
    .count(rxf_count)
  );

  // ---- interrupt flags ----
  logic [ST_NFLAGS-1:0] flags, irq_en, set_ev;
  always_comb begin
    set_ev = '0;
    set_ev[ST_TX_DONE]     = ev_tx_done;
    set_ev[ST_RX_DONE]     = ev_rx_done;
    set_ev[ST_RX_TIMEOUT]  = ev_rx_timeout;
    set_ev[ST_TX_UNDERRUN] = ev_tx_underrun;
    set_ev[ST_RX_OVERFLOW] = rxw_valid && rxf_full;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      flags  <= '0;
      irq_en <= '0;
      irq    <= 1'b0;
    end else begin
      flags <= (flags & ~((wr && bus_addr == REG_STATUS) ? bus_wdata[ST_NFLAGS-1:0] : '0)) | set_ev;
      if (wr && bus_addr == REG_IRQEN) irq_en <= bus_wdata[ST_NFLAGS-1:0];
      irq <= |(flags & irq_en);
    end
  end

  // ---- read back ----
  always_ff @(posedge clk) begin
    if (!rst_n) bus_rdata <= '0;
    else if (rd) begin
      unique case (bus_addr)
        REG_CTRL:   bus_rdata <= {29'd0, tx_code, rx_cfg.code, carrier_on};
        REG_SLOT:   bus_rdata <= {16'd0, ppm_slot};
        REG_TARI:   bus_rdata <= {pie_timing.pw, pie_timing.tari};
        REG_RTCAL:  bus_rdata <= {pie_timing.trcal, pie_timing.rtcal};
        REG_DELIM:  bus_rdata <= {16'd0, pie_timing.delim};
        REG_ASK:    bus_rdata <= {slew, depth_q8, amp_full};
        REG_FTW:    bus_rdata <= ftw;
        REG_RXTHR:  bus_rdata <= {{16{rx_cfg.thresh[15]}}, rx_cfg.thresh};
        REG_RXHALF: bus_rdata <= {8'd0, rx_cfg.ma_len, rx_cfg.half};
        REG_RXTMO:  bus_rdata <= {8'd0, rx_cfg.timeout};
        REG_RXWORD: bus_rdata <= rxf_empty ? 32'd0 : rxf_rdata;
        REG_STATUS: bus_rdata <= {16'(txf_count), txf_full, 10'd0, flags};
        REG_IRQEN:  bus_rdata <= {27'd0, irq_en};
        REG_RXINFO: bus_rdata <= {8'(rxf_count), 7'd0, rx_violation, rx_bits};
        default:    bus_rdata <= 32'd0;
      endcase
    end
  end

endmodule
