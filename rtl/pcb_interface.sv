// pcb_interface: PCB Interface between the transceiver and the radio PCBs.
//
// Sits between the digital transceiver and the FPGA pins that drive the
// modulation PCB and read the demodulation PCB, and removes the need for
// a clock wire between transmitter and receiver.
//
// Transmit side: the sample clock generator divides the system clock to
// the bit rate; on each sample clock the FIFO controller reads one bit of
// the PPDU from the transceiver's bit FIFO; the output stage puts either
// that bit stream or the signal generator's rotating 16-bit test pattern
// on `tx_pin`.
// Receive side: the bit comes either from the comparator (synchronised by
// an input buffer) or from the 12-bit ADC, whose samples the signal
// extractor turns into bits with a fixed or moving-average threshold. The
// input mux picks one, the clock recovery derives the sample clock from
// its rising edges, and the receive FIFO controller samples the bit,
// forwards it to the transceiver with a write pulse and stops after the
// number of payload bits announced in the PHR.
// Controller: an AHB-Lite register file configures all of it, and the
// DAC interface writes every changed DAC register to its DAC over SPI.
//
// The block structure, register map and behaviour follow the design;
// each submodule states its own choices. One choice made here: the
// transmit FIFO is read only while the output is enabled and the bit
// stream is selected, so a frame is not drained while the signal
// generator is on the pin.
module pcb_interface
  import pcbif_pkg::*;
#(
  parameter int unsigned CLK_DIV       = 1000,  // system clocks per bit
  parameter int unsigned AVG_LOG2      = 8,     // moving-average window 2**n
  parameter int unsigned ADC_SCLK_HALF = 4,
  parameter int unsigned DAC_SCLK_HALF = 4,
  parameter logic [31:0] VERSION       = 32'h0000_5000
) (
  input  logic                clk,
  input  logic                rst_n,
  // AHB-Lite slave
  input  logic                hsel,
  input  logic [31:0]         haddr,
  input  logic [1:0]          htrans,
  input  logic                hwrite,
  input  logic [2:0]          hsize,
  input  logic [31:0]         hwdata,
  input  logic                hready,
  output logic [31:0]         hrdata,
  output logic                hreadyout,
  output logic                hresp,
  // transceiver Tx bit FIFO
  input  logic                tx_fifo_bit,
  input  logic                tx_fifo_empty,
  output logic                tx_fifo_rd,
  // transceiver Rx
  output logic                rx_wr,
  output logic                rx_bit,
  // modulation PCB
  output logic                tx_pin,
  // demodulation PCB
  input  logic                comp_in,
  output logic                adc_cs_n,
  output logic                adc_sclk,
  input  logic                adc_sdata,
  // DACs
  output logic                dac_sclk,
  output logic                dac_mosi,
  output logic [NUM_DAC-1:0]  dac_sync_n,
  // status
  output logic                tx_active,
  output logic                rx_in_frame,
  output logic                rx_frame_done,
  output logic                rx_resync,
  output logic                rx_sample_tick
);
  pcb_cfg_t                  cfg;
  logic [NUM_DAC-1:0][11:0]  dac_val;
  logic [NUM_DAC-1:0]        dac_wr;
  logic [11:0]               adc_sample, adc_last, adc_thr;
  logic                      adc_valid, adc_bit, comp_bit, mux_bit;
  logic                      tx_tick, tx_sclk, sig_bit, stream_bit, stream_tick;
  logic                      rx_sclk, dac_busy;

  pcb_ctrl #(.VERSION(VERSION)) u_ctrl (
    .hclk (clk), .hresetn (rst_n),
    .hsel, .haddr, .htrans, .hwrite, .hsize, .hwdata, .hready,
    .hrdata, .hreadyout, .hresp,
    .cfg, .dac_val, .dac_wr,
    .adc_raw (adc_last), .adc_thr (adc_thr)
  );

  // ---------------- transmit ----------------
  tx_clk_gen #(.CLK_DIV(CLK_DIV)) u_txclk (
    .clk, .rst_n, .sample_clk (tx_sclk), .tick (tx_tick)
  );

  tx_sig_gen u_siggen (
    .clk, .rst_n, .tick (tx_tick), .pattern (cfg.siggen), .bit_out (sig_bit)
  );

  assign stream_tick = tx_tick && cfg.tx_en && (cfg.tx_src == TXSRC_STREAM);

  tx_fifo_ctrl u_txfifo (
    .clk, .rst_n, .tick (stream_tick),
    .fifo_bit (tx_fifo_bit), .fifo_empty (tx_fifo_empty), .fifo_rd (tx_fifo_rd),
    .bit_out (stream_bit), .active (tx_active)
  );

  tx_out_buf u_txout (
    .clk, .rst_n, .tx_en (cfg.tx_en), .tx_src (cfg.tx_src),
    .stream_bit, .siggen_bit (sig_bit), .tx_pin
  );

  // ---------------- receive ----------------
  rx_buf_comp u_comp (.clk, .rst_n, .comp_in, .comp_bit);

  rx_buf_adc #(.SCLK_HALF(ADC_SCLK_HALF)) u_adc (
    .clk, .rst_n, .adc_cs_n, .adc_sclk, .adc_sdata,
    .sample (adc_sample), .valid (adc_valid)
  );

  rx_extract_adc #(.AVG_LOG2(AVG_LOG2)) u_extract (
    .clk, .rst_n, .valid (adc_valid), .sample (adc_sample),
    .thr_sel (cfg.thr_sel), .fixed_thr (cfg.adc_thr),
    .bit_out (adc_bit), .threshold (adc_thr), .last_sample (adc_last)
  );

  rx_mux u_rxmux (
    .clk, .rst_n, .rx_en (cfg.rx_en), .rx_src (cfg.rx_src),
    .comp_bit, .adc_bit, .rx_bit (mux_bit)
  );

  clk_recov #(.CLK_DIV(CLK_DIV)) u_crc (
    .clk, .rst_n, .din (mux_bit),
    .sample_clk (rx_sclk), .tick (rx_sample_tick), .resync (rx_resync)
  );

  rx_fifo_ctrl u_rxfifo (
    .clk, .rst_n, .arm (cfg.rx_en), .tick (rx_sample_tick), .din (mux_bit),
    .wr (rx_wr), .bit_out (rx_bit), .in_frame (rx_in_frame), .done (rx_frame_done)
  );

  // ---------------- DACs ----------------
  dac_ctrl #(.SCLK_HALF(DAC_SCLK_HALF)) u_dac (
    .clk, .rst_n, .dac_val, .dac_wr,
    .dac_sclk, .dac_mosi, .dac_sync_n, .busy (dac_busy)
  );

  logic unused;
  assign unused = ^{tx_sclk, rx_sclk, dac_busy};
endmodule
