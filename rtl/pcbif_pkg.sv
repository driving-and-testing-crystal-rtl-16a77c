// pcbif_pkg: shared types and constants of the digital radio node.
//
// Holds the register map of the PCB Interface controller (addresses and
// control bits follow the published register table), the decoded
// configuration struct that the controller hands to the Tx and Rx
// interface modules, and the frame constants of the simplified
// IEEE 802.15.4 PPDU (SFD, PHR, CRC-16) used by the transceiver.
// The SFD value 0xA7, the LSB-first bit order and the CRC-16 polynomial
// x^16+x^12+x^5+1 are taken from IEEE 802.15.4 itself; the register map,
// the 125-character message limit and the 127-octet PSDU limit are the
// design's own published numbers.
package pcbif_pkg;

  // ---- PCB Interface register addresses (byte addresses) ----
  localparam logic [5:0] REG_CTRL     = 6'h00;
  localparam logic [5:0] REG_DAC0     = 6'h04;
  localparam logic [5:0] REG_DAC1     = 6'h08;
  localparam logic [5:0] REG_DAC2     = 6'h0c;
  localparam logic [5:0] REG_DAC3     = 6'h10;
  localparam logic [5:0] REG_ADC_THR  = 6'h14;
  localparam logic [5:0] REG_ADC_RAW  = 6'h18;
  localparam logic [5:0] REG_SIGGEN   = 6'h1c;
  localparam logic [5:0] REG_VERSION  = 6'h20;

  // ---- Control register (0x00) bit positions ----
  localparam int CTRL_TX_EN   = 0; // enable transmitter output
  localparam int CTRL_TX_SRC  = 1; // 0: bit stream, 1: signal generator
  localparam int CTRL_RX_EN   = 2; // enable receiver input
  localparam int CTRL_RX_SRC  = 3; // 0: comparator, 1: ADC
  localparam int CTRL_THR_SEL = 4; // 0: moving average, 1: fixed threshold

  localparam int NUM_DAC = 4;

  typedef enum logic {TXSRC_STREAM = 1'b0, TXSRC_SIGGEN = 1'b1} tx_src_e;
  typedef enum logic {RXSRC_COMP   = 1'b0, RXSRC_ADC    = 1'b1} rx_src_e;
  typedef enum logic {THR_MAVG     = 1'b0, THR_FIXED    = 1'b1} thr_sel_e;

  // Decoded configuration driven by the controller's registers.
  typedef struct packed {
    logic        tx_en;
    tx_src_e     tx_src;
    logic        rx_en;
    rx_src_e     rx_src;
    thr_sel_e    thr_sel;
    logic [11:0] adc_thr;
    logic [15:0] siggen;
  } pcb_cfg_t;

  // ---- Transceiver mode (half duplex) ----
  typedef enum logic [1:0] {XCVR_IDLE = 2'd0, XCVR_TX = 2'd1, XCVR_RX = 2'd2} xcvr_mode_e;

  // ---- Simplified PPDU: SFD (8 bits) | PHR (8 bits) | PSDU incl. CRC ----
  localparam logic [7:0] SFD          = 8'hA7;
  localparam int         MAX_PSDU     = 127;  // octets, incl. 2 CRC octets
  localparam int         MAX_MSG      = 125;  // message octets
  localparam int         MAX_PPDU_BITS = 8 + 8 + 8*MAX_PSDU; // 1032

  // One step of the LSB-first CRC-16 (x^16+x^12+x^5+1, reflected, init 0).
  function automatic logic [15:0] crc16_bit(input logic [15:0] crc, input logic b);
    logic fb;
    fb = crc[0] ^ b;
    crc16_bit = {1'b0, crc[15:1]} ^ (fb ? 16'h8408 : 16'h0000);
  endfunction

endpackage
