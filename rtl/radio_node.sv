// radio_node: digital side of one crystal-free radio node.
//
// One node of the test system: the digital transceiver and the PCB
// Interface that connects it to the modulation and demodulation PCBs.
// In transmit mode a message is framed into a simplified IEEE 802.15.4
// PPDU (SFD, PHR, message, CRC-16; no preamble, no chip spreading) and
// sent at the bit rate on `tx_pin`, which switches the modulation PCB
// between its two MSK/BFSK frequencies. In receive mode the demodulated
// bit arrives on the comparator pin or through the ADC; the node recovers
// the bit clock from the data, finds the SFD, stores the message and
// reports its length and CRC result. Transmit and receive are never
// active together (half duplex, `mode`).
//
// The processor, its memories, the DMA and the bus arbiter are outside
// this module: the PCB Interface registers are reached through the AHB-
// Lite slave port, and the message goes in and out on valid/ready octet
// streams where the DMA would attach. Two nodes with nearly equal clocks
// and a channel between `tx_pin` and `comp_in`/ADC form an end-to-end
// link.
module radio_node
  import pcbif_pkg::*;
#(
  parameter int unsigned CLK_DIV       = 1000,
  parameter int unsigned AVG_LOG2      = 8,
  parameter int unsigned ADC_SCLK_HALF = 4,
  parameter int unsigned DAC_SCLK_HALF = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  // AHB-Lite slave: PCB Interface registers
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
  // transceiver control
  input  xcvr_mode_e          mode,
  input  logic                tx_start,
  input  logic [6:0]          tx_len,
  input  logic                tx_valid,
  input  logic [7:0]          tx_data,
  output logic                tx_ready,
  output logic                tx_busy,
  output logic                tx_done,
  output logic                rx_valid,
  output logic [7:0]          rx_data,
  input  logic                rx_ready,
  output logic                rx_done,
  output logic [6:0]          rx_len,
  output logic                rx_crc_ok,
  output logic                rx_recording,
  // pins
  output logic                tx_pin,
  input  logic                comp_in,
  output logic                adc_cs_n,
  output logic                adc_sclk,
  input  logic                adc_sdata,
  output logic                dac_sclk,
  output logic                dac_mosi,
  output logic [NUM_DAC-1:0]  dac_sync_n,
  // status of the PCB Interface
  output logic                tx_active,
  output logic                rx_in_frame,
  output logic                rx_frame_done,
  output logic                rx_resync,
  output logic                rx_sample_tick
);
  logic fifo_bit, fifo_empty, fifo_rd;
  logic rxw, rxb;

  rf_tx u_tx (
    .clk, .rst_n, .en (mode == XCVR_TX), .start (tx_start), .msg_len (tx_len),
    .in_valid (tx_valid), .in_data (tx_data), .in_ready (tx_ready),
    .fifo_rd, .fifo_bit, .fifo_empty, .busy (tx_busy), .done (tx_done)
  );

  rf_rx u_rx (
    .clk, .rst_n, .en (mode == XCVR_RX), .wr (rxw), .din (rxb),
    .out_valid (rx_valid), .out_data (rx_data), .out_ready (rx_ready),
    .recording (rx_recording), .done (rx_done), .frame_len (rx_len), .crc_ok (rx_crc_ok)
  );

  pcb_interface #(
    .CLK_DIV (CLK_DIV), .AVG_LOG2 (AVG_LOG2),
    .ADC_SCLK_HALF (ADC_SCLK_HALF), .DAC_SCLK_HALF (DAC_SCLK_HALF)
  ) u_pcb (
    .clk, .rst_n,
    .hsel, .haddr, .htrans, .hwrite, .hsize, .hwdata, .hready,
    .hrdata, .hreadyout, .hresp,
    .tx_fifo_bit (fifo_bit), .tx_fifo_empty (fifo_empty), .tx_fifo_rd (fifo_rd),
    .rx_wr (rxw), .rx_bit (rxb),
    .tx_pin, .comp_in, .adc_cs_n, .adc_sclk, .adc_sdata,
    .dac_sclk, .dac_mosi, .dac_sync_n,
    .tx_active, .rx_in_frame, .rx_frame_done, .rx_resync, .rx_sample_tick
  );
endmodule
