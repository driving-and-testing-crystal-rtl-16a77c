// pcb_ctrl: PCB Interface controller (Ctrl).
//
// AHB-Lite slave that holds the PCB Interface registers; the processor
// configures every interface module by writing its register:
//   0x00 control   bit0 Tx output enable, bit1 Tx source (0 bit stream,
//                  1 signal generator), bit2 Rx input enable, bit3 Rx
//                  source (0 comparator, 1 ADC), bit4 ADC threshold mode
//                  (0 moving average, 1 fixed)
//   0x04-0x10      DAC0..DAC3 values, bits 11:0
//   0x14           fixed ADC threshold, bits 11:0
//   0x18 (RO)      bits 11:0 latest ADC value, bits 23:12 active threshold
//   0x1c           signal generator pattern, bits 15:0
//   0x20 (RO)      version number, VERSION
// The register map is the design's. This implementation's choices: zero
// wait states, OKAY responses only, word accesses (HSIZE is ignored),
// unmapped addresses read as zero and ignore writes, and a one-cycle
// `dac_wr` strobe per DAC register on every write to it (the DAC
// interface sends the value on each write).
//
// Timing: AHB address phase in one cycle, write data taken in the next;
// read data is driven in the data phase.
module pcb_ctrl
  import pcbif_pkg::*;
#(
  parameter logic [31:0] VERSION = 32'h0000_5000
) (
  input  logic                     hclk,
  input  logic                     hresetn,
  input  logic                     hsel,
  input  logic [31:0]              haddr,
  input  logic [1:0]               htrans,
  input  logic                     hwrite,
  input  logic [2:0]               hsize,
  input  logic [31:0]              hwdata,
  input  logic                     hready,
  output logic [31:0]              hrdata,
  output logic                     hreadyout,
  output logic                     hresp,
  output pcb_cfg_t                 cfg,
  output logic [NUM_DAC-1:0][11:0] dac_val,
  output logic [NUM_DAC-1:0]       dac_wr,
  input  logic [11:0]              adc_raw,
  input  logic [11:0]              adc_thr
);
  logic       wr_pend;
  logic [5:0] addr_q;
  logic [4:0] ctrl_q;

  // Address phase: remember a valid transfer (NONSEQ or SEQ).
  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      wr_pend <= 1'b0;
      addr_q  <= '0;
    end else if (hready) begin
      wr_pend <= hsel && htrans[1] && hwrite;
      addr_q  <= haddr[5:0];
    end
  end

  // Data phase: write.
  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      ctrl_q      <= '0;
      dac_val     <= '0;
      cfg.adc_thr <= '0;
      cfg.siggen  <= '0;
      dac_wr      <= '0;
    end else begin
      dac_wr <= '0;
      if (wr_pend) begin
        unique case (addr_q)
          REG_CTRL:    ctrl_q      <= hwdata[4:0];
          REG_DAC0:    begin dac_val[0] <= hwdata[11:0]; dac_wr[0] <= 1'b1; end
          REG_DAC1:    begin dac_val[1] <= hwdata[11:0]; dac_wr[1] <= 1'b1; end
          REG_DAC2:    begin dac_val[2] <= hwdata[11:0]; dac_wr[2] <= 1'b1; end
          REG_DAC3:    begin dac_val[3] <= hwdata[11:0]; dac_wr[3] <= 1'b1; end
          REG_ADC_THR: cfg.adc_thr <= hwdata[11:0];
          REG_SIGGEN:  cfg.siggen  <= hwdata[15:0];
          default: ;   // read-only or unmapped
        endcase
      end
    end
  end

  assign cfg.tx_en   = ctrl_q[CTRL_TX_EN];
  assign cfg.tx_src  = tx_src_e'(ctrl_q[CTRL_TX_SRC]);
  assign cfg.rx_en   = ctrl_q[CTRL_RX_EN];
  assign cfg.rx_src  = rx_src_e'(ctrl_q[CTRL_RX_SRC]);
  assign cfg.thr_sel = thr_sel_e'(ctrl_q[CTRL_THR_SEL]);

  // Data phase: read.
  always_comb begin
    unique case (addr_q)
      REG_CTRL:    hrdata = {27'd0, ctrl_q};
      REG_DAC0:    hrdata = {20'd0, dac_val[0]};
      REG_DAC1:    hrdata = {20'd0, dac_val[1]};
      REG_DAC2:    hrdata = {20'd0, dac_val[2]};
      REG_DAC3:    hrdata = {20'd0, dac_val[3]};
      REG_ADC_THR: hrdata = {20'd0, cfg.adc_thr};
      REG_ADC_RAW: hrdata = {8'd0, adc_thr, adc_raw};
      REG_SIGGEN:  hrdata = {16'd0, cfg.siggen};
      REG_VERSION: hrdata = VERSION;
      default:     hrdata = '0;
    endcase
  end

  assign hreadyout = 1'b1;
  assign hresp     = 1'b0;

  logic unused;
  assign unused = ^{haddr[31:6], hsize, htrans[0], hwdata[31:16]};
endmodule
