// rx_mux: receiver input selector (RxMux).
//
// Chooses the receiver's bit source: the comparator path (control bit 3
// = 0) or the bit extracted from ADC samples (bit 3 = 1). Control bit 2
// enables the receiver input; while disabled the output is held low.
// Both selections follow the register table; the register stage and low
// idle level are this implementation's choices. Latency: one clock.
module rx_mux
  import pcbif_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    rx_en,
  input  rx_src_e rx_src,
  input  logic    comp_bit,
  input  logic    adc_bit,
  output logic    rx_bit
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      rx_bit <= 1'b0;
    else if (!rx_en) rx_bit <= 1'b0;
    else             rx_bit <= (rx_src == RXSRC_ADC) ? adc_bit : comp_bit;
  end
endmodule
