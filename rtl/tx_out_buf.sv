// tx_out_buf: transmitter output stage (TxOutBuf).
//
// Registered output multiplexer in front of the pin that drives the
// modulation PCB. Control bit 1 selects the PPDU bit stream (0) or the
// signal generator (1); control bit 0 enables the output, which is held
// low while disabled. Source selection and enable follow the register
// table; the register stage and low idle level are this implementation's
// choices. Latency: one clock.
module tx_out_buf
  import pcbif_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    tx_en,
  input  tx_src_e tx_src,
  input  logic    stream_bit,
  input  logic    siggen_bit,
  output logic    tx_pin
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      tx_pin <= 1'b0;
    else if (!tx_en) tx_pin <= 1'b0;
    else             tx_pin <= (tx_src == TXSRC_SIGGEN) ? siggen_bit : stream_bit;
  end
endmodule
