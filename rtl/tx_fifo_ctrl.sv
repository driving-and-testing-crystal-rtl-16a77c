// tx_fifo_ctrl: transmitter FIFO controller (TxFifoCtrl).
//
// Pulls the PPDU bit stream out of the transceiver's bit FIFO at the
// transmitter sample rate: on every sample clock strobe it issues a
// one-cycle read pulse if the FIFO holds a bit and drives that bit on
// `bit_out` until the next strobe. When the FIFO is empty the line idles
// low. The read pulse towards the transceiver follows the design's block
// diagram; the low idle level and the `active` flag are this
// implementation's choices. The FIFO is first-word-fall-through:
// `fifo_bit` is valid whenever `fifo_empty` is low.
module tx_fifo_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,        // Tx sample clock strobe
  input  logic fifo_bit,    // head of the transceiver bit FIFO
  input  logic fifo_empty,
  output logic fifo_rd,     // read pulse
  output logic bit_out,     // serial bit stream
  output logic active       // a frame bit is being sent
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_out <= 1'b0;
      active  <= 1'b0;
    end else if (tick) begin
      bit_out <= fifo_empty ? 1'b0 : fifo_bit;
      active  <= !fifo_empty;
    end
  end

  assign fifo_rd = tick && !fifo_empty;
endmodule
