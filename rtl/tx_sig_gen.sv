// tx_sig_gen: test signal generator (TxSigGen).
//
// Emits the 16-bit pattern of the signal generator register one bit per
// transmitter sample clock, rotating through it endlessly so that a
// constant test bit stream appears on the output pin. The bitwise
// rotation follows the design; starting at bit 0 (LSB first) is this
// implementation's choice. A new bit appears one cycle after each `tick`.
module tx_sig_gen (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tick,      // Tx sample clock strobe
  input  logic [15:0] pattern,   // register 0x1c
  output logic        bit_out
);
  logic [3:0] idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx     <= '0;
      bit_out <= 1'b0;
    end else if (tick) begin
      bit_out <= pattern[idx];
      idx     <= idx + 1'b1;
    end
  end
endmodule
